// End-to-end testbench for srsa_top at its default configuration.
//
// A cycle-level reference model of the whole starting aid runs beside the
// design: button sampling, the three-state controller (written from its
// description: stopped, reset, counting), the countdown in whole seconds,
// the two-blast recall horn and the flag-signal times 6:00, 5:00, 4:00,
// 1:00, 0:00. Every clock phase, the four active-low digit patterns, the
// horn and the alert are compared with the model.
//
// The scenario plays a regatta: power up, press Start with no fleet (must be
// ignored), enter two fleets, start and run the first fleet, add a third
// fleet while counting, postpone in the middle of the sequence, restart,
// run all fleets to the end, make a general recall after the last start,
// sound the manual horn, and roll the fleet count over from 9 to 0. Each of
// these mechanisms is counted and a failure is counted for any that never
// happened. Horn times are also checked in clock cycles against the
// 5/65/245/305-cycle spacing of a five-minute sequence at one clock per
// second.
module tb_srsa_top;
  import srsa_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  add_fleet = 1'b0, pp = 1'b0, start_n = 1'b1, manual_horn = 1'b0;
  seg7_t seg_fleet_n, seg_min_n, seg_tens_n, seg_sec_n;
  logic  alert, horn;
  int    checks = 0;
  int    failures = 0;

  srsa_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- model
  typedef enum int {M_STOPPED, M_RESET, M_COUNTING} m_ctrl_t;

  m_ctrl_t m_ctrl = M_STOPPED;
  logic    m_en = 0, m_rst = 0, m_load = 0, m_add_prev = 0;
  int      m_item = 0, m_secs = 0;
  int      m_hphase = 0;
  logic    m_hblast = 0;

  // Mechanism counters.
  int n_start_ignored = 0, n_rolling = 0, n_last_done = 0, n_postpone = 0;
  int n_recall_after = 0, n_recall_horn = 0, n_manual = 0, n_rollover = 0;
  int n_add_running = 0, n_alert = 0;

  function automatic logic m_zero();
    return m_item == 0 && m_secs == 0;
  endfunction

  function automatic logic due(int s);
    return s == 360 || s == 300 || s == 240 || s == 60 || s == 0;
  endfunction

  function automatic logic near(int s);
    for (int k = 0; k <= 5; k++) if (s >= k && due(s - k)) return 1'b1;
    return 1'b0;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      logic    pp_s, st_s, z;
      m_ctrl_t c_next;
      logic    en_next, rst_next;
      pp_s = pp;
      st_s = !start_n;
      z    = m_zero();
      // Timer, with the registered controls of the previous cycle.
      if (m_en && !z) begin
        if (m_item == 1 && m_secs == 1) begin
          m_item = 0; m_secs = 0; n_last_done++;
        end else if (m_secs > 0) begin
          m_secs--;
        end else begin
          m_secs = 299; m_item--; n_rolling++;
        end
      end
      if (m_load) begin
        if (m_en) n_add_running++;
        if (m_item == 9) begin m_item = 0; n_rollover++; end
        else if (m_item == 0) begin m_item = 1; m_secs = 305; end
        else m_item++;
      end
      if (m_rst) begin
        if (z) n_recall_after++;
        m_secs = 365;
        if (m_item == 0) m_item = 1;
      end
      // Recall horn: blasts one and three cycles after the reset pulse.
      case (m_hphase)
        0: m_hphase = m_rst ? 1 : 0;
        1: m_hphase = 2;
        2: m_hphase = 3;
        default: m_hphase = m_rst ? 3 : 0;
      endcase
      m_hblast = (m_hphase == 1) || (m_hphase == 3);
      if (m_hphase == 3 && m_hblast) n_recall_horn++;
      // Controller.
      c_next = M_STOPPED; en_next = 0; rst_next = 0;
      case (m_ctrl)
        M_STOPPED: begin
          if (pp_s) begin c_next = M_RESET; rst_next = 1; end
          else if (st_s && !z) begin c_next = M_COUNTING; en_next = 1; end
          else if (st_s) n_start_ignored++;
        end
        M_RESET: c_next = pp_s ? M_RESET : M_STOPPED;
        default: begin
          if (pp_s && !(st_s && z)) begin
            c_next = M_RESET; rst_next = 1; n_postpone++;
          end else if (!pp_s && !z) begin
            c_next = M_COUNTING; en_next = 1;
          end
        end
      endcase
      m_ctrl = c_next; m_en = en_next; m_rst = rst_next;
      // Add Fleet one-pulse.
      m_load = add_fleet && !m_add_prev;
      m_add_prev = add_fleet;
    end
  end

  // Segment patterns of the digits, lit segments as letters.
  string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg",
                      "acdefg", "abc", "abcdefg", "abcdfg"};

  function automatic seg7_t pattern_n(int v);
    seg7_t on = '0;
    foreach (lit[v][i]) on[6 - (lit[v][i] - "a")] = 1'b1;
    return ~on;
  endfunction

  int cycle = 0;
  int horn_log[$];
  always @(posedge clk) cycle++;

  task automatic compare(input logic phase);
    logic h_exp, a_exp;
    h_exp = manual_horn || m_hblast || (m_en && due(m_secs));
    a_exp = m_en && phase && near(m_secs);
    checks++;
    if (seg_fleet_n !== pattern_n(m_item) || seg_min_n !== pattern_n(m_secs / 60) ||
        seg_tens_n !== pattern_n((m_secs % 60) / 10) || seg_sec_n !== pattern_n(m_secs % 10) ||
        horn !== h_exp || alert !== a_exp) begin
      failures++;
      $display("t=%0t cycle %0d mismatch: model %0d fleets %0d s en=%0b horn=%0b/%0b alert=%0b/%0b",
               $time, cycle, m_item, m_secs, m_en, horn, h_exp, alert, a_exp);
    end
    if (phase && alert) n_alert++;
  endtask

  always @(posedge clk) begin #1; if (rst_n) compare(1'b1); end
  always @(negedge clk) begin #1; if (rst_n) compare(1'b0); end

  // Horns that come from the timer (not manual, not recall) are logged by cycle.
  always @(posedge clk) begin
    #2;
    if (rst_n && m_en && due(m_secs)) horn_log.push_back(cycle);
  end

  // --------------------------------------------------------------- driving
  task automatic press(ref logic b, input logic active, input int cycles);
    @(negedge clk) b = active;
    repeat (cycles) @(negedge clk);
    b = !active;
  endtask

  task automatic idle(input int cycles);
    repeat (cycles) @(negedge clk);
  endtask

  task automatic check_spacing(input int first, input string what);
    int rel [4] = '{5, 65, 245, 305};
    checks++;
    if (horn_log.size() < first + 4) begin
      failures++; $display("%s: only %0d timer horns", what, horn_log.size());
    end else begin
      for (int i = 1; i < 4; i++) begin
        if (horn_log[first + i] - horn_log[first] != rel[i] - rel[0]) begin
          failures++;
          $display("%s: horn %0d at +%0d cycles, expected +%0d", what, i,
                   horn_log[first + i] - horn_log[first], rel[i] - rel[0]);
          break;
        end
      end
    end
  endtask

  initial begin
    int h0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    idle(3);
    // Start with no fleet entered: ignored.
    press(start_n, 1'b0, 2);
    idle(5);
    // Two fleets, then start.
    press(add_fleet, 1'b1, 3);
    idle(2);
    press(add_fleet, 1'b1, 1);
    idle(3);
    h0 = horn_log.size();
    press(start_n, 1'b0, 1);
    idle(320);
    check_spacing(h0, "first fleet");
    // Add a third fleet while counting.
    press(add_fleet, 1'b1, 2);
    idle(100);
    // Postpone in the middle of the sequence, holding the button a while.
    press(pp, 1'b1, 4);
    idle(10);
    // Restart from 6:05: flag down at 6:00, then the full sequence.
    h0 = horn_log.size();
    press(start_n, 1'b0, 1);
    // Two remaining fleets: 6:05 -> 0:00 takes 365 cycles, then 300 more;
    // horns at 6:00 5:00 4:00 1:00 0:00, then 4:00 1:00 0:00.
    idle(680);
    checks++;
    if (horn_log.size() - h0 != 8) begin
      failures++; $display("restart: %0d timer horns, expected 8", horn_log.size() - h0);
    end
    // General recall after the last start: one fleet back, 6:05.
    press(pp, 1'b1, 1);
    idle(5);
    // Manual horn.
    press(manual_horn, 1'b1, 3);
    idle(3);
    // Fleet count over 9 rolls to 0.
    for (int i = 0; i < 9; i++) begin
      press(add_fleet, 1'b1, 1);
      idle(1);
    end
    idle(5);

    // Every mechanism must have been exercised.
    begin
      int n [10];
      string nm [10];
      n = '{n_start_ignored, n_rolling, n_last_done, n_postpone, n_recall_after,
                     n_recall_horn, n_manual, n_rollover, n_add_running, n_alert};
      nm = '{"start ignored", "rolling restart", "last fleet done", "postpone",
                         "recall after end", "recall horn", "manual horn", "fleet rollover",
                         "add fleet while running", "alert"};
      for (int i = 0; i < 10; i++) begin
        checks++;
        $display("%-24s %0d", nm[i], n[i]);
        if (n[i] == 0) begin failures++; $display("never happened: %s", nm[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (manual_horn) n_manual++;

endmodule
