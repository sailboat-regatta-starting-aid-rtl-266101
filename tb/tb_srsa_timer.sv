// Self-checking testbench for srsa_timer.
//
// Reference model: the fleet count and the time left in whole seconds.
// Counting: from 1 s with one fleet left to 0 s and no fleet; otherwise one
// second down, and from 0 s with fleets waiting to 299 s (4:59) with one
// fleet fewer. Load: 9 -> 0, 0 -> 1 with 305 s (5:05), else +1. Reset: 365 s
// (6:05) and at least one fleet. The model is converted to BCD digits and
// compared after every edge, as are zero, horn and alert (alert in both
// clock phases).
// Directed part: two fleets from 5:05 with the enable held must give horns
// exactly 5, 65, 245 and 305 cycles after counting starts, then again 300
// cycles later, and end at 0:00 with zero. A random part mixes load, reset
// and enable.
module tb_srsa_timer;
  import srsa_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       en = 1'b0, load = 1'b0, reset = 1'b0;
  bcd_t       item;
  srsa_time_t t;
  logic       alert, horn, zero;
  int         checks = 0;
  int         failures = 0;

  int m_item = 0;
  int m_secs = 0;

  srsa_timer dut (.clk(clk), .rst_n(rst_n), .en(en), .load(load), .reset(reset),
                  .item(item), .t(t), .alert(alert), .horn(horn), .zero(zero));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic is_due(int s);
    return s == 360 || s == 300 || s == 240 || s == 60 || s == 0;
  endfunction

  function automatic logic is_near(int s);
    for (int k = 0; k <= 5; k++) if (s >= k && is_due(s - k)) return 1'b1;
    return 1'b0;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      if (en && !(m_item == 0 && m_secs == 0)) begin
        if (m_item == 1 && m_secs == 1) begin
          m_item = 0; m_secs = 0;
        end else if (m_secs > 0) begin
          m_secs--;
        end else begin
          m_secs = 299; m_item--;
        end
      end
      if (load) begin
        if (m_item == 9) m_item = 0;
        else if (m_item == 0) begin m_item = 1; m_secs = 305; end
        else m_item++;
      end
      if (reset) begin
        m_secs = 365;
        if (m_item == 0) m_item = 1;
      end
    end
  end

  task automatic compare(input logic phase);
    logic m_zero;
    m_zero = (m_item == 0 && m_secs == 0);
    checks++;
    if (item != bcd_t'(m_item) || t.min != bcd_t'(m_secs / 60) ||
        t.tens != bcd_t'((m_secs % 60) / 10) || t.sec != bcd_t'(m_secs % 10) ||
        zero !== m_zero || horn !== (en && is_due(m_secs)) ||
        alert !== (en && phase && is_near(m_secs))) begin
      failures++;
      $display("t=%0t dut %0d %0d:%0d%0d z%0b h%0b a%0b  model %0d %0d s", $time,
               item, t.min, t.tens, t.sec, zero, horn, alert, m_item, m_secs);
    end
  endtask

  always @(posedge clk) begin #1; if (rst_n) compare(1'b1); end
  always @(negedge clk) begin #1; if (rst_n) compare(1'b0); end

  int horn_cycles[$];
  int cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    int c0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Two fleets.
    @(negedge clk) load = 1'b1;
    @(negedge clk) load = 1'b1;
    @(negedge clk) load = 1'b0;
    @(negedge clk);
    checks++;
    if (item != 4'd2 || t != TIME_FIRST) begin
      failures++; $display("after two loads: %0d %0d:%0d%0d", item, t.min, t.tens, t.sec);
    end
    en = 1'b1;
    c0 = cycle;
    // The enable is dropped in the cycle after zero rises, as the sequence
    // controller does.
    for (int i = 0; i < 620; i++) begin
      @(posedge clk); #2;
      if (horn) horn_cycles.push_back(cycle - c0);
      if (zero) begin
        @(negedge clk) en = 1'b0;
        break;
      end
    end
    checks++;
    if (horn_cycles.size() != 7 || horn_cycles[0] != 5 || horn_cycles[1] != 65 ||
        horn_cycles[2] != 245 || horn_cycles[3] != 305 || horn_cycles[4] != 365 ||
        horn_cycles[5] != 545 || horn_cycles[6] != 605) begin
      failures++;
      $display("horn cycles %p zero=%0b", horn_cycles, zero);
    end
    // Stopped: no further horn, the time stays at 0:00.
    repeat (20) @(posedge clk);
    #2;
    checks++;
    if (horn || item != 4'd0 || t != TIME_ZERO) begin
      failures++; $display("after stop: horn=%0b item=%0d", horn, item);
    end
    // Random mix.
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      load  = ($urandom % 40) == 0;
      reset = ($urandom % 300) == 0;
      if (($urandom % 200) == 0) en = ~en;
    end
    @(negedge clk) begin load = 0; reset = 0; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
