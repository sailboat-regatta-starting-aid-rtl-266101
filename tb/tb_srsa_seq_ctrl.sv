// Self-checking testbench for srsa_seq_ctrl.
//
// The reference is the controller's state transition table written out as
// text, one row per present state and one column per input combination
// (PP ST STOP = 000 ... 111): a next-state name and an "EN RESET" output
// pair. Random inputs are applied at the falling edge; after each rising
// edge the registered outputs must equal the table entry for the state and
// inputs seen at that edge. A directed part checks the postponement timing:
// reset is high for a single cycle with en low, even when the button is held.
module tb_srsa_seq_ctrl;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic pp = 1'b0, st = 1'b0, stop = 1'b0;
  logic en, reset;
  int   checks = 0;
  int   failures = 0;

  srsa_seq_ctrl dut (.clk(clk), .rst_n(rst_n), .pp(pp), .st(st), .stop(stop),
                     .en(en), .reset(reset));

  // Columns: PP ST STOP = 000 001 010 011 100 101 110 111
  string next_tab [3] = '{"S0 S0 S2 S0 S1 S1 S1 S1",
                          "S0 S0 S0 S0 S1 S1 S1 S1",
                          "S2 S0 S2 S0 S1 S1 S1 S0"};
  string out_tab  [3] = '{"00 00 10 00 01 01 01 01",
                          "00 00 00 00 00 00 00 00",
                          "10 00 10 00 01 01 01 00"};

  int   m_state = 0;
  logic m_en = 1'b0, m_reset = 1'b0;

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      int col;
      string ns, o;
      col     = {pp, st, stop};
      ns      = next_tab[m_state].substr(col * 3, col * 3 + 1);
      o       = out_tab[m_state].substr(col * 3, col * 3 + 1);
      m_en    = (o[0] == "1");
      m_reset = (o[1] == "1");
      m_state = ns.substr(1, 1).atoi();
    end
  end

  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      checks++;
      if (en !== m_en || reset !== m_reset) begin
        failures++;
        $display("t=%0t en=%0b reset=%0b expected %0b %0b (state S%0d)",
                 $time, en, reset, m_en, m_reset, m_state);
      end
    end
  end

  task automatic step(input logic p, input logic s, input logic z);
    @(negedge clk);
    pp = p; st = s; stop = z;
  endtask

  initial begin
    int resets;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Random part: all inputs, with runs so every state is held a while.
    for (int i = 0; i < 3000; i++) begin
      step(($urandom % 5) == 0, ($urandom % 2) == 0, ($urandom % 4) == 0);
    end
    // Directed: start, count, then postpone with the button held 4 cycles.
    step(0, 0, 0); step(0, 0, 0);
    step(0, 1, 0); step(0, 0, 0); step(0, 0, 0);
    checks++;
    if (!en) begin failures++; $display("en not set after start"); end
    resets = 0;
    for (int i = 0; i < 4; i++) begin
      step(1, 0, 0);
      #2;
      if (reset) resets++;
    end
    step(0, 0, 0); #2; if (reset) resets++;
    step(0, 0, 0); #2; if (reset) resets++;
    checks++;
    if (resets != 1 || en) begin
      failures++;
      $display("postpone gave %0d reset cycles, en=%0b", resets, en);
    end
    // Start while stop is high has no effect.
    step(0, 1, 1); step(0, 1, 1); #2;
    checks++;
    if (en) begin failures++; $display("start accepted with stop high"); end
    step(0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
