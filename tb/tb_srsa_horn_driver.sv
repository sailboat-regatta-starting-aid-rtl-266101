// Self-checking testbench for srsa_horn_driver.
//
// Directed: a one-cycle input pulse must give the output pattern 1 0 1 0 0
// in the cycles after the edge that sees it (two one-clock blasts, one clock
// of silence between); an input held for several cycles gives the same two
// blasts once and no more until it is released. Random: the output is
// compared every cycle with a model that counts phases of the pattern.
module tb_srsa_horn_driver;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic pp = 1'b0;
  logic horn;
  int   checks = 0;
  int   failures = 0;

  // Model: phase 0 idle, 1 first blast, 2 gap, 3 second blast, 4 waiting
  // for release.
  int   phase = 0;
  logic m_horn = 1'b0;

  srsa_horn_driver dut (.clk(clk), .rst_n(rst_n), .pp(pp), .horn(horn));

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
      case (phase)
        0: phase = pp ? 1 : 0;
        1: phase = 2;
        2: phase = 3;
        3: phase = pp ? 4 : 0;
        default: phase = pp ? 4 : 0;
      endcase
      m_horn = (phase == 1) || (phase == 3);
    end
  end

  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      checks++;
      if (horn !== m_horn) begin
        failures++;
        $display("t=%0t horn=%0b expected %0b", $time, horn, m_horn);
      end
    end
  end

  task automatic expect_pattern(input int hold, input logic [4:0] pat);
    logic [4:0] seen;
    @(negedge clk) pp = 1'b1;
    for (int i = 0; i < 5; i++) begin
      @(posedge clk);
      #1 seen[4-i] = horn;
      @(negedge clk) if (i == hold - 1) pp = 1'b0;
    end
    pp = 1'b0;
    checks++;
    if (seen !== pat) begin
      failures++;
      $display("hold %0d: pattern %b expected %b", hold, seen, pat);
    end
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    expect_pattern(1, 5'b10100);
    expect_pattern(4, 5'b10100);
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk) pp = ($urandom % 4) == 0;
    end
    @(negedge clk) pp = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
