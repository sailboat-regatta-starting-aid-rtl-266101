// Self-checking testbench for srsa_one_pulse.
//
// Drives the button input with random press lengths (changed only at the
// falling clock edge) and checks after every rising edge that the output is
// high exactly in the cycle after the first edge that sees the button down:
// z(k) = x(k) and not x(k-1), with x(k) the level sampled at edge k. Also
// counts the pulses against the number of presses.
module tb_srsa_one_pulse;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic x = 1'b0;
  logic z;
  int   checks = 0;
  int   failures = 0;
  int   presses = 0;
  int   pulses = 0;
  logic x_prev = 1'b0;
  logic z_exp = 1'b0;

  srsa_one_pulse dut (.clk(clk), .rst_n(rst_n), .x(x), .z(z));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      z_exp  <= x && !x_prev;
      x_prev <= x;
    end
  end

  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      checks++;
      if (z !== z_exp) begin
        failures++;
        $display("t=%0t z=%0b expected %0b", $time, z, z_exp);
      end
      if (z) pulses++;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      int len;
      len = 1 + ($urandom % 6);
      @(negedge clk) x = 1'b1;
      presses++;
      repeat (len - 1) @(negedge clk);
      @(negedge clk) x = 1'b0;
      repeat ($urandom % 3) @(negedge clk);
    end
    repeat (3) @(negedge clk);
    checks++;
    if (pulses != presses) begin
      failures++;
      $display("pulses %0d for %0d presses", pulses, presses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
