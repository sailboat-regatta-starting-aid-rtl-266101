// Self-checking testbench for srsa_bcd7seg.
//
// For every input code the expected lit segments are written as a list of
// segment letters (for example "bc" for 1), turned into a pattern, inverted
// for the active-low outputs and compared with the decoder.
module tb_srsa_bcd7seg;
  import srsa_pkg::*;

  bcd_t  d;
  seg7_t seg_n;
  int    checks = 0;
  int    failures = 0;

  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg",
                      "acdefg", "abc", "abcdefg", "abcdfg", "abcefg",
                      "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  srsa_bcd7seg dut (.d(d), .seg_n(seg_n));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      seg7_t on;
      on = '0;
      foreach (lit[v][i]) on[6 - (lit[v][i] - "a")] = 1'b1;
      d = bcd_t'(v);
      #1;
      checks++;
      if (seg_n !== ~on) begin
        failures++;
        $display("code %0d: seg_n=%b expected %b", v, seg_n, ~on);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
