// Self-checking testbench for srsa_event_decode.
//
// Exhaustive over every reachable time (minutes 0..6, tens 0..5, seconds
// 0..9), the enable and both clock phases. The reference works in whole
// seconds: a flag signal is due at 6:00, 5:00, 4:00, 1:00 and 0:00; horn is
// expected exactly at those times and alert in the six seconds from five
// before each up to it, during the high clock phase, both only when enabled.
module tb_srsa_event_decode;
  import srsa_pkg::*;

  srsa_time_t t;
  logic       en, clk_phase;
  logic       alert, horn;
  int         checks = 0;
  int         failures = 0;
  int         signal_at [5] = '{360, 300, 240, 60, 0};

  srsa_event_decode dut (.t(t), .en(en), .clk_phase(clk_phase), .alert(alert), .horn(horn));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 420; s++) begin
      for (int e = 0; e < 2; e++) begin
        for (int c = 0; c < 2; c++) begin
          logic due, near;
          due = 1'b0;
          near = 1'b0;
          foreach (signal_at[i]) begin
            if (s == signal_at[i]) due = 1'b1;
            if (s >= signal_at[i] && s <= signal_at[i] + 5) near = 1'b1;
          end
          t.min = bcd_t'(s / 60);
          t.tens = bcd_t'((s % 60) / 10);
          t.sec = bcd_t'(s % 10);
          en = e[0];
          clk_phase = c[0];
          #1;
          checks++;
          if (horn !== (due && en) || alert !== (near && en && clk_phase)) begin
            failures++;
            $display("%0d:%0d%0d en=%0b clk=%0b horn=%0b alert=%0b", t.min, t.tens, t.sec,
                     en, clk_phase, horn, alert);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
