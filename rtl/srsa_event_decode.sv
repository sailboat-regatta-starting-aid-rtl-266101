// Alert and horn decoder of the timer.
//
// Flag signals are made at x:00 of minutes 6, 5, 4, 1 and 0 of the count
// (postponement lowered, class flag up, preparatory up, preparatory down,
// start). The decoder watches the displayed time and, while the timer is
// enabled:
//   * horn  : high while the time shows m:00 for one of those minutes, one
//             clock cycle, since the timer moves on at the next edge;
//   * alert : intermittent, high during the high half of each clock cycle
//             from m:05 to m:00 of those minutes, warning the race committee
//             that a flag must be raised or lowered.
// The gate equations follow the design's decoder: the minute test is
// (not MIN[1]) or MIN[2], which within the reachable minutes 0..6 picks out
// exactly 0, 1, 4, 5 and 6; tens of seconds must be 0 (bits 2..0, the tens
// digit never exceeds 5); seconds 0..5 for alert is (not (SEC[2] and SEC[1]))
// and not SEC[3]; seconds 0 for horn.
//
// Purely combinational. clk_phase is the system clock used as a data signal
// to chop the alert; it is an intended use of the clock, not a clock-domain
// crossing. Ports: t (displayed time), en (count enable), clk_phase; alert,
// horn outputs.
module srsa_event_decode
  import srsa_pkg::*;
(
  input  srsa_time_t t,
  input  logic       en,
  input  logic       clk_phase,
  output logic       alert,
  output logic       horn
);

  logic minute_has_signal;
  logic tens_zero;
  logic sec_le5;
  logic sec_zero;

  always_comb begin
    minute_has_signal = !t.min[1] || t.min[2];
    tens_zero         = !(|t.tens[2:0]);
    sec_le5           = !(t.sec[2] && t.sec[1]) && !t.sec[3];
    sec_zero          = !(|t.sec);
    horn              = minute_has_signal && tens_zero && sec_zero && en;
    alert             = minute_has_signal && tens_zero && sec_le5 && en && clk_phase;
  end

endmodule
