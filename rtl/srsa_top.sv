// Sailboat regatta starting aid (SRSA), top level.
//
// A race committee uses the device to run the five-minute starting sequence
// for one to nine fleets in succession: it shows the fleets waiting and the
// time left (M:SS) on four seven-segment digits, warns the committee with an
// intermittent alert in the five seconds before each flag signal, and sounds
// the horn at 5:00 (class flag up), 4:00 (preparatory up), 1:00 (preparatory
// down) and 0:00 (start, which is also the 5:00 signal of the next fleet).
// A postponement or general recall resets the time to 6:05 and sounds two
// blasts; the flag is then lowered with one blast at 6:00 and the sequence
// restarts one minute later.
//
// Structure, as in the design's block diagram:
//   add_fleet -> srsa_one_pulse -> timer.load
//   start_n (active-low button) -> inverter -> srsa_seq_ctrl.st
//   pp -> srsa_seq_ctrl.pp;  seq_ctrl.en/reset -> timer;  timer.zero -> stop
//   seq_ctrl.reset -> srsa_horn_driver (two blasts)
//   horn = manual horn button | timer horn | horn-driver horn (3-input OR)
//   four srsa_bcd7seg decoders drive the common-anode displays (active low).
// Everything runs on one slow clock: 1 Hz in the field unit (2 Hz on the
// prototype). Buttons are sampled at that clock, which is also their
// debounce. rst_n is an asynchronous power-on reset added by this RTL for
// the device's register initialisation; after it all digits show 0.
//
// Timing: a button seen at clock edge k acts on the display at edge k+1
// (one pulse or controller register, then the timer). The horn outputs of
// the timer and of the manual button are combinational, so the horn output
// is not glitch-free; drive the horn through a register or relay as needed.
module srsa_top
  import srsa_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  add_fleet,     // Add Fleet button, active high
  input  logic  pp,            // Postpone / General Recall button, active high
  input  logic  start_n,       // Start button, active low
  input  logic  manual_horn,   // Horn button, active high
  output seg7_t seg_fleet_n,   // fleets waiting, active-low segments a..g
  output seg7_t seg_min_n,     // minutes
  output seg7_t seg_tens_n,    // tens of seconds
  output seg7_t seg_sec_n,     // seconds
  output logic  alert,         // race committee alert
  output logic  horn           // horn drive
);

  logic       st;
  logic       load;
  logic       count_en;
  logic       time_reset;
  logic       zero;
  logic       timer_horn;
  logic       recall_horn;
  bcd_t       item;
  srsa_time_t t;

  assign st = ~start_n;

  srsa_one_pulse u_add_pulse (
    .clk   (clk),
    .rst_n (rst_n),
    .x     (add_fleet),
    .z     (load)
  );

  srsa_seq_ctrl u_seq (
    .clk   (clk),
    .rst_n (rst_n),
    .pp    (pp),
    .st    (st),
    .stop  (zero),
    .en    (count_en),
    .reset (time_reset)
  );

  srsa_timer u_timer (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (count_en),
    .load  (load),
    .reset (time_reset),
    .item  (item),
    .t     (t),
    .alert (alert),
    .horn  (timer_horn),
    .zero  (zero)
  );

  srsa_horn_driver u_recall_horn (
    .clk   (clk),
    .rst_n (rst_n),
    .pp    (time_reset),
    .horn  (recall_horn)
  );

  srsa_bcd7seg u_disp_fleet (.d(item),   .seg_n(seg_fleet_n));
  srsa_bcd7seg u_disp_min   (.d(t.min),  .seg_n(seg_min_n));
  srsa_bcd7seg u_disp_tens  (.d(t.tens), .seg_n(seg_tens_n));
  srsa_bcd7seg u_disp_sec   (.d(t.sec),  .seg_n(seg_sec_n));

  assign horn = manual_horn | timer_horn | recall_horn;

endmodule
