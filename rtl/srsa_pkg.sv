// Shared types and constants of the sailboat regatta starting aid (SRSA).
//
// The starting aid counts a rolling five-minute start sequence for one to
// nine fleets on a four-digit display: fleets waiting, minutes, tens of
// seconds and seconds. All four digits are BCD nibbles. The constants below
// are the fixed time points of that sequence:
//   * 5:05 - first time shown when the first fleet is entered (five seconds
//            before the class-flag signal at 5:00),
//   * 6:05 - time set by a postponement or general recall (five seconds
//            before the flag is lowered at 6:00, one minute before 5:00),
//   * 4:59 - time after 0:00 while further fleets wait (the start of one
//            fleet is the 5:00 signal of the next).
// Segment patterns are active low, ordered a..g from bit 6 down to bit 0.
package srsa_pkg;

  typedef logic [3:0] bcd_t;

  // Displayed time, minutes : tens of seconds, seconds.
  typedef struct packed {
    bcd_t min;
    bcd_t tens;
    bcd_t sec;
  } srsa_time_t;

  // Seven-segment pattern, bit 6 = segment a ... bit 0 = segment g.
  typedef logic [6:0] seg7_t;

  localparam int unsigned SRSA_MAX_FLEETS = 9;

  localparam srsa_time_t TIME_ZERO     = '{min: 4'd0, tens: 4'd0, sec: 4'd0};
  localparam srsa_time_t TIME_FIRST    = '{min: 4'd5, tens: 4'd0, sec: 4'd5};
  localparam srsa_time_t TIME_POSTPONE = '{min: 4'd6, tens: 4'd0, sec: 4'd5};
  localparam srsa_time_t TIME_ROLLOVER = '{min: 4'd4, tens: 4'd5, sec: 4'd9};

endpackage
