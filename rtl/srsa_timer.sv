// Timer of the starting aid: fleet counter, countdown and signal decode.
//
// Four BCD digit registers hold the fleets waiting (item) and the time left
// in the current start sequence as minutes : tens of seconds : seconds.
// Each clock edge applies, in this order:
//   1. Counting (en high and not zero): the time counts down one second in
//      BCD. When the time passes 0:00 with fleets still waiting it rolls over
//      to 4:59 and one fleet is taken off (rolling starts: the start of one
//      fleet is the 5:00 signal of the next). For the last fleet (item = 1)
//      the step from 0:01 goes to 0:00 with item = 0, which raises zero and
//      stops the count.
//   2. load (one pulse per Add Fleet press): item + 1; from 9 it rolls over
//      to 0; from 0 it becomes 1 and the time is set to 5:05.
//   3. reset (postponement / general recall): the time is set to 6:05, and
//      an item of 0 becomes 1 (a recall of the fleet last started).
// A later step sees the fleet count left by the earlier one, so a fleet
// added in the cycle a fleet is taken off is not lost, and reset wins over
// counting and load for the time digits. The three rules and their outcomes
// follow the design's ASM charts; the order in which they combine is this
// RTL's choice.
//
// zero is high when all four digits are 0. alert and horn come from
// srsa_event_decode. Digits are valid one clock edge after the inputs that
// change them. rst_n (asynchronous, an addition of this RTL) clears all
// digits, which is the design's power-up state.
//
// Ports: clk, rst_n, en, load, reset inputs; item and t (digits), alert,
// horn, zero outputs.
module srsa_timer
  import srsa_pkg::*;
#(
  parameter int unsigned MAX_FLEETS = SRSA_MAX_FLEETS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       load,
  input  logic       reset,
  output bcd_t       item,
  output srsa_time_t t,
  output logic       alert,
  output logic       horn,
  output logic       zero
);

  localparam srsa_time_t TIME_LAST_STEP = '{min: 4'd0, tens: 4'd0, sec: 4'd1};

  bcd_t       item_next;
  srsa_time_t t_next;

  always_comb zero = (item == 4'd0) && (t == TIME_ZERO);

  always_comb begin
    item_next = item;
    t_next    = t;

    // 1. Countdown.
    if (en && !zero) begin
      if (item == 4'd1 && t == TIME_LAST_STEP) begin
        item_next = 4'd0;
        t_next    = TIME_ZERO;
      end else if (t.sec != 4'd0) begin
        t_next.sec = t.sec - 4'd1;
      end else begin
        t_next.sec = 4'd9;
        if (t.tens != 4'd0) begin
          t_next.tens = t.tens - 4'd1;
        end else begin
          t_next.tens = 4'd5;
          if (t.min != 4'd0) begin
            t_next.min = t.min - 4'd1;
          end else begin
            t_next    = TIME_ROLLOVER;
            item_next = item - 4'd1;
          end
        end
      end
    end

    // 2. Add a fleet.
    if (load) begin
      if (item_next == bcd_t'(MAX_FLEETS)) begin
        item_next = 4'd0;
      end else if (item_next == 4'd0) begin
        item_next = 4'd1;
        t_next    = TIME_FIRST;
      end else begin
        item_next = item_next + 4'd1;
      end
    end

    // 3. Postponement or general recall.
    if (reset) begin
      t_next = TIME_POSTPONE;
      if (item_next == 4'd0) item_next = 4'd1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      item <= 4'd0;
      t    <= TIME_ZERO;
    end else begin
      item <= item_next;
      t    <= t_next;
    end
  end

  srsa_event_decode u_decode (
    .t         (t),
    .en        (en),
    .clk_phase (clk),
    .alert     (alert),
    .horn      (horn)
  );

endmodule
