// Sequence controller of the starting aid.
//
// A three-state machine that turns the Postpone/General Recall button (pp),
// the Start button (st, already inverted to active high) and the timer's
// all-zero flag (stop) into the timer's count enable (en) and a one-cycle
// time reset (reset).
//   S0 STOPPED  : nothing sent. pp -> S1 with reset. st and not stop -> S2
//                 with en. With stop high, st does nothing.
//   S1 RESET    : entered on pp; reset has been sent for one cycle. Stays
//                 while pp is held, back to S0 once it is released.
//   S2 COUNTING : en held. pp -> S1 with reset and en dropped; stop -> S0
//                 with en dropped. pp with st and stop all high returns to
//                 S0 with neither output, as the state table gives.
// State codes are the design's own (S0 = 00, S1 = 01, S2 = 10; 11 is unused
// and treated as S0).
//
// Timing: the state table gives Mealy outputs (functions of present state
// and inputs). They are registered here, as in the prototype's code, so en
// and reset change one clock after the inputs are sampled. This keeps the
// count enable high during the cycle in which the timer first shows the
// final 0:00, so the timer's start horn for the last fleet still sounds;
// with unregistered outputs en would fall in that very cycle. reset and en
// are never high together.
//
// Ports: clk, rst_n (asynchronous power-on reset, an addition of this RTL),
// pp, st, stop inputs; en, reset outputs.
module srsa_seq_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic pp,
  input  logic st,
  input  logic stop,
  output logic en,
  output logic reset
);

  typedef enum logic [1:0] {
    S0_STOPPED  = 2'b00,
    S1_RESET    = 2'b01,
    S2_COUNTING = 2'b10
  } seq_state_t;

  seq_state_t state, state_next;
  logic       en_next, reset_next;

  always_comb begin
    state_next = S0_STOPPED;
    en_next    = 1'b0;
    reset_next = 1'b0;
    unique case (state)
      S1_RESET: begin
        state_next = pp ? S1_RESET : S0_STOPPED;
      end
      S2_COUNTING: begin
        if (pp && !(st && stop)) begin
          state_next = S1_RESET;
          reset_next = 1'b1;
        end else if (!pp && !stop) begin
          state_next = S2_COUNTING;
          en_next    = 1'b1;
        end
      end
      default: begin  // S0_STOPPED and the unused code
        if (pp) begin
          state_next = S1_RESET;
          reset_next = 1'b1;
        end else if (st && !stop) begin
          state_next = S2_COUNTING;
          en_next    = 1'b1;
        end
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S0_STOPPED;
      en    <= 1'b0;
      reset <= 1'b0;
    end else begin
      state <= state_next;
      en    <= en_next;
      reset <= reset_next;
    end
  end

  // The timer must never be told to count and to reset in the same cycle.
  a_en_reset_exclusive: assert property (@(posedge clk) !(en && reset));

endmodule
