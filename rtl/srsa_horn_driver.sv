// Horn driver for the postponement / general recall signal.
//
// A four-state Mealy machine that answers one input pulse (pp, in the system
// the sequence controller's one-cycle reset) with two horn blasts, each one
// clock long, separated by one clock of silence: with a 1 Hz clock, two
// one-second sounds one second apart.
//   S0 idle   : pp -> S1, horn on
//   S1        : -> S2, horn off
//   S2        : -> S3, horn on
//   S3        : pp held -> S3, pp low -> S0, horn off
// State codes are the design's Gray sequence S0 = 00, S1 = 01, S2 = 11,
// S3 = 10. Holding pp does not repeat the blasts until it is released.
//
// Timing: the Mealy output is registered, as in the prototype's code, so the
// first blast is the clock cycle after the edge at which pp is seen, the
// second two cycles later.
//
// Ports: clk, rst_n (asynchronous power-on reset, an addition of this RTL),
// pp input, horn output.
module srsa_horn_driver (
  input  logic clk,
  input  logic rst_n,
  input  logic pp,
  output logic horn
);

  typedef enum logic [1:0] {
    S0_IDLE   = 2'b00,
    S1_GAP    = 2'b01,
    S2_SECOND = 2'b11,
    S3_HOLD   = 2'b10
  } horn_state_t;

  horn_state_t state, state_next;
  logic        horn_next;

  always_comb begin
    unique case (state)
      S0_IDLE:   begin state_next = pp ? S1_GAP : S0_IDLE;  horn_next = pp;   end
      S1_GAP:    begin state_next = S2_SECOND;              horn_next = 1'b0; end
      S2_SECOND: begin state_next = S3_HOLD;                horn_next = 1'b1; end
      S3_HOLD:   begin state_next = pp ? S3_HOLD : S0_IDLE; horn_next = 1'b0; end
      default:   begin state_next = S0_IDLE;                horn_next = 1'b0; end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S0_IDLE;
      horn  <= 1'b0;
    end else begin
      state <= state_next;
      horn  <= horn_next;
    end
  end

endmodule
