// One-pulse circuit for the Add Fleet push button.
//
// A two-state Mealy machine (S0 = button was up, S1 = button was down at the
// last clock edge) turns a press of any length into a single pulse one clock
// long. The state is the button level sampled at the previous edge, and the
// Mealy output is "pressed now and not pressed before". Sampling the button
// only at the slow (1-2 Hz) system clock is what debounces and synchronises
// it.
//
// Timing: the Mealy output is registered, so z is high for exactly the one
// clock cycle that follows the first edge at which x is seen high. The state
// graph and state table follow the design; registering the output (a
// clean, clock-aligned pulse for the timer's LOAD input) follows the
// prototype's code. rst_n is an asynchronous power-on reset, an addition of
// this RTL standing for the device's register initialisation.
//
// Ports: clk, rst_n, x (button, active high), z (one-cycle pulse).
module srsa_one_pulse (
  input  logic clk,
  input  logic rst_n,
  input  logic x,
  output logic z
);

  typedef enum logic {S0_UP = 1'b0, S1_DOWN = 1'b1} op_state_t;

  op_state_t state;
  logic      z_next;

  // Table: S0 --x/Z--> S1, S1 --x/!Z--> S1, any --!x/!Z--> S0.
  always_comb z_next = x && (state == S0_UP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S0_UP;
      z     <= 1'b0;
    end else begin
      state <= x ? S1_DOWN : S0_UP;
      z     <= z_next;
    end
  end

endmodule
