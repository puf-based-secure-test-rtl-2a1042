// Delta generator: the PRNG of the secure infrastructure for test.
//
// A Fibonacci LFSR (left shift, new bit enters at bit 0, feedback = XOR of
// the tapped bits). Each step_i pulse advances the register once and copies
// the new state into delta_o, which then holds the Hamming distance the
// tester must reproduce. A maximal-length LFSR never reaches zero, so Delta
// is never 0, as the protocol requires. reseed_i XORs seed_i into the state
// (used after every authentication so a Delta is not repeated); a result of
// zero is replaced by INIT. delta_o is not touched by a reseed, so the
// Delta of the finished session stays valid.
// Timing: step and reseed act at the clock edge where they are sampled;
// delta_o is valid from the cycle after a step. Reseed has priority.
// The 32-bit width follows the published scheme; the polynomial, the reset value
// and the reseed-by-XOR are this design's choices.
module prng_lfsr #(
  parameter int unsigned     WIDTH = stw_pkg::DELTA_W,
  parameter logic [WIDTH-1:0] TAPS = stw_pkg::TAPS32,
  parameter logic [WIDTH-1:0] INIT = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             step_i,
  input  logic             reseed_i,
  input  logic [WIDTH-1:0] seed_i,
  output logic [WIDTH-1:0] delta_o
);

  logic [WIDTH-1:0] state_q, stepped, reseeded;

  always_comb begin
    stepped  = {state_q[WIDTH-2:0], ^(state_q & TAPS)};
    reseeded = state_q ^ seed_i;
    if (reseeded == '0) reseeded = INIT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= INIT;
      delta_o <= '0;
    end else if (reseed_i) begin
      state_q <= reseeded;
    end else if (step_i) begin
      state_q <= stepped;
      delta_o <= stepped;
    end
  end

endmodule
