// Session-challenge LFSR: expands one received PUF challenge into the
// sequence of challenges applied to the arbiter PUF, one per response bit.
//
// load_i copies seed_i into the register (a zero seed, which would lock an
// LFSR, is replaced by INIT); step_i advances it by one Fibonacci LFSR step
// (left shift, feedback = XOR of the tapped bits into bit 0). load_i has
// priority. chal_o is the register itself and changes at the clock edge
// where load_i or step_i is sampled.
// The 64-bit width follows the published scheme; using the LFSR to derive the
// per-bit challenges, the polynomial and the zero substitute are this
// design's choices.
module chal_lfsr #(
  parameter int unsigned     WIDTH = stw_pkg::CHAL_W,
  parameter logic [WIDTH-1:0] TAPS = stw_pkg::TAPS64,
  parameter logic [WIDTH-1:0] INIT = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load_i,
  input  logic [WIDTH-1:0] seed_i,
  input  logic             step_i,
  output logic [WIDTH-1:0] chal_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      chal_o <= INIT;
    else if (load_i) chal_o <= (seed_i == '0) ? INIT : seed_i;
    else if (step_i) chal_o <= {chal_o[WIDTH-2:0], ^(chal_o & TAPS)};
  end

endmodule
