// Error-correction module: majority vote over N repeated readings of one
// PUF response bit. With N = 11 the output is right as long as at most 5
// readings are wrong. Purely combinational: bit_o is 1 when more than N/2
// of votes_i are 1. N should be odd so that there is no tie.
// The vote count of 11 follows the published scheme; counting with an adder loop
// is this design's choice.
module majority_ecm #(
  parameter int unsigned N = stw_pkg::VOTES
) (
  input  logic [N-1:0] votes_i,
  output logic         bit_o
);

  localparam int unsigned CW = $clog2(N + 1);
  logic [CW-1:0] ones;

  always_comb begin
    ones = '0;
    for (int unsigned k = 0; k < N; k++) ones = ones + CW'(votes_i[k]);
    bit_o = (ones > CW'(N / 2));
  end

endmodule
