// XOR gates and comparator of the secure infrastructure for test.
//
// Forms R_i XOR R_j, whose set bits mark where the two responses differ, and
// compares it with Delta. match_o is 1 only when both responses of the
// current session are present and R_i XOR R_j equals Delta exactly.
// Combinational; the published scheme gives this structure.
module delta_compare #(
  parameter int unsigned W = stw_pkg::DELTA_W
) (
  input  logic [W-1:0] r_i_i,
  input  logic [W-1:0] r_j_i,
  input  logic         valid_i,
  input  logic [W-1:0] delta_i,
  output logic [W-1:0] diff_o,
  output logic         match_o
);

  assign diff_o  = r_i_i ^ r_j_i;
  assign match_o = valid_i && (diff_o == delta_i);

endmodule
