// The two response registers ("MEM") of the secure infrastructure for test.
//
// Slot 0 keeps R_i and slot 1 keeps R_j. we_i writes data_i into the slot
// chosen by sel_i and marks it valid; clear_i (a new session) drops both
// valid flags and zeroes the data. Writes and clears take effect at the
// clock edge where they are sampled. The published scheme names the two registers;
// the valid flags and the clear are this design's choices.
module resp_mem #(
  parameter int unsigned W = stw_pkg::DELTA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear_i,
  input  logic         we_i,
  input  logic         sel_i,
  input  logic [W-1:0] data_i,
  output logic [W-1:0] r_i_o,
  output logic [W-1:0] r_j_o,
  output logic         both_valid_o
);

  logic [1:0] valid_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_i_o   <= '0;
      r_j_o   <= '0;
      valid_q <= '0;
    end else if (clear_i) begin
      r_i_o   <= '0;
      r_j_o   <= '0;
      valid_q <= '0;
    end else if (we_i) begin
      if (sel_i) r_j_o <= data_i;
      else       r_i_o <= data_i;
      valid_q[sel_i] <= 1'b1;
    end
  end

  assign both_valid_o = &valid_q;

endmodule
