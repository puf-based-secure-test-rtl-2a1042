// IP decoder and unlock gates.
//
// The identifier that arrives with the second challenge (C_j || ID_i) is
// registered when id_load_i is 1. The decoder turns it into a one-hot
// select, and each select bit is ANDed with the comparator result, so only
// the addressed wrapper is unlocked, and only while match_i is 1. An
// identifier beyond N_IP unlocks nothing.
// Timing: id_i is sampled at the clock edge where id_load_i is 1; unlock_o
// is combinational from the registered identifier and match_i.
// The decoder and the gating follow the published scheme; registering the
// identifier and its reset value are this design's choices.
module unlock_decoder #(
  parameter int unsigned N_IP = 4,
  parameter int unsigned ID_W = (N_IP > 1) ? $clog2(N_IP) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            id_load_i,
  input  logic [ID_W-1:0] id_i,
  input  logic            match_i,
  output logic [N_IP-1:0] unlock_o
);

  logic [ID_W-1:0] id_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         id_q <= '0;
    else if (id_load_i) id_q <= id_i;
  end

  always_comb begin
    for (int unsigned k = 0; k < N_IP; k++)
      unlock_o[k] = match_i && (id_q == ID_W'(k));
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(unlock_o));

endmodule
