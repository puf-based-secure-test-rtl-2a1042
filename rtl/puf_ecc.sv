// PUF read-out with error correction ("PUF - ECC").
//
// Turns one challenge C into an RESP_W-bit response. The session-challenge
// LFSR is loaded with C XOR MASK0, and its successive states are the
// challenges applied to the PUF, one per response bit. (The XOR keeps the
// one value an LFSR cannot start from, zero, away from small challenges
// such as a sequential enrollment from 0 would use: only C = MASK0 is
// replaced, by the LFSR's start value.) For each bit the PUF is read VOTES
// times, the readings are collected and a majority vote gives the corrected
// bit, which is shifted into the response (the first bit ends up as the
// MSB). Then the LFSR steps.
// Interface: start_i (with chal_i) is accepted when busy_o is 0. The PUF is
// driven through puf_eval_o / puf_chal_o and must answer each reading with
// puf_valid_i / puf_resp_i, in order (the arbiter model answers one cycle
// later). done_o pulses for one cycle with resp_o valid; resp_o holds until
// the next start.
// Timing with a one-cycle PUF: each bit takes VOTES + 2 cycles (VOTES
// readings, one to drain the last answer, one to vote), and done_o rises
// RESP_W*(VOTES+2) clock edges after the edge that took start_i (416 at
// 32 bits and 11 votes).
// The PUF, the 11-vote majority and the 64-bit challenge LFSR follow the
// document; how the LFSR derives the per-bit challenges, MASK0, the
// sequencing and the timing are this design's.
module puf_ecc #(
  parameter int unsigned CHAL_W = stw_pkg::CHAL_W,
  parameter int unsigned RESP_W = stw_pkg::DELTA_W,
  parameter int unsigned VOTES  = stw_pkg::VOTES,
  parameter logic [CHAL_W-1:0] TAPS  = stw_pkg::TAPS64,
  parameter logic [CHAL_W-1:0] MASK0 = CHAL_W'(64'h9E37_79B9_7F4A_7C15)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_i,
  input  logic [CHAL_W-1:0] chal_i,
  output logic              busy_o,
  output logic              done_o,
  output logic [RESP_W-1:0] resp_o,
  // arbiter PUF
  output logic              puf_eval_o,
  output logic [CHAL_W-1:0] puf_chal_o,
  input  logic              puf_resp_i,
  input  logic              puf_valid_i
);

  typedef enum logic [1:0] {E_IDLE, E_RUN, E_VOTE, E_DONE} ecc_state_e;

  localparam int unsigned VW = $clog2(VOTES + 1);
  localparam int unsigned BW = $clog2(RESP_W + 1);

  ecc_state_e        state_q;
  logic [VW-1:0]     issued_q, rcvd_q;
  logic [BW-1:0]     bit_q;
  logic [VOTES-1:0]  votes_q;
  logic              maj_bit;
  logic              lfsr_load, lfsr_step;

  chal_lfsr #(.WIDTH(CHAL_W), .TAPS(TAPS)) u_chal_lfsr (
    .clk    (clk),
    .rst_n  (rst_n),
    .load_i (lfsr_load),
    .seed_i (chal_i ^ MASK0),
    .step_i (lfsr_step),
    .chal_o (puf_chal_o)
  );

  majority_ecm #(.N(VOTES)) u_ecm (
    .votes_i (votes_q),
    .bit_o   (maj_bit)
  );

  assign lfsr_load  = (state_q == E_IDLE) && start_i;
  assign lfsr_step  = (state_q == E_VOTE);
  assign puf_eval_o = (state_q == E_RUN) && (issued_q < VW'(VOTES));
  assign busy_o     = (state_q != E_IDLE);
  assign done_o     = (state_q == E_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= E_IDLE;
      issued_q <= '0;
      rcvd_q   <= '0;
      bit_q    <= '0;
      votes_q  <= '0;
      resp_o   <= '0;
    end else begin
      unique case (state_q)
        E_IDLE: if (start_i) begin
          state_q  <= E_RUN;
          issued_q <= '0;
          rcvd_q   <= '0;
          bit_q    <= '0;
        end
        E_RUN: begin
          if (puf_eval_o) issued_q <= issued_q + 1'b1;
          if (puf_valid_i) begin
            votes_q <= {votes_q[VOTES-2:0], puf_resp_i};
            rcvd_q  <= rcvd_q + 1'b1;
            if (rcvd_q == VW'(VOTES - 1)) state_q <= E_VOTE;
          end
        end
        E_VOTE: begin
          resp_o   <= {resp_o[RESP_W-2:0], maj_bit};
          issued_q <= '0;
          rcvd_q   <= '0;
          bit_q    <= bit_q + 1'b1;
          state_q  <= (bit_q == BW'(RESP_W - 1)) ? E_DONE : E_RUN;
        end
        E_DONE: state_q <= E_IDLE;
        default: state_q <= E_IDLE;
      endcase
    end
  end

endmodule
