// Secure infrastructure for test (SIFT): the on-chip half of the PUF-based
// authentication.
//
// Holds the PRNG that produces Delta, the arbiter PUF with its read-out and
// majority-vote error correction (PUF - ECC), the two response registers,
// the XOR/comparator and the protocol sequencer. match_o is 1 while the
// responses to the session's two challenges differ in exactly the bits set
// in Delta; together with the IP identifier (id_load_o marks the cycle in
// which it arrives) it decides which wrapper is unlocked. After each
// authentication the PRNG is reseeded with R_j, a value no one outside the
// chip sees, so the next Delta cannot be foreseen from the exchange.
// Enrollment read-out (resp_o) is forced to zero once fuse_blown_i is 1.
// Timing: delta_o is valid from the cycle delta_valid_o pulses, one cycle
// after SYN. At the default sizes an enrollment answer (resp_valid_o)
// rises 417 clock edges after the edge that took the challenge, and ack_o
// 418 edges after the edge that took C_j (DELTA_W*(VOTES+2)+1 and +2).
// The block structure follows the published scheme; reseeding with R_j and the
// fuse gating are this design's choices.
module sift #(
  parameter int unsigned DELTA_W     = stw_pkg::DELTA_W,
  parameter int unsigned CHAL_W      = stw_pkg::CHAL_W,
  parameter int unsigned VOTES       = stw_pkg::VOTES,
  parameter logic [DELTA_W-1:0] PRNG_TAPS = stw_pkg::TAPS32,
  parameter logic [CHAL_W-1:0]  CHAL_TAPS = stw_pkg::TAPS64,
  parameter int unsigned PUF_SEED    = 32'h1234_5678,
  parameter int unsigned NOISE_MILLI = 500
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               syn_i,
  output logic               ready_o,
  output logic [DELTA_W-1:0] delta_o,
  output logic               delta_valid_o,
  input  logic               chal_valid_i,
  input  logic [CHAL_W-1:0]  chal_i,
  input  logic               enroll_i,
  input  logic               fuse_blown_i,
  output logic [DELTA_W-1:0] resp_o,
  output logic               resp_valid_o,
  output logic               ack_o,
  output logic               ack_pass_o,
  output logic               id_load_o,
  output logic               match_o
);

  logic prng_step, prng_reseed, ecc_start, ecc_done, ecc_busy;
  logic mem_clear, mem_we, mem_sel, both_valid;
  logic puf_eval, puf_resp, puf_valid;
  logic [CHAL_W-1:0]  puf_chal;
  logic [DELTA_W-1:0] ecc_resp, r_i, r_j;

  prng_lfsr #(.WIDTH(DELTA_W), .TAPS(PRNG_TAPS)) u_prng (
    .clk      (clk),
    .rst_n    (rst_n),
    .step_i   (prng_step),
    .reseed_i (prng_reseed),
    .seed_i   (r_j),
    .delta_o  (delta_o)
  );

  arbiter_puf #(.STAGES(CHAL_W), .SEED(PUF_SEED), .NOISE_MILLI(NOISE_MILLI)) u_puf (
    .clk     (clk),
    .rst_n   (rst_n),
    .eval_i  (puf_eval),
    .chal_i  (puf_chal),
    .resp_o  (puf_resp),
    .valid_o (puf_valid)
  );

  puf_ecc #(.CHAL_W(CHAL_W), .RESP_W(DELTA_W), .VOTES(VOTES), .TAPS(CHAL_TAPS)) u_puf_ecc (
    .clk         (clk),
    .rst_n       (rst_n),
    .start_i     (ecc_start),
    .chal_i      (chal_i),
    .busy_o      (ecc_busy),
    .done_o      (ecc_done),
    .resp_o      (ecc_resp),
    .puf_eval_o  (puf_eval),
    .puf_chal_o  (puf_chal),
    .puf_resp_i  (puf_resp),
    .puf_valid_i (puf_valid)
  );

  resp_mem #(.W(DELTA_W)) u_mem (
    .clk          (clk),
    .rst_n        (rst_n),
    .clear_i      (mem_clear),
    .we_i         (mem_we),
    .sel_i        (mem_sel),
    .data_i       (ecc_resp),
    .r_i_o        (r_i),
    .r_j_o        (r_j),
    .both_valid_o (both_valid)
  );

  delta_compare #(.W(DELTA_W)) u_cmp (
    .r_i_i   (r_i),
    .r_j_i   (r_j),
    .valid_i (both_valid),
    .delta_i (delta_o),
    .diff_o  (),
    .match_o (match_o)
  );

  sift_ctrl u_ctrl (
    .clk           (clk),
    .rst_n         (rst_n),
    .syn_i         (syn_i),
    .chal_valid_i  (chal_valid_i),
    .enroll_i      (enroll_i),
    .fuse_blown_i  (fuse_blown_i),
    .ready_o       (ready_o),
    .delta_valid_o (delta_valid_o),
    .resp_valid_o  (resp_valid_o),
    .ack_o         (ack_o),
    .ack_pass_o    (ack_pass_o),
    .prng_step_o   (prng_step),
    .prng_reseed_o (prng_reseed),
    .ecc_start_o   (ecc_start),
    .ecc_done_i    (ecc_done),
    .mem_clear_o   (mem_clear),
    .mem_we_o      (mem_we),
    .mem_sel_o     (mem_sel),
    .id_load_o     (id_load_o),
    .match_i       (match_o),
    .state_o       ()
  );

  // Enrollment read-out: only in the cycle the response is announced, and
  // never once the fuse is blown.
  assign resp_o = (resp_valid_o && !fuse_blown_i) ? ecc_resp : '0;

  // The PUF-ECC never receives a start while busy.
  assert property (@(posedge clk) disable iff (!rst_n) ecc_start |-> !ecc_busy);

endmodule
