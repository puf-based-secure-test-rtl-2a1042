// PUF-based secure test wrapper: the test-access side of an SoC that holds
// N_IP crypto IP cores, each behind its own locked test wrapper.
//
// A tester may scan-test a crypto core only after proving that it holds the
// chip's challenge-response database, recorded by the manufacturer before
// the PUF read-out fuse was blown. The proof: the chip sends a random,
// non-zero Delta; the tester answers with two challenges C_i and C_j whose
// recorded responses differ in exactly the bits of Delta, plus the
// identifier of the core it wants to test. The chip evaluates its PUF on
// both challenges, and if R_i XOR R_j = Delta it unlocks the scan chains of
// that one core and reports ACK with pass = 1. Because Delta is new in every
// session, a recorded exchange cannot be replayed, and no secret key needs
// to be stored on chip.
// Structure: sift (PRNG, arbiter PUF with majority-vote correction,
// response registers, XOR/comparator, sequencer) -> unlock_decoder (ID
// decoder and unlock gates) -> one secure_test_wrapper per core. The crypto
// cores themselves and the read-out fuse are outside: their signals are
// ports here. The unlock vector is also brought out as a status output.
// Timing: see sift; a core stays unlocked until the next SYN or reset.
// Sizes default to the published scheme's (32-bit Delta, 64-bit challenges, 11
// votes); the number of cores and the wrapper sizes are this design's.
module puf_stw_soc #(
  parameter int unsigned N_IP        = 4,
  parameter int unsigned ID_W        = (N_IP > 1) ? $clog2(N_IP) : 1,
  parameter int unsigned DELTA_W     = stw_pkg::DELTA_W,
  parameter int unsigned CHAL_W      = stw_pkg::CHAL_W,
  parameter int unsigned VOTES       = stw_pkg::VOTES,
  parameter logic [DELTA_W-1:0] PRNG_TAPS = stw_pkg::TAPS32,
  parameter logic [CHAL_W-1:0]  CHAL_TAPS = stw_pkg::TAPS64,
  parameter int unsigned PUF_SEED    = 32'h1234_5678,
  parameter int unsigned NOISE_MILLI = 500,
  parameter int unsigned N_IN        = 8,
  parameter int unsigned N_OUT       = 8,
  parameter int unsigned N_CHAINS    = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  // test server link
  input  logic                syn_i,
  output logic                ready_o,
  output logic [DELTA_W-1:0]  delta_o,
  output logic                delta_valid_o,
  input  logic                chal_valid_i,
  input  logic [CHAL_W-1:0]   chal_i,
  input  logic [ID_W-1:0]     id_i,
  input  logic                enroll_i,
  output logic [DELTA_W-1:0]  resp_o,
  output logic                resp_valid_o,
  output logic                ack_o,
  output logic                ack_pass_o,
  // read-out fuse state (1 = blown)
  input  logic                fuse_blown_i,
  output logic [N_IP-1:0]     unlock_o,
  // per-core wrapper serial ports
  input  logic [N_IP-1:0]     wsi_i,
  output logic [N_IP-1:0]     wso_o,
  input  logic [N_IP-1:0]     select_wir_i,
  input  logic [N_IP-1:0]     shift_wr_i,
  input  logic [N_IP-1:0]     capture_wr_i,
  input  logic [N_IP-1:0]     update_wr_i,
  // per-core functional and core-side signals
  input  logic [N_IP-1:0][N_IN-1:0]     func_in_i,
  output logic [N_IP-1:0][N_OUT-1:0]    func_out_o,
  output logic [N_IP-1:0][N_IN-1:0]     core_in_o,
  input  logic [N_IP-1:0][N_OUT-1:0]    core_out_i,
  output logic [N_IP-1:0]               core_scan_en_o,
  output logic [N_IP-1:0][N_CHAINS-1:0] core_si_o,
  input  logic [N_IP-1:0][N_CHAINS-1:0] core_so_i
);

  logic id_load, match;

  sift #(
    .DELTA_W     (DELTA_W),
    .CHAL_W      (CHAL_W),
    .VOTES       (VOTES),
    .PRNG_TAPS   (PRNG_TAPS),
    .CHAL_TAPS   (CHAL_TAPS),
    .PUF_SEED    (PUF_SEED),
    .NOISE_MILLI (NOISE_MILLI)
  ) u_sift (
    .clk           (clk),
    .rst_n         (rst_n),
    .syn_i         (syn_i),
    .ready_o       (ready_o),
    .delta_o       (delta_o),
    .delta_valid_o (delta_valid_o),
    .chal_valid_i  (chal_valid_i),
    .chal_i        (chal_i),
    .enroll_i      (enroll_i),
    .fuse_blown_i  (fuse_blown_i),
    .resp_o        (resp_o),
    .resp_valid_o  (resp_valid_o),
    .ack_o         (ack_o),
    .ack_pass_o    (ack_pass_o),
    .id_load_o     (id_load),
    .match_o       (match)
  );

  unlock_decoder #(.N_IP(N_IP), .ID_W(ID_W)) u_dec (
    .clk       (clk),
    .rst_n     (rst_n),
    .id_load_i (id_load),
    .id_i      (id_i),
    .match_i   (match),
    .unlock_o  (unlock_o)
  );

  for (genvar g = 0; g < N_IP; g++) begin : g_ip
    secure_test_wrapper #(.N_IN(N_IN), .N_OUT(N_OUT), .N_CHAINS(N_CHAINS)) u_wrap (
      .clk            (clk),
      .rst_n          (rst_n),
      .unlock_i       (unlock_o[g]),
      .wsi_i          (wsi_i[g]),
      .wso_o          (wso_o[g]),
      .select_wir_i   (select_wir_i[g]),
      .shift_wr_i     (shift_wr_i[g]),
      .capture_wr_i   (capture_wr_i[g]),
      .update_wr_i    (update_wr_i[g]),
      .func_in_i      (func_in_i[g]),
      .func_out_o     (func_out_o[g]),
      .core_in_o      (core_in_o[g]),
      .core_out_i     (core_out_i[g]),
      .core_scan_en_o (core_scan_en_o[g]),
      .core_si_o      (core_si_o[g]),
      .core_so_i      (core_so_i[g])
    );
  end

endmodule
