// Shared constants and types of the PUF-based secure test wrapper.
//
// The sizes are those of the main configuration: a 32-bit Hamming-distance
// value Delta (and therefore 32-bit PUF responses), 64-bit PUF challenges and
// an 11-vote majority error-correction module. The wrapper instruction codes
// and the protocol states are this design's own encoding.
package stw_pkg;

  localparam int unsigned DELTA_W = 32;  // width of Delta and of a response
  localparam int unsigned CHAL_W  = 64;  // width of a PUF challenge
  localparam int unsigned VOTES   = 11;  // PUF readings per response bit

  // Feedback masks (bit i set = stage i+1 is tapped) of maximal-length
  // Fibonacci LFSRs: x^32+x^22+x^2+x+1 and x^64+x^63+x^61+x^60+1.
  localparam logic [31:0] TAPS32 = 32'h8020_0003;
  localparam logic [63:0] TAPS64 = 64'hD800_0000_0000_0000;

  // Wrapper instruction register (WIR) contents.
  localparam int unsigned WIR_W = 3;
  typedef enum logic [WIR_W-1:0] {
    WS_BYPASS      = 3'd0,  // WSI -> bypass bit -> WSO
    WS_INTEST      = 3'd1,  // WSI -> IWBR -> OWBR -> WSO, boundary test only
    WS_INTEST_SCAN = 3'd2   // WSI -> IWBR -> core scan chains -> OWBR -> WSO
  } wir_instr_e;

  // Authentication / enrollment sequencer states.
  typedef enum logic [2:0] {
    ST_IDLE,     // no session; enrollment queries accepted here
    ST_ENROLL,   // evaluating an enrollment challenge
    ST_WAIT_CI,  // Delta sent, waiting for C_i
    ST_EVAL_CI,  // computing R_i
    ST_WAIT_CJ,  // waiting for C_j || ID
    ST_EVAL_CJ,  // computing R_j
    ST_CHECK     // compare R_i ^ R_j with Delta, send ACK, reseed PRNG
  } sift_state_e;

endpackage
