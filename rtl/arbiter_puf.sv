// Behavioural model of an arbiter PUF. It stands in for an analog part: a
// real arbiter PUF is a pair of matched delay lines and a latch, and its
// behaviour comes from manufacturing variation, which logic cannot have.
//
// Two signals race through STAGES switch stages. Challenge bit k = 0 lets
// both signals pass straight, bit k = 1 crosses them; every stage adds its
// own small delay difference, different for the two settings. The arbiter
// at the end reports which signal arrived first. The model uses the usual
// additive delay model in fixed point (1024 units = one standard deviation
// of a stage's delay difference): running difference d = d + s0[k] for a
// straight stage and d = s1[k] - d for a crossed one, response = (d + noise
// > 0). The stage delays are fixed at elaboration from SEED, so SEED plays
// the part of one particular chip. Each reading adds fresh, roughly
// Gaussian noise of standard deviation NOISE_MILLI/1000 stage units, so
// bits whose race is close flip now and then, as in silicon.
// Interface: eval_i samples chal_i at a clock edge; resp_o and valid_o hold
// the result in the following cycle (one cycle latency, one reading per
// cycle). The arbiter principle follows the published scheme and the stage count
// its 64-bit challenge; the delay and noise figures are this model's own.
module arbiter_puf #(
  parameter int unsigned STAGES      = stw_pkg::CHAL_W,
  parameter int unsigned SEED        = 32'h1234_5678,
  parameter int unsigned NOISE_MILLI = 500
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              eval_i,
  input  logic [STAGES-1:0] chal_i,
  output logic              resp_o,
  output logic              valid_o
);

  typedef logic [2*STAGES-1:0][15:0] delays_t;

  function automatic logic [31:0] xorshift(input logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    y = y ^ (y << 5);
    return y;
  endfunction

  // Roughly normal value, standard deviation 1024, from four uniform
  // draws of the xorshift sequence starting after st.
  function automatic int gauss(input logic [31:0] st);
    int acc;
    logic [31:0] s;
    s   = st;
    acc = 0;
    for (int i = 0; i < 4; i++) begin
      s   = xorshift(s);
      acc = acc + int'(s[31:16]);
    end
    return ((acc - 131072) * 1773) >>> 16;
  endfunction

  function automatic logic [31:0] skip4(input logic [31:0] st);
    logic [31:0] s;
    s = st;
    for (int i = 0; i < 4; i++) s = xorshift(s);
    return s;
  endfunction

  // Element 2k: straight delay of stage k, element 2k+1: crossed delay.
  function automatic delays_t make_delays(input logic [31:0] seed);
    delays_t     d;
    logic [31:0] s;
    s = (seed == 0) ? 32'h9E37_79B9 : seed;
    for (int k = 0; k < 2 * STAGES; k++) begin
      d[k] = 16'(gauss(s));
      s    = skip4(s);
    end
    return d;
  endfunction

  localparam delays_t DELAYS = make_delays(SEED);

  function automatic int race(input logic [STAGES-1:0] c);
    int d;
    d = 0;
    for (int k = 0; k < STAGES; k++)
      d = c[k] ? (int'($signed(DELAYS[2*k+1])) - d) : (d + int'($signed(DELAYS[2*k])));
    return d;
  endfunction

  logic [31:0] noise_q;
  int          noise;

  assign noise = (gauss(noise_q) * int'(NOISE_MILLI)) / 1000;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      resp_o  <= 1'b0;
      valid_o <= 1'b0;
      noise_q <= (SEED ^ 32'h5bd1_e995) | 32'h1;
    end else begin
      valid_o <= eval_i;
      if (eval_i) begin
        resp_o  <= (race(chal_i) + noise) > 0;
        noise_q <= skip4(noise_q);
      end
    end
  end

endmodule
