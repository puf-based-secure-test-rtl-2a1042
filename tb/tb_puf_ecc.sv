// Testbench for puf_ecc with a stand-in PUF whose ideal answer is known:
// the parity of (challenge AND MASK). The stand-in flips a random set of up
// to MAXERR of the 11 readings of every response bit. The expected response
// is computed here from a reference copy of the 64-bit challenge LFSR.
// Checked: the full response after correcting up to 5 wrong readings, that
// the 11 readings of a bit all use the same challenge, that done rises
// RESP_W*(VOTES+2) = 416 clock edges after the start edge, one done pulse per
// start, and (with 6 wrong readings forced on one bit) that the vote then
// fails, which shows the correction limit.
module tb_puf_ecc;
  localparam int RESP_W = 32, VOTES = 11;
  localparam logic [63:0] TAPS = 64'hD800_0000_0000_0000;
  localparam logic [63:0] MASK = 64'h9F31_4C07_A5E2_18DB;
  localparam logic [63:0] START = 64'h9E37_79B9_7F4A_7C15;
  localparam int LAT = RESP_W * (VOTES + 2) + 1;

  logic clk = 0, rst_n = 0, start = 0;
  logic [63:0] chal = '0, puf_chal;
  logic busy, done, puf_eval, puf_resp = 0, puf_valid = 0;
  logic [31:0] resp;
  int checks = 0, failures = 0;
  int maxerr = 5;        // wrong readings allowed per bit
  int force6 = 0;        // when 1: 6 wrong readings on the first bit
  int nread  = 0;        // readings of the current bit
  logic [10:0] errmask;
  logic [63:0] group_chal;

  puf_ecc dut (.clk, .rst_n, .start_i(start), .chal_i(chal), .busy_o(busy), .done_o(done),
               .resp_o(resp), .puf_eval_o(puf_eval), .puf_chal_o(puf_chal),
               .puf_resp_i(puf_resp), .puf_valid_i(puf_valid));

  always #5 clk = ~clk;

  function automatic logic [10:0] pick_errors(input int n);
    logic [10:0] m;
    int placed;
    m = '0; placed = 0;
    while (placed < n) begin
      int p;
      p = $urandom_range(0, 10);
      if (!m[p]) begin m[p] = 1'b1; placed++; end
    end
    return m;
  endfunction

  // Stand-in PUF: one-cycle latency, errors injected per group of 11.
  always @(posedge clk) begin
    puf_valid <= puf_eval;
    if (puf_eval) begin
      if (nread == 0) begin
        errmask    = force6 ? pick_errors(6) : pick_errors($urandom_range(0, maxerr));
        force6     = 0;
        group_chal = puf_chal;
      end else begin
        checks++;
        if (puf_chal != group_chal) begin failures++; $display("FAIL challenge moved within a bit"); end
      end
      puf_resp <= (^(puf_chal & MASK)) ^ errmask[nread];
      nread = (nread == VOTES - 1) ? 0 : nread + 1;
    end
  end

  function automatic logic [63:0] nxt(input logic [63:0] s);
    logic fb;
    fb = 1'b0;
    for (int k = 0; k < 64; k++) if (TAPS[k]) fb ^= s[k];
    return {s[62:0], fb};
  endfunction

  function automatic logic [31:0] expected(input logic [63:0] c);
    logic [63:0] s;
    logic [31:0] r;
    s = ((c ^ START) == 0) ? 64'd1 : (c ^ START);
    for (int b = 0; b < RESP_W; b++) begin
      r = {r[30:0], ^(s & MASK)};
      s = nxt(s);
    end
    return r;
  endfunction

  task automatic run(input logic [63:0] c, output logic [31:0] r, output int cycles);
    int dones;
    chal = c; start = 1;
    @(posedge clk); #1;
    start = 0; chal = $urandom;   // input need not be held
    cycles = 1; dones = 0;
    while (!done) begin @(posedge clk); #1; cycles++; end
    r = resp;
    @(posedge clk); #1;
    checks++;
    if (done || busy) begin failures++; $display("FAIL done not a pulse / still busy"); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    logic [63:0] c;
    int cyc;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int n = 0; n < 40; n++) begin
      c = (n == 3) ? 64'd0 : (n == 4) ? START : {$urandom, $urandom};
      run(c, r, cyc);
      checks++;
      if (r != expected(c)) begin failures++; $display("FAIL resp %h exp %h", r, expected(c)); end
      checks++;
      if (cyc != LAT) begin failures++; $display("FAIL latency %0d exp %0d", cyc, LAT); end
    end
    // Beyond the correction limit: 6 wrong readings on the first bit.
    c = 64'h0123_4567_89AB_CDEF;
    force6 = 1;
    run(c, r, cyc);
    checks++;
    if (r != (expected(c) ^ 32'h8000_0000)) begin
      failures++; $display("FAIL 6 errors: %h exp %h", r, expected(c) ^ 32'h8000_0000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
