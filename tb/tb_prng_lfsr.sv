// Testbench for prng_lfsr. A reference LFSR, written here with the same
// polynomial, predicts every Delta; the checks also cover: Delta only
// changes on a step, it is never zero, a reseed changes the state but not
// the presented Delta, a reseed that would zero the state falls back to the
// initial value, and the default 32-bit register has no repeat within the
// stepped stretch.
module tb_prng_lfsr;
  localparam logic [31:0] TAPS = 32'h8020_0003;
  logic clk = 0, rst_n = 0, step = 0, reseed = 0;
  logic [31:0] seed = '0, delta, ref_state, ref_delta;
  int checks = 0, failures = 0;

  prng_lfsr dut (.clk, .rst_n, .step_i(step), .reseed_i(reseed), .seed_i(seed), .delta_o(delta));

  always #5 clk = ~clk;

  function automatic logic [31:0] nxt(input logic [31:0] s);
    logic fb;
    fb = 1'b0;
    for (int k = 0; k < 32; k++) if (TAPS[k]) fb ^= s[k];
    return {s[30:0], fb};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] seen [logic [31:0]];
    ref_state = 32'd1;
    ref_delta = 32'd0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < 3000; i++) begin
      step = ($urandom_range(0, 3) != 0);
      @(posedge clk); #1;
      if (step) begin
        ref_state = nxt(ref_state);
        check(delta == ref_state, $sformatf("step %0d delta %h exp %h", i, delta, ref_state));
        check(delta != 0, "delta zero");
        check(!seen.exists(delta), "delta repeated");
        seen[delta] = delta;
        ref_delta = ref_state;
      end else begin
        check(delta == ref_delta, "delta changed without step");
      end
      step = 0;
    end
    // Reseed: state ^= seed, Delta unchanged.
    seed = 32'hDEAD_BEEF; reseed = 1;
    @(posedge clk); #1; reseed = 0;
    check(delta == ref_state, "reseed touched delta");
    ref_state = ref_state ^ 32'hDEAD_BEEF;
    step = 1; @(posedge clk); #1; step = 0;
    ref_state = nxt(ref_state);
    check(delta == ref_state, $sformatf("after reseed %h exp %h", delta, ref_state));
    // Reseed with the state itself: would give zero, falls back to 1.
    seed = ref_state; reseed = 1;
    @(posedge clk); #1; reseed = 0;
    step = 1; @(posedge clk); #1; step = 0;
    check(delta == nxt(32'd1), $sformatf("zero fallback %h", delta));
    check(delta != 0, "delta zero after fallback");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
