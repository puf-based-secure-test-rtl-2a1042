// Testbench for chal_lfsr: a reference 64-bit LFSR (x^64+x^63+x^61+x^60+1)
// predicts the register after random loads and steps; a zero seed must
// load the initial value 1.
module tb_chal_lfsr;
  localparam logic [63:0] TAPS = 64'hD800_0000_0000_0000;
  logic clk = 0, rst_n = 0, load = 0, step = 0;
  logic [63:0] seed = '0, chal, ref_q;
  int checks = 0, failures = 0;

  chal_lfsr dut (.clk, .rst_n, .load_i(load), .seed_i(seed), .step_i(step), .chal_o(chal));

  always #5 clk = ~clk;

  function automatic logic [63:0] nxt(input logic [63:0] s);
    logic fb;
    fb = 1'b0;
    for (int k = 0; k < 64; k++) if (TAPS[k]) fb ^= s[k];
    return {s[62:0], fb};
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
    ref_q = 64'd1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 check(chal == 64'd1, "reset value");
    for (int i = 0; i < 2000; i++) begin
      load = ($urandom_range(0, 15) == 0);
      step = ($urandom_range(0, 1) == 0);
      seed = (i == 500) ? 64'd0 : {$urandom, $urandom};
      @(posedge clk); #1;
      if (load)      ref_q = (seed == 0) ? 64'd1 : seed;
      else if (step) ref_q = nxt(ref_q);
      check(chal == ref_q, $sformatf("cycle %0d chal %h exp %h", i, chal, ref_q));
      load = 0; step = 0;
    end
    // force the zero-seed case
    seed = 0; load = 1; @(posedge clk); #1; load = 0;
    check(chal == 64'd1, "zero seed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
