// Testbench for the arbiter PUF model. Three instances share challenges:
// A and B are noise-free "chips" with different seeds, N is chip A with
// read noise. Checked: one-cycle valid latency; a noise-free chip answers
// a challenge the same way every time; responses are balanced (uniformity
// 35..65 %); two chips disagree on 35..65 % of challenges (uniqueness);
// the noisy reading of chip A agrees with the noise-free one on at least
// 90 % of readings but not on all of them (noise is present).
module tb_arbiter_puf;
  logic clk = 0, rst_n = 0, eval = 0;
  logic [63:0] chal = '0;
  logic ra, rb, rn, va, vb, vn;
  int checks = 0, failures = 0;

  arbiter_puf #(.SEED(32'h1234_5678), .NOISE_MILLI(0))   u_a (.clk, .rst_n, .eval_i(eval), .chal_i(chal), .resp_o(ra), .valid_o(va));
  arbiter_puf #(.SEED(32'hCAFE_0001), .NOISE_MILLI(0))   u_b (.clk, .rst_n, .eval_i(eval), .chal_i(chal), .resp_o(rb), .valid_o(vb));
  arbiter_puf #(.SEED(32'h1234_5678), .NOISE_MILLI(500)) u_n (.clk, .rst_n, .eval_i(eval), .chal_i(chal), .resp_o(rn), .valid_o(vn));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NCH = 2000;
  logic [63:0] chals [NCH];
  logic        first [NCH];

  initial begin
    int ones, differ, agree, total;
    ones = 0; differ = 0; agree = 0; total = 0;
    for (int i = 0; i < NCH; i++) chals[i] = {$urandom, $urandom};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(!va && !vb && !vn, "valid without eval");
    // pass 1: record
    for (int i = 0; i < NCH; i++) begin
      chal = chals[i]; eval = 1;
      @(posedge clk); #1;
      eval = 0;
      check(va && vb && vn, "valid one cycle after eval");
      first[i] = ra;
      ones   += ra;
      differ += (ra != rb);
      agree  += (rn == ra);
      total++;
      @(posedge clk); #1;
      check(!va, "valid not a single pulse");
    end
    // pass 2: same challenges again, back to back
    for (int i = 0; i < NCH; i++) begin
      chal = chals[i]; eval = 1;
      @(posedge clk); #1;
      check(va, "valid back to back");
      check(ra == first[i], $sformatf("noise-free chip not repeatable at %0d", i));
      agree += (rn == ra);
      total++;
    end
    eval = 0;
    $display("uniformity %0d/%0d  inter-chip %0d/%0d  noisy agreement %0d/%0d",
             ones, NCH, differ, NCH, agree, total);
    check(ones > NCH * 35 / 100 && ones < NCH * 65 / 100, "uniformity");
    check(differ > NCH * 35 / 100 && differ < NCH * 65 / 100, "uniqueness");
    check(agree >= total * 90 / 100, "noisy reading too far from chip");
    check(agree < total, "no noise seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
