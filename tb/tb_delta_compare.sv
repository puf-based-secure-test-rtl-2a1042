// Testbench for delta_compare: random responses with Delta chosen to match,
// to miss by one bit, or at random, with and without the valid flag.
module tb_delta_compare;
  logic [31:0] ri, rj, delta, diff;
  logic v, match;
  int checks = 0, failures = 0;

  delta_compare dut (.r_i_i(ri), .r_j_i(rj), .valid_i(v), .delta_i(delta),
                     .diff_o(diff), .match_o(match));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hits;
    hits = 0;
    for (int n = 0; n < 4000; n++) begin
      bit exp;
      int kind;
      ri = $urandom; rj = $urandom; v = ($urandom_range(0, 3) != 0);
      kind = $urandom_range(0, 2);
      case (kind)
        0: delta = ri ^ rj;
        1: delta = (ri ^ rj) ^ (32'h1 << $urandom_range(0, 31));
        default: delta = $urandom;
      endcase
      #1;
      // independent reference: count differing bits that Delta does not flag
      exp = v;
      for (int k = 0; k < 32; k++) if ((ri[k] != rj[k]) != delta[k]) exp = 0;
      hits += exp;
      checks++;
      if (match != exp || diff != (ri ^ rj)) begin
        failures++; $display("FAIL %h %h %h v=%b -> %b", ri, rj, delta, v, match);
      end
    end
    checks++;
    if (hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
