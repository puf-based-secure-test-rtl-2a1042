// Testbench for majority_ecm: all 2048 patterns of 11 votes, compared with
// a popcount > 5 computed here; also shows that up to 5 flipped readings of
// an all-0 or all-1 bit are corrected.
module tb_majority_ecm;
  logic [10:0] votes;
  logic        bit_o;
  int checks = 0, failures = 0;

  majority_ecm dut (.votes_i(votes), .bit_o(bit_o));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 2048; p++) begin
      votes = 11'(p);
      #1;
      checks++;
      if (bit_o != ($countones(votes) >= 6)) begin
        failures++; $display("FAIL pattern %b -> %b", votes, bit_o);
      end
    end
    for (int e = 0; e <= 5; e++) begin
      logic [10:0] m;
      m = '0;
      for (int k = 0; k < e; k++) m[k] = 1'b1;
      votes = m; #1; checks++; if (bit_o !== 1'b0) failures++;
      votes = ~m; #1; checks++; if (bit_o !== 1'b1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
