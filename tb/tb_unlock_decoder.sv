// Testbench for unlock_decoder with N_IP = 4 and an identifier width of 3,
// so identifiers 4..7 (no such IP) are covered: random loads and match
// values, reference computed here; the unlock vector must be one-hot or 0.
module tb_unlock_decoder;
  logic clk = 0, rst_n = 0, load = 0, match = 0;
  logic [2:0] id = '0, ref_id;
  logic [3:0] unlock, exp;
  int checks = 0, failures = 0;

  unlock_decoder #(.N_IP(4), .ID_W(3)) dut (.clk, .rst_n, .id_load_i(load), .id_i(id),
                                            .match_i(match), .unlock_o(unlock));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unlocked;
    unlocked = 0;
    ref_id = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      load  = ($urandom_range(0, 3) == 0);
      id    = 3'($urandom_range(0, 7));
      match = $urandom_range(0, 1);
      @(posedge clk); #1;
      if (load) ref_id = id;
      exp = '0;
      if (match && ref_id < 4) exp[ref_id[1:0]] = 1'b1;
      unlocked += (exp != 0);
      checks++;
      if (unlock != exp) begin
        failures++; $display("FAIL id=%0d match=%b unlock=%b exp=%b", ref_id, match, unlock, exp);
      end
      load = 0;
    end
    checks++;
    if (unlocked == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
