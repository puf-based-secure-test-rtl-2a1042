// Testbench for resp_mem: random writes to both slots, clears and idle
// cycles, compared with a reference model kept here.
module tb_resp_mem;
  logic clk = 0, rst_n = 0, clear = 0, we = 0, sel = 0;
  logic [31:0] data = '0, r_i, r_j;
  logic both;
  logic [31:0] m_i, m_j;
  logic [1:0]  m_v;
  int checks = 0, failures = 0;

  resp_mem dut (.clk, .rst_n, .clear_i(clear), .we_i(we), .sel_i(sel), .data_i(data),
                .r_i_o(r_i), .r_j_o(r_j), .both_valid_o(both));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_i = 0; m_j = 0; m_v = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      clear = ($urandom_range(0, 9) == 0);
      we    = ($urandom_range(0, 2) == 0);
      sel   = $urandom_range(0, 1);
      data  = $urandom;
      @(posedge clk); #1;
      if (clear) begin m_i = 0; m_j = 0; m_v = 0; end
      else if (we) begin
        if (sel) m_j = data; else m_i = data;
        m_v[sel] = 1'b1;
      end
      checks++;
      if (r_i != m_i || r_j != m_j || both != (&m_v)) begin
        failures++;
        $display("FAIL %0d: %h %h %b exp %h %h %b", n, r_i, r_j, both, m_i, m_j, &m_v);
      end
      clear = 0; we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
