// Enrollment sweep at full size: the manufacturer's loop "for i = 0 to x,
// apply challenge C_i, record R_i" run on puf_stw_soc with every parameter
// at its default. The challenges are drawn at random (C_0 = 0, to show that
// the all-zero challenge is valid).
// Checked: every query is answered exactly 417 clock edges after it was
// taken; each response bit is 1 in 40..60 % of the challenges; all but a
// few of the NENR responses are distinct, as the database-size estimate
// assumes; re-reads agree with the enrolled values within 3 % of the bits;
// after the fuse is blown the same queries get no answer.
module tb_enroll_sweep;
  import stw_pkg::*;
  localparam int NENR = 4096;
  localparam int LAT  = DELTA_W * (VOTES + 2) + 1;

  logic clk = 0, rst_n = 0;
  logic syn = 0, chal_valid = 0, enroll = 0, fuse = 0;
  logic [CHAL_W-1:0] chal = '0;
  logic [1:0] id = '0;
  logic ready, delta_valid, resp_valid, ack, ack_pass;
  logic [DELTA_W-1:0] delta, resp;
  logic [3:0] unlock, wso, scan_en;
  logic [3:0][7:0] func_out, core_in;
  logic [3:0][1:0] core_si;
  int checks = 0, failures = 0;

  puf_stw_soc dut (
    .clk, .rst_n, .syn_i(syn), .ready_o(ready), .delta_o(delta), .delta_valid_o(delta_valid),
    .chal_valid_i(chal_valid), .chal_i(chal), .id_i(id), .enroll_i(enroll),
    .resp_o(resp), .resp_valid_o(resp_valid), .ack_o(ack), .ack_pass_o(ack_pass),
    .fuse_blown_i(fuse), .unlock_o(unlock),
    .wsi_i('0), .wso_o(wso), .select_wir_i('0), .shift_wr_i('0),
    .capture_wr_i('0), .update_wr_i('0),
    .func_in_i('0), .func_out_o(func_out), .core_in_o(core_in), .core_out_i('0),
    .core_scan_en_o(scan_en), .core_si_o(core_si), .core_so_i('0));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic tick(); @(posedge clk); #1; endtask

  task automatic read_out(input logic [CHAL_W-1:0] c, output logic [DELTA_W-1:0] r,
                          output bit got, output int cyc);
    while (!ready) tick();
    chal = c; enroll = 1; chal_valid = 1;
    tick();
    chal_valid = 0; enroll = 0;
    got = 0; cyc = 1;
    repeat (LAT + 20) begin
      if (resp_valid) begin got = 1; r = resp; break; end
      tick(); cyc++;
    end
  endtask

  logic [DELTA_W-1:0] db  [NENR];
  logic [CHAL_W-1:0]  dbc [NENR];
  int seen [logic [DELTA_W-1:0]];

  initial begin
    repeat ((NENR + 200) * (LAT + 4)) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DELTA_W-1:0] r;
    bit got;
    int cyc, ones [DELTA_W], bit_err, late;
    bit_err = 0; late = 0;
    for (int b = 0; b < DELTA_W; b++) ones[b] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; tick();

    for (int c = 0; c < NENR; c++) begin
      dbc[c] = (c == 0) ? '0 : {$urandom, $urandom};
      read_out(dbc[c], db[c], got, cyc);
      check(got, $sformatf("challenge %0d not answered", c));
      late += (cyc != LAT + 1);
      seen[db[c]] = c;
      for (int b = 0; b < DELTA_W; b++) ones[b] += db[c][b];
    end
    check(late == 0, $sformatf("%0d answers off the %0d-cycle latency", late, LAT));
    for (int b = 0; b < DELTA_W; b++)
      check(ones[b] > NENR * 40 / 100 && ones[b] < NENR * 60 / 100,
            $sformatf("response bit %0d biased: %0d of %0d", b, ones[b], NENR));
    $display("%0d challenges, %0d distinct responses", NENR, seen.num());
    check(seen.num() >= NENR - 4, "too many equal responses");

    for (int c = 0; c < 64; c++) begin
      read_out(dbc[c], r, got, cyc);
      bit_err += $countones(r ^ db[c]);
    end
    $display("re-read of 64 responses: %0d of %0d bits differ", bit_err, 64 * DELTA_W);
    check(bit_err * 100 <= 3 * 64 * DELTA_W, "re-reads too noisy");

    fuse = 1;
    for (int c = 0; c < 4; c++) begin
      read_out(dbc[c], r, got, cyc);
      check(!got && resp == '0, "read-out after the fuse was blown");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
