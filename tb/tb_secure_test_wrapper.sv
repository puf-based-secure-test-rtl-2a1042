// Testbench for secure_test_wrapper (8 inputs, 8 outputs, 2 scan chains).
// A small core model sits behind it: two scan chains of CL flip-flops that
// shift while scan-enable is 1, and outputs that are a fixed function of
// the inputs. Checked: bypass path (one-cycle delay, functional inputs pass
// to the core), WIR load and update, boundary test (IWBR drives the core,
// OWBR captures and shifts out its outputs), unlocked scan access (the
// serial path is IWBR + chains + OWBR long, chain contents come out
// intact), and locked scan access (chains keep their contents, receive and
// release nothing, WSO shows only zeros).
module tb_secure_test_wrapper;
  import stw_pkg::*;
  localparam int NI = 8, NO = 8, NC = 2, CL = 5;
  localparam int PATH = NI + NC * CL + NO;

  logic clk = 0, rst_n = 0, unlock = 0;
  logic wsi = 0, wso, sel_wir = 0, shift = 0, capture = 0, update = 0;
  logic [NI-1:0] func_in = '0, core_in;
  logic [NO-1:0] func_out, core_out;
  logic scan_en;
  logic [NC-1:0] core_si, core_so;
  logic [CL-1:0] chain [NC];
  int checks = 0, failures = 0;

  secure_test_wrapper #(.N_IN(NI), .N_OUT(NO), .N_CHAINS(NC)) dut (
    .clk, .rst_n, .unlock_i(unlock), .wsi_i(wsi), .wso_o(wso), .select_wir_i(sel_wir),
    .shift_wr_i(shift), .capture_wr_i(capture), .update_wr_i(update),
    .func_in_i(func_in), .func_out_o(func_out), .core_in_o(core_in), .core_out_i(core_out),
    .core_scan_en_o(scan_en), .core_si_o(core_si), .core_so_i(core_so));

  // core model
  assign core_out = {core_in[3:0], core_in[7:4]} ^ 8'h5A;
  always_comb for (int k = 0; k < NC; k++) core_so[k] = chain[k][0];
  always @(posedge clk)
    if (scan_en) for (int k = 0; k < NC; k++) chain[k] <= {core_si[k], chain[k][CL-1:1]};

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic tick(); @(posedge clk); #1; endtask

  task automatic load_wir(input wir_instr_e ins);
    logic [WIR_W-1:0] v;
    v = ins;
    sel_wir = 1; shift = 1;
    for (int b = 0; b < WIR_W; b++) begin wsi = v[b]; tick(); end
    shift = 0; update = 1; tick(); update = 0; sel_wir = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NI-1:0] pat;
    logic [NO-1:0] got;
    logic [CL-1:0] secret [NC];
    logic [PATH+20-1:0] stream, outs;
    int nz;
    chain[0] = '0; chain[1] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1; tick();

    // 1. bypass and functional path
    func_in = 8'hC3; #1;
    check(core_in == 8'hC3 && func_out == core_out, "functional path in bypass");
    shift = 1;
    for (int t = 0; t < 16; t++) begin
      logic prev;
      prev = wsi;
      wsi = t[0] ^ t[2];
      tick();
      check(wso == wsi, "bypass one-bit delay");
    end
    shift = 0;
    capture = 1; tick(); capture = 0;
    check(wso == 1'b0, "bypass capture clears");

    // 2. boundary test: IWBR -> core, core -> OWBR
    load_wir(WS_INTEST);
    pat = 8'hB6;
    shift = 1;
    for (int b = 0; b < NI; b++) begin wsi = pat[b]; tick(); end
    shift = 0; update = 1; tick(); update = 0;
    check(core_in == pat, $sformatf("IWBR drives core %h exp %h", core_in, pat));
    capture = 1; tick(); capture = 0;
    shift = 1;
    for (int b = 0; b < NO; b++) begin got[b] = wso; wsi = 0; tick(); end
    shift = 0;
    check(got == (({pat[3:0], pat[7:4]}) ^ 8'h5A), $sformatf("OWBR capture %h", got));

    // 3. scan access, unlocked: chain contents come out after IWBR+... delay
    secret[0] = 5'b10110; secret[1] = 5'b01101;
    chain[0] = secret[0]; chain[1] = secret[1];
    unlock = 1;
    load_wir(WS_INTEST_SCAN);
    check(chain[0] == secret[0], "chains untouched by WIR load");
    stream = {$urandom, $urandom};
    shift = 1;
    for (int t = 0; t < PATH + 20; t++) begin
      wsi = stream[t];
      #1 check(scan_en, "scan enable while unlocked");
      outs[t] = wso;
      tick();
    end
    shift = 0;
    // first NO bits: OWBR (holds zero from scan-free shift), then chain 1,
    // then chain 0, then IWBR content, then the stream
    for (int b = 0; b < CL; b++) begin
      check(outs[NO + b] == secret[1][b], "chain 1 content out");
      check(outs[NO + CL + b] == secret[0][b], "chain 0 content out");
    end
    for (int t = PATH; t < PATH + 20; t++)
      check(outs[t] == stream[t - PATH], "serial path length");

    // 4. scan access, locked
    chain[0] = secret[0]; chain[1] = secret[1];
    unlock = 0;
    shift = 1; nz = 0;
    for (int t = 0; t < PATH + 20; t++) begin
      wsi = 1'b1;
      #1 check(!scan_en && core_si == '0, "locked: no scan enable, no scan data");
      if (t >= NO) nz += wso;
      tick();
    end
    shift = 0;
    check(nz == 0, "locked: WSO shows data");
    check(chain[0] == secret[0] && chain[1] == secret[1], "locked: chains disturbed");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
