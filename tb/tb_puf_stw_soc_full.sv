// Full-size testbench of puf_stw_soc: every parameter at its default
// (32-bit Delta, 64-bit challenges, 11 votes, four cores). One complete
// operation as the published scheme describes it: the manufacturer enrolls a
// database of NENR challenge-response pairs and blows the read-out fuse;
// the test server then asks for a Delta, looks up two recorded responses
// that differ in exactly the bits of Delta (a 32-bit Delta needs a
// database of about 2^17 pairs for such a pair to exist), and sends their
// challenges with a core identifier. The chip must accept, unlock only
// that core, let its scan chains be read and keep the others hidden. A
// wrong pair and a replayed pair must be refused. If the database holds
// no pair for a Delta, the server starts a new session.
module tb_puf_stw_soc_full;
  import stw_pkg::*;
  localparam int DW = 32, CW = 64, VOTES = 11, NIP = 4, IDW = 2;
  localparam int NI = 8, NO = 8, NC = 2, CL = 6;  // NI..NC: the top's defaults
  localparam int LAT = DW * (VOTES + 2) + 1;
  localparam int NENR = 131072;  // 2^17: about two pairs per 32-bit Delta
  localparam int NSESS = 40;  // upper bound; stops once every core was tested

  logic clk = 0, rst_n = 0;
  logic syn = 0, chal_valid = 0, enroll = 0, fuse = 0;
  logic [CW-1:0] chal = '0;
  logic [IDW-1:0] id = '0;
  logic ready, delta_valid, resp_valid, ack, ack_pass;
  logic [DW-1:0] delta, resp;
  logic [NIP-1:0] unlock, wsi = '0, wso, sel_wir = '0, shift = '0, capture = '0, update = '0;
  logic [NIP-1:0][NI-1:0] func_in = '0, core_in;
  logic [NIP-1:0][NO-1:0] func_out, core_out;
  logic [NIP-1:0] scan_en;
  logic [NIP-1:0][NC-1:0] core_si, core_so;
  int checks = 0, failures = 0;

  puf_stw_soc dut (
    .clk, .rst_n, .syn_i(syn), .ready_o(ready), .delta_o(delta), .delta_valid_o(delta_valid),
    .chal_valid_i(chal_valid), .chal_i(chal), .id_i(id), .enroll_i(enroll),
    .resp_o(resp), .resp_valid_o(resp_valid), .ack_o(ack), .ack_pass_o(ack_pass),
    .fuse_blown_i(fuse), .unlock_o(unlock),
    .wsi_i(wsi), .wso_o(wso), .select_wir_i(sel_wir), .shift_wr_i(shift),
    .capture_wr_i(capture), .update_wr_i(update),
    .func_in_i(func_in), .func_out_o(func_out), .core_in_o(core_in), .core_out_i(core_out),
    .core_scan_en_o(scan_en), .core_si_o(core_si), .core_so_i(core_so));

  always #5 clk = ~clk;

  // ---------------- crypto core models ----------------
  logic [CL-1:0] chain [NIP][NC];
  always_comb
    for (int p = 0; p < NIP; p++) begin
      core_out[p] = core_in[p] + NO'(p);
      for (int k = 0; k < NC; k++) core_so[p][k] = chain[p][k][0];
    end
  always @(posedge clk)
    for (int p = 0; p < NIP; p++)
      if (scan_en[p])
        for (int k = 0; k < NC; k++) chain[p][k] <= {core_si[p][k], chain[p][k][CL-1:1]};

  function automatic logic [CL-1:0] secret(input int p, input int k);
    return CL'(32'h2D + 7 * p + 13 * k);
  endfunction

  // ---------------- mechanism counters ----------------
  int n_enroll = 0, n_fuse_block = 0, n_pass = 0, n_wrong = 0, n_replay = 0;
  int n_restart = 0, n_scan_read = 0, n_scan_hidden = 0, n_bypass = 0, n_ecc_fix = 0;
  int n_relock = 0, n_no_pair = 0;
  int unlocked_ip [NIP];

  always @(posedge clk)
    if (rst_n && dut.u_sift.u_puf_ecc.lfsr_step)  // the vote cycle
      if (dut.u_sift.u_puf_ecc.votes_q != '0 && dut.u_sift.u_puf_ecc.votes_q != '1)
        n_ecc_fix++;

  // ---------------- helpers ----------------
  logic [CW-1:0] db_c [NENR];
  logic [DW-1:0] db_r [NENR];
  int            db_idx [logic [DW-1:0]];   // response -> database entry

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic tick(); @(posedge clk); #1; endtask

  task automatic send(input logic [CW-1:0] c, input bit en, input logic [IDW-1:0] i);
    while (!ready) tick();
    chal = c; enroll = en; id = i; chal_valid = 1;
    tick();
    chal_valid = 0; enroll = 0;
  endtask

  task automatic read_out(input logic [CW-1:0] c, output logic [DW-1:0] r, output bit got);
    send(c, 1, '0);
    got = 0;
    repeat (LAT + 20) begin
      if (resp_valid) begin got = 1; r = resp; break; end
      tick();
    end
  endtask

  task automatic get_delta(output logic [DW-1:0] d);
    syn = 1; tick(); syn = 0;
    check(delta_valid && delta != 0, "non-zero Delta after SYN");
    check(unlock == '0, "all cores locked after SYN");
    d = delta;
  endtask

  task automatic authenticate(input int i, input int j, input logic [IDW-1:0] ip, output bit pass);
    int cyc;
    send(db_c[i], 0, '0);
    send(db_c[j], 0, ip);
    cyc = 1;
    while (!ack) begin tick(); cyc++; end
    check(cyc == LAT + 2, $sformatf("ACK latency %0d", cyc));
    pass = ack_pass;
    tick();
  endtask

  function automatic bit find_pair(input logic [DW-1:0] d, input int skip, output int fi, output int fj);
    for (int i = skip; i < NENR; i++)
      if (db_idx.exists(db_r[i] ^ d)) begin fi = i; fj = db_idx[db_r[i] ^ d]; return 1; end
    return 0;
  endfunction

  task automatic load_wir(input int p, input wir_instr_e ins);
    logic [WIR_W-1:0] v;
    v = ins;
    sel_wir[p] = 1; shift[p] = 1;
    for (int b = 0; b < WIR_W; b++) begin wsi[p] = v[b]; tick(); end
    shift[p] = 0; update[p] = 1; tick(); update[p] = 0; sel_wir[p] = 0;
  endtask

  // Shift the scan path of core p and compare what leaves with its chains.
  // Returns 1 if the chain contents were seen on WSO.
  task automatic scan_read(input int p, output bit seen, output bit any_one);
    logic [NO + NC * CL - 1:0] outs;
    load_wir(p, WS_INTEST_SCAN);
    shift[p] = 1; any_one = 0;
    for (int t = 0; t < NO + NC * CL; t++) begin
      wsi[p] = 1'b0;
      #1 outs[t] = wso[p];
      if (t >= NO) any_one |= wso[p];
      tick();
    end
    shift[p] = 0;
    seen = 1;
    for (int k = 0; k < NC; k++) begin
      logic [CL-1:0] sk;
      sk = secret(p, k);
      for (int b = 0; b < CL; b++)
        if (outs[NO + (NC - 1 - k) * CL + b] != sk[b]) seen = 0;
    end
    load_wir(p, WS_BYPASS);
  endtask

  task automatic refill_chains();
    for (int p = 0; p < NIP; p++)
      for (int k = 0; k < NC; k++) chain[p][k] = secret(p, k);
  endtask

  initial begin
    repeat (NENR * (LAT + 4) + 200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] r, d;
    bit got, pass, seen, any;
    int fi, fj, stable, want_ip, bit_err;
    bit_err = 0;
    stable = 0;
    for (int p = 0; p < NIP; p++) unlocked_ip[p] = 0;
    refill_chains();
    repeat (2) @(posedge clk);
    rst_n = 1; tick();

    // bypass and functional paths
    for (int p = 0; p < NIP; p++) begin
      func_in[p] = NI'(8'h11 * (p + 1));
      shift[p] = 1; wsi[p] = 1; tick(); shift[p] = 0;
      #1 check(wso[p] == 1'b1 && core_in[p] == func_in[p] && func_out[p] == core_out[p],
               "bypass / functional path");
      n_bypass++;
    end

    // 1. enrollment
    for (int i = 0; i < NENR; i++) begin
      db_c[i] = {$urandom, $urandom | 32'h1};
      read_out(db_c[i], db_r[i], got);
      check(got, "enrollment answered");
      n_enroll += got;
    end
    for (int i = 0; i < 32; i++) begin
      read_out(db_c[i], r, got);
      stable += (got && r == db_r[i]);
      if (got) bit_err += $countones(r ^ db_r[i]);
    end
    $display("re-read: %0d/32 responses identical, %0d of %0d bits differ", stable, bit_err, 32 * DW);
    check(stable >= 16 && bit_err * 50 < 32 * DW, "enrollment re-reads unstable");
    for (int i = 0; i < NENR; i++) db_idx[db_r[i]] = i;
    $display("enrolled %0d pairs, %0d distinct responses", NENR, db_idx.num());
    fuse = 1;
    read_out(db_c[1], r, got);
    check(!got, "read-out after fuse blown");
    n_fuse_block += !got;

    // 2. sessions
    want_ip = 0;
    for (int s = 0; s < NSESS; s++) begin
      bit all_done;
      all_done = (n_wrong > 0) && (n_restart > 0);
      for (int p = 0; p < NIP; p++) if (unlocked_ip[p] == 0) all_done = 0;
      if (all_done) break;
      get_delta(d);
      if (s % 6 == 5) begin
        // restart: C_i sent, then a new SYN
        send(db_c[0], 0, '0);
        while (!ready) tick();
        get_delta(d);
        n_restart++;
      end
      if (s % 4 == 3) begin
        fi = 0; fj = 1;
        while ((db_r[fi] ^ db_r[fj]) == d) fj++;
        authenticate(fi, fj, IDW'(want_ip), pass);
        check(!pass && unlock == '0, "wrong pair accepted");
        n_wrong += !pass;
        continue;
      end
      if (!find_pair(d, 0, fi, fj)) begin n_no_pair++; continue; end
      authenticate(fi, fj, IDW'(want_ip), pass);
      if (!pass) continue;  // an unstable response bit: tester retries
      n_pass++;
      check(unlock == (NIP'(1) << want_ip), "exactly the chosen core unlocked");
      unlocked_ip[want_ip]++;
      // scan test of the unlocked core, and of a locked one
      refill_chains();
      scan_read(want_ip, seen, any);
      check(seen, "unlocked core's chains readable");
      n_scan_read += seen;
      refill_chains();
      scan_read((want_ip + 1) % NIP, seen, any);
      check(!seen && !any, "locked core's chains leaked");
      n_scan_hidden += (!seen && !any);
      // replay the accepted pair in a fresh session
      get_delta(d);
      n_relock++;
      if ((db_r[fi] ^ db_r[fj]) != d) begin
        authenticate(fi, fj, IDW'(want_ip), pass);
        check(!pass && unlock == '0, "replayed pair accepted");
        n_replay += !pass;
      end
      want_ip = (want_ip + 1) % NIP;
    end

    $display("sessions without a database pair: %0d", n_no_pair);
    $display("enroll=%0d fuse_block=%0d pass=%0d wrong=%0d replay=%0d restart=%0d relock=%0d",
             n_enroll, n_fuse_block, n_pass, n_wrong, n_replay, n_restart, n_relock);
    $display("scan_read=%0d scan_hidden=%0d bypass=%0d ecc_fix=%0d unlocked per core=%0d %0d %0d %0d",
             n_scan_read, n_scan_hidden, n_bypass, n_ecc_fix,
             unlocked_ip[0], unlocked_ip[1], unlocked_ip[2], unlocked_ip[3]);
    check(n_enroll > 0, "no enrollment");
    check(n_fuse_block > 0, "fuse never blocked");
    check(n_pass > 0, "no authentication passed");
    check(n_wrong > 0, "no wrong pair refused");
    check(n_replay > 0, "no replay refused");
    check(n_restart > 0, "no session restart");
    check(n_relock > 0, "no relock");
    check(n_scan_read > 0, "no scan read");
    check(n_scan_hidden > 0, "no hidden scan");
    check(n_bypass > 0, "no bypass");
    check(n_ecc_fix > 0, "no ECC correction");
    for (int p = 0; p < NIP; p++) check(unlocked_ip[p] > 0, $sformatf("core %0d never unlocked", p));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
