// Testbench for sift_ctrl. The datapath is replaced by a stand-in PUF-ECC
// that raises ecc_done a random number of cycles after ecc_start, and the
// comparator result is driven directly. Scripted scenarios check each
// control output against the protocol: enrollment allowed only with the
// fuse intact, SYN -> PRNG step, clear and a Delta-valid pulse, C_i and
// C_j evaluated and written to slots 0 and 1, the identifier loaded with
// C_j, ACK with the comparator result and a PRNG reseed, a SYN restarting
// a session, and challenges ignored while a response is being computed.
module tb_sift_ctrl;
  import stw_pkg::*;
  logic clk = 0, rst_n = 0;
  logic syn = 0, chal_valid = 0, enroll = 0, fuse = 0, match = 0;
  logic ready, delta_valid, resp_valid, ack, ack_pass;
  logic prng_step, prng_reseed, ecc_start, ecc_done, mem_clear, mem_we, mem_sel, id_load;
  sift_state_e state;
  int checks = 0, failures = 0;
  int n_start = 0, n_step = 0, n_reseed = 0, n_clear = 0, n_we0 = 0, n_we1 = 0;
  int n_idload = 0, n_ack = 0, n_pass = 0, n_dv = 0, n_rv = 0;
  int busy_left = 0;

  sift_ctrl dut (.clk, .rst_n, .syn_i(syn), .chal_valid_i(chal_valid), .enroll_i(enroll),
                 .fuse_blown_i(fuse), .ready_o(ready), .delta_valid_o(delta_valid), .resp_valid_o(resp_valid),
                 .ack_o(ack), .ack_pass_o(ack_pass), .prng_step_o(prng_step),
                 .prng_reseed_o(prng_reseed), .ecc_start_o(ecc_start), .ecc_done_i(ecc_done),
                 .mem_clear_o(mem_clear), .mem_we_o(mem_we), .mem_sel_o(mem_sel),
                 .id_load_o(id_load), .match_i(match), .state_o(state));

  always #5 clk = ~clk;

  // stand-in PUF-ECC
  assign ecc_done = (busy_left == 1);
  always @(posedge clk) begin
    if (ecc_start) busy_left <= $urandom_range(3, 12);
    else if (busy_left > 0) busy_left <= busy_left - 1;
  end

  // event counters, sampled at each edge
  always @(posedge clk) if (rst_n) begin
    n_start  += ecc_start;   n_step += prng_step; n_reseed += prng_reseed;
    n_clear  += mem_clear;   n_idload += id_load;
    n_we0    += mem_we && !mem_sel;  n_we1 += mem_we && mem_sel;
    n_ack    += ack;  n_pass += ack && ack_pass; n_dv += delta_valid; n_rv += resp_valid;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (state %s)", what, state.name()); end
  endtask

  task automatic tick(); @(posedge clk); #1; endtask

  task automatic send_chal(input bit en);
    chal_valid = 1; enroll = en; tick(); chal_valid = 0; enroll = 0;
  endtask

  task automatic wait_idle_eval();
    while (busy_left != 0) tick();
    tick();
  endtask

  task automatic snapshot(output int s[11]);
    s = '{n_start, n_step, n_reseed, n_clear, n_we0, n_we1, n_idload, n_ack, n_pass, n_dv, n_rv};
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s0[11], s1[11];
    repeat (2) @(posedge clk);
    rst_n = 1; tick();
    check(state == ST_IDLE, "reset state");

    // 1. enrollment with the fuse intact
    snapshot(s0);
    send_chal(1);
    check(state == ST_ENROLL, "enroll accepted");
    send_chal(1);  // ignored while busy
    wait_idle_eval(); tick();
    snapshot(s1);
    check(s1[0] - s0[0] == 1, "one ecc start for enrollment");
    check(s1[10] - s0[10] == 1, "one resp_valid");
    check(s1[4] + s1[5] == s0[4] + s0[5], "enrollment writes no MEM");
    check(state == ST_IDLE, "back to idle");

    // 2. enrollment with the fuse blown: ignored
    fuse = 1;
    snapshot(s0);
    send_chal(1); tick();
    snapshot(s1);
    check(s1[0] == s0[0] && state == ST_IDLE, "fuse blocks enrollment");
    // plain challenge without SYN is ignored too
    send_chal(0); tick();
    check(state == ST_IDLE, "challenge without SYN ignored");

    // 3. full authentication, comparator says match
    snapshot(s0);
    syn = 1; #1;
    check(prng_step && mem_clear, "SYN steps PRNG and clears MEM");
    tick(); syn = 0;
    check(delta_valid && state == ST_WAIT_CI, "delta_valid after SYN");
    send_chal(1);  // enroll flag during a session: ignored
    check(state == ST_WAIT_CI, "enroll ignored in session");
    check(ready, "ready for C_i");
    send_chal(0);
    check(state == ST_EVAL_CI && !ready, "C_i evaluated, not ready");
    send_chal(0);  // ignored while busy
    while (!ecc_done) tick();
    #1 check(mem_we && !mem_sel, "R_i written to slot 0");
    tick();
    check(state == ST_WAIT_CJ && ready, "waiting for C_j, ready");
    chal_valid = 1; #1;
    check(id_load && ecc_start, "ID loaded with C_j");
    tick(); chal_valid = 0;
    while (!ecc_done) tick();
    #1 check(mem_we && mem_sel, "R_j written to slot 1");
    match = 1;
    tick();
    check(state == ST_CHECK && prng_reseed, "check state reseeds");
    tick();
    check(ack && ack_pass, "ACK pass");
    tick();
    check(!ack && ack_pass, "ACK is a pulse, pass level holds");
    snapshot(s1);
    check(s1[0] - s0[0] == 2 && s1[2] - s0[2] == 1 && s1[7] - s0[7] == 1, "event counts of a session");

    // 4. failing authentication, then SYN restart in the middle
    syn = 1; tick(); syn = 0;
    check(!ack_pass, "pass cleared by SYN");
    match = 0;
    send_chal(0); while (!ecc_done) tick(); tick();
    send_chal(0); while (!ecc_done) tick(); tick();
    tick();
    check(ack && !ack_pass, "ACK fail");
    syn = 1; tick(); syn = 0;
    send_chal(0); while (!ecc_done) tick(); tick();
    check(state == ST_WAIT_CJ, "in WAIT_CJ");
    syn = 1; #1; check(prng_step, "SYN in WAIT_CJ steps PRNG"); tick(); syn = 0;
    check(state == ST_WAIT_CI, "SYN restarts session");

    $display("starts=%0d steps=%0d reseeds=%0d acks=%0d pass=%0d", n_start, n_step, n_reseed, n_ack, n_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
