// Testbench for sift with an 8-bit Delta (PRNG x^8+x^6+x^5+x^4+1), 64-bit
// challenges, 11 votes and the noisy arbiter PUF model. The testbench is
// the test server: it enrolls a database of challenge-response pairs,
// blows the read-out fuse, and then runs sessions, looking up in its
// database two challenges whose responses XOR to the Delta it receives.
// Checked: enrollment answers and its latency; repeated enrollment gives
// the same corrected response; no read-out once the fuse is blown; Delta
// is never 0; a correct pair is accepted (ACK pass, match held until the
// next SYN) with ACK rising LAT+1 clock edges after the edge that took C_j; a wrong pair and a
// replayed pair whose XOR is not the new Delta are refused.
module tb_sift;
  localparam int DW = 8, CW = 64, VOTES = 11;
  localparam int LAT = DW * (VOTES + 2) + 1;
  localparam int NENR = 64;

  logic clk = 0, rst_n = 0;
  logic syn = 0, chal_valid = 0, enroll = 0, fuse = 0;
  logic [CW-1:0] chal = '0;
  logic ready, delta_valid, resp_valid, ack, ack_pass, id_load, match;
  logic [DW-1:0] delta, resp;
  int checks = 0, failures = 0;

  sift #(.DELTA_W(DW), .PRNG_TAPS(8'hB8)) dut (
    .clk, .rst_n, .syn_i(syn), .ready_o(ready), .delta_o(delta), .delta_valid_o(delta_valid),
    .chal_valid_i(chal_valid), .chal_i(chal), .enroll_i(enroll), .fuse_blown_i(fuse),
    .resp_o(resp), .resp_valid_o(resp_valid), .ack_o(ack), .ack_pass_o(ack_pass),
    .id_load_o(id_load), .match_o(match));

  always #5 clk = ~clk;

  logic [CW-1:0] db_c [NENR];
  logic [DW-1:0] db_r [NENR];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic tick(); @(posedge clk); #1; endtask

  task automatic send(input logic [CW-1:0] c, input bit en);
    while (!ready) tick();
    chal = c; enroll = en; chal_valid = 1;
    tick();
    chal_valid = 0; enroll = 0; chal = '0;
  endtask

  // Enrollment query; returns 0 if no answer within LAT+20 cycles.
  task automatic enroll_one(input logic [CW-1:0] c, output logic [DW-1:0] r, output bit got,
                            output int cyc);
    send(c, 1);
    got = 0; cyc = 1;
    repeat (LAT + 20) begin
      if (resp_valid) begin got = 1; r = resp; break; end
      check(resp == '0, "resp_o not zero outside read-out");
      tick(); cyc++;
    end
  endtask

  task automatic get_delta(output logic [DW-1:0] d);
    syn = 1; tick(); syn = 0;
    check(delta_valid, "delta_valid one cycle after SYN");
    check(!match && !ack_pass, "SYN clears match and pass");
    d = delta;
    check(d != 0, "Delta is zero");
  endtask

  // Sends C_i then C_j; returns ACK pass and the C_j-to-ACK cycle count.
  task automatic authenticate(input int i, input int j, output bit pass, output int cyc);
    send(db_c[i], 0);
    send(db_c[j], 0);
    cyc = 1;
    while (!ack) begin tick(); cyc++; end
    pass = ack_pass;
    tick();
  endtask

  function automatic bit find_pair(input logic [DW-1:0] d, output int fi, output int fj);
    for (int i = 0; i < NENR; i++)
      for (int j = 0; j < NENR; j++)
        if ((db_r[i] ^ db_r[j]) == d) begin fi = i; fj = j; return 1; end
    return 0;
  endfunction

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] r, d;
    bit got, pass;
    int cyc, stable, fi, fj, n_pass, n_refused, n_good;
    stable = 0; n_pass = 0; n_refused = 0; n_good = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; tick();

    // Enrollment
    for (int i = 0; i < NENR; i++) begin
      db_c[i] = {$urandom, $urandom | 32'h1};
      enroll_one(db_c[i], db_r[i], got, cyc);
      check(got, "enrollment answered");
      check(cyc == LAT + 1, $sformatf("enrollment latency %0d exp %0d", cyc, LAT + 1));
    end
    for (int i = 0; i < 16; i++) begin
      enroll_one(db_c[i], r, got, cyc);
      stable += (got && r == db_r[i]);
    end
    check(stable >= 14, $sformatf("only %0d/16 re-reads stable", stable));

    // Fuse blown: no more read-out
    fuse = 1;
    enroll_one(db_c[0], r, got, cyc);
    check(!got, "read-out after fuse blown");

    // Authentication sessions
    for (int s = 0; s < 12; s++) begin
      get_delta(d);
      if (s % 3 == 2) begin
        // wrong pair: XOR differs from Delta in at least one bit
        fi = 0; fj = 1;
        while ((db_r[fi] ^ db_r[fj]) == d) fj++;
        authenticate(fi, fj, pass, cyc);
        check(!pass && !match, "wrong pair accepted");
        n_refused += !pass;
      end else if (find_pair(d, fi, fj)) begin
        n_good++;
        authenticate(fi, fj, pass, cyc);
        check(cyc == LAT + 2, $sformatf("ACK latency %0d exp %0d", cyc, LAT + 2));
        n_pass += pass;
        if (pass) begin
          repeat (5) begin check(match && ack_pass, "match held until next SYN"); tick(); end
          // replay the same pair in a new session
          get_delta(d);
          authenticate(fi, fj, pass, cyc);
          if ((db_r[fi] ^ db_r[fj]) != d) begin
            check(!pass, "replayed pair accepted");
            n_refused += !pass;
          end
        end
      end
    end
    $display("sessions with a pair=%0d passed=%0d refused=%0d", n_good, n_pass, n_refused);
    check(n_good > 0 && n_pass * 4 >= n_good * 3, "too few correct pairs accepted");
    check(n_refused > 0, "no refusal seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
