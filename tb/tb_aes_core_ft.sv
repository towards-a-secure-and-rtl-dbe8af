// tb_aes_core_ft: self-checking test of the hardened AES core.
// Known-answer vectors of FIPS-197 (appendices B and C.1-C.3) for all three
// key sizes, random encrypt/decrypt round trips, cycle counts of key
// expansion and of each operation, and one injected fault of each kind
// (S-box ROM, key store, state register, round SET, key-generation SET),
// with and without self-reset.
module tb_aes_core_ft;
  import aes_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  // a falling edge at time 1 so that the asynchronous reset is seen
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [255:0] key_in;
  keylen_e      key_len;
  logic         key_load, key_ready;
  logic [127:0] din, dout;
  logic         decrypt, start, done, busy;
  logic         self_reset, err;
  aes_err_t     err_cause;
  aes_inj_t     inj;

  aes_core_ft dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic load_key(input logic [255:0] k, input keylen_e kl, input int exp_cycles);
    int t0;
    @(negedge clk);
    key_in = k; key_len = kl; key_load = 1'b1;
    t0 = cyc;
    @(negedge clk);
    key_load = 1'b0;
    while (!key_ready && !err) @(negedge clk);
    if (exp_cycles > 0)
      check(cyc - t0 == exp_cycles, $sformatf("key expansion cycles %0d expected %0d", cyc - t0, exp_cycles));
  endtask

  task automatic run(input logic [127:0] d, input bit dec, output logic [127:0] q,
                     output int lat, output bit got_err);
    int t0;
    @(negedge clk);
    din = d; decrypt = dec; start = 1'b1;
    t0 = cyc;
    @(negedge clk);
    start = 1'b0;
    got_err = 1'b0;
    while (!done && !err) @(negedge clk);
    got_err = err;
    lat = cyc - t0;
    q = dout;
  endtask

  logic [127:0] q, q2, pt;
  int lat;
  bit e;

  // run with one injection aimed at a cycle offset after start
  task automatic run_inj(input aes_inj_t f, input int at, output bit got_err, output aes_err_t cause,
                         output bit got_done);
    @(negedge clk);
    din = 128'h00112233445566778899aabbccddeeff; decrypt = 1'b0; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    got_err = 1'b0; got_done = 1'b0;
    for (int i = 0; i < 40; i++) begin
      if (i == at) inj = f; else inj = '{INJ_NONE, 8'd0};
      @(negedge clk);
      if (err) begin got_err = 1'b1; cause = err_cause; end
      if (done) got_done = 1'b1;
    end
    inj = '{INJ_NONE, 8'd0};
  endtask

  aes_err_t c;
  bit gd;

  initial begin
    key_in = '0; key_len = KEY128; key_load = 0; din = '0; decrypt = 0; start = 0;
    self_reset = 0; inj = '{INJ_NONE, 8'd0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // FIPS-197 appendix B
    load_key({128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h0}, KEY128, 81);
    run(128'h3243f6a8885a308d313198a2e0370734, 1'b0, q, lat, e);
    check(!e && q == 128'h3925841d02dc09fbdc118597196a0b32, $sformatf("app. B ct %h", q));
    check(lat == 22, $sformatf("AES-128 encryption latency %0d", lat));

    // C.1
    load_key({128'h000102030405060708090a0b0c0d0e0f, 128'h0}, KEY128, 81);
    run(128'h00112233445566778899aabbccddeeff, 1'b0, q, lat, e);
    check(!e && q == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, $sformatf("C.1 ct %h", q));
    run(128'h69c4e0d86a7b0430d8cdb78070b4c55a, 1'b1, q, lat, e);
    check(!e && q == 128'h00112233445566778899aabbccddeeff, $sformatf("C.1 pt %h", q));
    check(lat == 22, $sformatf("AES-128 decryption latency %0d", lat));

    // C.2
    load_key({192'h000102030405060708090a0b0c0d0e0f1011121314151617, 64'h0}, KEY192, 93);
    run(128'h00112233445566778899aabbccddeeff, 1'b0, q, lat, e);
    check(!e && q == 128'hdda97ca4864cdfe06eaf70a0ec0d7191, $sformatf("C.2 ct %h", q));
    check(lat == 26, $sformatf("AES-192 latency %0d", lat));
    run(128'hdda97ca4864cdfe06eaf70a0ec0d7191, 1'b1, q, lat, e);
    check(!e && q == 128'h00112233445566778899aabbccddeeff, $sformatf("C.2 pt %h", q));

    // C.3
    load_key(256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f, KEY256, 105);
    run(128'h00112233445566778899aabbccddeeff, 1'b0, q, lat, e);
    check(!e && q == 128'h8ea2b7ca516745bfeafc49904b496089, $sformatf("C.3 ct %h", q));
    check(lat == 30, $sformatf("AES-256 latency %0d", lat));
    run(128'h8ea2b7ca516745bfeafc49904b496089, 1'b1, q, lat, e);
    check(!e && q == 128'h00112233445566778899aabbccddeeff, $sformatf("C.3 pt %h", q));

    // random round trips for every key size
    for (int k = 0; k < 3; k++) begin
      load_key({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom},
               keylen_e'(k), 0);
      for (int n = 0; n < 5; n++) begin
        pt = {$urandom, $urandom, $urandom, $urandom};
        run(pt, 1'b0, q, lat, e);
        check(!e && q != pt, "random encryption");
        run(q, 1'b1, q2, lat, e);
        check(!e && q2 == pt, $sformatf("round trip keylen %0d", k));
      end
    end

    // ---- fault injection, error signalling only ----
    self_reset = 1'b0;
    load_key({128'h000102030405060708090a0b0c0d0e0f, 128'h0}, KEY128, 0);
    run_inj('{INJ_ROUND_SET, 8'd77}, 4, e, c, gd);
    check(e && c.round_chk && !gd, "round SET detected, result withheld");
    check(key_ready, "key kept without self-reset");
    run(128'h00112233445566778899aabbccddeeff, 1'b0, q, lat, e);
    check(!e && q == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "operation after transient fault");

    run_inj('{INJ_SBOX_FWD, 8'h35}, 2, e, c, gd);
    check(e && c.sbox_par && !gd, "forward S-box parity");
    run_inj('{INJ_SBOX_INV, 8'hA2}, 3, e, c, gd);
    check(e && c.sbox_par && !gd, "inverse S-box parity");
    run_inj('{INJ_STATE_REG, 8'd5}, 7, e, c, gd);  // a CHK cycle: the register holds
    check(e && c.state_par && !gd, "state register SEU");
    run_inj('{INJ_KEY_REG, 8'hA3}, 0, e, c, gd);  // word 5 (round key 1), bit 3
    check(e && c.key_par, "key store SEU");
    // the upset key word stays corrupted: reload
    load_key({128'h000102030405060708090a0b0c0d0e0f, 128'h0}, KEY128, 0);

    // key generation SET
    @(negedge clk);
    key_in = {128'h000102030405060708090a0b0c0d0e0f, 128'h0}; key_len = KEY128; key_load = 1'b1;
    @(negedge clk);
    key_load = 1'b0;
    repeat (10) @(negedge clk);
    while (dut.state != dut.S_KX_GEN) @(negedge clk);
    inj = '{INJ_KEYGEN_SET, 8'd9};
    @(negedge clk);
    inj = '{INJ_NONE, 8'd0};
    @(negedge clk);
    check(err && err_cause.keygen_chk && !key_ready, "key-generation SET detected");

    // key-schedule S-box parity
    @(negedge clk);
    key_load = 1'b1;
    @(negedge clk);
    key_load = 1'b0;
    inj = '{INJ_SBOX_KEY, 8'h12};
    @(negedge clk);
    inj = '{INJ_NONE, 8'd0};
    check(err && err_cause.sbox_par, "key-schedule S-box parity");

    // ---- self-reset ----
    self_reset = 1'b1;
    load_key({128'h000102030405060708090a0b0c0d0e0f, 128'h0}, KEY128, 81);
    run_inj('{INJ_ROUND_SET, 8'd3}, 10, e, c, gd);
    check(e && !gd && !key_ready, "self-reset wipes the key");
    check(dut.w[0] == 32'h0 && dut.w[43] == 32'h0, "round keys cleared");
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(!busy, "start ignored without a valid key");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
