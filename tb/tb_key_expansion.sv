// tb_key_expansion: checks the key expander.
//  * FIPS-197 Appendix A.1 key: round keys 1 and 10 against the published
//    values, all 11 against the reference schedule, ready after 10 cycles.
//  * Random keys against the reference schedule, read through both ports.
//  * A one-cycle fault on SubWord (chosen so the level-1 comparator sees it):
//    the flag must rise, the round key must be recomputed (one extra cycle)
//    and the schedule must still be right.
//  * The same fault held: expansion must stop with fault after MAX_RETRY tries.
module tb_key_expansion;
  import tb_ref_pkg::*;
  localparam int MAX_RETRY = 4;
  logic clk = 0, rst_n = 0, key_load = 0, inj_en = 0;
  logic [127:0] key;
  logic [31:0] inj_mask = '0;
  logic ready, fault;
  logic [3:0] l1_err, enc_idx = 0, dec_idx = 0;
  logic [127:0] enc_rk, dec_rk;
  int checks = 0, failures = 0, cycles = 0, flags_seen = 0;
  logic [7:0] GINV [256];

  key_expansion #(.MAX_RETRY(MAX_RETRY)) dut (
    .clk, .rst_n, .key_load, .key, .inj_en, .inj_mask, .ready, .fault, .l1_err,
    .enc_idx, .enc_rk, .dec_idx, .dec_rk);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (|l1_err) flags_seen++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // load a key, wait for ready or fault, return the cycles after the one that
  // sampled key_load
  task automatic load(input logic [127:0] k, output int n);
    key = k;
    @(negedge clk) key_load = 1;
    @(negedge clk) key_load = 0;
    n = 0;
    while (!ready && !fault && n < 100) begin
      @(negedge clk); n++;
    end
  endtask

  task automatic check_schedule(input logic [127:0] k, input string what);
    rkeys_t r = expand(k);
    for (int i = 0; i <= 10; i++) begin
      enc_idx = 4'(i); dec_idx = 4'(10 - i); #1;
      check(enc_rk == r[i] && dec_rk == r[10 - i], $sformatf("%s round key %0d", what, i));
    end
  endtask

  initial begin
    int n;
    rkeys_t r;
    logic [127:0] k;
    logic [7:0] b, e;
    init();
    for (int i = 0; i < 256; i++) GINV[i] = rinv(8'(i));
    repeat (3) @(negedge clk);
    rst_n = 1;

    k = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    load(k, n);
    check(ready && !fault, "FIPS key ready");
    check(n == 10, $sformatf("FIPS key took %0d cycles, expected 10", n));
    enc_idx = 1; #1; check(enc_rk == 128'ha0fafe1788542cb123a339392a6c7605, "FIPS round key 1");
    enc_idx = 10; #1; check(enc_rk == 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "FIPS round key 10");
    check_schedule(k, "FIPS");

    for (int t = 0; t < 20; t++) begin
      k = rand128();
      load(k, n);
      check(ready && n == 10, "random key ready");
      check_schedule(k, "random");
    end

    // transient fault during round key 3: pick a byte-0 error the check sees
    k = rand128();
    r = expand(k);
    b = gb(r[2], 13);                         // RotWord puts w[11] byte 1 first
    e = 8'h01;
    while (!(rmul(b, GINV[ISBOX[SBOX[b] ^ e]])[0] ^ (b != 0))) e++;
    key = k;
    @(negedge clk) key_load = 1;
    @(negedge clk) key_load = 0;
    @(negedge clk);                           // round key 1 done
    @(negedge clk);                           // round key 2 done, now on 3
    inj_en = 1; inj_mask = {e, 24'h0};
    #1 check(l1_err[0], "flag raised by injected SubWord fault");
    @(negedge clk) inj_en = 0;
    n = 3;
    while (!ready && !fault && n < 100) begin
      @(negedge clk); n++;
    end
    check(ready && !fault && n == 11, $sformatf("transient fault: %0d cycles, expected 11", n));
    check_schedule(k, "after transient fault");

    // permanent fault from the first round key on
    e = 8'h01;
    b = gb(k, 13);
    while (!(rmul(b, GINV[ISBOX[SBOX[b] ^ e]])[0] ^ (b != 0))) e++;
    inj_en = 1; inj_mask = {e, 24'h0};
    load(k, n);
    check(fault && !ready, "permanent fault flagged");
    check(n == MAX_RETRY, $sformatf("permanent fault after %0d cycles, expected %0d", n, MAX_RETRY));
    inj_en = 0;
    check(flags_seen > 0, "level-1 flags seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
