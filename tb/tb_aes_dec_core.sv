// tb_aes_dec_core: checks the decryption core with the round keys served from
// the reference key schedule.
//  * FIPS-197 Appendix C.1 vector decrypted, done exactly 40 cycles after start.
//  * Random keys and blocks against the reference inverse cipher.
//  * A received block whose parity bits do not match: fault at once.
//  * A one-cycle fault in each kind of step (InvSubBytes with all 16 bytes hit,
//    InvShiftRows, InvMixColumns and AddRoundKey with one flipped bit) in a random
//    round: the matching comparator must flag it, the step must be repeated
//    (41 cycles) and the plaintext must still be right.
//  * A fault held on one step: the block must end with fault after MAX_RETRY
//    attempts.
module tb_aes_dec_core;
  import tb_ref_pkg::*;
  import aes_pkg::*;
  localparam int MAX_RETRY = 4;
  logic clk = 0, rst_n = 0, start = 0;
  logic [127:0] ct, key, rk_v, pt_v;
  logic [15:0] ct_par;
  logic [3:0] rk_idx;
  fault_inj_t inj;
  logic busy, done, fault;
  state_t pt;
  flags_t l1_err, l2_err;
  rkeys_t rks;
  int checks = 0, failures = 0, l1_hits = 0, l2_hits = 0;
  bit one_shot = 0;

  aes_dec_core #(.MAX_RETRY(MAX_RETRY)) dut (
    .clk, .rst_n, .start, .ct(state_t'(ct)), .ct_par(flags_t'(ct_par)), .rk_idx,
    .rk(state_t'(rk_v)), .inj, .busy, .done, .fault, .pt, .l1_err, .l2_err);

  assign rk_v = rks[rk_idx];
  assign pt_v = 128'(pt);

  always #5 clk = ~clk;
  always @(negedge clk) begin
    if (|l1_err) l1_hits++;
    if (|l2_err) l2_hits++;
  end
  // transient fault: withdrawn after the first attempt that it spoiled
  always @(posedge clk)
    if (one_shot && (|l1_err || |l2_err)) inj.en <= 1'b0;

  initial begin
    repeat (50000) @(posedge clk);
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

  task automatic run(input logic [127:0] c, output int n);
    ct = c; ct_par = parity16(c);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    n = 0;
    while (!done && n < 200) begin
      @(negedge clk); n++;
    end
  endtask

  task automatic inject(input step_e st, input int round, input logic [127:0] mask,
                        input bit transient);
    inj.en = 1'b1; inj.step = st; inj.round = 4'(round); inj.mask = state_t'(mask);
    one_shot = transient;
  endtask

  initial begin
    int n, l1_0, l2_0, r;
    logic [127:0] p, m;
    init();
    inj = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    key = 128'h000102030405060708090a0b0c0d0e0f;
    rks = expand(key);
    run(128'h69c4e0d86a7b0430d8cdb78070b4c55a, n);
    check(pt_v == 128'h00112233445566778899aabbccddeeff && !fault, "FIPS-197 C.1 plaintext");
    check(n == 40, $sformatf("block took %0d cycles, expected 40", n));
    check(l1_hits == 0 && l2_hits == 0, "no flags without faults");

    for (int t = 0; t < 30; t++) begin
      key = rand128(); rks = expand(key); p = rand128();
      run(p, n);
      check(pt_v == decrypt(key, p) && !fault && n == 40, "random block");
    end

    // received parity bits that do not match the ciphertext
    p = rand128();
    ct = p; ct_par = parity16(p) ^ (16'h1 << $urandom_range(0, 15));
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    check(done && fault && !busy, "received parity mismatch flagged at once");
    @(negedge clk);

    for (int t = 0; t < 40; t++) begin
      step_e st;
      key = rand128(); rks = expand(key); p = rand128();
      st = step_e'(t % 4);
      r = (st == STEP_ARK) ? $urandom_range(0, 10) :
          (st == STEP_MIX) ? $urandom_range(1, 9) : $urandom_range(1, 10);
      if (st == STEP_SUB) begin
        m = '0;
        for (int b = 0; b < 16; b++) m[127 - 8*b -: 8] = 8'($urandom_range(1, 255));
      end else begin
        m = '0; m[$urandom_range(0, 127)] = 1'b1;
      end
      l1_0 = l1_hits; l2_0 = l2_hits;
      inject(st, r, m, 1);
      run(p, n);
      inj.en = 0;
      check(pt_v == decrypt(key, p) && !fault, $sformatf("transient %s round %0d corrected", st.name(), r));
      check(n == 41, $sformatf("transient %s: %0d cycles, expected 41", st.name(), n));
      if (st == STEP_SUB) check(l1_hits == l1_0 + 1 && l2_hits == l2_0, "level-1 flag");
      else                check(l2_hits == l2_0 + 1 && l1_hits == l1_0, "level-2 flag");
    end

    foreach (m[i]) m[i] = 1'b0;
    m[5] = 1'b1;
    inject(STEP_MIX, 3, m, 0);
    run(rand128(), n);
    inj.en = 0;
    check(fault, "permanent fault flagged");
    check(n == 3 + 4*(9 - 3) + 1 + MAX_RETRY, $sformatf("permanent fault ended after %0d cycles", n));

    $display("level-1 flags %0d, level-2 flags %0d", l1_hits, l2_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
