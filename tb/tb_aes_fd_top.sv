// tb_aes_fd_top: end-to-end test of the sender/receiver system at its default
// parameters. Blocks are encrypted, the ciphertext and its parity bits are
// carried to the receiver side and decrypted, and both results are compared
// with the reference cipher. Every mechanism of the design is made to happen
// and counted:
//   key expansion, a key-expander S-box fault repaired by recomputation and a
//   permanent key-expander fault; a start ignored before the keys are ready;
//   repaired faults in SubBytes (level 1) and in ShiftRows, MixColumns and
//   AddRoundKey (level 2) on the sender, and in the four inverse steps on the
//   receiver; a permanent fault on each side; a block corrupted on the way,
//   caught by the parity bits.
// A mechanism that never occurs counts as a failure.
module tb_aes_fd_top;
  import tb_ref_pkg::*;
  import aes_pkg::*;

  logic clk = 0, rst_n = 0;
  logic key_load = 0, key_inj_en = 0;
  logic [127:0] key;
  logic [31:0] key_inj_mask = '0;
  logic key_ready, key_fault;
  logic [3:0] key_l1_err;
  logic enc_start = 0, dec_start = 0;
  logic [127:0] pt_in, ct_in;
  logic [15:0] par_in;
  fault_inj_t enc_inj, dec_inj;
  logic enc_busy, enc_done, enc_fault, dec_busy, dec_done, dec_fault;
  state_t enc_ct, dec_pt;
  flags_t enc_ct_par, enc_l1_err, enc_l2_err, dec_l1_err, dec_l2_err;
  int checks = 0, failures = 0;
  bit enc_once = 0, dec_once = 0;

  typedef enum int {
    M_KEY_EXPAND, M_KEY_L1_RETRY, M_KEY_PERMANENT, M_START_BEFORE_KEY,
    M_ENC_L1_RETRY, M_ENC_SHIFT_RETRY, M_ENC_MIX_RETRY, M_ENC_ARK_RETRY, M_ENC_PERMANENT,
    M_DEC_L1_RETRY, M_DEC_SHIFT_RETRY, M_DEC_MIX_RETRY, M_DEC_ARK_RETRY, M_DEC_PERMANENT,
    M_RX_PARITY, M_ROUND_TRIP, M_COUNT
  } mech_e;
  int mech [M_COUNT];

  aes_fd_top dut (
    .clk, .rst_n,
    .key_load, .key(state_t'(key)), .key_inj_en, .key_inj_mask,
    .key_ready, .key_fault, .key_l1_err,
    .enc_start, .enc_pt(state_t'(pt_in)), .enc_inj,
    .enc_busy, .enc_done, .enc_fault, .enc_ct, .enc_ct_par, .enc_l1_err, .enc_l2_err,
    .dec_start, .dec_ct(state_t'(ct_in)), .dec_ct_par(flags_t'(par_in)), .dec_inj,
    .dec_busy, .dec_done, .dec_fault, .dec_pt, .dec_l1_err, .dec_l2_err);

  always #5 clk = ~clk;

  // transient faults are withdrawn after the first attempt they spoil
  always @(posedge clk) begin
    if (enc_once && (|enc_l1_err || |enc_l2_err)) enc_inj.en <= 1'b0;
    if (dec_once && (|dec_l1_err || |dec_l2_err)) dec_inj.en <= 1'b0;
  end

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic load_key(input logic [127:0] k, output int n);
    key = k;
    @(negedge clk) key_load = 1;
    @(negedge clk) key_load = 0;
    n = 0;
    while (!key_ready && !key_fault && n < 100) begin
      @(negedge clk); n++;
    end
  endtask

  task automatic encrypt_block(input logic [127:0] p, output int n, output int l1, output int l2);
    pt_in = p;
    l1 = 0; l2 = 0;
    @(negedge clk) enc_start = 1;
    @(negedge clk) enc_start = 0;
    n = 0;
    while (!enc_done && n < 200) begin
      l1 += int'(|enc_l1_err); l2 += int'(|enc_l2_err);
      @(negedge clk); n++;
    end
  endtask

  task automatic decrypt_block(input logic [127:0] c, input logic [15:0] par,
                               output int n, output int l1, output int l2);
    ct_in = c; par_in = par;
    l1 = 0; l2 = 0;
    @(negedge clk) dec_start = 1;
    @(negedge clk) dec_start = 0;
    n = 0;
    while (!dec_done && n < 200) begin
      l1 += int'(|dec_l1_err); l2 += int'(|dec_l2_err);
      @(negedge clk); n++;
    end
  endtask

  function automatic logic [127:0] fault_mask(input step_e st);
    logic [127:0] m = '0;
    if (st == STEP_SUB)
      for (int b = 0; b < 16; b++) m[127 - 8*b -: 8] = 8'($urandom_range(1, 255));
    else
      m[$urandom_range(0, 127)] = 1'b1;
    return m;
  endfunction

  function automatic int pick_round(input step_e st);
    return (st == STEP_ARK) ? $urandom_range(0, 10) :
           (st == STEP_MIX) ? $urandom_range(1, 9) : $urandom_range(1, 10);
  endfunction

  initial begin
    int n, l1, l2;
    logic [127:0] k, p, c, ref_c;
    logic [15:0] cpar;
    logic [7:0] b, e;
    rkeys_t r;
    init();
    enc_inj = '0; dec_inj = '0;
    foreach (mech[i]) mech[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // a start before any key is loaded is ignored
    pt_in = rand128();
    @(negedge clk) enc_start = 1;
    @(negedge clk) enc_start = 0;
    repeat (3) @(negedge clk);
    check(!enc_busy && !enc_done, "start ignored before keys are ready");
    if (!enc_busy) mech[M_START_BEFORE_KEY]++;

    // FIPS-197 C.1 through both sides
    load_key(128'h000102030405060708090a0b0c0d0e0f, n);
    check(key_ready && n == 10, "key expansion");
    if (key_ready) mech[M_KEY_EXPAND]++;
    encrypt_block(128'h00112233445566778899aabbccddeeff, n, l1, l2);
    check(128'(enc_ct) == 128'h69c4e0d86a7b0430d8cdb78070b4c55a && n == 40 && !enc_fault,
          "FIPS-197 C.1 encryption");
    c = 128'(enc_ct); cpar = 16'(enc_ct_par);
    decrypt_block(c, cpar, n, l1, l2);
    check(128'(dec_pt) == 128'h00112233445566778899aabbccddeeff && n == 40 && !dec_fault,
          "FIPS-197 C.1 decryption");

    for (int t = 0; t < 120; t++) begin
      int sel;
      step_e st;
      bit permanent;
      sel = t % 12;
      if (t % 20 == 0) begin
        k = rand128();
        load_key(k, n);
        check(key_ready && n == 10, "key expansion");
        if (key_ready) mech[M_KEY_EXPAND]++;
      end
      p = rand128();
      ref_c = encrypt(k, p);
      // sel 0..3: sender fault in step sel; 4..7: receiver fault; 8..11: none
      st = step_e'(sel % 4);
      permanent = (t % 40 == 5) || (t % 40 == 26);
      if (sel < 4) begin
        enc_inj.en = 1; enc_inj.step = st; enc_inj.round = 4'(pick_round(st));
        enc_inj.mask = state_t'(fault_mask(st)); enc_once = !permanent;
      end else if (sel < 8) begin
        dec_inj.en = 1; dec_inj.step = st; dec_inj.round = 4'(pick_round(st));
        dec_inj.mask = state_t'(fault_mask(st)); dec_once = !permanent;
      end

      encrypt_block(p, n, l1, l2);
      enc_inj.en = 0;
      if (sel < 4 && permanent) begin
        check(enc_fault, "sender permanent fault flagged");
        if (enc_fault) mech[M_ENC_PERMANENT]++;
        continue;
      end
      c = 128'(enc_ct); cpar = 16'(enc_ct_par);
      check(c == ref_c && !enc_fault, "sender ciphertext");
      check(cpar == parity16(ref_c), "sender parity bits");
      if (sel < 4) begin
        check(n == 41, $sformatf("sender repaired %s in 41 cycles (%0d)", st.name(), n));
        if (st == STEP_SUB) begin
          check(l1 == 1 && l2 == 0, "sender level-1 flag");
          if (l1 == 1) mech[M_ENC_L1_RETRY]++;
        end else begin
          check(l2 == 1 && l1 == 0, "sender level-2 flag");
          if (l2 == 1) mech[st == STEP_SHIFT ? M_ENC_SHIFT_RETRY :
                            st == STEP_MIX ? M_ENC_MIX_RETRY : M_ENC_ARK_RETRY]++;
        end
      end else begin
        check(n == 40 && l1 == 0 && l2 == 0, "sender clean block");
      end

      // the channel: every 10th fault-free block is corrupted in transit
      if (sel == 9) begin
        decrypt_block(c ^ (128'h1 << $urandom_range(0, 127)), cpar, n, l1, l2);
        check(dec_fault && n == 0, "corrupted block caught by parity bits");
        if (dec_fault) mech[M_RX_PARITY]++;
        continue;
      end

      decrypt_block(c, cpar, n, l1, l2);
      dec_inj.en = 0;
      if (sel >= 4 && sel < 8 && permanent) begin
        check(dec_fault, "receiver permanent fault flagged");
        if (dec_fault) mech[M_DEC_PERMANENT]++;
        continue;
      end
      check(128'(dec_pt) == p && !dec_fault, "receiver plaintext");
      if (128'(dec_pt) == p) mech[M_ROUND_TRIP]++;
      if (sel >= 4 && sel < 8) begin
        check(n == 41, $sformatf("receiver repaired %s in 41 cycles (%0d)", st.name(), n));
        if (st == STEP_SUB) begin
          check(l1 == 1 && l2 == 0, "receiver level-1 flag");
          if (l1 == 1) mech[M_DEC_L1_RETRY]++;
        end else begin
          check(l2 == 1 && l1 == 0, "receiver level-2 flag");
          if (l2 == 1) mech[st == STEP_SHIFT ? M_DEC_SHIFT_RETRY :
                            st == STEP_MIX ? M_DEC_MIX_RETRY : M_DEC_ARK_RETRY]++;
        end
      end else begin
        check(n == 40 && l1 == 0 && l2 == 0, "receiver clean block");
      end
    end

    // key expander: one-cycle S-box fault during round key 1, then a held one
    k = rand128();
    r = expand(k);
    b = gb(k, 13);
    e = 8'h01;
    while (!(rmul(b, rinv(ISBOX[SBOX[b] ^ e]))[0] ^ (b != 0))) e++;
    key = k;
    @(negedge clk) key_load = 1;
    @(negedge clk) key_load = 0;
    key_inj_en = 1; key_inj_mask = {e, 24'h0};
    #1 check(key_l1_err[0], "key expander level-1 flag");
    @(negedge clk) key_inj_en = 0;
    n = 1;
    while (!key_ready && !key_fault && n < 100) begin
      @(negedge clk); n++;
    end
    check(key_ready && n == 11, $sformatf("key expander repaired in 11 cycles (%0d)", n));
    if (key_ready && n == 11) mech[M_KEY_L1_RETRY]++;
    p = rand128();
    encrypt_block(p, n, l1, l2);
    check(128'(enc_ct) == encrypt(k, p), "block under the repaired key schedule");

    key_inj_en = 1;
    load_key(k, n);
    key_inj_en = 0;
    check(key_fault && !key_ready, "key expander permanent fault");
    if (key_fault) mech[M_KEY_PERMANENT]++;
    pt_in = rand128();
    @(negedge clk) enc_start = 1;
    @(negedge clk) enc_start = 0;
    check(!enc_busy, "no encryption without a valid key schedule");

    for (int i = 0; i < M_COUNT; i++) begin
      mech_e m_i;
      m_i = mech_e'(i);
      $display("%-20s %0d", m_i.name(), mech[i]);
      check(mech[i] > 0, $sformatf("mechanism %s happened", m_i.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
