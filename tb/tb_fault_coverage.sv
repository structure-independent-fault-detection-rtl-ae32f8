// tb_fault_coverage: fault-injection campaign measuring the error coverage of
// the concurrent checks, on the whole sender/receiver system.
//
// Each injection picks a side (encryption or decryption), one of the 40 steps
// of a block and one byte of that step's output, and holds 1 to 8 random bits
// of that byte at random stuck values for one attempt. The fault-free value of
// the step output comes from the reference model, so only faults that change
// the byte (excited faults) are counted. An excited fault is covered when a
// comparator flags it; the step is then repeated and the block must come out
// right. An uncovered fault must show up as a wrong block.
//
// Two systems run side by side on the same faults: one with the default 1-bit
// S-box check and one with the 8-bit check. Coverage is reported per kind of
// step. NUM_FAULTS sets the campaign size.
module tb_fault_coverage;
  import tb_ref_pkg::*;
  import aes_pkg::*;
  localparam int NUM_FAULTS = 250000;
  localparam int NCFG = 2;

  logic clk = 0, rst_n = 0, key_load = 0, enc_start = 0, dec_start = 0;
  logic [127:0] key, pt_in, ct_in;
  logic [15:0] par_in;
  fault_inj_t enc_inj [NCFG];
  fault_inj_t dec_inj [NCFG];
  logic key_ready [NCFG];
  logic enc_done [NCFG], enc_fault [NCFG], dec_done [NCFG], dec_fault [NCFG];
  state_t enc_ct [NCFG], dec_pt [NCFG];
  flags_t enc_par [NCFG], enc_l1 [NCFG], enc_l2 [NCFG], dec_l1 [NCFG], dec_l2 [NCFG];
  int flagged [NCFG];
  int enc_dones [NCFG], dec_dones [NCFG];
  int checks = 0, failures = 0;
  int excited [2][4];              // [side][step]
  int covered [NCFG][2][4];

  for (genvar g = 0; g < NCFG; g++) begin : g_sys
    logic kf, eb, db;
    logic [3:0] kl1;
    flags_t unused_par;
    aes_fd_top #(.CHECK_BITS(g == 0 ? 1 : 8)) dut (
      .clk, .rst_n, .key_load, .key(state_t'(key)), .key_inj_en(1'b0), .key_inj_mask(32'h0),
      .key_ready(key_ready[g]), .key_fault(kf), .key_l1_err(kl1),
      .enc_start, .enc_pt(state_t'(pt_in)), .enc_inj(enc_inj[g]),
      .enc_busy(eb), .enc_done(enc_done[g]), .enc_fault(enc_fault[g]), .enc_ct(enc_ct[g]),
      .enc_ct_par(enc_par[g]), .enc_l1_err(enc_l1[g]), .enc_l2_err(enc_l2[g]),
      .dec_start, .dec_ct(state_t'(ct_in)), .dec_ct_par(flags_t'(par_in)), .dec_inj(dec_inj[g]),
      .dec_busy(db), .dec_done(dec_done[g]), .dec_fault(dec_fault[g]), .dec_pt(dec_pt[g]),
      .dec_l1_err(dec_l1[g]), .dec_l2_err(dec_l2[g]));

    // a stuck-at fault here lasts for one attempt of the step
    always @(posedge clk) begin
      if (|enc_l1[g] || |enc_l2[g] || |dec_l1[g] || |dec_l2[g]) begin
        enc_inj[g].en <= 1'b0;
        dec_inj[g].en <= 1'b0;
        flagged[g]++;
      end
      if (enc_done[g]) enc_dones[g]++;
      if (dec_done[g]) dec_dones[g]++;
    end
  end

  always #5 clk = ~clk;

  initial begin
    repeat (NUM_FAULTS * 50 + 10000) @(posedge clk);
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

  // step sequence of a block: kind, round and output state of each of the 40
  typedef struct { step_e st; int rnd; logic [127:0] out; } trace_t;

  function automatic void trace_enc(input rkeys_t k, input logic [127:0] p, ref trace_t tr [40]);
    logic [127:0] s = p ^ k[0];
    int i = 0;
    tr[i++] = '{STEP_ARK, 0, s};
    for (int r = 1; r <= 10; r++) begin
      s = sub_bytes(s, 0);   tr[i++] = '{STEP_SUB, r, s};
      s = shift_rows(s, 0);  tr[i++] = '{STEP_SHIFT, r, s};
      if (r != 10) begin
        s = mix_columns(s, 0); tr[i++] = '{STEP_MIX, r, s};
      end
      s ^= k[r];             tr[i++] = '{STEP_ARK, r, s};
    end
  endfunction

  function automatic void trace_dec(input rkeys_t k, input logic [127:0] c, ref trace_t tr [40]);
    logic [127:0] s = c ^ k[10];
    int i = 0;
    tr[i++] = '{STEP_ARK, 10, s};
    for (int r = 10; r >= 1; r--) begin
      if (r != 10) begin
        s = mix_columns(s, 1); tr[i++] = '{STEP_MIX, r, s};
      end
      s = shift_rows(s, 1);  tr[i++] = '{STEP_SHIFT, r, s};
      s = sub_bytes(s, 1);   tr[i++] = '{STEP_SUB, r, s};
      s ^= k[r - 1];         tr[i++] = '{STEP_ARK, r - 1, s};
    end
  endfunction

  initial begin
    rkeys_t rk;
    trace_t tr [40];
    logic [127:0] p, c, mask;
    int side, idx, byte_n, nbits, f0 [NCFG], d0 [NCFG];
    init();
    foreach (enc_inj[g]) begin
      enc_inj[g] = '0; dec_inj[g] = '0; flagged[g] = 0; enc_dones[g] = 0; dec_dones[g] = 0;
    end
    excited = '{default: 0};
    covered = '{default: 0};
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int f = 0; f < NUM_FAULTS; f++) begin
      if (f % 1000 == 0) begin
        key = rand128();
        rk = expand(key);
        @(negedge clk) key_load = 1;
        @(negedge clk) key_load = 0;
        while (!key_ready[0] || !key_ready[1]) @(negedge clk);
      end
      p = rand128();
      c = encrypt(key, p);
      side = $urandom_range(0, 1);
      if (side == 0) trace_enc(rk, p, tr);
      else           trace_dec(rk, c, tr);
      // draw a stuck-at pattern until it changes the byte
      do begin
        logic [7:0] sel, val, good;
        idx = $urandom_range(0, 39);
        byte_n = $urandom_range(0, 15);
        nbits = $urandom_range(1, 8);
        sel = '0;
        while ($countones(sel) < nbits) sel[$urandom_range(0, 7)] = 1'b1;
        val = 8'($urandom);
        good = gb(tr[idx].out, byte_n);
        mask = '0;
        mask[127 - 8*byte_n -: 8] = ((good & ~sel) | (val & sel)) ^ good;
      end while (mask == '0);
      excited[side][tr[idx].st]++;
      for (int g = 0; g < NCFG; g++) begin
        fault_inj_t fi;
        fi.en = 1'b1; fi.step = tr[idx].st; fi.round = 4'(tr[idx].rnd); fi.mask = state_t'(mask);
        if (side == 0) enc_inj[g] = fi; else dec_inj[g] = fi;
        f0[g] = flagged[g];
        d0[g] = side == 0 ? enc_dones[g] : dec_dones[g];
      end

      if (side == 0) begin
        pt_in = p;
        @(negedge clk) enc_start = 1;
        @(negedge clk) enc_start = 0;
        while (enc_dones[0] == d0[0] || enc_dones[1] == d0[1]) @(negedge clk);
        for (int g = 0; g < NCFG; g++) begin
          bit hit;
          hit = flagged[g] != f0[g];
          covered[g][0][tr[idx].st] += int'(hit);
          check(hit == (128'(enc_ct[g]) == c), "covered faults repaired, others visible (enc)");
          enc_inj[g].en = 1'b0;
        end
      end else begin
        ct_in = c; par_in = parity16(c);
        @(negedge clk) dec_start = 1;
        @(negedge clk) dec_start = 0;
        while (dec_dones[0] == d0[0] || dec_dones[1] == d0[1]) @(negedge clk);
        for (int g = 0; g < NCFG; g++) begin
          bit hit;
          hit = flagged[g] != f0[g];
          covered[g][1][tr[idx].st] += int'(hit);
          check(hit == (128'(dec_pt[g]) == p), "covered faults repaired, others visible (dec)");
          dec_inj[g].en = 1'b0;
        end
      end
    end

    for (int g = 0; g < NCFG; g++) begin
      int tot_e, tot_c;
      tot_e = 0; tot_c = 0;
      $display("S-box check of %0d bit(s):", g == 0 ? 1 : 8);
      for (int s = 0; s < 2; s++)
        for (int k = 0; k < 4; k++) begin
          step_e st_k;
          st_k = step_e'(k);
          tot_e += excited[s][k]; tot_c += covered[g][s][k];
          $display("  %s %-10s %6d of %6d excited faults detected (%0.2f%%)", s == 0 ? "enc" : "dec",
                   st_k.name(), covered[g][s][k], excited[s][k],
                   100.0 * covered[g][s][k] / (excited[s][k] > 0 ? excited[s][k] : 1));
        end
      $display("  overall %0d of %0d (%0.2f%%)", tot_c, tot_e, 100.0 * tot_c / tot_e);
    end
    // the 8-bit S-box check misses only faults on a zero S-box input byte
    for (int s = 0; s < 2; s++) begin
      check(covered[1][s][STEP_SUB] >= covered[0][s][STEP_SUB], "8-bit check covers at least the 1-bit");
      check(covered[1][s][STEP_SUB] * 100 >= excited[s][STEP_SUB] * 98, "8-bit S-box check above 98%");
      check(covered[0][s][STEP_SUB] * 100 >= excited[s][STEP_SUB] * 40, "1-bit S-box check near 50%");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
