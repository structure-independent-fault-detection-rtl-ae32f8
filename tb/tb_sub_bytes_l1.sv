// tb_sub_bytes_l1: checks SubBytes and InvSubBytes with their 16 level-1
// comparators. Random states must come out as the reference (inverse)
// substitution with no flag raised. Then a random nonzero error is injected
// into one S-box output at a time; the flag of exactly that byte must follow the
// independently computed relation (bit 0 of s*X against s != 0) and no other
// flag may rise.
module tb_sub_bytes_l1;
  import tb_ref_pkg::*;
  logic [127:0] din, mask, dout_f, dout_i;
  logic [15:0]  err_f, err_i;
  int checks = 0, failures = 0, flagged = 0;
  logic [7:0] GINV [256];

  sub_bytes_l1 #(.INVERSE(1'b0)) dut_f (.din, .inj_mask(mask), .dout(dout_f), .err(err_f));
  sub_bytes_l1 #(.INVERSE(1'b1)) dut_i (.din, .inj_mask(mask), .dout(dout_i), .err(err_i));

  initial begin
    #1000000;
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

  // expected flag for an S-box pair (x -> y), y possibly corrupted
  function automatic logic flag(input logic [7:0] x, input logic [7:0] y);
    return rmul(x, GINV[ISBOX[y]])[0] ^ (x != 0);
  endfunction

  initial begin
    init();
    for (int i = 0; i < 256; i++) GINV[i] = rinv(8'(i));
    for (int t = 0; t < 300; t++) begin
      din = rand128(); mask = '0; #1;
      check(dout_f == sub_bytes(din, 0) && err_f == 0, "forward clean");
      check(dout_i == sub_bytes(din, 1) && err_i == 0, "inverse clean");
      for (int n = 0; n < 16; n++) begin
        logic [7:0] e, yf, xi;
        logic [15:0] expf, expi;
        e = 8'($urandom_range(1, 255));
        mask = '0; mask[127 - 8*n -: 8] = e; #1;
        yf = SBOX[gb(din, n)] ^ e;
        xi = ISBOX[gb(din, n)] ^ e;
        expf = '0; expf[15 - n] = flag(gb(din, n), yf);
        expi = '0; expi[15 - n] = flag(xi, gb(din, n));
        flagged += int'(expf[15 - n]) + int'(expi[15 - n]);
        check(dout_f == (sub_bytes(din, 0) ^ mask) && err_f == expf, $sformatf("forward fault byte %0d", n));
        check(dout_i == (sub_bytes(din, 1) ^ mask) && err_i == expi, $sformatf("inverse fault byte %0d", n));
      end
    end
    check(flagged > 0, "some injected faults flagged");
    $display("%0d of %0d injected S-box faults flagged", flagged, 300 * 32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
