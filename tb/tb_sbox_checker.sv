// tb_sbox_checker: exhaustive test of the level-1 comparator.
// For every input s and every error pattern e (s' = S(s) ^ e) the expected error
// bit is computed independently: X is the GF inverse of the reference inverse
// S-box of s', and the check fails when the low CHECK_BITS bits of s*X differ
// from {0..0, s != 0}. Both the 1-bit default and the 8-bit check are tested.
// With e = 0 neither may fire; the detection rates of single-bit and of all
// errors are printed.
module tb_sbox_checker;
  import tb_ref_pkg::*;
  logic [7:0] s, s_out;
  logic err1, err8;
  int checks = 0, failures = 0;
  int det1_single = 0, det8_single = 0, det1_all = 0, det8_all = 0;
  logic [7:0] GINV [256];

  sbox_checker #(.CHECK_BITS(1)) dut1 (.s, .s_out, .err(err1));
  sbox_checker #(.CHECK_BITS(8)) dut8 (.s, .s_out, .err(err8));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init();
    for (int i = 0; i < 256; i++) GINV[i] = rinv(8'(i));
    for (int i = 0; i < 256; i++)
      for (int e = 0; e < 256; e++) begin
        logic [7:0] x, p;
        logic exp1, exp8;
        s = 8'(i);
        s_out = SBOX[i] ^ 8'(e);
        x = GINV[ISBOX[s_out]];
        p = rmul(s, x) ^ {7'b0, s != 0};
        exp1 = p[0];
        exp8 = |p;
        #1;
        checks += 2;
        if (err1 !== exp1 || err8 !== exp8) begin
          failures++;
          if (failures < 10)
            $display("FAIL s=%02h s'=%02h err1=%b/%b err8=%b/%b", s, s_out, err1, exp1, err8, exp8);
        end
        if (e != 0) begin
          det1_all += int'(err1);
          det8_all += int'(err8);
          if ($countones(e) == 1) begin
            det1_single += int'(err1);
            det8_single += int'(err8);
          end
        end
      end
    // the correct pairs must never fire, and the 8-bit check must catch every
    // single-bit error on a nonzero input (only s = 0 escapes)
    checks++;
    if (det8_single != 255 * 8) begin
      failures++;
      $display("FAIL 8-bit check caught %0d of %0d single-bit errors", det8_single, 255 * 8);
    end
    $display("1-bit check: %0d/2048 single-bit, %0d/65280 all error patterns detected",
             det1_single, det1_all);
    $display("8-bit check: %0d/2048 single-bit, %0d/65280 all error patterns detected",
             det8_single, det8_all);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
