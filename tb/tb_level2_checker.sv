// tb_level2_checker: checks the level-2 comparator on every linear step of
// encryption and decryption. The step output is computed with the reference
// model; a correct output must raise no flag and give the true output parity,
// and a single flipped output bit in byte n must raise flag n alone. A two-bit
// error inside one byte keeps its parity and must pass unnoticed, which pins
// down that the check is a byte parity.
module tb_level2_checker;
  import tb_ref_pkg::*;
  import aes_pkg::step_e, aes_pkg::STEP_ARK, aes_pkg::STEP_SHIFT, aes_pkg::STEP_MIX;
  step_e step;
  logic [127:0] din, dout, rk;
  logic [15:0] pf, ef, pi, ei;
  logic [127:0] out_f, out_i;
  int checks = 0, failures = 0;

  level2_checker #(.INVERSE(1'b0)) dut_f (.step, .din, .dout(out_f), .rk, .pred_par(pf), .err(ef));
  level2_checker #(.INVERSE(1'b1)) dut_i (.step, .din, .dout(out_i), .rk, .pred_par(pi), .err(ei));

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

  function automatic logic [127:0] ref_step(input step_e st, input logic [127:0] s,
                                            input logic [127:0] k, input bit inv);
    case (st)
      STEP_SHIFT: return shift_rows(s, inv);
      STEP_MIX:   return mix_columns(s, inv);
      default:    return s ^ k;
    endcase
  endfunction

  initial begin
    step_e steps [3] = '{STEP_ARK, STEP_SHIFT, STEP_MIX};
    for (int t = 0; t < 200; t++)
      foreach (steps[k]) begin
        logic [127:0] gf, gi;
        step = steps[k]; din = rand128(); rk = rand128();
        gf = ref_step(step, din, rk, 0);
        gi = ref_step(step, din, rk, 1);
        out_f = gf; out_i = gi; #1;
        check(ef == 0 && pf == parity16(gf), $sformatf("fwd %s clean", step.name()));
        check(ei == 0 && pi == parity16(gi), $sformatf("inv %s clean", step.name()));
        for (int n = 0; n < 16; n++) begin
          int b;
          logic [15:0] expf;
          b = $urandom_range(0, 7);
          expf = 16'h0;
          expf[15 - n] = 1'b1;
          out_f = gf; out_f[127 - 8*n - b] ^= 1'b1;
          out_i = gi; out_i[127 - 8*n - b] ^= 1'b1; #1;
          check(ef == expf && ei == expf, $sformatf("%s single-bit byte %0d", step.name(), n));
          out_f[127 - 8*n - ((b + 1) % 8)] ^= 1'b1;
          out_i[127 - 8*n - ((b + 1) % 8)] ^= 1'b1; #1;
          check(ef == 0 && ei == 0, $sformatf("%s two-bit byte %0d", step.name(), n));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
