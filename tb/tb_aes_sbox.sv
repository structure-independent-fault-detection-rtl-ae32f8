// tb_aes_sbox: checks all 256 entries of aes_sbox against the reference S-box
// (exhaustive GF inverse plus the affine bit equation) and against FIPS-197
// sample entries.
module tb_aes_sbox;
  import tb_ref_pkg::*;
  logic [7:0] din, dout;
  int checks = 0, failures = 0;
  aes_sbox dut (.din, .dout);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  initial begin
    init();
    for (int i = 0; i < 256; i++) begin
      din = 8'(i); #1;
      expect_eq(dout, SBOX[i], $sformatf("S(%02h)", i));
    end
    din = 8'h00; #1; expect_eq(dout, 8'h63, "S(00)");
    din = 8'h53; #1; expect_eq(dout, 8'hed, "S(53)");
    din = 8'hff; #1; expect_eq(dout, 8'h16, "S(ff)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
