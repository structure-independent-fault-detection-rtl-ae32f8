// sub_bytes_l1: SubBytes (or InvSubBytes) with a level-1 comparator on every one
// of its 16 S-boxes.
//
// Each byte of din goes through an S-box (INVERSE = 0) or an inverse S-box
// (INVERSE = 1). inj_mask, a test input for fault injection, is XORed onto the
// S-box outputs, so a nonzero mask models a faulty S-box. Each sbox_checker sees
// only the input and the (possibly faulty) output of its S-box and raises
// err[n] for byte n. Purely combinational; the enclosing core decides what to do
// with a flagged result.
//
// One comparator per S-box follows the scheme; the injection input is this
// design's own, for testing.
module sub_bytes_l1
  import aes_pkg::*;
#(
  parameter bit          INVERSE    = 1'b0,
  parameter int unsigned CHECK_BITS = 1
) (
  input  state_t din,
  input  state_t inj_mask,
  output state_t dout,
  output flags_t err
);
  for (genvar n = 0; n < 16; n++) begin : g_byte
    byte_t sb;
    if (INVERSE) begin : g_inv
      aes_inv_sbox u_sbox (.din(din[n]), .dout(sb));
    end else begin : g_fwd
      aes_sbox u_sbox (.din(din[n]), .dout(sb));
    end
    assign dout[n] = sb ^ inj_mask[n];
    if (INVERSE) begin : g_chk_inv
      // inverse S-box: input is s', output is s
      sbox_checker #(.CHECK_BITS(CHECK_BITS)) u_chk (
        .s(dout[n]), .s_out(din[n]), .err(err[n]));
    end else begin : g_chk_fwd
      sbox_checker #(.CHECK_BITS(CHECK_BITS)) u_chk (
        .s(din[n]), .s_out(dout[n]), .err(err[n]));
    end
  end
endmodule
