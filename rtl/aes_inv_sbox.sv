// aes_inv_sbox: one AES inverse S-box, s = (M * s' + m)^-1, as a 256-entry
// lookup table computed at elaboration (aes_pkg::gen_inv_sbox). Used by the
// InvSubBytes step of the decryption core. Purely combinational.
//
// The inverse S-box is the standard AES one; building it as a table is this
// design's choice.
module aes_inv_sbox
  import aes_pkg::*;
(
  input  byte_t din,    // s'
  output byte_t dout    // s
);
  localparam sbox_table_t TABLE = gen_inv_sbox();
  assign dout = TABLE[din];
endmodule
