// aes_sbox: one AES S-box, s' = A * s^-1 + 0x63, as a 256-entry lookup table.
//
// The fault-detection scheme of this design does not depend on how the S-box is
// built; it only looks at the S-box's input and output. A lookup table is used
// here because it is the form whose internal multiplicative inverse is not
// accessible, which is the case the scheme is meant for. The table is computed
// at elaboration (aes_pkg::gen_sbox). Purely combinational.
//
// The S-box is the standard AES one; building it as a table is this design's
// choice.
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t din,    // s
  output byte_t dout    // s'
);
  localparam sbox_table_t TABLE = gen_sbox();
  assign dout = TABLE[din];
endmodule
