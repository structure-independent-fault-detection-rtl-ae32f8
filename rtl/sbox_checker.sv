// sbox_checker: the level-1 comparator, a structure-independent check of one
// S-box from its input and output alone.
//
// For an S-box pair (s, s') the inverse affine map gives X = M*s' + m, which is
// the multiplicative inverse of s (and 0 for s = 0). Hence the GF(2^8) product
// s*X is 1 when s is nonzero and 0 when s is zero. Bit 0 of that product,
// P(Ms'+m), must equal u = s0 | s1 | ... | s7, and the error bit is
// e = P(Ms'+m) xor u. Bit 0 of s*X is a bilinear form of the bits of s and X,
// so this is a handful of AND/XOR gates once the unused product bits are
// trimmed.
//
// The same relation checks an inverse S-box: its output plays s and its input
// plays s'.
//
// CHECK_BITS widens the check to the low CHECK_BITS bits of s*X, which must
// equal {0,...,0,u}. The default of 1 is the single error bit of the scheme;
// with 8 every corrupted s' is caught unless s = 0. Purely combinational.
//
// The relation and the single error bit per S-box follow the fault-detection
// scheme; the wider CHECK_BITS option is this design's addition.
module sbox_checker
  import aes_pkg::*;
#(
  parameter int unsigned CHECK_BITS = 1   // 1..8
) (
  input  byte_t s,        // S-box input (inverse S-box: its output)
  input  byte_t s_out,    // S-box output s' (inverse S-box: its input)
  output logic  err       // error indication bit e
);
  localparam byte_t CHECK_MASK = byte_t'((9'h1 << CHECK_BITS) - 9'h1);

  byte_t x;      // M*s' + m
  byte_t prod;   // s * x
  logic  u;

  always_comb begin
    x    = inv_affine(s_out);
    prod = gmul(s, x);
    u    = |s;
    err  = |((prod ^ {7'b0, u}) & CHECK_MASK);
  end

  initial assert (CHECK_BITS >= 1 && CHECK_BITS <= 8)
    else $error("CHECK_BITS must be 1..8");
endmodule
