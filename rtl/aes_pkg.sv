// aes_pkg: types, constants and functions shared by the fault-detecting AES-128
// encryption and decryption datapaths.
//
// The 128-bit AES state is held as sixteen bytes in FIPS-197 order: byte n is
// row (n % 4), column (n / 4), and byte 0 sits in the most significant bits of
// a 128-bit vector. GF(2^8) arithmetic uses the AES polynomial
// x^8 + x^4 + x^3 + x + 1.
//
// Besides the plain AES transformations the package holds what the two fault
// checkers need:
//   * the inverse affine map M*y + m that the level-1 (S-box) comparator applies
//     to an S-box output to recover the multiplicative inverse of its input;
//   * byte-parity predictors for ShiftRows, MixColumns, AddRoundKey and their
//     inverses, used by the level-2 comparator. The MixColumns predictors use
//     per-constant parity masks (parity(c*a) is a linear function of the bits of
//     a), so they share no logic with the GF multipliers of the datapath.
//
// The state and flag types use ascending ranges ([0:15]) on purpose, so that
// the index of a byte or flag is its FIPS-197 byte number; lint tools note the
// ascending range, which is intended.
//
// The S-box tables are computed at elaboration from the GF inverse (a^254) and
// the affine map, so no table file is read.
//
// The AES arithmetic follows FIPS-197; the parity predictors serve this
// design's choice of level-2 check.
package aes_pkg;

  typedef logic [7:0]        byte_t;
  typedef logic [0:15][7:0]  state_t;   // element 0 = bits 127:120
  typedef logic [0:15]       flags_t;   // one flag per state byte
  typedef byte_t             sbox_table_t [256];

  // The transformation a core performs in a cycle. In the decryption core the
  // same codes stand for the inverse transformations.
  typedef enum logic [1:0] {
    STEP_ARK   = 2'd0,   // AddRoundKey
    STEP_SUB   = 2'd1,   // SubBytes / InvSubBytes
    STEP_SHIFT = 2'd2,   // ShiftRows / InvShiftRows
    STEP_MIX   = 2'd3    // MixColumns / InvMixColumns
  } step_e;

  // Fault injection into one step of one round: mask is XORed onto the output
  // of that step while en is high. For SubBytes the mask is applied to the
  // S-box outputs ahead of the level-1 comparators.
  typedef struct packed {
    logic       en;
    step_e      step;
    logic [3:0] round;
    state_t     mask;
  } fault_inj_t;

  localparam int unsigned NR = 10;            // rounds of AES-128
  localparam byte_t       AFFINE_C     = 8'h63;
  localparam byte_t       INV_AFFINE_C = 8'h05;  // m in M*s' + m

  // ---------------------------------------------------------------- GF(2^8)
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t gmul(input byte_t a, input byte_t b);
    byte_t p = '0;
    byte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  // a^254 = a^-1 for a != 0, and 0 for a = 0
  function automatic byte_t ginv(input byte_t a);
    byte_t r = 8'h01;
    byte_t sq = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gmul(r, sq);   // 254 = 0b11111110
      sq = gmul(sq, sq);
    end
    return r;
  endfunction

  function automatic byte_t rotl8(input byte_t a, input int n);
    return byte_t'((a << n) | (a >> (8 - n)));
  endfunction

  function automatic byte_t affine(input byte_t x);
    return x ^ rotl8(x, 1) ^ rotl8(x, 2) ^ rotl8(x, 3) ^ rotl8(x, 4) ^ AFFINE_C;
  endfunction

  // M*y + m: the inverse of the affine map
  function automatic byte_t inv_affine(input byte_t y);
    return rotl8(y, 1) ^ rotl8(y, 3) ^ rotl8(y, 6) ^ INV_AFFINE_C;
  endfunction

  function automatic sbox_table_t gen_sbox();
    sbox_table_t t;
    for (int i = 0; i < 256; i++) t[i] = affine(ginv(byte_t'(i)));
    return t;
  endfunction

  function automatic sbox_table_t gen_inv_sbox();
    sbox_table_t t;
    for (int i = 0; i < 256; i++) t[i] = ginv(inv_affine(byte_t'(i)));
    return t;
  endfunction

  // ------------------------------------------------------- transformations
  function automatic state_t shift_rows(input state_t s);
    state_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[r + 4*c] = s[r + 4*((c + r) % 4)];
    return o;
  endfunction

  function automatic state_t inv_shift_rows(input state_t s);
    state_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[r + 4*((c + r) % 4)] = s[r + 4*c];
    return o;
  endfunction

  function automatic state_t mix_columns(input state_t s);
    state_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[r + 4*c] = gmul(8'h02, s[r + 4*c]) ^ gmul(8'h03, s[(r+1)%4 + 4*c])
                   ^ s[(r+2)%4 + 4*c] ^ s[(r+3)%4 + 4*c];
    return o;
  endfunction

  function automatic state_t inv_mix_columns(input state_t s);
    state_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[r + 4*c] = gmul(8'h0e, s[r + 4*c]) ^ gmul(8'h0b, s[(r+1)%4 + 4*c])
                   ^ gmul(8'h0d, s[(r+2)%4 + 4*c]) ^ gmul(8'h09, s[(r+3)%4 + 4*c]);
    return o;
  endfunction

  // ------------------------------------------------------ parity prediction
  function automatic flags_t byte_parity(input state_t s);
    flags_t p;
    for (int n = 0; n < 16; n++) p[n] = ^s[n];
    return p;
  endfunction

  // Bit j of the mask is parity(c * x^j), so parity(c*a) = ^(a & par_mask(c)).
  function automatic byte_t par_mask(input byte_t c);
    byte_t m;
    for (int j = 0; j < 8; j++) m[j] = ^gmul(c, byte_t'(1 << j));
    return m;
  endfunction

  // parities of the input bytes, moved to where (Inv)ShiftRows moves the bytes
  function automatic flags_t pred_parity_shift(input state_t s, input bit inverse);
    flags_t pin, p;
    pin = byte_parity(s);
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        if (inverse) p[r + 4*((c + r) % 4)] = pin[r + 4*c];
        else         p[r + 4*c] = pin[r + 4*((c + r) % 4)];
    return p;
  endfunction

  function automatic flags_t pred_parity_mix(input state_t s, input bit inverse);
    flags_t p;
    byte_t  k0, k1, k2, k3;
    k0 = par_mask(inverse ? 8'h0e : 8'h02);
    k1 = par_mask(inverse ? 8'h0b : 8'h03);
    k2 = par_mask(inverse ? 8'h0d : 8'h01);
    k3 = par_mask(inverse ? 8'h09 : 8'h01);
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        p[r + 4*c] = ^(s[r + 4*c] & k0) ^ ^(s[(r+1)%4 + 4*c] & k1)
                   ^ ^(s[(r+2)%4 + 4*c] & k2) ^ ^(s[(r+3)%4 + 4*c] & k3);
    return p;
  endfunction

  function automatic flags_t pred_parity_ark(input state_t s, input state_t k);
    return byte_parity(s) ^ byte_parity(k);
  endfunction

endpackage
