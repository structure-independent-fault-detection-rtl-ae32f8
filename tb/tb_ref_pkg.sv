// tb_ref_pkg: reference AES-128 model for the testbenches, written separately
// from the RTL package. The field multiply is a shift-and-reduce on 16 bits, the
// inverse is found by exhaustive search, the S-box affine map is written as its
// bit equation, and the state is a plain 128-bit vector with byte n at bits
// [127-8n -: 8] (FIPS-197 order).
package tb_ref_pkg;

  function automatic logic [7:0] rmul(input logic [7:0] a, input logic [7:0] b);
    logic [15:0] p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11b << (i - 8);
    return p[7:0];
  endfunction

  function automatic logic [7:0] rinv(input logic [7:0] a);
    for (int x = 1; x < 256; x++) if (rmul(a, 8'(x)) == 8'h01) return 8'(x);
    return 8'h00;
  endfunction

  // b'_i = b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ c_i  (FIPS-197 eq. 5.1)
  function automatic logic [7:0] rsbox_calc(input logic [7:0] a);
    logic [7:0] b = rinv(a), o;
    for (int i = 0; i < 8; i++)
      o[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8] ^ 8'h63 >> i;
    return o;
  endfunction

  logic [7:0] SBOX [256];
  logic [7:0] ISBOX [256];
  bit         ready = 0;

  function automatic void init();
    if (ready) return;
    for (int i = 0; i < 256; i++) begin
      SBOX[i] = rsbox_calc(8'(i));
      ISBOX[SBOX[i]] = 8'(i);
    end
    ready = 1;
  endfunction

  function automatic logic [7:0] gb(input logic [127:0] s, input int n);
    return s[127 - 8*n -: 8];
  endfunction

  function automatic logic [127:0] sub_bytes(input logic [127:0] s, input bit inv);
    logic [127:0] o;
    for (int n = 0; n < 16; n++) o[127 - 8*n -: 8] = inv ? ISBOX[gb(s, n)] : SBOX[gb(s, n)];
    return o;
  endfunction

  function automatic logic [127:0] shift_rows(input logic [127:0] s, input bit inv);
    logic [127:0] o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        if (!inv) o[127 - 8*(r + 4*c) -: 8] = gb(s, r + 4*((c + r) & 3));
        else      o[127 - 8*(r + 4*((c + r) & 3)) -: 8] = gb(s, r + 4*c);
    return o;
  endfunction

  function automatic logic [127:0] mix_columns(input logic [127:0] s, input bit inv);
    logic [127:0] o;
    logic [7:0] k [4];
    k = inv ? '{8'h0e, 8'h0b, 8'h0d, 8'h09} : '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        logic [7:0] acc = '0;
        for (int j = 0; j < 4; j++) acc ^= rmul(k[j], gb(s, (r + j) % 4 + 4*c));
        o[127 - 8*(r + 4*c) -: 8] = acc;
      end
    return o;
  endfunction

  typedef logic [127:0] rkeys_t [11];

  function automatic rkeys_t expand(input logic [127:0] key);
    logic [31:0] w [44];
    logic [7:0]  rc = 8'h01;
    rkeys_t k;
    init();
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {SBOX[t[31:24]], SBOX[t[23:16]], SBOX[t[15:8]], SBOX[t[7:0]]} ^ {rc, 24'h0};
        rc = rmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) k[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return k;
  endfunction

  function automatic logic [127:0] encrypt(input logic [127:0] key, input logic [127:0] pt);
    rkeys_t k = expand(key);
    logic [127:0] s = pt ^ k[0];
    for (int r = 1; r <= 10; r++) begin
      s = shift_rows(sub_bytes(s, 0), 0);
      if (r != 10) s = mix_columns(s, 0);
      s ^= k[r];
    end
    return s;
  endfunction

  function automatic logic [127:0] decrypt(input logic [127:0] key, input logic [127:0] ct);
    rkeys_t k = expand(key);
    logic [127:0] s = ct ^ k[10];
    for (int r = 9; r >= 0; r--) begin
      s = sub_bytes(shift_rows(s, 1), 1) ^ k[r];
      if (r != 0) s = mix_columns(s, 1);
    end
    return s;
  endfunction

  function automatic logic [15:0] parity16(input logic [127:0] s);
    logic [15:0] p;
    for (int n = 0; n < 16; n++) p[15 - n] = ^gb(s, n);
    return p;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
