// key_expansion: AES-128 key expander with level-1 checks on its S-boxes.
//
// A pulse on key_load captures the cipher key as round key 0 (w[0..3]). One
// round key (four words) is then produced per cycle: the last word of the
// previous round key is rotated, passed through four S-boxes (SubWord) and
// XORed with the round constant, and the four new words follow by the usual
// chain of XORs. The four S-boxes are checked by level-1 comparators; when one
// flags, the round key is not stored and is recomputed on the next cycle. After
// MAX_RETRY consecutive failed attempts expansion stops with fault = 1.
// Without faults ready rises 10 cycles after key_load.
//
// The 11 round keys are kept in registers and read through two independent
// ports, one for the encryption core and one for the decryption core.
// inj_en/inj_mask XOR a fault onto the SubWord output (test input).
// Reset is active low and synchronous to clk.
//
// Checking the key expander's S-boxes follows the scheme. Storing all round
// keys, the one-key-per-cycle timing and the retry limit are this design's own.
module key_expansion
  import aes_pkg::*;
#(
  parameter int unsigned CHECK_BITS = 1,
  parameter int unsigned MAX_RETRY  = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        key_load,
  input  state_t      key,
  input  logic        inj_en,
  input  logic [31:0] inj_mask,
  output logic        ready,
  output logic        fault,
  output logic [3:0]  l1_err,      // level-1 flags of SubWord this cycle
  input  logic [3:0]  enc_idx,
  output state_t      enc_rk,
  input  logic [3:0]  dec_idx,
  output state_t      dec_rk
);
  state_t     rk [0:NR];
  logic [3:0] idx;                 // round key being computed, 1..10
  logic       busy;
  byte_t      rcon;
  logic [$clog2(MAX_RETRY+1)-1:0] tries;

  state_t prev, next;
  byte_t  rot [4];
  byte_t  sub [4];

  assign prev = rk[idx - 4'd1];

  for (genvar i = 0; i < 4; i++) begin : g_sub
    byte_t sb;
    assign rot[i] = prev[12 + (i + 1) % 4];     // RotWord of w[4i-1]
    aes_sbox u_sbox (.din(rot[i]), .dout(sb));
    assign sub[i] = sb ^ (inj_en ? inj_mask[31 - 8*i -: 8] : 8'h00);
    sbox_checker #(.CHECK_BITS(CHECK_BITS)) u_chk (
      .s(rot[i]), .s_out(sub[i]), .err(l1_err[i]));
  end

  always_comb begin
    byte_t t [4];
    for (int i = 0; i < 4; i++) t[i] = sub[i];
    t[0] ^= rcon;
    for (int i = 0; i < 4; i++) next[i] = prev[i] ^ t[i];
    for (int w = 1; w < 4; w++)
      for (int i = 0; i < 4; i++) next[4*w + i] = prev[4*w + i] ^ next[4*(w-1) + i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      ready <= 1'b0;
      fault <= 1'b0;
      idx   <= 4'd1;
      rcon  <= 8'h01;
      tries <= '0;
      for (int r = 0; r <= NR; r++) rk[r] <= '0;
    end else if (key_load) begin
      rk[0] <= key;
      busy  <= 1'b1;
      ready <= 1'b0;
      fault <= 1'b0;
      idx   <= 4'd1;
      rcon  <= 8'h01;
      tries <= '0;
    end else if (busy) begin
      if (|l1_err) begin
        if (int'(tries) == MAX_RETRY - 1) begin
          busy  <= 1'b0;
          fault <= 1'b1;
        end
        tries <= tries + 1'b1;
      end else begin
        rk[idx] <= next;
        tries   <= '0;
        rcon    <= xtime(rcon);
        idx     <= idx + 4'd1;
        if (idx == 4'(NR)) begin
          busy  <= 1'b0;
          ready <= 1'b1;
        end
      end
    end
  end

  assign enc_rk = rk[enc_idx];
  assign dec_rk = rk[dec_idx];
endmodule
