// aes_fd_top: sender and receiver of the fault-detecting AES-128 system.
//
// The encryption core (sender side) turns plaintext into ciphertext plus 16
// parity bits; the decryption core (receiver side) checks those parity bits and
// turns the ciphertext back into plaintext. Both check every transformation as
// it happens: level-1 comparators on the S-boxes and inverse S-boxes, a level-2
// comparator on the linear steps, and a failed check makes the step run again.
// One key expander, itself checked on its S-boxes, serves both cores with the
// 11 round keys of the key loaded with key_load.
//
// The two sides have separate ports, so the ciphertext can be carried over any
// channel between them. enc_start and dec_start are ignored until key_ready.
// Each core's l1/l2 flags, busy, done and fault outputs are brought out, as are
// the fault-injection inputs used to exercise the checkers (tie them to zero in
// normal use). Timing: 10 cycles to expand a key, 40 cycles per block on each
// side when no fault occurs. Reset is active low and synchronous.
//
// The sender/receiver split, each side with level-1 and level-2 comparators,
// follows the scheme; the shared key expander and the port list are this
// design's own.
module aes_fd_top
  import aes_pkg::*;
#(
  parameter int unsigned CHECK_BITS = 1,
  parameter int unsigned MAX_RETRY  = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // key
  input  logic        key_load,
  input  state_t      key,
  input  logic        key_inj_en,
  input  logic [31:0] key_inj_mask,
  output logic        key_ready,
  output logic        key_fault,
  output logic [3:0]  key_l1_err,
  // sender
  input  logic        enc_start,
  input  state_t      enc_pt,
  input  fault_inj_t  enc_inj,
  output logic        enc_busy,
  output logic        enc_done,
  output logic        enc_fault,
  output state_t      enc_ct,
  output flags_t      enc_ct_par,
  output flags_t      enc_l1_err,
  output flags_t      enc_l2_err,
  // receiver
  input  logic        dec_start,
  input  state_t      dec_ct,
  input  flags_t      dec_ct_par,
  input  fault_inj_t  dec_inj,
  output logic        dec_busy,
  output logic        dec_done,
  output logic        dec_fault,
  output state_t      dec_pt,
  output flags_t      dec_l1_err,
  output flags_t      dec_l2_err
);
  logic [3:0] enc_idx, dec_idx;
  state_t     enc_rk, dec_rk;

  key_expansion #(.CHECK_BITS(CHECK_BITS), .MAX_RETRY(MAX_RETRY)) u_keys (
    .clk, .rst_n, .key_load, .key,
    .inj_en(key_inj_en), .inj_mask(key_inj_mask),
    .ready(key_ready), .fault(key_fault), .l1_err(key_l1_err),
    .enc_idx, .enc_rk, .dec_idx, .dec_rk);

  aes_enc_core #(.CHECK_BITS(CHECK_BITS), .MAX_RETRY(MAX_RETRY)) u_enc (
    .clk, .rst_n, .start(enc_start && key_ready), .pt(enc_pt),
    .rk_idx(enc_idx), .rk(enc_rk), .inj(enc_inj),
    .busy(enc_busy), .done(enc_done), .fault(enc_fault),
    .ct(enc_ct), .ct_par(enc_ct_par), .l1_err(enc_l1_err), .l2_err(enc_l2_err));

  aes_dec_core #(.CHECK_BITS(CHECK_BITS), .MAX_RETRY(MAX_RETRY)) u_dec (
    .clk, .rst_n, .start(dec_start && key_ready), .ct(dec_ct), .ct_par(dec_ct_par),
    .rk_idx(dec_idx), .rk(dec_rk), .inj(dec_inj),
    .busy(dec_busy), .done(dec_done), .fault(dec_fault),
    .pt(dec_pt), .l1_err(dec_l1_err), .l2_err(dec_l2_err));
endmodule
