// level2_checker: the level-2 comparator for the linear steps of a round.
//
// For ShiftRows, MixColumns and AddRoundKey (their inverses when INVERSE = 1)
// it predicts the parity of every output byte from the step's input and
// compares it with the parity of the step's actual output; err[n] flags byte n.
//   ShiftRows:   byte parities move with their bytes.
//   MixColumns:  parity(c*a) is linear in a, so each output parity is an XOR of
//                masked input bits (aes_pkg::par_mask); no GF multiplier is used.
//   AddRoundKey: parity(out) = parity(in) xor parity(key).
// For STEP_SUB, which the level-1 comparators check, err is 0 and pred_par is
// the actual parity. pred_par is also what the encryption core sends with the
// ciphertext. Purely combinational.
//
// That every linear step is checked follows the scheme; byte-parity prediction
// as the way of checking it is this design's choice.
module level2_checker
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  step_e  step,
  input  state_t din,
  input  state_t dout,
  input  state_t rk,
  output flags_t pred_par,
  output flags_t err
);
  flags_t act_par;

  always_comb begin
    act_par = byte_parity(dout);
    unique case (step)
      STEP_ARK:   pred_par = pred_parity_ark(din, rk);
      STEP_SHIFT: pred_par = pred_parity_shift(din, INVERSE);
      STEP_MIX:   pred_par = pred_parity_mix(din, INVERSE);
      default:    pred_par = act_par;
    endcase
    err = pred_par ^ act_par;
  end
endmodule
