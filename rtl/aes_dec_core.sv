// aes_dec_core: iterative AES-128 decryption that checks every step as it goes.
//
// On start the received ciphertext ct is checked against the parity bits ct_par
// that the sender computed; a mismatch ends the block at once with fault = 1.
// Otherwise one transformation is applied per clock cycle in the order of the
// standard inverse cipher: AddRoundKey with round key 10, then for round keys
// 9..1 InvShiftRows, InvSubBytes, AddRoundKey and InvMixColumns, and finally
// InvShiftRows, InvSubBytes and AddRoundKey with round key 0. InvSubBytes is
// checked by level-1 comparators (the same relation as for the S-box, with input
// and output swapped), the other steps by the level-2 comparator. A step whose
// check fails is recomputed from its input, held in the state register; after
// MAX_RETRY failures in a row the block ends with fault = 1, the "fault
// detected" indication.
//
// Interface and timing as aes_enc_core: start (with ct, ct_par), round key read
// port rk_idx/rk, done for one cycle with pt final, 40 cycles per block without
// faults, one more per repeated step, 1 cycle when the received parity fails.
// round in inj counts down with the round key index (10..0). The level-2
// comparator's predicted output parity is not used on this side (only its
// error flags are), so that output is left unconnected in effect.
// Reset is active low and synchronous.
//
// The step order, the checks and repeating a failed step follow the scheme.
// Checking the received parity bits first, the retry limit, the timing and the
// handshake are this design's own choices.
module aes_dec_core
  import aes_pkg::*;
#(
  parameter int unsigned CHECK_BITS = 1,
  parameter int unsigned MAX_RETRY  = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  state_t     ct,
  input  flags_t     ct_par,
  output logic [3:0] rk_idx,
  input  state_t     rk,
  input  fault_inj_t inj,
  output logic       busy,
  output logic       done,
  output logic       fault,
  output state_t     pt,
  output flags_t     l1_err,
  output flags_t     l2_err
);
  state_t     st;
  step_e      step;
  logic [3:0] round;
  logic [$clog2(MAX_RETRY+1)-1:0] tries;

  state_t sb_out, lin_out, step_out, mask;
  flags_t sb_err, l2_flags, pred_par;
  logic   step_err, rx_bad;

  assign mask = (inj.en && inj.step == step && inj.round == round) ? inj.mask : '0;

  sub_bytes_l1 #(.INVERSE(1'b1), .CHECK_BITS(CHECK_BITS)) u_sub (
    .din(st), .inj_mask(mask), .dout(sb_out), .err(sb_err));

  always_comb begin
    unique case (step)
      STEP_SHIFT: lin_out = inv_shift_rows(st);
      STEP_MIX:   lin_out = inv_mix_columns(st);
      default:    lin_out = st ^ rk;
    endcase
    step_out = (step == STEP_SUB) ? sb_out : (lin_out ^ mask);
  end

  level2_checker #(.INVERSE(1'b1)) u_l2 (
    .step(step), .din(st), .dout(step_out), .rk(rk),
    .pred_par(pred_par), .err(l2_flags));

  assign rx_bad   = byte_parity(ct) != ct_par;
  assign l1_err   = busy && step == STEP_SUB ? sb_err : '0;
  assign l2_err   = busy && step != STEP_SUB ? l2_flags : '0;
  assign step_err = |(l1_err | l2_err);
  assign rk_idx   = round;
  assign pt       = st;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st    <= '0;
      step  <= STEP_ARK;
      round <= 4'(NR);
      tries <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      fault <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          st    <= ct;
          step  <= STEP_ARK;
          round <= 4'(NR);
          tries <= '0;
          fault <= rx_bad;
          busy  <= !rx_bad;
          done  <= rx_bad;
        end
      end else if (step_err) begin
        tries <= tries + 1'b1;
        if (int'(tries) == MAX_RETRY - 1) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          fault <= 1'b1;
        end
      end else begin
        st    <= step_out;
        tries <= '0;
        unique case (step)
          STEP_ARK: begin
            if (round == 4'd0) begin
              busy <= 1'b0;
              done <= 1'b1;
            end else if (round == 4'(NR)) begin
              step <= STEP_SHIFT;
            end else begin
              step <= STEP_MIX;
            end
          end
          STEP_MIX:   step <= STEP_SHIFT;
          STEP_SHIFT: step <= STEP_SUB;
          STEP_SUB: begin
            step  <= STEP_ARK;
            round <= round - 4'd1;
          end
        endcase
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) busy |-> round <= 4'(NR));
endmodule
