// aes_enc_core: iterative AES-128 encryption that checks every step as it goes.
//
// One transformation is applied per clock cycle to a single 128-bit state
// register: the initial AddRoundKey, then for rounds 1..9 SubBytes, ShiftRows,
// MixColumns and AddRoundKey, and for round 10 SubBytes, ShiftRows and
// AddRoundKey. SubBytes is checked by the 16 level-1 comparators of
// sub_bytes_l1, every other step by the level-2 comparator (byte-parity
// prediction). The state register only takes a step's result when its check
// passes; otherwise the register still holds the step's input and the step is
// recomputed in the next cycle. A step that fails MAX_RETRY times in a row ends
// the block with fault = 1 (a permanent fault).
//
// Interface: a pulse on start with pt valid begins a block (ignored while busy).
// The core reads round key rk_idx from the key store combinationally via rk.
// done pulses for one cycle when ct and ct_par are final; ct_par is the
// predicted byte parity of the ciphertext, sent to the receiver with it.
// Without faults a block takes 40 cycles from start to done; each repeated step
// adds one. l1_err/l2_err show the check flags of the current cycle.
// inj (test input) XORs a mask onto the output of a chosen step and round.
// Reset is active low and synchronous.
//
// The step order, the level-1/level-2 split and repeating a failed step follow
// the scheme. One step per cycle, the retry limit, the handshake and sending
// byte parities as the check data are this design's own choices.
module aes_enc_core
  import aes_pkg::*;
#(
  parameter int unsigned CHECK_BITS = 1,
  parameter int unsigned MAX_RETRY  = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  state_t     pt,
  output logic [3:0] rk_idx,
  input  state_t     rk,
  input  fault_inj_t inj,
  output logic       busy,
  output logic       done,
  output logic       fault,
  output state_t     ct,
  output flags_t     ct_par,
  output flags_t     l1_err,
  output flags_t     l2_err
);
  state_t     st;
  step_e      step;
  logic [3:0] round;
  logic [$clog2(MAX_RETRY+1)-1:0] tries;

  state_t sb_out, lin_out, step_out, mask;
  flags_t sb_err, l2_flags, pred_par;
  logic   step_err;

  assign mask = (inj.en && inj.step == step && inj.round == round) ? inj.mask : '0;

  sub_bytes_l1 #(.INVERSE(1'b0), .CHECK_BITS(CHECK_BITS)) u_sub (
    .din(st), .inj_mask(mask), .dout(sb_out), .err(sb_err));

  always_comb begin
    unique case (step)
      STEP_SHIFT: lin_out = shift_rows(st);
      STEP_MIX:   lin_out = mix_columns(st);
      default:    lin_out = st ^ rk;
    endcase
    step_out = (step == STEP_SUB) ? sb_out : (lin_out ^ mask);
  end

  level2_checker #(.INVERSE(1'b0)) u_l2 (
    .step(step), .din(st), .dout(step_out), .rk(rk),
    .pred_par(pred_par), .err(l2_flags));

  assign l1_err   = busy && step == STEP_SUB ? sb_err : '0;
  assign l2_err   = busy && step != STEP_SUB ? l2_flags : '0;
  assign step_err = |(l1_err | l2_err);
  assign rk_idx   = round;
  assign ct       = st;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st     <= '0;
      step   <= STEP_ARK;
      round  <= '0;
      tries  <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
      fault  <= 1'b0;
      ct_par <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          st    <= pt;
          step  <= STEP_ARK;
          round <= '0;
          tries <= '0;
          busy  <= 1'b1;
          fault <= 1'b0;
        end
      end else if (step_err) begin
        // keep the step's input and compute the step again
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
            if (round == 4'(NR)) begin
              busy   <= 1'b0;
              done   <= 1'b1;
              ct_par <= pred_par;
            end else begin
              round <= round + 4'd1;
              step  <= STEP_SUB;
            end
          end
          STEP_SUB:   step <= STEP_SHIFT;
          STEP_SHIFT: step <= (round == 4'(NR)) ? STEP_ARK : STEP_MIX;
          STEP_MIX:   step <= STEP_ARK;
        endcase
      end
    end
  end

  // a block never runs past the last round
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> round <= 4'(NR));
endmodule
