# AES-128 with structure-independent concurrent fault detection

An AES-128 encryptor and decryptor that check every transformation while it
runs. Any step whose check fails is computed again. The point of the scheme is
that the S-box check works only from the S-box's input and output. It works the
same whether the S-box is a lookup table, a composite-field circuit or anything
else, because it never looks inside. That matters for table-based S-boxes,
where the multiplicative inverse inside the S-box is not available to a checker.

The design has two sides:

* the **sender** (`aes_enc_core`) encrypts a block and sends the ciphertext
  with 16 parity bits, one per byte;
* the **receiver** (`aes_dec_core`) checks those parity bits against the
  received ciphertext, then decrypts.

A shared **key expander** (`key_expansion`), itself checked, supplies both
sides with the 11 round keys. `aes_fd_top` wires the three together.

## The two kinds of check

### Level 1: the S-box relation

Every AES S-box computes `s' = A·s⁻¹ + 0x63`, where `s⁻¹` is the inverse in
GF(2⁸) (taken as 0 for s = 0) and `A` is the affine matrix. Undo the affine part
of the output and you get the inverse back:

    X = M·s' + m      (M = A⁻¹, m = 0x05; the inverse affine map)

Hence `s·X = 1` when `s ≠ 0`, and `s·X = 0` when `s = 0`. The level-1 comparator
(`sbox_checker`) computes bit 0 of the product `s·X` and compares it with
`u = s₀ | s₁ | … | s₇`. The error bit is

    e = P(M·s' + m) xor u,        P(·) = bit 0 of s·(·)

Bit 0 of a GF(2⁸) product is a bilinear form in the bits of its operands. With
the AES polynomial it is

    P = s0·X0 + s1·X7 + s2·X6 + s3·X5 + s4·X4 + s5·(X3+X7) + s6·(X2+X6+X7) + s7·(X1+X5+X6)

where each `Xj` is the XOR of three bits of `s'` (plus a constant). The checker
is therefore a few dozen gates per S-box. The RTL writes it as a full multiplier
and leaves synthesis to prune it.

The inverse S-box satisfies the same relation with the roles swapped: its
output is `s` and its input is `s'`. The same checker serves InvSubBytes.

**Coverage of one check bit.** A single bit catches only half of all corrupted
S-box outputs. That holds even for single-bit errors: exhaustively, 1024 of
2048. The parameter `CHECK_BITS` (1 to 8) checks more bits of the product,
which must equal `{0…0, u}`. With all 8 bits, every corrupted output is caught
unless the input byte is zero. Exhaustively that is 2040 of 2048 single-bit
errors and 65025 of 65280 error patterns. The default is the 1-bit check.

### Level 2: parity prediction on the linear steps

`level2_checker` predicts the parity of each output byte of ShiftRows,
MixColumns and AddRoundKey (or their inverses) from the step's input. It
compares the prediction with the parity of the actual output and flags each
byte separately:

* **(Inv)ShiftRows:** each byte's parity moves with the byte.
* **(Inv)MixColumns:** `parity(c·a)` is a linear function of the bits of `a`.
  The predictor masks the input bytes with a constant per coefficient and XORs
  them (`aes_pkg::par_mask`). It shares no multiplier with the datapath.
* **AddRoundKey:** `parity(out) = parity(in) xor parity(key)`.

Parity catches any odd number of flipped bits in a byte. It misses an even
number.

## What happens when a check fails

Both cores are iterative. One 128-bit state register takes one transformation
per clock cycle:

    encryption:  ARK(0) | SB SR MC ARK (rounds 1..9) | SB SR ARK (round 10)
    decryption:  ARK(10) | ISR ISB ARK IMC (keys 9..1) | ISR ISB ARK(0)

That is 40 cycles per block in either direction.

The register only accepts a step's result when that step's check passes.
SubBytes and InvSubBytes are checked by the 16 level-1 comparators, every other
step by the level-2 comparator. If any flag rises, the register keeps the
step's input and the same step is computed again on the next cycle. Each
retried step adds one cycle. A transient fault therefore costs one cycle and
leaves no trace in the result.

After `MAX_RETRY` (default 4) failures in a row the core gives up: it pulses
`done` with `fault = 1`. Such a fault is taken as permanent, and the output
must not be used.

The key expander works the same way. Its four SubWord S-boxes are level-1
checked, and a round key is only stored once its check passes. It produces one
round key per cycle, so 10 cycles per key without faults, and it also raises
`fault` after `MAX_RETRY` failures.

The receiver first compares the ciphertext's byte parities with the 16 parity
bits the sender computed. Those bits are the level-2 prediction for the final
AddRoundKey, not a parity of the register. A mismatch means the block was
corrupted after the sender checked it, for example in transit. There is no
earlier step to repeat, so the receiver ends the block at once with `fault = 1`.

## Measured coverage

`tb_fault_coverage` injects random multi-bit stuck-at faults into a random
step of random blocks. Each fault holds 1 to 8 bits of one byte, for one
attempt of the step, and only faults that change the byte are counted. Every
fault that is flagged must be repaired. Every fault that is not flagged must
show up as a wrong block. Results for 350,000 faults:

| step (enc and dec)   | 1-bit S-box check | 8-bit S-box check |
|----------------------|-------------------|-------------------|
| SubBytes / InvSubBytes | ~50 %           | ~99.6 %           |
| ShiftRows, MixColumns, AddRoundKey | ~57 % | ~57 %           |
| all steps            | ~55 %             | ~67.6 %           |

The linear-step figures are the fraction of multi-bit stuck-at patterns that
flip an odd number of bits. A single flipped bit is always caught there. The
8-bit S-box check is what brings the S-box coverage to about 99 %.

## Files

| file | contents |
|------|----------|
| `rtl/aes_pkg.sv` | types (`state_t`, `flags_t`, `step_e`, `fault_inj_t`), GF(2⁸) arithmetic, S-box table generation, AES transformations, parity predictors |
| `rtl/aes_sbox.sv`, `rtl/aes_inv_sbox.sv` | 256-entry lookup-table S-box and inverse S-box (tables computed at elaboration) |
| `rtl/sbox_checker.sv` | level-1 comparator |
| `rtl/sub_bytes_l1.sv` | 16 S-boxes or inverse S-boxes, each with its checker |
| `rtl/level2_checker.sv` | level-2 comparator |
| `rtl/key_expansion.sv` | checked key expander and 11-entry round-key store with two read ports |
| `rtl/aes_enc_core.sv`, `rtl/aes_dec_core.sv` | sender and receiver cores |
| `rtl/aes_fd_top.sv` | top level |
| `tb/tb_ref_pkg.sv` | reference AES model used by all testbenches (written independently of the RTL) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_fault_coverage` |

State layout follows FIPS-197. Byte n is row n%4, column n/4, and byte 0
occupies bits 127:120 of a 128-bit vector. `state_t` is `logic [0:15][7:0]`, so
`st[n]` is byte n, and flag `n` of a `flags_t` belongs to byte n.

## Interface of `aes_fd_top`

Parameters: `CHECK_BITS` (1) and `MAX_RETRY` (4). All ports are synchronous to
`clk`. Reset `rst_n` is active low and synchronous.

| group | ports | notes |
|-------|-------|-------|
| key | `key_load`, `key[127:0]` → `key_ready`, `key_fault`, `key_l1_err[3:0]` | pulse `key_load`; `key_ready` rises 10 cycles after the cycle that samples it |
| sender | `enc_start`, `enc_pt` → `enc_busy`, `enc_done`, `enc_fault`, `enc_ct`, `enc_ct_par[0:15]` | `enc_done` pulses one cycle; `enc_ct` and `enc_ct_par` then hold until the next start |
| receiver | `dec_start`, `dec_ct`, `dec_ct_par` → `dec_busy`, `dec_done`, `dec_fault`, `dec_pt` | same handshake |
| observation | `enc_l1_err`, `enc_l2_err`, `dec_l1_err`, `dec_l2_err` | per-byte check flags of the current cycle |
| fault injection | `key_inj_en`, `key_inj_mask`, `enc_inj`, `dec_inj` | tie to 0 in use; see below |

A start is ignored while its core is busy, and also before `key_ready` is
high. Round keys are read combinationally from the store, so do not reload the
key while a block is in flight.

`fault_inj_t` is `{en, step, round, mask}`. While `en` is high, `mask` is XORed
onto the output of the named step in the named round. For SubBytes, the mask is
applied to the S-box outputs before the checkers, which models a faulty S-box.
Holding `en` for one attempt gives a transient fault; holding it longer gives a
permanent one. In the decryption core, `round` is the round-key index, counting
10 down to 0.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M`. For example, the
end-to-end test at default parameters:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/aes_pkg.sv tb/tb_ref_pkg.sv tb/tb_aes_fd_top.sv --top-module tb_aes_fd_top
    obj_dir/Vtb_aes_fd_top

`tb_aes_fd_top` covers the following:

* the FIPS-197 Appendix C.1 vector through both sides;
* random round trips;
* a repaired fault in every kind of step on both sides, and in the key
  expander;
* a permanent fault on each side and in the key expander;
* a block corrupted in transit;
* a start before the key is ready.

It counts each of these and fails if any never happens. It runs in well under
a minute.

`tb_fault_coverage` runs 250,000 injections on each of two systems (1-bit and
8-bit S-box check), about two minutes of simulation. Change `NUM_FAULTS` for a
longer campaign; 700,000 injections take about six minutes.

## Departures and open points

* **The level-1 check is the relation itself, not a hand-expanded gate list.**
  The checker computes bit 0 of `s·(M·s'+m)` with a generic GF(2⁸) multiplier
  and `u` as the OR of the input bits. It leaves the reduction to a few gates
  to synthesis. The relation holds for all 256 S-box pairs, and the testbench
  checks it exhaustively.
* **How level 2 checks a step is this design's own choice.** The scheme says
  only that a level-2 comparator checks every step. Byte-parity prediction was
  chosen as the simplest check that is independent of the datapath.
* **Retry limit and timing are this design's own choices.** The scheme repeats
  a failed step with no limit. `MAX_RETRY` bounds that, so a permanent fault
  ends in a flag instead of a hang. The one-step-per-cycle timing and the
  handshake are also this design's own.
* **Sub-expression sharing is not applied.** The decryption checkers could
  share logic with each other to save area; they do not.
* **Area and delay are not given.** No FPGA area or delay figures are
  reproduced.
* **The S-boxes are lookup tables.** That is the case the scheme targets. Any
  other S-box implementation with the same ports can be dropped into
  `aes_sbox` / `aes_inv_sbox` without touching the checkers.
