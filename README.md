# Rate-compatible QC-LDPC codec with one encoder and one decoder for all rates

This is a quasi-cyclic LDPC encoder/decoder pair whose code rate can be changed frame by
frame, from 32/33 down to 1/2, with no change to the hardware. A single *mother code* of
rate 1/2 is built from 72 x 72 circulant blocks. Each *daughter code* is that mother code
with some parity vectors left out (punctured). The encoder always computes every parity
vector. A transmission controller sends only as many as the channel needs: first the
systematic part and the last parity vector q_I, then one more parity vector each time the
receiver asks for a retransmission (ARQ). The decoder always runs on the full mother
matrix, with an LLR of 0 for every bit that was not received ("zero filling"). So one
encoder and one decoder serve every rate.

The design is written in synthesizable SystemVerilog (IEEE 1800-2017) and checked with
Verilator 5 and the slang front end of Yosys.

## The code

The parity-check matrix `M` has `I = 32` block rows and `J + I = 64` block columns. Each
block is `a x a` with `a = 72`.

* Block columns 0..31 hold the systematic vectors `p_1..p_32`. In each block row, six of
  these blocks are shifted identity matrices `K(S)` and the rest are zero.
* Block columns 32..63 hold the parity vectors `q_1..q_32`. This part is *dual diagonal*:
  block row `i` has an identity at `q_i` and, for `i > 1`, another at `q_(i-1)`.

So every parity check touches at most 6 + 2 = 8 bits (row degree 8). The code word is
`[p_1 .. p_32, q_1 .. q_32]`, which is 2304 information bits and 4608 code bits.

A circulant with shift `S` maps `p` to `x[r] = p[(r + S) mod a]`, a left rotation of `p`.
Because the parity part is dual diagonal, encoding needs no matrix inversion:

    s_i = XOR over j of K(S_ij) p_j      (block-row sums)
    q_1 = s_1,   q_i = s_i XOR q_(i-1)   (running XOR)

So `q_I` is the XOR of all block-row sums. On its own it gives a code of rate `J/(J+1)`
that involves every systematic bit. That is why the controller sends it first.

**Where the circulants sit.** This design chooses the positions and shift values itself;
they are not taken from a published table. Block row `i` (counted from 0) has its six
systematic circulants in block columns `(i + {0,1,3,7,12,20}) mod J`. Circulant `t` of
row `i` has shift `(7i + 11t^2 + 3it + 1) mod a`. Both rules are the functions `sys_col`
and `sys_shift` in `rtl/rcrc_pkg.sv`; the encoder, the syndrome check, the decoder and the
testbench models all use them. To use another matrix, change those two functions. The
hardware assumes six systematic circulants per block row and the dual-diagonal parity
part.

## Rate control: the transmission order

After encoding, `tx_controller` sends `p_1..p_J` and then `q_I`, as `J + 1` consecutive
segments of `a` bits. Each `more_req` pulse then sends one more parity vector, in this
order:

    q_I/2,  q_I/4,  q_3I/4,  the other even q in ascending order,  the odd q in ascending order

For `I = 32` this is q16, q8, q24, q2, q4, q6, q10, ..., q30, q1, q3, ..., q31. After `n`
parity vectors the rate is `32/(32+n)`. The order is the function `tx_parity` in the
package. The receiver (`zero_fill_loader`) uses the same function to work out where the
k-th received segment belongs, so segments need no column tag on the channel. Every
segment still carries one (`seg_col`) for debugging.

## Encoder (`rc_encoder`)

* One systematic vector enters per cycle.
* A bank of 32 XOR processors (`xor_processor`), one per block row, works in parallel.
  Each has its own barrel rotator (`circ_shift`).
* In each cycle, every block row that has a non-null circulant in the current block column
  rotates the vector by that circulant's shift and XORs it into its accumulator.
* When the 32nd vector arrives, the running XOR over the block rows turns the sums into
  `q_1..q_32`. It is built as a prefix-XOR tree five levels deep, not as a chain of 32
  XORs, so the path from the last input to the registered parity stays short.
* `out_valid` pulses one cycle after the last vector. Frames may follow back to back.

Throughput is 72 information bits per cycle (12.96 Gb/s at 180 MHz). Latency is 33 cycles.

## Decoder (`rc_decoder`)

**Algorithm.** The decoder uses layered sum-product decoding. Each iteration takes the
block rows from the bottom one (row 32) to the top one (row 1). The bottom-up order
matters here. In the highest-rate codes the only received parity vector is `q_32`, so the
parity information enters at the bottom and, with this order, travels up the dual-diagonal
chain within one iteration.

**Row-column processors.** Thirty-six junction row-column processors
(`row_column_processor`) handle 36 of the 72 checks of a block row per cycle. A block row
therefore takes 2 cycles. For each of its up to 8 bits, a processor:

1. forms `x = Z - y_old`, where `Z` is the current a-posteriori LLR and `y_old` is the
   message this check sent last time;
2. splits `x` into sign and magnitude (`s_to_u`);
3. computes new messages. The signs come from `sign_processor`: the XOR of all eight signs,
   then XORed with each input's own sign, which is 15 XOR gates. The magnitudes come from
   `magnitude_processor`:
   `|y_j| = phi(sum over i != j of phi(|x_i|))`, where `phi(x) = -ln(tanh(x/2))` is a
   7-bit table (`phi_lut`, 3.4 fixed point);
4. writes back `Z' = x + y'`, after `u_to_s` conversion.

The updated `Z` is visible to the next block row within the same iteration.

**Memory organisation.** This part is this design's own choice.

* `Z` is kept as one 72-LLR word per block column.
* For each of the 8 edges of the current block row, the column word is read and rotated
  by the circulant's shift. Lane `r` of the rotated word is then the bit that check `r`
  needs.
* In the first cycle of a block row, processors take lanes 0..35, and the half-updated
  words go into 8 edge registers.
* In the second cycle, processors take lanes 36..71. The words are then rotated back and
  written to their columns.
* A circulant is a permutation, so the checks of one block row never share a bit inside
  one block column, and lanes never collide.
* The row messages are stored as one wide word per (block row, cycle): 64 words of
  36 x 8 messages. In the first iteration they read as zero, so they never need clearing.

**Stopping.** After each iteration, `syndrome_check` tests the hard decisions (sign of
`Z`) against all 2304 checks. Decoding stops on success or after `MAX_ITER = 50`
iterations.

**Timing.** From `start` to `done` takes `1 + iterations x 65` cycles: one load cycle,
then 64 processing cycles and 1 check cycle per iteration.

**Number formats.**

| quantity | format |
|---|---|
| channel LLR | 8-bit two's complement, 4 fractional bits (+ means bit 0) |
| a-posteriori LLR `Z` | 10-bit two's complement, same scale, saturating |
| row message | sign + 7-bit magnitude (3.4) |
| `phi` table | 7 bits in, 7 bits out, 3.4 fixed point, `phi(0)` saturated to 127 |

### Limit at the highest rates

When only `q_32` (or a few parity vectors) has been sent, the other parity vectors are
erased, and they form a long chain through the dual diagonal. A check with two erased bits
passes on no information. With 7-bit messages, what enters at `q_32` has faded to zero
within a few block rows. The systematic bits of a clean or nearly clean frame still come
out right. However, the erased parity bits are not rebuilt, so the full-matrix syndrome
fails and decoding runs all 50 iterations.

In the end-to-end test, a noiseless frame therefore reports success only once 4 parity
vectors have been sent (rate 32/36). A frame with 0.3 % wrong bits needs 5 (rate 32/37).
An ARQ controller built on this codec should treat `dec_success` as "certainly correct",
not as "the only way to be correct".

## Top level (`rcrc_ldpc_codec`)

The top joins the transmit chain (`rc_encoder` -> `tx_controller`) and the receive chain
(`zero_fill_loader` -> `rc_decoder`). The modulator and the channel lie between
`seg_*` and `rx_*`, outside the design. The two halves share nothing, so one frame can be
encoded while another is decoded.

To run one ARQ transfer:

1. Pulse `rx_frame_start` to zero the receive memory.
2. Push 32 vectors on `in_valid`/`in_vec`, respecting `in_ready`.
3. Convert the segments coming out of `seg_*` to LLRs and feed them to
   `rx_valid`/`rx_llr` in the same order.
4. After `J + 1` segments (`rx_nseg`), pulse `dec_start` and wait for `dec_done`.
5. If `dec_success` is low and `tx_all_sent` is low, pulse `more_req`, wait for the extra
   segment and decode again.

| parameter | default | meaning |
|---|---|---|
| `A` | 72 | circulant size `a` |
| `J` | 32 | systematic block columns |
| `I` | 32 | block rows = parity vectors (must be a multiple of 4) |
| `P` | 36 | decoder lanes; `A` must be a multiple of `P` |
| `MAX_ITER` | 50 | iteration limit |

The systematic-column offsets are distinct only for `J >= 21` or `J = 16`. Smaller
matrices need other offsets in the package.

## Files

`rtl/` holds one module or package per file:

* `rcrc_pkg`: sizes, formats, matrix and transmission order
* the encoder side: `circ_shift`, `xor_processor`, `rc_encoder`, `tx_controller`
* the decoder side: `phi_lut`, `sign_processor`, `magnitude_processor`, `s_to_u`,
  `u_to_s`, `row_column_processor`, `syndrome_check`, `zero_fill_loader`, `rc_decoder`
* the top, `rcrc_ldpc_codec`

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`, and `tb_ref_pkg.sv`.
The reference package is written independently of the RTL data paths: `phi` in real
arithmetic, encoding and syndrome check bit by bit from the check equations, and the
transmission order as a literal list.

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. All run at the
default size.

| testbench | what it checks |
|---|---|
| `tb_rc_encoder` | parity, codeword validity, latency of 33 cycles, back-to-back frames |
| `tb_rc_decoder` | rates 32/33, 32/36, 32/40, 1/2 with errors, noise-only (stop at exactly 50 iterations), cycle count |
| `tb_rcrc_ldpc_codec` | three frames end to end with ARQ, at light, zero and heavy noise |

`tb_rcrc_ldpc_codec` also counts encoder back-pressure, zero-filled decodes, ARQ rate
switches, early stops, iteration-limit stops and full mother-code decodes, and it fails if
any of them never happens. It runs in about a minute.

To simulate with Verilator, for example the end-to-end test:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_rcrc_ldpc_codec \
        rtl/rcrc_pkg.sv tb/tb_ref_pkg.sv rtl/*.sv tb/tb_rcrc_ldpc_codec.sv -o sim
    ./obj_dir/sim

Put the package files first. Verilator warns that the package is listed twice (`rtl/*.sv`
includes it again); the warning is harmless, or you can list the files by name. The same
command with another `--top-module` and testbench file runs any unit test.

## How far it follows the design it implements, and where it departs

**Follows:**

* rate-1/2 mother code with a dual-diagonal parity part and `a = 72`, 32 x 64 blocks
* encoding by rotations and XOR processors, with a running XOR for the parity
* the order in which parity vectors are sent, starting with `q_I`
* zero-filled LLRs for punctured bits
* layered decoding, bottom to top, with degree-8 row-column processors (15-XOR sign
  processor, phi-table magnitude processor, signed/unsigned converters)
* 36 processors, a 7-bit phi table with 4 fractional bits, syndrome stop, 50 iterations

**This design's own choices:**

* the circulant positions and shift values
* one vector per cycle into the encoder
* all memory organisation, handshakes and widths other than the phi table
* saturation rules

**Departures and open points:**

* The highest rate is 32/33 = 0.970. The often-quoted 0.98 would need `J >= 49`.
* Decoder throughput at 6 iterations is 2304 bits / 391 cycles, which is 1.06 Gb/s of
  information (2.12 Gb/s of code bits) at 180 MHz. A 1.9 Gb/s information rate would need
  frame loading overlapped with decoding, or more lanes.
* The frame-error-rate studies at code lengths of about 1900 bits cannot be run on this
  matrix, which has 2304 information bits.
* Decoding failures at the highest rates are discussed above.
* No timing closure or FPGA resource figures come with this RTL.
