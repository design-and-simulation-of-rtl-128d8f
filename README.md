# Turbo encoder and iterative Log-MAP turbo decoder

This is a rate-1/3 turbo code in synthesizable SystemVerilog: an encoder, and a decoder that corrects errors after a noisy channel. The encoder sends every information bit together with two parity bits. The two parity bits come from two identical recursive convolutional encoders. One encoder sees the bits in their original order, the other sees them in a scrambled (interleaved) order. The decoder has two soft-input soft-output (SISO) decoders, one per constituent code. They pass reliability information to each other over several iterations. Each pass refines the other's estimate, until a final pass takes the hard decision.

The structure follows a published design. It has two RSC encoders around an interleaver on the transmit side, and two SISO decoders with an interleaver and a de-interleaver on the receive side. The decoding algorithm is Log-MAP. The generator polynomials and the six-position interleaver example are also theirs. The fixed-point arithmetic, the decoder schedule, the block framing and the interfaces are this design's own; they are set out below.

## The constituent code

Each RSC encoder (`rtl/rsc_encoder.sv`) has memory 4, so its trellis has 16 states. The code is defined by these polynomials:

| polynomial | taps | role |
|---|---|---|
| G0 = 1 + D + D^3 + D^4 | feedback | recursive register `a(n) = u(n) ^ a(n-1) ^ a(n-3) ^ a(n-4)` |
| G1 = 1 + D^2 + D^3 + D^4 | feedforward | parity `p(n) = a(n) ^ a(n-2) ^ a(n-3) ^ a(n-4)` |

The source names the two polynomials but does not say which one is fed back. Here G0 is the feedback polynomial, which is the usual convention. The trellis functions (`rsc_feedback`, `rsc_parity`, `rsc_next`) live in `rtl/turbo_pkg.sv`. The encoder and the decoder both use them, so the two sides cannot disagree about the code.

Every block of `K` bits starts from state 0. The trellis is **not terminated**: no tail bits are sent. As a result, the last few bits of a block are protected less well than the rest. The decoder handles this by starting its backward recursion with all 16 states equally likely.

## The interleaver

`rtl/interleaver.sv` is a block interleaver. It writes `K` words in arrival order and then reads them out in permuted order. Output word `j` is input word `PERM[j]`.

The default is the six-position example of the source: `K = 6` and `PERM = {2,3,4,0,5,1}`. Counted from one, that is 3 4 5 1 6 2, so input `1 1 0 0 1 1` leaves as `0 0 1 1 1 1`. Any permutation of `0..K-1` can be passed as a parameter. The testbenches also use a 40-bit quadratic permutation, `f(i) = (3i + 10i²) mod 40`. Larger blocks give the turbo code much more of its gain.

The same module covers three jobs:

* `INVERSE = 1` makes it a de-interleaver. It writes word `j` to position `PERM[j]` and reads in order.
* `IDENTITY = 1` makes it a delay buffer with exactly the interleaver's timing. It keeps a stream aligned with an interleaved one.
* Two banks let one block be read while the next is written, so blocks can stream back to back. A word leaves `K+1` cycles after it arrives when the input is gap-free. An assertion flags a write into a bank that is still being read.

The source also describes its implemented interleaver as "a register that outputs the bit one clock later". A one-cycle delay does not reorder anything, and it would remove the point of the second encoder. This design keeps the permutation, and its outputs are registered.

## Encoder datapath

`rtl/turbo_encoder.sv`: the information bit goes straight to RSC 1, which gives the systematic bit and parity 1. It also goes into the interleaver, whose output drives RSC 2 and gives parity 2.

Parity 2 belongs to the interleaved block, so it is only available once the interleaver has filled. The systematic bit and parity 1 therefore wait in an identity-order buffer with the same timing. The three bits of codeword `k` then leave together: `(u_k, p1_k, p2_k)`, where `p2_k` is RSC 2's parity at step `k` of the interleaved sequence.

Timing:

* The encoder accepts one bit per cycle and emits one codeword per cycle.
* With back-to-back input, each codeword appears `K+2` cycles after its bit.
* Gaps in the input are allowed.
* Blocks are counted from reset, `K` valid bits each.

## Decoder

### Iteration structure (`rtl/turbo_decoder.sv`)

```
 in_sys, in_par1 ───────────────────────────► SISO 1 ──app──► out_bit = (app > 0)
                                              ▲  │ext
                        de-interleaver ───────┘  ▼
                              ▲               interleaver
                              │ext               │apr
 in_sys ─► interleaver ──────►SISO 2 ◄───────────┘
 in_par2 ─► delay buffer ────►
```

SISO 1 decodes code 1 from the systematic and parity-1 LLRs. SISO 2 decodes code 2 from the interleaved systematic LLRs and the parity-2 LLRs. The two decoders feed each other:

* The extrinsic output of SISO 1 is interleaved and becomes the a-priori input of SISO 2.
* The extrinsic output of SISO 2 is de-interleaved and becomes the a-priori input of SISO 1.

A small controller sequences a block in three steps:

1. It loads the `K` received symbols. `in_ready` is high only during this step.
2. It feeds SISO 1 with `K` zero a-priori values.
3. It lets the loop run. The decoders take turns, and only one of them is active at any time (an assertion checks this).

After `NITER` full iterations (SISO 1 then SISO 2, default 4), SISO 1 makes one more pass. Its a-posteriori LLRs give the decoded bits, with bit = 1 when the LLR is positive. During that final pass its extrinsic output is not sent on. The source only asks for "a sufficient number of iterations", so `NITER` is a parameter.

### The SISO decoder (`rtl/siso_decoder.sv`)

This is the part that takes the most care. It is a Log-MAP decoder over the 16-state trellis. All soft values are log-likelihood ratios `ln P(1)/P(0)` in fixed point with 2 fractional bits, so one LSB is 1/4 nat.

The branch metric of the transition from state `s` on input `u`, with parity `p`, drops terms common to both inputs:

```
gamma = u·(Lsys + Lapr) + p·Lpar
```

The decoder stores the channel pairs and the a-priori values of the block, then works in two sweeps.

1. **Backward, `K` cycles.** It computes `beta_k(s) = max*_u(gamma + beta_{k+1}(next(s,u)))`, starting from `beta_K = 0` because the trellis is open. Each `beta_{k+1}` vector goes into a `K × 16` metric memory.
2. **Forward, `K` cycles.** `alpha_0` is 0 for state 0 and "minus infinity" for every other state. In step `k` the decoder reads `beta_{k+1}` back and forms the extrinsic LLR:

   ```
   Lext_k = max*_{u=1}(alpha_k(s) + p·Lpar + beta_{k+1}(s')) − max*_{u=0}(…)
   ```

   It then emits `ext = Lext` and `app = Lext + Lsys + Lapr`, and updates `alpha`. The results therefore come out in natural order, one per cycle, so they can stream straight into the next interleaver.

`max*(a,b) = max(a,b) + ln(1 + e^-|a-b|)` is the Jacobian logarithm. The correction term comes from a table in 1/4-nat units, `round(4·ln(1+e^(-d/4)))`:

* 3 for `d = 0`
* 2 for `d = 1..3`
* 1 for `d = 4..8`
* 0 beyond

Without the correction the decoder would be Max-Log-MAP. The SISO testbench compares against exact MAP, computed by enumerating every codeword. The largest error it sees is 2 LSB (half a nat).

After each step, the state metrics are kept in range in two ways:

* The state-0 metric is subtracted from all of them (state 0 is always reachable).
* They are saturated to `MW` bits.

The extrinsic output is saturated to `EW` bits.

Default widths:

| parameter | default | meaning |
|---|---|---|
| `LW` | 6 | channel LLR (±7.75 nat) |
| `EW` | 8 | a-priori / extrinsic LLR |
| `MW` | 12 | state metrics and a-posteriori LLR |

`MW` must exceed `EW + 2`, so that a metric plus a branch metric fits the internal sum width.

### Decoder timing

Per SISO pass:

* `K` cycles to take the a-priori values.
* `K` cycles backward.
* The first result `K+1` cycles after the last a-priori value, and the others on the following cycles.

The interleaver between the decoders fills while those results leave, so one half-iteration costs `3K+2` cycles. Counting from the clock edge that takes the last received symbol, the first decoded bit is registered on edge

```
K + 2·NITER·(3K+2) + K+1 = (6·NITER+2)·K + 4·NITER + 1
```

That is 173 cycles for `K = 6, NITER = 4`, and 1057 for `K = 40`. The other bits follow on consecutive cycles. The decoder takes one block at a time, so it is much slower than the encoder, and the sender must honour `in_ready`.

## Top level (`rtl/turbo_system.sv`)

The top holds the encoder and the decoder side by side, sharing `K` and `PERM`. The channel between them is not part of the hardware: modulation, noise, and the receiver's conversion of samples into LLRs. So the top has two sets of link ports:

* The codeword leaves on `enc_*` (one systematic and two parity bits per cycle).
* The soft values come back on `dec_*` (three signed `LW`-bit LLRs per cycle, accepted while `dec_ready` is high).

Decoded bits leave on `out_*`, with their a-posteriori LLR. Hard-decision receivers can apply `+A`/`−A` instead of soft values. Reset is synchronous and active high throughout.

## Verification

Each testbench checks itself and ends with a `TB_RESULT checks=… failures=…` line.

| testbench | what it checks |
|---|---|
| `tb/tb_rsc_encoder.sv` | parity against the recurrences evaluated directly on bit histories, with random blocks and idle cycles; one hand-checked impulse response |
| `tb/tb_interleaver.sv` | the six-bit example; random blocks through the interleave, de-interleave and identity modes and an interleave/de-interleave round trip; the `K+1` latency |
| `tb/tb_turbo_encoder.sv` | every codeword against a reference encoder for `K = 6` and `K = 40`, including the `K+2` latency; one hand-worked codeword (`110011` → parity 1 `101001`, parity 2 `001000`) |
| `tb/tb_siso_decoder.sv` | a-posteriori LLRs against exact MAP by enumeration of all `2^K` codewords, within 3 LSB; `ext = app − Lsys − Lapr`; result timing |
| `tb/tb_turbo_decoder.sv` | noiseless blocks; blocks with one received symbol of the wrong sign (all must decode exactly); AWGN runs; the latency formula above |
| `tb/tb_turbo_system.sv` | encoder → channel model → decoder at the default parameters (see below) |

For the AWGN runs, the decoder must leave fewer bit errors than hard decisions on the received systematic bits. The numbers depend on the random seed; typical runs are:

* `K = 6`, σ = 0.9: about 160 raw errors become 15.
* `K = 40` with the quadratic permutation, σ = 1.0: about 370 become 30.

The end-to-end test runs 120 blocks, a third each noiseless, single-error and AWGN. It also counts that every mechanism actually happened:

* reordering by the interleaver
* SISO 2 passes (`NITER` per block)
* extrinsic values fed back through the de-interleaver
* blocks whose channel errors were all corrected
* cycles during which the decoder held off input

Shared reference models are in `tb/turbo_ref_pkg.sv`: the RSC recurrences, exact MAP by enumeration, and a Box-Muller Gaussian with LLR quantisation. Two harness modules, `tb/enc_harness.sv` and `tb/dec_harness.sv`, let one testbench run several parameter sets.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_turbo_system \
    -y rtl -y tb +libext+.sv rtl/turbo_pkg.sv tb/turbo_ref_pkg.sv tb/tb_turbo_system.sv
./obj_dir/Vtb_turbo_system
```

Replace the top module and the file name for the other testbenches.

## Changing the design

* **Block length and interleaver:** set `K` and `PERM` on `turbo_system`, or on the encoder and decoder, which must agree. `PERM` must be a permutation of `0..K-1`, and `K ≥ 2`. Decoder storage grows linearly with `K`; the metric memory is `16·K·MW` bits.
* **Iterations:** set `NITER`. The latency grows by `2·(3K+2)` cycles per iteration.
* **Precision:** set `LW`, `EW` and `MW`. The correction table assumes 2 fractional bits; if that changes, recompute `logmap_corr` in `turbo_pkg` from the formula above.

Known limits:

* There is no trellis termination.
* Only one block is in the decoder at a time: there is no pipelining of several blocks.
* No extrinsic scaling is applied, and no early stopping.
* The hard decision on an LLR of exactly 0 is 0.
