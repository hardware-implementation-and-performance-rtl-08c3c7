# Hybrid GaB / PGaB hard-decision LDPC decoder

Gallager-B (GaB) is about the cheapest LDPC decoder there is. Every message is one bit. A
variable node is a few majority voters, and a check node is a few XOR gates. That makes it
attractive for very high throughput, but its error correction is poor. The decoder often
locks into a *trapping set*: a small group of bits whose messages keep reinforcing each
other, so the state cycles instead of converging.

Probabilistic Gallager-B (PGaB) breaks those cycles with a minimal change to the variable
node. When the extrinsic vote of a node is a tie, plain GaB lets the received channel bit
decide. In PGaB, a random subset of the nodes (about 20 %, chosen afresh every iteration)
do not let the channel bit decide a tie for itself. The decoder is *hybrid*: it runs plain
GaB for the first 15 iterations, which is enough for most frames. Only frames that have not
converged by then switch to PGaB. A one-bit `ctrl` signal selects the mode, so the same
node hardware serves both algorithms.

This repository holds synthesizable SystemVerilog for a fully parallel decoder of this kind.
There is one processing unit per variable node and per check node, and one iteration takes
two clock cycles. The default build is a regular rate-1/2 quasi-cyclic code: N = 1296 bits,
M = 648 checks, variable degree 4, check degree 8, circulant size 54.

## Algorithm, as the hardware computes it

Notation: `r[n]` is the hard-decision channel bit of bit `n`. `c[n][e]` is the message from
the check node on edge `e` of variable node `n`, and `v[n][e]` is the message going back.
`p[n]` is the node's random bit.

* **Initialisation.** `v[n][e] = r[n]` on every edge and `d[n] = r[n]`.
* **Check node** (edge `k` of check `m`): `c = XOR of the other DC-1 incoming v`. The check
  also computes the parity of its variables' decisions `d`, and the syndrome is zero when
  every parity is zero.
* **Variable node, extrinsic message on edge `e`.** The node takes a majority vote over DV
  bits: the DV-1 messages from its *other* checks, plus `r' = r ^ (p & ctrl)`.
  * A majority of ones gives 1.
  * A majority of zeros gives 0.
  * A tie (DV/2 ones) gives the **unmodified** `r`.
* **Variable node, decision.** A majority of `r` and all DV check messages (five inputs for
  DV = 4, so it cannot tie). The decision always uses the unmodified `r`.

Putting the random bit into the vote while the tie still resolves to the original `r` has a
particular effect. For a node with `p & ctrl = 1` and DV = 4, the message becomes exactly the
majority of its three extrinsic check messages, and the channel bit is ignored:

| r | three extrinsic c (ones) | GaB message | PGaB message (p = 1) |
|---|---|---|---|
| 0 | 0 or 1 | 0 | 0 |
| 0 | 2 | 0 | **1** |
| 0 | 3 | 1 | 1 |
| 1 | 0 | 0 | 0 |
| 1 | 1 | 1 | **0** |
| 1 | 2 or 3 | 1 | 1 |

The rows in bold are the two cases where the channel bit decides a tie in GaB. They are the
only places where PGaB differs. Nodes with `p = 0` keep the GaB behaviour even in PGaB mode.

The decoder stops as soon as the syndrome of `d` is zero (success). It also stops, with
failure, after `IMAX` = 300 iterations. Either way it returns `d`.

## Two-cycle iteration and timing

Four register banks are kept:

* `r`: N bits;
* `v`: N·DV bits;
* `c`: N·DV bits;
* `d`: N bits.

The controller (`pgab_controller`) alternates two phases:

| cycle | what is registered | what is tested |
|---|---|---|
| check node (`ST_CNU`) | `c <= CNU(v)` | syndrome of `d`: zero → finish with success; `IMAX` reached → finish with failure |
| variable node (`ST_VNU`) | `v, d <= VNU(c, r, p, ctrl)`; iteration count + 1 | — |

`ctrl` is 0 while the iteration count is below `S_I` = 15, so iterations 0–14 run GaB and
iteration 15 onwards runs PGaB. In every PGaB variable-node cycle the random generator draws
one new bit.

Frame timing, counted from the clock edge that takes `start`:

* A frame that succeeds after `k` iterations raises `done` **2k + 2** cycles later. A frame
  that is error-free on arrival finishes in 2 cycles, with `iterations = 0`.
* A failing frame takes 2·IMAX + 2 = 602 cycles.
* Throughput is therefore `N · f_clk / (2 · (average iterations + 1))`. The "+1" is the final
  syndrome test and output cycle. Frames cannot overlap, because the message registers are
  shared.

`ready` is high in the idle state, and `start` is honoured only then. `done` is a one-cycle
pulse. `d_out`, `success` and `iterations` stay valid until the next `start`. `pgab_mode`
shows `ctrl`. It stays high after a frame that used 15 or more iterations, until the next
frame is loaded.

## Random bits

`lfsr_rng` produces the Bernoulli(p_v) bits with minimal hardware:

1. A 32-bit Fibonacci LFSR (x³² + x²² + x² + x + 1).
2. A 32-bit comparator: the bit is 1 when the LFSR state is below `0x33333333`, so p_v = 0.2.
3. An N-bit shift register. Bit `n` feeds variable node `n`.

After reset the register is filled one bit per cycle. `ready` stays low for these N = 1296
cycles, which are paid once, not per frame. After that the register moves by exactly one
place per PGaB iteration. The generator is idle during GaB iterations and between frames.
Consequently, node `n+1` in one iteration sees the bit that node `n` saw in the previous
iteration. The bits are correlated in that sense, but each node's sequence is still
Bernoulli(0.2), which is all the algorithm needs. The generator state carries over from
frame to frame.

## The code (H matrix)

The wiring is fixed at elaboration by `qc_hmatrix_pkg` and realised by `qc_hmatrix_net`. H is
an MB × NB base matrix of Z × Z blocks. Each block is either zero or a cyclically shifted
identity:

* N = NB·Z and M = MB·Z. The default is a 12 × 24 base matrix with Z = 54.
* Edge `e` of every variable node in block-column `j` goes to block-row `(j + e) mod MB`.
  When MB = DV, every block is present and edge `e` goes to block-row `e`.
* Each block-column therefore has DV non-zero blocks. When NB/MB = DC/DV, each block-row has
  DC non-zero blocks.
* The block reached by edge `e` of block-column `j` is shifted by `(e·j) mod Z`. Variable
  `j·Z + c` meets check row `(c − e·j) mod Z` of that block-row.
* Edge messages are stored per variable node, at bit `n·DV + e`.
* Check node pins are ordered by block-column.

`tb_qc_hmatrix` confirms that H has no 4-cycles for every size below.
This matrix is **this design's own**. The published decoder used codes taken from earlier
work, and their circulant shifts are not reproduced here. Decoding performance (frame error
rate at a given crossover probability) will therefore differ from published curves. The
sizes and degrees match.

Other codes of the same family are built by parameters alone:

| code | parameters | N | M |
|---|---|---|---|
| rate 1/2, DV 4 (default) | `Z=54 MB=12 NB=24 DV=4 DC=8` | 1296 | 648 |
| rate 3/4 | `Z=81 MB=4 NB=16 DV=4 DC=16` | 1296 | 324 |
| rate 6/7 | `Z=79 MB=4 NB=28 DV=4 DC=28` | 2212 | 316 (the published code has 312) |
| rate 1/2, DV 3 | `Z=54 MB=12 NB=24 DV=3 DC=6` | 1296 | 648 |
| Tanner-size code | `Z=31 MB=3 NB=5 DV=3 DC=5` | 155 | 93 |

With DV = 3, an extrinsic vote has three inputs and cannot tie. In PGaB mode the disturbed
channel bit `r'` then counts as a full vote. The node rule used for every DV is therefore a
true majority with ties resolved by `r`. At DV = 4 this is the same as the threshold
`b_n = ceil(d_v/2)` formulation. At DV = 3 it is the symmetric generalisation.

## What the probabilistic phase buys

The gain is in the error-floor region, where GaB fails mostly because it is stuck in trapping
sets, not because the channel is too noisy. `tb/tb_pgab_fer.sv` runs two default-size
decoders side by side on the same 20 000 frames at crossover probability 0.01. One is the
hybrid decoder. The other has its switch point beyond `IMAX`, so it runs GaB only.

| | GaB only | hybrid GaB → PGaB |
|---|---|---|
| frame errors | 133 (FER 6.7·10⁻³) | 8 (FER 4·10⁻⁴) |
| of which undetected (converged to another codeword) | 0 | 6 |
| frames corrected only by the hybrid / only by GaB | — | 125 / 0 |
| average iterations | 3.77 | 2.00 |
| bits per clock, N / (2 · average iterations) | 172 | 324 |

Every GaB failure at this noise level is a frame that is still unsolved at the iteration
limit. The hybrid decoder rescues almost all of them within a few PGaB iterations. The average
iteration count falls because frames that GaB would carry to the 300-iteration limit now end
early. The few frames the hybrid decoder still gets wrong are mostly undetected errors: the
random disturbance pushed the word onto a nearby codeword of this H matrix. That reflects the
code's distance spectrum, not the decoder. The testbench checks that every reported success is
a codeword.

## Modules

| file | role |
|---|---|
| `rtl/pgab_decoder.sv` | top: registers, N VNUs, M CNUs, interconnect, syndrome, RNG, controller |
| `rtl/pgab_vnu.sv` | variable node: DV extrinsic voters, one decision voter, select units, `r ^ (p & ctrl)` |
| `rtl/majority_voter.sv` | three-way majority (ones / zeros / tie) |
| `rtl/pgab_cnu.sv` | check node: extrinsic XORs and decision parity |
| `rtl/syndrome_check.sv` | OR of all check parities → `converged` |
| `rtl/lfsr_rng.sv` | LFSR, comparator, N-bit random bit register |
| `rtl/pgab_controller.sv` | state machine, iteration counter, GaB→PGaB switch, stop rule |
| `rtl/qc_hmatrix_net.sv` | H-matrix wiring between the edge registers and the CNU pins |
| `rtl/qc_hmatrix_pkg.sv` | the H-matrix index functions |
| `rtl/pgab_pkg.sv` | vote and state enums, LFSR and threshold constants |

Top-level parameters: `Z`, `MB`, `NB`, `DV`, `DC`, `S_I` (GaB iterations before PGaB, 15), `IMAX` (300),
`RNG_SEED` and `PV_TH` (p_v · 2³²).

Size at the default build:

* About 14 300 flip-flops: 2·5184 message bits, 3·1296 bits for `r`, `d` and the random
  register, plus the LFSR and control.
* 1296 VNUs, each with five small voters.
* 648 eight-input CNUs.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_majority_voter`: exhaustive for 3, 4 and 5 inputs.
* `tb_pgab_vnu`: reproduces the 16-row GaB and PGaB truth table for DV = 4. It also checks
  all input combinations for DV = 4 and DV = 3.
* `tb_pgab_cnu`: exhaustive for DC = 8, random for DC = 28.
* `tb_syndrome_check`: every single-check failure at M = 648.
* `tb_lfsr_rng`: fill time, bit-exact against an independent LFSR model, step behaviour, and
  a measured p_v within 0.18–0.22.
* `tb_pgab_controller`: phase alternation, switch point, random-bit draws, stop rules and
  2k+2 latency.
* `tb_qc_hmatrix_net` and `tb_qc_hmatrix`: routing against the matrix definition. They also
  check node degrees, lookup consistency and the absence of 4-cycles for all five codes and
  the reduced test code.
* `tb_pgab_decoder`: end-to-end test on a small code (default base matrix with Z = 17, N = 408,
  IMAX = 100) over 800
  frames. Every frame is compared bit for bit with `tb/pgab_ref_pkg.sv`, a behavioural model
  written independently of the RTL: same schedule, same LFSR. The comparison covers the
  decided word, success flag, iteration count and latency. The test also requires each
  mechanism to occur: RNG fill, convergence within the GaB phase, switch to PGaB,
  convergence in the PGaB phase, stop at IMAX, and an error-free frame.
* `tb_pgab_decoder_full`: the same test with every parameter at its default (N = 1296), on
  400 frames. Crossover probabilities run from 0.01 to 0.05. In this run, 136 frames went
  past 15 iterations, and 53 of them were then corrected by PGaB.
* `tb_pgab_codes`: the decoder rebuilt for the other four codes of the table above, each
  checked against the reference. Its build takes several minutes, mostly for the DC = 28
  decoder.
* `tb_pgab_fer`: the frame-error-rate comparison described above. It checks that every
  reported success is a codeword, that both decoders agree on every frame that
  ends within the GaB phase, and that the hybrid decoder has both fewer failures and fewer
  average iterations.

Frames are the all-zero codeword plus binary-symmetric-channel noise. The node rules are
symmetric under complementing all inputs, so decoder behaviour does not depend on which
codeword was sent.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
    rtl/pgab_pkg.sv rtl/qc_hmatrix_pkg.sv tb/pgab_ref_pkg.sv tb/tb_pgab_decoder.sv \
    --top-module tb_pgab_decoder -o sim
./obj_dir/sim
```

Replace `tb_pgab_decoder` with any other testbench name. The full-size test builds in about
two minutes and runs in about ten seconds. Linting a module alone:
`verilator --lint-only -Wall -Irtl rtl/pgab_pkg.sv rtl/qc_hmatrix_pkg.sv rtl/pgab_decoder.sv`.
The only lint warning is about `rst_n`, which is used both as an asynchronous reset and in
the `disable iff` of the controller's assertions. That is intended.

## What follows the published architecture and what is chosen here

Taken from the PGaB decoder architecture:

* the GaB/PGaB node rules and the truth table;
* the majority-voter based VNU with the AND/XOR gating of the random bit;
* the XOR CNU, and the syndrome computed from the decisions;
* the switch after 15 iterations;
* p_v = 0.2;
* the 32-bit LFSR plus comparator plus N-bit shift register, with a fill cost of N cycles;
* two cycles per iteration;
* the main code's sizes: N = 1296, M = 648, degrees 4 and 8, Z = 54.

Chosen here:

* **Decision rule.** The a-posteriori decision is a plain 5-input majority, matching the
  decoder's five-input voter. A literal reading of the threshold formula `b_n = ceil(d_v/2)`
  on five inputs would be asymmetric.
* **H matrix.** The base matrix layout and the circulant shifts are this design's own (see
  above).
* **Iteration limit.** `IMAX = 300`, the limit used in the algorithm's simulation studies. A
  hardware limit was not given.
* **Registers.** Both message directions are registered, which gives a clean one-cycle VNU
  and one-cycle CNU phase. The published FPGA figures suggest a smaller register set (about
  one message bank plus `r` and `d`), so this RTL uses roughly one message bank more.
* **RNG details.** The LFSR polynomial and seed, the fill-once-after-reset policy, and
  drawing one new bit per PGaB iteration.
* **Interface.** The frame interface (parallel N-bit in and out, `start`/`ready`/`done`) and
  the extra output cycle per frame.
* **Reset.** Only control state and the RNG are reset. The data registers are loaded before
  they are read, and `d_out` is undefined until the first frame has finished.

Not included: the GDBF and PGDBF decoders and the MinSum decoders. They appear in the source
only as comparison baselines. Also not included are an encoder and an FPGA test harness.
