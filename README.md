# Iterative LDPC decoder in the log domain

This is a hardware decoder for a short irregular low-density parity-check (LDPC) code: 17 code bits, 12 parity checks and 5 message bits. It takes 17 received soft bits, each an 8-bit signed sample of a BPSK symbol after an AWGN channel. It runs the sum-product (belief-propagation) algorithm on log-likelihood ratios (LLRs), iteration after iteration. It stops when the hard decision satisfies every parity check, or after 20 iterations, and delivers the 17 decoded bits.

The design follows the decoder family of an MS thesis, *Low Density Parity Check Decoder Implementations*. Two parameters pick one of its configurations:

- `METHOD` sets how a check node combines messages:
  - `CN_MINSUM`, plain min-sum;
  - `CN_LUT`, an 8-entry table of the correction term;
  - `CN_PIECEWISE`, five piecewise-linear segments;
  - `CN_LINEAR`, one line.
- `ARCH` sets how much hardware is spent:
  - `ARCH_PARALLEL`, one unit per node;
  - `ARCH_SEMI_PARALLEL`, half the units, each used twice per iteration;
  - `ARCH_SERIAL`, one unit, used for every node in turn.

The default configuration is parallel and min-sum. One iteration then costs 65 clock cycles, and a word that decodes in one iteration takes 67 cycles from input to output.

## How a codeword moves through the decoder

```
inputwithawgn ─► create_input ─► initialization ─► qmatrix ─► allchecknodes ─► L(r)
  (17 x 8 bit)   reg + LUT L(p)   q_init[i][j]=L(p_i)   ▲                           │
                                                        │      ┌────────────────────┤
                                                        └─ L(q)┤ allbitnodes        │
                                                               └─ computebigQ ◄─────┘
                                                                    │ L(Q)
                        decoder_output ◄─ controller ◄─ computesyndrome ◄─ decodebigQ
```

- **create_input** samples the soft bits into its input register on the rising edge of `inputready`. It maps each soft bit through a 256-entry table to the a-priori LLR L(p_i).
- **initialization** copies L(p_i) into every column of row i of the q_init matrix (17 × 12 messages).
- **qmatrix** chooses what the check nodes read:
  - q_init in the first iteration;
  - the bit nodes' L(q) matrix in every later iteration.
- **allchecknodes** computes, for every edge (j, i) of the code graph, the check-to-bit message L(r_ji). It combines the L(q) of the other bits of check j.
- **allbitnodes** and **computebigQ** start together:
  - allbitnodes forms L(q_ij) = L(p_i) + the sum of L(r) from the other checks of bit i;
  - computebigQ forms the total L(Q_i) = L(p_i) + the sum of all the checks of bit i.
- **decodebigQ** decides bit i = 1 when L(Q_i) < 0.
- **computesyndrome** computes s = c·Hᵀ. If any syndrome bit is set, the **controller** starts another iteration at the check nodes. Otherwise, or at the iteration limit, it latches the decision into `decoder_output` and raises `outputready`.

Each module reports completion with an `output_ready` pulse. The controller turns each pulse into the next module's enable in the same clock cycle. Nothing in the chain runs at a fixed offset, so a module can be rebuilt with a different latency without touching the controller.

## Number format

Every message is an 8-bit two's-complement integer with 127 standing for 3.0, so one LSB is 3/127 ≈ 0.0236. This is the scale of the input samples: the range [-3, 3] of the received signal is mapped onto [-128, 127].

The channel table implements L(p) = X with σ² = 1, in the same scale:
- the sample s stands for X = 3s/127;
- X is quantised to tenths, toward zero, and clipped to ±3.0 (61 points, −3.0 … 3.0);
- the entry is round(X · 127/3).

For example, a sample of 100 (X ≈ 2.36) becomes the entry for 2.3, which is 97.

Sums in the bit nodes are kept in a 12-bit accumulator and saturated to ±127 on output. This keeps the message range symmetric, so a magnitude always fits in 7 bits.

## The check node: folding a row one message at a time

This is the part of the design most worth understanding.

The exact check-to-bit message is the "box-plus" of the other messages of the row. For two LLRs a and b:

```
a ⊞ b = sign(a)·sign(b) · [ min(|a|,|b|) + y(|a|+|b|) − y(||a|−|b||) ],   y(x) = log(1 + e^−x)
```

The bracket is always ≥ 0. Its first part is the min-sum approximation. The two y terms form the correction δ: a small negative value that shrinks as the operands grow apart.

A row of weight d needs the box-plus of d−1 messages. The sub-module folds them in the order they arrive, which is column order:

- the sign register XORs each incoming sign;
- the first magnitude is loaded as it is;
- every later magnitude q gives `mag ← max(0, min(mag, q) + y(mag+q) − y(|mag−q|))`.

Folding changes the result slightly with the order of the inputs, as any pairwise box-plus does. The testbenches use the same order.

The whole difference between the four methods lies in y():

| method | y(x) in real units | in LSBs (x in LSBs) |
|---|---|---|
| `CN_MINSUM` | 0 | 0 |
| `CN_LUT` | 0.65, 0.55, 0.45, 0.35, 0.25, 0.15, 0.05, 0 on [0,.2) [.2,.4) [.4,.7) [.7,1) [1,1.5) [1.5,2.2) [2.2,4.5) [4.5,∞) | 28, 23, 19, 15, 11, 6, 2, 0 with bounds 9, 17, 30, 43, 64, 94, 191 |
| `CN_PIECEWISE` | −x/2+0.7, −x/4+0.575, −x/8+0.375, −x/16+0.2375, −x/32+0.1375, 0 on [0,.5) [.5,1.6) [1.6,2.2) [2.2,3.2) [3.2,4.4) [4.4,∞) | 30−x≫1, 24−x≫2, 16−x≫3, 10−x≫4, 6−x≫5, 0 with bounds 22, 68, 94, 136, 187 |
| `CN_LINEAR` | max(0, 0.6 − x/4) | max(0, 25 − x≫2) |

The tables are converted to LSBs in two ways:
- a constant v becomes round(v · 127/3);
- a bound t becomes ceil(t · 127/3), so that `x < t` still holds for exactly the same integers.

Slopes that are powers of two become right shifts. The linear method uses a slope of 1/4 rather than the fitted 0.24, so it needs only a shift and a subtraction. `ldpc_corr_term` computes the two y terms and their difference; `ldpc_check_node_sub` holds the registers.

Each check-node sub-module computes one edge's message, so it must skip its own bit. All N sub-modules of a check node see the same stream of L(q) values. Each gets an include flag: H[j][k] = 1 and k ≠ its own column. Sub-modules at positions where H is 0 are present, as in the original structure of N sub-modules per check node, but their output is forced to 0.

## Timing: why one iteration is 65 cycles

Every functional unit walks through its inputs one per clock, driven by `ldpc_scan_seq`:
- one cycle to fetch;
- LEN cycles of reading;
- one cycle to register the result;
- one cycle to report ready.

A unit over LEN inputs therefore takes LEN + 3 cycles from enable to ready. With this rule the module latencies are:

| module | cycles | rule |
|---|---|---|
| create_input | 1 | register, then table |
| initialization | 1 | one load |
| allchecknodes | 20 | N + 3, one row position per cycle |
| allbitnodes | 15 | M + 3, one column position per cycle |
| computebigQ | 14 | M + 2; it runs alongside allbitnodes and finishes first |
| decodebigQ | 17 | one comparator per cycle |
| computesyndrome | 12 | one syndrome bit per cycle |
| controller | 1 | decision after the syndrome |

One iteration is 20 + 15 + 17 + 12 + 1 = 65 cycles. A decode of k iterations takes 2 + 65·k cycles from the `inputready` edge to `outputready`, which is 67 for one iteration. The end-to-end test measures exactly this.

## Semi-parallel and serial architectures

With fewer units than nodes, each array (allchecknodes, allbitnodes, computebigQ) contains an `ldpc_pass_ctrl`. This control logic runs the units PASSES times per iteration:
- the first pass starts on the controller's enable;
- each later pass starts on the units' own ready from the pass before;
- each pass's results are written into the output matrix under a writeback strobe;
- after the last pass the array reports ready.

A pass costs LEN + 4 cycles, and the array adds 2 more.

| architecture | check units × passes | bit units × passes | allchecknodes | allbitnodes | computebigQ | iteration | first word |
|---|---|---|---|---|---|---|---|
| parallel | 12 × 1 | 17 × 1 | 20 | 15 | 14 | 65 | 67 |
| semi-parallel | 6 × 2 | 9 × 2 | 44 | 34 | 32 | 108 | 110 |
| serial | 1 × 12 | 1 × 17 | 254 | 274 | 257 | 558 | 560 |

In the semi-parallel array, unit C serves row C in pass 0 and row 6 + C in pass 1. N = 17 is odd, so there are 9 bit units and the second pass covers only 8 columns. In the serial array the single unit walks through every row (or column), one per pass. These counts reproduce the published per-module latencies (20/15, 44/34, 254/274) and totals (67, 110, 560).

Time-multiplexing only reduces the arithmetic. The message matrices themselves are still held in full.

## The code

The parity-check matrix is defined in `ldpc_pkg` as 12 rows of 17 bits, with bit i of a row being column i:

```
row  0: 00000010000011100    row  6: 00101000000000110
row  1: 01000000010001011    row  7: 10010000010000100
row  2: 00110010001000001    row  8: 00100001010110000
row  3: 10000010000100010    row  9: 00000001100000101
row  4: 00001100000000001    row 10: 00000101001000010
row  5: 00001000101101000    row 11: 01010100100010000
```

The rows are written MSB first, so the rightmost character is column 0. The code is irregular:
- column weights are 2 to 4 and row weights 3 to 5;
- the Tanner graph has no cycle of length four;
- H has full rank, so there are 5 message bits.

The original work used a 12 × 17 irregular matrix of its own that is not reproduced here; this one has the same size and irregularity. Any other H can be used by editing the package.

All arrays and loops take N, M and H from the package. A different code changes only that file. The only assumption is that the node counts keep the index widths that the package derives.

## Interface

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `reset` | in | 1 | asynchronous, active high |
| `inputready` | in | 1 | its rising edge samples `inputwithawgn` and starts a decode |
| `inputwithawgn` | in | 17 × 8 | soft bits, signed; +127 ≈ +3.0 (bit 0), −128 ≈ −3.0 (bit 1) |
| `decoder_output` | out | 17 | decoded codeword, bit i = code bit i |
| `outputready` | out | 1 | goes high when a decode ends and stays high until the next word is initialised |

Start a new word only after `outputready` has risen. An assertion in the controller flags an overlap. The decision rule is L(Q) < 0 → 1, so an LLR of exactly 0 decodes as 0.

Parameters of `ldpc_decoder`:
- `ARCH` (default `ARCH_PARALLEL`);
- `METHOD` (default `CN_MINSUM`);
- `MAX_ITER` (default 20).

Any METHOD can be combined with any ARCH. The original work built the correction-term methods only in the parallel architecture.

## Where this departs from the original description, and how far to trust it

- The parity-check matrix is this design's own (see above).
- The correction term is y(|a|+|b|) − **y(||a|−|b||)**. This is the box-plus identity. Written with a plus sign, the correction would grow instead of shrink for operands that are close in value.
- The channel table is indexed by the 8-bit sample. It gives the same result as comparing the sample against the 61 quantisation points.
- The serial architecture runs the check unit 12 times and the bit unit 17 times per iteration, once per node. This is the only count that gives the published serial latencies. A description that halves the counts would give different ones.
- The inside of each unit (one input per clock), the bit-node saturation, the accumulator width and reset polarity are choices made here. So is keeping `outputready` as a level.
- The probability-domain version of the decoder is not included. That version uses probabilities instead of LLRs and needs a divider in every node.

Every block is checked against an independent reference model (`tb/ldpc_ref_pkg.sv`). The model is written from the equations with real-valued tables, not from the RTL, and compares bit-exactly. The cycle counts above are checked in every configuration. The end-to-end tests compare decoded words and iteration counts against the model for:
- noiseless codewords;
- random noisy codewords;
- words that hit the iteration limit.

The model states what the hardware should compute. It does not claim that the hardware reaches the error rates of the original work. No long frame-error-rate run over 10⁶ words per SNR point has been made.

### Error rate and the LLR scale

`tb_ldpc_fer` runs a short sweep: 40 words at each of 1.5, 2.0, … 5.0 dB through the four parallel methods. It takes SNR per unit-power symbol. Its frame error rates are only indicative at this word count, but they show one real effect:

- min-sum decodes every frame from 3 dB upward;
- the three correction-term methods still lose a few frames in ten at 4–5 dB.

The cause is the channel scale. The input table computes L(p) = X, which is 2X/σ² with σ² fixed at 1, and it saturates at 3.0. At high SNR the true LLRs are several times larger. Min-sum does not care about a common scale factor. A correction term of fixed size, however, then removes too much of a message that is too small. To make the correction methods pay off, use a channel table scaled to the actual noise variance, together with a wider message format or a larger LSB. Change `channel_llr` together with the constants of `corr_y`.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ldpc_pkg.sv tb/ldpc_ref_pkg.sv tb/tb_ldpc_decoder.sv \
    --top-module tb_ldpc_decoder -o sim && ./obj_dir/sim
```

| testbench | what it runs |
|---|---|
| `tb_ldpc_decoder` | default decoder end to end: 121 noiseless and 6 noisy words. It counts one-iteration decodes, multi-iteration decodes, iteration-limit stops and saturations, and fails if any of them never happened. |
| `tb_ldpc_variants` | the other configurations: parallel LUT, piecewise and linear; semi-parallel and serial min-sum. Checks their latencies of 2 + 65k, 2 + 108k and 2 + 558k cycles. |
| `tb_ldpc_fer` | the four parallel methods over 8 SNR points, 40 words each. Checks results and latency against the model, prints frame error rates. |
| `tb_ldpc_<block>` | one per block, against the model, including its latency |

To change the design:
- another code: edit `H`, `N` and `M` in `rtl/ldpc_pkg.sv`;
- another message scale or table: edit `corr_y` and `channel_llr` in the same file;
- another iteration limit: set `MAX_ITER`.
