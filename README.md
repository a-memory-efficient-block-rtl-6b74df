# Block-wise log-MAP decoder with short blocks and long training

A turbo decoder's soft-in/soft-out (SISO) component decoder runs the MAP
(BCJR) algorithm. In its plain form it stores the branch metrics and forward
state metrics of a whole frame. The *block-wise* variant cuts the frame into
blocks of L bits. It runs the backward recursion one block at a time, so only
a few blocks need to be stored. The backward recursion of a block still needs
sensible starting metrics at the block's end. A *training* recursion provides
them: it runs backwards over the following bits, starting from "all states
equally likely", and its results are thrown away.

The usual arrangement makes the training length equal to the block length.
Bit-error-rate studies of this scheme show two things. First, what matters
for decoding quality is the training length, not the block length. Second,
with enough training (about 16–24 steps for a constraint-length-3 code), short
blocks decode as well as long ones. This design therefore keeps a long
training length of 24 steps but uses short blocks of L = 24/μ = 8 bits (μ = 3).
The training then covers μ = 3 whole blocks, and the training passes hand
their metrics on from one block to the next. The shorter block shrinks both
memories:

| memory                  | contents                       | size (bits) |
|-------------------------|--------------------------------|-------------|
| branch metric memory    | 2(μ+1) = 8 blocks × 8 steps × 4 × 16 | 4,096 |
| forward metric memory   | 1 block × 8 steps × 4 states × 16    | 512   |

With training length = block length = 24, the same two memories would need
6,144 and 1,536 bits.

Five recursions run at the same time: one forward, μ = 3 training and one
backward. They share **one** five-stage pipelined add-compare-select
processor. Each clock, a different recursion enters the pipeline.

## The schedule

Time is counted in *time frames* of L trellis steps. For μ = 3, time frame f
does the following:

| unit                          | block worked on | direction | from RTL slot |
|-------------------------------|-----------------|-----------|---------------|
| branch metric unit            | f               | —         | (phase 0)     |
| training pass 1               | f − 1           | backward  | slot 1        |
| training pass 2               | f − 3           | backward  | slot 2        |
| training pass 3               | f − 5           | backward  | slot 3        |
| backward recursion + output   | f − 7           | backward  | slot 4        |
| forward recursion             | f − 6           | forward   | slot 0        |

Follow one block b through this table:

- Its branch metrics are computed in frame b.
- Training pass 1 starts from zero metrics at the end of block b+3 in frame
  b+4, and runs back through block b+3.
- In frame b+5, training pass 2 continues from pass 1's final metrics through
  block b+2.
- In frame b+6, training pass 3 continues through block b+1.
- In frame b+7, the backward recursion continues through block b itself and
  produces the LLRs.

So each backward recursion starts from metrics trained over 3 × 8 = 24 steps.
At any moment the three training passes work on different blocks, one pass per
block.

The forward recursion runs over block b in frame b+6, just before the backward
recursion needs alpha. Branch metrics of block b are read for the last time in
frame b+7, so the branch metric memory holds 8 blocks (region b mod 8).

The general rule is as follows. Training pass p (1..μ) works on block
f−(2p−1), the backward recursion on f−(2μ+1) and the forward recursion on f−2μ.
A frame of M blocks takes M + 2μ + 1 time frames. In frames M and later the
branch metric unit writes zero metrics. Training passes that run past the end
of the frame therefore keep equal metrics, so the last blocks are decoded as
unterminated.

## The time-shared state metric processor (`sm_processor`)

One recursion step is an add-compare-select with the log-MAP correction. It is
split into five pipeline stages:

1. **Trellis MUX**: for every state it picks the two (state metric, branch
   metric) pairs of its incoming branches (forward) or outgoing branches
   (backward).
2. **Two adders**: `a = SM + BM`, `b = SM' + BM'`.
3. **Subtractor, ABS and selection MUX**: `a − b`, its absolute value, and
   `max(a, b)` chosen by the sign of the difference.
4. **LUT and adder**: `max*(a, b) = max(a, b) + fc(|a − b|)`.
5. **Normalization**: the new metric of state 0 is subtracted from all four.

The four states are computed side by side.

A step that enters stage 1 in clock c leaves stage 5 in clock c+4. The
initial state controller (`init_state_ctrl`) stores the result, and it is
fed back to stage 1 in clock c+5. Because the recursion loop is exactly five
clocks, five *independent* recursions can fill the pipeline. The slots are
0 = forward, 1–3 = training passes 1–3 and 4 = backward. Each recursion
therefore advances one trellis step every five clocks, and the decoder
delivers one decoded bit per five clocks.

### Other values of μ

`map_decoder_top` has two parameters: `MU` (default 3, range 2..6) and
`TRAIN` (default 24). The block size is `L = TRAIN/MU`. Every size follows
from them:

- μ+2 pipeline slots;
- 2(μ+1) blocks of branch metric memory;
- one block of forward metric memory.

The pipeline must stay exactly μ+2 registers deep, so that each recursion
gets its own slot:

- **μ = 2.** Stages 3 and 4 are merged into one: subtract, select, LUT and
  add in one clock.
- **μ > 3.** μ−3 extra registers follow the LUT adder. A synthesis tool with
  retiming can spread them over the add-compare-select logic.

The table below shows the memory sizes. `tb_map_decoder_mu` checks μ = 2 and
μ = 4 bit-exactly, including the output clock of every bit.

| μ | L  | slots | branch metric memory | forward metric memory |
|---|----|-------|----------------------|-----------------------|
| 2 | 12 | 4     | 6 × 12 × 64 = 4,608  | 12 × 64 = 768         |
| 3 | 8  | 5     | 8 × 8 × 64 = 4,096   | 8 × 64 = 512          |
| 4 | 6  | 6     | 10 × 6 × 64 = 3,840  | 6 × 64 = 384          |

The initial state controller picks the metrics that enter stage 1:

- **Forward, first step of block 0**: (0, −4096, −4096, −4096). The encoder
  starts in state 0.
- **Forward, otherwise**: its own last result. The forward recursion simply
  continues across block boundaries.
- **Training pass 1, first step of a block**: all zeros.
- **Slot p > 1, first step of a block**: the last result of slot p−1. This is
  the hand-over.
- **Any slot, otherwise**: its own last result.

Slot p−1 writes its final metric of frame f at clock 5L(f+1) + p − 1. Slot p
reads it at clock 5L(f+1) + p. Slot p−1 then overwrites it four clocks later.
This timing is why the slots are numbered in the order the training passes
hand over.

## Forward metric memory addressing (`alpha_mem`)

The forward recursion writes alpha of block b+1 in increasing k. In the same
time frame, the LLR unit reads alpha of block b in decreasing k. The two must
share a single one-block memory. Even blocks are stored at address k and odd
blocks at address L−1−k. In step s, the write of block b+1 and the read of
block b then use the same address. The memory is single-port and
read-before-write: the read returns the old entry in the same clock that
overwrites it.

The read happens in the forward slot's clock (phase 0). The registered output
is held until the backward slot's clock (phase 4), when the LLR unit takes it.

## Arithmetic

- **Code.** Rate-1/2 recursive systematic convolutional code with constraint
  length 3 (four states), feedback 1+D+D² (octal 7) and parity 1+D² (octal 5).
  For state {s1, s0}, the feedback bit is a = u⊕s1⊕s0, the parity is v = a⊕s0
  and the next state is {a, s1}. The trellis functions are in `map_pkg`; the
  generators are the only code-specific part.
- **Inputs.** x, y are 8-bit signed channel LLRs and La is a 10-bit signed
  a-priori value, all in units of 1/4. A positive value favours bit 1.
- **Branch metrics** (`bmu`): `bm[{u,v}] = u·(x+La) + v·y`, as 4 × 16 bits.
  The constant of the bipolar form cancels everywhere.
- **State metrics.** 16-bit signed, normalized to state 0 every step.
- **Correction.** `fc(d) = round(4·ln(1+e^(−d/4)))`, which gives 3 for d = 0,
  2 for 1–3, 1 for 4–8 and 0 from 9. It is implemented as a threshold function
  `fc_lut` in the package.
- **Output** (`llr_unit`, three pipeline stages):
  `L = max*_m[α_k(m)+bm(m,1)+β_k+1(next(m,1))] − max*_m[…u=0…]`.
  The max* tree pairs states (0,1) and (2,3) and then combines the two
  results. The unit also outputs the extrinsic value `Le = L − (x + La)`, for
  the other decoder of a turbo loop, and the hard decision `L > 0`. L and Le
  are 18-bit signed.

## Interface and timing (`map_decoder_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock, asynchronous active-low reset |
| start, num_blocks | in | 1, 10 | start a frame of M = num_blocks (1..1023) blocks when idle |
| busy, done | out | 1 | frame in progress; one-clock pulse at the end |
| in_valid / in_ready | in / out | 1 | symbol handshake |
| in_x, in_y, in_la | in | 8, 8, 10 | x_k, y_k, La_k in bit order |
| out_valid | out | 1 | result valid (no back-pressure) |
| out_idx | out | 13 | bit index k |
| out_llr, out_ext, out_hard | out | 18, 18, 1 | L(d_k), Le(d_k), decided bit |

- **Input.** One symbol is requested in phase 0 of every step of time frames
  0..M−1, so once every five clocks. If `in_valid` is low then, the whole
  decoder holds (a stall) until it rises.
- **Output.** Block b comes out during time frame b+7, one bit every five
  clocks, from bit 8b+7 down to 8b.
- **Exact timing without stalls.** Cycle 0 is the first clock after `start`
  is taken. Bit k = 8b + (7−s) appears at clock (b+7)·40 + 5s + 7.
- **Frame length.** A frame takes (M+7)·40 clocks plus four drain clocks, and
  only one frame is decoded at a time.
- **Block size.** Frames must be a whole number of 8-bit blocks; pad shorter
  frames with zero-valued symbols.

## Files

| file | content |
|------|---------|
| `rtl/map_pkg.sv` | default μ and training size, widths, types, trellis functions, max* correction |
| `rtl/map_decoder_top.sv` | the decoder |
| `rtl/map_ctrl.sv` | time frame / step / slot counters and the schedule above |
| `rtl/bmu.sv` | branch metric unit |
| `rtl/bm_mem.sv` | circular branch metric memory of 2(μ+1) blocks, 8 by default (1 write, 1 asynchronous read port) |
| `rtl/sm_processor.sv` | (μ+2)-stage time-shared ACS processor |
| `rtl/init_state_ctrl.sv` | per-slot metric registers and start/hand-over selection |
| `rtl/alpha_mem.sv` | one-block forward metric memory |
| `rtl/llr_unit.sv` | LLR, extrinsic value, hard decision |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_map_decoder_mu.sv`, `tb/map_mu_tester.sv` | end-to-end test of the μ = 2 and μ = 4 builds |

## Verification

Every testbench compares against values it computes itself, in plain integer
and real arithmetic. It prints `TB_RESULT checks=N failures=F`.

`tb_map_decoder_top` covers the whole decoder:

- It encodes random bits with a behavioural model of the encoder, adds noise
  and decodes four frames: 3 blocks without noise, 1 block, 6 blocks with
  30 % input stalls and random a-priori values, and 640 blocks (5,120 bits,
  the largest UMTS turbo frame of 5,114 bits rounded up).
- A reference model runs the same block-wise algorithm. It uses unnormalized
  32-bit metrics, and the correction term is computed with `$ln`/`$exp`.
- Every LLR, extrinsic value and hard decision must match exactly, and each
  bit index must appear once.
- In stall-free frames, the clock of every output is checked against the
  timing formula above.
- It counts stalls, training hand-overs, forward continuation across blocks,
  padding steps, reversed-address writes and applied max* corrections, and
  fails if any of them never happens.

`tb_map_decoder_mu` runs the same kind of check on the μ = 2 and μ = 4
builds: four frames each, exact results, and output clocks checked.

The unit testbenches check:

- the ACS pipeline with random slots, directions and enable gaps;
- the hand-over selection rules;
- the read-before-write memory;
- the LLR arithmetic;
- every schedule output of the controller, in every clock.

To simulate with Verilator:

```
verilator --binary --timing --assert -y rtl rtl/map_pkg.sv \
          tb/tb_map_decoder_top.sv --top-module tb_map_decoder_top
./obj_dir/Vtb_map_decoder_top
```

The same command with another `tb/tb_<module>.sv` runs that module's test.
Add `-y tb` for `tb_map_decoder_mu`. The whole end-to-end run takes well under
a second.

## Design choices and limits

What the architecture takes as given, and this RTL follows:

- a block size of training size/μ;
- μ = 3 with a training size of 24 as the main configuration, with μ = 2 and
  μ = 4 as alternatives;
- the time-frame schedule of the forward, training and backward recursions;
- one μ+2-stage pipelined metric processor shared in time by μ+2 recursions;
- the stage contents of that processor: trellis MUX, adders,
  subtract/abs/select, LUT + adder, normalization;
- the memory sizes.

What this RTL chose itself:

- the code generators (7, 5);
- all word widths. The 16-bit metrics are consistent with the memory bit
  counts above, but no width is stated;
- the 1/4 fixed-point scale and the correction table;
- normalization by subtracting state 0;
- forward start in state 0, unterminated frame end and zero-metric start of
  training;
- the valid/ready input, the output order (reverse within a block, with an
  index) and the lack of output back-pressure;
- the alternating-address trick that fits the forward metrics into one block
  of memory;
- processing the four states in parallel;
- taking the stored alpha and the LLR unit's beta from the stage-1 inputs of
  the pipeline instead of from its stage-5 output. The values are the same,
  one recursion step earlier.

Further limits:

- **Other μ.** The five-stage split above is the one given for μ = 3. For
  other μ the split is this design's own; see "Other values of μ".
- **Not included.** The turbo-level parts are not included: the two
  constituent encoders, the interleaver and deinterleaver, and the iteration
  loop that exchanges extrinsic values between two of these decoders. The
  interleaver permutation belongs to the system standard. `out_ext` and
  `out_hard` are the hooks such a loop would use.
- **Error-rate performance.** The bit-error-rate advantage of long training is
  a property of the algorithm. The testbenches check bit-exactness against the
  reference model, not error rates.
