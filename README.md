# Unrolled Fast-SSC polar decoder

This design decodes a (1024,512) polar code at one frame per clock cycle. Successive-cancellation
decoding of polar codes is sequential: every bit decision depends on the ones before it. This
decoder does not reuse a few processing elements over and over. It lays out the whole Fast-SSC
decoding schedule of one code as a pipeline. Every operation of the schedule gets a pipeline stage
with its own hardware. 1024 channel LLRs go in each cycle, and 1024 decoded bits come out a fixed
number of cycles later. At 300 MHz this would be 307.2 Gbit/s. No clock frequency has been
measured for this RTL.

The architecture follows the article "High-Throughput Fast-SSC Polar Decoder for Wireless
Communications":

- the deeply pipelined layout;
- the processing elements F, G, C, REP, SPC and Kronecker;
- FIFOs as the alpha and beta memories;
- a two-level controller;
- (6,5,1) fixed-point LLRs.

This RTL is an independent implementation of that description. Where the article leaves a choice
open, the choice made here is listed under "Where this RTL departs or had to choose".

## The decoding tree and how it becomes a pipeline

A polar code of length N is decoded on a binary tree. The root holds the N channel LLRs (alpha).
Each node of length Nv passes LLRs to its left child with the F operation. Once the left child
returns its codeword estimate (beta_l), the node computes the right child's LLRs with the G
operation. It then merges the two children's codewords with the C operation:

    F:  alpha_l[i] = sign(a[i]) sign(a[i+Nv/2]) min(|a[i]|, |a[i+Nv/2]|)
    G:  alpha_r[i] = a[i+Nv/2] + a[i]   if beta_l[i] = 0
                     a[i+Nv/2] - a[i]   if beta_l[i] = 1
    C:  beta_v     = { beta_r , beta_l XOR beta_r }       (upper half, lower half)

Fast-SSC stops descending at subtrees whose frozen pattern has a cheap exact decoder:

| node   | frozen pattern          | decoder                                                   | stages |
|--------|-------------------------|-----------------------------------------------------------|--------|
| Rate-0 | all frozen              | codeword is 0                                             | 0 |
| Rate-1 | no frozen bit           | hard decision (sign bit) of every LLR                     | 0 |
| REP    | only the last bit free  | sign of the sum of all LLRs, repeated                     | ceil(log2(Nv)/2) |
| SPC    | only the first bit frozen, Nv = 4 | hard decisions; on odd parity flip the least reliable bit | 1 |

Other nodes are split. Two shortcuts remove stages:

- When the left child is Rate-0, its codeword is known to be zero. The F stage and the left
  subtree disappear, and the node needs only a G_OR stage (G with beta_l = 0). C then just repeats
  the right codeword.
- G_OR followed by a length-4 SPC node is merged into one RO_SPC stage.

A Rate-1 right child after G_OR costs nothing extra, which is the RO_RI case.

`fssc_node` turns one node into hardware and instantiates itself for the children. The root
instance inside `fssc_decoder` therefore unrolls the whole tree at elaboration time, driven only by
the information-bit mask. For a split node starting at stage S0, the stages run in this order:

    S0              F            -> left subtree starts at S0+1, takes LL stages
    S0+1+LL         G            (alpha of this node comes from an alpha memory, LL+1 stages old)
    S0+2+LL         right subtree, takes LR stages
    S0+2+LL+LR      C            (beta_l comes from a beta memory, LR+1 stages old)

C is left out on the right spine of the tree. Nothing there needs a merged codeword, because the
output is assembled from the leaves. `fssc_pkg::subtree_latency()` walks the pruned tree and
returns the stage count of any subtree. Every module uses it to place its children and size its
memories.

### The default code

The article does not say how its information set was chosen. The default `INFO_MASK` uses the
polarization-weight construction. Index i gets the weight sum_j b_j(i)·2^(j/4) over its binary
digits b_j, and the 512 heaviest indices carry information (on equal weight, the larger index
wins). For N = 16, K = 8 this gives exactly the example tree of the article: Rate-0, REP, SPC and
Rate-1 leaves of length 4.

For (1024,512) the pruned tree has the following sizes. The article's numbers come from its own,
unstated code construction.

|                              | this RTL | article |
|------------------------------|----------|---------|
| leaves: Rate-0 / Rate-1 / REP / SPC | 20 / 41 / 23 / 23 | 14 / 40 / 24 / 26 |
| F / G / G_OR / C operations  | 86 / 86 / 18 / 82 | 89 / 89 / 14 / 85 |
| SPC + RO_SPC stages          | 21 + 2 | 23 + 3 |
| pipeline stages              | 334 | 348 |

The 334 stages are 318 operations, 14 extra stages from splitting REP decoders, the input
register and the output register. The article's 348 stages are 330 operations plus its own splits.
Both G counts include every complement variant of G (the article lists 78 + 3 + 4 + 4).

## Number format

LLRs are sign-magnitude words with one fractional bit. Sign-magnitude makes F cheap: an XOR and a
compare. G converts both operands to two's complement, adds, and converts back.

- The channel LLRs and every LLR reached only through F operations are 5 bits wide (range ±15).
  F cannot grow a magnitude.
- The first G on any path widens the word to 6 bits (range ±31). G results saturate at ±31, so
  they stay representable in sign-magnitude.
- REP sums are exact.
- A zero result is always written with a positive sign. The hard decision "sign bit = 1" therefore
  means "LLR < 0", with ties deciding 0.

The widest G stages, with 256 or more inputs, skip the conversion back to sign-magnitude. The next
stage converts instead: F_with_front_complement, or a G_without_front_complement. This is the
article's balancing trick for the longest vectors. It is encoded in the `IN_TC` parameter that a
node passes to its right child. For N = 1024 this gives:

- 7 F stages with input conversion;
- 4 G stages that leave their output unconverted;
- 3 G stages that do neither conversion;
- 4 G stages that skip only the input conversion.

These are the article's counts.

## Memories and control

An intermediate vector that is needed again many stages later is written into a `stage_fifo`:

- the node's alpha, waiting for G;
- a left codeword, waiting for C;
- each leaf's decoded bits, waiting for the output stage.

Reads happen in write order, exactly D stages later, so a FIFO with a write address and a read
address replaces a RAM. Each address is a `local_controller` counter that advances only when its
own stage's enable is high. That counter is the second level of the controller. The first level,
`global_controller`, is a chain of flip-flops: `en[0]` is the frame-valid input and `en[k]` is
`en[k-1]` one clock later. Every stage register loads only while its enable is high. Idle cycles
between frames therefore travel down the pipeline as idle stages, and the FIFOs stay aligned
whatever the input pattern. Assertions in `stage_fifo` check that a FIFO is never read empty and
never overflows. A FIFO has exactly D words. The read is asynchronous, so the word being read can
be overwritten in the same cycle.

At the default size, synthesis gives:

- 1.78 Mbit in FIFOs (the article reports 2.37 Mbit for its FPGA build);
- 47.9 k flip-flops in stage registers.

## Constituent decoders

- **REP** (`rep_unit`): converts the inputs to two's complement, then runs an adder tree of
  log2(Nv) levels. A pipeline register sits after every second level. When the number of levels
  is odd, the first stage does only one level. This gives 1, 2, 2, 3, 3, 4 stages for 4, 8, 16,
  32, 64 and 128 inputs. The counts for 8, 16, 64 and 128 inputs are the article's.
- **SPC** (`spc4_unit`): length 4 only; longer SPC-shaped nodes are split.
  - Two comparators find the smaller magnitude in each pair (`min01_flag`, `min23_flag`), and a
    third compares the two winners (`sel`).
  - A judge raises one of D0..D3, and that bit is flipped when the parity of the hard decisions
    is odd.
  - On equal magnitudes the later index is flipped.
  - With `RO=1` the same unit first forms the G_OR sums of 8 parent LLRs (RO_SPC).
- **Kronecker** (`kron_unit`): the leaves produce codewords, and the decoded bits are
  u = beta·G_Nv. This is a log2(Nv)-level XOR butterfly. Frozen positions are forced to 0, so
  their XORs vanish in synthesis. Every leaf converts its codeword in the stage it is produced.
  The last leaf's conversion happens in the output stage.

## Test platform blocks

The article tests the decoder on an FPGA platform. A random source feeds a polar encoder, a
BPSK/AWGN channel, the decoder, and an error counter, and a host reads back the number of error
frames. Three of those blocks are here. They are sized for one frame per clock, so that they can
keep up with the decoder.

- `pf_lfsr`: 64-bit LFSR (x^64 + x^63 + x^61 + x^60 + 1), stepped OUT_W times per clock and
  seeded through `init_lfsr`. The polynomial is this design's choice; the article gives only the
  seed name.
- `pf_polar_encoder`: zeroes the frozen bits and computes x = u·G_N with an XOR butterfly. It
  has one register stage.
- `pf_statistics`: queues the sent frames and compares each decoded frame with the oldest one.
  It counts frames and error frames up to the host's `num_frames`.

## Interface and timing

`fssc_decoder` ports:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset of enables and FIFO addresses |
| `en_cha_alpha` | in | 1 | `llr` holds a frame this cycle |
| `llr` | in | N×5 | channel LLR of code bit i in `llr[i]`, sign-magnitude, 1 fractional bit |
| `u_hat` | out | N | decoded u bits, frozen positions 0 |
| `u_valid` | out | 1 | `u_hat` holds a new frame |

A frame sampled at clock edge t appears with `u_valid` at edge t + NSTAGE, where NSTAGE = 334
for the default code. Frames may come back to back or with any gaps. Data registers are not
reset; only the enables and the FIFO addresses are.

Parameters: `N` (power of two, at most 1024), `INFO_MASK` (bit i = 1 when u_i is an information
bit), `W` (channel LLR width), plus `LAT`/`NSTAGE`, which are derived and should be left alone. The
global widths `QCF`, `QI` and the two's complement threshold `G_TC_MIN` are in `fssc_pkg`.

## Where this RTL departs or had to choose

- **Information set.** Polarization-weight construction, as described above. The article's
  code, and with it its exact stage count of 348, is not known.
- **Splitting.** Only REP nodes are split over several stages. Every other operation is one
  stage, whatever its width.
- **The 5-bit/6-bit boundary.** The article only says that early stages use 5 bits and later
  ones 6. Here the boundary is the first G.
- **Saturation and zero sign.** G saturation at ±31, the positive sign of zero, and the tie rules
  of SPC (later index) and REP (a zero sum decides 0) are this design's choices.
- **Memory depth.** The FIFO depth is D words, not the D+2 words the article budgets for a
  synchronous RAM. Whether a memory becomes registers or RAM is left to synthesis.
- **Test platform.** Only part of the article's FPGA test platform is built: the random source,
  the encoder and the error statistics. The CRC (polynomial not given), the BPSK/AWGN channel
  and the PCIe link are not.
  - A channel model built from a sum of LFSR uniforms simulated correctly, but at 1024 noise
    samples per clock it did not synthesize in reasonable time, so it was left out.
  - The testbenches make their channel LLRs in software.

## Verification

Each block has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

- `tb_fssc_decoder` runs the decoder at its default parameters (N = 1024, 334 stages).
  - It streams 48 frames, back to back and with random gaps. The frames are random information
    bits, polar-encoded, BPSK over AWGN at Eb/N0 from about 7 dB down to 0.5 dB, plus noiseless
    frames.
  - Every output is compared bit for bit with an independent software model of Fast-SSC in
    `tb/fssc_ref_pkg.sv`, written as an iterative tree walk. Noiseless frames must return the
    sent bits.
  - The latency must equal the stage count that the model computes.
  - The default mask must equal the polarization-weight construction computed at run time.
  - It fails if any mechanism is never exercised: idle gaps, back-to-back frames, SPC flips, G
    saturation, REP deciding 1, RO_SPC, G_OR, Rate-1 leaves, or a decoding error at low SNR.
- `tb_fssc_node` decodes a (64,32) code with the root codeword output enabled, 400 frames.
- The unit testbenches (`tb_f_unit`, `tb_g_unit`, `tb_c_unit`, `tb_rep_unit`, `tb_spc4_unit`,
  `tb_kron_unit`, `tb_stage_fifo`, `tb_local_controller`, `tb_global_controller`) compare against
  direct integer or bit models. The REP test includes the stage counts and latencies.
- `tb_pf_lfsr`, `tb_pf_polar_encoder` and `tb_pf_statistics` check the platform blocks against
  a bit-serial LFSR, the matrix definition of G_N, and a running tally of errors.

What is not verified: clock frequency, FPGA resource use, and the bit-error-rate curves. The model
shares the fixed-point rules with the RTL by design, so it checks the hardware against the
algorithm as defined here, not against a floating-point decoder.

## Simulating

Package files must come first. For the full-size end-to-end test:

    verilator --binary --timing -Wno-fatal -Irtl -Itb \
        rtl/fssc_pkg.sv tb/fssc_ref_pkg.sv rtl/*.sv tb/tb_fssc_decoder.sv \
        --top-module tb_fssc_decoder -Mdir obj_dec
    ./obj_dec/Vtb_fssc_decoder

It builds in well under a minute and runs in under a second. Any other testbench runs the same
way with its name swapped in. To decode a different code, instantiate `fssc_decoder` with `N` and
`INFO_MASK`. The pipeline, the memories and the stage count follow automatically.

## Files

| file | contents |
|------|----------|
| `rtl/fssc_pkg.sv` | widths, default mask, node classification, stage counting |
| `rtl/fssc_decoder.sv` | top: input stage, controller, root node, output stage |
| `rtl/fssc_node.sv` | recursive node: F/G/C stages, memories, leaves |
| `rtl/f_unit.sv`, `g_unit.sv`, `c_unit.sv` | F, G (all variants), C stages |
| `rtl/rep_unit.sv`, `spc4_unit.sv`, `kron_unit.sv` | constituent decoders and G_N conversion |
| `rtl/stage_fifo.sv`, `local_controller.sv`, `global_controller.sv` | memories and control |
| `rtl/pf_lfsr.sv`, `pf_polar_encoder.sv`, `pf_statistics.sv` | test-platform source, encoder, error counter |
| `tb/fssc_ref_pkg.sv` | software reference decoder, encoder, code construction |
| `tb/tb_*.sv` | testbenches |
