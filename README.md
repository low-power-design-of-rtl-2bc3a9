# Low-power tree-search vector quantizer encoder

This is a video vector-quantization (VQ) encoder built for low power. It
takes 4x4 blocks of 8-bit grey-scale pixels and replaces each block by the
8-bit index of the nearest-looking entry in a 256-entry codebook, which
compresses the image 16:1. A receiver with the same codebook decodes by table
look-up.

The encoder does not compare a block with all 256 codewords. It walks a binary
tree of codewords eight levels deep, and at each level makes one decision:
"is the block closer to the left or to the right codevector?" Two algebraic
tricks make each decision cheap. The codebook is also split so that every
tree level has its own small memory and its own datapath. The eight levels
then form a pipeline that works on eight blocks at once, so the clock can run
eight times slower than a single shared datapath would need. The slower clock
allows a much lower supply voltage, and the small memories cost less energy
per access.

## The decision at one tree node

A node holds two codevectors, `Ca` (left, index bit 0) and `Cb` (right, index
bit 1). The squared-error distortion of the input vector `X` to each is
`D(X,C) = sum_i (C_i - X_i)^2` over the 16 pixels. The difference of the two
distortions can be regrouped as

    D(X,Ca) - D(X,Cb) = K + sum_i 2 * X_i * d_i
    with  d_i = Cb_i - Ca_i          (16 words, stored)
          K   = sum_i (Ca_i^2 - Cb_i^2)  (1 word, stored)

The `X_i^2` terms cancel, so a node needs 16 multiplications instead of 32.
It also needs 17 memory reads instead of 32. The factor 2 is a wired shift.
If the result is negative, `Ca` is closer and the bit is 0. Otherwise the bit
is 1, so a tie goes right. The bits pick the path from the root:
the level-1 bit is the MSB of the final index, and the bits decided so far
are the address of the node at the next level.

Stored words are 9-bit two's complement. `d_i` always fits, since it lies
between -255 and 255. `K` can reach +/-1,040,400, so it is stored as
`round(K / 4096)` (half away from zero). The hardware adds it back as
`K_stored * 4096`. This rounding is the only approximation in the datapath.
A decision can differ from the exact squared-error decision only when the two
distortions are within 2048 of each other. The 2^12 scale is set by `K_SHIFT`
in `vq_pkg`.

### Preparing the codebook

The codebook is trained off-line and converted by software into the stored
form. For level `L` (1..8) and node `n` (0 .. 2^(L-1)-1, the index bits of
levels 1..L-1):

* difference word `i` → level `L`, `is_const = 0`, `addr = n*16 + i`,
  `data = Cb_i - Ca_i`
* constant → level `L`, `is_const = 1`, `addr = n`, `data = round(K/4096)`

Write each word through the `wr` port (`vq_pkg::cb_wr_t`): one word per
cycle with `en = 1`, where `level = L-1`. The whole codebook is 255 x 17 = 4335
writes. Load it before sending vectors; no read/write interlock exists.

## Pipeline and timing

`vq_tsvq_enc` chains eight `vq_stage` instances. Each stage decides one level
in 18 clock cycles:

| cycle | memory                     | datapath                         |
|-------|----------------------------|----------------------------------|
| 0     | read `d_0`                 | load pixel operand `X_0`         |
| 1..15 | read `d_c`                 | MAC word c-1, load `X_c`         |
| 16    | read `K` (17th access)     | MAC word 15                      |
| 17    | —                          | add `K*4096`, sign → index bit; result handed on |

A stage can take a new vector in its cycle 17, so the stages run in
lock-step. The encoder accepts one vector every 18 cycles, and the index
appears 8 x 18 = 144 cycles after its vector was accepted. At the target
video rate, 240x128 pixels at 30 frames/s, there are 1920 blocks per frame:
one every 17.4 us. That needs a clock of about 1.04 MHz, a period of about
960 ns.

Interface of `vq_tsvq_enc`:

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; synchronous active-low reset (resets the controllers only) |
| `in_valid`, `in_ready`, `in_vec` | in/out/in | vector handshake; `in_vec[i]` is pixel i (row-major 4x4); taken on an edge where both are high |
| `out_valid`, `out_index` | out | one-cycle pulse with the 8-bit index; there is no back-pressure |
| `wr` | in | codebook write port, see above |
| `busy[7:0]`, `row_rd[7:0]` | out | per-level stage busy, and per-level memory-array activation (for activity counting) |

`in_ready` is high only when level 1 is idle or in its last cycle. If
`in_valid` is held high, a new vector enters every 18 cycles.

## Per-level memories and wide reads

Level `L` stores 2^(L-1) nodes: 16 difference words per node in
`vq_cb_mem` and one constant per node in `vq_const_mem`. This gives 144
bits of difference words at level 1 and 18,432 bits at level 8, 36,720 bits
in all.

`vq_cb_mem` can use wide rows of `PAR` words. A read at a word address that is
a multiple of `PAR` activates the array once and latches the whole row. The
next `PAR-1` reads come from the latch through a multiplexer. The array is
therefore activated four times per node instead of sixteen, which saves
energy because an array access costs far more than a multiplexer. On small
memories the extra width costs too much area. The stages therefore choose
`PAR = 4` when the level memory holds at least `MIN_PAR_BITS` = 1024 bits
(levels 4-8) and `PAR = 1` below that (levels 1-3). A wide row must be read
in order, starting from its first word. The controller always reads that way.

Memory outputs hold their last value, and the pixel operand is a register
loaded only when needed. An idle stage therefore keeps its multiplier and
adders still rather than letting them compute on changing inputs.

## Files

| file | contents |
|------|----------|
| `rtl/vq_pkg.sv` | widths, cycle budget, types, codebook-write struct |
| `rtl/vq_tsvq_enc.sv` | top: eight chained level stages |
| `rtl/vq_stage.sv` | one level: data and index registers, controller, PE, memories |
| `rtl/vq_ctrl.sv` | 18-cycle node sequencer and handshake |
| `rtl/vq_pe.sv` | MAC with wired x2, final add of the constant, sign decision |
| `rtl/vq_cb_mem.sv` | difference-word memory, serial or wide-row with latch and mux |
| `rtl/vq_const_mem.sv` | per-node constant memory |
| `tb/tb_vq_ref_pkg.sv` | reference arithmetic used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
Reference values come from integer arithmetic on the codevectors themselves,
not from the stored words:

* `tb_vq_tsvq_enc` runs the encoder at its default size with a random
  255-node codebook. It sends 300 random vectors with gaps and input stalls,
  then one full 240x128 synthetic frame (1920 vectors) back-to-back. It
  checks every index against a software tree walk. It also checks the
  144-cycle latency, the 18-cycle vector rate, the frame time and the
  array-activation count per level. It counts the cycles in which all eight
  stages are busy, stall cycles and idle cycles, and fails if any is zero.
* `tb_vq_stage` tests a serial level (2) and a wide-row level (5) side by side.
* `tb_vq_pe` covers the extreme operands and an exact tie.
* `tb_vq_ctrl` checks the cycle schedule every cycle under random input.
* `tb_vq_cb_mem` and `tb_vq_const_mem` check data, latency, output hold and activation counts.

To run one with Verilator 5:

    verilator --binary --timing --assert --top-module tb_vq_tsvq_enc \
        rtl/vq_pkg.sv tb/tb_vq_ref_pkg.sv rtl/vq_cb_mem.sv rtl/vq_const_mem.sv \
        rtl/vq_ctrl.sv rtl/vq_pe.sv rtl/vq_stage.sv rtl/vq_tsvq_enc.sv \
        tb/tb_vq_tsvq_enc.sv
    ./obj_dir/Vtb_vq_tsvq_enc

The full-size test builds and runs in well under a minute.

## What this RTL does not model, and choices of its own

* Power itself is not modelled. The low-power means are structural: per-level
  memories, wide reads, held operands and a slow clock. The circuit
  techniques they were designed with are not in the RTL: reduced-swing SRAM
  bit lines, SRAM banks of which only one is active, true-single-phase-clock
  registers, and a low-power cell library. The memories are plain arrays and
  the registers are ordinary flip-flops.
* These are this design's own choices:
  * the valid/ready handshake and the parallel 128-bit vector input
  * the codebook write port
  * the synchronous reset, which covers control state only
  * the 2^12 scale of the stored constant
  * ties going right
  * the 24-bit accumulator
  * the 1-Kbit threshold between serial and wide-row memories
  * keeping each level's constants in a separate small memory
* The output has no back-pressure. A consumer must take `out_index` in the
  cycle `out_valid` is high.
* Only the main distributed-memory encoder is provided. The single-memory
  arrangement, in which one datapath and one 36-Kbit memory serve all levels
  in 144 cycles, is not. Neither is a full-search encoder.
