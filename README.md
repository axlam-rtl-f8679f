# AxLaM: a matrix-multiply accelerator for BERT on the HBM3 logic die

AxLaM runs the matrix products of encoder language models such as BERT-large
on edge devices. It has three ideas:

- **Placement.** The accelerator is small enough (about 2.5 mm² in 65 nm in the
  published design) to sit on the logic die under an HBM3 stack. Every one of
  the sixteen HBM channels then feeds the compute array directly, and DRAM
  traffic is cheap.
- **Number format.** Operands use an 8-bit *approximate fixed-POSIT* (AFPOS)
  format. It is a POSIT whose regime is frozen to one constant, so the
  multiplier is about as cheap as an integer multiplier.
- **Reuse.** Instead of many small processing elements, one *unified PE* holds
  an 8 × 8 grid of 16-wide vector MACs. Each operand word read from a buffer
  feeds eight dot products.

This repository holds synthesizable SystemVerilog for the compute side of that
design: the AFPOS multiplier, the vector MAC, the unified PE, the 8 KB operand
buffers, the accumulation buffer (A.SRAM), the controller and the top level.
The HBM3 stack and its memory controllers are not part of it. Their channels
appear as plain write ports on the top level.

## The AFPOS number format

A POSIT(N, es) word holds a sign, a variable-length regime, es exponent bits
and a fraction. A fixed-POSIT fixes the regime length. AFPOS goes one step
further and fixes the regime *value*: every number carries the same factor
2^β. The regime then needs no bits at all. The configuration used here is
POSIT N = 10, es = 4, β = −7, stored in 8 bits:

```
 bit  7     6..3      2..0
     sign   exp[3:0]  man[2:0]

 value = (-1)^sign * 2^-7 * 2^exp * (1 + man/8)
```

The exponent field is unsigned, so β works as a bias. Magnitudes run from
2^-7 × 1.125 to 2^8 × 1.875. In this RTL the codes with `exp = 0, man = 0`
(either sign) stand for zero, because the format has no natural zero. That
costs the value 2^-7.

### Why the arithmetic is exact and fixed-point

Both operands carry the same 2^β, so a product is

```
a*b = (-1)^(sa^sb) * 2^(2β) * 2^(ea+eb) * (8+ma)(8+mb) / 64
    = (-1)^(sa^sb) * [ (8+ma)(8+mb) << (ea+eb) ] * 2^-20
```

`afpos_mult` forms exactly the bracketed integer: a 4 × 4-bit significand
product shifted left by a 5-bit exponent sum. The result is a signed integer
of 39 bits on a fixed grid with an LSB of 2^-20. It needs no normalisation, no
rounding and no alignment before addition. The adder tree and the accumulators
are ordinary two's-complement adders on the same grid:

| quantity                  | width (signed) | bound                              |
|---------------------------|----------------|------------------------------------|
| one product               | 39 bits        | 225 · 2^30 < 2^38                  |
| 16-wide dot product       | 43 bits        | 16 products                        |
| accumulator / A.SRAM word | 56 bits        | exact up to 131 072 products       |

So every result the hardware produces equals the exact sum of the exact
products. The testbenches use this: they compute references in double
precision from the value formula and compare bit for bit.

Results leave the accelerator as these raw 56-bit sums. To get a real value,
multiply by 2^-20. Converting results back to AFPOS for the next layer is not
described for this design and is not implemented.

## The unified PE and how operands are reused

```
           R buffer 0   R buffer 1  ...  R buffer 7      (one column of R each)
               |            |                |
L buffer 0 --[VMAC]-------[VMAC]--- ... ---[VMAC]        each [VMAC] is a
L buffer 1 --[VMAC]-------[VMAC]--- ... ---[VMAC]        16-wide vector MAC
   ...                                                   plus an accumulator
L buffer 7 --[VMAC]-------[VMAC]--- ... ---[VMAC]
(one row of L each)
```

In every cycle each of the eight L buffers delivers one 16-element word, which
is a slice of one row of L. Each of the eight R buffers delivers the matching
slice of one column of R. The L word of row r goes to all eight vector MACs in
row r. The R word of column c goes to all eight vector MACs in column c. The
64 vector MACs therefore work on one 8 × 8 output tile:

- 16 buffer reads feed 1024 multiplications per cycle;
- each operand element is used eight times;
- at 500 MHz that is 1.024 TOPS, counting a multiply-add as two operations.

Each vector MAC is 16 AFPOS multipliers followed by a four-level balanced
adder tree, with one register at its output. Its 43-bit result is added to the
accumulator of that output element. When the tile's last word has been added,
the 64 sums are written to the A.SRAM together as one entry.

### Buffer layout

There are sixteen operand buffers of 8 KB each: eight for L and eight for R.
Each buffer has 512 words of 16 AFPOS elements. HBM channel `ch` writes buffer
`ch`:

- channels 0–7 are the L buffers, one L row per buffer and tile;
- channels 8–15 are the R buffers, one R column per buffer and tile.

A *row group* is eight consecutive rows of L, one per L buffer. A *column
group* is eight consecutive columns of R. For an inner dimension K, a group
takes `k_words = K/16` consecutive words in each of its buffers. Word `w` holds
elements `16w .. 16w+15` of that row or column.

## Commands, tiling and the accumulation buffer

The controller takes one command (`mm_cmd_t` in `axlam_pkg`):

| field        | bits | meaning                                             |
|--------------|------|-----------------------------------------------------|
| `l_base`     | 9    | first word of L row group 0 in every L buffer       |
| `r_base`     | 9    | first word of R column group 0 in every R buffer    |
| `k_words`    | 10   | inner dimension / 16 (1..512)                       |
| `n_l`        | 7    | number of L row groups (1..64)                      |
| `n_r`        | 7    | number of R column groups (1..64)                   |
| `acc_base`   | 6    | first A.SRAM entry                                  |
| `accumulate` | 1    | add to the sums already in the A.SRAM               |

It computes these tiles:

```
for j in 0 .. n_r-1                      # R operand set (stationary)
  for i in 0 .. n_l-1                    # L groups stream past it
    tile(i,j) = sum_{k < k_words} L[l_base + i*k_words + k] . R[r_base + j*k_words + k]
    A.SRAM[acc_base + j*n_l + i]  =  (accumulate ? old : 0) + tile(i,j)
```

In the loop above, one set of R columns stays in place while every resident L
group streams past it. Then the R set is "refreshed", which means the next
column group is taken. Tiles follow each other with no idle cycle. The
`accumulate` bit splits a long inner dimension over several commands: the
controller reads the old A.SRAM entry as the tile starts, and the PE adds the
new sum to it.

The A.SRAM has 64 entries of one 8 × 8 tile each (28 KB). Assertions in the
controller reject commands that read past the operand buffers or write past
the A.SRAM.

### Mapping a BERT-large layer

Take the Q/K/V projection, (1024 × 1024) · (1024 × 64) with K = 1024. A group
needs 64 words, so one 8 KB buffer holds eight groups:

- the eight R buffers hold all 64 columns of R;
- the eight L buffers hold 64 rows of L.

One command with `k_words = 64, n_l = 8, n_r = 8` computes a 64 × 64 block,
which fills the 64 A.SRAM entries exactly. Sixteen such blocks, with L
reloaded and the results read out in between, cover the whole product.

The other shapes work the same way:

- attention scores: K = 64, so `k_words = 4`;
- multi-head projection and bottleneck expansion: K = 1024;
- bottleneck contraction: K = 4096, so two groups fill a buffer and a command
  covers 2 × 2 tiles.

In all cases the sums stay exact: the worst case, K = 4096, needs 50 bits.

## Timing

| event                                    | cycle                           |
|------------------------------------------|---------------------------------|
| command accepted (`cmd_valid & cmd_ready`) | 0                             |
| buffer reads, one word per cycle         | 1 .. T·k_words                  |
| last tile written to the A.SRAM          | T·k_words + 3                   |
| `done` pulse, `busy` low, ready again    | T·k_words + 4                   |

Here T = n_l · n_r. So `busy` lasts T·k_words + 3 cycles, and the array is
idle only during the three drain cycles of each command.

Inside the pipeline:

- cycle t: buffer read issued;
- t+1: buffer data and control reach the vector MACs;
- t+2: dot products registered, and any A.SRAM partial sum arrives;
- t+3: accumulators updated, and after a tile's last word the tile is written.

The controller accepts no new command until the last tile of the current one
is in the A.SRAM. This is what makes it safe for a command to continue sums
written by the command before it.

The channel write ports accept a word on every cycle, also while a command
runs. Each buffer has separate read and write ports. Software must not
overwrite words that a running command still has to read.

The result port `res_rd_*` reads one A.SRAM entry per cycle, with the data one
cycle after the request. It works only while no command runs
(`res_rd_ready = !busy`), because it shares the A.SRAM read port with the
controller.

## Top-level ports (`axlam_top`)

| port                          | dir | width              | meaning                                   |
|-------------------------------|-----|--------------------|-------------------------------------------|
| `clk`, `rst_n`                | in  | 1                  | clock, asynchronous active-low reset      |
| `ch_wr_en[16]`                | in  | 1 each             | channel write strobe                      |
| `ch_wr_addr[16]`              | in  | 9 each             | buffer word address                       |
| `ch_wr_data[16]`              | in  | 16 × 8 each        | 16 AFPOS elements                         |
| `cmd_valid`, `cmd_ready`      | in/out | 1               | command handshake                         |
| `cmd`                         | in  | `mm_cmd_t` (49)    | command                                   |
| `busy`, `done`                | out | 1                  | command running; one-cycle completion     |
| `res_rd_en`, `res_rd_ready`   | in/out | 1               | read-out request / allowed (idle)         |
| `res_rd_addr`                 | in  | 6                  | A.SRAM entry                              |
| `res_rd_valid`, `res_rd_data` | out | 1, 8 × 8 × 56      | tile of signed sums, LSB = 2^-20          |

The parameters are `ROWS = 8`, `COLS = 8`, `VEC = 16`, `BUF_BYTES = 8192`,
`ACC_ENTRIES = 64` and `ACC_W = 56`. The command fields are sized for these
defaults: at most 512 words per buffer and at most 64 A.SRAM entries.

## Files

| file                    | contents                                                         |
|-------------------------|------------------------------------------------------------------|
| `rtl/axlam_pkg.sv`      | AFPOS field widths, product width, `afpos_t`, `mm_cmd_t`          |
| `rtl/afpos_mult.sv`     | AFPOS multiplier, combinational                                  |
| `rtl/vector_mac.sv`     | 16 multipliers + adder tree, 1-cycle latency                     |
| `rtl/operand_buffer.sv` | 8 KB simple dual-port buffer, 128-bit words                      |
| `rtl/acc_sram.sv`       | A.SRAM, 64 entries × (8 × 8 × 56 bits)                           |
| `rtl/unified_pe.sv`     | 8 × 8 vector MACs, operand broadcast, accumulators               |
| `rtl/pe_controller.sv`  | command sequencer                                                |
| `rtl/axlam_top.sv`      | top level                                                        |
| `tb/tb_*.sv`            | one self-checking testbench per module, plus `tb_bert_workloads` |
| `tb/tb_afpos_ref_pkg.sv`| reference AFPOS arithmetic used by the testbenches               |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. Each
has a watchdog. From the repository root, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/axlam_pkg.sv tb/tb_afpos_ref_pkg.sv \
  rtl/afpos_mult.sv rtl/vector_mac.sv rtl/unified_pe.sv rtl/pe_controller.sv \
  rtl/operand_buffer.sv rtl/acc_sram.sv rtl/axlam_top.sv \
  tb/tb_axlam_top.sv --top-module tb_axlam_top -Mdir obj -o sim
./obj/sim
```

For another testbench, replace the last file and the top module name.
`tb_afpos_mult` needs only the two packages and `afpos_mult.sv`.

What the testbenches cover:

- `tb_afpos_mult` tries all 65 536 operand pairs.
- `tb_vector_mac` checks dot products, the one-cycle latency and
  back-to-back throughput.
- `tb_unified_pe` checks random tiles of 1–6 words, with and without partial
  sums, back to back and with gaps, and that each tile appears two cycles
  after its last word.
- `tb_pe_controller` checks every address and flag cycle by cycle for six
  command shapes.
- `tb_axlam_top` runs the full-size design end to end. It counts each
  mechanism and fails if one never happens:
  - fresh and continued tiles;
  - R refreshes;
  - buffer fills while a command runs;
  - refused read-outs;
  - a command made to wait.
- `tb_bert_workloads` runs one full buffer load for each BERT-large inner
  dimension (K = 64, 1024 and 4096). It checks every output and that all 1024
  multipliers are busy in every compute cycle (99 % utilisation, counting the
  drain cycles). Compiling this testbench takes about a minute, and the
  simulation a few seconds.

All testbenches run at the design's default parameters.

## What comes from the published design and what is this implementation's

These parts follow the published design:

- the AFPOS format: N = 10, es = 4, β = −7, 1 + 4 + 3 stored bits, and the
  value formula;
- the 16-wide vector MAC with a parallel adder tree;
- one unified PE in which each L element serves eight columns and each R
  element serves eight rows, for about 1 TOPS at 500 MHz;
- 8 KB of local buffer per row and per column;
- the A.SRAM that collects the sums;
- every HBM channel connected to the PE.

The published text gives the buffer size in two ways. One passage says 8 KB
for all L buffers. Another says 8 KB per row and per column. This RTL uses
8 KB per buffer, 128 KB in all, which also matches the 64–128 KB range the
buffer study points to.

These are choices of this implementation:

- the bit order of the AFPOS fields and the zero code;
- exact (non-rounding) products and sums, and the 56-bit accumulator;
- one output register in the vector MAC;
- keeping the running sums in registers and writing the A.SRAM once per tile;
- the A.SRAM size, 64 tiles;
- the command format and loop order;
- the mapping of channel *n* to buffer *n*, with 128-bit writes;
- the read-out port and its idle-only arbitration;
- the drain-before-next-command rule.

Not included:

- the HBM3 stack and its memory controllers and PHY, which are standard parts
  that the design uses but does not specify;
- any conversion of results back to AFPOS;
- the non-matrix parts of a BERT encoder, such as softmax, layer
  normalisation, GELU and residual additions. The accelerator computes only
  the matrix products.

The energy, area and accuracy figures of the published design come from
65 nm synthesis and system models. This RTL has not been characterised
against them.
