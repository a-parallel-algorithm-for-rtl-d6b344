# Parallel look-up-table inverse halftoning engine

Inverse halftoning turns a two-level (black/white) halftone image back into
a grey image. The look-up-table method does this by describing each pixel by
a *template*, the bits of a small window of halftone pixels around it, and
reading the pixel's grey value from a table indexed by that template. The
table is learned offline: every template seen in training images gets the
mean grey value of the pixels where it occurred.

A single table can answer one pixel per access. This engine answers four per
clock without storing the table four times. The table is split into eight
smaller tables (sLUTs). A cheap hash of the template, the *slut number*,
says which sLUT holds it. Four templates whose slut numbers differ are looked
up at the same time in four different sLUTs. When two or more of them hash to
the same sLUT, only the highest-numbered one is looked up. Each template that
lost copies the grey value of its right-hand neighbour. The total number of
table entries stays that of the single table. The price is some image
quality on the pixels that had to copy.

The algorithm and block structure follow Siddiqi and Sait, "A Parallel
Algorithm for Inverse Halftoning and its Hardware Implementation". There the
design was split over two CPLDs with external CAMs and SRAMs. Here it is one
synthesizable SystemVerilog design, with the memories written as arrays.

## Data flow

```
 in_t[0..3] (t1..t4, 19 bits each)
      |
 cpld1_dispatch  ── per lane: slut_index (XOR m, CSA tree, sign fix, 3 LSBs)
      |                       + template number 001..100
      |             4 x slut_demux (1-to-8)  →  8 x slut_priority_mux
      |  g1..g8: template + number            (register)
      v                                 \
 8 x slut: slut_cam → contone_rom        template numbers, delayed 2 clocks
      |  c1..c8: grey values                    /
      v                                        v
 cpld2_compensation  ── 4 x pixel_comp_lane + neighbour copy   (register)
      |
 grey[0..3] = G1..G4, dropped[3:0]
```

## Choosing an sLUT: the slut number

The slut number must spread the templates fairly evenly over the eight
tables. It must also be cheap enough to compute four times per clock. For a
P-bit template `t` and a constant `m` it is:

1. `v = t XOR m`.
2. `s` = number of ones in `v`, counted by a carry-save adder tree
   (`csa_tree`).
3. If `t < m` (unsigned, bit 0 least significant), replace `s` by its two's
   complement.
4. slut = the three low bits of the result. In other words, `s mod 8`, or
   `(-s) mod 8` when `t < m`.

`m` is the integer mean of all templates in the full table, taken as binary
numbers. The table builder computes it once and gives it to the engine on
the `m` input. The builder must use exactly this function when it places
templates into sLUTs. Otherwise a template is looked for in the wrong table.
`tb/tb_pih_top.sv` contains a complete reference builder: training,
computing `m`, hashing and placing entries.

Example with P = 4: for t = 0011 and m = 0110, v = 0101 and s = 2. Since
t < m, s becomes −2, and its three low bits give slut 6.

### The carry-save adder tree

`csa_tree` counts ones with 3:2 counters (full adders). It works level by
level. At each level, every column of equal bit weight is cut into groups of
three bits, and each group feeds one cell. The cell's sum stays in the same
column and its carry moves up one column. Bits that do not make up a group
of three wait for the next level. Once every lighter column is down to a
single bit, a column holding two bits uses a cell whose third input is tied
to 0. So the last carries ripple through a few zero-input cells at the
bottom. The tree is generic in P:

| template | P  | cells | levels | zero-input cells |
|----------|----|-------|--------|------------------|
| 16pels   | 16 | 15    | 7      | 4                |
| 19pels   | 19 | 16    | 6      | 2                |
| Rect     | 21 | 18    | 7      | 2                |

The cell counts equal those of the published trees. The exact wiring between
cells is this design's own.

## Conflicts: priority and compensation

Each lane gets a template number: t1 = 001, t2 = 010, t3 = 011, t4 = 100.
The number 000 means "no template". The `slut_demux` of each lane puts the
template and its number on the output named by its slut number, and zeros on
the other seven. For each sLUT, a `slut_priority_mux` passes the present
input with the highest number. So t4 is never dropped, and t1 is dropped
whenever any other lane shares its sLUT.

After the lookup, `cpld2_compensation` finds, for each lane, the sLUT output
that carries the lane's number (`pixel_comp_lane`: decode, then OR of the
selected grey values). When the number is not there, the lane was dropped,
and it copies its right-hand neighbour:

- `CHAIN = 1` (default): a dropped lane takes the neighbour's *final*
  value. A run of dropped lanes therefore all copy the first kept lane to
  their right. t4 is always kept, so all four outputs are real table values.
- `CHAIN = 0`: a dropped lane takes the neighbour's *own* looked-up value,
  which is 0 when the neighbour was dropped as well. This is the published
  compensation equations taken literally. Those equations also state that
  the block outputs four valid values, which only `CHAIN = 1` guarantees in
  every case.

The `dropped` output reports which lanes were compensated. On the
testbenches' Floyd–Steinberg images, 20–23 % of the pixels are dropped. The
published figures for photographs are 16–32 %.

## The smaller tables: CAM + ROM

Each `slut` is a `slut_cam` followed by a `contone_rom`. The CAM holds the
templates of its sLUT and returns the address where the template is stored.
That address reads the 8-bit grey value from the ROM. With a D-bit address,
2^D − 1 entries are usable (addresses 1..2^D−1). Address 0 is the CAM's
answer for "not stored" or "no template offered". ROM word 0 holds a
fallback grey value that the loader chooses; the testbenches use 128.

The default is `D = 11`: 2047 entries per sLUT and 16376 in all. Tables
trained on three 512 × 512 photographs were reported to average about 2K
entries per sLUT. An sLUT with more entries than that cannot hold them all.
The templates left out then read the fallback value. In that case raise
`D`.

The CAM is a register array with a parallel compare and a priority encoder:
the lowest matching address wins. This is the simplest thing that behaves
like a CAM. For an FPGA or ASIC, a vendor CAM or a hashed RAM lookup with
the same two-clock interface would replace it. At the default size the register CAM is
eight times 2047 19-bit comparators. It simulates quickly, but generic logic
synthesis of it is slow. Treat it as a functional model of the CAM part.

### Loading the tables

Loading happens through the load port of `pih_top`, one entry per clock,
before any templates are sent. Loading while templates flow is not supported,
and an assertion checks for it.

- `ld_en = 1`, `ld_slut = k`, `ld_addr = a` (1..2^D−1), `ld_t` = template,
  `ld_grey` = grey value: stores the entry in sLUT k.
- The same with `ld_addr = 0`: writes only the fallback word of sLUT k.

Reset (`rst_n` low, synchronous) empties all CAMs. ROM contents are kept
but unreachable until reloaded.

## Interface and timing of `pih_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `m` | in | P | hash constant, held steady while running |
| `in_valid` | in | 1 | `in_t` holds four templates |
| `in_t[0..3]` | in | 4 × P | t1..t4: four horizontally adjacent pixels, left to right |
| `ld_en`, `ld_slut`, `ld_addr`, `ld_t`, `ld_grey` | in | 1, 3, D, P, 8 | table load |
| `out_valid` | out | 1 | `grey` holds a result |
| `grey[0..3]` | out | 4 × 8 | G1..G4, grey values of t1..t4 |
| `dropped` | out | 4 | lane i was compensated from its neighbour |
| `slut_hit` | out | 8 | sLUT k found its template (debug/statistics) |

Parameters: `P = 19` (template bits), `D = 11` (sLUT address bits),
`CHAIN = 1`.

There are four register stages: dispatch, CAM, ROM and compensation. A
group taken at clock edge n appears on `grey` after edge n + 3, that is,
four clocks after it was presented. One group of four templates can enter
every clock, with no stalls. A clock with `in_valid` low leaves a bubble.
The template numbers travel beside the sLUTs in a two-stage delay line, so
that they meet the grey values at the compensation stage.

The engine takes finished templates. Extracting the 19-pixel windows from
the image (line buffers, window shape and edge handling) happens outside it.

## Files

| file | contents |
|------|----------|
| `rtl/pih_pkg.sv` | lane/sLUT counts, widths, template-number type |
| `rtl/csa_tree.sv` | ones counter from carry-save adders |
| `rtl/slut_index.sv` | slut number of one template |
| `rtl/slut_demux.sv` | 1-to-8 demultiplexer for one lane |
| `rtl/slut_priority_mux.sv` | highest-number-wins selector for one sLUT |
| `rtl/cpld1_dispatch.sv` | the dispatch half: 4 lanes → 8 sLUT ports, registered |
| `rtl/slut_cam.sv` | CAM of one sLUT |
| `rtl/contone_rom.sv` | grey-value memory of one sLUT |
| `rtl/slut.sv` | CAM + ROM pair |
| `rtl/pixel_comp_lane.sv` | finds one lane's grey value among the 8 sLUT outputs |
| `rtl/cpld2_compensation.sv` | the compensation half, registered |
| `rtl/pih_top.sv` | the whole engine |

Each module has a self-checking testbench `tb/tb_<module>.sv`. The CAM's is
`tb/tb_slut_cam.sv`. Each prints `TB_RESULT checks=N failures=F`. The tests
of the memories run at reduced D to stay short. The engine has two tests:

- `tb/tb_pih_top.sv`: D = 6 on a 64 × 32 image. The tables overflow on
  purpose, so misses and the fallback value are exercised. It checks every
  output value, the `dropped` flags and the four-clock latency against a
  reference model. Each of these must occur at least once: dropped lanes,
  runs of dropped neighbours, table misses, templates below `m`, groups
  with no conflict, and idle clocks.
- `tb/tb_pih_full.sv`: all defaults (P = 19, D = 11) on a 512 × 512 image.
  All 12380 trained templates fit; the fullest sLUT has 1812 entries. Every
  result is checked, and the run prints the dropped share (23.3 %) and the
  PSNR against the grey original. It runs in a few seconds.

Both tests synthesise their own workload. They halftone a ramp-and-disc
image with Floyd–Steinberg error diffusion and read templates through a
19-pixel window of their own choosing: rows −2..+2 holding 3, 5, 5, 5 and 1
pixels. Then they train the table on that image pair.

To simulate with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_pih_top \
    -y rtl rtl/pih_pkg.sv tb/tb_pih_top.sv
./obj_dir/Vtb_pih_top
```

Replace `tb_pih_top` with any other testbench name. `-y rtl` lets Verilator
find each module in its own file. The package has to be named explicitly.

## What is taken from the published design and what is not

Followed: four lanes; eight sLUTs; the slut hash (XOR with `m`, CSA ones
count, two's complement when `t < m`, three low bits); template numbers
001..100; demultiplex, then highest-number priority; CAM + ROM sLUTs with
2^d − 1 entries and 8-bit grey values; compensation from the
next-numbered template.

This design's own choices:

- the pipeline registers and the four-clock latency, and the `in_valid` /
  `out_valid` handshake;
- the table load port and reset behaviour;
- address 0 as the CAM miss code, with a fallback grey value;
- `D = 11`;
- `CHAIN = 1` as the default;
- bit 0 as the least significant bit in `t < m`;
- the CAM built as a register array;
- the CSA wiring.

The published hardware split the work over two chips. Because of pin
limits, it computed the template numbers partly in each chip and used
narrow side channels between them. Here the full 3-bit number of each sLUT
port travels to the compensation stage. That split has no effect on the
function.

Not built: the template fetch from the image, whose window shape and
buffering are not specified. Also not built: the host-side table
construction. It is software, and the testbenches model it.
