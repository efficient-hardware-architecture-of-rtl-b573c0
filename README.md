# Unified 4x4 / 8x8 / 16x16 forward HEVC transform

HEVC codes prediction residuals with 2-D integer transforms of several
sizes. This RTL computes the forward 4x4, 8x8 and 16x16 core transforms
with **one** 1-D datapath for all three sizes and no multipliers. It relies
on a property of the HEVC matrices: after the first butterfly, the even
half of an N-point transform is the N/2-point transform. If the upper
inputs of the 16-point datapath are held at zero, its butterflies pass the
lower inputs straight through, and the 8-point (or 4-point) result appears
on a fixed subset of its outputs. The 2-D transform is a row pass, a
transposition through sixteen FIFOs, and a column pass on a second copy of
the same 1-D unit.

```
 In0..In3 ─► input_regs ─► transform_1d ─► 16 x row_fifo ─► transform_1d ─► output_mux ─► Out0..Out3
 (4/cycle)   (MUX + Src0..15) (rows)        (row i -> FIFO i)  (columns)      (4/cycle)
                 ▲                ▲                ▲                ▲              ▲
                 └────────────────┴──── control_unit ──────────────┴──────────────┘
```

## How the three sizes share one datapath

`transform_1d` has 16 inputs `Src0..Src15` and 16 outputs `Dst0..Dst15`.
Its stages are:

| stage | logic | output |
|---|---|---|
| 1 | 16-point butterfly: `e(i) = s(i)+s(15-i)`, `o(i) = s(i)-s(15-i)`, i = 0..7 | 8 sums, 8 differences |
| 2 | 8-point butterfly on the sums; `m_block` on the 16-point differences | Dst1, 3, ..., 15 |
| 3 | 4-point butterfly on the 8-point sums; `k_block` on the 8-point differences | Dst2, 6, 10, 14 |
| 4 | `u1_block` on the 4-point butterfly outputs | Dst0, 4, 8, 12 |

For the 8-point transform only `Src0..Src7` carry data. The 16-point
butterfly then gives `e(i) = s(i)` and the rest of the datapath computes
the 8-point transform. Coefficient k lands on `Dst(2k)`. For the 4-point
transform only `Src0..Src3` carry data, and coefficient k lands on
`Dst(4k)`. The other outputs carry meaningless values. `dct_pkg::gather`
picks coefficient k from `Dst(k*16/N)`.

Every constant product is made of shifted copies of the operand added
together:

* `u1_block` forms 83x as `(x<<6)+(x<<4)+(x<<1)+x` and 36x as
  `(x<<5)+(x<<2)`. The whole block uses 10 adders and 12 shifts.
* `k_block` applies the 8-point odd rows 89/75/50/18.
* `m_block` applies the 16-point odd rows 90/87/80/70/57/43/25/9.
* Both use `dct_pkg::shift_add_mul`. With a constant coefficient, this
  function elaborates to adders only.

The coefficients are the standard HEVC integer DCT ones.

**Latency.** Four register stages hold logic. A delay line of `LAT-4`
registers follows, so results leave exactly `LAT` cycles (default 12)
after they enter, for every size. A retiming synthesis run can move those
registers into the adder trees. The unit accepts a new vector every cycle.

## Transposition through row FIFOs

Each `row_fifo` holds one transformed row. The row transform delivers a
whole row in one cycle, and the row is written into its FIFO in one load:
row i goes to FIFO i. Once all N rows are stored, FIFOs 0..N-1 are popped
together. Each pop gives one element from every row, so one pop yields one
column of the intermediate matrix. That column feeds the second 1-D unit
directly.

An empty FIFO reads as zero. For N < 16, FIFOs N..15 are never loaded, so
they supply the zero inputs the smaller transforms need. Storage is
16 FIFOs × 16 words × 32 bits = 8,192 bits. Assertions flag a load into a
non-empty FIFO and a pop from an empty one.

## Schedule and interface

The block `control_unit` sequences one block of N×N samples, with
P = N/4 groups per row:

1. **READ**: N rows, P cycles each. `input_regs` steers group g of a row
   into `Src(4g)..Src(4g+3)`. At the start of a block it clears every
   register not written in that cycle. A complete row enters the row
   transform the cycle after its last group.
2. **DRAIN**: row results arrive LAT cycles later. Each one is loaded into
   the next FIFO.
3. **COLS**: the cycle after the last row is loaded, the FIFOs are popped,
   once every P cycles, N times.
4. **FLUSH**: `output_mux` writes each column result on Out0..Out3 over P
   cycles. Cycle c carries coefficients 4c..4c+3. `done` is high together
   with the last group.

Ports of `dct2d_top`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `sel` | in | 2 | size: 0 = 4x4, 1 = 8x8, 2 = 16x16 (3 acts as 16x16); sampled with `start` |
| `start` | in | 1 | first input group of a block is on `in_data` |
| `in_data` | in | 4 × 32 | four residual samples; rows top to bottom, each row left to right, on consecutive cycles |
| `busy` | out | 1 | block in flight; `start` is ignored |
| `out_data` | out | 4 × 32 | four coefficients; column 0 first, then column 1, …; rows 4c..4c+3 in group c of a column |
| `out_valid` | out | 1 | `out_data` is valid |
| `done` | out | 1 | high with the last output group |

After `start`, the remaining N·N/4 − 1 input groups must follow with no
gaps. There is no back-pressure on the output. A new block can start the
cycle after `done`.

**Cycle count** per block, from the start cycle to the done cycle
inclusive: `2·N·N/4 + 2·LAT + 2`. With LAT = 12 this is **34, 58 and 154
cycles** for 4x4, 8x8 and 16x16. The architecture this design follows
reports 33, 69 and 172 cycles, without saying how those counts arise.
This schedule reproduces the structure (N/4 read cycles per row, 12
compute cycles, N/4 write cycles per column) but not those exact numbers.

## Arithmetic range

No rounding or scaling happens between the passes. The output is exactly
`C·X·Cᵀ`, where C is the N-point HEVC matrix (rows 0..N-1, entries 64,
90, 89, …), taken modulo 2³².

The largest sum of absolute values in a matrix row is 1024 (row 0 of the
16-point matrix). The result therefore cannot overflow for inputs with
|x| ≤ 2047, which covers residuals up to 12 bits. For 8-bit video, the
residuals are 9 bits.

An HEVC encoder normally shifts right with rounding after each pass. In
HM the shifts are log2(N) − 1 + (bitDepth − 8) and log2(N) + 6. To get
coefficients at HEVC scale, apply the total shift to `out_data` afterwards.
The results will differ from HM's in the last bit where HM rounds between
the passes.

## Where this design departs from the architecture it follows

* **Coefficients.** The original uses a "modified" integer transform from
  the same authors' earlier work. Only its 4-point part, block U1, is
  given. Here the 8- and 16-point odd parts use the standard HEVC
  coefficients.
* **Shift stage.** The original ends the 16-point odd part with a shift
  right by 3, which belongs to its modified coefficients. It is left out
  here: with the standard coefficients, that output needs no shift.
* **Odd-part sub-blocks.** The original splits the 8-point odd part over
  three sub-blocks (K1–K3) and the 16-point odd part over three more
  (M1–M3). Their contents are not known. `k_block` and `m_block` each
  compute the whole odd matrix product instead.
* **Handshake.** `start`, `busy` and `out_valid` are additions. The
  original shows only clock, reset, size select, four inputs, four outputs
  and done.
* **Cycle counts.** They differ, as given above.
* **Block overlap.** Blocks do not overlap: a block's row pass starts only
  after the previous block is done.
* **Not built.**
  * The inverse transform: the original says its structure applies to it
    but presents only the forward one.
  * The 32x32 transform.

## Files

* `rtl/dct_pkg.sv`: word and vector types, size encoding, `shift_add_mul`,
  `gather`.
* `rtl/u1_block.sv`, `rtl/k_block.sv`, `rtl/m_block.sv`: combinational
  parts of the 1-D datapath.
* `rtl/transform_1d.sv`: pipelined unified 1-D unit (parameter `LAT`,
  at least 4).
* `rtl/input_regs.sv`, `rtl/row_fifo.sv`, `rtl/output_mux.sv`,
  `rtl/control_unit.sv`: the rest of the 2-D datapath and its control.
* `rtl/dct2d_top.sv`: the top level (parameter `LAT`).
* `tb/tb_ref_pkg.sv`: a reference model. It builds the HEVC matrices from
  the 32-point cosine table, independently of the shift-and-add datapath.
* `tb/tb_<module>.sv`: one self-checking testbench per module.
* `tb/tb_frame_fullhd.sv`: a full-frame throughput run.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. The
end-to-end test runs the top at its default parameters. It covers:

* 4x4, 8x8 and 16x16 blocks with random 9-bit residuals and with extreme
  blocks, with size switches between blocks;
* every coefficient, checked against `C·X·Cᵀ`;
* the output order, `done` and `busy`, and the cycle count;
* a start given while busy, which must be ignored.

To run it:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/dct_pkg.sv tb/tb_ref_pkg.sv tb/tb_dct2d_top.sv --top-module tb_dct2d_top
./obj_dir/Vtb_dct2d_top
```

For a module testbench, replace `tb_dct2d_top` with its name, e.g.
`tb_transform_1d`. Each run takes well under a second.

`tb_frame_fullhd` streams a whole 1920x1080 4:2:0 frame (12,240 16x16
blocks) back to back and checks every coefficient. The run takes a few
seconds. It measures 1,884,960 cycles per frame, which is 1.65 samples
per cycle. Real-time 30 frames/s (93.3 Msamples/s) therefore needs a
clock of at least 56.5 MHz. With 4x4 blocks only, about 198 MHz would be
needed.
