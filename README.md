# Real-time 1-D deblocking filter for MPEG-4 video

Block-based DCT coding at low bit rates leaves visible steps at the edges of
the 8x8 blocks. This design removes them with the adaptive deblocking filter
of MPEG-4. The filter runs across every block boundary, first on horizontal
edges and then on vertical ones. Each time, it reads a *segment* of ten
pixels `v0..v9` that crosses the boundary, with the boundary between `v4` and
`v5`. It writes back eight corrected pixels `v1'..v8'` in the same order, so
the frame memory can be overwritten in place.

The hardware uses two shift-register banks. Pixels stream into an input
shift register (ISR). Every filter unit reads that register while the pixels
move past, so nothing is stored twice. Results gather in an output shift
register (OSR), which shifts them back out one per cycle. All units work on
one segment at once and follow one fixed cycle schedule. A segment takes
**19 cycles** when it is left as is or gets the default filter, and
**23 cycles** in smooth mode. That is 34 or 28 Mpixel/s at 81 MHz.

## The algorithm

With `QP` the quantiser of the block that holds `v5`:

* **Mode decision.** `F(v)` counts how many of the nine neighbour steps
  `|v_i - v_i+1|` are at most 2.
  * If `F(v) >= 6`, the region is flat. This is *smooth mode*.
  * Otherwise it is *default mode*.
* **Smooth mode.** The filter applies only if `max(v1..v8) - min(v1..v8) < 2 QP`.
  Otherwise the step is taken to be a real edge and `v' = v`.
  * Each of `v1..v8` is replaced by a nine-tap low-pass
    `v'_n = (P_n-4 + P_n-3 + 2P_n-2 + 2P_n-1 + 4P_n + 2P_n+1 + 2P_n+2 + P_n+3 + P_n+4 + 8) / 16`.
  * `P_m = v_m` inside `1..8`.
  * Left of `v1`, every `P_m` is the padding pixel `P0`. It is `v0` if
    `|v1 - v0| < QP`, else `v1`.
  * Right of `v8`, every `P_m` is the padding pixel `P9`. It is `v9` if
    `|v8 - v9| < QP`, else `v8`.
* **Default mode.** Three 4-point DCT-like coefficients are computed:
  `a_k = (2v_2k+1 - 5v_2k+2 + 5v_2k+3 - 2v_2k+4)/8`, for `k = 0, 1, 2`.
  * If `|a1| >= QP`, nothing changes.
  * Otherwise let `a1' = sign(a1)·min(|a0|,|a1|,|a2|)` and `d = 5/8·(a1' - a1)`.
  * Clip `d` into the interval between 0 and `(v4 - v5)/2`. Call the result `d'`.
  * Then `v4' = v4 - d'` and `v5' = v5 + d'`. Only these two pixels change.

Arithmetic conventions chosen in this RTL:

* The smooth filter rounds with `+8`.
* The default mode keeps `8·a_k` as exact integers. It therefore tests
  `|8a1| < 8QP`.
* It truncates `d = 5·(8a1' - 8a1)/64` and `(v4 - v5)/2` towards zero.

## Data flow and schedule

Cycle `T0` is the cycle in which `start` is accepted with `v0` on the input.
`v_k` enters the ISR input in `T_k`. It sits in P9 in `T_k+1`, in P8 in
`T_k+2`, and so on towards P0.

| cycles | what happens |
|---|---|
| T0-T9 | `v0..v9` read from memory into the ISR |
| T1-T10 | **MD** counts flat steps (input vs. P9) and tracks max/min of `v1..v8` |
| T4-T5, T6-T7, T8-T9 | **DF** computes `8a0`, `8a1`, `8a2` from the input, P9, P8 and P7. Stage 1: two 9-bit differences. Stage 2: `2x + 5y` by shift-and-add |
| T5-T6 | **CP** compares `v0` (P5) with `v1` (P6); P3..P0 load the padding pixel at the end of T6 |
| T7-T14 | **SF** sees the windows of `v1'..v8'` on P0..P8 (P4 is the centre). Its results enter OSR R1 from T8 on |
| T9-T10 | **CP** compares `v9` (input) with `v8` (P9); P8 takes the padding pixel for T11-T14 |
| T10 | **DF** forms `a1'`, `d`, `d'` and `v4'`, `v5'` from P4 = `v4` and P5 = `v5` |
| T11 | decision: smooth / default / none |
| T11 | no filter or default: OSR loads `v1..v8` from ISR P0..P7, with `v4'`, `v5'` from DF in default mode |
| T12-T19 | no filter or default: `v1'..v8'` leave through R8 |
| T11-T15 | smooth: SF results keep shifting into R1 |
| T16-T23 | smooth: `v1'..v8'` leave through R8 |

The SF results are shifted into the OSR before the mode is known. If the
mode turns out not to be smooth, the T11 parallel load overwrites them. This
lets the smooth pipeline start at T7 without waiting for the decision.

`ready` is high when the filter is idle. It is also high in the last output
cycle (T19 or T23). A new segment can therefore begin while the last pixel of
the previous one is leaving, and segments follow each other with no gap.

## Modules

| file | unit |
|---|---|
| `rtl/dbf_pkg.sv` | pixel/QP types, mode enum, thresholds and schedule cycle numbers |
| `rtl/dbf_top.sv` | top level: wires the units below and holds QP for the segment |
| `rtl/dbf_ctrl.sv` | scheduler: cycle counter, unit starts, ISR padding loads, OSR control, `ready`/`out_valid` |
| `rtl/dbf_isr.sv` | ISR: P9..P0 with padding multiplexers at P8 and P3..P0 |
| `rtl/dbf_cp.sv` | CP: padding pixel in two cycles (compare, then select) |
| `rtl/dbf_md.sv` | MD: flat-step counter, max/min, final mode |
| `rtl/dbf_df.sv` | DF: default-mode coefficients, clip, `v4'`/`v5'`; reports `|a1| < QP` |
| `rtl/dbf_sf.sv` | SF: adder tree `(P0+P1+P7+P8)`, `(P2+P3+P5+P6)`, `P4`, then a weighted sum |
| `rtl/dbf_osr.sv` | OSR: R1..R8, shift from SF or parallel load from ISR/DF; R8 is the output |

Top-level interface of `dbf_top`:

* **Inputs.** `clk` and `rst_n` (synchronous, active low). `start` with `v0` on
  `in_pix[7:0]`, and `qp[4:0]` (1..31), accepted while `ready` is high. Then
  `v1..v9` go on `in_pix` in the next nine cycles.
* **Outputs.** `out_pix[7:0]` carries `v1'..v8'` in the eight cycles that
  `out_valid` is high. `out_mode` gives the mode applied: 0 = none,
  1 = default, 2 = smooth.

Which segments to process is up to the logic around the filter: it scans a
frame's block boundaries, horizontal edges first. That logic, and the frame
memory itself, are not part of this RTL.

## Where this RTL departs from, or fills in, the original architecture

* **QP.** One QP is used: the QP of the block that holds `v5`. A variant using
  `max(2QP_left, 2QP_right)` as the smooth-mode threshold would need a second
  QP input.
* **Decision sense.** Smooth filtering happens when `max - min < 2QP`, and
  default filtering when `|a1| < QP`. Both follow the MPEG-4 filter. Some
  descriptions of this architecture state the opposite sense for these tests.
* **OSR positions.** The boundary pixels from DF are written into OSR
  registers R5 (`v4'`) and R4 (`v5'`). This follows from R8 shifting out
  first and `v1'` leaving first. The original block diagram shows the DF
  entering R3 and R4.
* **Adder widths.** The SF adders keep every bit: 10-bit buffers and a 12-bit
  sum. The original circuit is drawn with 8- to 10-bit paths.
* **DF final stage.** The last DF step (a minimum of three values, the
  multiply by 5/64, the clip and the add) is one combinational cycle, T10.
  The original quotes a critical path of one 9-bit and one 10-bit adder.
  Meeting that at 81-100 MHz in an old process might need this step split.
* **Interface and control.** The start/ready handshake, the reset, and the
  overlap of one cycle between segments are choices of this RTL.

## Verification

Each unit has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_dbf_isr` and `tb_dbf_osr` compare the registers with position models.
* `tb_dbf_cp`, `tb_dbf_sf`, `tb_dbf_md` and `tb_dbf_df` drive the units with
  the exact tap timing of the full design. They compare with the integer
  reference in `tb/dbf_ref_pkg.sv`.
* `tb_dbf_ctrl` checks every control output in every cycle against the
  schedule table above.

`tb_dbf_top` runs 2000 random segments through the full design at its
default parameters. The segments come in five kinds: nearly flat, rough,
large step, end pixels pulled away, and fully random. Some follow each other
back to back and some come after idle gaps. The test checks:

* every output pixel;
* the reported mode;
* the exact output cycles (T12..T19, or T16..T23 in smooth mode).

It also counts how often each mechanism occurred, and fails if one never did:

* each mode;
* no filtering reached from either branch;
* both padding choices at both ends;
* a clipped default correction;
* a back-to-back start;
* an idle gap.

`tb_dbf_frame` deblocks a whole NTSC 4:2:0 frame through `dbf_top`. It
covers the 720x480 luminance plane and two 360x240 chroma planes, with
synthetic blocky content and a QP per block. The frame memory is modelled in
the testbench. Horizontal edges are filtered first, then vertical edges, and
every filtered pixel is written back in place. The test compares the final
frame pixel for pixel against the reference model and counts the cycles:

* The luminance plane takes 1.80 M cycles. That is 54 MHz at 30 frames/s,
  or 30 Mpixel/s of output at 81 MHz.
* With both chroma planes the frame takes 2.68 M cycles, or 80.4 MHz at
  30 frames/s. That is just inside an 81 MHz clock for this content, where
  about half the segments are smooth.
* If every segment were smooth, a full 4:2:0 frame would need 87.8 MHz.

To run one test with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/dbf_pkg.sv tb/dbf_ref_pkg.sv rtl/dbf_*.sv tb/tb_dbf_top.sv \
  --top-module tb_dbf_top -Mdir obj && ./obj/Vtb_dbf_top
```

The reference model is written independently of the RTL, but both follow the
same rounding conventions. A different rounding choice therefore has to be
made in both places.
