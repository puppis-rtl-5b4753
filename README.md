# Puppis — an SSD post-processing accelerator in SystemVerilog

A Single-Shot Multibox Detector (SSD) has two parts. A CNN backbone and a few
extra convolution layers produce, for every anchor box, one confidence per
class and four box modifiers. Then a post-processing "head" turns those raw
numbers into detections. That head is branchy, data-dependent work: a softmax
per box, box decoding with exponentials, per-class non-maximum suppression
(NMS) and a final top-K. On an embedded CPU it easily takes longer than the
CNN itself on an accelerator.

Puppis does the head in hardware. A CNN accelerator leaves its output layers in
main memory and raises `cnn_done`. Puppis then reads them over an AXI4 master
port and writes the K best detections back to main memory. It raises `ssd_done`
when it has finished. Software sets the network geometry, the addresses and
the thresholds over AXI4-Lite.

This RTL follows the published Puppis architecture in these respects:

- the block set;
- the four processing phases;
- the three-stage hybrid float/fixed softmax;
- the box decoding and overlap datapaths with their register names;
- the shared pipelined divider and four-lane multiplier;
- bubble-sort top-K;
- the two-signal handshakes with the CNN accelerator.

Register maps, memory layouts, number formats, sizes and the fine
sequencing are this implementation's own. The section
[Where this design departs or decides](#where-this-design-departs-or-decides)
lists those choices.

## One frame, phase by phase

`puppis_control` is a state machine that moves through
READY → SOFTMAX → BOXES → NMS → SORT → READY. The data paths are simple. The
work lies in the order of transfers that Control issues, so this section is
the key to reading the RTL.

| phase | what is read | what is computed | where it goes |
|---|---|---|---|
| SOFTMAX | for each SSD layer: its 4096-word ECLUT into Memory 0, then its confidences (box-major, classes innermost) | `n_k = e^S_k / Σ e^S_i` per box | scores to main memory, class-major: `SCORE + 4·(cls·N_total + box)` |
| BOXES | the 1024-word box exponential table into Memory 1; per box its 4 modifiers, then its 4 anchor words | decoded box (xmin, ymin, xmax, ymax) | Memory 0: `{xmin,ymin}` at `2·box`, `{xmax,ymax}` at `2·box+1` |
| NMS | per class (from `CLS_START`): that class's scores, through the threshold filter | candidates above TVAL are sorted, then greedy suppression | survivors `{score, class, box}` in Memory 1 from `0x800` |
| SORT | the survivors from Memory 1 | sort by score | the best K to main memory, 3 words each at `RESULT + 12·k` |

Within a class, NMS works like this:

1. The sorter holds that class's candidates in descending score order.
2. The best unsuppressed candidate becomes the *reference box*.
   - It is appended to the results.
   - It is fed to `puppis_nms` with `in_first`.
3. Every later unsuppressed candidate is streamed through `puppis_nms`.
4. A candidate whose IoU with the reference is not below TOVER is marked
   suppressed.
5. The loop repeats from the next unsuppressed candidate.

The greedy order is exact. Only boxes that are still alive are compared, just
as in the textbook algorithm.

A result word in Memory 1 and the first result word in main memory are both
`{score[31:16], class[15:11], box[10:0]}`. The two following words hold the
box corners, x in the upper half.

## Numbers: formats and the hybrid softmax

Everything on the datapath is 16 bits wide. Where the binary point sits is
up to the software that prepares the tables and the register values.

### Softmax (puppis_softmax)

A softmax over 21 classes needs `e^S` over a huge range. A fixed 16-bit format
cannot hold that range, and float arithmetic would be large. The design
therefore uses floating point for one thing only: finding the largest term.

1. **Stage 1.** The confidence's top 12 bits (`conf[15:4]`) address a
   4096-entry table (ECLUT) in Memory 0. The table holds `e^x` as IEEE-754
   binary32, one table per SSD layer. The float goes to a scratch area of
   Memory 1 (`0x400`). Its exponent field is compared with the largest so far.
2. **Stage 2.** Each float is converted to unsigned 16-bit fixed point as
   `{1,mantissa} >> (8 + emax − e)`. The largest term of the box therefore
   lands in `[2^15, 2^16)` and smaller ones lose low bits. The values go to
   Memory 1 (`0x440`) and are summed. When the 16-bit sum overflows, it is
   halved and a reduce count is incremented. Each later term is added already
   shifted by the current reduce count, so all terms stay in the sum's format.
3. **Stage 3.** Each value is shifted right by the reduce count and divided by
   the sum. The quotient is `floor(a·2^15/b)`, an unsigned Q1.15 score, and is
   queued (32 entries) for writing.

The scores agree with a real-valued softmax to within about 1e-4 in the
testbenches. That accuracy depends on how finely the ECLUT samples the
input range: `conf[15:4]` means 16 input steps per unit of the confidence's
integer part in the testbench's Q7.8 format.

### Box decoding (puppis_boxes)

The modifiers (Xp, Yp, Wp, Hp), anchors (Cxa, Cya, Wa, Ha) and variances
(Xv, Yv, Wv, Hv) are signed 16-bit. Each 32-bit product is brought back to
16 bits by an arithmetic right shift: `SHIFTS.sh1` after the first round and
`sh2` after the second.

```
inter = (Xp·Wa, Yp·Ha) >>> sh1          exp = (Wp·Wv, Hp·Hv) >>> sh1     (4 lanes at once)
lut   = T[exp[15:6]]                    (1024-entry table in Memory 1)
Cx = (inter_x·Xv >>> sh2) + Cxa         Cy = (inter_y·Yv >>> sh2) + Cya
w  = (lut_w·Wa) >>> sh2                 h  = (lut_h·Ha) >>> sh2
box = (Cx − w, Cy − h, Cx + w, Cy + h)
```

The table `T` should hold `e^x / 2`, so that `w` and `h` are *half*-sizes.
Its content defines both the input range and the output format. In the
testbenches:

- the table index covers x in [−8, 8) in steps of 1/64;
- `T[i] = e^x/2` in Q3.12;
- modifiers and variances are Q3.12;
- anchors are Q8.7;
- both shifts are 12.

### Overlap (puppis_nms)

For a box against the reference box:

- Side lengths and intersection sides are clamped at zero.
- Lane 0 of the multiplier computes the box's area. Lane 1 computes the
  intersection area `A_i`.
- `A_u = area + area_ref − A_i` is 32 bits wide.
- The divider returns `IoU = floor(A_i·2^15/A_u)` (Q1.15).
- `keep = IoU < TOVER`.
- The divider saturates to `0xFFFF` when `b = 0` or when `a ≥ 2b`.

One box may enter per cycle. Its result appears 20 cycles later, in order.

## Blocks

| file | block | notes |
|---|---|---|
| `puppis_pkg.sv` | shared types | `cfg_t`, phases, memory-port struct, route enums, result and status words |
| `puppis_top.sv` | top | wires everything; owns the phase-based sharing of Mults (Boxes/NMS) and Divider (Softmax/NMS) |
| `puppis_control.sv` | Control | the phase machine above; issues read commands and write words; holds the suppressed flags |
| `puppis_regs.sv` | Regs | AXI4-Lite registers (map below) |
| `puppis_arbiter.sv` | Arbiter | combinational routing of the read stream, write stream, sorter input and both memory ports |
| `puppis_axi_full_ctrl.sv` | AXI-full Control | read commands become INCR bursts of ≤16 beats that never cross 4 KiB, one outstanding; each write word becomes one single-beat write |
| `puppis_serial_comp.sv` | Serial Comp | passes only words whose low half is above TVAL, tagged with their position in the stream (the box index); pass mode tags everything |
| `puppis_softmax.sv` | Softmax | three stages as above |
| `puppis_boxes.sv` | Boxes | one box at a time, sequence load → mult 1 → table → mult 2 → rect |
| `puppis_nms.sv` | NMS | pipelined overlap test |
| `puppis_divider.sv` | Divider | restoring division, one quotient bit per stage, 16-cycle latency, one division per cycle, tag carried along |
| `puppis_mults.sv` | Mults | 4 lanes of signed 16×16, 2-cycle latency |
| `puppis_sort.sv` | Sort | up to 64 (key, payload) pairs; bubble sort, one compare-and-swap per cycle, descending and stable; later pushes beyond 64 are dropped and flagged |
| `puppis_mem.sv` | Memory 0 / 1 | 4096 × 32 simple dual-port RAM, 1-cycle read |

## Software interface

### Registers (AXI4-Lite, byte addresses)

| addr | name | content |
|---|---|---|
| 0x00 | CTRL | [0] start (write 1; self-clearing), [1] auto-start on `cnn_done` |
| 0x04 | STATUS | [2:0] phase, [3] done, [4] overflow (sorter dropped entries), [5] AXI error, [31:16] results written |
| 0x08 | NUM_CLASSES | classes including background (≤ 32) |
| 0x0C | NUM_LAYERS | SSD layer pairs (1..6) |
| 0x10 | ANCHOR | anchors: per box Cx, Cy, W, H, one 32-bit word each (low 16 bits used) |
| 0x14 | BLUT | the 1024-word box exponential table |
| 0x18 | SCORE | score buffer written by SOFTMAX, read by NMS (`4·classes·boxes` bytes) |
| 0x1C | RESULT | detection output, 12 bytes per detection |
| 0x20 / 0x24 | VAR_XY / VAR_WH | {Yv, Xv} / {Hv, Wv} |
| 0x28 | SHIFTS | [4:0] sh1, [12:8] sh2 |
| 0x2C / 0x30 | TVAL / TOVER | score threshold and overlap threshold, Q1.15 |
| 0x34 | TOPK | K (≤ 255) |
| 0x38 | CLS_START | first class NMS visits (1 skips background) |
| 0x40+16·l | NBOX, CONF, LOC, ECLUT | layer l: box count (H·W·anchors), confidence base, modifier base, ECLUT base |

Layer data in main memory has one 32-bit word per value, with the value in
the low 16 bits:

- confidences are ordered box-major, with classes innermost;
- modifiers are Xp, Yp, Wp, Hp per box;
- boxes are numbered across layers in layer order.

### Handshake with the CNN accelerator

- `cnn_done` (in): the CNN has finished a frame. With CTRL.auto set,
  Puppis starts the frame and answers with a one-cycle `ssd_ack` pulse.
- `ssd_done` (out): rises after the last result write has been acknowledged
  on AXI. It stays high until `cnn_ack` (in).

A frame can also be started by writing CTRL.start.

## Where this design departs or decides

- **One ECLUT per layer.** The published text describes 4096 samples "for
  every class", but its algorithm indexes the table by layer. The RTL follows
  the algorithm: each layer's table is loaded into Memory 0 before that
  layer's confidences. Per-class tables would need 21 × 4096 words.
- **Sum format.** The published loop adds each term unshifted after the sum
  has been rescaled. The RTL adds it shifted by the current reduce count,
  which is what keeps the sum meaningful.
- **Width and height multipliers.** The published box equations multiply the
  width term by the anchor *height* and vice versa. The RTL uses `Wa` for
  width and `Ha` for height, as standard SSD decoding does. The published
  half-size equations carry no `/2`. The table's `e^x/2` supplies it.
- **Keep rule.** One passage says the keep flag is raised when the overlap
  is *greater* than TOVER, and the NMS block diagram draws a `>` comparator.
  The algorithm listing keeps boxes whose overlap is *less* than TOVER. The
  RTL follows the listing, `keep = IoU < TOVER`, because keeping only the
  boxes that overlap the best one would not suppress anything useful.
- **Handshake names.** The text once has Puppis acknowledge `cnn_done` with
  `cnn_ack`. The RTL uses `ssd_ack` for that and keeps `cnn_ack` as the CNN's
  acknowledge of `ssd_done`, as the interface diagram pairs them.
- **Scores in main memory.** Scores are written to main memory between
  SOFTMAX and NMS. 1917 boxes × 21 classes do not fit the internal memories.
- **Sizes not given by the source.** These are all chosen here:
  - sorter depth 64;
  - memory depth 4096 words;
  - box table 1024 entries;
  - at most 6 layers and 32 classes;
  - at most 2048 NMS survivors;
  - K ≤ 255.

  More than 64 candidates in a class, or more than 64 survivors in total,
  are cut to the first 64 in stream order and STATUS.overflow is set. For
  real networks a TVAL of about 0.05 or higher keeps candidate counts near
  this.
- **Background class** is skipped by `CLS_START = 1`.
- **Throughput is not matched.** The reported latency for MobileNetV1-SSD on
  Pascal VOC images is about 0.53 ms at 180 MHz, roughly 96 k cycles. Here a
  frame of the same size (1917 boxes, 21 classes, random data, memory model
  with 20 % random stalls) takes 423 k to 440 k cycles, about 2.4 ms at
  180 MHz. Per frame the cycles go to:
  - SOFTMAX, about 244 k: one score per 6 cycles, mostly single-beat score
    writes that each wait for their response, plus the ECLUT loads;
  - NMS, about 131 k on average: score reads, per-class sorting and the
    overlap tests;
  - BOXES, about 54 k: one box at a time, about 28 cycles each;
  - SORT, about 3 k.

  The obvious improvements are burst writes, overlapping the softmax stages
  and pipelining Boxes. None of them changes the arithmetic.
- Resource use was not compared with the published FPGA figures
  (4055 LUT, 17.5 BRAM, 4 DSP).

## Verification

Every block has its own self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it shows |
|---|---|
| `tb_puppis_mem`, `tb_puppis_mults`, `tb_puppis_divider` | bit-exact results and exact latencies under random operands. The divider cases include saturation and division by zero |
| `tb_puppis_sort` | descending, stable order, at most n² cycles, overflow past N |
| `tb_puppis_serial_comp` | filtering at and around the threshold, position tags, back-pressure |
| `tb_puppis_axi_full_ctrl` | exact data under random memory stalls and stream back-pressure, every burst ≤16 beats and within 4 KiB, writes land |
| `tb_puppis_regs` | every register written and read back, start pulse, read-only status |
| `tb_puppis_arbiter` | every routing combination against a table |
| `tb_puppis_softmax`, `tb_puppis_boxes`, `tb_puppis_nms` | the datapath with its real helper units and memories, against an independent bit-exact model of the same formats |
| `tb_puppis_nms` (also) | IoU exactly equal to TOVER (dropped) and TOVER one above it (kept) |
| `tb_puppis_top` | two layers (60 + 70 boxes), 4 classes, two frames (register start, then the handshake) |
| `tb_puppis_control` | three unequal layers, 5 classes, K = 3 |
| `tb_puppis_full` | the full-size network shape at default parameters: 6 layers, 1917 boxes, 21 classes, K = 100, two frames |

The three system testbenches share `tb_puppis_env`, which does the following:

- builds a frame in a behavioural AXI memory (`tb_axi_mem`);
- configures the accelerator;
- checks bit-exactly against a reference model of the whole algorithm:
  - every score in main memory;
  - every decoded box in Memory 0;
  - every detection word, and the result count;
- counts each mechanism and fails if one never occurred:
  - sum rescale;
  - threshold rejection;
  - NMS suppression;
  - sorter overflow;
  - 4 KiB burst split;
  - handshake start;
  - the phase sequence;
  - overlaps that land within ±1/16 of TOVER, so the keep boundary is
    exercised at system level;
- uses a different TOVER in each frame, and anchor centres jittered off
  the layer grid so that neighbouring boxes overlap by varying amounts;
- checks a cycle budget per frame.

Known gaps:

- The data are random. The system tests do not show detection quality on
  real images.
- The exact equality IoU = TOVER is forced only in the NMS unit test. The
  system tests reach its neighbourhood but do not aim for the exact value.

## Simulating

With Verilator 5 (two-state; uninitialised state is randomised, and the
design resets everything it reads):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/puppis_pkg.sv tb/tb_puppis_top.sv --top-module tb_puppis_top -Mdir obj -o sim
obj/sim +verilator+rand+reset+2
```

Replace `tb_puppis_top` with any testbench name. The full-size test runs in
about a second. Add `-Wall` to see the lint warnings. The remaining ones are
unused bits of wide configuration and status buses, which are intentional.

To use the design in a system:

1. Put the tables in memory:
   - the ECLUTs, `ECLUT_l[i] = binary32(e^(x(i)))`, where `x(i)` is the
     confidence value whose bits [15:4] equal `i`;
   - the box table, `T[i] = e^(x(i))/2` in the output format of your choice,
     where `x(i)` is the value whose bits [15:6] equal `i`;
   - the anchors.
2. Write the registers.
3. Set CTRL.auto.
4. Read STATUS[31:16] and the result buffer after `ssd_done`.
