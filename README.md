# Watermarked lossless predictive image coder

This is a small lossless image coder that carries proof of its owner's authorship at several
levels. An 8-bit gray-scale image, 256 × 256 pixels by default, is coded by linear prediction.
Each prediction error then gets a Huffman code. Signatures hide in choices that do not change
what the coder is for:

* which form each adder tree of the predictor takes;
* which operations the schedule holds back for no reason;
* which binary numbers the controller's states carry.

A further signature sits in the contents of the Huffman table. That table is made offline and
loaded at run time.

The RTL is plain synthesizable SystemVerilog. It has been linted with Verilator and elaborated
with Yosys/slang. Every block has a self-checking testbench.

## The coding scheme

Pixels are named by their position relative to the current pixel D:

```
   A  C  E        A = (x-1, y-1)   C = (x, y-1)   E = (x+1, y-1)
   B  D           B = (x-1, y)     D = (x, y)
```

All four neighbours are already known in a raster scan, so a decoder can rebuild the same
prediction. The error is computed as follows:

```
model = A/4 + B/4 + C/4 + E/4          (see "Predictor forms" for the rounding)
err   = (D - model) mod 256            8-bit symbol, 255 means -1
```

Border pixels use a simpler predictor:

| pixel                            | model          |
|----------------------------------|----------------|
| upper-left (0,0)                 | none: sent as a raw 8-bit literal |
| rest of row 0                    | B (left)       |
| column 0 and column W-1, y > 0   | C (above)      |
| everything else                  | four-neighbour model |

Pixel (W-1, 0) belongs to both the first row and the last column. It uses the left pixel,
because there is no row above it.

The coded image is laid out as follows:

1. the upper-left pixel as 8 raw bits;
2. the Huffman codes of the remaining errors, in raster order.

All of it goes out most significant bit first, packed into 32-bit words. The last word of an
image has `out_last` set. `out_bits` gives its number of real bits, from 0 to 32, and the bits
below them are zeros.

The Huffman table has 256 entries, one per error symbol. Each entry holds a code of 1 to 20 bits,
right-aligned, and its length. The coder does not build the table. It is computed offline from
the summed error histograms of a set of training images and written into the coder through the
`tbl_*` port. It must be loaded before the first image.

## Watermark layers

### 1. Predictor forms (`XFORM_SIG`, lpc_pred_lane)

Each lane forms two pair terms, A with B and C with E. Each term can be built in one of two ways:

```
shift-then-add  (bit 0):   (p >> 2) + (q >> 2)
add-then-shift  (bit 1):   (p + q) >> 2
```

Each lane has two bits, {AB form, CE form}. With four lanes that makes 8 bits. The default is
`8'b10101010`: every lane computes `(A+B)>>2 + (C>>2 + E>>2)`. The most significant pair belongs
to lane 0, the leftmost pixel of a group.

**These two forms are not bit-identical.** They truncate the low bits at different points. For
example, with p = q = 3, the first form gives 1 and the second gives 0. The choice of form therefore
changes the error symbols. A decoder must use the same form for each lane as the coder, lane
being `x mod 4`. Both forms always give a model in the range 0..254.

### 2. Schedule (`LANE_DELAY`, lpc_pred_array)

Each lane does its four operation levels, one per cycle, on a single shared adder/subtractor. The
shifts are plain wiring.

| level | operation                                    |
|-------|----------------------------------------------|
| 0     | AB term                                      |
| 1     | CE term                                      |
| 2     | model = AB term + CE term, or the border predictor |
| 3     | err = D - model                              |

A lane whose `LANE_DELAY` bit is 1 starts one step late, although nothing forces it to wait.
Such an artificial dependency marks a '1'; a lane on the normal schedule marks a '0'. Each
delayed lane has three first-level operations held back: A+B, C>>2 and E>>2. This is how the
two-lane example "000111" is read: lane 0 is normal and lane 1 is delayed. The default
`4'b1010` repeats that pair for lanes 2 and 3.

The schedule watermark has a cost. With any lane delayed, the prediction phase takes 5 cycles
instead of 4, which is 20% of the phase. Setting `LANE_DELAY = '0` removes the cost and gives
identical results.

### 3. Controller states and transition labels (lpc_ctrl_fsm)

The controller runs a ring of four states for every group of 4 pixels. Its state register holds
the signature codes directly, and the `state` output shows them.

| state   | code (`ST1`..`ST4`) | job                                   | label on leaving (`JMP*`) |
|---------|---------------------|---------------------------------------|---------------------------|
| FETCH   | 11001               | wait for a pixel group and latch it   | 0111                      |
| PREDICT | 10101               | run the lanes (4 or 5 cycles)         | 1001                      |
| CODE    | 00110               | send one lane's code per cycle        | 1101                      |
| UPDATE  | 01101               | store the group in the row buffer, advance, flush at the end of the image | 0110 |

Each transition also loads its 4-bit label into `jump_sig`, a second signature that can be read.
An assertion checks that the state register never holds any other value.

### 4. Huffman table (offline)

The offline table generator can embed 9-bit fields {rank, bit} in the table. Symbols are ranked
by decreasing probability. For each field:

* bit 1 swaps the codes at ranks rank-1 and rank+1;
* bit 0 swaps the codes at ranks rank and rank+1.

If the two swapped codes have the same length, the code at that rank is lengthened by one bit,
equal to the signature bit. Rank 0, and fields that touch ranks already used, are skipped.

The coder hardware is the same for any table. The testbench package (`tb/lpc_tb_pkg.sv`)
contains this procedure so that watermarked tables can be tested. It does not generate tables
from real training images.

## Architecture and timing

```
 in_pix[4] ──► group reg (D) ──► lpc_line_buffer ──A,B,C,E──► lpc_pred_array (4 × lpc_pred_lane)
                                      ▲ commit                        │ err[4]
                                      │                               ▼
                           lpc_ctrl_fsm ──code_lane──► huff_table ──► huff_bit_packer ──► out_word
```

**Line buffer.** `lpc_line_buffer` keeps one image row as 64 words of 4 pixels. Every pixel is
therefore read from the input only once. To serve a group it reads word `grp`, for A, C and E,
and word `grp+1`, for the last lane's E. When the group is committed it overwrites word `grp`.
Two registers keep the two pixels that the next group needs from what is overwritten or gone:
the above-left pixel and the left pixel.

**Cycles per group.** A group takes FETCH 1 + PREDICT 5 + CODE 4 + UPDATE 1 = **11 cycles** when
the input is always valid. A 256 × 256 image is 16,384 groups, about 180,000 cycles. At 25 MHz
that is 7.2 ms.

**Pipelining.** The phases do not overlap. Overlapping them is the obvious speed-up, but the
signatures in the schedule and the state ring assume this simple sequence.

### Top-level interface (`lpc_coder_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `tbl_wr_en`, `tbl_wr_sym`, `tbl_wr_code` | in | 1, 8, 25 | table write: `huff_code_t` is `{len[4:0], code[19:0]}` |
| `in_valid`, `in_ready` | in/out | 1 | handshake for one pixel group; `in_ready` is high only in FETCH |
| `in_pix` | in | 4 × 8 | pixels x..x+3 of the current row, `in_pix[i]` = column x+i |
| `out_valid` | out | 1 | one-cycle strobe per output word; there is no backpressure |
| `out_word`, `out_last`, `out_bits` | out | 32, 1, 6 | coded bits (first bit in bit 31), last-word flag, count of real bits |
| `state`, `jump_sig` | out | 5, 4 | controller state code and the last transition's label |

Rules for driving the top:

* Pixels go in raster order: row 0 first, each row left to right.
* The position wraps after the last group, so images can follow one another.
* The table may be rewritten between images, while the coder waits in FETCH.

### Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `LANES` | 4 | pixels per group, one lane each |
| `IMG_W`, `IMG_H` | 256, 256 | image size; `IMG_W` must be a multiple of `LANES` |
| `XFORM_SIG` | 8'b10101010 | predictor forms, 2 bits per lane |
| `LANE_DELAY` | 4'b1010 | delayed lanes |
| `ST1`..`ST4` | 11001, 10101, 00110, 01101 | state codes; they must be distinct |
| `JMP12`..`JMP41` | 0111, 1001, 1101, 0110 | transition labels |

`lpc_pkg` sets the longest code, `MAX_CODE` = 20.

Width limits:

* The step counter is 3 bits wide.
* The packer's 64-bit accumulator holds up to 31 waiting bits plus a 20-bit code.
* The widths of `XFORM_SIG` and `LANE_DELAY` follow `LANES`. Their defaults are written for 4
  lanes, so change them together with `LANES`.

## What was chosen here rather than given

The following come from the coder's description:

* the predictor, its neighbours and the border rules;
* the two adder-tree forms and the example signature 10101010;
* the two-lane delayed-schedule example and its 20% cost;
* the four state codes and the transition labels;
* the 256 × 256 × 8-bit image size;
* the 20-bit code bound;
* the offline, signature-carrying Huffman table.

The following are this design's own choices:

* one shared adder per lane, and the level order;
* extending the delay pattern to four lanes as 1010;
* the job of each controller state, and the non-overlapped group sequence;
* keeping transition labels as a readable register (the description names "jump condition"
  signatures but not how they act);
* the row buffer organisation;
* the raw 8-bit first pixel;
* the valid/ready input, the 32-bit output words and their padding;
* the loadable table RAM;
* the active-low asynchronous reset.

Known departures and open points:

* The two predictor forms differ in rounding, as explained above. Here they are treated as
  different, exactly specified predictors.
* The description's own formula for the model names the pixel to the right of D in the current
  row. That pixel is not yet available in a raster scan, and the pixel map and the prose name
  the above-right pixel. This design uses the above-right pixel.
* Four states of 5 bits each give 20 bits of state signature. A 40-bit, eight-state variant is
  mentioned in the description but not shown, and is not built.
* Nothing in the RTL targets a clock rate. The reference FPGA version ran at 25 MHz, with a 40 ns
  critical path.

Not built:

* **The table generator.** It is software working on training images that are not part of this
  release.
* **The Huffman-tree edge-labelling watermark.** It is a property of how the offline generator
  assigns 0 and 1 to tree edges.
* **The FPGA-placement watermark.** It hides signature bits in unused logic blocks of a placed
  design and has no RTL form.

## Verification

Each testbench is self-checking, ends with a `TB_RESULT checks=N failures=M` line and has a
watchdog. `tb/lpc_tb_pkg.sv` holds the shared reference models: the predictor, a canonical
prefix-free test table, and the table watermark procedure. The test table ranks the ten most
common training-set errors first (0, -1, 1, -2, 4, 5, 2, -6, -3, -5) and the rest by magnitude.

| testbench | what it covers |
|-----------|----------------|
| `tb_lpc_pred_lane` | all 4 form combinations × all 4 predictor modes, random pixels including the all-255 corner; idle cycles between levels; result held without `op_en` |
| `tb_lpc_pred_array` | default signatures against a copy without delays: results, `done` in cycle 5 against cycle 4, delayed lanes idle in step 0 and busy in step 4 |
| `tb_lpc_line_buffer` | A, B, C, E of every lane over 12 random rows |
| `tb_lpc_ctrl_fsm` | ring order, state codes, labels, per-state strobes, positions, lane modes and flush, over three 8 × 3 images with random gaps |
| `tb_huff_table` | write, read back, overwrite |
| `tb_huff_bit_packer` | 40 random streams of 1–20-bit codes, with and without gaps, including a flush with nothing left |
| `tb_lpc_coder_top` | full default size, end to end (described below) |
| `tb_lpc_coder_alt_sig` | the end-to-end test on a 32 × 16 image with every signature parameter changed: forms 01100011, no delayed lane (4-cycle PREDICT, 10-cycle group), other state codes and labels |
| `tb_lpc_coder_wm_table` | one image coded with the plain table and with 36-bit and 72-bit signature tables (described below) |

**End-to-end test (`tb_lpc_coder_top`).** It codes two 256 × 256 synthetic images back to back,
with random input stalls. It checks:

* every output bit, against a reference encoder;
* a lossless decode of the coded stream;
* the 5-cycle prediction phase and the 11-cycle group;
* the state and label sequence.

It also counts how often each mechanism happened (raw pixel, each border rule, full predictor,
stall, full word, flush, image wrap-around) and fails if any count is zero.

**Watermarked-table test (`tb_lpc_coder_wm_table`).** It codes one image three times: with the
plain table and with 36-bit and 72-bit signature tables. It checks the bitstreams, the lossless
decode and the signature read back from the table. On its synthetic image the signatures cost
about 1.4% and 2.0% in coded size.

To run a testbench with Verilator, from the project root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/lpc_pkg.sv tb/lpc_tb_pkg.sv tb/tb_lpc_coder_top.sv --top-module tb_lpc_coder_top
./obj_dir/Vtb_lpc_coder_top
```

`-Wno-fatal` keeps the testbenches' integer-width warnings from stopping the build. The block-level testbenches `tb_lpc_line_buffer`, `tb_huff_table`, `tb_huff_bit_packer` and
`tb_lpc_ctrl_fsm` do not need `tb/lpc_tb_pkg.sv`. To lint the design:

```
verilator --lint-only -Wall -Irtl -y rtl rtl/lpc_pkg.sv rtl/lpc_coder_top.sv
```

Lint gives two kinds of warning:

* **SYNCASYNCNET.** The concurrent assertions use the reset synchronously, in `disable iff`,
  while the flip-flops use it asynchronously.
* **PINCONNECTEMPTY.** Some debug outputs are left open in the top.

## Files

| file | contents |
|------|----------|
| `rtl/lpc_pkg.sv` | pixel and code types, predictor-mode enum, widths |
| `rtl/lpc_pred_lane.sv` | one predictor lane with its shared adder and form bits |
| `rtl/lpc_pred_array.sv` | four lanes and the step sequencer with the delay signature |
| `rtl/lpc_line_buffer.sv` | row buffer and neighbour selection |
| `rtl/lpc_ctrl_fsm.sv` | signature-coded controller, position counters, border modes |
| `rtl/huff_table.sv` | loadable 256-entry code table |
| `rtl/huff_bit_packer.sv` | variable-length code to 32-bit word packer |
| `rtl/lpc_coder_top.sv` | the coder |
| `tb/*.sv` | the testbenches listed above and their package |
