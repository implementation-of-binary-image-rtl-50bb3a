# Reconfigurable binary image processor

A streaming processor for 1-bit (binary) images. Instead of fixed
morphology hardware it has a small array of identical **binary compute
units**. Registers configure each unit's operations and how the units are
connected. With the same silicon, one configuration does erosion or
dilation by any structuring element up to 5 x 5. Another chains two units
into an opening or a closing. Others give a binary median (majority) filter,
a morphological gradient, or a frame-difference motion mask cleaned by a
median. Pixels stream through at one per clock, and every unit holds only
the few image lines its window needs.

The design is written in synthesizable SystemVerilog (IEEE 1800-2017). Each
module is in `rtl/<module>.sv`. Each module has a self-checking testbench in
`tb/`.

## Data flow of one frame

```
 packed words      1-bit pixels                                  packed words
 in_data[PW] ─► input_image_control ─► ┌─ unit 0 ─┐            ┌──────────────┐
                                       ├─ unit 1 ─┤  results   │ output       │
                  (src select per unit)├─ unit 2 ─┼──────────► │ control logic├─► output_image_control ─► out_data[PW]
                                       └─ unit 3 ─┘            │ select + pack│
 cfg bus ─► config_registers ─► all of the above               └──────────────┘
 blk_req / blk_data ◄──► compute elements (external N x N operand, e.g. SDRAM)
```

* `input_image_control` takes the image as PW-bit words (default 32) on a
  valid/ready port. Pixels are packed LSB first, contiguously in raster
  order, so a new line does not start a new word. It emits width x height
  pixels as a serial stream.
* `reconfigurable_binary_processing_module` contains `NUM_BCU` (default 4)
  binary compute units. Each unit's `src` field selects the unit's input: the
  image stream (0), or the result stream of an earlier unit (k means unit
  k-1). If several units take the image, they work **in parallel**. If a unit
  takes another unit's result, the two form a **pipeline**. A unit can only
  take its input from a lower-numbered unit, so no loop can be configured.
* The **output control logic** routes the unit named by register `OUTSEL` to
  the output. It packs that unit's stream into PW-bit words, using the same
  packing as the input. The last word of the frame is flushed with
  `out_last`, and its unused upper bits are zero.
* `output_image_control` registers the words onto the output port and counts
  them. It pulses `frame_done` after the last word.

The processor handles one frame at a time. `busy` goes high on `start` and
stays high until every unit has drained, including units whose result is not
routed out. A `start` while `busy` is high is ignored. Change the registers
only while `busy` is low.

## Inside a binary compute unit

This is the part that gives the processor its flexibility, and it needs the
closest reading.

```
            ┌──────────── window_generator ────────────┐
 pix ──────►│ N-1 line memories (depth = image width)  │── win[N*N], centre
            │ + N-bit shift register per row, borders  │
            └──────────────────────────────────────────┘
                 │ window      │ blk (external)   │ param0/param1 (registers)
                 ▼             ▼                  ▼
   ┌─ binary_compute_element 0 ─┐   ┌─ binary_compute_element 1 ─┐
   │ mux a, mux b                │   │ same, own configuration     │
   │ N binary logic elements     │   │                             │
   │ reduction element (masked)  │   │                             │
   │ binary median (masked)      │   │                             │
   └──── logic[N*N], red, med ───┘   └──── logic[N*N], red, med ───┘
                 │ taps 1..6 + original centre pixel (tap 0)
          set_a mux, set_b mux ─► set_element (1 bit) ─► tap 7
                 │
          out_sel mux (taps 0..7) ─► out_pix
```

### Window generator and line memories

The unit first turns its 1-bit input stream into the N x N neighbourhood of
every pixel. N-1 line memories, each `MAX_W` deep, delay the stream by 1 to
N-1 lines. A shared pointer wraps at the configured width. Each row also has
an N-bit shift register. Together they always hold the N x N block that ends
at the newest pixel. The centre of that block is C = (N-1)/2 lines and C
pixels behind the input. After the last input pixel of the frame, the
generator therefore pushes C x width + C more pixels by itself, one per
clock, so that the bottom lines also get their windows. During this flush
its ready output is low. Every frame gives exactly width x height windows,
in raster order.

Window bit `i*N + j` is the pixel at `(x + j - C, y + i - C)`, where row
`i = 0` is the top line. Positions outside the image read the unit's
**border** bit. Set it to 1 for erosion and 0 for dilation, so that the
border does not eat into or grow objects.

### Binary compute element (coarse-grained)

Each of the two elements has two operand multiplexers. Each multiplexer
selects one N x N source: the window, the external block `blk`, a
register parameter word (`param0` for operand a, `param1` for b), or zero.

* **N binary logic elements**, one per window row, apply AND, OR, NOT(a),
  NAND, NOR, XOR, XNOR or straight-through(a) bit by bit.
* The **reduction element** reduces the N x N logic result to 1 bit. It can
  apply AND, OR, NAND, NOR, XOR, XNOR, or straight-through (the centre bit).
* The **binary median filter** outputs 1 when more than half of the counted
  bits are 1. With a non-zero `rank` it becomes a rank-order filter: it then
  outputs 1 when at least `rank` of the counted bits are 1.

Only the bits inside the unit's **mask square** take part in the reduction
and the median. The mask is `mask_size` x `mask_size` (1, 3 or 5 for N = 5)
and centred on the pixel. Bits outside it are replaced by the neutral value
of the operation. All results are registered together.

How the morphological operators map onto an element, for a structuring
element B stored as an N x N bit mask in the same layout as the window:

| operation | operand a | operand b | logic | reduction | result |
|---|---|---|---|---|---|
| erosion A ⊖ B | window | param1 = ~B | OR | AND | 1 if every pixel under B is set |
| dilation A ⊕ B | window | param1 = B̌ (B reflected) | AND | OR | 1 if any pixel under B is set |
| binary median | window | – | PASS | – | median tap (rank 0) |
| rank-order, rank r | window | – | PASS | – | median tap with rank = r |
| masked compare | window | block / param | XOR, XNOR … | OR / AND | mismatch / match |

Opening and closing each take two units in a pipeline (erosion into
dilation, or dilation into erosion).

### Set element (fine-grained) and the taps

The unit has eight 1-bit taps, which the multiplexers select from:

| code | tap |
|---|---|
| 0 | original centre pixel of the unit's input |
| 1 / 4 | element 0 / 1: centre bit of the logic result |
| 2 / 5 | element 0 / 1: reduction result |
| 3 / 6 | element 0 / 1: median result |
| 7 | set element result (output multiplexer only) |

The set element combines its two selected taps. It can apply union (OR),
intersection (AND), complement of a, subtraction a AND NOT b, XOR, or
straight-through a. "Addition" of two 1-bit sets is taken to be XOR (the sum
modulo 2). Examples: the morphological gradient is dilation minus erosion
(subtract tap 5 − tap 2). The frame difference is the centre of a window XOR
the centre of an external block.

### Pipeline timing

S1 window (registered), S2 element results, S3 set element, S4 output
multiplexer. A result leaves a unit three clocks after its window, plus the
C lines + C pixels that the window itself needs. `blk_req[u]` is high in the
cycle in which unit u presents a window. The external block for that same
pixel must then be on `blk_data` in the same cycle (a combinational read).
All units share one `blk_data` port. Serving several units at once in
different pipeline positions is up to the external source.

## Register map

The bus is single-cycle. A write happens on `cfg_we`. Reads are
combinational on `cfg_addr`. Word addresses:

| addr | contents |
|---|---|
| 0x00 | `[15:0]` image width (≤ MAX_W, reset MAX_W) |
| 0x01 | `[15:0]` image height (≤ MAX_H, ≥ C, reset MAX_H) |
| 0x02 | unit routed to the output |
| 0x10 + 16u | unit u control: `[2:0]` src, `[5:3]` set_a, `[8:6]` set_b, `[11:9]` set op, `[14:12]` out_sel, `[18:15]` mask size, `[19]` border |
| +1 / +4 | element 0 / 1 control: `[1:0]` sel_a, `[3:2]` sel_b, `[6:4]` logic op, `[9:7]` reduction op, `[14:10]` rank (0 = median) |
| +2, +3 / +5, +6 | element 0 / 1 `param0`, `param1` (low N*N bits) |

The encodings are in `rtl/bip_pkg.sv`:

* sel: 0 window, 1 block, 2 param, 3 zero.
* Logic op: 0 AND, 1 OR, 2 NOT, 3 NAND, 4 NOR, 5 XOR, 6 XNOR, 7 PASS.
* Reduction op: 0 AND, 1 OR, 2 NAND, 3 NOR, 4 XOR, 5 XNOR, 6 PASS.
* Set op: 0 union, 1 intersection, 2 complement, 3 subtract, 4 XOR, 5 PASS.

After reset, every unit takes the image and passes it through unchanged.

Example, an opening by a 3 x 3 square:

| register | value | meaning |
|---|---|---|
| 0x10 | 0x0009A000 | unit 0: erosion, output = reduction of element 0, mask 3, border 1 |
| 0x11 | 0x18 | unit 0, element 0: window OR param1, reduction AND |
| 0x13 | 0 | unit 0, element 0 param1 = ~B |
| 0x20 | 0x0001A001 | unit 1: source is unit 0, output = reduction, mask 3, border 0 |
| 0x21 | 0x88 | unit 1, element 0: window AND param1, reduction OR |
| 0x23 | 0x01FFFFFF | unit 1, element 0 param1 = B |
| 0x02 | 1 | route unit 1 to the output |

## Top-level ports and throughput

`binary_image_processor` parameters, all with typed defaults:

* `N = 5`: window size.
* `MAX_W = 640`, `MAX_H = 480`: largest frame.
* `NUM_BCU = 4`: number of compute units.
* `PW = 32`: word width.

Ports:

* `clk` and `rst_n` (asynchronous, active low).
* The register bus: `cfg_*`.
* Frame control: `start`, `busy`, `frame_done`.
* The input word port: `in_valid`, `in_ready`, `in_data`.
* The block port: `blk_req`, `blk_data`.
* The output word port: `out_valid`, `out_data`, `out_last`. It has no
  back-pressure, so the receiver must take one word per `out_valid`.

One pixel moves per clock. A frame takes width x height clocks, plus
(C x width + C + 4) clocks for each unit in the longest chain. At the
defaults with a two-unit chain, a 640 x 480 frame takes 309,775 clocks, as
the full-size testbench measures. The frame-rate target of more than 237
frames per second therefore needs at least about 73.4 MHz at 640 x 480.
Smaller frames need proportionally less. No clock frequency has been
established for any technology.

## Where this design makes its own choices

These parts come from the architecture described for the processor:

* Two compute elements and a set element per unit.
* N logic elements, a reduction element and a median filter per element.
* Operand selection from line memories, external memory or registers.
* N-1 line memories as deep as the image width.
* Unit outputs that feed the next unit.
* An output stage that selects a unit's output and converts it from serial
  to parallel.
* A register group for operations, resolution, mask sizes, selections and
  auxiliary values.

These are this design's choices:

* All sizes: N = 5, 640 x 480, four units, 32-bit words.
* All encodings and the register map.
* The per-unit source select as the connection network.
* The majority realisation of the binary median.
* The rank threshold encoding.
* Masking with a runtime mask size.
* The border bit.
* The internal flush at the end of a frame.
* The word packing.
* The one-frame-at-a-time protocol.
* The single shared external-block port.

The input and output image control units are only named in the architecture.
Here they are the simplest blocks that serialise, pack and track a frame.

Not built:

* Image down-scaling.
* Reconfiguration in the middle of a frame. Registers may change between
  frames.
* The external SDRAM itself. Only its operand port is provided.

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog.
`tb/bip_model_pkg.sv` is an independent frame-level reference model of a
compute unit, computed from the definitions. The unit, module and top
testbenches compare whole frames with this model. The model covers
neighbourhoods with borders, the logic, reduction, median and set operations,
and tap selection.

* The end-to-end testbench `tb_binary_image_processor` uses a 32 x 24
  maximum frame and 16-bit words. It configures everything through the
  register bus, with read-back. It runs an opening, a closing, motion
  detection against a previous frame supplied on the block port, and 30
  random configurations and frame sizes. It counts pipelined chains,
  parallel units, set operations, median and rank-order use, block operands, both border
  values, all mask sizes, partial last words and ignored starts. It fails if
  any of these never occurs.
* `tb_morphology_examples` applies erosion, dilation, opening and closing
  to a square of side 10, with a disc of radius 2 as the structuring element.
  It checks the results against the set definitions and against the expected
  shapes: erosion gives a square of side 6, and dilation a square of side 14
  with rounded corners. The opening is the square with its corners rounded,
  and the closing is the square itself.
* `tb_binary_image_processor_full` runs one 640 x 480 frame with all
  parameters at their defaults, with an opening chain plus parallel units. It
  checks every output word and the clock count.

Running one testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/bip_pkg.sv tb/bip_model_pkg.sv tb/tb_binary_image_processor.sv \
    --top-module tb_binary_image_processor -o sim
./obj_dir/sim
```

For block-level tests, leave out `tb/bip_model_pkg.sv` if the testbench does
not import it. All testbenches use only `$urandom` for stimulus, so they also
run on two-state simulators.
