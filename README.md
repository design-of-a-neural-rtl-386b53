# Shape recognition with a chain-code unit and a neural-network peripheral

This is RTL for the accelerator side of a small robot-vision system on an FPGA. An
embedded processor holds a binary camera image of one object. Two bus peripherals turn
it into a 2-bit answer: is the object a **square, circle, rectangle or triangle**?

1. The **chain-code unit** finds the object, walks around its outline and records
   each step as one of four directions (a *crack code*: the steps run along pixel
   edges, not through pixel centres). The code is cut into 16 pieces of equal length,
   and the direction of each piece becomes one of 16 slope codes. The object is now
   16 small numbers, whatever its size.
2. The **neural-network unit** is a multi-layer perceptron with 16 inputs,
   32 hidden neurons (tan-sigmoid) and 4 outputs. The processor writes the 16 values
   to it, and the index of the largest output is the shape.

The processor stays in charge. It writes the image, starts the chain-code unit, reads
the slopes, maps them to network inputs, writes those to the network and reads the
result. Both units sit on one shared bus (`recognition_sopc`, the top module).

The network keeps its hardware small in one way above all: every neuron is a single
multiply-accumulate (MAC) unit that takes its inputs **one per clock cycle**. All
neurons of a layer work in parallel on the same serial input. So a layer with K inputs
finishes in K+1 cycles, however many neurons it has.

## The chain-code unit

```
 bus    +-------------+ two rows  +--------------+ code/cycle +-----------+ 1 code/cycle +------------+
 ------>| image 64x64 |---------->| crack_tracer |----------->| code store|------------->| slope      |--> 16 x 4-bit
 writes +-------------+           | scan + walk  |            | 1024 x 2b |              | normalizer |    slope codes
                                  +--------------+            +-----------+              +------------+
```

Pixels are 1 for object and 0 for background. The image is written as 128 words of
32 bits: word n holds half of row n/2, and pixel x sits at bit x mod 32.

### Finding the object and its origin (`crack_tracer`, scan phase)

The tracer reads one row per cycle and counts its white pixels. A row with at least
`DENS_TH` white pixels is *dense* (the default 1 means any white pixel). The object
region runs from the first dense row to the last one, and pixels outside it are treated
as background. The **origin** is the left-most white pixel of the first dense row. The
scan takes 64 cycles. If no row is dense, the unit reports `no_object` and stops.

### Walking the contour

The walk starts at the top-left corner of the origin pixel, heading right, and moves
one pixel edge per cycle, clockwise, with the object on its right. Directions are
numbered **0 right, 1 up, 2 left, 3 down**. At each corner the tracer looks at the two
pixels just ahead: the one to the left of the direction of travel (PL) and the one to
its right (PR).

| Heading | PL | PR |
|---|---|---|
| 0 right | up-right | down-right |
| 1 up | up-left | up-right |
| 2 left | down-left | up-left |
| 3 down | down-right | down-left |

- If PR is background, turn right (direction − 1).
- Otherwise, if PL is white, turn left (direction + 1).
- Otherwise, go straight.

Each step writes one 2-bit code. The walk ends when it is back at the start corner.
A single pixel gives `0 3 2 1`. The two row ports of the image buffer supply the rows
above and below the current corner, so a step needs no more than one cycle. A contour
of more than `MAX_LEN` = 1024 steps sets `overflow`; the first 1024 codes are kept and
used.

### From a code of any length to 16 slopes (`slope_normalizer`)

For a code of length L, piece k (k = 0..15) is the codes from floor(k·L/16) to
floor((k+1)·L/16) − 1. The normaliser reads one code per cycle and adds up the
displacement (dx, dy) of the current piece, with y pointing **up**. At the end of each
piece it spends one cycle quantising the direction of (dx, dy) into one of
16 sectors of 22.5°. Sector 0 is [0°, 22.5°), sector 4 starts at 90°, and so on. A
piece with no net displacement gives 0. When L < 16, some pieces are empty and give 0.

The quantiser uses no division or arctangent. First it rotates (dx, dy) by multiples of
90° into the first quadrant, as (u, v), and the quadrant q gives the top two bits of the
code. The sector edges inside a quadrant are at 22.5°, 45° and 67.5°. Since
tan 22.5° = √2 − 1, the comparisons reduce to integer squares:

- angle < 22.5° ⇔ (u+v)² < 2u²;
- angle < 45° ⇔ v < u;
- angle < 67.5° ⇔ (v−u)² < 2u².

A direction that lies exactly on 45° goes to the upper sector. The code is {q, s}.
Normalisation takes L + 16 cycles.

### Timing and registers

One run takes 65 + L (+1 on overflow) cycles for scan and walk, one hand-over cycle,
and L + 17 for the normaliser. That is about 2L + 83 cycles, or 300 cycles for a
contour of 100 steps.

`plb_cc_slave` uses the same bus protocol as the network unit (below). The default
base address is `0x8001_0000`.

| Offset | Name | Access | Meaning |
|---|---|---|---|
| 0x000-0x1FC | IMAGE | W | 128 image words |
| 0x400-0x4FC | CODE | R | crack code, 16 codes per word, code k of the word at bits [2k+1:2k] |
| 0x800 | CONTROL | W | [0]=1 starts a run. A start during a run is ignored. |
| 0x804 | STATUS | R | [0] done (cleared by a start), [1] busy, [2] no object, [3] overflow, [26:16] length |
| 0x808 | ORIGIN | R | [6:0] x, [14:8] y of the origin pixel (y counts rows from the top) |
| 0x840-0x87C | SLOPE0-15 | R | slope code of piece k in bits [3:0] |

An IMAGE write during a run gets wait states until the run ends, so the image cannot
change under the tracer.

## The neural-network unit

### Data flow of one classification

```
 bus writes   +-----------+  x[i]   32 x MAC (hidden)   32 sums  +------+  32 values  +--------+
 16 samples ->| input buf |-------->  w = ROM1[i][0..31] -------->| ROM3 |----------->| 32:1   |
              +-----------+  i=0..15                    scale+sat | tanh |  registered | mux    |
                                                                  +------+             +---+----+
                                                                                           | a[j], j=0..31
     STATUS <-- 2-bit shape <-- max of 4 <-- 4 x MAC (output), w = ROM2[j][0..3] <--------+
```

| Phase | Cycles | What happens |
|---|---|---|
| LOAD | 1  | every MAC loads its bias |
| L1   | 17 | inputs 0..15 are broadcast to the 32 hidden MACs with ROM1 block i. The 17th cycle drains the MAC pipeline. |
| ACT  | 1  | all 32 hidden sums are scaled and looked up in ROM3 at once |
| L2   | 33 | the mux feeds the 32 activated values to the 4 output MACs with ROM2 block j. The 33rd cycle drains the pipeline. |
| MAX  | 1  | the index of the largest output sum is registered |

That is 53 busy cycles. The result is valid in cycle 54 after the start. A six-bit
counter (`nn_controller`) sequences the whole operation and produces every control
signal.

#### The MAC and its pipeline

`mac` has two register stages. Stage 1 registers `x*w`; stage 2 adds the registered
product to the accumulator. A synchronous `rst` loads the bias into the accumulator
and clears the product register. Because of the pipeline, each layer needs one extra
cycle: during it, the controller feeds a zero input and only the last product is
added. Apart from that, a new input can enter every cycle. It is the reason for the
"+1" in 17 and 33.

#### Number formats

| Quantity | Format | Width |
|---|---|---|
| input sample `x` | signed integer | 8 |
| ROM1 weight | signed | 12 |
| hidden accumulator | signed, exact (no overflow possible) | 25 |
| ROM3 address | `sat8(acc >>> 12) + 128` | 8 |
| ROM3 value | `round(127*tanh((addr-128)/32))`, signed | 8 |
| ROM2 weight | signed | 8 |
| output accumulator | signed, exact | 22 |
| result | 0 square, 1 circle, 2 rectangle, 3 triangle | 2 |

The published architecture fixes these: the layer sizes, the 36 MACs, the ROM
sizes and word lengths, the block organisation of ROM1 (16 blocks of 32) and ROM2
(32 blocks of 4), single-cycle parallel activation and maximum, the 17/33-cycle layer
times and the 2-bit result. This implementation chose the rest:

- the input width;
- the accumulator widths;
- the shift of 12 that maps a hidden sum onto the ROM3 address;
- the scaling of the tanh table;
- the order of the shape codes;
- the extra bias-load cycle.

`nn_pkg` holds all of these choices in one place.

### Weights

The network is trained offline with back-propagation. **The trained weights and biases
are not part of this design.** `nn_tables_pkg` computes the ROM contents at
elaboration time:

- ROM3 is the tanh formula above.
- ROM1, ROM2 and the two bias tables are filled with reproducible pseudo-random values
  from a 31-bit linear congruential generator, `s' = (1103515245*s + 12345) mod 2^31`.
  The seeds and ranges are listed in the package header.

With these values the hardware computes exactly, but it does not recognise real
shapes. To deploy a trained network, replace the bodies of `rom1_init`, `rom2_init`,
`bias1_init` and `bias2_init` with the trained values, quantised to the formats above.
Alternatively, override the `CONTENTS`/`BIAS` parameters of the ROM and layer
instances in `nn_core`. Nothing else changes. ROM1 word `i*32+j` is the weight from
input `i` to hidden neuron `j`. ROM2 word `j*4+k` is the weight from hidden neuron `j`
to output `k`.

The biases have no ROM of their own. The three ROMs hold exactly the 512 + 128
connection weights, so each bias is a constant offset of its MAC.

### Bus interface and register map

`plb_nn_slave` is a simplified single-beat slave in the style of the Processor Local
Bus (PLB):

- The master holds `plb_pavalid` with `plb_rnw`, `plb_abus` and `plb_wrdbus` until it
  sees `sl_addrack`.
- The slave answers with `sl_addrack` plus `sl_wrdack` or `sl_rddack` for exactly one
  cycle, at the earliest one cycle after the request.
- `sl_rddbus` is zero except during `sl_rddack`. The read buses of several slaves can
  therefore be ORed together.

Arbitration, bursts, byte enables and the rest of the full PLB signal set belong to the
bus and are not modelled.

| Offset | Name | Access | Meaning |
|---|---|---|---|
| 0x00 | DATA | W | bits [7:0]: next input sample. The 16th write starts a classification. |
| 0x04 | STATUS | R | [0] done (cleared by the next DATA write), [1] busy, [5:4] shape, [12:8] samples buffered |
| 0x08 | CONTROL | W | [0]=1 discards a partly written vector |
| 0x10-0x1C | SCORE0-3 | R | final sum of output neuron k, sign-extended |

While a classification runs, a DATA write is held off: its acknowledge is withheld,
which gives the bus wait states, until the run ends. The core reads the 16-entry input
buffer during the first layer, so the buffer cannot change under it. The default base
address is `0x8000_0000` (the `BASEADDR` parameter).

Typical driver sequence: write 16 samples to DATA, poll STATUS until bit 0 is set,
then read the shape code.

## The shared bus (`recognition_sopc`)

The top puts both slaves on one bus: each decodes its own address window, and the
acknowledges and read data of the two are ORed. That works because a slave drives
zeros when it is not answering. An address outside both windows gets no acknowledge;
in a full system, the bus arbiter's time-out would end such an access. The network's
`result_valid` and `result_shape` are also brought out for observation.

How the processor turns slope codes into network inputs is up to its software. The
end-to-end test uses x = 16·s − 120, which spreads the 16 codes over the signed
8-bit input range.

## Modules

| Module | Role |
|---|---|
| `recognition_sopc` | top: both peripherals on a shared bus |
| `cc_plb_ip` | chain-code unit: `plb_cc_slave` + `chain_code_core` |
| `plb_cc_slave` | chain-code register map, start, image-write wait states |
| `chain_code_core` | image buffer, tracer, code store and normaliser wired in sequence |
| `cc_image_mem` | 64 x 64 bit image, word writes, two row-read ports |
| `crack_tracer` | scan for the object region and origin, then the contour walk |
| `cc_code_mem` | 1024 x 2-bit code store with a 32-bit read-back port |
| `slope_normalizer` | 16 pieces, displacement sums, 16-sector quantiser |
| `cc_pkg` | image size, code store depth, number of pieces, direction type |
| `nn_plb_ip` | network unit: bus slave + network core |
| `plb_nn_slave` | network register map, input buffer, wait states |
| `nn_core` | the network datapath: wires the blocks below, hidden-sum scaling and saturation |
| `nn_controller` | six-bit counter and phase state; all control strobes |
| `mac_layer` | N parallel `mac` neurons with their biases (used with N=32 and N=4) |
| `mac` | two-stage pipelined multiply-accumulate |
| `rom1_weights`, `rom2_weights` | weight ROMs, one block per cycle, combinational read |
| `rom3_tansig` | tanh table with 32 read ports, registered |
| `hidden_mux` | 32-to-1 multiplexer; select 32 gives 0 for the drain cycle |
| `max_finder` | registered argmax; ties go to the lower index |
| `nn_pkg`, `nn_tables_pkg` | sizes, formats, types; ROM contents |

The ROMs are constant arrays, which synthesis maps to LUT or block ROM. The image
buffer (4096 bits) and the code store (2048 bits) are plain register arrays.

## How this design departs from the published system

- In the published prototype, the chain-code step runs as software on the processor,
  and putting it on the chip is left as further work. Its system diagram, however,
  shows the chain-code algorithm as a custom core next to the network. This design
  follows the diagram. The software flow is still possible: write 16 values straight
  to the network unit.
- The image size (64 x 64), the code store depth (1024), the density threshold for
  the object region, the turning rule of the walk, how the code is cut into pieces and
  the 16-sector slope quantisation are this design's choices. The published system
  gives the method (density-based region, left-most pixel of the first line, clockwise
  walk, split into a fixed number of pieces, slope of each piece from a fixed set of
  values), not these details. 16 pieces matches the 16 network inputs.
- The trained weights are not available (see Weights).
- The network adds one bias-load cycle to the published 17 + 1 + 33 + 1 cycles.

## What is not here

The rest of the system-on-chip is made of vendor parts:

- the processor;
- its memory controller;
- external memory;
- the bus arbiter and the full bus signal set (bursts, byte enables, time-outs).

They are not included. The top brings out the slave side of the bus instead, and a
testbench plays the processor.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. Two independent models
are used:

- `tb/nn_ref_pkg.sv` is an integer model of the network. It regenerates the default
  weights with its own code and uses the real `$tanh` rather than the ROM.
- `tb/cc_ref_pkg.sv` draws test shapes (squares, rectangles, discs, triangles) and
  traces them pixel by pixel. It computes the slopes with a floating-point `$atan2`
  rather than the integer quantiser.

The main tests:

- `tb_recognition_sopc` runs the whole flow at full size through the bus, as software
  would. It covers 40 pictures: each shape at random places and sizes, blobs, empty
  images and a comb whose contour overflows the code store. For each picture it checks
  the flags, length, origin, codes and slopes, then classifies the slopes on the
  network and checks class and scores. It counts that each mechanism happened:
  - image writes held off during a run;
  - ignored starts;
  - empty images;
  - overflow;
  - network input wait states;
  - discarded partial vectors;
  - unmapped reads;
  - accesses outside both windows;
  - all four class codes (topped up with random vectors if the pictures do not
    produce every class).
- `tb_crack_tracer` also traces a 34-step example contour
  `0030300010103303232322221222121101`: it fills the shape the code encloses, traces
  it and gets the same code back. It also checks the cycle count of every run.
- `tb_slope_normalizer` checks pieces that lie exactly on sector edges, lengths below
  16 and random codes up to 1024 long.
- `tb_nn_plb_ip` runs 60 classifications through the network unit's bus. It checks the
  54-cycle latency and makes activation saturation happen.

Run any of them with plain Verilator from the directory that holds `rtl/` and `tb/`,
for example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/nn_pkg.sv rtl/nn_tables_pkg.sv rtl/cc_pkg.sv tb/nn_ref_pkg.sv tb/cc_ref_pkg.sv \
  tb/tb_recognition_sopc.sv -y rtl -y tb --top-module tb_recognition_sopc -o sim && ./obj_dir/sim
```

The whole suite runs in seconds.
