# ICAN: a 3D MAC-array accelerator for convolutional layers

A convolutional layer turns Z input feature maps (Y x X pixels) into M output
feature maps (R x C pixels) with K x K kernels at stride S:

    B[m][r][c] += W[m][z][y][x] * A[z][S*r + y][S*c + x]     over z, y, x

An FPGA accelerator runs every layer of a network on one fixed MAC array, so
the question is which loops of this six-deep nest to unroll in hardware. A
2D array over (m, z) wastes most of its units on layers with few maps, which
is typical of the first layers of a network. This design unrolls **m, r and c**:
the compute tile is a 3D block of TM x TR x TC MAC units, one per output
pixel of an output block, and the kernel loops (z, y, x) run in time. The
three unrolled dimensions are exactly the three dimensions of the output
array, so partial tiles at layer edges waste little.

What makes the 3D tile cheap is the **input reuse network**, which gives the
design its name (ICAN, Input-recycling Convolutional Array of Neurons). The
input pixels of one compute-tile position (r, c) are shared by its TM MAC
units. A 2D array of pixel registers is loaded once per input map, then
shifted as a whole in a serpentine: west K-1 times, north once, east K-1
times, north once, and so on. In K^2 cycles every register visits its
K x K neighbourhood. Each (r, c) therefore needs one wire from one register,
not K^2 wires, and each input pixel loaded from the buffer is used up to
K^2 x TM times.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). The default sizes
are the main design point, sized for the five convolutional layers of
AlexNet: a compute tile of (TM, TR, TC) = (11, 7, 7), i.e. 539 MAC units, data
tiles (DZ, DM, DR, DC) = (16, 3, 2, 2), and 32-bit fixed-point words
(single-precision floats with `FLOAT = 1`).

## Block structure

```
                         +--------------------------------------------+
  bus side (ports)       |  ican (computation engine)                 |
                         |                                            |
 in_*  --> [input  buffer, 2 banks] --> read_controller               |
                         |              shape_adapter (2D registers)  |
                         |                  | one-cycle parallel load |
                         |              input_reuse_network           |
                         |                  | TR x TC taps            |
 w_*   --> [weight buffer, 2 banks] --> compute_tile (TM x TR x TC    |
                         |              mac_unit)                     |
 out_* <-- [output buffer, 2 banks] <-> (partial sums load/store)     |
                         |              ican_controller (loop nest)   |
                         +--------------------------------------------+
```

| File | Role |
|---|---|
| `rtl/ican_pkg.sv` | default sizes, `layer_cfg_t`, `shift_t`, `perf_t` |
| `rtl/ican_top.sv` | the accelerator: engine plus the three double buffers |
| `rtl/ican.sv` | the computation engine |
| `rtl/ican_controller.sv` | tiled loop nest, MAC and shift sequencing, buffer handshakes |
| `rtl/read_controller.sv` | reads input-buffer words into the shape adapter, one window ahead |
| `rtl/shape_adapter.sv` | 2D register array with zero-padding multiplexers |
| `rtl/input_reuse_network.sv` | the shifting register array and its stride-selected taps |
| `rtl/compute_tile.sv` | the 3D array of MAC units |
| `rtl/mac_unit.sv` | one multiply-accumulate unit, fixed point or single-precision float |
| `rtl/double_buffer.sv` | two-bank ping-pong buffer with full/empty handshakes |

The DDR3 memory, its memory controller, the bus, and the small host processor
that starts layers are not part of the RTL. `ican_top` brings out the bus side
of each buffer and a start/config/done interface in their place.

## The loop nest as the hardware runs it

```
for m2 in 0..M step DM*TM          -- output data tile (one output-buffer bank)
 for r2 in 0..R step DR*TR
  for c2 in 0..C step DC*TC
   for z2 in 0..Z step DZ          -- input + weight data tile (one bank each)
    for m1, r1, c1 in the tile     -- one compute tile (TM x TR x TC outputs)
     for z1 in the tile            -- one "window": one input map
      for (y, x) serpentine        -- K^2 MAC cycles
       all m, r, c of the compute tile in parallel
```

The data tiles are multiples of the compute tile. Their sizes set the
buffer depths (per bank). For a layer, with W = TR*TC:

| Buffer | Word width | Words needed per bank |
|---|---|---|
| input | TR*TC pixels | DZ * ceil(Y'/W) * X', with Y' = S(DR*TR-1)+K and X' = S(DC*TC-1)+K |
| weight | TM weights | DM * DZ * K^2 |
| output | TM*TR*TC sums | DM * DR * DC |

For AlexNet the worst layer (K=11, S=4) needs 2016 input words, 5808 weight
words and 12 output words per bank. The defaults are the next powers of two:
2048, 8192 and 16. To run other networks or sizes, change the
parameters (or `ican_pkg`). Keep each depth at least as large as the table
requires for every layer you intend to run. The layer fields are 16 bits wide.

Compute cycles of a layer follow directly from the nest:

    T_comp = Z * ceil(M/TM) * K^2 * ceil(R/TR) * ceil(C/TC)

The engine adds one network-load cycle per window (per z1), and stalls when
a buffer bank or the shape adapter is not ready (see Timing).

## Input reuse network and shape adapter

This is the least obvious part of the design.

**Size.** The network is a ROWS x COLS register array with
ROWS = (TR-1)*SMAX + KMAX and COLS = (TC-1)*SMAX + KMAX (35 x 35 at the
defaults). Compute-tile position (r, c) reads register (r*S, c*S). The
registers beyond the last tap, K-1 columns to the east and K-1 rows to the
south, are guard registers: they hold the pixels that the edge taps reach
at the largest (y, x). A multiplexer per tap selects the stride of the
current layer (1..SMAX). The array is sized for the largest kernel and stride,
so smaller layers leave part of it unused.

**Shifting.** WEST moves every value one column towards column 0, EAST one
column back, NORTH one row towards row 0. After j west shifts, tap (r, c)
holds pixel (r*S, c*S + j); after a north shift, the row index advances.
Each row is a ring: values pushed out at the west edge re-enter at the east
edge. This is what lets the east-going half of the serpentine find the
pixels again. The north shift does not wrap: the last row fills with zeros.
Only one of the two directions needs the wrap, because the vertical
direction never reverses. The kernel step k = 0..K^2-1 therefore corresponds
to position (y, x) = (k div K, k mod K) on even rows and (k div K,
K-1 - k mod K) on odd rows. The weight address follows the same order.

**Shape adapter.** The input buffer stores each column of an input data
tile as consecutive words of W = TR*TC pixels: tile row t is lane t mod W of
word t div W. The network needs a ROWS_L x COLS_L window at tile row
offset r1*S and column offset c1*S, with ROWS_L = (TR-1)S+K and
COLS_L = (TC-1)S+K. This window rarely lines up with word boundaries. The
shape adapter is a second register array of the network's size. The read
controller streams the needed words into it one per cycle, column by
column. For each word, the adapter's row i takes lane i + row_off, where
row_off is supplied per word. A multiplexer per register substitutes zero
where the pixel lies outside the input map. Zero padding is therefore never
stored in the buffer, and the words at padded positions may hold anything.
When the window is complete, the network copies the whole adapter in one
cycle. The adapter then refills for the next window while the network runs
its K^2 MAC cycles.

## Timing

- **Per window:** 1 load cycle + K^2 MAC cycles. The weight word for each
  step is read one cycle ahead, and the buffers have a read latency of one cycle.
- **Partial sums:** on the first input map of a compute tile the accumulators
  start from the partial sums, read from the output buffer during the load
  cycle and added in the first MAC cycle. On the first z2 tile they start
  from zero. After the last input map, the sums are written back during the
  next window's load cycle, so the load and store happen in one cycle. At
  the end of a data tile there is one extra store cycle.
- **Shape adapter:** a window of n buffer words is ready n + 2 cycles after
  the previous window was taken. Each column needs one word, or two when
  the window straddles a word boundary, so n is COLS_L or up to 2*COLS_L.
  With K = 3 and S = 1 at the defaults, n = 9 against 10 cycles of compute,
  so the adapter is slightly late and costs about one cycle per window. With
  large kernels it is fully hidden. The adapter does not prefetch across
  data-tile boundaries.
- **Double buffering:** the engine waits for an empty output bank at each
  output tile, and for full input and weight banks at each z2 tile. Those
  waits are the only flow control towards memory.

Measured at the default sizes (full-size testbench, memory side feeding tiles
with random gaps):

| AlexNet layer (Z -> M, R x C, K, S) | Cycles | MAC cycles (= T_comp) | MAC utilization |
|---|---|---|---|
| 1: 3 -> 48, 55x55, K=11, S=4 | 120 882 | 116 160 | 80 % |
| 2: 48 -> 128, 27x27, K=5, S=1 | 251 083 | 230 400 | 82 % |
| 3: 256 -> 192, 13x13, K=3, S=1 | 223 091 | 165 888 | 62 % |
| 4: 192 -> 192, 13x13, K=3, S=1 | 167 447 | 124 416 | 62 % |
| 5: 192 -> 128, 13x13, K=3, S=1 | 111 861 | 82 944 | 61 % |
| all five | 874 364 | 719 808 | |

Utilization counts useful MACs over 539 units x cycles. It includes the
waste of partial tiles (M=48 on TM=11, R=13 on TR=7). The 3x3 layers also
carry the per-window load cycle and the adapter delay, which weigh most when
K^2 = 9.

The five layers hold 332.9 M multiply-accumulates. At a 160 MHz clock, the
MAC cycles alone give 148.0 GOPS, which is the throughput the cycle model
predicts for this configuration. The cycle counts above, stalls included,
give 121.8 GOPS. The peak is 172.5 GOPS (539 MACs x 2 operations x 160 MHz).
The clock rate is an assumption; this RTL has not been through FPGA timing.

## Interface of `ican_top`

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `start`, `cfg` | in | one-cycle start with a `layer_cfg_t` {z, m, r, c, y, x, k, s, p} |
| `busy`, `done` | out | layer running; one-cycle pulse at the end |
| `perf` | out | MAC cycles, buffer-stall cycles, adapter-stall cycles, data tiles |
| `in_ready`, `in_wr_en/addr/data`, `in_commit` | | input buffer, fill side |
| `w_ready`, `w_wr_en/addr/data`, `w_commit` | | weight buffer, fill side |
| `out_valid`, `out_rd_en/addr`, `out_rd_data`, `out_release` | | output buffer, drain side (data one cycle after `out_rd_en`) |

The memory side must supply tiles in loop-nest order: for each
(m2, r2, c2), and for each z2, one input tile and one weight tile. It waits
for `*_ready`, writes the words, then pulses `*_commit`. For each (m2, r2, c2)
it waits for `out_valid`, reads the DM*DR*DC words and pulses `out_release`.
The word layouts are:

- **input:** address `(zi*X' + col)*ceil(Y'/W) + wr`. Lane l of word wr in
  tile column col holds input pixel
  `(z2+zi, r2*S - P + wr*W + l, c2*S - P + col)`.
- **weight:** address `(mi*DZ + zi)*K*K + y*K + x`. Lane l holds
  `W[m2 + mi*TM + l][z2 + zi][y][x]`. Use zero for maps at or beyond M.
- **output:** address `(mi*DR + ri)*DC + ci`. Lane `(m*TR + r)*TC + c` holds
  `B[m2 + mi*TM + m][r2 + ri*TR + r][c2 + ci*TC + c]`. Lanes beyond the
  layer edges hold garbage.

`P` is the zero padding on the top and left edges. On the bottom and
right edges, any pixel outside the Y x X map is treated as zero.

## Number format

Words are 32-bit two's-complement fixed point with 16 fraction bits
(`DW`, `FRAC`). A MAC forms the full 64-bit product, shifts it right
arithmetically by FRAC, keeps the low DW bits and adds them with wrap-around.
There is no rounding or saturation, and no bias: outputs start from zero,
and bias, activation and pooling are left to other hardware. A 16-bit
design is `DW = 16` with a suitable FRAC.

With `FLOAT = 1` (a parameter of `ican_top`, passed down to every MAC) the
words are IEEE-754 single-precision floats instead. Each MAC rounds the
product to single precision, then adds it to the accumulator and rounds
again, both to nearest-even, as a separate multiplier and adder would.
Subnormal values are flushed to +0, and results too large become infinity.
Infinities and NaNs are not expected as inputs. Zero padding, buffers and
control are unchanged, because a float +0 is the all-zero word. The MAC
stays single-cycle in both formats. A real float MAC at speed would be
pipelined, and that is left out here.

## Where this RTL departs from, or goes beyond, its source description

The source gives the architecture, the loop nest, the T and D parameters,
the buffer widths and depth formulas, the shift pattern, the guard registers
and the one-direction wrap-around. The following are this design's own choices:

- Fixed-point format (Q16.16), truncation and wrap-around.
- The buffer word layouts, the per-bank full/empty handshake, and the
  one-cycle read latency.
- The read controller's window walk, and the placement of the padding
  comparisons in the shape adapter. The source puts most of the shape
  adapter in the read controller.
- A single state machine for the controller. The extra load cycle per
  window and the adapter delay at K = 3 are costs of this implementation;
  the source describes that latency as hidden.
- One stride multiplexer per tap, covering strides 1..SMAX.
- Wide buffers are single logical memories. Splitting them into physical
  SRAMs no wider than the device allows is left to synthesis.
- The floating-point MAC's details: rounding, flush-to-zero, no NaN or
  infinity handling, and a single cycle of latency.
- The choice of T and D parameters is made offline, by an exhaustive
  search over the network's layers under DSP, BRAM and bandwidth limits.
  That search is software and is not part of this RTL.

## Simulation

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
cd tb
verilator --binary --timing --assert -I../rtl -I. \
  ../rtl/ican_pkg.sv ../rtl/*.sv ican_top_tb.sv --top-module ican_top_tb -Mdir obj -o sim
./obj/sim
```

| Testbench | What it shows |
|---|---|
| `mac_unit_tb`, `compute_tile_tb` | fixed-point and float arithmetic, broadcast of pixels and weights, restart from partial sums |
| `input_reuse_network_tb` | every kernel 1..5 and stride 1..3: each tap sees pixel (rS+y, cS+x) at each serpentine step |
| `shape_adapter_tb` | lane selection and zero padding against a model |
| `read_controller_tb` | read addresses, adapter controls and window fill time |
| `ican_controller_tb` | loop-nest order, shift commands, weight addresses, load/store, stalls |
| `double_buffer_tb` | ping-pong flags and data integrity with a fast filler and a slow drainer |
| `ican_tb`, `ican_top_tb` | complete layers at reduced sizes: padding, strides, partial tiles, several z2 tiles, stalls |
| `ican_top_float_tb` | the `ican_top_tb` layers with float MACs, bit-exact against a reference that rounds in the engine's summation order |
| `ican_top_full_tb` | default sizes, all five AlexNet convolutional layers in full, every output compared (build about 2 minutes, run about 12 seconds) |

The layer testbenches share `tb/ican_top_tb_body.svh`. It plays the memory
side: it cuts random input maps and weights into tiles, inserts random
gaps, and fills padded positions with garbage. It then compares every output
pixel with a direct evaluation of the loop nest, and checks that the MAC-cycle
count equals the trip count. Each run also checks that buffer stalls, adapter
stalls, zero padding, partial-sum reloads, partial edge tiles and a
stride change all occurred. Bus-side protocol rules are assertions in
`double_buffer` and `ican`, active under `--assert`.
