# NFPGA: an island FPGA built from nanowire-style dual-rail primitives

New device technologies such as crossed-nanowire arrays are hard to use
because every application would have to be redesigned for each new device. A
remedy is to add a layer. First, build a conventional, regular FPGA out of the
new technology's primitives. Then port applications to that FPGA with ordinary
FPGA tools. The FPGA works as a stable virtual target between the device and
the application.

This repository holds the RTL of such an FPGA, the NFPGA. It is a mesh of
identical cells. Each cell has a small look-up table (LUT) and
neighbour-to-neighbour routing multiplexers. The primitives follow the
nanowire technology closely:

* Every signal travels as a **dual-rail pair**: the value and its complement.
  This is `nfpga_pkg::dual_t` with fields `t` (true) and `c` (complement).
* Each element has a **configuration plane** and a **compute plane**. The
  configuration plane holds the LUT bits and multiplexer selects. The compute
  plane carries the application's signals.
* The building blocks are the nanowire layouts: an address decoder, a LUT
  store, a routing configuration register and a 4-to-1 switch multiplexer.

The compute plane is combinational throughout. The configuration plane is
written synchronously, one entry per clock cycle.

## Module hierarchy

```
nfpga_array            ROWS x COLS tiling, edge I/O, addressed configuration port
└─ nfpga_cell          one tile
   ├─ routing_config   select bits of the 4*W output muxes   (NMUX = 4*W)
   ├─ routing_config   select bits of the K LUT input muxes  (NMUX = K)
   ├─ switch_mux x K   LUT input multiplexers
   ├─ nfpga_lut        K-input LUT
   │  ├─ addr_decoder  write-row decoder
   │  └─ addr_decoder  read decoder on the LUT inputs
   └─ switch_mux x 4W  output multiplexers (one per side and track)
nfpga_pkg              dual_t, dir_e, cfg_tgt_e, cfg_wr_t
```

Default parameters: `K = 3` (3-input LUT), `W = 1` (one track per side) and
`ROWS = COLS = 4`.

## The cell and its multiplexer encodings

The select encoding is what you need most when writing a configuration by
hand. Each cell has two kinds of 4-to-1 multiplexer. Both kinds switch the
two rails of a pair separately.

**LUT input multiplexers.** There are `K` of them. Input mux `i` (0-based)
drives LUT input `x(i+1)`. It reads track `i mod W` of each side.

| select | source       |
|--------|--------------|
| 0      | `north_in`   |
| 1      | `south_in`   |
| 2      | `east_in`    |
| 3      | `west_in`    |

**Output multiplexers.** There are `4*W` of them, one per side and track. The
mux for side `d` picks either the LUT output F or one of the other three
sides. It never picks its own side. Routing is disjoint: track `t` only
connects to track `t`.

| output side | sel 0 | sel 1 | sel 2 | sel 3 |
|-------------|-------|-------|-------|-------|
| north_out   | F     | south | east  | west  |
| south_out   | F     | north | east  | west  |
| east_out    | F     | north | south | west  |
| west_out    | F     | north | south | east  |

Output mux number `idx = d*W + t`, where `d` is the side from `dir_e`:
N=0, S=1, E=2, W=3.

**LUT.** `F = mem[{x3, x2, x1}]`, with x1 as the least significant address
bit. The complement rail is read from the complemented store, not derived
from the true output rail. The read decoder uses only the true rails of the
inputs.

After reset, every select and LUT bit is 0. Each output then forwards its
LUT (which outputs 0), and each LUT input listens to the north. No signal
loops in this state.

## Configuration protocol

A write is one `nfpga_pkg::cfg_wr_t`, held for one rising clock edge:

| field  | width | meaning |
|--------|-------|---------|
| `we`   | 1     | write strobe |
| `tgt`  | 2     | `CFG_LUT`, `CFG_OUT` (output mux), `CFG_IN` (input mux), `CFG_NONE` |
| `idx`  | 8     | LUT address, output mux number `d*W+t`, or input mux number |
| `data` | 2     | config1 (bit 1) and config0 (bit 0) |
| `msb`  | 1     | LUT writes only: 1 stores `data[1]`, 0 stores `data[0]` |

* A multiplexer write stores both `data` bits as that mux's select.
* A LUT write stores one bit. `msb` chooses whether that bit comes from the
  most or the least significant half of the 2-bit word. This mirrors the
  serialised write of the nanowire LUT, where a selection stage feeds the
  write stage with either the MSB or the LSB of the configuration.
* At the array level, `cfg_row` and `cfg_col` pick the cell. Only that cell
  sees `we`.
* A write takes effect at the clock edge. Compute-plane outputs follow within
  the same cycle, as a combinational path.

Programming a whole 3-LUT takes 8 writes. The example application in the
array testbench needs 92 writes in total.

## Fabric wiring and I/O

Row 0 is the north edge and column 0 the west edge. Cells are joined like
this:

* `south_out(r,c)` drives `north_in(r+1,c)`, and `north_out(r+1,c)` drives
  `south_in(r,c)`.
* `east_out(r,c)` drives `west_in(r,c+1)`, and `west_out(r,c+1)` drives
  `east_in(r,c)`.

Signals that cross the outer border become the ports `*_edge_in` and
`*_edge_out`, indexed by column (north/south) or row (west/east), then by
track. `f_obs[r][c]` exposes every LUT output so it can be observed.

### Combinational loops

Every cell forwards signals in all four directions. The netlist therefore
contains structural loops between neighbouring cells' multiplexers, as every
mesh FPGA does. Lint tools report them: Verilator reports `UNOPTFLAT`. A loop
only becomes real if a configuration routes a signal back onto itself. That
is an error in the configuration. The fabric itself has no such fault, and no
configuration used here creates one.

## What comes from the source description and what is chosen here

Taken from the source description of the architecture:

* Cell content: a K-LUT and 4×W dual-rail 4-to-1 multiplexers, with disjoint
  routing.
* The 3-input LUT and its truth-table order: address 0 selects the last
  listed data bit, and the output comes with its complement.
* The decoder size: 4 inputs and 16 one-hot outputs, plus complements.
* The routing configuration: a one-hot row select, 2 data bits per mux, and
  all selects readable at once with complements.
* The switch mux inputs: F plus three sides.
* The MSB/LSB selection in the LUT write path.

Chosen here, where the source is silent:

* Array size 4×4 and channel width 1.
* Which select value picks which multiplexer input (tables above).
* The track each LUT input mux reads (`i mod W`).
* The configuration word and its row/column addressing.
* Flip-flop storage with a synchronous active-low reset.
* A separate write decoder in the LUT.
* The observation port `f_obs`.

Where the sources disagree, these readings were taken:

* The output mux of a side takes the *other* three sides, not its own side.
* There is one input mux per LUT input, so K of them, not 4.
* The LUT has one dual-rail output, not a 2K-bit one.

Not modelled:

* The device level: nanowire FETs, clock phases, precharge/evaluate timing,
  and the layout itself. The RTL shows the logic function of each layout,
  not its dynamic behaviour.
* Any delay or area figure.
* Place-and-route and floorplanning tools.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `addr_decoder_tb` | all 16 addresses, one-hot output and complement |
| `switch_mux_tb` | random non-complementary pairs under every select; both rails checked independently |
| `routing_config_tb` | reset, random single-row writes, no change before the clock edge, complements |
| `nfpga_lut_tb` | reference truth table, XOR, majority, random tables; MSB/LSB writes; write timing |
| `nfpga_cell_tb` | randomised configuration and inputs against a reference model; W = 1 and W = 2; every select value |
| `nfpga_array_tb` | end to end at default size (see below) |

`nfpga_array_tb` (with `nfpga_cell_check`) maps an application by hand onto
the default 4×4 fabric:

* a parity chain along row 0;
* southward and northward pass-through columns;
* a buffer, an inverter and a westward pass in row 1;
* a westward pass-through in row 2;
* a majority gate whose output is forwarded east in row 3.

It applies 420 random input vectors and checks every edge output on both
rails. It then reprograms row 0 from XOR to AND and checks again. It counts
each mechanism and fails if one never happens. The mechanisms are: each LUT
function, each input and output mux direction, MSB and LSB writes,
reprogramming, and write timing.

To run a testbench with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/nfpga_pkg.sv \
    tb/nfpga_array_tb.sv --top-module nfpga_array_tb -Mdir obj_array
./obj_array/Vnfpga_array_tb
```

Use the same command for the other testbenches, with their names substituted.
The fabric build prints `UNOPTFLAT` warnings for the reasons given above.
Verilator stops on them unless `-Wno-fatal` is given, so the command above
includes it. To change the
fabric size or channel width, override `ROWS`, `COLS`, `K` or `W` on
`nfpga_array`. The array testbench's hand mapping assumes the default 4×4,
K = 3, W = 1.
