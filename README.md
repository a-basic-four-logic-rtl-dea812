# A four-cluster FPGA with a disjoint switch fabric

This is a complete, deliberately tiny FPGA: four logic clusters of five 4-input
LUT cells each, 20 programmable pins, and a routing fabric of 10-wire buses
joined by five *disjoint* switch blocks. The whole device is configured in
circuit by shifting one 1480-bit bitstream through a chain of shift registers.
It is sized so that a person can place and route a design by hand. Its target
is small finite state machines, with about ten inputs, ten outputs and ten
states. The RTL is synthesizable SystemVerilog. The testbench for the top
level programs the chip with hand-built bitstreams. It runs a 4-bit adder,
set/clear and enabled registers, pull-resistor checks, and a sequence detector
for "101100100" with a seven-segment state display, plus the same detector
for "101100101".

## The idea in one paragraph

An FPGA has computation islands (clusters of LUT+flip-flop cells) in a sea of
wires. Programmable multiplexers decide which wire drives which. Here every
programmable choice is a `prog_mux`: a plain multiplexer whose select lines
come from a small shift register in the configuration chain. Connection boxes
are rows of such muxes. A switch block is 40 of them. The BLE's LUT is a
16-to-1 mux over 16 configuration bits. The fabric is *disjoint*: track *i* of
a bus can only ever connect to track *i* of another bus. So a signal keeps
its track number from source to sink. Routing becomes a matter of giving
each net a free track along its path, which is easy to do by hand.

## Floor plan and fabric

```
                       north IO 0..4
                            | NN
      NW cluster <--NW-- [N SB] --NE--> NE cluster
          |                 | CN             |
          v WN              |                v EN
  WW --[W SB]----- CW ---[C SB]--- CE -----[E SB]-- EE
          ^ WS              | CS             ^ ES
          |                 |                |
      SW cluster <--SW-- [S SB] --SE--> SE cluster
                            | SS
                       south IO 10..14

  west IO 15..19: input box drives WN, output box reads WS
  east IO 5..9:   input box drives ES, output box reads EN
```

There are sixteen 10-wire buses. Each belongs to one side of a switch block,
or to two sides where two blocks face each other:

| bus | switch-block side | other blocks on the bus |
|-----|-------------------|-------------------------|
| NN  | north.N           | north IO input box drives, north IO output box reads |
| NW / NE | north.W / north.E | NW / NE cluster reads (its only fabric input) |
| SS  | south.S           | south IO input box drives, south IO output box reads |
| SW / SE | south.W / south.E | SW / SE cluster reads |
| CN, CS, CW, CE | north.S–centre.N, south.N–centre.S, west.E–centre.W, east.W–centre.E | – |
| WN  | west.N            | west IO input box and NW cluster-output box drive |
| WS  | west.S            | SW cluster-output box drives, west IO output box reads |
| EN  | east.N            | NE cluster-output box drives, east IO output box reads |
| ES  | east.S            | east IO input box and SE cluster-output box drive |
| WW, EE | west.W, east.E | nothing (dead ends) |

Signals flow in a fixed direction around the chip. North and south pins
enter through the north and south switch blocks, and these blocks are the
only way into the clusters. Cluster outputs leave sideways into the west and
east columns, where the east and west pins are. So a north or south input
reaches a cluster through one switch block. A cluster reaches an east or west
output pin through at most one. Anything else, such as a cluster output that
another cluster needs, crosses the centre block. This is why the north and
south banks suit inputs and the east and west banks suit outputs.

Because the fabric is disjoint, a net that has to reach all four clusters
occupies one track everywhere. In the sequence-detector example, the input,
the reset and the four state bits take tracks 0–5 on every inner bus. The
seven display outputs use tracks 6–9.

## Configuration chain and bitstream format

All configuration lives in one serial chain of `shift_reg` links, 1480 bits
in all. Each link has two banks:

* a **programming bank**, which shifts on every rising `prog_clk` edge while
  `prog_en` is high (`prog_in` enters at bit 0, the top bit leaves on
  `prog_out` to the next link);
* an **active bank**, which the logic sees. It is copied from the
  programming bank on the first `prog_clk` edge after `prog_en` falls.

While `prog_en` is high, every block's `control` reads as all zeros. All zeros
is the idle setting of every block: muxes drive nothing, cluster inputs are
grounded, LUTs output 0. All BLE flip-flops are also held at 0 on `clk`
during that time. So a chip that is being programmed, or has just powered up,
is quiet and cannot form a combinational loop. A freshly programmed design
starts with all its flip-flops at 0.

**Programming sequence:** raise `prog_en`. Shift the bitstream in on
`prog_in`, one bit per rising `prog_clk`, starting with bit 1479 and ending
with bit 0. Lower `prog_en` and give one more rising `prog_clk` edge. The
design then runs on `clk`. The previous bitstream comes out of `prog_out`
while the new one goes in, so a bitstream can be read back.

Chain position 0 is next to `prog_in`. The blocks, in chain order:

| bits | block | bits | block |
|------|-------|------|-------|
| 0–59 | IO 0..19, 3 bits each (IO *n* at 3*n*) | 730–809 | centre switch block |
| 60–89 | west IO input box | 810–889 | west switch block |
| 90–119 | NW cluster-output box | 890–909 | west IO output box |
| 120–294 | NW cluster | 910–939 | SW cluster-output box |
| 295–314 | north IO output box | 940–1114 | SW cluster |
| 315–344 | north IO input box | 1115–1194 | south switch block |
| 345–424 | north switch block | 1195–1224 | south IO input box |
| 425–599 | NE cluster | 1225–1244 | south IO output box |
| 600–629 | NE cluster-output box | 1245–1419 | SE cluster |
| 630–649 | east IO output box | 1420–1449 | SE cluster-output box |
| 650–729 | east switch block | 1450–1479 | east IO input box |

`fpga_pkg::core_offset()` and `io_offset()` compute these offsets. Within a
block, the fields are as follows. Bit numbers are relative to the block's
offset.

* **IO block (3 bits):** bit 0 output enable, bit 1 pull-up, bit 2 pull-down.
* **IO input box (30 bits):** 10 fields of 3 bits, one per fabric track.
  Field *t* at bits 3*t*+2:3*t*: 0 = track not driven; 1–5 = drive the track
  from pin 0–4 of the bank; 6, 7 = not driven.
* **IO output box (20 bits):** 5 fields of 4 bits, one per pin of the bank.
  0 = no source; 1–10 = track 0–9; 11–15 = no source.
* **Cluster-output box (30 bits):** 10 fields of 3 bits, one per track.
  0 = not driven; 1–5 = BLE 0–4 of the cluster.
* **Switch block (80 bits):** 40 fields of 2 bits. The field for side *s*
  (N=0, E=1, S=2, W=3) and track *t* is at 2·(10*s*+*t*). 0 = the pin is not
  driven. 1, 2, 3 = drive it from the same track on the side 1, 2 or 3 steps
  clockwise. For the north side that is east, south and west.
* **Logic cluster (175 bits):** first the interconnect matrix, 20 fields of
  4 bits at bits 0–79. Field 4*b*+*i* feeds input *i* (A..D) of BLE *b*:
  0 = ground, 1–10 = track 0–9 of the cluster's input bus, 11–15 = output of
  BLE 0–4. After it come BLE 0..4, 19 bits each, at 80 + 19*b*.
* **BLE (19 bits):** bits 15:0 are the LUT truth table, indexed by
  {D,C,B,A}. Bit 16 feeds the flip-flop output to LUT input A in place of
  pin A. Bit 17 uses input D as the flip-flop clock enable. Bit 18 takes the
  BLE output from the flip-flop instead of the LUT (`fpga_pkg::ble_cfg_t`).

## The logic

**BLE (`ble`).** A 16-to-1 mux reads the LUT bits. Three 2-to-1 muxes choose
the LUT's A input (pin or flip-flop: the feedback path, which gives a
register with hold in one BLE), the flip-flop enable (constant 1 or pin D),
and the output (LUT or flip-flop). All flip-flops share the single global
`clk`. There are no other clocks and no asynchronous set or reset. A design
that uses an asynchronous reset therefore behaves as if its reset were
synchronous.

**Logic cluster (`logic_cluster`).** Five BLEs behind an interconnect matrix.
Each of the 20 BLE inputs has a 16-input mux: ground, the 10 tracks of the
cluster's one input bus, or any of the 5 BLE outputs. Nets between BLEs of
one cluster therefore never touch the fabric. The cluster's outputs reach the
fabric through a separate cluster-output box.

## Buses without tri-states

On silicon, the fabric would be tri-state buses, with every mux output behind
a tri-state driver that is off for select 0. This RTL is two-state. Every
driver produces a value and a `drive` flag, and `fpga_top` resolves each wire
as the OR of the driven values, 0 when nothing drives it. Two active drivers
on one wire can only come from a bad bitstream. They raise the `contention`
output, and an assertion fires on `clk`. Inside a cluster, an unselected
input reads ground rather than floating.

The netlist necessarily contains combinational loops. A LUT output can be
routed back to its own cluster, and bus A can drive bus B through one switch
block while B drives A through another. Verilator reports these as
`UNOPTFLAT` warnings, and they are expected. A bitstream that actually
closes such a loop without a flip-flop is invalid, as on any FPGA. Because
the configuration reads as zero until programming completes, such a loop can
never appear at power-up.

## Pins

`io_block` models a pad in two states. The chip drives the pad when the
output-enable bit is set and the IO output box has a track selected for that
pin. Otherwise an outside driver sets the level (`pad_i` with `pad_i_en`).
Otherwise the pull-up gives 1; it wins if both pulls are on. Otherwise the
level is 0, and `pad_float` is set when no pull is enabled either. The pad
level always goes back to the IO input box, so an output pin can also be read
by the fabric.

## What follows the architecture and what is this implementation's choice

The architecture fixes the following:

* the block counts and the topology of buses, boxes and clusters;
* the 10-wire disjoint fabric;
* 5 BLEs per cluster with 16-input matrix muxes;
* the BLE structure and its 19 bits;
* the two-bank shift registers and the serial chain with clock, data and
  enable;
* select code 0 meaning "drive nothing" on the fabric and "ground" inside a
  cluster;
* all the bit counts (3, 19, 30, 20, 30, 80, 175, 80, 1480).

These are choices made here:

* the order of blocks along the chain after the west IO input box;
* the order of fields and bits inside every block;
* the switch block's code-to-side mapping;
* treating unused mux codes as "no source";
* reading zero configuration and clearing the flip-flops while programming,
  and loading the active bank on the first `prog_clk` edge after `prog_en`
  falls;
* the meaning of the three IO bits and the two-state pad model;
* the dead-end buses on the outer sides of the west and east switch blocks.

A bitstream produced for another implementation of this architecture will
therefore not load here unchanged.

There is no software flow in this repository. Bitstreams are assembled by the
field-setting functions in `tb/tb_fpga_top.sv` (`set_io`, `set_icb`,
`set_ocb`, `set_lcb`, `set_sb`, `set_im_wire`, `set_im_ble`, `set_ble`),
which double as a worked example of hand placement and routing.

## Example designs and what fits

| design | pins | BLEs | result |
|--------|------|------|--------|
| 4-bit ripple adder | 8 in, 5 out | 8 (2 clusters) | all 256 sums correct; the bit-1 carry crosses the centre block |
| set/clear register + register with enable | 4 in, 2 out | 2 | checked cycle by cycle for 200 cycles |
| pull-up / pull-down / external drive | 3 in, 3 out | 3 | read back through a cluster |
| detector "101100100", 7-segment state | 2 in + clock, 7 out | 19 of 20 | checked against a model over 300 random inputs |
| detector "101100101" | same | 19 of 20 | same |

The detector keeps its state in 4 binary bits, one per cluster. For each bit,
two LUTs give the next value for input 0 and input 1, and a third LUT picks
between them (or 0 on reset) and holds the bit in its flip-flop. The seven
display LUTs are spread over the clusters. Before the random part, the test plays a clean
match, the false start "100", the near miss "1011011001000" (which falls
back from state 5 to state 3, because "101" is still a valid prefix), and a
match cut short by reset. The display shows the state on an active-low
{a..g} bus: 0 = 01, 1 = 4F, 2 = 12, 3 = 06, 4 = 4C, 5 = 24, 6 = 20, 7 = 0F,
8 = 00, 9 = 04 (hex). Reset is taken on the clock edge. A general 10-input, 10-output,
10-state machine has enough pins and flip-flops on this chip. Whether its
next-state logic fits in 20 four-input LUTs and 10 tracks depends on the
machine, and many such machines will not fit.

## Verification

Every module has a self-checking testbench in `tb/`, named `tb_<module>`,
that compares it with an independent model:

* exhaustive or random configurations for `shift_reg`, `prog_mux`,
  `conn_box`, `switch_block` and `io_block`;
* random acyclic five-BLE networks for `logic_cluster`, with a cycle-accurate
  model;
* all four example bitstreams above for `tb_fpga_top`. It also checks that
  each 1480-bit bitstream is read back intact from `prog_out` while the next
  one is loaded. It counts each mechanism it exercises and fails if any of
  them never happens: set, clear, hold, enable, pulls, floating pins, carries
  through the centre block, detection, fallback and reset.

Every testbench has a watchdog and prints one line
`TB_RESULT checks=N failures=M`. `tb_fpga_top` runs the chip at its full
size in well under a second.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/fpga_pkg.sv tb/tb_fpga_top.sv --top-module tb_fpga_top -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace `tb_fpga_top` with any other testbench name to run that block's
test. Add `-Wno-UNOPTFLAT` to quieten the expected loop warnings. To change
the sizes, edit `rtl/fpga_pkg.sv`. The track count (`FABRIC_W`), the LUT size
(`LUT_K`), BLEs per cluster and pins per bank are parameters there, and all
the bit counts follow from them. The floor plan in `fpga_top` (five switch
blocks, four clusters, four banks) is fixed.

## Files

* `rtl/fpga_pkg.sv`: sizes, bit counts, BLE configuration struct, chain
  order and offsets.
* `rtl/shift_reg.sv`: two-bank configuration shift register.
* `rtl/prog_mux.sv`: programmable multiplexer.
* `rtl/ble.sv`: basic logic element.
* `rtl/conn_box.sv`: connection box, used as IO input box, IO output box,
  cluster-output box and interconnect matrix.
* `rtl/logic_cluster.sv`: 5 BLEs and their interconnect matrix.
* `rtl/switch_block.sv`: disjoint switch block.
* `rtl/io_block.sv`: programmable pin.
* `rtl/fpga_top.sv`: the chip.
* `tb/tb_*.sv`: one testbench per module.
