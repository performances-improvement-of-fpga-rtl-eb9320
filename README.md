# MFPGA: a multilevel hierarchical FPGA fabric in SystemVerilog

Most of an island-style FPGA's area goes into routing. This fabric uses a
different interconnect. Logic blocks are grouped into a tree of clusters.
Two **unidirectional** networks join them:

* a **downward network**, a butterfly fat tree (BFT) of multiplexers that
  carries signals from the top of the tree to the logic-block input pins, and
* an **upward network** that takes every logic-block output and every input pad
  up to one multiplexer at *each* level of the downward network.

To connect A to B, a signal climbs the upward network to a level that A and B
share. It then follows the one downward path to B. With a Rent exponent
p = 1, switches and wires per logic block grow only as log_k(N). In a mesh
they grow as a power of N. The fabric trades some logic utilisation for much
less interconnect.

The RTL models this fabric as a configurable device. It contains the
configuration storage, the LUTs and flip-flops, and every routing
multiplexer. The default size is the **4 x 4 x 4** device:

| quantity | value |
|---|---|
| levels, arity k | 3, 4 |
| logic blocks (4-LUT + bypassable D flip-flop) | 64 |
| input pads / output pads | 64 / 64 (4 + 4 per level-0 cluster) |
| mini switch boxes (MSBs) per level 0 / 1 / 2 | 64 / 64 / 64 |
| routing switches (multiplexer inputs) | 3584 |
| configuration bits | 3136 |

## The cluster tree

A level-0 cluster holds 4 logic blocks, 4 input pads and 4 output pads, plus a
**switch box** of 4 MSBs. An MSB is a set of k = 4 multiplexers, one for each
output. MSB `m` of a level-0 cluster drives input pin `m` of all four logic
blocks.

A level-i cluster holds 4 level-(i-1) clusters and one level-i switch box.
Under Rent's rule with c_in = 4 and p = 1, a level-i cluster has
N_in(i) = 4·4^(i+1) downward inputs. A level-1 cluster has 64 inputs; a
level-0 cluster has 16. So the level-1 switch box has 16 MSBs, and the level-2
(top) switch box has 64. Output `c` of MSB `m` drives input `m` of child `c`.
Inside the child, input `m` enters MSB `m / 4` on downward port `m mod 4`.
Follow these rules down the tree and you get the key property of the BFT:

> MSB `m` of a level-i switch box can only reach **input pin `m / 4^i`** of a
> logic block, and it reaches that pin of every logic block in its cluster by
> exactly one path.

Each MSB of a non-top switch box has `k + 2 = 6` inputs. Four of them are
downward wires from the parent. One is a logic-block feedback and one is an
input pad. The top switch box has no parent, so its MSBs have only the
feedback and the pad. These numbers give exactly the switch counts of the
published architecture:

| fabric | LEVELS | switches (= multiplexer inputs) | config bits |
|---|---|---|---|
| 4 | 1 | 32 | 100 |
| 4 x 4 | 2 | 512 | 592 |
| 4 x 4 x 4 | 3 | 3584 | 3136 |
| 4 x 4 x 4 x 4 | 4 | 20480 | 15616 |
| 4 x 4 x 4 x 4 x 4 | 5 | 106496 | 74752 |
| 4 x 2 x 2 x 4 | 4 | 3584 | 3392 |
| 4 x 4 x 2 x 2 | 4 | 4096 | 3392 |

## Mixed arity

The arity may differ per level, as in the published 4 x 2 x 2 x 4 and
4 x 4 x 2 x 2 fabrics. Write B(i) = N_0·N_1·…·N_i for the number of logic
blocks in a level-i cluster. Then a level-i cluster has `4·B(i)` downward
inputs. Its switch box has `4·B(i-1)` MSBs with N_i outputs each. A non-top
MSB has N_i downward inputs and `2·N_i/4` upward inputs; a top MSB has only
the upward inputs. For N_i = 4 this is the 4 + 1 + 1 above. For N_i = 2 each
MSB has one upward input. Half of the MSBs for each pin take a feedback there,
the other half a pad. These counts give the published switch counts for the
mixed fabrics too (table above). The RTL needs N_0 = 4 (= `LUT_K`, the pads
per level-0 cluster) and every `2·N_i` to be a multiple of `LUT_K`. It checks
both at elaboration.

## The upward network: why the feedback is rotated

Every logic-block output goes to one MSB at every level, and so does every
input pad. Which MSB it goes to decides which input pin of the destination the
signal arrives on. A destination reached through levels 0, 1 and 2 should see
the signal on three *different* pins. Then a router has three choices instead
of one, and the LUT mask can be permuted to match whatever pin it gets.

Take a block with local index `l = 4·v + a0` inside its level-i cluster.
`a0` is its position in its level-0 cluster. The block becomes upward source
`u = v` of the level-i switch box. An input pad with the same local index
becomes source `u = B(i)/4 + v`. With `P = B(i-1)`, the source feeds MSB

    m = ((a0 + i) mod 4) · P + (u mod P),   upward input u / P

From that MSB the signal lands on pin `(a0 + i) mod 4`. Block A therefore
reaches any block B on pin `a0` through level 0, pin `a0+1` through level 1
and pin `a0+2` through level 2 (the paths through levels below their common
level do not exist). For the 4 x 4 x 4 fabric this is
`m = ((a0 + i) mod 4)·4^i + v`, with the feedback on the first upward input
and the pad on the second. `mfpga_pkg::up_is_pad` and `up_index` give, for
each MSB upward input, the source it is wired to.

At level 0 the rule is the identity (block j feeds MSB j). The rotation for
higher levels is this implementation's choice. The published architecture
requires that each level reaches a different pin, and this is the simplest
rule that does so.

## Logic block

`mfpga_lb` is a 4-input LUT followed by a D flip-flop that can be bypassed. It
has 17 configuration bits: the 16-bit mask (`out = mask[in]`) and the bit that
selects the flip-flop. Since the router picks the pin, the bitstream generator
rewrites the mask for the pin permutation it chose.

## Output pads

There are as many output pads as logic blocks, so output pad `g` is wired
straight to logic block `g` (`pad_out = lb_out`). Output pads are not
connected to the downward network.

## Configuration

All configuration memory is one serial shift chain built from `mfpga_cfg_reg`
segments.

* Hold `cfg_en` high and shift one bit per `clk` into `cfg_in`. Send the bit
  for the highest chain position first; a full load takes `CFG_BITS` cycles.
* `cfg_out` is the far end of the chain. Shifting the same stream in again
  reads the old contents back out.
* The chain runs depth-first. Each cluster chains its 4 children (at level 0,
  its 4 logic blocks), then its switch box from MSB 0 upward. Inside a logic
  block, bits 0–15 are the mask and bit 16 selects the flip-flop. Inside an
  MSB, output `o` uses bits `[o·SW +: SW]`. `SW` is 3 for a 6-input MSB and
  2 for a top-level MSB.
* Select code 0 turns the output off, so it drives 0. Code `j+1` selects input
  `j`, in this order: downward ports 0..3, feedback, pad. On the top level
  the order is feedback, pad.
* `rst_n` (asynchronous, active low) clears all configuration and every user
  flip-flop.
* While `rst_n` is low or `cfg_en` is high, every logic-block output is held
  at 0 and every flip-flop is cleared. The routing network is full of
  structural loops (a block output can be routed back to a block input).
  Holding the outputs breaks every loop, so a partly loaded bitstream cannot
  oscillate. After `cfg_en` falls, the loaded circuit starts with all
  flip-flops at 0.

The serial chain, the bit order, the off code and the reset/hold behaviour
are this implementation's choices. The published architecture says only that
the fabric is mostly SRAM cells and multiplexers.

## Timing

Paths from `pad_in` through the routing and LUTs to `pad_out` are purely
combinational. A block that uses its flip-flop adds one `clk` cycle. The only
clocked elements are the configuration chain and the 64 user flip-flops.

## Files

| file | contents |
|---|---|
| `rtl/mfpga_pkg.sv` | size functions, switch/config counts, upward-network rotation |
| `rtl/mfpga_cfg_reg.sv` | configuration chain segment |
| `rtl/mfpga_lb.sv` | logic block |
| `rtl/mfpga_msb.sv` | mini switch box (N_OUT multiplexers) |
| `rtl/mfpga_switchbox.sv` | switch box of one cluster, with the upward taps |
| `rtl/mfpga_cluster.sv` | cluster, instantiates itself recursively down to level 0 |
| `rtl/mfpga_top.sv` | the fabric: root cluster, pads, configuration port |
| `tb/mfpga_tb_pkg.sv` | netlist generator, router, bitstream builder, reference model |
| `tb/tb_mfpga_*.sv` | testbenches |

`mfpga_top` takes the parameters `ARITY` and `LUT_K` (defaults `32'h444`
and 4). Hex digit i of `ARITY` is N_i, level 0 in the lowest digit, so
4 x 2 x 2 x 4 is `32'h4224` and 4 x 4 x 2 x 2 is `32'h2244`. The localparams
`CFG_BITS` and `SWITCHES` give the chain length and the switch count.

## Simulating

Verilator 5 (`--timing` is needed by the testbenches):

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        --top-module tb_mfpga_top rtl/mfpga_pkg.sv tb/mfpga_tb_pkg.sv tb/tb_mfpga_top.sv
    ./obj_dir/Vtb_mfpga_top

Each testbench ends with `TB_RESULT checks=N failures=M`.

* `tb_mfpga_top` covers the full default 4 x 4 x 4 device. For each of two
  random user netlists (about 60 % and 90 % of the blocks used), it routes,
  loads, reads back and runs 300 cycles of random pad vectors. Every output
  pad is compared with a netlist model on every cycle. Then it checks the
  reset. It also counts the mechanisms and fails if one never occurs:
  configuration hold, readback, routes through each of the three levels,
  routes taken above the lowest common level, pad and feedback sources,
  registered and bypassed blocks. A directed test then routes one signal
  from block A to block B through level 0, 1 and 2 in turn and checks that
  it arrives on three different pins.
* `tb_mfpga_cluster` tests a non-top level-1 cluster, including routes that
  enter from the parent through `down_in`.
* `tb_mfpga_switchbox` tests random selects on a level-1 and a top switch box.
  It also probes each feedback and pad tap one-hot and checks that the tap
  lands on the rotated pin.
* `tb_mfpga_msb`, `tb_mfpga_lb` and `tb_mfpga_cfg_reg` are unit tests.
* `tb_mfpga_workloads` runs random netlists sized like the MCNC benchmarks
  b1, cm138a, cm42a, pcle, decod, cc, count, my_adder, b9 and i4. Each runs
  on the fabric those benchmarks were mapped to (1 to 4 levels), including
  the mixed-arity 4 x 2 x 2 x 4 (pcle) and 4 x 4 x 2 x 2 (count). It uses
  `tb_mfpga_run`.

The testbench router (`mfpga_tb_pkg::fabric`) is a simple greedy router. It
tries the lowest common level first, then higher levels, and drops an input
it cannot route; the netlist model then reads that input as 0. It exists to
produce valid bitstreams. It is not a placement and routing tool, and its
drop rate says nothing about the fabric's routability.

## How far to trust it

* Every RTL file passes Verilator lint and the slang front end. All testbenches
  pass, and each one fails when its module is deliberately broken.
* The structure reproduces the published switch counts for 1 to 5 levels
  and for the mixed-arity fabrics (table above). Fabrics with 5 or more
  levels elaborate but are not simulated here.
* Not reproduced: the published placement and routing flow and its area
  figures. The benchmark netlists are not included; the workload testbench
  uses random netlists of the same size.
* Lint reports circular combinational logic (UNOPTFLAT) in the switch boxes.
  This is the structural feedback of a programmable fabric, as explained
  above. A loaded circuit only has a real loop if it is itself
  combinationally cyclic.
