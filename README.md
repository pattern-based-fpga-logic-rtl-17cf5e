# Pattern-based FPGA logic block

In a conventional FPGA cluster, every LUT sits inside a basic logic element
(BLE): LUT, D flip-flop and a 2:1 output multiplexer. The BLE has a single
output. A LUT that drives another LUT in the same cluster must therefore go
through that output multiplexer and back through the local routing. A LUT whose
value is needed both registered and unregistered costs a second BLE.

The pattern-based logic block adds *fast combinational shortcuts* between the
LUTs of a cluster. Each LUT's raw output is fed back into the local routing,
next to the BLE outputs. The shortcuts follow a fixed pattern that covers every
acyclic way the cluster's LUTs can be wired to each other. This RTL models one
such block in its evaluated configuration:

| parameter | default | meaning |
|-----------|---------|---------|
| `K`       | 6       | LUT inputs |
| `N`       | 7       | BLEs per block; the shortcut pattern is a pattern-7 |
| `I`       | 24      | block inputs, `K*(N+1)/2` |

The model is functional. It is not a transistor-level description of the block.

## Why a fixed pattern is enough

Connections among LUTs follow three rules:

- The inputs of a LUT are interchangeable, because the truth table can be permuted.
- A network of LUTs has no combinational cycle.
- One LUT never needs to drive two inputs of the same LUT, because those two inputs could be merged.

Together, these rules mean that two LUTs are linked by at most one direct
connection. An acyclic network can also always be numbered so that every
connection goes from a lower-numbered LUT to a higher-numbered one.

Now give LUT `j` one extra source on each input `i < j`: the output of LUT
`i`. With this, any combinational network of up to `N` LUTs fits in the block:

1. Number the LUTs topologically.
2. Move each connection from LUT `i` onto input `i` of its destination LUT.
3. Permute that LUT's truth table to match.

Connections that run through LUTs outside the block still use the ordinary
routing, as they would in a classical cluster.

The pattern needs `K >= N-1`, and `pattern_clb` stops elaboration otherwise.
It adds `N(N-1)/2` two-input choices, which is 21 for `N = 7`:

```
LUT 0: no shortcuts
LUT 1: in0 <- LUT0
LUT 2: in0 <- LUT0, in1 <- LUT1
...
LUT 6: in0 <- LUT0, in1 <- LUT1, ... , in5 <- LUT5
```

Pattern-2 (`N = 2`) and pattern-3 (`N = 3`) are the same rule at smaller sizes.
`tb/pattern_cases_tb.sv` builds both and checks the direct, independent and
fed-by-one/fed-by-both cases of each.

## Block structure

```
            +---------------- local_routing ----------------+
ipin[I] --->|  one routing_mux per LUT input (N*K of them)  |---> lut_in[N][K]
opin[N] --->|  sources: ipin, opin, and for input i of      |
lut_comb -->|  LUT j (i<j) the raw output of LUT i          |
            +-----------------------------------------------+
                                   |
                  N x ble:  lut -> DFF -> 2:1 mux -> opin[j]
                            lut ---------------------> lut_comb[j]
```

The shortcuts are folded into the routing multiplexers: a routing multiplexer
that has a shortcut gets one more input. The other option would be a separate
layer of 2:1 multiplexers between the local routing and the LUTs. That layer
would be faster for the shortcut paths, but slower from the block inputs, and
it is not built here. Each BLE output goes to the block output and back into
the local routing, as in a classical cluster.

Files, bottom-up:

| file | content |
|------|---------|
| `rtl/clb_pkg.sv` | default sizes, select-code width, shortcut code |
| `rtl/lut.sv` | K-input LUT, `out = cfg[in]` |
| `rtl/ble.sv` | LUT + flip-flop + output mux; also exports the raw LUT output |
| `rtl/routing_mux.sv` | one binary-coded routing multiplexer |
| `rtl/local_routing.sv` | all routing multiplexers with the merged shortcuts |
| `rtl/pattern_clb.sv` | top: local routing plus N BLEs |

## Configuration interface

The configuration is static and is applied through ports of `pattern_clb`. No
configuration memory or loading chain is modelled:

- `lut_cfg[j]`: the truth table of LUT `j`. Bit `a` is the output for input value `a`, and `in[0]` is the least significant bit.
- `seq_mode[j]`: `1` makes BLE `j` output its flip-flop; `0` makes it output the LUT directly.
- `route_sel[j][i]`: the select code for input `i` of LUT `j`. `SELW = clog2(I+N+1)` is 5 bits at the defaults. The codes are:

| code | source |
|------|--------|
| `0 .. I-1` | `ipin[code]` |
| `I .. I+N-1` | `opin[code-I]`, a BLE output |
| `I+N` (31 at the defaults) | the shortcut from LUT `i` if `i < j`; otherwise constant 0 |

At the defaults the 32 codes are all used on the inputs that have a shortcut.
Those inputs therefore have no "tie to 0" code. An unused input there is made
a don't-care in the truth table. `clb_pkg::shortcut_code` and
`clb_pkg::sel_width` give the values for other sizes.

## Timing and reset

A path from `ipin` through any chain of combinational BLEs to `opin` settles
within one cycle. Registered BLEs sample their LUT on the rising edge of `clk`.
`rst_n` is an asynchronous active-low reset that clears all flip-flops.

A BLE's raw LUT output reaches the higher-numbered LUTs through the
shortcuts even when that BLE is in
registered mode. One BLE can therefore supply both the registered and the
unregistered value of the same function, which is the fanout case that costs a
second BLE in a classical cluster.

## Combinational loops

The BLE outputs feed back into the local routing, so the netlist contains
structural combinational loops, like any FPGA cluster. Lint tools report them
on `pattern_clb`.

A configuration is legal only if no cycle runs entirely through
combinational-mode BLEs. The shortcut paths cannot form a cycle, because they
only go from lower to higher LUT numbers. If an illegal configuration closes a
loop, a simulator will fail to settle.

## Verification

Each testbench checks its results itself and prints
`TB_RESULT checks=<n> failures=<n>`:

| testbench | what it checks |
|-----------|----------------|
| `tb/lut_tb.sv` | AND, OR and parity tables on every input value; random tables |
| `tb/ble_tb.sv` | reset, one-cycle latency in registered mode, pass-through in combinational mode |
| `tb/local_routing_tb.sv` | random select codes against a reference decoder; counts exactly 21 shortcut positions |
| `tb/pattern_clb_tb.sv` | full default size: a 24-input parity chain through all seven LUTs and six shortcuts; a 3-bit counter in registered BLEs; one registered BLE whose LUT also feeds LUT 1 through a shortcut; 300 random legal configurations (8 cycles each) against a reference model. It counts that fanout case, shortcut use, combinational and registered feedback, both BLE modes and reset, and fails if any of them never happens. |
| `tb/pattern_cases_tb.sv` | pattern-2 and pattern-3 instances, every interconnection case |

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module pattern_clb_tb \
    -y rtl -y tb +libext+.sv rtl/clb_pkg.sv tb/pattern_clb_tb.sv
./obj_dir/Vpattern_clb_tb
```

The testbenches also pass when every variable starts at a random value
(`+verilator+rand+reset+2`).

## What the block does not include, and what differs

- **Global routing.** The routing between blocks is not modelled: length-4 single-driver wires, with input and output connectivity of 0.15 and 0.10 of the channel. `ipin` and `opin` are the block's connections to it.
- **Packing.** The pattern-aware packing algorithm decides how a netlist uses the shortcuts. It is software and is not part of this RTL. It absorbs a seed BLE together with its unpacked predecessors, with an attraction function that weights timing criticality at 0.75 and net sharing at 0.25; within net sharing, absorbed block outputs weigh 0.9 and shared inputs 0.1. The testbench configurations are written by hand or generated at random.
- **Benchmarks.** A single block holds 7 LUT/flip-flop pairs. The evaluated designs need between 4 and about 1250 blocks plus global routing, so none of them runs on this model. For example, a design with 2790 LUTs and 2199 flip-flops needs at least 399 blocks.
- **Delay and area.** The architecture's value shows up as critical-path delay and area: about 14% lower delay, 8% less wirelength and 3% more area over a set of control-dominated designs. The shortcuts alone cost about 0.45% of block area. None of this is visible in RTL. At the defaults the shortcuts add 21 multiplexer inputs to the 42 x 31 = 1302 inputs of the classical local routing.
- **Choices made in this design.** The binary select encoding and the order of the sources, the bit order of the truth tables, the asynchronous reset, and configuration as ports are all this design's own choices.
- **Multiplexer structure.** One schematic of the block shows the shortcut for the last BLE as a second multiplexer stage after the local routing. This RTL folds it into a single larger routing multiplexer. The logic function is the same.
- **Not modelled.** Several patterns per block and the separate shortcut layer are both possible extensions, and neither is modelled.
