# POEtic organic array: molecules over a self-routing layer

POEtic is a programmable device for bio-inspired hardware, meant for circuits
that grow, learn and repair themselves. Its fabric is made of two layers.

- **Molecules.** The upper layer is a grid of small logic elements. Each
  molecule is a 16-bit look-up table (LUT) plus a flip-flop, wired to its four
  neighbours.
- **Routing units.** The lower layer is a grid with one routing unit under
  each molecule. The units connect the outputs and inputs of larger functional
  groups of molecules ("cells") **at run time**, using a distributed
  shortest-path search. No processor takes part.

A molecule can also rewrite the configuration of its neighbours bit by bit,
so a circuit can change itself without outside help.

This repository holds synthesizable SystemVerilog for the organic part of one
POEtic chip. The default array is 8 × 18 = 144 molecules, the size of the
fabricated device. The RTL includes:

- the molecules and their 76-bit configuration registers;
- partial self-reconfiguration;
- the routing layer;
- the parallel configuration port.

The chip's processor side is not included: a 32-bit RISC processor, an
AMBA-style system bus, peripherals, and the interface bus that joins several
chips. Those parts meet this design at the top-level ports (see the last
section).

```
rtl/poetic_pkg.sv         shared types, configuration bit layout, broadcast channels
rtl/molecule_cfg.sv       76-bit configuration register: parallel, serial (with bypass), LUT self-update
rtl/molecule.sv           LUT + flip-flop, 8 modes, switch box, serial reconfiguration links
rtl/routing_unit.sv       one routing unit: the 4-phase routing state machine and its data switch
rtl/routing_plane.sv      ROWS x COLS mesh of routing units
rtl/organic_subsystem.sv  molecule array + routing plane + configuration bus
rtl/poetic_chip.sv        top level (organic subsystem with the chip's external ports)
tb/tb_*.sv                self-checking testbenches, one per module, plus a dense routing workload
                          and a 2 x 2 multi-chip tissue
```

## Coordinates and sides

These conventions hold everywhere in the RTL.

- Row 0 is the **southern** row and column 0 the western column.
- Molecule and routing unit (r, c) have index `r*COLS + c`.
- Sides are encoded 0 = N, 1 = E, 2 = S, 3 = W. The opposite side is
  `side ^ 2`.
- Each molecule has two lines per side. A line is numbered `side*2 + k`:
  0 N0, 1 N1, 2 E0, 3 E1, 4 S0, 5 S1, 6 W0, 7 W1.

## The molecule

A molecule reads four LUT inputs `a[3:0]`. Each input picks one of the eight
incoming neighbour lines with a 3-bit selector. Input 2 can take the north
neighbour's carry instead, and input 3 can take the molecule's own flip-flop.
The mode sets what the 16 LUT bits mean:

| mode (code) | behaviour |
|---|---|
| 4-LUT (0) | `f1 = LUT[a3 a2 a1 a0]` |
| 3-LUT (1) | Two 8-bit LUTs. `f1 = LUT[0 a2 a1 a0]`, `f2 = LUT[1 a2 a1 a0]`. `f2` is the second output and also drives the carry to the south neighbour. |
| Comm (2) | `LUT[15:8]` is an 8-bit circular shift register and advances when `a3 = 1`. `LUT[7:0]` is a 3-input LUT on `{LUT[15], a1, a0}`. Load an XNOR table to compare a serial input with the stored word. |
| Shift memory (3) | The 16 bits form a shift register. `a1` = shift enable, `a0` = data in, `f1 = LUT[15]`. |
| Input (4) | A cell input. `f1` is the value the routing layer delivers. The LUT holds the identifier of the source this input needs. |
| Output (5) | A cell output. `f1 = a0`, and `a0` is offered to the routing layer. The LUT holds this output's identifier. |
| Trigger (6) | The 16-bit register rotates every clock. Loaded with `0…01`, it gives one pulse every 16 cycles. |
| Configure (7) | `a1` is a shift enable and `a0` a serial bit. Both go to the neighbour on side `cfg_dir`, which shifts the bit into its configuration. |

- **First output.** The first output `out1` is `f1`, or the flip-flop when
  `use_dff` is set. The flip-flop samples `f1` every clock.
- **Flip-flop reset.** The flip-flop resets to 0. Every parallel configuration
  write loads it with `dff_init`.
- **Switch box.** Each of the 8 outgoing lines has a 3-bit selector:
  - 0–5 pick one of the six lines arriving on the other three sides. These are
    counted in ascending side order, skipping the line's own side, two lines
    per side.
  - 6 picks `out1`.
  - 7 picks `f2`.

  A switch box of all zeros passes E0 on the north side and N0 on the other
  three sides.
- **Reset.** While `rst_n` is low, every output toward a neighbour is forced
  to 0. This covers lines, carry, reconfiguration links and routed data. A
  random power-up configuration therefore cannot oscillate before reset has
  cleared it.

## Configuration register and partial reconfiguration

Each molecule has 76 configuration bits in five blocks. Each block is followed
by its bypass bit:

| bits | block | contents |
|---|---|---|
| 15:0 | LUT | truth table, shift-register contents, or routing identifier |
| 16 | bypass | |
| 30:17 | input select | 4 × 3-bit line selector, `in2_carry` (bit 29), `in3_q` (bit 30) |
| 31 | bypass | |
| 55:32 | switch box | 8 × 3-bit, outgoing line `i` at bits `32+3i +: 3` |
| 56 | bypass | |
| 59:57 | mode | code from the table above |
| 60 | bypass | |
| 74:61 | other | `use_dff` (61), `dff_init` (62), `cfg_dir` (64:63), `cfg_chain` (65), 9 free storage bits (74:66) |
| 75 | bypass | |

The register has three write paths, in this order of priority.

1. **Parallel bus.** This is the processor's path. It writes three 32-bit
   words: word 0 = bits 31:0, word 1 = bits 63:32, word 2 = bits 75:64 in the
   low 12 bits. Only this path can set the bypass bits.
2. **Serial shift from a neighbour.** The 71 data bits act as one shift
   register, LUT first.
   - Every block whose bypass bit is set is skipped.
   - A new bit enters at the lowest bit that is not bypassed, so at bit 0 when
     the LUT is not bypassed. Every bit moves one place up.
   - The bit leaving the top is the molecule's serial output.
   - With the mode and "other" blocks bypassed, the chain is LUT + input
     select + switch box = 54 bits. That is the amount of configuration a
     molecule can lend as serially accessed storage.
3. **Runtime LUT update** by the Shift, Comm and Trigger modes.

**Chaining.** A Configure-mode molecule drives its enable/bit pair toward
`cfg_dir`. If the receiving molecule has `cfg_chain` set, it passes the bit
leaving its own register on to the neighbour **opposite** the side the bits
came from, in the same cycle. A row or column of molecules can therefore be
rewritten as one long shift register, for example to change all the weights
of a neuron at once. A receiver that gets bits from several sides takes the
first of N, E, S, W.

Two cautions for anyone who reconfigures serially:

- **Configuration passes through other blocks.** Bits in transit cross every
  block that is not bypassed. If the switch box or the mode lies on the chain,
  they take arbitrary values while the shift runs, and a passing value can
  briefly close a combinational loop in the mesh.
- **Bypass what must stay fixed.** Bypass every block that has to stay valid,
  and keep the chained molecules' switch boxes out of the chain unless they
  are being rewritten on purpose. The testbenches chain only LUT (and input
  select) blocks.

## Dynamic routing

A source is a molecule in Output mode, and its LUT is its identifier. A
target is a molecule in Input mode, and its LUT holds the identifier of the
source it needs. Identifiers are 16 bits.

The routing layer connects every unconnected target to a source with the
identifier it needs. It builds the paths one routing process at a time. Every
routing unit runs the same state machine (`routing_unit.sv`), and the units
stay in step because they all see the same broadcast signals.

### The broadcast network

Each unit forwards each broadcast channel with a fixed pattern:

| arriving from | forwarded to |
|---|---|
| north | south |
| south | north |
| east | west, north, south |
| west | east, north, south |
| the unit itself | all four sides |

A signal therefore first runs along its own row and then up and down every
column. Every unit sees it within the same clock cycle, through combinational
logic with no loop.

The pattern has a useful side effect. A unit's input from the south carries
the OR of every row below it. Its input from the west carries the OR of the
units to its west in its own row. Seven channels share this network: request,
address bit, "master is a source", target found, wave alive, back-trace busy,
and targets pending.

### Phase 1: master election (1 cycle)

Every unconnected source or target raises *request*. A requester that sees no
request from the south and none from the west becomes master. That is the
lowest row first, then the westernmost unit in that row. No other unit can see
itself as master, so no central arbiter is needed.

### Phase 2: address (16 cycles)

The master sends an identifier over the network, most significant bit first:

- its own identifier if it is a source;
- the identifier it needs if it is a target.

Every other unit compares the bits with its molecule's LUT as they arrive.

### Phase 3: elimination (1 cycle)

The master announces whether it is a source.

- **Source master.** The master is the only source in the process. Every
  unconnected target that matched takes part, so one process can connect many
  targets.
- **Target master.** The master is the only target. Every matching source
  takes part as a starting point, so the nearest one wins.

### Phase 4: shortest path (breadth-first wave plus back-trace)

This is the hardest part of the design.

**Links.** Every unit has one output data link per side. A link belongs to at
most one net, and `link_used` marks a reserved link.

**Expansion.** Starting from the source (or sources), a wave advances one unit
per clock, through links that are still free.
- A unit reached for the first time records the side it came from as its
  *parent*. Ties go N, E, S, W in that order.
- The wave stops as soon as an involved target is reached, or when it dies
  out.

**Back-trace.** Each target reached in that cycle is connected to its parent's
link and starts a token. The token walks back along the parents, one unit per
clock. Each unit it enters:
- reserves its output link toward the unit the token came from;
- switches that link to carry the net: from the molecule if the unit is the
  source, otherwise from its own parent link.

The token stops at a unit that is already on the net. If two targets' tokens
merge, the second finds the path already built.

**Restart.** If involved targets are still unconnected, the wave restarts from
**every unit already on the net**. Later targets can therefore branch off an
existing path instead of going back to the source. The phase ends when no
involved target is left or the wave cannot reach any.

**End of the process.** Then:
- The master, every connected target and every source that got a path stop
  requesting.
- The next process starts on the following clock if any requests remain.
- A target that cannot be reached keeps requesting until it has been master
  of one process itself. After that it waits for `route_restart`.

**Timing.** For a single source-to-target pair at path length D, the target
is marked connected 19 + D cycles after the request:
- 1 cycle of election;
- 16 cycles of address;
- 1 cycle of elimination;
- D wave steps;
- 1 cycle in which the find is seen.

The back-trace then reserves the path, one unit per clock, and the process
ends a cycle after the token arrives. The shortest-path search therefore
takes time proportional to the path length, not to the array size.
`tb_routing_plane` checks the exact count.

**Data.** Once connected, a target's value is its source's value a few gates
later. The paths are pure combinational switches, so data crosses the array
within the clock cycle.

**Restart.** `route_restart` clears every path and every "connected" flag, and
the whole array is routed again. Use it after a change to the configuration
(cell addition, self-repair). A new cell that only adds sources or targets
does not need it: the new molecules request on their own and are routed
around the existing paths.

## Top level: `poetic_chip`

The ports are grouped as follows.

- **`clk`, `rst_n`.** `rst_n` is an asynchronous, active-low reset.
- **Configuration bus (`cfg_we`, `cfg_addr`, `cfg_word`, `cfg_wdata`,
  `cfg_rdata`).**
  - A write takes effect on the rising edge.
  - `cfg_rdata` combinationally shows the addressed word.
  - This is where the processor of the environment subsystem would connect.
- **Routing (`route_restart`, `route_busy`).** `route_busy` is high while any
  unit is in a routing process. It drops for one cycle between two processes.
- **Organic bus (`n/s/e/w_line_in/out`, `n_carry_in`, `s_carry_out`).** These
  are the two neighbour lines of every edge molecule and the carry column
  ends. They let several chips be tiled into a larger molecule array.
- **Observation (`mol_out`, `mol_routed`, `route_master`, `route_links`).**
  These show each molecule's first output, whether it is a connected target,
  who the current master is, and the reserved links.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and stops; a watchdog ends a hung run. Plain
verilator 5:

```
verilator --binary --timing -Irtl rtl/poetic_pkg.sv rtl/molecule_cfg.sv rtl/molecule.sv \
  rtl/routing_unit.sv rtl/routing_plane.sv rtl/organic_subsystem.sv rtl/poetic_chip.sv \
  tb/tb_poetic_chip.sv --top-module tb_poetic_chip -Wno-UNOPTFLAT
./obj_dir/Vtb_poetic_chip
```

Replace the testbench and top module name for the others.

| testbench | what it exercises |
|---|---|
| `tb_molecule_cfg` | Parallel load and read-back, 150 serial shifts against a reference model, the 54-bit storage chain, bypass combinations, and write priority. |
| `tb_molecule` | All eight modes, the flip-flop, every switch-box selector, and chained serial reconfiguration. |
| `tb_routing_unit` | One unit with a hand-driven neighbourhood: election, address timing, broadcast forwarding, and a non-matching identifier. |
| `tb_routing_plane` | 4 × 6 plane: exact timing for one pair, one source with three targets, duplicate sources, target master with two sources (nearest wins), and an unreachable target. |
| `tb_routing_dense` | Full 8 × 18 plane with 8 sources and 8 targets packed in a 4 × 4 checkerboard. All eight nets route (234 cycles, 34 links), and each target follows only its own source under random data. |
| `tb_organic_subsystem` | 3 × 4 array: logic → Output → routing → Input → edge line, carry, a chained Configure, and a routing restart. |
| `tb_tissue` | Four full-size chips tiled 2 × 2 through their edge ports. A signal crosses three chip edges and is inverted at the far corner within the cycle, a carry crosses from one chip into the one below, and routing stays inside each chip. |
| `tb_poetic_chip` | Full 8 × 18 chip at default parameters. Routing to two targets, elimination of a duplicate source, an unreachable target, every mode, two-level chained reconfiguration, and two nets where the second must detour. It counts 20 mechanisms and fails if any never happened. |

The testbenches pass with random initial register values
(`+verilator+rand+reset+2`).

## Combinational loops

The molecule mesh is an FPGA fabric, and the routed data paths are
combinational switches. Lint tools therefore report circular logic
(`UNOPTFLAT`) through `line_in`/`line_out`, the LUT input multiplexers, the
serial reconfiguration links and the routing data links. These are paths, not
loops. A real loop exists only if a configuration closes one, and a working
configuration must not do so. A loop may go through a flip-flop (`use_dff` or
`in3_q`). The simulator warning is expected; `-Wno-UNOPTFLAT` on the command
line above only keeps the log short.

## Where this design departs from, or goes beyond, the original architecture

The architecture fixes these points, and the RTL follows them:

- the two layers;
- the 16-bit LUT and flip-flop;
- the eight modes and what each is for;
- 76 configuration bits in five bypassable blocks, loaded as three 32-bit
  words;
- the 54-bit serial storage;
- the four routing phases, with their 1-cycle / n-cycle / 1-cycle lengths;
- bottom-left master priority;
- the broadcast forwarding pattern;
- breadth-first search with resources locked after each path;
- the 8 × 18 array.

This design's own choices:

- **Field layout.** The width of each block and the bit meanings inside the
  input-select, switch-box and "other" blocks. Only the totals are given.
- **Switch box.** Two lines per side, and the 0–7 selector coding.
- **Mode roles.** Which LUT inputs act as shift, data and control in the
  Shift, Comm and Configure modes. Comm's shift register advances when
  `a3 = 1`.
- **Serial order.** The LUT comes first, and the parallel write has priority
  over serial shifting.
- **Chaining.** Forwarding is controlled by a `cfg_chain` bit and goes to the
  opposite side.
- **Trigger mode.** Here it is only a rotating 16-bit register. It is meant to
  pace the identifier decoding in the routing layer. In this design each
  routing unit counts the 16 address cycles itself, so a Trigger molecule is
  not needed for routing. Its pulse remains available to user logic.
- **One net per link.** Each unit has one link per direction, so at most four
  nets can pass a unit, one per side. The number of routing tracks of the
  fabricated device is not known.
- **Back-trace.** The token-based back-trace and its link reservation.
  Targets reached in the same cycle are all connected together. The wave
  restarts from the whole existing net.
- **Several sources, target master.** When a target is master and several
  sources carry the same identifier, the nearest source is used. The
  architecture only requires one source per process.
- **Completion rule.** Sources that got a path, connected targets and the
  master of a process stop requesting. An unreachable target therefore tries
  once as master and is retried only after a restart.
- **Reset forcing.** Neighbour outputs and routed data are forced to zero
  during reset.
- **Routing does not cross chips.** The routing plane and the serial
  reconfiguration links stop at the chip edge; only the molecule lines and
  carries are brought out for tiling. How the organic bus carries routing
  between chips is not specified, so a multi-chip tissue here can share logic
  signals between edge molecules but cannot route dynamically across chip
  boundaries.

## Not included

- **Environment subsystem.** The 32-bit processor, its AMBA-based system bus
  and its peripherals. The processor would use the configuration bus, restart
  the routing and read the status ports. A testbench stands in for it.
- **System interface.** The interface bus that makes a grid of chips look
  like one device.
- **Board-level parts.** Memory, USB and the multi-chip boards.
