# ubichip — a bio-inspired reconfigurable chip in SystemVerilog

The ubichip is the reconfigurable device at the heart of the Perplexus
platform: a network of small computing modules that together simulate large
complex systems, first of all spiking neural networks of about 10,000 neurons
with some 300 synapses each. Three mechanisms set it apart from an ordinary
FPGA-like fabric, and each is built here:

* **A neural-friendly cell.** Each cell holds four 4-input LUTs. The same 64
  memory bits can instead act as an 8 × 4-bit register file behind a 4-bit
  ALU, so cells chain into n-bit processing elements (PEs). A central
  sequencer drives all PEs in lock-step (SIMD). Conditional stores replace
  data-dependent branches.
* **Dynamic routing.** Cells can ask for new connections at run time. A
  distributed breadth-first search over an 8-neighbour mesh finds the shortest
  free path, and a backward signal sets the multiplexers along it. Paths that
  already exist keep carrying data while this happens.
* **Self-replication (THESEUS).** A "cell" of "molecules" is grown from a
  genome along a path of flags. It can read its own genome back by shifting
  along that path, and can copy itself elsewhere.

A fourth part, the **Address Event Representation (AER)** link, keeps the
pin count flat as chips are added. Spikes leave a chip as source addresses on
a shared bus. Chips take turns on the bus in a ring, and a global
`frame_update` ends each simulation step. A CAM in each chip turns received
addresses back into input events.

This code implements the architecture described in the article "The
Perplexus bio-inspired reconfigurable circuit". That article gives the
mechanisms and the block structure, but few widths, encodings or protocols.
Everything it leaves open is decided here and marked as such, in this file
and in the header comment of each source file.

## Block structure

```
                 host (module controller)
                          |
                    sys_manager ------------------------------+
                     |    |    \                               |
        program      |    |     \ CAM / RAM writes             | config chain
                     v    |      v                             v
              ubi_sequencer   mem_ctrl (RAM + CAM) <---+   ubi_array (ROWS x COLS ubi_cell)
                     |  instr        ^ search          |      |  spikes      ^ events
                     +---------------|-----------------|----->|              |
                                     |            aer_decoder <---- shared AER bus (in)
                                     |                                    
                                aer_encoder  <---- spikes, frame_done
                                     |  ---- shared AER bus (out), start/end_frame, frame_update
   route_array (one route_unit per cell): data in = cell LUT0 output, data out -> LUT0 input 0
   theseus_array (T_ROWS x T_COLS theseus_molecule): separate mesh with its own ports
```

| Module | Role |
|---|---|
| `ubichip_pkg` | instruction word, opcodes, direction encodings |
| `ubi_cell` | four 4-LUTs / 4-bit ALU slice with 8 × 4 register file |
| `ubi_array` | cell array grouped into PEs; per-PE flag, event and spike bits |
| `ubi_sequencer` | program memory, broadcast, loops, frame wait |
| `sys_manager` | host register port: configuration and control |
| `mem_ctrl` | data RAM and AER CAM |
| `aer_encoder` / `aer_decoder` | AER bus turn and address-to-event translation |
| `route_unit` / `route_array` | dynamic routing fabric |
| `theseus_molecule` / `theseus_array` | self-replication fabric |
| `ubichip` | top level |

Default size: 10 × 40 cells, four cells per PE. That gives 100 PEs of 16
bits, one neuron each, to match the 100 neurons per chip that the
bandwidth estimate below assumes. There are 400 routing units, a
256-entry CAM, a 1024 × 16 data RAM, a 256-word program memory and a
4 × 8 molecule mesh. None of these sizes is fixed by the source
architecture.

## The cell and the SIMD processing elements

`ubi_cell` stores `lut[i][e]` for LUT `i` (0..3) and entry `e` (0..15).

* **LUT mode** (mode bit 0): `lut_out[i] = lut[i][lut_in[i]]`. The output is
  combinational.
* **ALU mode** (mode bit 1): register `r`, bit `b` is `lut[b][r]`. Entries
  8..15 are unused. A cell is one 4-bit slice. `ubi_array` chains
  `CELLS_PER_PE` horizontally adjacent cells through a ripple carry and a
  shift link; the lowest column holds the least significant nibble.

The mode bit and the 64 LUT bits of every cell form one configuration shift
chain. Bits enter at cell 0, where cell index = row × COLS + column, and
leave at the last cell. To load the array, shift the last cell's bits in
first: `lut[0][0]`, `lut[0][1]`, …, `lut[3][15]`, then the mode bit. Because
the register file is the LUT memory, this chain also sets every PE's
initial register values. That is how each neuron gets its own weights and
thresholds.

### Instruction set (this design's own)

The sequencer broadcasts a `pe_instr_t` = {cond, op, rd, rs, imm[15:0]}.
Cell `k` of a PE uses nibble `k` of `imm`.

| op | effect (per PE, n = 4·CELLS_PER_PE bits) |
|---|---|
| `LDI` | rd ← imm |
| `MOV` | rd ← rs |
| `ADD` / `SUB` / `ADDI` | rd ← rd ± rs, rd ← rd + imm |
| `AND` / `OR` / `XOR` | bitwise |
| `SHR` | rd ← rs >>> 1 (arithmetic) |
| `TSTN` | flag ← rd < 0 |
| `TSTGE` | flag ← rd ≥ rs (signed) |
| `TSTEV` | flag ← an input event arrived in the previous frame |
| `FIRE` | spike ← flag |

With `cond = 1`, an instruction stores its result only in PEs whose flag is
set. This is the conditional store that lets one straight-line program
serve every neuron. A cell in LUT mode ignores ALU
instructions, and a PE whose most significant cell is in LUT mode keeps
its flag and spike bit unchanged.

Sequencer operations (`sq_op_e`): `SQ_PE` (broadcast), `SQ_JMP`, `SQ_LDC`
(load loop counter), `SQ_LOOP` (decrement, branch if non-zero), `SQ_WAITF`
(wait for `frame_update`), `SQ_HALT`. Every instruction takes one cycle.
A `frame_update` that arrives before the wait is reached is remembered.

An integrate-and-fire neuron per PE (r0 membrane, r1 input weight, r2
bias, r3 threshold), as used in the top-level test:

```
0: WAITF            4: TSTGE r0, r3
1: TSTEV            5: FIRE
2: ADD  r0, r1 ?    6: LDI  r0, 0 ?      (? = conditional)
3: ADD  r0, r2      7: JMP  0
```

## AER frames — how a simulation step runs

This is the part where timing matters most. One simulation frame, seen
from a ring of chips 0 → 1 → … → N−1 (chip 0 has `is_first`):

1. Chip 0 pulses `frame_update` for one cycle. It does this when the last
   chip's `end_frame` reaches it, or on `kick` for the very first frame.
   On this edge every chip does three things. The PE array moves the
   decoder's accumulated events into the PEs' event bits. It clears the
   spike bits. The decoder clears its accumulator.
2. The sequencers leave `SQ_WAITF` and run the neuron program. `FIRE`
   sets spike bits.
3. A chip gets the bus when the previous chip's `end_frame` arrives; chip
   0 gets it on `frame_update`. The chip then waits until its sequencer
   is back at `SQ_WAITF` (`frame_done`). It samples the spike bits, pulses
   `start_frame`, and drives one address `{chip_id, PE index}` per cycle,
   lowest index first. In the cycle after the last address it pulses
   `end_frame`. A turn with n events lasts n + 1 cycles.
4. Every chip's decoder looks up each address on the bus in its CAM, in
   the same cycle. It ORs the destination PEs into its accumulator and
   counts hits and misses.

So the spikes computed in frame k are broadcast in frame k and take effect
in frame k + 1. The bus is a wired-OR: `aer_bus_*` is this chip's drive,
zero outside its turn, and `aer_in_*` is the OR of all drives. A
single-chip system loops `aer_bus_*` to `aer_in_*`, `end_frame` to
`token_in` and `frame_update_out` to `frame_update_in`.

The turn waiting for `frame_done` (step 3) is this design's own choice.
The source architecture does not say how computation and bus access are
ordered.

**CAM format.** Each entry is one synapse: valid, 14-bit source address,
7-bit destination PE. One search per cycle compares all entries. A PE sees
at most one input event per frame; several events for the same PE in a
frame collapse into one. Synaptic weights live in the PE registers, not in
the data RAM.

## Dynamic routing

Every cell has a `route_unit`. The unit has a registered multiplexer that
forwards the data of one of its eight neighbours (N, NE, E, SE, S, SW, W,
NW) or of its own cell. It also has the register holding that choice and
a small FSM. In the top level, the cell's LUT 0 output is the data the
unit sends into a path. The data a path brings in drives input 0 of
LUT 0. All units run the phases of a routing process in lock-step,
coordinated by wired-OR global lines in `route_array`:

| phase | cycles | what happens |
|---|---|---|
| request | 1 | units with `req` raise the global request; the lowest-index requester wins (index = y·COLS + x, y = 0 at the bottom: most bottom-left first) |
| ID | NET_W + 1 | the master sends its connection label MSB first, then one bit saying whether it is the source; all units shift it in |
| compare | 1 | units with `has_net` and the same label (other than the master) are *involved* |
| search | D + 1 | breadth-first wave from the master through free units (mux unused); each unit records the first neighbour that reached it, lowest direction index first; stops when an involved unit is reached, or fails when a cycle adds no unit |
| back | D + 1 | a backward signal runs from the found unit along the recorded parents to the master; each unit on it sets its multiplexer so data flows source → target |

D is the hop count of the shortest free path. A whole process therefore
takes a constant plus 2·D cycles, and the tests check that. Once the path
exists, data takes D + 1 cycles from source to target, one register per
unit. The master gets `ack` or `fail`. A unit keeps its multiplexer
setting until `clear_path`.

**Reusing existing paths.** A connection is one source and any number of
targets sharing a label. Every unit on a path remembers the label it was
built for, so a connection that already has a path can grow like a tree:

* If a **target** requests and its label already has a path, every unit
  of that path is a valid partner (a *tap*). The search stops at the
  nearest tap. The tap keeps its multiplexer, and the new branch takes
  its data from it.
* If a **source** requests again, the search starts from the source and
  from every unit already on its tree at the same time. The backward
  signal ends at whichever tree unit the new branch grows from.

Each new branch is therefore only as long as the distance to the
existing tree, which leaves free units for other connections. If several
partners are reached in the same search cycle, the lowest-index one
(again the most bottom-left) wins. The arbitration reuses the request
line, which is otherwise idle during a process.

The source architecture leaves several points open, and these are this
design's choices:

* Units are matched by a shared connection label, and each label has one
  source.
* A unit carries at most one connection. A unit already on a path blocks
  the searches of other connections.
* How existing paths are exploited. The source only says that the new
  algorithm "better exploits" them.
* Where the received label is kept. The source keeps it in a LUT of the
  logic unit, loaded through the configuration shift chain. Here it is
  a shift register inside the routing unit. The logic unit's LUTs are
  not disturbed, but that costs NET_W + 1 flip-flops per unit.

## THESEUS self-replication

A genome word is `{flag[2:0], config[CFG_W-1:0]}`. The flag names the side
of the next molecule (`TD_N`, `TD_E`, `TD_S`, `TD_W`) or `TD_END`.

* **Construction.** Words enter an entry molecule, one per cycle at most.
  An empty molecule keeps the first word it receives. It records its flag
  as `next` and the side the word came from as `prev`. After that it
  forwards each word, registered, towards `next`. Word j therefore settles
  j hops down the path, and a K-word cell is complete 2K − 1 cycles after
  its first word.
* **Self-inspection.** On each `shift_en`, every molecule of the cell takes
  its successor's word. The last one takes the first one's word. The first
  molecule's word (`head_word`) read before each shift gives the genome in
  the order it was sent. After K shifts the cell is back as it was. The
  path links are kept apart from the rotating words, so the shape survives.
* **Replication.** `repl_en` inspects cell 0 and feeds each word straight
  into entry 1 (row 0, column COLS/2). An identical copy grows there.
* A word that reaches the end of a complete path raises `overflow`.

The path works as a shift register in both directions. Construction
moves words forward, from the entry to the tail. Inspection moves them
backward, each molecule taking its successor's word.

The source describes replication in three steps over three organelles: a
functional unit and two replication units, each copying the next. That
procedure, and choosing at run time where the copy goes, are not built.
Only the single-organelle mechanism is. The molecule mesh is also separate
from the cell array: molecule configuration words are not wired into the
ubi_cell configuration.

## Host register port (`sys_manager`)

A 16-bit word address and 32-bit data, with single-cycle writes. Read data
arrives the cycle after `host_re`. `addr[15:12]` selects the target:

| target | write | read |
|---|---|---|
| 0 control | bit0 start sequencer, bit1 start first AER frame | {running, pc} |
| 1 program | addr[8]=0: stage bits 31:0; addr[8]=1: bits 38:32 + commit to addr[7:0] | status |
| 2 CAM | entry addr[7:0]: wdata[31] valid, [30:24] dest, [13:0] source address | status |
| 3 data RAM | addr[9:0] ← wdata[15:0] | RAM word |
| 4 config chain | shift wdata[0] into the cell chain | status |
| 5 identity | wdata[6:0] chip id, wdata[8] first chip | status |

The whole map is this design's own. The source says only that the system
manager configures the chip and talks to the module's main controller.

## Capacity against the neural application

* **Neurons.** 100 per chip are needed, taking the source's own planning
  figure. 100 PEs are built. This fits.
* **Synapses.** 300 per neuron means 30,000 source-to-destination pairs per
  chip. The CAM holds 256. **This does not fit.** A full network would need
  a far larger or differently organised CAM, for example one entry per
  source with a destination mask.
* **Bus.** A shared bus at 10 MHz with one address per cycle carries
  10⁷ addresses/s. For 10,000 neurons that is about 1,000 spikes/s per
  neuron, less one cycle of overhead per chip turn. This matches the
  source's estimate of roughly 1,000 spikes/s. Over a 54 Mbit/s wireless
  link, 14-bit addresses allow about 385 spikes/s per neuron, close to the
  quoted ~300. The wireless link itself is not part of this design.

## How far to trust it

Every block has a self-checking testbench in `tb/`, and each testbench
has been shown to catch a deliberately broken copy of its block. Coverage
per block:

* **Cell and array.** The cell is checked against a reference register
  file. The array is checked against a 16-bit reference model for random
  instruction streams, conditional or not.
* **Sequencer.** Checked with a cycle-exact program counter trace.
* **AER.** The encoder runs in a three-chip ring with random readiness,
  and each turn's length is checked exactly.
* **Routing.** The router is checked against its own BFS. The test
  covers path length, data latency, 2·D process timing, priority, failure,
  undisturbed old paths and trees grown by path reuse.
* **THESEUS.** Random shapes are built, inspected and replicated.
* **Whole chip.** `tb_ubichip` runs at the default size. It configures
  all 400 cells through the host port and runs 30 frames of a
  100-neuron integrate-and-fire network against a reference model. It
  builds a 39-hop route while the network runs, has one route request
  fail, lets a second target join that route, replicates a THESEUS cell, and checks the LUT-mode cells. The
  run takes a few seconds.

What is **not** from the source, and so is only as good as these choices:

* all widths and sizes;
* the instruction set;
* the host port;
* CAM entry format;
* the flag encoding and word-parallel links of THESEUS;
* the label matching of the router.

Parts of the ubichip that this RTL does **not** provide:

* **PE width.** It is set for the whole array when the design is built
  (`CELLS_PER_PE`). Cells are not grouped by configuration.
* **Neurons per PE.** One, with one event bit and one spike bit per PE. A
  PE cannot time-share several neurons.
* **Data RAM.** It is built and host-accessible. The PEs have no
  instruction to read it.
* **THESEUS replication procedure.** The three-organelle procedure is not
  built, and the copy's position is fixed.
* **External links.** There is no wireless or USB link and no module
  controller; the host port stands in for them.

## Simulating

Verilator 5, from the project root:

```
verilator --binary --timing --assert -Irtl rtl/ubichip_pkg.sv rtl/ubichip.sv \
          tb/tb_ubichip.sv --top-module tb_ubichip -Mdir obj_top
./obj_top/Vtb_ubichip
```

Any block works the same way: list `rtl/ubichip_pkg.sv` (where the block
uses it), the block's file and `tb/tb_<block>.sv`. `-Irtl` lets Verilator
find the sub-modules. Every testbench ends with a line
`TB_RESULT checks=N failures=M`. The testbenches only use `$urandom`,
with no constraint solver.
All state is reset by the active-low asynchronous `rst_n`, except the
contents of the program memory, the data RAM and the CAM keys. Those
memories are written before use; CAM entries are invalid after reset.
