# Processor-driven BIST of an embedded FPGA core

A system-on-chip that carries an FPGA fabric next to a small embedded processor
can test that fabric without an external tester and without downloading any test
bitstreams. The processor can write the fabric's configuration memory at run
time, so it can *generate* each built-in self-test (BIST) configuration itself,
clock the test, and read the results back. Because partial reconfiguration leaves
the fabric's flip-flops alone, the processor can run many test configurations in
a row and collect the results only once per session.

This RTL models the hardware side of that scheme for a fine-grained fabric of
48 x 48 programmable logic blocks (PLBs):

* a write-only configuration memory addressed by three bytes X, Y, Z;
* the logic BIST structure: test pattern generators (TPGs), blocks under test
  (BUTs) and comparison-based output response analysers (ORAs) laid out in
  alternating columns;
* the routing BIST structure: a parity pattern generator driving the x4 wire
  buses through their repeaters into parity-checking ORAs;
* the processor I/O interface, whose write strobe doubles as the BIST clock and
  whose read port returns the ORA shift-register output.

The processor, its test program and its memories are not part of the RTL. The
testbenches play the processor's part.

## How a test session runs

The processor carries out the same nine steps for every logic BIST session:

1. **Clear** – write 0 to every cell's bytes. A cell with control byte 0 is
   idle.
2. **Place the ORAs** – write the ORA cells' control bytes. Then initialise
   their flip-flops with a Z=3 write.
3. **Place the BUTs** – write identical truth tables and control bytes into
   every BUT cell.
4. **Start the TPGs** – a write to `X=FF, Z=1` loads both 5-bit counters.
5. **Route the BIST clock** – set `clk_route` in the BIST control register.
   From then on every I/O write strobe (`iowe`) is one BIST clock.
6. **Run** – 32 write strobes apply all 32 patterns of the 5-bit counters.
7. **Make the ORAs a shift register** – rewrite each ORA's control byte with
   `ora_shift` set. Its stored result does not change.
8. **Route the shift output** – set `shout_route` and pick the chain with
   `shout_src` (0 = logic, 1 = routing).
9. **Read back** – once per ORA, read bit 0 of `io_rdata` and then write one
   strobe to shift. The last ORA of the chain comes out first.

Steps 3 and 6 can repeat before step 7 with only the BUT bytes rewritten. This
gives a session of several configurations. The ORAs keep OR-ing in mismatches,
so a fault is still detected. What is lost is knowing which configuration
failed.

The routing BIST works the same way:

1. Set the repeater enables (`X=FE`).
2. Choose the ORA parity and initialise the ORAs (`X=FF, Z=3` and `Z=4`).
3. Load the routing TPG with its mode (`X=FF, Z=2`).
4. Give four BIST clocks.
5. Shift the routing ORA chain out.

## Logic BIST arrangement (the subtle part)

Each of the N x N places holds a PLB and an ORA. Two bits of the place's
control byte select its role: idle, BUT, ORA, or member of the TPG column.
The role layout the processor writes is as follows. `d` is the distance of a
column from the TPG column.

| columns           | role |
|-------------------|------|
| `d = 0`           | TPG column (its cells idle; the two counters sit beside the array) |
| `d` odd           | BUT  |
| `d` even, `d > 0` | ORA  |

* **West session:** the TPG column is column 0. BUTs are in the odd columns.
* **East session:** the TPG column is column N-1. BUTs are in the even columns.

The two sessions together make every place a BUT once. That is the "flip about
the vertical axis".

**Pattern feed.** TPG 0 feeds rows `0..N/2-1` and TPG 1 feeds rows `N/2..N-1`.
These are the two halves drawn as routing scheme 1 and routing scheme 2. Both
counters are loaded and clocked identically.

**What an ORA compares.** A PLB drives two outputs:

* a diagonal **X** output, which goes to a neighbour in the adjacent row;
* an orthogonal **Y** output, which goes to a neighbour in the same row.

A block can take only one X input and one Y input at a time. So the ORA at
`(r, c)` compares:

* the Y output of the cell to its west, `(r, c-1)`;
* the X output of the cell to its east in the paired row, `(r^1, c+1)`.

Rows are paired 0-1, 2-3, and so on, so a pair never crosses the boundary
between the two TPG halves. Both BUTs see the same pattern and hold the same
configuration. For a fault-free array the two values are equal on every
pattern.

A BUT is therefore watched through Y by the ORA east of it and through X by the
ORA west of it in the partner row. In the BUT column nearest the TPG only the
Y output is watched. In the BUT column at the far edge only the X output is
watched. To keep coverage, configure X and Y to show the same source (LUT A,
LUT B, the flip-flop or its inverse) and step through the sources from one
configuration to the next.

**Read-out chain.** All ORA-role cells form one shift chain in row-major order,
starting at row 0, column 0. Every other cell is bypassed combinationally. In
shift mode each BIST clock moves every result one ORA along, and `shift_out`
shows the last ORA. A session at N = 48 has 48 x 23 = 1104 ORAs, so reading it
takes 1104 read/strobe pairs.

## Routing BIST arrangement

The routing TPG is a 2-bit counter C1 C0 plus a parity bit Par. It has two
modes:

* **Even mode:** starts at 00 and counts up; `C1^C0^Par = 0`.
* **Odd mode:** starts at 11 and counts down; `C1^C0^Par = 1`.

Over the two four-pattern sequences, every pair of the three signals takes both
the 0-1 and the 1-0 combination. This is what lets the test find bridges
between wires.

The five x4 wires of each row bus carry, from wire 0 to wire 4:

    C1, C0, Par, C1, C0

The parity bit is on the middle wire and the count bits on both outer pairs.

Each bus is cut into 4-PLB segments, joined by one repeater per wire at each
boundary. Each segment has two ORAs:

* **ORA A** reads wires 4, 3 and 2 as C0, C1 and Par.
* **ORA B** reads wires 1, 0 and 2.

In this model a repeater that is off leaves its downstream segment at 0. That
breaks the parity on at least one pattern in either mode. The ORAs of every
segment beyond the cut then flag, and only those that watch the cut wire. The
routing ORAs form their own shift chain, ordered row, then segment, then A
before B.

## Configuration address map

| X        | Y        | Z | effect |
|----------|----------|---|--------|
| 0..N-1   | 0..N-1   | 0 | LUT A truth table of cell (row Y, column X) |
| 0..N-1   | 0..N-1   | 1 | LUT B truth table |
| 0..N-1   | 0..N-1   | 2 | control byte: `[1:0]` role (0 idle, 1 BUT, 2 ORA, 3 TPG column), `[3:2]` X source, `[5:4]` Y source (0 LUT A, 1 LUT B, 2 FF, 3 inverted FF), `[6]` FF input (0 LUT A, 1 LUT B), `[7]` ORA shift mode |
| 0..N-1   | 0..N-1   | 3 | no storage: load the cell's PLB and ORA flip-flops with data bit 0 |
| FF       | any      | 0 | BIST control: `[0]` clk_route, `[1]` shout_route, `[2]` shout_src |
| FF       | any      | 1 | no storage: load both logic TPGs with data `[4:0]` |
| FF       | any      | 2 | routing TPG mode (data bit 0: 1 = odd) and restart |
| FF       | any      | 3 | routing ORA control: `[0]` expected parity odd, `[1]` shift mode |
| FF       | any      | 4 | no storage: load every routing ORA with data bit 0 |
| FE       | row      | b | repeater enables `[4:0]` of the boundary after segment b |

Only three things here follow the target device: the X/Y/Z split, the byte
width, and the fact that the memory is write-only. The Z codes and the bit
layouts are this design's own.

The PLB's truth tables are indexed by the pattern:

* LUT A reads pattern bits 2..0.
* LUT B reads pattern bits 4..2.

In both, the most significant input comes first.

## Timing

Everything is on one clock `clk`, with an asynchronous active-low reset
`rst_n`.

* **Configuration writes** (`cfg_we`) take effect at the next edge. The
  one-shot loads (flip-flop, TPG and ORA initialisation) act one cycle later.
* **The BIST clock** is a clock enable. Each `clk` cycle with `iowe` high and
  `clk_route` set advances the TPGs, BUT flip-flops and ORAs together. An ORA
  samples the pattern that was present before that edge.
* **Reads** (`iore`) are combinational. `io_sel` shows the decoded select line
  while either strobe is high.

## Where this model departs from the real fabric

* **Roles are selected, not programmed.** In the device, TPGs and ORAs are
  ordinary PLBs programmed into those roles, and routed by the test program.
  Here the TPG counters, the ORA comparators and the fixed neighbour wiring are
  dedicated logic. The configuration only selects which role a place takes.
  Each place therefore has two flip-flops: one for the PLB and one for the ORA.
* **The PLB is only its BUT view.** It has two 3-input LUTs, one flip-flop,
  output multiplexers and a flip-flop input multiplexer, whose exact choices
  are this design's own.
  Not modelled: the local routing from the eight neighbours, the 32x4 RAM mode,
  and the bank clock and set/reset lines.
* **Routing is partial.** Only the horizontal x4 lines are modelled, and the
  repeaters drive west to east only. The x8 lines, the vertical buses and the
  cross-point programmable interconnect points are not modelled, so the
  cross-point routing BIST cannot run on this model.
* **Faults are emulated through configuration.** A BUT gets a differing truth
  table bit, or a repeater is switched off. The model has no fault-injection
  ports.
* **Some interface parts are left out.** Only bit 0 of `io_rdata` carries
  data. The processor write data and the core-to-processor interrupts are not
  modelled.

## Files

`rtl/` holds one module or package per file:

| file | contents |
|------|----------|
| `bist_pkg.sv` | sizes, address codes, control-byte structs |
| `cfg_mem.sv` | configuration memory |
| `plb.sv` | PLB |
| `logic_tpg.sv` | 5-bit TPG counter |
| `logic_ora.sv` | comparison ORA |
| `logic_bist_array.sv` | logic BIST array |
| `routing_tpg.sv` | parity TPG |
| `routing_ora.sv` | parity ORA |
| `routing_bus.sv` | one row of x4 wires with repeaters |
| `routing_bist_array.sv` | routing BIST array |
| `avr_fpga_if.sv` | processor I/O interface |
| `fpslic_bist_top.sv` | top level |

The top's only parameter is `N`, the array size (default 48). `N` should be a
multiple of 4 with `N/2` even.

`tb/` has one self-checking testbench per module. Each one prints
`TB_RESULT checks=<n> failures=<n>`.

* `tb_fpslic_bist_top` runs the complete sequence at N = 16 through the top's
  ports:
  * a fault-free west session;
  * a west session with an emulated fault and a second, partially
    reconfigured configuration;
  * an east session with a fault;
  * routing BIST in both modes, with repeater cuts.

  It counts each mechanism and fails if one never happens.
* `tb_fpslic_bist_top_full` runs the same sequence at the default 48 x 48.
* The array testbenches (`tb_logic_bist_array`, `tb_routing_bist_array`) check
  every ORA flag against a reference model kept in the testbench.

To simulate with Verilator:

    verilator --binary --timing --assert -y rtl -Irtl --top-module tb_fpslic_bist_top \
        rtl/bist_pkg.sv tb/tb_fpslic_bist_top.sv
    ./obj_dir/Vtb_fpslic_bist_top

Compiling at N = 48 takes several minutes; the simulation itself takes seconds.
