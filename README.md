# A reconfigurable array of 1-bit processor elements with sparse wiring

This is synthesizable SystemVerilog for a coarse-grained reconfigurable
array in which every processor element computes on **one bit per clock**.
Operands travel between elements as bit-serial streams, LSB first, so each
link between elements is a single data signal rather than a 16- or 32-bit
bus. That is the central idea: bit-serial elements are small, their carry
chains never become the critical path, and above all the routing fabric
needs only one signal per connection. The fabric has no switch boxes and
no global buses: each element talks to its neighbours over fixed short
wires and to elements further away over shared long wires whose reach is
set by two build-time parameters, *distance* and *step*. Only the I/O
elements on the border talk to the outside world, so the array can be made
larger without the wiring growing faster than the element count.

The design follows the architecture published as *"Reconfigurable 1-bit
processor array with reduced wiring area"*, in its reference configuration:
a 7x7 grid (5x5 PEs surrounded by 24 I/O elements), distance 6, step 1,
16-bit data registers, 5-bit counters and configuration fields. Where that
description leaves details open (opcodes, encodings, the controller, how
configuration is loaded), this implementation makes its own choices; they
are listed in [Choices made here](#choices-made-here).

## The grid

```
  row 0   IOE IOE IOE IOE IOE IOE IOE      <- north controller (incl. corners)
  row 1   IOE PE  PE  PE  PE  PE  IOE
   ...    IOE PE  PE  PE  PE  PE  IOE      west / east controllers
  row 5   IOE PE  PE  PE  PE  PE  IOE
  row 6   IOE IOE IOE IOE IOE IOE IOE      <- south controller (incl. corners)
```

* **PE** (`pe`): three input selectors, a bit-serial ALU, three 16-bit data
  registers, a state machine with a 5-bit counter, and one output register.
* **IOE** (`ioe`): one input selector, an 8-word FIFO, and two operations:
  send FIFO words into the array, or collect serial words from it.
* **Controller** (`controller`), one per edge: owns a shared 16-bit bus to
  the IOEs of its edge and is the host's access point.

The top module is `ba_array` with parameters `ROWS`, `COLS`, `DIST`,
`STEP` (defaults 7, 7, 6, 1). Everything is a single clock domain with an
asynchronous active-low reset.

## Data on a wire: two lines, three values

Every element-to-element connection is a pair of lines, *master* and
*inverse* (`ba_pkg::dr_t`). If the two differ, the master line is the
bit. If they are equal, the connection carries **no data** (the original
"high impedance"). A stopped element outputs no-data, so a receiver can
tell "the stream has not started / has ended" from a 0 bit without any
extra valid wire, and this is what starts computation (next section).

Long wires are shared tristate buses in the original architecture. Here a
long wire is the OR of the line pairs of all elements whose driver is
enabled; since a stopped or undriven element contributes (0,0), an
undriven wire reads no-data. `long_wire_net` raises `conflict` if two
enabled drivers carry data at once, which a valid configuration never
does.

## Words, states and synchronisation

This is the part that needs the most care when writing configurations.

A bit-serial element must know where a word begins and ends. Each element
has a 2-bit state `{run, special}` and a 5-bit counter (`elem_fsm`):

| state | meaning |
|---|---|
| stop-special | after reset, or after a stream ended: output no-data, wait for input |
| run-normal | first half of an operation: input bits arrive, one per clock |
| run-special | latter half of a two-phase operation (multiply, right shift, compare) |
| stop-normal | configured idle gap between words |

Rules, per element, with `dlen` and `wlen` from its configuration:

1. A word **starts** in stop-special, or in run-normal with the counter at
   0, in a cycle where every input the operation uses carries data. The
   first bit is processed in that same cycle. If the inputs are not all
   present, the element goes to (or stays in) stop-special.
2. A word is `dlen+1` bits (1 to 32). The counter runs 0..`dlen`.
3. Two-phase operations then spend another `dlen+1` clocks in run-special.
   Input is ignored there.
4. Then the element idles `wlen` clocks in stop-normal (skipped if
   `wlen = 0`) and goes back to run-normal, where rule 1 applies again.
5. Every result bit is registered: output appears **one clock** after the
   input bit that produced it.

Consequences for mapping a data-flow graph:

* **Streams must arrive aligned.** A two-input element starts when *both*
  inputs carry data; if one arrives a clock early, its LSB is lost. Paths
  of unequal latency must be equalised by inserting delay, either a PASS
  element (1 clock) or a DELAY element (k+1 clocks, k = 0..15). Each hop
  through a PE costs one clock; a long wire costs none.
* **Word rate is set by the slowest element.** A two-phase operation
  is busy for 2(`dlen`+1) clocks per word, so the sources feeding it need
  `wlen = dlen+1` (or the words are spaced by the host).
* **Pipelining is free.** With `wlen = 0`, a chain of single-phase
  elements accepts a new word every `dlen+1` clocks, each stage one clock
  behind the previous. `tb_adder_pipeline` checks the classic example:
  `((a+b)+c)+d` on 4-bit words yields one result every 4 clocks.
* `wlen` schedules are static. Rule 1 only re-synchronises at word
  boundaries, so a configuration must keep each element's word period
  equal to that of its inputs.

## The processor element

### Configuration word (54 bits, `ba_pkg::cfg_t`, MSB first)

| field | bits | meaning |
|---|---|---|
| `op` | 8 | operation (`op_e`) |
| `in_a`, `in_b`, `in_c` | 5 each | input selector codes |
| `out_sel` | 5 | which long wire the output also drives (0 = none) |
| `dlen` | 5 | bits per word minus one |
| `wlen` | 5 | idle clocks between words |
| `konst` | 16 | constant (ADDK operand, shift amount, delay length) |

### Operations (`ba_pkg::op_e`)

| op | result | phases | note |
|---|---|---|---|
| PASS | A | 1 | routing hop, 1-clock delay |
| ADD, SUB | A+B, A−B | 1 | carry kept in data register 3 |
| AND, OR, XOR, NOT | bitwise | 1 | |
| ADD3 | A+B+C | 1 | 2-bit carry |
| MUX | C ? A : B, per bit | 1 | C is typically a CMPGT mask |
| ADDK | A + constant | 1 | constant sign-extended beyond 16 bits |
| SHL | A << k | 1 | k = `konst[4:0]`, bits kept in data register 2 |
| SHR | A >>> k (arithmetic) | 2 | result in latter half, words ≤ 16 bits |
| MUL | A × B, unsigned, 2n bits | 2 | low n bits in first half, high n in latter |
| CMPGT | all ones if A > B (signed), else 0 | 2 | n-bit mask in latter half |
| DELAY | A, k+1 clocks later | – | k = `konst[3:0]`, runs outside word framing |
| NOP | – | – | element stays stopped (reset value) |

IOEs use `OP_IO_OUT` and `OP_IO_IN` (see below).

Latency of the first result bit after the first operand bit: 1 clock for
single-phase operations and MUL; `dlen`+2 for SHR and CMPGT; k+1 for DELAY.

### The bit-serial multiplier

A multiply is done by one PE with one clock of latency, producing the
2n-bit product in 2n clocks. Column i of the product is
`r_i = sum over j of a[i-j]·b[j]` plus the carries left from column i−1.
`bs_mult` computes one column per clock as a chain of 16 full adders, one
per multiplier bit j: adder j adds the partial product `a[i-j] & b[j]`,
its own stored carry, and the sum from adder j−1. The final sum is the
product bit; each adder's carry is stored for the next column. The PE
collects A and B into data registers 1 and 2 as they arrive (so column i
already uses the bits arriving in cycle i), keeps the 16 carries in data
register 3, and clears all three when the product is complete. Operands up
to 16 bits; the product is unsigned.

## Wiring

### Short wires

Each PE has a short wire to and from each of its four neighbours; it always
carries the sender's output register. IOEs have short wires only to and
from their adjacent PE, none to other IOEs, so the four corner IOEs have
none. These are the `short_in` connections in `ba_array`.

### Long wires: distance and step

A channel of long wires runs along every boundary between two rows, and
every boundary between two columns, plus the outer edges. Within a
channel, each wire spans `DIST+1` consecutive element positions, and a new
wire starts every `STEP` positions. Because the starts are staggered, no
wire needs to be long, yet any position is covered by

    L = ceil((DIST+1)/STEP)

wires (7 for distance 6, step 1). Only the symmetric case,
`(DIST+1) % STEP == 0`, is supported. There every element sees exactly L
wires on each of its four sides, including elements at the array edge
(wires that would start before position 0 are kept, clipped). Both rows
beside a horizontal channel share its wires, so an element can reach,
in one clock, any element in its own row, the rows above and below, or its
own column and the columns beside it, within DIST positions.

Numbering used by the selector codes: on a side, local wire j of an element
at position p (its column for N/S, its row for W/E) is the wire that
starts at `(p/STEP − j)·STEP`. Worked example with DIST 6, STEP 1: an
element in column 1 driving its local wire 0 on its south side drives the
wire spanning columns 1..7 of that channel; the element below it in column
3 sees that wire as its north-side local wire 2.

### Selector and decoder codes

| code | meaning |
|---|---|
| input select `side·(L+1) + 0` | short wire from that side |
| input select `side·(L+1) + 1 + j` | long wire j of that side |
| `out_sel = 0` | short wires only |
| `out_sel = 1 + side·L + j` | also drive long wire j of that side |

Sides are N = 0, E = 1, S = 2, W = 3. With L = 7 this gives the 32-to-1
selectors and the 28-output decoder of the reference configuration. The
5-bit fields limit L to 7.

## I/O elements and controllers

An IOE holds eight 16-bit registers used as a FIFO with 3-bit head (write)
and tail (read) pointers; equal pointers mean empty, so up to 7 words are
held.

* `OP_IO_OUT`: whenever the FIFO holds a word at a word boundary, the IOE
  sends its low `dlen+1` bits into the array, LSB first, then advances the
  tail.
* `OP_IO_IN`: serial words from the selected input are written bit by bit
  into the entry at the head (read-modify-write of one bit per clock); the
  head advances after the last bit. Bits above the word length keep old
  contents, which the controller masks by widening.

Words through an IOE are at most 16 bits.

On the controller bus, a one-clock `strobe` with `rw = 1` pushes `din`,
and with `rw = 0` presents the tail word on `dout` and pops it. `dout` is
zero when not strobed, so the bus is the OR of the edge's IOEs.

The controller accepts one host command per clock (`ba_pkg::hcmd_e`):

| command | effect |
|---|---|
| `HC_WRITE` | push `h_wdata` into IOE `h_idx` of that edge (strobe next clock) |
| `HC_READ` | pop IOE `h_idx`; widened word on `h_rdata` with `h_rvalid` two clocks later |
| `HC_SETW` | set result width (`h_wdata[4:0]` = bits−1) and sign (`h_wdata[5]`) for widening |
| `HC_CFG` | shift `h_wdata` into the configuration chain, 16 clocks, `h_busy` high |

Results narrower than 16 bits are sign- or zero-extended to 16 bits;
`h_byte` flags widths of 8 bits or less, where the host may keep only the
low byte. IOE index on an edge: north and south count columns 0..COLS−1
(the corners belong to them), west and east count rows 1..ROWS−2 as
0..ROWS−3. `ioe_nempty[r][c]` shows which IOE FIFOs hold data.

## Configuring the array

All elements' configuration registers form one shift chain in row-major
order, fed by the north controller (`h_side = 0`, `HC_CFG`). The chain is
ROWS·COLS·54 bits long (2646 for 7x7). Shift the word for the last
element, (ROWS−1, COLS−1), first, MSB first, and element (0,0)'s word
last. Pad at the front to a multiple of 16 bits; the padding falls off the
end (`cfg_tail`). The first `HC_CFG` opens a configuration phase: every
element is held stopped and every IOE FIFO emptied until the north
controller receives a command other than `HC_CFG` (for example the first
data write). This keeps half-loaded configurations from running between
the 16-bit pieces.

Typical host sequence: configuration words; `HC_SETW` for each edge that
returns results; data writes to source IOEs; reads from result IOEs when
their `ioe_nempty` bit is set.

## Example mappings

`tb/tb_ba_array.sv` maps the data-flow graph `y = (a > b) ? a − b : a + b`
on 8-bit words, together with `a × b`, onto the default 7x7 array (12 of 49
elements), and streams 12 word pairs through it:

```
(0,1) IOE out a -> (1,1) DELAY k=1 --long wire--> row 2
(0,2) IOE out b -> (1,2) PASS      --long wire--> row 2
(2,1) CMPGT -> mask, latter half --long wire--> (4,2) MUX.C
(2,2) SUB   -> (3,2) DELAY k=7 ---- short ----> (4,2) MUX.A
(2,3) ADD   -> (3,3) DELAY k=7 --long wire--> (4,2) MUX.B
(4,2) MUX --long wire--> (6,2) IOE in -> south controller (8-bit, sign-extended)
(2,5) MUL -> (2,6) IOE in -> east controller (16-bit)
```

The host writes b one clock after a, so b's IOE runs one clock behind; the
DELAY k=1 on a (2 clocks) against the PASS on b (1 clock) realigns them.
The k=7 delays hold the sum and difference for the 8 clocks the comparison
takes. The source IOEs idle 8 clocks per word (`wlen = 8`) because CMPGT
and MUL occupy 16 clocks per 8-bit word.

`tb/tb_adder_pipeline.sv` maps `((a+b)+c)+d` on 4-bit words as a chain
PASS → ADD → ADD → ADD along row 1, fed by four north IOEs written one
clock apart, and checks one result every 4 clocks and 4 clocks of latency.

`tb/tb_dct_mac.sv` runs the step that dominates a DCT, a sum of products
of samples and coefficients, with four taps:
`y = x0·c0 + x1·c1 + x2·c2 + x3·c3`. Eight source IOEs (four north, four
south) feed eight DELAY elements, whose lengths (k = 7 down to 0) cancel
the one-clock spacing of the host's writes. Four MUL elements each get a
sample by short wire and a coefficient by long wire. Two ADDs combine the
products beside them, a third adds the two partial sums, and a long wire
carries the 16-bit result to an east IOE. With 8-bit words the array
delivers one sum every 16 clocks, which is 2n clocks for n-bit operands
because of the double-length products. A full 8-point 2D-DCT built this
way needs several hundred elements, far more than the 7x7 grid holds.

## Files

| file | content |
|---|---|
| `rtl/ba_pkg.sv` | two-line signal type, configuration word, opcodes, states, host commands |
| `rtl/ba_array.sv` | top: grid, short wires, configuration chain, controllers |
| `rtl/pe.sv` | processor element and its ALU |
| `rtl/ioe.sv` | I/O element |
| `rtl/controller.sv` | edge controller |
| `rtl/elem_fsm.sv` | state machine and counter shared by PE and IOE |
| `rtl/bs_mult.sv` | multiplier column step |
| `rtl/cfg_reg.sv` | configuration shift register |
| `rtl/in_mux.sv`, `rtl/out_dec.sv` | input selector, long-wire output decoder |
| `rtl/long_wire_net.sv` | long wire channels |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_ba_array.sv`, `tb/tb_adder_pipeline.sv`, `tb/tb_dct_mac.sv` | end-to-end runs at the default size |
| `tb/tb_ba_array_d5s2.sv` | end-to-end run of a 5x8 array with distance 5, step 2 |

## Simulating

Every testbench is self-checking. It ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ba_pkg.sv \
    tb/tb_ba_array.sv --top-module tb_ba_array -Mdir obj_tb_ba_array
./obj_tb_ba_array/Vtb_ba_array
```

Replace `tb_ba_array` with any testbench in `tb/`. The testbenches need no
input files. The full-size end-to-end runs take a few seconds. Lint a
module with `verilator --lint-only -Wall -Irtl -y rtl rtl/ba_pkg.sv
rtl/<module>.sv --top-module <module>`. The remaining lint warnings are
unused package constants and configuration bits that IOEs do not use, plus
the reset used both asynchronously and in assertions.

To change the array, override `ROWS`, `COLS`, `DIST`, `STEP` on `ba_array`.
`(DIST+1)` must be a multiple of `STEP`, and `(DIST+1)/STEP` must be ≤ 7,
unless the 5-bit selector fields in `ba_pkg` are widened.
`tb_ba_array_d5s2` shows the changes a mapping needs when the parameters
change. It runs a 5x8 grid with distance 5 and step 2, so L = 3. The
selector codes become `side·4 + k`, the output codes `1 + side·3 + j`, and
the configuration chain is 40·54 bits long.

## How far it can be trusted

Each module has a testbench that compares it with an independent model in
the testbench. Each testbench has also been run against a deliberately
broken copy of its module, to confirm that it fails:

| testbench | what it checks |
|---|---|
| `tb_bs_mult` | column step against integer products, 800 random cases |
| `tb_in_mux`, `tb_out_dec` | every select code, including out-of-range codes |
| `tb_cfg_reg` | shift order and field layout of the configuration word |
| `tb_elem_fsm` | state sequence, word and wait lengths, restarts |
| `tb_pe` | every operation against integer results, latencies, long-wire enable |
| `tb_ioe` | FIFO order, pointer wrap, serial in/out, controller bus |
| `tb_controller` | commands, bus timing, widening, configuration hold |
| `tb_long_wire_net` | wire membership for every element and side, at two parameter sets |
| end-to-end (four) | the example mappings above, with results and clock counts checked |

Known limits:

* Timing is verified only in simulation. No clock target has been set,
  and there is no timing analysis. At the default size the array
  synthesises to about 30,000 generic cells and 4,750 flip-flops, plus
  the IOE FIFOs.
* The end-to-end tests cover the mappings shown, not every combination
  of operations and wire codes. Mapping mistakes such as misaligned
  streams or wrong wire numbers are not detected by the hardware. The
  only exception is two drivers on one long wire, which raises
  `long_conflict`.
* Nothing protects against overfilling the 7-entry FIFO. Assertions in
  `ioe` flag two misuses:
  * a host write into an IOE that is collecting from the array;
  * a host read from an IOE that is sending into the array.

## Choices made here

The original architecture fixes the element structure, the wiring scheme
and the field sizes. The following are this implementation's own:

* **Bit order** LSB first (the original allows either).
* **Opcodes and operation set.** Multiply, shift, compare, addition and
  delay nodes are implied by the original; the exact list, the MUX/ADD3/ADDK
  operations and all encodings are choices. Multiply is **unsigned**, compare
  is signed, and the compare result is an all-ones/all-zeros mask.
* **Length encodings:** `dlen` = bits − 1, so 1..32 bits; `wlen` = idle clocks.
* **Word start rule** (all used inputs carry data) and the return to
  stop-special when a stream ends. The latter half of a two-phase operation
  lasts as long as the first.
* **DELAY** uses data registers 2 and 3 as a 16-stage line of bits and
  valid flags and ignores word framing.
* **Tristate long wires** are modelled as gated OR buses with a conflict flag.
* **Long-wire numbering** and the clipping of wires at the array edges;
  channels also run along the outer edges.
* **Selector and decoder codes**, including code 0 = "no long wire".
* **IOE** full/empty rule (7 usable entries); configuration empties the FIFO.
* **Controllers:** one per edge, the command set, the bus timing, sign or
  zero widening chosen by the host. The original leaves the controller and
  the host interface unspecified.
* **Configuration loading** through one serial chain with a hold phase.

## Not included

* The host processor and the external interface to it: the host port of
  `ba_array` is the controllers' command port, brought out directly.
* The 2D-DCT mapping the architecture was evaluated with. It needs 322
  elements, far more than the 49 of the 7x7 reference grid, and its
  element-by-element mapping is not available. An 18x18 grid would have
  enough elements.
* Signed multiplication and operands wider than 16 bits for MUL/SHR
  (splitting wider products into 16-bit pieces is left to the mapping).
* Physical results of the reference chip (0.35 µm, 133 MHz, 0.168 mm² per
  PE) are properties of that implementation, not of this RTL.
* There is no mapping tool; configurations are written by hand, as in the
  testbenches.
