# Low-level processor of the Image Understanding Architecture

This is the bottom level of a three-level machine for computer vision. Here
every pixel of an image gets its own tiny processor. The processors are
bit-serial: each one works on one bit per instruction. All of them execute
the same broadcast instruction at once. Chips hold 64 processing elements
(PEs) as an 8 x 8 square, and a board holds 8 x 8 chips, so one board is a
64 x 64 array of 4,096 PEs. The full machine tiles 64 such boards into a
512 x 512 array.

Three ideas set this array apart from a plain SIMD mesh:

* **The Coterie Network.** Every PE owns a small set of switches. Set them
  so that each image region is one electrically connected group, and each
  group behaves like a private bus. Every PE then reads the OR of its group's
  response bits in a single cycle, and all groups do this at the same time.
* **A response count in a few cycles.** Each chip counts its responders in
  one cycle. A counting chip, the Feedback Concentrator, adds the chip
  counts serially, so a count never stops the PEs.
* **A managed on-chip cache.** Each PE has 320 bits of memory on the chip. The
  lower 256 bits can be swapped byte by byte with an external video-RAM
  backing store while the PEs keep working. The intermediate level shares
  that store.

The RTL here describes one board. It was checked with Verilator and Yosys
(slang front end).

## Hierarchy

```
iua_llp_board                    one board: 8 x 8 chips, 64 x 64 PEs
 ├─ caapp_chip  [8 x 8]          one processor chip
 │   ├─ llp_pe  [8 x 8]          bit-serial PE with its 320-bit cache
 │   ├─ llp_coterie              the chip's Coterie Network switch fabric
 │   ├─ llp_count_unit           response count, count register, serial output
 │   └─ llp_backing_store_ctrl   byte-plane transfers to the backing store
 └─ feedback_concentrator        serial adder of the 64 chip counts
llp_pkg                          instruction word, encodings, sizes
```

Every parameter defaults to the size of one full board. `iua_llp_board` takes
`CHIP_ROWS`/`CHIP_COLS` (8 x 8 chips) and `ROWS`/`COLS` (8 x 8 PEs per chip).

## The processing element (`llp_pe`)

Each PE has five one-bit registers:

| Register | Role |
|---|---|
| A | activity: with an inhibit mode, a PE whose A is 0 ignores the instruction |
| X | response: drives the Coterie Network and the response count |
| B, Y | general operands |
| Z | carry of bit-serial arithmetic |

The PE also holds two 4-bit switch registers, MR and SB, for the Coterie
Network, and its cache.

An instruction takes one clock cycle, which is one read-modify-write of the
cache. It works as follows:

1. Two operands are chosen. `I = C_i ^ src(S_i)` and `J = C_j ^ src(S_j)`.
   The source can be 0, the carry, a neighbour's memory bit, Y, X, B, A or
   the cache bit at `Addr`. For the mesh, I can read south or north and J
   can read east or west.
2. The function unit forms R. It can be the group value on the Coterie
   Network, I, J, NAND, NOR, XNOR, a full add, or a bit from the
   intermediate level.
3. `D = C_r ^ R` is written to the destination. That is one of A, X, Y, B or
   the cache bit at `Addr`. There are also three combined writes:
   * A and X together, for combined activity and response;
   * A ← D with X ← I;
   * A ← D with X ← J.

   The last two load an operand into X while the result goes to A, which
   shortens inequality tests.

The adder computes `~I + ~J + ~Z`. This design stores the inverted carry in
Z, so `~Z` is the real carry. A bit-serial add of field F into field G
therefore runs like this:
* clear the carry with `I → Z` (I = ~0);
* for each bit k, load `F[k]` into B;
* then issue `G[k] ← ADD` with both operands complemented (`C_i = C_j = 1`).

`tb_llp_pe` does exactly this.

Each PE always offers its cache bit at the current address to its four
neighbours. A mesh shift is therefore an ordinary instruction that reads a
neighbour as its source.

The other function codes move bytes of the cache between memory and MR/SB:
* `memory → MR`: MR takes bits 0..3 of the byte;
* `memory → MR,SB`: MR takes bits 0..3 and SB takes bits 4..7;
* `MR → memory` and `MR,SB → memory` write them back the same way.

One instruction can thus reconfigure the whole network.

### Instruction word (`llp_pkg`)

| Bits | 31 | 30:29 | 28 | 27:24 | 23 | 22:19 | 18 | 17:14 | 13:10 | 9 | 8:0 |
|---|---|---|---|---|---|---|---|---|---|---|---|
| Field | 0 | INH | C_r | Ftn | C_i | S_i | C_j | S_j | Dest | 0 | Addr |

The field layout and the codes follow the published instruction format and
table.

INH selects activity control:
* 0: always active;
* 1: inhibit if A = 0;
* 2: inhibit if A = 0 or the PE's Coterie group has some responder;
* 3: inhibit if A = 0 or the group has none.

`make_instr()` builds a word from its fields.

### Cache

The cache holds 320 bits, at addresses 0..319. Addresses up to 511 decode;
the ones above 319 read 0.

The bits form pages of 128. Pages 0 and 1 (bits 0..255, 32 bytes) also have
a byte port for the backing store. Higher addresses act as a register file
that the backing store cannot reach.

If the byte port and an instruction write the same bit in the same cycle,
the instruction wins.

## The Coterie Network (`llp_coterie`)

Every PE is a switch node with four arms: W, N, E and S. Facing arms of
neighbouring PEs are the same wire.

* `MR[k]` joins arm k to the PE itself. The PE drives its X there and reads
  the group value from there.
* `SB[k]` joins arm k to arm k+1. This lets a path turn the corner past a PE
  without touching it, the diagonal bypass.

Any set of PEs that the closed switches connect forms one group, a
*coterie*. The network holds no logic. Each group acts as a wired OR of its
members' X.

Some common settings:

| Setting | Result |
|---|---|
| MR = 0101 everywhere | one bus per row |
| MR = 1111 everywhere | one bus for the chip |
| MR = 0 | every PE alone |

Region-shaped settings give one bus per region. A PE with `INH` 2 or 3 is
then inhibited by whether its region has any responder.

In hardware this is just pass transistors. As synchronous logic it becomes a
connectivity problem, and `llp_coterie` solves it with combinational
relaxation:
* each link (the wire between two facing arms) starts at the OR of the X
  values that reach it through a PE's own switches;
* each step, every link takes the OR of all links its PE's switches connect
  it to;
* the steps stop when nothing changes, or after `2·ROWS·COLS+1` steps, the
  longest possible path.

The same loop also applies the bypass closure (arm k → k+1 → k+2 …). This is
the largest and slowest block to synthesize. A serpentine path through all
64 PEs is the worst case, and the testbench covers it.

The network ends at the chip edge. Groups never span two chips.

## Backing store and corner turning (`llp_backing_store_ctrl`)

The backing store is video RAM shared with the intermediate level. The chip
connects to the 16-bit serial port of that RAM, which runs at twice the
instruction rate. The controller moves one byte plane, the same byte index
in all 64 PEs, in **16 instruction cycles**:

* Each cycle carries four PE bytes, as two 16-bit beats presented together
  on `vram_out[1:0]` or `vram_in[1:0]`.
* Beat 0 is `{PE 4k+1, PE 4k}` and beat 1 is `{PE 4k+3, PE 4k+2}`, for cycle
  k = 0..15.

Each PE's byte travels intact. The bit-serial data is therefore turned into
ordinary bytes, which the intermediate level can use directly.

Transfers use only the byte port, so instructions keep running alongside. A
start while a transfer is running is ignored. RAM addressing and refresh are
outside this design.

## Image I/O through staging memories (board level)

Each chip also has a staging memory on its south mesh edge. In I/O mode
(`io_mode`):
* every chip's north edge is switched off;
* the south-edge input of every chip comes from its own `stage_in` port, not
  from the chip below.

An 8-bit image enters with eight north shifts per bit plane, and all chips
load at once. Output leaves on `stage_out`, the south-edge memory bits of
each chip. A row of data reaches it by shifting south.

## Response count (`llp_count_unit`)

An adder tree counts the set X bits on the chip every cycle into the Local
Count Register (LCR). LCR therefore always holds the count of the previous
cycle's X.

A *latch* command (`latch_count`) copies LCR, or the ICAP Count Register
(ICR), into the 8-bit Count Register CR:
* ICR is an 8-bit value loaded by the intermediate level, so the same path
  can also sum values supplied from above;
* CR is one bit wider than a 64-PE count needs.

From the next cycle, a small state machine shifts CR out on `l_count`:
* least significant bit first, one bit per cycle, for eight cycles;
* then zeros;
* it needs no instructions, so the PEs keep computing.

Latching again restarts the shift. `l_sn` is the chip's some/none: the OR of
all X.

Because LCR lags by a cycle, put the latch at least one instruction after
the one that sets X.

## Feedback Concentrator (`feedback_concentrator`)

This chip sums 64 serial numbers of any length. Each cycle:

1. Its 64 input bits are counted into `D_Reg_1`, which is 7 bits wide.
2. A carry-select adder forms `D_Reg_1 + D_Reg_2`, splitting it into a 3-bit
   low part and a 4-bit high part. The high part is computed for both carry
   values, and the low carry picks one.
3. Bit 0 of the sum leaves on `serial_out`.
4. Bits 6..1 go back into `D_Reg_2` and also appear on `high_out`.

Controlling a count works like this:
* assert `reset_2` in the cycle the first bits arrive, so that earlier
  high-order bits do not carry in;
* one cycle later, the first result bit appears;
* to flush the high part serially as well, feed six more cycles of zeros.

Flushing serially is what lets two levels of these chips cascade into a
count for the full machine.

`and_out`, `or_out` and `one_out` report whether all, some or exactly one of
the current inputs are set.

On the board, the 64 chip `l_count` lines feed one concentrator. The result
of a count is 14 bits: 8 on `fc_serial` plus 6 flushed bits. Output starts
two cycles after the latch command.

## The board (`iua_llp_board`)

The board is the top module:
* The chips form one continuous 64 x 64 mesh. The PE mesh wires cross chip
  edges one wire per edge PE in each direction, and the board edges are
  ports.
* The instruction, `latch_count` and the backing-store controls go to every
  chip.
* The backing-store and staging ports of each chip, the intermediate-level
  inputs, and the concentrator outputs are board ports.
* `board_sn` is the OR of all chips' some/none lines.

## Departures and open points

* **Coterie Network output to the staging memory.** In the original scheme,
  data crosses each chip from north to south over the Coterie Network. Here
  the staging memory reads the south-edge memory bits directly, and data
  reaches them by mesh shifts. How the network would drive the south edge
  is not specified.
* **I/O mode.** The north edge is tri-stated in the original. Here its input
  reads 0.
* **Special instructions.** The latch-count command, ICR load and I/O mode
  are separate control inputs. Their instruction encodings are not
  published.
* **Damaged table entries.** Two entries of the published instruction table
  are unreadable:
  * Destination 0 is implemented as "no write".
  * Function 7 is implemented as "bit from the intermediate level → R".
* **S/N in the inhibit modes.** This is taken as the PE's own Coterie group
  value.
* **Not built:**
  * the array controller, which issues instructions;
  * the intermediate and high levels;
  * the RAM chips;
  * the VME/frame-grabber path;
  * the four-level status multiplexer (EF/B/IC against the intermediate
    level's D2..D0), whose meaning is not given;
  * the second concentrator level that joins 64 boards.

  All of their connections are ports.
* **Byte-wide operations.** The swappable pages have a byte-wide path, and
  the original leaves room in the instruction set for 8-bit moves. Only the
  backing-store port and the MR/SB transfers use it here. No 8-bit move
  instruction is defined.
* **External memory.** Each PE has 32K bits in the backing store. That memory
  is outside this RTL; only its serial port is modelled.
* **Reset.** A reset state is not specified. Everything here resets to zero,
  including the caches, except that the carry register starts at "no carry".

## Simulation

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<m>`.

| Testbench | What it checks |
|---|---|
| `tb_llp_pe` | serial add, equality test, inhibit modes, 3,000 random instructions against a reference model |
| `tb_llp_coterie` | union-find reference over the switch graph: buses, broadcast, serpentine, bypass-only paths, 400 random settings |
| `tb_llp_count_unit` | counts, ICR path, bit order, restart, some/none |
| `tb_llp_backing_store_ctrl` | byte order on the port, 16-cycle transfers, no disturbance of other bytes |
| `tb_feedback_concentrator` | random serial sums, summaries, and a two-level cascade of 65 concentrators summing 4,096 chip counts with the last bit 16 cycles after the start |
| `tb_caapp_chip` | mesh shifts, north edge off for I/O, count output and some/none, Coterie row and column buses, the intermediate-level bit, all through the backing-store port |
| `tb_iua_llp_board` | end-to-end run on 4 x 4 chips (32 x 32 PEs), counting that every mechanism ran |

The end-to-end sequence lives in `tb/board_bench_body.svh`. It runs:

1. a load through the backing store;
2. shifts across chip edges;
3. a serial add;
4. a masked write;
5. bit-plane counts through the concentrator, with some/none;
6. an ICR sum;
7. Coterie row buses;
8. staging-memory input;
9. a read-back of all results.

Example:

```
verilator --binary --timing -Irtl -Itb rtl/llp_pkg.sv rtl/llp_pe.sv \
  rtl/llp_coterie.sv rtl/llp_count_unit.sv rtl/llp_backing_store_ctrl.sv \
  rtl/feedback_concentrator.sv rtl/caapp_chip.sv rtl/iua_llp_board.sv \
  tb/tb_iua_llp_board.sv --top-module tb_iua_llp_board
./obj_dir/Vtb_iua_llp_board
```

The largest size simulated is 4 x 4 chips (32 x 32 PEs, 1,024 PEs): the bench
builds and runs in well under a minute. At the default 8 x 8 chips, Verilator
emits the chip model as a separate class of several hundred megabytes of C++,
which by measurement would take several hours to compile, so the full board has been checked only by
lint, elaboration and the reduced-size runs. Only `CHIP_ROWS`/`CHIP_COLS`
differ between the two; the chips themselves are simulated at full size.
