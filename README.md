# SIC: snoopy register communication for a speculative 4-core CMP

When a chip multiprocessor runs the iterations of a loop as parallel
speculative threads, values carried from one iteration to the next (an
accumulator, an index, a pointer) are usually passed through memory. That
takes explicit stores and loads, and synchronisation. The Snoopy
Inter-register Communication (SIC) protocol instead passes register values
directly between the cores over a shared snoopy bus. Each core keeps only
three status bits per register in a local scoreboard. There is no directory.

This repository holds synthesizable SystemVerilog for that hardware: one SIC
node per core (the bus interface logic, the scoreboard and the thread-status
register), the shared bus, and a top level, `sic_cmp`, with four nodes. The
processor cores and caches are not included. Each core's register operations
come in on the ports of the top.

## Threads and masks

Each core runs one thread: one iteration of the loop. Each thread carries a
2-bit *mask*, which is its distance from the non-speculative thread:

| mask | thread |
|------|--------|
| 00 | non-speculative (the oldest iteration in flight) |
| 01 | first speculative successor |
| 10 | second speculative successor |
| 11 | third, most speculative successor |

A smaller mask means a predecessor. Threads commit strictly in order, and
only the non-speculative thread may commit. When it commits, the bus
broadcasts a commit (BusC). Every other running thread then moves one step
closer to 00, so the successor becomes non-speculative. The core that
committed can then start a new iteration as the most speculative thread
(mask 11).

## Register classes and states

The binary annotator is software. It splits the registers into two classes
and marks every write to a loop-live register as final or non-final:

* **Loop-live** registers are live at loop entry or exit and may be
  redefined inside the loop. A *final write* (FW) produces the value that
  the iteration will not overwrite again. Every other write is *non-final*
  (NFW).
* **Other** registers are never redefined inside the loop. Loop constants
  are an example.

The scoreboard bit A0 holds this class. Two bits A1A2 hold the state:

| code | state | meaning |
|------|-------|---------|
| 00 | INV | not valid here |
| 01 | VU, Valid-Unsafe | valid for this thread, but not final, so it must not be forwarded |
| 10 | VS, Valid-Safe | final for this thread, so it may be forwarded to successors |
| 11 | LC, Last Copy | final, and no other core holds it |

Other registers only use INV and VS.

## Protocol actions

The table shows what one node does for a loop-live register. "Self"
actions come from the node's own core. "Bus" actions come from snooping a
transaction of another core. The node snoops only while its own thread is
running.

| event | state before | action | state after |
|-------|--------------|--------|-------------|
| self R | VU, VS, LC | answered locally | unchanged |
| self R | INV | BusR with own mask; see below | VU, or blocked |
| self NFW | INV | local write, no bus traffic | VU |
| self NFW | VU | local write | VU |
| self FW | INV, VU | local write, then BusW of the value | VS if Shared is high, LC if low |
| bus BusR from a successor | VS | post mask; supply the value if closest | VS |
| bus BusR from a successor | LC | post mask; supply the value if closest | VS if it supplied |
| bus BusW from the immediate predecessor | INV | load the value, raise Shared | VU |
| bus BusW from the immediate predecessor | VU, VS, LC | keep own copy, raise Shared | unchanged |

**Read miss (consumer-initiated).** The node issues a BusR that carries its
mask. Every predecessor that holds the register in VS or LC posts its mask
on the mask lines. The closest predecessor wins and drives the value, and
the requester loads it as VU. If that supplier held LC, it drops to VS,
because it no longer holds the only copy. If nobody posts a mask, the
consumer *blocks*. It stays blocked until its immediate predecessor makes
the final write and pushes the value to it.

**Final write (producer-initiated).** The value goes on the bus without any
request. Only the immediate successor (master mask + 1) reacts. If it is
running, it raises Shared, and it loads the value if its own copy is INV.
If Shared stays low, no successor is running. The producer then keeps the
only copy and marks it LC.

**Other registers.** A read in VS hits. A read in INV issues a BusR, which
the closest predecessor holding VS answers, and the value is loaded as VS.
This happens typically the first time each speculative core reads a loop
constant. The BusR also benefits other cores: a running successor of the
supplier that holds the register as INV copies the value from the bus as
VS (*read snarfing*). That spares it its own miss. Writes to other registers
happen only in sequential code. They update the value locally and make it
VS.

### Thread initiation and completion

* `OP_START` with a mask other than 00 starts a speculative thread. It
  invalidates every loop-live register and leaves other registers as they
  are. `OP_START` with mask 00 lets sequential code go on as the
  non-speculative thread, and keeps all state.
* `OP_COMPLETE` first waits until the thread is non-speculative. The node
  then sends every register in LC state on the bus, one at a time in
  ascending order, exactly like a final write. After that it issues BusC,
  and the core becomes idle.

### What the protocol does not cover

A read miss takes the closest predecessor's VS or LC copy even when a
nearer predecessor has not yet made its final write. The protocol is
speculative in this respect. It describes no detection or squash of such a
misspeculation, so none is built. Software, or a later extension, must
order such reads. The end-to-end testbench orders them the same way (see
below). A non-speculative thread that reads a loop-live register nobody
holds blocks for ever.

## The bus

`sic_bus` sequences one transaction at a time, in three cycles:

1. **IDLE**: every core with a pending request competes. The core running
   the oldest thread (lowest mask) wins, and ties go to the lowest core
   index. Oldest-first guarantees that the non-speculative thread always
   makes progress.
2. **ADDR**: the bus broadcasts the command (BusR, BusW or BusC), the
   register number, the master's mask and, for BusW, the value. Snoopers
   look up their scoreboards. A successor that receives a push writes it in
   this cycle.
3. **RESP**: the mask lines, the supply data and Shared settle. They are
   wired-OR and are modelled as an OR of all drives. The master takes the
   answer at the clock edge that ends the cycle.

**Distributed arbitration.** A supplier posts its mask decoded, as one line
per thread position. Each candidate then decides on its own that it is the
closest predecessor: no line between its position and the requester's is
raised. Every node reads from the same lines whether any supplier exists
(a non-speculative supplier, mask 00, still shows) and where it sits, which
is what read snarfing needs. This is done in `sic_mask_arb`. No central
unit takes part, and the arbitration takes a single bus cycle.

## Timing

| operation | cycles from acceptance to `op_done` |
|-----------|-------------------------------------|
| read hit, local write, start | 1 (`op_done` in the next cycle) |
| read miss, final write, idle bus | 4 (request, IDLE, ADDR, RESP) |
| busy bus | plus the wait for mastership |
| blocked read | until the predecessor's push |
| completion | wait until non-speculative, plus one transaction per LC register, plus one for the commit |

A node handles one operation at a time. It does not accept an operation in
a cycle in which its bus side writes the scoreboard (`op_ready` low).

## Top-level interface (`sic_cmp`)

Parameters are `NCORES` = 4, `NREGS` = 32 and `XLEN` = 32. Four cores comes
from the protocol. The register count and width are assumptions for a
MIPS-like core. Ports marked "per core" are arrays indexed by core.

| port | dir | meaning |
|------|-----|---------|
| `op_valid`, `op_ready` | in, out | per core: handshake; an operation is taken when both are high at a clock edge |
| `op` | in | per core: `OP_R`, `OP_NFW`, `OP_FW`, `OP_START`, `OP_COMPLETE` (`sic_pkg::sic_op_e`) |
| `op_reg`, `op_wdata` | in | per core: register number and write data; for `OP_START`, `op_wdata[1:0]` is the mask |
| `op_done`, `op_rdata` | out | per core: one-cycle completion pulse and read data |
| `ll_load`, `ll_mask` | in | loads the loop-live flag of every register into all scoreboards |
| `thread_mask`, `thread_active` | out | per core: thread status |
| `ev` | out | per core: one-cycle event pulses (`sic_pkg::sic_event_t`) |

A typical loop entry looks like this:

1. Load `ll_mask`.
2. The sequential core continues as mask 00.
3. Start the other cores with masks 01, 10 and 11.
4. Each core runs its iteration and ends with `OP_COMPLETE`, then starts
   the next iteration with mask 11.

## Files

| file | content |
|------|---------|
| `rtl/sic_pkg.sv` | state, operation, command and phase enums; event struct; default sizes |
| `rtl/sic_scoreboard.sv` | values and A0/A1A2 bits; two read ports, one write port, loop-live invalidate, LC vector |
| `rtl/sic_thread_status.sv` | mask register; moves on commit |
| `rtl/sic_mask_arb.sv` | one node's cell of the distributed arbitration |
| `rtl/sic_bus.sv` | mastership, phases, wired-OR lines |
| `rtl/sic_node.sv` | protocol controller (processor side and snoop side); instantiates the three blocks above |
| `rtl/sic_cmp.sv` | four nodes and the bus |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, the end-to-end test:

```
verilator --binary --timing --assert rtl/sic_pkg.sv rtl/sic_scoreboard.sv \
  rtl/sic_thread_status.sv rtl/sic_mask_arb.sv rtl/sic_bus.sv rtl/sic_node.sv \
  rtl/sic_cmp.sv tb/tb_sic_cmp.sv --top-module tb_sic_cmp
./obj_dir/Vtb_sic_cmp
```

For a unit test, swap the testbench and top module and keep the package plus
the modules it uses.

* `tb_sic_cmp` runs the whole design at its default sizes. Four behavioural
  cores run a 24-iteration loop:
  * a loop-live accumulator that each iteration reads and final-writes;
  * a loop constant held in an other register;
  * a loop-live temporary that gets two non-final writes and a read;
  * a loop-live register that is final-written and never read.

  At loop start iterations 1 to 3 read the accumulator before iteration 0
  has produced it. They block and are woken one after another by pushes.
  Each later iteration reads the accumulator only after its immediate
  predecessor's final write, which keeps every read free of the
  misspeculation described above. Every value read is compared with the
  sequential result. The test also checks the read-hit latency and the
  idle-bus read-miss latency. It counts every protocol event: hit, miss,
  block, wake, write miss and hit, Shared high and low, supply, supply from
  LC, push, snarf, flush, commit and start. It fails if any event never
  occurs.
* `tb_sic_cmp_loops` also runs at the default sizes. It runs six loops in a
  row, each with a random trip count; one loop has 2 iterations and one has
  a single iteration. Each loop starts on the core that finished the
  previous loop. The test uses two loop-live accumulators and random
  delays. Every value read is checked, and so are the final values after
  each loop.
* `tb_sic_node` puts one node on a real bus and plays the other three
  cores. It steps through every transition in the table above.
* `tb_sic_bus`, `tb_sic_mask_arb`, `tb_sic_scoreboard` and
  `tb_sic_thread_status` check those blocks against reference models. The
  arbitration test is exhaustive; the others are random.

## Design choices beyond the protocol description

These choices are this design's own. Change them here if your system needs
something else:

* The value fields sit in the scoreboard, next to the status bits.
* A0A1A2 encoding: INV=00, VU=01, VS=10, LC=11.
* Masks are posted one-hot on the mask lines.
* Bus timing is three-phase, with oldest-first mastership.
* A commit command (BusC) moves the non-speculative status on.
* Pushed values load only into INV copies, and a pushed loop-live value
  loads as VU.
* A running successor always raises Shared, even when it keeps its own
  copy. The producer's copy is then not the last one needed.
* A blocked consumer is woken only by a push. It does not retry its BusR.
* NFW to a VS or LC register keeps the state. FW from any state makes it VS
  and sends it again.
* A core waits for its final write's bus transaction to finish.
* An LC register whose completion flush finds no running successor stays LC
  in the idle core. It is lost when that core next starts a speculative
  thread, so the loop's last value should be read from that core, as the
  end-to-end test does.
* Reset is asynchronous and active low. All registers reset to INV and
  other-class, with value 0.

The processor cores, the L1 and L2 caches, and memory-level communication
are outside this design.
