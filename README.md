# A terabit ATM switch built from shift-register switching modules

A single shared-memory ATM switch cannot be made fast enough to carry a terabit
per second, and a centrally scheduled crossbar needs an arbiter that must decide
for every port in every cell time. This design avoids both. It splits the switch
into two stages of small modules joined by a plain N x N crosspoint:

* **N switching controller modules (SCMs)** on the input side. Each one buffers
  the cells of a few input ports and sends one cell per time-slot into the
  crosspoint.
* **N switching modules (SMs)** on the output side. Each one is a complete small
  ATM switch (the *shift-register switch*) that delivers cells to its output
  ports.

The crosspoint is never arbitrated centrally. Time is cut into *switching cycles*
of N slots. In every cycle each SCM owns one slot towards each SM. Slots an SCM
cannot use are handed to other SCMs by a token-like status vector that travels
around a ring of SCMs. With N = 128 SCMs and SMs on 10 Gb/s links the switch
carries 1.28 Tb/s.

Inside each SM, cells are never moved between buffers. A cell stays in the input
register it was written to. Output ports keep queues of *addresses* of such
registers and read the cell straight out of the register when it is their turn.
A cell for several outputs is therefore stored once and read by each of them.
Each output serves four priority classes with a *window scheduler*. This
scheduler bounds how many cells each class may send per window of slots, but it
never leaves the link idle while any class has a cell.

The RTL implements the architecture of the thesis *Switching and Error Recovery
in Terabit ATM Networks*. It is written in SystemVerilog as synthesizable logic
and checked with Verilator.

## Cells on the wire

All cell lines are bit-serial, one bit per clock. Every cell is aligned to a
common grid of 424-clock time-slots (53 bytes). `slot_timer` produces the bit
position `bitcnt` (0..423), the `slot_end` strobe and a slot counter `now`.
Bit 0 of a slot is the first bit of the cell's header. The header is the
UNI layout:

| field | bits on the line |
|-------|------------------|
| GFC | 0-3 |
| VPI | 4-11 |
| VCI | 12-27 |
| PT  | 28-30 |
| CLP | 31 |
| HEC | 32-39 |

Each field is sent most significant bit first. The HEC is the standard ATM
CRC-8 (x^8 + x^2 + x + 1) XOR 0x55. `atm_pkg` holds the cell and header types
and the HEC function.

Because everything is serial, one clock equals one bit time. A 10 Gb/s link
therefore needs a 10 GHz clock. A real implementation would widen the datapath
(for example to 32 bits at about 312 MHz) while keeping the same slot structure.
That change is not made here.

## The fabric: SCMs, crosspoint and the scheduling ring (`terabit_switch`, `scm`, `ss_update`, `crosspoint`)

### Pre-allocation

Slots in a cycle are numbered t = 0..N-1. In slot t, SCM i owns the connection
to SM (i + t) mod N. Each SCM thus has a guaranteed cell per cycle to every SM,
and no two SCMs own the same SM in the same slot.

### Reallocation through the status vectors

Traffic is rarely even, so an SCM often has nothing for the SM it owns in a slot
and several cells for another SM. Unused slots are traded through N
*scheduled-status* vectors SS_0..SS_{N-1}, one per SCM, each N bits wide.

* **Bit meaning.** Bit x of SS_k stands for slot x of the next cycle, on the path
  from SCM k's pre-allocated schedule: the slot that goes to SM (k + x) mod N.
  A 1 means the slot is taken.
* **Own vector.** In slot 0 of a cycle every SCM j starts its own vector SS_j.
  It marks the pre-allocated slots for which it holds a cell.
* **Ring transfer.** In every later slot, each SCM receives the vector its ring
  predecessor has just processed, updates it and passes it on. SCM j - 1 feeds
  SCM j, and the last SCM feeds the first.
* **Update.** The update (`ss_update`) takes every free bit x of the received
  SS_k for which two things hold:
  * the SCM has a cell waiting for SM (k + x) mod N;
  * the SCM's own link is still free in slot x of the next cycle.
* **Result.** After N slots every vector has visited every SCM once. Every slot
  of the next cycle then has at most one SCM per SM and at most one SM per SCM.
  The crosspoint needs no arbitration.

The *cell-buffer status* bit for SM m is set when more cells wait for SM m than
have already been given a slot in the next cycle. A cell therefore never gets
two slots.

Because the schedule is built one cycle ahead, a cell waits at least until the
next switching cycle. For an isolated cell the delay is exact and the testbench
checks it to the slot. Take a cell that enters SCM j in absolute slot s, with
t = s mod N and c = s div N, bound for SM m:

* If t < N - 1, it is claimed in the same cycle and crosses the crosspoint in
  slot (c + 1)·N + ((m - j + t + 1) mod N).
* If t = N - 1, it is too late for this cycle's ring pass. It crosses in slot
  (c + 2)·N + ((m - j) mod N).
* It leaves the SM one slot after crossing.

The first case is not always the pre-allocated slot. A cell arriving after its
own slot was already fixed can claim a free slot in another SCM's vector, and
this reallocation is what makes the latency formula depend on t.

### The SCM

Each SCM has:

* **Routing table.** Indexed by the low `CIDX` bits of the VCI, it gives the
  destination SM. Headers are not changed in the SCM.
* **Shared buffer.** Holds `B` = 12 cells for all of its inputs. This is the
  size that gives about 1e-7 loss in the original simulations.
* **Per-SM queues** of buffer entry numbers.
* **Two schedules.** One for the current cycle, being transmitted, and one for
  the next cycle, being built.

A cell that finds the buffer full is lost and counted on `scm_drop_full`. Cells
with an unknown connection are lost on `scm_drop_unknown`. `sent_own` and
`sent_realloc` pulse when a cell leaves in a pre-allocated or a reallocated
slot.

### The crosspoint

The crosspoint is an AND-OR selector per SM, driven by the destination each SCM
link names for the slot. An assertion checks that at most one SCM names the
same SM.

## The switching module: shift-register switch (`sr_switch`)

Each SM is the shift-register switch with `NIN` inputs and `NPORT` outputs. In
the fabric, NIN = 1 (the crosspoint) and NPORT = 4. Stand-alone, the defaults
are 16 x 16. Two more outputs serve the OAM processor (port NPORT) and the
signalling / central processor (port NPORT + 1). The processors themselves are
not part of this RTL; their cell streams are brought out as ports.

### Input module (`input_module`, `upc`)

* **Register bank.** `P` cell-sized registers, built as a P x 424 memory. Bit m
  of a cell is written at position m, which is exactly what the shift register
  of the original design holds after m clocks. The *input scheduler* chooses the
  lowest free register when a cell starts. A cell that finds no free register is
  lost.
* **Input controller.** At bit 40, when the whole header is stored, it reads the
  header and looks the connection up in its table (low `CIDX` bits of the VCI).
  * The UPC checks the cell against the connection's contract, using the GCRA
    with an increment and limit in slots; increment 0 means not policed. A
    non-conforming cell is discarded.
  * The controller then rewrites VPI, VCI and HEC in the stored cell.
  * A multicast connection has its identifier written into the VCI field
    (VPI = 0) instead. The output modules translate it later.
  * OAM and signalling connections go to the two local ports unchanged.
* **Address and selection buses.** The inputs take turns on one shared bus: input
  i owns clock 41 + i of every slot. It places the register number, class and
  multicast identifier on the *address bus*, and the destination mask on the
  *selection bus*. Every output module whose selection line is set takes the
  entry.
* **Concentrator.** Each output module names (input, register) for the slot it
  is sending in. That input drives bit `bitcnt` of the register onto the output
  module's line of the shared bus (`shared_bus`).
* **Release.** Output modules pulse a release after sending. A register is freed
  after as many releases as the cell had destinations. A multicast cell is thus
  read directly from the one register by every destination.

### Output module (`output_module`, `window_sched`, `flow_ctrl`)

* **Virtual queues.** One queue of register addresses per priority class,
  `VQD` = 64 entries each. The largest zero-loss queue size reported for the
  16 x 16 switch at 90 % load was 63. A full queue refuses an entry and
  releases its register at once.
* **Scheduling.** In the last clock of each slot the window scheduler picks a
  class among those that hold an entry and have flow-control credit. Its head
  entry is sent during the next slot, so the minimum delay through an SM is one
  slot.
* **Multicast.** For a multicast cell the outgoing VPI/VCI come from the port's
  own table, indexed by the identifier, and the HEC is recomputed as the header
  streams out.
* **Flow control.** One credit counter per class serves both schemes:
  * credit-based: credits are added from outside (`credit_add`);
  * rate-based: one credit every `interval` slots.

  A class without credit is skipped.

## The window scheduler (`window_sched`)

Each class i has a weight n_i: the cells it may send per window of `WINDOW`
slots. The defaults are weights 4, 3, 2, 1 and a window of 10, the values used in
the original evaluation. `D_i` says queue i holds a cell. `W_i` says it still
has allowance in this window. Queue i may send when

    D_i and (W_i or no lower-priority queue j has D_j and W_j)

The first such queue, searching from the highest priority, is served.

The rule has these consequences:

* A high class with allowance always goes first.
* A class that has used its allowance still gets the link whenever no lower
  class could use its own, so the link is never idle with a cell waiting.
* When a high class runs dry in the middle of a window, one cell of the next
  class is served. The high class is back in front at the next slot. This is the
  difference from weighted round robin, which would move on and return only
  after a full round.

The W counters are reloaded every `WINDOW` slots. A grant in the last slot of a
window does not use up the next window's allowance.

The four-queue gate equations in the original design write out the same rule for
A_0. For the lower queues they are not consistent with the rule or with each
other. This RTL implements the rule as stated in words, for any number of
queues.

## End-to-end error recovery (`psrp_sender`, `psrp_receiver`)

The switch may lose cells when a buffer overflows. Frames that must arrive
complete are protected end to end, between the two terminals, by a periodic
selective-repeat protocol (PSRP). Its two engines are in `rtl/`. The top
instantiates them beside the fabric, not connected to it, with their ports
brought out as `psrp_*`, because they belong in the terminals and not in the
switch.

* The sender numbers frames modulo 2^SEQW and keeps at most W outstanding. It
  never waits for a positive acknowledgement.
* The receiver keeps a bitmap of the frames it has and hands frames on in
  order. From time to time it sends a STAT frame. A STAT frame carries the last
  frame number received and a bitmap of every earlier frame still missing.
  Each STAT frame holds the whole current status, so losing one costs nothing
  but time.
* When the network is uncongested, the receiver sends a STAT frame every
  PERIOD frame times. When it is congested (an input), it sends STAT frames
  only when asked.
* On a STAT frame the sender frees every reported frame not listed as missing.
  It queues the missing ones for retransmission, ahead of new frames.
* When the window is full, the sender asks for a STAT frame by setting the
  POLL bit in a normal frame. It then starts a time-out of TIMEOUT frame
  times. If no STAT frame arrives in time, it sends the oldest outstanding
  frame again with the POLL bit.
* The sender also polls when its source has nothing new to send while frames
  are outstanding. This is my addition. Without it, frames lost at the end of
  a burst in the congested state would never be recovered.

The defaults are a window of 100 frames, a time-out of 30 frame times and a
STAT period of 100 frame times. These are the values used in the original
throughput, control-cell and delay plots. The receiver answers a POLL in the
next clock. One frame may be sent per clock in which `tx_slot` is set.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| terabit_switch, scm, ss_update, crosspoint | N | 128 | SCMs = SMs = slots per cycle |
| terabit_switch, scm | NP | 4 | ports per SCM / SM (not fixed by the original design) |
| terabit_switch, scm | B | 12 | SCM cell buffer |
| sr_switch, input_module | P | 16 | cell registers per input (own choice) |
| sr_switch | NIN, NPORT | 16, 16 | stand-alone SM size |
| output_module | VQD | 64 | entries per class queue |
| window_sched | WEIGHT, WINDOW | 4,3,2,1 / 10 | window scheduler |
| several | CIDX, MCIDX | 6, 4 | connection / multicast table index bits (own choice) |
| psrp_sender, psrp_receiver (PSRP_* in the top) | W, SEQW | 100, 8 | window in frames, frame-number bits |
| psrp_sender | TIMEOUT | 30 | POLL time-out in frame times |
| psrp_receiver | PERIOD | 100 | frame times between periodic STAT frames |

## Simulation

Every module in `rtl/` has a self-checking testbench in `tb/<module>_tb.sv`.
Each testbench ends with a line `TB_RESULT checks=<n> failures=<n>`. For
example:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/atm_pkg.sv tb/sr_switch_tb.sv --top-module sr_switch_tb -o simv
    ./obj_dir/simv

* **End-to-end fabric test.** `terabit_switch_tb` runs a 4 x 4 fabric with 2
  ports per module. It uses the body in `terabit_tb_body.sv`, which checks:
  * exact latency of isolated cells, against the formula above;
  * random traffic, each cell delivered once with translated header;
  * multicast inside an SM;
  * OAM delivery;
  * SCM buffer overflow.

  It counts that pre-allocated slots, reallocated slots, overflow, multicast and
  OAM cells all occurred. During the whole run the error recovery sender and
  receiver exchange frames over a lossy channel. The test checks in-order
  delivery of every frame. It also checks that retransmissions, POLLs, POLL
  time-outs, periodic STAT frames and polled STAT frames all happened.
* **Full-size test.** `terabit_full_tb` runs the same body on the switch with
  its default parameters (128 x 128, 4 ports each) with only a few cells.
  Building it takes about nine minutes. Verilator then simulates it in about
  nine minutes, with 306,145 checks passing.
* **Error recovery.** `psrp_tb` joins a small sender and receiver (window 8)
  through a channel with delay and loss. It checks:
  * the lost-frame list of a STAT frame after two known losses;
  * in-order delivery under random loss, with congestion switched on and off;
  * the STAT period;
  * silence while congested;
  * a re-POLL exactly one time-out after the last POLL when STAT frames are cut off.
* **Unit tests.** `sr_switch_tb` tests the stand-alone SM at 4 x 4: unicast
  latency, multicast, OAM/signalling, unknown connection, UPC, priorities, flow
  control and random traffic.

## Where this RTL departs from the original design

* **Ports per module.** The number of ports per SCM and SM is not fixed by the
  original design; 4 is chosen.
* **Multicast across SMs.** Multicast to several SMs is not implemented. An SCM
  connection goes to one SM, and multicast is done inside that SM only. The
  original design stores such a cell once in the SCM and schedules it to every
  destination SM.
* **Fault tolerance.** The standby SCMs/SMs and the extra space switch for fault
  tolerance are not included.
* **Queueing and credits.** Virtual queues and flow-control credits are kept per
  priority class, not per virtual channel. Resource-management cells are not
  decoded; credits enter through a port.
* **Policing action.** The action taken on a non-conforming cell is discarding.
  The UPC algorithm (GCRA) and the header check code are standard ATM choices,
  not taken from the original design.
* **Local processors.** OAM and signalling cells are recognised by connection
  table entries, not by PT/VCI values. The OAM processor and the central
  processor are outside this RTL.
* **Error recovery protocol.** The original design gives the PSRP rules and
  analyses it, but does not say how frames are numbered, which frame carries
  the POLL bit, or how congestion is detected. These are my choices (see
  above). Congestion is an input. The POLL on an idle source is an addition.
