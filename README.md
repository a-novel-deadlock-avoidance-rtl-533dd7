# Deadlock Avoidance Unit (DAU)

In a multiprocessor SoC, processes running on different processing elements
claim shared single-unit resources at run time: a video interface, an MPEG
engine, a DSP, a radio. A process may need one resource or several, and nobody
knows in advance which or in what order. If two processes each hold one resource
and wait for the other's, they block each other forever. That is a deadlock.

The Deadlock Avoidance Unit sits on the SoC bus and makes every grant decision.
Software never has to declare maximum claims, and it may request resources in
any order. For each request or release the unit decides, in a few clock cycles,
whether the resulting allocation could deadlock, and it steers around that case.
The algorithm and the block structure follow the DAU published by J. Lee and
V. Mooney (Georgia Tech, 2004), in its improved form "DAA 2". The deadlock
check uses the matrix-reduction idea of the deadlock detection unit by Shiu,
Tan and Mooney. The bus interface, the register layout, the notification lines
and several corner cases are this implementation's own. They are listed under
"Departures and own choices" below.

## The resource allocation graph as a matrix

The state of the system is a bipartite graph with processes and resources as
nodes:

* a **request edge** P → Q means process P waits for resource Q;
* a **grant edge** Q → P means P holds Q.

Every resource is a single unit, so it has at most one grant edge. With
single-unit resources, the system is deadlocked exactly when the graph holds a
cycle.

The unit stores the graph as an `N_RES × N_PROC` matrix. Each cell is 2 bits:
0 = no edge, 1 = request, 2 = grant. The matrix lives in `ddu`.

## Detecting a cycle without tracing it (`ddu`)

A node whose edges all point inwards (only requests into a resource, or only
grants into a process) or all point outwards cannot be on a cycle. In matrix
terms, a row or column that does not hold *both* a request and a grant is
*terminal*. The `ddu` therefore repeats one step:

1. For every row and every column at once, compute "has a request" and "has a
   grant". These are OR trees over the cells.
2. Clear every cell that lies in a terminal row or a terminal column.

The step repeats until it clears nothing. Any edge left over lies on a cycle or
between cycles, so `deadlock = (any cell left)`. One step takes one clock
cycle. It uses only bit-wise logic and needs no lists and no path tracing. The
number of steps grows with `min(m, n)`. At 5 × 5, the random testbench never
needed more than 7 cycles from `start` to `done`, and it checks a bound of
`2·min(m,n)+2`.

The reduction works on a working copy. The stored matrix is unchanged by a
check, and the controller can run "what-if" checks on it.

## Deciding requests and releases (`daa_fsm`)

The controller handles one command at a time. It edits the matrix through the
DDU's cell-write port and asks the DDU whether the edited graph has a cycle.
Priority is fixed by process index: process 0 has the highest priority.

**Request of resource Q by process P**

| situation | action | report |
|---|---|---|
| Q is free | grant edge Q → P | P: `GRANTED` |
| Q is held; the new request edge closes no cycle | keep the request edge | P: `PENDING` |
| the request edge closes a cycle (request deadlock) and P outranks Q's owner O | keep the request edge | P: `PENDING`; O: `RELEASE_REQ` for Q |
| request deadlock and O outranks P | remove the request edge | P: `GIVE_UP` |

**Release of resource Q by process P**

The grant edge is removed and P gets `RELEASED`. If processes wait for Q, the
controller tries them from the highest priority down. For each candidate, it
turns the request edge into a grant and runs the DDU:

* If the grant closes a cycle (grant deadlock), the edge goes back to a request
  and the next, lower-priority candidate is tried.
* Otherwise the grant stands and the candidate gets `GRANTED`.

If no candidate can take Q safely, Q stays free and keeps its waiters. With
obedient software this happens only while an owner has not yet carried out a
`RELEASE_REQ`. The cycle it keeps alive then makes every grant unsafe. Once the
owner has complied, a waiter can **retry**: it repeats its request for the
free resource, and the controller runs the temporary-grant check for that
process alone. The answer is `GRANTED` or, again, `PENDING`. Nothing retries
automatically.

Two properties follow:

* **Higher resource utilisation.** Where a grant deadlock threatens, a plain
  avoider would leave the resource idle. This one gives it to a lower-priority
  waiter.
* **No livelock.** A request deadlock is always broken in favour of the
  higher-priority process. The same request cannot be refused forever while
  others make progress.

The cost is that the unit *asks* for preemption. `RELEASE_REQ` and `GIVE_UP`
are requests to software: the owner must release the resource, or the refused
requester must release everything it holds and try again later. While an
owner's `RELEASE_REQ` is outstanding, the graph deliberately contains a cycle.
Until the owner complies, any grant check that touches that cycle reports a
deadlock.

The states follow the controller's published state diagram:
`IDLE → AVAIL_CHK → GRANT_REQ | RDL_CHK → MAKE_PENDING | FIND_OWNER → CMP_PRIO → OWNER_GIVEUP → MAKE_PENDING | REQ_GIVEUP`
for requests, and
`IDLE → WAITING_CHK → SEARCH_NEXT → TEMP_GRANT → GDL_CHK → (SEARCH_NEXT | GRANT_REL)`
for releases.

### Timing

* A request for a free resource takes 3 cycles, from acceptance to the return
  to `IDLE`.
* Every command finishes within a fixed bound:
  `4 + N_PROC·(3 + 2·min(m,n) + 2)` cycles, which is 79 at 5 × 5. The worst
  case is a release that must try every waiter. The longest command seen in
  the tests took 29 cycles.
* A command that needs a deadlock check takes a few cycles of its own plus
  the DDU's reduction time for each check.
* In the four-process application test (below), commands that needed a check
  averaged 8.5–8.9 cycles, depending on the phase. The published hardware reports 7 and 7.13 cycles on
  average for its two experiments.
* `last_cycles` in the control word reports the cycle count of each command.

### Size

At 5 × 5, a generic yosys synthesis mapped to two-input NAND gates and
inverters gives the following. Assertions are ignored.

| block | NAND2 | inverters | flip-flops |
|---|---|---|---|
| `ddu` (matrix, working copy and reduction) | 448 | 357 | 111 |
| `daa_fsm` | 554 | 301 | 37 |
| whole `dau` | 1378 | 803 | 251 |

The published 5 × 5 unit reports 364 NAND2 equivalents for its DDU and 1472
for the controller, in a 0.25 µm library. Those counts come from a different
library and flow, so they only show that the sizes are of the same order. The
DDU here keeps a full working copy of the matrix beside the stored one. This
accounts for most of its flip-flops.

## Register interface (`dau`)

The bus is a simple synchronous word-addressed bus. A write (`bus_we`) is taken
at the clock edge. A read (`bus_re`) returns `bus_rdata` on the next cycle.

| word address | access | contents |
|---|---|---|
| `0x00` | W | command: `[1:0]` 1 = request, 2 = release; `[15:8]` process; `[23:16]` resource |
| `0x00` | R | last accepted command; bit 31 = busy |
| `0x01` | R | `[0]` busy, `[1]` overrun (cleared by this read), `[7:2]` DDU reduction steps of the last check, `[15:8]` cycles of the last command, `[23:16]` N_PROC, `[31:24]` N_RES |
| `0x10 + p` | R | status of process p: `[31]` fresh, `[18:16]` code, `[7:0]` resource; the read clears fresh |
| `0x20 + r` | R | row r of the matrix, 2 bits per process (cell access) |

Status codes: 1 `GRANTED`, 2 `PENDING`, 3 `GIVE_UP`, 4 `RELEASE_REQ`,
5 `RELEASED`, 7 `ERROR`. `ERROR` means a bad id, a request for a resource that
the process already holds, a repeated request for a resource that is still
held by another process, or a release of a resource it does not hold.

`notify[p]` is high while process p's status register holds an unread report.
It is meant as an interrupt: a waiting process learns this way that a release
by someone else has handed it the resource.

A command written while the unit is busy, or before the previous command was
handed over, is dropped and sets `overrun`. Software should poll `busy` (or
wait for its notify line) before writing the next command.

Each command reports to at most two processes. Software should read every fresh
status register after each command, because a later report to the same process
overwrites the earlier one.

Sizes: `N_PROC` (default 5, up to 16) and `N_RES` (default 5, up to 32) are
parameters of `dau`. Five processes and five resources is the published
synthesis configuration.

## Files

| file | block |
|---|---|
| `rtl/dau_pkg.sv` | cell, command and status encodings; address map |
| `rtl/dau.sv` | top: wires the blocks below, bus read multiplexer |
| `rtl/dau_addr_decoder.sv` | address decoder |
| `rtl/dau_cmd_regs.sv` | command register and hand-over to the controller |
| `rtl/daa_fsm.sv` | avoidance controller |
| `rtl/ddu.sv` | graph matrix and cycle detection |
| `rtl/dau_status_regs.sv` | per-process status registers and notify lines |

Each module is synthesizable, with an asynchronous active-low reset that clears
the matrix and all registers. The assertions in the RTL check that:

* no resource is ever granted twice;
* a check state is never left before the DDU has answered;
* commands are handed over only while the controller is idle.

## Verification

Each block has a self-checking testbench in `tb/`. It ends by printing
`TB_RESULT checks=N failures=M`.

* `tb_ddu`: 400+ graphs at each of three sizes (5 × 5, 3 × 8 and 8 × 3)
  against a transitive-closure reference. The graphs are a two-process cycle,
  a chain, a ring through every process and random graphs. Also checks the
  matrix read-back, the detection-time bound and the abort.
* `tb_daa_fsm`: controller plus DDU against a reference model of the algorithm
  with its own depth-first cycle search, over 4000 commands from processes that
  obey release and give-up requests. Every port-A/port-B report, the matrix
  after every command and the cycle counts are compared, including the
  worst-case bound. A directed sequence leaves a released resource free and
  then retries. Every controller branch must occur.
* `tb_dau_cmd_regs`, `tb_dau_status_regs`, `tb_dau_addr_decoder`: the register
  blocks against reference copies. The address decoder is checked exhaustively.
* `tb_dau`: the whole unit at its default size, through the bus only.
  * It replays a grant deadlock: the released resource must go to the
    lower-priority waiter.
  * It replays request deadlocks in both priority orders, a malformed command
    and an overrun.
  * It then runs a four-process video application. P1 needs the video
    interface + MPEG, P2 MPEG + DSP, P3 DSP + video interface, P4 the wireless
    interface. It runs in three phases of 100 jobs per process. In phase 0 the
    requests come in random order. In phase 1 every process asks for its two
    resources one after the other, in the same rotational order. This phase
    produces request deadlocks: 29 avoided in the reference run. In phase 2,
    P1–P3 each need a random two or three of the first three resources and
    post all requests at once. This phase produces grant deadlocks: 61 avoided.
  * After every command it audits the matrix against the reports, and it checks
    that a cycle exists only while an owner has been asked to release. It also
    checks that every process finishes its jobs and that each mechanism
    occurred.

To run one with plain Verilator, from the directory that holds `rtl/` and
`tb/`:

    verilator --binary --timing --assert -Irtl -y rtl rtl/dau_pkg.sv \
        tb/tb_dau.sv --top-module tb_dau
    ./obj_dir/Vtb_dau

Each run takes well under a second.

## Departures and own choices

* **Bus, address map, register layouts, notify lines, overrun flag.** The
  published unit names an address decoder, command registers and status
  registers but gives no format. All of these are this design's own.
* **Cell access is read-only from the bus.** The published block diagram
  shows a cell-access path between the register side and the DDU matrix. Here
  only the controller writes cells, and the bus can only read matrix rows.
  Software therefore cannot corrupt the graph that the decisions rely on.
* **Priority** is the process index. The published examples use a fixed order
  P1 > P2 > P3, but the source does not say how priorities are given to the
  hardware. Programmable priorities would change `CMP_PRIO` and the candidate
  search in `daa_fsm`.
* **Refused requester.** When the requester loses a request deadlock, its
  request edge is removed and it is told to give up what it holds.
* **Nobody can take a released resource.** If every waiter would close a
  cycle, the resource stays free. Its waiters are not retried automatically:
  a waiter must repeat its request (see "retry" above). The published flow
  does not cover this case.
* **DDU `Reset`** aborts a running check and clears done/deadlock. The
  controller pulses it when it accepts a command. It does not clear the matrix.
* **Command checks.** Malformed commands are rejected with `ERROR`.
* **Reduction schedule.** The DDU's exact step schedule and its latency are
  this design's own. Average command latency is therefore slightly above the
  published 7 cycles.
* **Not included.** The processors, memory, arbiter and the shared peripherals
  of the evaluation SoC are outside the unit. The RTOS-side software that
  reacts to `RELEASE_REQ`/`GIVE_UP` is outside too. In `tb_dau` they are
  modelled by the testbench.
