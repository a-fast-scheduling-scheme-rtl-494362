# Single-iteration VOQ switch scheduler with output-grant passing

An input-buffered ATM switch avoids head-of-line blocking by keeping, at
every input, one queue per output: the virtual output queues (VOQs). Each
time slot it must then pick a matching: a set of (input, output) pairs in
which every input sends at most one cell and every output receives at most
one. Parallel iterative matching (PIM) does this by request, random grant
and random accept. One round of this leaves about 37 % of the inputs idle
when every VOQ is busy, because an input granted by several outputs can use
only one of them. PIM therefore repeats the round, about log2 N times, and
up to N times in the worst case. That is hard to fit into one cell time
(424 ns for a 53-byte cell on a 1 Gb/s link).

This design runs the request-grant step **once**. It then repairs the
matching with a small circuit that **passes excess grants**: an input that
holds several grants hands one on to the next input, if that input also
asked for the same output. The hand-off repeats, one input per
sub-interval, until the grant reaches an input that has none. The rest of
the slot is split into N sub-intervals, T1..TN, produced by a ring
counter. There is no second matching iteration.

The RTL is parameterised SystemVerilog (IEEE 1800-2017). Its default is the
4 x 4 switch used as the worked example of the scheme, with 424-bit cells
and 16-cell VOQs.

## Structure

```
 cells in ──► voq_input ×N ──head cells──────────────► crossbar ──► cells out
                │ non-empty flags                         ▲
                ▼                                         │ match
             pgp_scheduler ───────────────────────────────┘
               ├─ slot_controller       phase sequencing of one slot
               ├─ ring_counter          T1..TN pulses
               ├─ output_grant_arbiter ×N   random grant per output
               ├─ grant_pass_matrix     Request/Grant cells, MultiGrant, And gates
               │    └─ multigrant_detect ×N
               └─ input_accept_arbiter ×N   random accept per input
```

| file | role |
|---|---|
| `rtl/voq_atm_switch.sv` | top: N VOQ inputs, scheduler, crossbar |
| `rtl/voq_input.sv` | the N VOQs of one input, as circular buffers in one memory |
| `rtl/pgp_scheduler.sv` | the scheduler: one grant iteration, grant passing, accept |
| `rtl/slot_controller.sv` | FSM for the phases of a slot |
| `rtl/ring_counter.sv` | one-hot ring that drives the T lines |
| `rtl/grant_pass_matrix.sv` | the grant-passing circuit |
| `rtl/multigrant_detect.sv` | MultiGrant(i): the input holds more than one grant |
| `rtl/output_grant_arbiter.sv`, `rtl/input_accept_arbiter.sv` | random pick among requests / grants |
| `rtl/random_select.sv`, `rtl/lfsr16.sv` | helpers: rotating-priority pick, 16-bit LFSR |
| `rtl/crossbar.sv` | registered N x N crossbar |
| `rtl/atm_sched_pkg.sv` | phase enum, slot length, pass-schedule function |

Parameters: `N` is the number of ports (default 4). `CELL_W` is the cell
width in bits (default 424). `DEPTH` is the number of cells per VOQ
(default 16).

## The time slot

One slot is N + 3 clock cycles:

| cycle | phase | what happens |
|---|---|---|
| 0 | `PH_REQUEST` | Request(i,j) is latched for every non-empty VOQ(i,j) |
| 1 | `PH_GRANT` | every output grants one requesting input at random; Grant(i,j) is latched; the ring counter is loaded with T1 |
| 2 .. N+1 | `PH_PASS` | sub-intervals T1..TN: excess grants move on |
| N+2 | `PH_ACCEPT` | every input accepts one grant it holds (`slot_end`, `match`); the matched VOQ heads are dequeued; the Request/Grant cells are cleared |

The crossbar registers the cells, so they appear on `out_valid`/`out_cell`
one cycle after `slot_end`. Requests are sampled only in cycle 0. Cells that
arrive later in the slot wait for the next slot.

## Grant passing (the core of the scheme)

`grant_pass_matrix` holds an N x N array of Request and Grant cells, with
row i for the input and column j for the output. (The scheme numbers both
from 1; the RTL numbers them from 0.) For every cell there is a gate

```
And(i,j) = Grant(i,j) & Request(i+1,j) & MultiGrant(i)        (i+1 taken mod N)
```

It is high when input i holds the grant of output j as one of several
grants, and the next input also wants output j. While its T line is active
the gate fires: Grant(i,j) is cleared and Grant(i+1,j) is set, in the same
clock edge. `MultiGrant(i)` is built in `multigrant_detect` as a product of
sums:

```
F(i,0) = OR_j Grant(i,j)
F(i,k) = NOT Grant(i,k) OR (OR_{j != k} Grant(i,j))
MultiGrant(i) = F(i,0) AND F(i,1) AND ... AND F(i,N)
```

**Which T line enables which gate.** Pulse T(k+1) enables the gates with
`i + j = k (mod N)`. For N = 4 this is the schedule below; each entry is
"from input -> to input", 1-based:

| pulse | output 1 | output 2 | output 3 | output 4 |
|---|---|---|---|---|
| T1 | 1→2 | 4→1 | 3→4 | 2→3 |
| T2 | 2→3 | 1→2 | 4→1 | 3→4 |
| T3 | 3→4 | 2→3 | 1→2 | 4→1 |
| T4 | 4→1 | 3→4 | 2→3 | 1→2 |

Three properties follow, and the circuit relies on them:

* Each column has one enabled gate per pulse, and each row has one. So an
  input passes on at most one grant per sub-interval and receives at most
  one. An input with several grants keeps at least one, and an input never
  loses its only grant, because `MultiGrant` is then low.
* An output grants one input only, and passing keeps it that way. An
  assertion in `grant_pass_matrix` checks that no column holds two grants.
* The enabled gate of a column moves one row down per pulse. A grant that
  moves from input i to i+1 in T(k) is therefore at the enabled position
  again in T(k+1), and can move on at once. A grant travels one input per
  sub-interval.

**Worked example (N = 4, every input requests every output).** After the
grant step, input 1 holds outputs 3 and 4, input 2 holds output 1, input 3
holds nothing and input 4 holds output 2. In T1 and T2 no enabled gate
fires. In T3, And(1,3) fires and the grant of output 3 moves to input 2,
which now holds two grants. In T4, And(2,3) fires and the grant moves on to
input 3. Every input now holds exactly one grant. `tb_grant_pass_matrix`
replays this cycle by cycle.

### How far this gets: measured throughput

With every VOQ non-empty (saturation), the share of matched inputs per slot
is:

| N | one grant iteration | formula 1-(1-1/N)^N | after grant passing |
|---|---|---|---|
| 4 | 0.686 | 0.684 | 0.97 |
| 8 | 0.658 | 0.656 | 0.93 |
| 16 | 0.646 | 0.644 | 0.93 |
| 32 | 0.640 | 0.638 | 0.94 |

Each row is 1000 slots (`tb_saturation_sweep`).

The scheme is presented as reaching 100 % under saturation. With the
schedule above and one round of N sub-intervals it does not always get
there. A grant moves at most one input per sub-interval, and it starts
moving only when the diagonal reaches its column. Some excess grants
therefore run out of sub-intervals before they reach an ungranted input.
An extreme case for N = 4: input 1 holds all four grants. At the end of T4
the holdings are {4}, {1}, {2,3}, {} for inputs 1 to 4, and input 4 is
still ungranted. The RTL keeps the N sub-intervals the scheme specifies
and does not add rounds. If full matching matters more than slot length,
the change is to let `slot_controller` run the ring counter for more than
one turn. The passing rule itself stays the same.

If passing ends with an input still holding several grants, that input
accepts one at random. This happens when the next input did not request
that output. The outputs whose grants it drops stay idle in that slot.

## Random selection

Outputs grant, and inputs accept, "at random". Each arbiter has its own
16-bit LFSR with its own seed, stepped once per slot. The LFSR value mod N
gives a starting position, and the first requester from that position
wins (`random_select`). When all N candidates are present this is exactly
uniform. With a subset it favours a requester that follows a long run of
non-requesters. This is a cheap approximation and was chosen for that
reason. The measured single-iteration figures above agree with the
analytic value to within 0.003.

## VOQs and fabric

`voq_input` stores the N queues of one input in a single memory array of
N·DEPTH cells, with a read and a write pointer and an occupancy count per
queue. An arriving cell is offered with `in_valid`/`in_dest`/`in_cell`. It
is written when `in_ready` is high, which means its VOQ is not full. A full
VOQ refuses cells. Any other queue of that input still accepts them. The
head of the selected queue is read combinationally, so the accept cycle
can dequeue it and feed the crossbar in the same cycle. `crossbar` is an
AND-OR multiplexer per output followed by a register. It assumes a partial
permutation, which the scheduler guarantees. An assertion in
`pgp_scheduler` checks it.

## What follows the scheme and what is this design's own

Taken from the scheme:
* VOQs per input.
* The single random request-grant iteration.
* The Request/Grant storage cells, cleared at the end of every slot.
* The MultiGrant product-of-sums.
* The And(i,j) passing condition, with the pass from input N wrapping
  around to input 1.
* A ring counter that makes N sub-intervals.
* The pulse-to-gate schedule.
* One hop per sub-interval, as in the worked example.

Choices of this design:
* Edge-triggered flip-flops instead of latches.
* One system clock: each phase and each sub-interval is one cycle.
* The N + 3 cycle slot and the separate accept cycle.
* The LFSR-based random pick.
* VOQ depth, cell width and the arrival handshake.
* The registered crossbar.
* An asynchronous active-low reset `rst_n` that clears all state.

The scheme also describes a grant moving on through several inputs within
one sub-interval. The worked example and the schedule table both show one
hop per sub-interval, and the RTL follows those.

Lint notes. Verilator reports `SYNCASYNCNET` because `rst_n` is both the
asynchronous reset and the `disable iff` of the assertions. In the top it
reports unused scheduler observation signals. Neither is a circuit issue.

## Simulation

Every testbench checks itself. It prints
`TB_RESULT checks=<n> failures=<m>` and stops through a watchdog if it
hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -Irtl \
    rtl/atm_sched_pkg.sv tb/tb_voq_atm_switch.sv --top-module tb_voq_atm_switch
./obj_dir/Vtb_voq_atm_switch
```

Replace the testbench name to run another one. The testbenches:

| testbench | what it checks |
|---|---|
| `tb_voq_atm_switch` | the whole switch at default parameters. A scoreboard checks order, loss and destination of every cell, and that slots are N + 3 cycles apart. Traffic runs saturated, then light, then hot-spot, then drains. It counts grant passes, inputs still multi-granted at accept, fully matched slots, full-VOQ refusals and idle inputs, and requires each to occur |
| `tb_pgp_scheduler` | 4000 slots. Checks grant legality, the grant matrix after every sub-interval against an independent model of the pass rule, accept legality, slot length, and that throughput rises above the single-iteration value |
| `tb_saturation_sweep` | saturated throughput for N = 4, 8, 16, 32 (table above) |
| `tb_grant_pass_matrix` | the worked example cycle by cycle, plus 3000 random slots against the model |
| `tb_slot_controller` | phase sequence, strobes and slot length, together with a ring counter |
| `tb_multigrant_detect` | all patterns for N = 4 and N = 5 |
| `tb_ring_counter`, `tb_output_grant_arbiter`, `tb_input_accept_arbiter`, `tb_voq_input`, `tb_crossbar` | the single blocks; the arbiter testbenches also check that the pick is uniform |

All simulations take seconds.
