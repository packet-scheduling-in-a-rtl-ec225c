# CIOQ cell switch scheduled by packet virtual time stamps

A combined input and output queued (CIOQ) switch keeps cells both at its
inputs, in one virtual output queue (VOQ) per output, and at its outputs. Its
fabric and memories run only S times faster than the line, instead of N times
as in a purely output queued (OQ) switch. With a speedup of S = 4 and the
right matching rule, a CIOQ switch sends exactly the cells, in exactly the
slots, that an OQ switch with a given output scheduler would send.

The usual way to mimic a weighted fair queueing (WFQ) OQ switch requires two
things: per-flow state in the switch, and departure-time calculations that
involve all ports. This design removes both by using a *virtual time
reference system* (VTRS). Each cell carries its own scheduling state:

* its flow's reserved rate `r`;
* a virtual time stamp `omega`;
* an adjustment term `delta`.

From that state alone the switch computes the cell's **virtual finish time**

    nu = omega + L/r + delta

and orders everything by `nu`:

* the VOQs;
* the choice of which cells cross the fabric (SVFTFA, *smallest virtual
  finish time first*);
* the output queues.

The switch therefore behaves exactly like an OQ switch running a *core
stateless virtual clock* (CsVC) scheduler. CsVC has the same per-hop error
term as WFQ, one maximum-size packet time `L*max/C`. So the end-to-end delay
bound matches that of a network of WFQ switches, although the cell-by-cell
output differs from WFQ.

The RTL contains the core switch and the edge traffic conditioner. The
conditioner shapes each flow and writes the cell state when the flow enters
the network.

## Files

| file | what it is |
|---|---|
| `rtl/cioq_pkg.sv` | time and rate formats, the cell structure `cell_t`, the wrap-safe compare `ts_lt`, the `L/r` divider function |
| `rtl/cioq_switch.sv` | the N x N CIOQ switch |
| `rtl/vtrs_vft.sv` | `nu = omega + L/r + delta` for an arriving cell |
| `rtl/pushin_queue.sv` | sorted push-in queue, used both as VOQ and as output queue |
| `rtl/svftfa_matcher.sv` | the iterative input/output matcher |
| `rtl/crossbar.sv` | the fabric, configured by the matching |
| `rtl/slot_ctrl.sv` | slot and phase sequencer |
| `rtl/vtrs_update.sv` | next-hop time stamp, `omega' = nu + Psi + pi` |
| `rtl/vtrs_edge.sv` | single-flow edge conditioner: shaping, `omega`, `delta` |
| `rtl/vtrs_cioq_top.sv` | top: the switch and N_EDGE conditioners side by side |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Numbers and time

Time is counted in **cell times**. One cell time is one time slot: the time
to send one fixed-length cell at line rate `C`. Time is held as a 32-bit
fixed-point value with 8 fractional bits, so `CELL_TIME = 256`. Time stamps
may wrap around. They are always compared through the sign of their
difference (`ts_lt`), which is correct while two compared stamps lie less
than 2^31 units (about 8 million slots) apart.

A reserved rate is a 16-bit fraction of the line rate: `r = rate / 65536 * C`.
Every cell is one cell time long, so

    L/r = 2^(16+8) / rate     (in time-stamp units)

This is computed by a combinational divider. A rate of 0 saturates `L/r` to
the largest value.

`cell_t`, 124 bits, MSB first:

| field | bits | meaning |
|---|---|---|
| `dest` | 4 | output port |
| `flow` | 8 | flow number, carried only (the switch keeps no per-flow state) |
| `rate` | 16 | reserved rate `r` |
| `omega` | 32 | virtual time stamp at this hop |
| `delta` | 32 | virtual time adjustment term |
| `data` | 16 | payload word |

## A time slot in the switch

`slot_ctrl` gives every slot a fixed length of `1 + S*(N+1)` clock cycles. At
the defaults (N = 3, S = 4) that is 17 cycles.

| cycle | what happens |
|---|---|
| 0 (`in_ready`) | **Departure:** every non-empty output queue sends its head. `vtrs_update` rewrites the head's `omega` to `nu + PSI + link_delay[j]`. The cell appears, registered, on `out_valid/out_cell` in cycle 1. **Arrival:** every input with `in_valid` gets `nu` from `vtrs_vft`. The cell is pushed, keyed by `nu`, into VOQ (i, dest). |
| 1 + p(N+1) | start of phase p (p = 0..S-1): the matcher starts on the VOQ heads |
| within the phase | at most N+1 cycles later the matching is final (`phase_done`). In that same cycle the crossbar moves the matched head cells, and each receiving output pushes its cell, keyed by `nu`, into its output queue. |

A cell can therefore arrive in slot t and leave at the end of slot t, as in
an OQ switch. A source holds `in_valid`/`in_cell` until it sees `in_ready`.

### Overflow and backpressure

The scheduling theory assumes unlimited buffers. Here the buffers are finite:

* each VOQ holds `VOQ_DEPTH` (8) cells;
* each output queue holds `OQ_DEPTH` (16) cells.

When a queue fills:

* A cell that arrives at a full VOQ is dropped, and `in_drop[i]` is raised
  in that cycle.
* A cell whose `dest` is not below N is also dropped and flagged.
* An output whose queue is full (`oq_full[j]`) makes no requests in a phase.
  Its cells wait in the VOQs until a departure frees a place, so an output
  queue can never overflow. An assertion checks this.

While nothing overflows, the switch behaves exactly like the CsVC OQ switch.

## The matching (SVFTFA)

The matching is the hardest part to follow. In each phase every (input i,
output j) pair with a waiting cell offers the `nu` of the head of VOQ (i, j).
The head is the smallest `nu` in that queue, because the VOQ is itself a
push-in queue. `svftfa_matcher` then runs iterations, one per clock cycle:

1. Each output that is still unmatched requests the unmatched input that
   holds its cell with the smallest `nu`. If two inputs tie, the lower input
   number is requested.
2. Each input that receives requests grants the one with the smallest `nu`.
   If two outputs tie, the lower output number wins.
3. Granted pairs are matched. Outputs that lost try again in the next
   iteration, among the inputs still free.
4. The matching is final when no unmatched output can make a request.

The first iteration runs in the `start` cycle itself. Each iteration that
makes requests matches at least one pair. So there are at most N matching
iterations, and `done` comes at most N cycles after `start`. The phase length
of N+1 cycles leaves room for this. The `iters` output reports how many
iterations matched.

Why this is enough: the OQ switch being mimicked sends each output's cells
in increasing `nu`. A newly arriving cell can be pushed in anywhere, but it
never reorders the cells already queued; such a scheduler is called
*monotone*. For a monotone OQ scheduler, a matching that always favours the
smallest key, run S >= 4 times per slot, puts every cell in its output queue
before the OQ switch would send it.

The matcher does not depend on what the key is. Fed with a departure time or
an urgency instead of `nu`, the same circuit performs the earlier
FIFO-mimicking rules this scheme grows out of.

## The two push-in queues

`pushin_queue` is a register array kept in sorted order. On a push the insert
position is the number of queued keys that are not later than the new key,
so equal keys leave in arrival order. Every register then loads from itself,
from its neighbour, or from the new entry. A pop shifts the whole array down
by one place. A push and a pop in the same cycle are both carried out. The
head is shown combinationally.

The switch uses the queue in two places:

* as a VOQ, it gives the matcher the smallest-`nu` cell of each (input,
  output) pair;
* as an output queue, it is the CsVC scheduler itself.

## Edge conditioner and the delay term

`vtrs_edge` conditions one flow at the edge of the network. Packet k of
length `L(k)` (in cell times) waits in a FIFO. It is released no earlier
than `a(k-1) + L(k)/r`, so the flow never exceeds its reserved rate. At
release, at time `a(k)`, the conditioner writes:

* `omega = a(k)`;
* `rate = r`;
* `delta = Delta(k) / h`, where `h` is the number of hops on the path and
  `Delta(k)` follows the recursion

      Delta(1) = 0
      Delta(k) = max(0, Delta(k-1) + h*(L(k-1) - L(k))/r + a(k-1) - a(k) + L(k)/r)

`Delta(k)` is the queueing delay the packet would build up in an ideal
chain of h servers, each of rate r. Spreading it evenly over the hops as
`delta` keeps the virtual spacing of the flow's packets intact at every hop.

When all packets have the same length, the shaping makes `Delta` zero. It
becomes positive only when a long packet is followed by a shorter one.

The conditioner releases at most one packet per clock cycle. Its outputs are
registered. Real time comes in on `now`, in time-stamp units.

Edge and core switch belong to different network nodes. So `vtrs_cioq_top`
places N_EDGE conditioners next to the switch without wiring them together:
the link between them is outside the module.

## Parameters

| parameter | default | where set | meaning |
|---|---|---|---|
| `N` | 3 | `cioq_switch`, `vtrs_cioq_top` | ports; 3 is the size of the worked 3x3 example, up to 16 |
| `S` | 4 | same | speedup; 4 is the smallest speedup for which exact emulation is guaranteed |
| `VOQ_DEPTH` | 8 | same | cells per VOQ |
| `OQ_DEPTH` | 16 | same | cells per output queue |
| `PSI` | 256 | `cioq_switch` | error term `L*max/C`, one cell time |
| `N_EDGE`, `EDGE_FIFO` | 3, 8 | `vtrs_cioq_top` | conditioners and their FIFO depth |
| `TS_W`, `FRAC_W`, `RATE_W` | 32, 8, 16 | `cioq_pkg` | time and rate formats |

At the defaults, yosys coarse synthesis of `vtrs_cioq_top` gives about 8,900
word-level cells and 20,600 flip-flop bits. Almost all of it is the twelve
sorted queues.

## Where this departs from the scheduling model, and what is missing

* **Finite buffers.** The model assumes unlimited buffers. Here overflow
  drops at the VOQ and stalls at the output queue, as described above.
* **Equal virtual finish times.** The model never has two equal keys at one
  output. If `nu` values are equal, the switch may send equal-`nu` cells in
  a different order from an OQ switch that breaks ties by input number. The
  end-to-end test keeps `nu` distinct per output for that reason.
* **Fixed-length cells only.** The switch takes every packet to be one cell
  long (`L = 1` cell time). Segmentation of variable-length packets into
  cells at the inputs, and reassembly at the outputs, is not implemented.
  The edge conditioner does handle variable lengths.
* **No checks on the traffic.** The switch does not check the schedulability
  condition (the sum of reserved rates at an output must not exceed C). It
  does not check the reality check either (`omega` must not be earlier than
  the real arrival time). Both are properties of the traffic, and the delay
  guarantee only holds when they are met.
* **Slot timing and formats are this design's choice.** This covers the
  cycle-level slot timing, the fixed-point formats, the cell layout, and the
  run-time `link_delay` input per output (the propagation delay `pi` of the
  outgoing link).
* **Alternative schedulers are not built.** WFQ output scheduling and the
  FIFO-mimicking schemes serve only for comparison. They are not built.

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench ends with
a `TB_RESULT checks=... failures=...` line and has a watchdog.

* `tb_cioq_switch` checks the default 3x3, S = 4 switch against a shadow
  CsVC output queued switch modelled in the testbench. The traffic is 1,200
  slots of uniform random traffic at a load of 0.7, then 1,100 slots with a
  hot spot on one output. The test requires the same cell to leave every
  output in every slot. It also checks:
  * the rewritten stamps;
  * the 17-cycle slot period;
  * at most N matching iterations per phase.

  An overload part then fills the queues and exercises drops,
  backpressure, invalid ports and multi-iteration matchings. Every accepted
  cell must still be delivered exactly once. Time stamps wrap during the run.
* `tb_cioq_fig1` runs the same traffic on the 3x3 switch with a speedup of
  only 2. Exact emulation is not guaranteed there, so the test only counts
  deviations from the shadow switch. On this traffic there were none: the
  speedup of 4 is a worst-case requirement.
* `tb_vtrs_cioq_top`, at all defaults, plays the links from three edge
  conditioners to the switch. Three shaped flows load one output to 0.94 C,
  with packets of varying length. The test checks that every cell leaves by
  `nu + L*max/C`, the per-hop bound of the CsVC scheduler, and that the
  reality check holds at the switch. It then repeats the overload test.
* The block testbenches compare each module with an independent model:
  * the matcher with a behavioural SVFTFA, including the exact cycle of
    `done`;
  * the queues with a sorted software queue;
  * the conditioner with the shaping rule and the `Delta` recursion in
    64-bit arithmetic, including the release cycle;
  * the arithmetic blocks with hand-worked values.

To run one testbench with Verilator:

    verilator --binary --timing --assert -Irtl -y rtl \
        rtl/cioq_pkg.sv tb/tb_cioq_switch.sv --top-module tb_cioq_switch -o sim
    ./obj_dir/sim

Replace `tb_cioq_switch` with any other testbench name. Each testbench runs
in well under a second.
