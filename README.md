# QOAG: an input-buffered packet switch with output-address grouping

An input-buffered switch is cheap. Its buffers and fabric only have to run at line rate. Its weak point is
head-of-line (HOL) blocking. A packet at the front of a queue that cannot go to its output holds up every
packet behind it, including packets for idle outputs. Giving each input a few queues instead of one helps.
How much it helps depends on how arriving packets are spread over those queues.

A fixed split breaks down when traffic is skewed. One example of a fixed split is "odd outputs to queue 0,
even outputs to queue 1". If most packets go to a few outputs, one queue takes nearly all of them and the
other queues stay empty.

**Queueing with Output Address Grouping (QOAG)** spreads packets by what is already in the queues:

* a packet for output *k* joins the queue that already holds packets for *k*;
* if no queue holds a packet for *k*, it joins the shortest queue;
* if the chosen queue is full, the packet is dropped.

Packets for one output therefore always share one queue. The queues of an input tend to hold different sets
of outputs, so their HOL packets tend to have different addresses. This gives the scheduler more packets it
can send in the same slot. The grouping also follows the traffic when it shifts.

This repository holds synthesizable SystemVerilog for a complete N x N switch built this way. The defaults
are 16 ports, 2 queues per input and 20 packet buffers per queue. The design has three parts:

* the QOAG queue logic at every input;
* a Q-round contention scheduler with random tie-break;
* a nonblocking crossbar.

Self-checking testbenches come with it. Some of them reproduce the switch's throughput, loss and delay under
skewed (Zipf) traffic.

## Structure

```
qoag_switch                      top: N inputs, scheduler, crossbar, output registers
├── input_port  x N              one input
│   ├── qoag_queue_select        QOAG policy: counters c[i][j], l[i]; queue choice / drop
│   └── packet_fifo  x Q         B-entry packet queue, HOL packet visible
├── contention_scheduler         Q contention rounds per slot
│   └── xorshift_rng  x N        one random source per output (tie-break)
└── crossbar                     N:1 multiplexer per output
qoag_pkg                         default sizes shared by all modules
```

| Parameter | Default | Meaning |
|---|---|---|
| `N`  | 16 | switch ports. Addresses are `$clog2(N)` bits wide. |
| `Q`  | 2  | queues per input, 1 < Q < N |
| `B`  | 20 | packet buffers per queue |
| `DW` | 32 | payload bits carried with each packet |

The payload is an opaque tag. The design only looks at the output address. A real ATM cell (53 bytes) would
need `DW` = 424, or a payload store addressed by a tag.

## The queue selector (`qoag_queue_select`)

This is the heart of the design. Each input keeps two sets of counters:

* `c[i][j]`: the number of packets in queue *i* addressed to output *j*. There are Q x N counters, each
  `$clog2(B+1)` bits wide.
* `l[i]`: the length of queue *i*.

The selector works out the following every slot, all in combinational logic:

1. **Apply this slot's departure.** If the scheduler takes the HOL packet (output *k*) from queue *i*,
   `c[i][k]` and `l[i]` are decremented first.
2. **Look for a group.** If some queue has `c[i][k_new] > 0`, that queue is chosen (`grouped` = 1).
3. **Otherwise, the shortest queue.** A tie goes to the lowest index.
4. **Full?** If the chosen queue holds B packets after step 1, the packet is dropped (`drop` = 1).
   Otherwise it is written to that queue, and `c` and `l` are incremented.

The counters update at the clock edge.

Two properties follow from the rule, and assertions check both:

* **At most one queue holds packets for a given output.** A new address only starts a group when no queue
  holds it. Per-output (per-connection) packet order is therefore kept: all packets for one output pass
  through a single FIFO.
* **`l[i]` always equals the fill level of FIFO *i*.** `input_port` asserts this. The selector's counters
  are a model of the queue contents, not a second source of truth.

Step 1 comes before step 4 on purpose. A queue that is full at the start of a slot still accepts an arrival
if its HOL packet leaves in that slot. `packet_fifo` supports the matching case of a push and a pop in one
cycle on a full queue.

The selector never looks inside the FIFOs. Grouping costs Q x N small counters per input and a Q-way
compare, not a search of the buffers.

## The scheduler (`contention_scheduler`)

Each input sends at most one packet per slot, and each output takes at most one. The scheduler builds the
matching in Q rounds, all within one clock cycle:

* Round *r* serves queue `(offset + r) mod Q` of every input.
* Only inputs that have not been matched in an earlier round take part.
* Only outputs that have not been taken in an earlier round take part.
* Each free output collects its contenders. These are the inputs whose round-*r* HOL packet is addressed to
  it. The output picks one of them at random.
* `offset` advances by one every slot. The serving order therefore rotates and no queue index is favoured.
  With Q = 2 the two queues simply alternate.

An input has exactly one HOL packet per round, so within a round it contends for one output only. The
outputs can therefore resolve a round independently of each other.

**Random tie-break.** Each output has its own xorshift32 generator, advanced every slot. With *m*
contenders, the output takes the `(d mod m)`-th contender, where *d* is 16 bits of its generator (a
different 16 bits for each of the first two rounds). The choice is uniform among the contenders. The bias
from the modulo is below m / 65536.

A cheaper scheme starts a scan at a random index and takes the first contender it finds. That scheme is not
uniform: it favours an input that follows a long gap in the request vector. The scheduler testbench
measures the shares of three contenders to guard against this.

Critical path: Q rounds in series. Each round per output is an N-input equality compare, a population
count, a small modulo and a "k-th set bit" select. At N = 16 and Q = 2 this is a long combinational path
for a one-cycle slot. A faster implementation would register between rounds, or replace the modulo with a
random rotating priority. The algorithm's result would stay the same.

## Time slots and timing

One clock cycle is one time slot. All state resets synchronously on `rst_n` = 0.

| Slot | What happens |
|---|---|
| t | A packet arrives: `in_valid[i]`, `in_addr[i]`, `in_data[i]`. The scheduler matches the HOL packets present at the start of slot t. The selector applies slot t's departures, then places the arrival. At the edge, the granted HOL packets leave, the arrival is written and the counters update. |
| t+1 | `out_valid[j]`, `out_data[j]` and `out_src[j]` show the packets switched in slot t. `in_drop[i]` shows whether input i's arrival in slot t was dropped. The packet that arrived in slot t can now be scheduled. |
| t+2 | It appears at the outputs at the earliest. |

A packet that crosses an idle switch therefore comes out two cycles after it arrives. The testbenches
measure **delay** as (switch slot − arrival slot − 1). This is the number of slots spent waiting beyond the
minimum, so an unloaded switch has delay 0.

Top-level ports (all plain packed arrays):

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `in_valid`, `in_addr`, `in_data` | in | N, N x log2N, N x DW | at most one arrival per input per slot |
| `in_drop` | out | N | registered: the arrival of the previous slot was lost |
| `out_valid`, `out_data`, `out_src` | out | N, N x DW, N x log2N | registered: packet delivered at output j, and the input it came from |

## How it behaves

The testbenches in `tb/` drive the default 16 x 16 switch (Q = 2, B = 20) with the following traffic:

* **Arrivals:** Bernoulli, probability *p* per input per slot.
* **Output addresses:** Zipf distribution version II with θ = 0.4. The output of rank *i* is chosen with
  probability (i^θ − (i−1)^θ) / 16^θ. The most popular output gets 0.330, the next 0.105, and so on.
* **Ranks:** shuffled over the ports. The hotspot sits on output 7 (ports counted from 1).

The reference values are the published evaluation of the QOAG policy with the same traffic.

| p | throughput | loss | mean delay (slots) | reference |
|---|---|---|---|---|
| 0.1 | 0.101 | 0.000 | 0.2 | delay ≈ 0 |
| 0.2 | 0.197 | 0.014 | 45.6 | |
| 0.3 | 0.264 | 0.121 | 70.0 | delay peak ≈ 70 |
| 0.5 | 0.398 | 0.205 | 50.3 | delay dip ≈ 50 |
| 0.7 | 0.461 | 0.343 | 62.6 | 0.474 / 0.323 / 58.1 |
| 0.8–1.0 | 0.47–0.52 | 0.40–0.48 | 64–70 | throughput saturates near 0.5 |

These results come from 22,000 slots per load; other seeds move them by about ±0.02. The delay curve rises,
dips and rises again, as in the reference.

* **Rise (low load):** the hotspot output's group blocks the other packets queued behind it in the same
  queue.
* **Dip (from about p = 0.3):** the hotspot queue starts to overflow. Its drops free capacity for packets to
  other outputs.
* **Second rise (p > 0.5):** the other queues fill as well, and HOL blocking grows again.

**Traffic change:** at p = 0.8 the address distribution changes at slot 5000 so that the hotspot moves to
output 6. Loss first rises over the next 100–200 slots. Within about 300 slots it is back at or below the
level it had before the change.

**Deep queues:** B = 4096 stands in for unbounded buffers. At p = 0.19 the mean delay is 15.4 slots, against
22.5 in the reference. At p = 0.6 the throughput is 0.447, against 0.453.

## Where this design makes its own choices

The policy and the scheduling algorithm are the QOAG scheme's own. The following choices are not part of
it:

* **One cycle per slot, with all Q scheduling rounds resolved combinationally.** Arrivals enter the queues
  at the end of their slot. Outputs and drop flags are registered.
* **Departures before arrivals in the same slot.** Counters, lengths and the full test all see the slot's
  departure first (see above).
* **Shortest-queue tie:** the lowest queue index wins.
* **Taken outputs stay taken.** An output matched in an earlier round does not take part in later rounds.
  Each output receives one packet per slot.
* **Random tie-break by uniform pick among contenders,** from per-output xorshift32 generators with fixed
  seeds. The sequence of choices repeats after each reset.
* **Circular-buffer FIFOs** with a combinational HOL read. A push and a pop are allowed together on a full
  queue.
* **Crossbar as N:1 multiplexers.**
* **Payload width.** The payload is an opaque 32-bit tag, not a full cell.

Not built:

* The odd-even split and other fixed-partition policies. They are the baseline QOAG is compared against.
* Unbounded buffers, which hardware cannot have. `B` can be raised instead.
* Quality-of-service classes, which are left as future work by the scheme.

In the post-change shuffle (`RANK_B` in `qoag_traffic_pkg`), ranks 8 and 9 are placed on outputs 16 and 15.
This placement is a choice of the testbench and affects only the traffic-change test.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself. Each has a watchdog. Example
with plain Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb \
  rtl/qoag_pkg.sv tb/qoag_traffic_pkg.sv rtl/*.sv tb/tb_qoag_switch.sv \
  --top-module tb_qoag_switch -o sim
./obj_dir/sim
```

For the workload tests, also add `tb/qoag_load_runner.sv` to the file list.

| Testbench | What it checks |
|---|---|
| `tb_packet_fifo` | Compares against a queue model, including push + pop on a full queue. |
| `tb_qoag_queue_select` | Compares against a counter model of the QOAG rule. Covers grouping, shortest queue, ties, drops, and refill of a draining full queue. |
| `tb_input_port` | Compares against a packet-level model. Checks departing packets, HOL addresses and drops. |
| `tb_contention_scheduler` | Checks that the matching is legal and that the serving order rotates. Checks the round rule: no input is left unmatched while its round-r packet's output was still free in round r. Checks that the tie-break shares wins between three contenders. |
| `tb_crossbar` | Random partial permutations. |
| `tb_qoag_switch` | End to end at default size, against a full reference model. Checks that every delivered packet was a HOL packet of its input, addressed to this output, with drops exactly as predicted. Checks that an idle switch forwards a packet in the next slot. Checks that all accepted packets come out after draining. Counts every mechanism (grouping, shortest queue, tie, drop, refill, contention, second-round grant, HOL blocking) and fails if any never occurs. |
| `tb_qoag_load_sweep` | The p = 0.1 … 1.0 sweep above, with tolerance checks around the reference values. |
| `tb_qoag_traffic_change` | Loss before and after the distribution change at slot 5000. |
| `tb_qoag_large_buffer` | B = 4096 at p = 0.19 and p = 0.6. |

The RTL also holds assertions (enabled with `--assert`):

* no FIFO overflow or underflow;
* every departure is legal for the counters;
* one group per address;
* selector lengths match the FIFO levels;
* grants only go to non-empty queues;
* every delivered packet reaches its own output.

## Changing it

* **`N`, `Q`, `B`, `DW`** are parameters of `qoag_switch` and propagate down. The scheduler takes its random
  bits from a 32-bit word. Two rounds use disjoint halves of it; for Q > 2 the rounds reuse the halves,
  XORed with the round number.
* **To pipeline the scheduler,** keep its interface. It needs only the HOL valid bits and addresses, and it
  returns a queue grant per input and a source per output.
* **`in_drop`** is the hook for loss statistics. `out_src` plus the payload is enough to measure delay
  outside the switch, as the testbenches do.
