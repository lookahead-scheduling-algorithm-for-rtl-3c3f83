# Lookahead-scheduled input-buffered packet switch

An input-buffered switch with one FIFO per input is limited by head-of-line
blocking: a packet waiting for a busy output holds up everything behind it.
Lookahead scheduling avoids this without per-output queues or an iterative
matching algorithm. Each input has a single queue of **B one-packet buffers**.
Think of the buffers of all N inputs as a grid of N rows and B **columns**.
Exactly one column is transmitted per time slot, in cyclic order, and all of
its packets cross the fabric together. So the scheduling problem comes down to
one rule: **no column may hold two packets for the same output.**

A packet is scheduled the moment it arrives. Its input looks ahead through the
columns that will be transmitted in the next B slots. It takes the first buffer
that is empty in its own row and whose column has no packet for the same
output yet. If none of the B columns qualifies, the packet is dropped at once,
which keeps the buffer free for later packets. A packet placed k columns after
the transmitting column leaves exactly k slots later, so the delay of every
packet is known when it is placed and is at most B slots.

This repository holds synthesizable SystemVerilog for the whole switch:
N x N, B buffers per input, a pipelined scheduler, and a nonblocking fabric.
Self-checking testbenches compare it slot by slot with a reference model and
measure its loss and delay under random traffic.

## Scheduling state

Two N x B bit matrices hold everything the scheduler needs (`sched_state`):

* **S**, the buffer state matrix. `S[i][c] = 1` when buffer c of input i is
  occupied.
* **M**, the destination map. `M[n][c] = 1` when column c already holds a
  packet for output n.

Buffer (i, c) can take a packet for output n when `S[i][c] = 0` and
`M[n][c] = 0`. A placement sets both bits. When a column is transmitted, its
S and M bits are cleared. The packets themselves (destination and payload)
are kept in `input_queue`, one per input.

Let j be the transmitting column of the slot in which a packet arrives. The
packet checks the columns in the order j+1, j+2, ..., B-1, 0, ..., j. The last
one is column j itself: it was emptied at the start of the slot, so it becomes
the column transmitted B slots later.

Packets from one input can leave out of arrival order. But packets from one
input to the **same output** always leave in order. A later packet cannot find
room in a column that an earlier packet for the same output skipped: that
column is either still occupied in this row, or it already holds a packet for
that output.

## The minislot pipeline

This is the part that needs the most care. Within one slot, the inputs must
see each other's placements, because a column's output set changes as packets
are placed. Checking inputs one after another, each scanning up to B columns,
would cost up to N*B checks per slot. The pipeline brings this down to **N+1
checks per slot for each input**, however large B is.

A time slot is divided into N+1 **minislots**; in this RTL one minislot is one
clock. Inputs are served in an order that rotates every slot: input s, s+1,
..., s+N-1 (mod N), where s advances by one each slot for fairness. The input
at serving position p (0-based) makes its first check in minislot p, at column
j+1. After that it checks one column further in each minislot:

```
               minislot 0   1     2     3    ...
position 0:    j+1         j+2   j+3   j+4
position 1:                j+1   j+2   j+3
position 2:                      j+1   j+2
```

In any minislot, the inputs therefore check buffers in **different columns**.
So the N checks of a minislot run in parallel with no race on M. Each column
is also checked in serving order, which gives the same result as serving the
inputs one at a time.

A packet at position p gets only N+1-p checks in its arrival slot. If it has
not been placed or dropped by then, it goes on in the next slot. It starts in
minislot 0, one column further than where it stopped, and makes one check per
minislot until its B checks are used up. In column terms it is then ahead of
all the new packets of that slot, so each column is still checked oldest packet
first. The columns stay distinct: a packet a slots old, served at position p in
its arrival slot, checks the column a*N + m - p + 1 places after the current
transmitting column in minislot m (1-based m and p). No two in-flight packets
give the same number, and the number never exceeds B.

**How many packets one input has in flight.** Usually a packet is finished
before its input's next packet starts. This holds whenever B <= N, which covers
the 10 x 10 switch with B = 3 or B = 10. When B > N, two cases arise:

* With a fixed serving order and B > N+1, a packet can still be searching when
  its successor makes its first check.
* With rotation and B = N+1, the same happens, because the next packet of that
  input is served one position earlier.

`input_port_processor` therefore holds `K = ctx_depth(N,B)` packets, ordered
by age, and makes one check per minislot for each packet that is active. K is
2 for the default size even though B = N there: a packet that arrived late in
the serving order may still be finishing its checks early in the next slot
while the input's new packet waits for its own minislot, so both must be
stored, but they never check in the same minislot. The extra packet in flight
and the second check in one
minislot are this implementation's own way to handle B > N. The columns checked
stay distinct, so the schedule is the same as the serial one.

## Interface and timing of `lookahead_switch`

Parameters: `N` (ports, default 10), `B` (buffers per input, default 10),
`DATA_W` (payload bits, default 424, one 53-byte cell), `ROTATE` (1: rotate the
first-served input every slot; 0: input 0 is always served first).

| signal | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | one clock per minislot; synchronous, active-low reset (empties all buffers) |
| `arr_valid[i]`, `arr_dest[i]`, `arr_data[i]` | in | a packet for output `arr_dest` at input i. **Sampled on the clock edge at the end of a slot** (`slot_last = 1`). At most one packet per input per slot. |
| `slot_last` / `slot_start` | out | last / first minislot of a slot (N+1 clocks per slot) |
| `out_valid[n]`, `out_data[n]`, `out_src[n]` | out | packet delivered to output n and the input it came from; registered at the slot boundary and held for the whole slot |
| `drop[i]` | out | one-clock pulse: input i gave up on a packet |
| `place[i]` | out | one-clock pulse: input i placed a packet |
| `check[i]` | out | input i checks a buffer in this minislot |

On the edge that ends slot t, several things happen at once:

* the arrivals are taken;
* the transmitting column advances to j+1;
* the packets of the new column are latched onto the outputs;
* the column's S and M bits are cleared;
* the serving order rotates.

The new packets are scheduled during slot t+1. A packet placed k columns after
the transmitting column of slot t+1 appears on the outputs in slot t+1+k.
Its output edge comes k*(N+1) clocks after the edge that sampled it. Assertions check
three rules: no buffer is placed twice, no output appears twice in a column,
and nothing is placed into the column being transmitted.

## Modules

| file | role |
|---|---|
| `rtl/lookahead_pkg.sv` | default sizes; `ctx_depth(N,B)`, the in-flight packet count; `idx_w` |
| `rtl/slot_timer.sv` | minislot counter, cyclic transmitting column, rotating serving order |
| `rtl/input_port_processor.sv` | per input: in-flight packets, one buffer check per minislot, place or drop |
| `rtl/sched_state.sv` | matrices S and M: column clear at the slot boundary, placement updates |
| `rtl/input_queue.sv` | per input: B packet buffers, written on placement, read at the transmitting column |
| `rtl/crossbar.sv` | N x N nonblocking fabric, an AND-OR multiplexer per output (no arbitration needed) |
| `rtl/lookahead_switch.sv` | top level |

At the default size (10 x 10, B = 10, 424-bit packets), coarse synthesis gives
about 4,500 flip-flop bits and 51,540 memory bits. Of the memory bits, 42,800
are the packet buffers (100 buffers of a 424-bit payload and a 4-bit
destination). The other 8,740 are the registers of the in-flight packets.

## Performance under uniform traffic

The testbenches offer Bernoulli arrivals of load λ per input and slot, with
destinations spread uniformly over the outputs. The published figures for this
scheduler come from its own event simulation and from an analytical model.

Published reference points, from the text (simulated, with analytical in brackets):

| configuration | measured here | published |
|---|---|---|
| 10x10, B=10, λ=0.8, mean delay | 4.67 slots | 4.55 (4.91) |
| 10x10, B=10, λ=0.6, loss | 4.2e-5 (3 of 72k packets) | 5.22e-5 (3.41e-5) |
| 10x10, B=3, λ=0.6, loss | 3.8e-2 | 6.4e-2 (4.07e-2) |

The full sweep measured by `tb_workloads` (12,000 slots per point):

| load | B=3 loss | B=3 delay | B=10 loss | B=10 delay |
|---|---|---|---|---|
| 0.1 | 0 | 1.06 | 0 | 1.06 |
| 0.2 | 4.2e-4 | 1.14 | 0 | 1.13 |
| 0.3 | 2.0e-3 | 1.26 | 0 | 1.26 |
| 0.4 | 6.2e-3 | 1.40 | 0 | 1.45 |
| 0.5 | 1.7e-2 | 1.61 | 0 | 1.74 |
| 0.6 | 3.8e-2 | 1.85 | 4.2e-5 | 2.22 |
| 0.7 | 7.1e-2 | 2.08 | 4.6e-4 | 3.06 |
| 0.8 | 1.2e-1 | 2.29 | 5.2e-3 | 4.67 |
| 0.9 | 1.6e-1 | 2.43 | 3.2e-2 | 6.71 |
| 1.0 | 2.1e-1 | 2.55 | 8.9e-2 | 7.95 |

At B = 10 the measured loss and delay follow the published simulation
closely. At B = 3 the measurements follow the published analytical model
instead: about 4e-2 loss at load 0.6 and 2.55 slots of delay at full load.
The published simulation shows more loss, about 1.6 times as much at load
0.6, and less delay, about 2.2 slots at full load. The RTL follows the
algorithm as stated, in which a packet may always fall back on the column
being transmitted. The reference model, written separately, gives the same
numbers. So the published simulation probably differs from the stated
algorithm in some detail. The testbench accepts a loss of 0.030 to 0.085 for
this point.

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_slot_timer` | minislot count, N+1 clocks per slot, column and serving-order rotation, fixed order |
| `tb_sched_state` | S and M against a shadow copy under random legal placements and clears |
| `tb_input_port_processor` | one input under random S/M every minislot: start minislot, column sequence, placement, drop after B checks, carry-over to the next slot, two checks in one minislot |
| `tb_input_queue` | buffer writes (two per clock) and reads |
| `tb_crossbar` | random conflict-free columns |
| `tb_lookahead_switch` | 4x4/B=5 (rotating), 3x3/B=5 (fixed order), 3x3/B=9 against the reference model (`tb/lookahead_ref_pkg.sv`), slot by slot. Also: per-pair ordering, delay between 1 and B, conservation of packets, and that each mechanism occurs (drop, busy-buffer rejection, output-conflict rejection, placement in a later slot, placement into the transmitting column, two checks at one input, rotation) |
| `tb_fig2_example` | a hand-worked 3x3, B=5, fixed-order example: after nine slots of traffic that build its starting state, checks every check and placement of two slots minislot by minislot, and the packets switched in the following five slots |
| `tb_workloads` | 10x10 with B=3 and B=10 at loads 0.1 to 1.0: loss and delay against the published values and trends |
| `tb_lookahead_switch_full` | the default-size switch (no parameter overrides), 20,000 slots at λ = 0.8, every slot against the reference model; mean delay and loss |

The reference model does not simulate minislots. It serves the packets of a
slot one at a time, oldest first and then in serving order. Each packet gets as
many checks as it has minislots in that slot. The pipeline must match this
serial schedule exactly, and the tests confirm that it does.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_lookahead_switch \
    -y rtl -y tb +libext+.sv -Irtl rtl/lookahead_pkg.sv tb/lookahead_ref_pkg.sv \
    tb/tb_lookahead_switch.sv -o sim && ./obj_dir/sim
```

Replace the top module and its file for the other testbenches. All of them
finish in a few seconds.

## Design choices beyond the algorithm

The scheduling rules come from the published lookahead algorithm and its
pipelined implementation:

* the S and M matrices;
* the column sequence and the drop after B checks;
* cyclic column transmission;
* N+1 minislots per slot, with input p starting in minislot p;
* rotation of the first-served input.

The following are this implementation's choices:

* one clock per minislot; a synchronous, active-low reset that empties the switch;
* arrivals sampled at the slot boundary; outputs registered and held for a slot;
* a payload width of one ATM cell (424 bits); the scheduler never looks at it;
* several packets in flight per input and more than one check per minislot when
  B > N (the algorithm assumes one check per minislot);
* the `ROTATE = 0` mode (fixed serving order), useful to reproduce hand-worked
  examples;
* the AND-OR crossbar; the fabric is only required to be nonblocking;
* `out_src`, `place` and `check`, which exist for observation only.

The switch does not include the analytical performance model (a set of
recursive equations for buffer occupancy), the traffic sources, or anything
beyond the fabric, such as line interfaces or cell headers.
