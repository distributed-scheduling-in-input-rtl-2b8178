# SRR: a fully distributed scheduler for an input-queued switch

This is synthesizable SystemVerilog for an N x N input-queued (IQ) cell switch.
Its scheduler is **Synchronous Round Robin (SRR)**, and it is built to be split
over 2N separate chips: one chip per input selector, one per output selector.

In an IQ switch each input port keeps one queue per output, a *virtual output
queue* (VOQ). The crossbar can connect each input to at most one output per
time slot, and each output to at most one input. A scheduler must therefore
pick a matching every slot. Classic schedulers (iSLIP, DRRM and others) iterate
request/grant rounds between input and output selectors within one slot. That
only works when all selectors sit on one chip. Once they sit on different
chips, every message between an input and an output selector takes an
inter-chip latency. A request and its grant together take one **round trip
time (RTT)**, counted in slots. Iterations then become impossible, and the
usual per-pointer schemes need state that grows with the RTT.

SRR avoids both. It needs no iterations, no pending-request counters and no
state that depends on the RTT. The RTT only delays the grants.

## The SRR rules

All input selectors number the slots with a modulo-N counter `s`, all in step.
N consecutive slots form an *SRR frame*.

**Input selector of input i, slot s.** It issues at most one request.
1. *Preferential request.* If the VOQ for output `(i + s) mod N` holds a cell,
   it requests that output.
2. Otherwise it requests the **longest** non-empty VOQ. Ties between equally
   long VOQs go round robin: the first one at or after a pointer wins, and the
   pointer then moves one past the winner.

**Output selector.** It grants the preferential request if there is one.
Otherwise it grants one of the requests it received, chosen at random.

Since the offsets `i + s` differ for every input, the N preferential requests
of a slot go to N different outputs. When every VOQ is backlogged, all requests
are preferential, nothing collides, and the switch runs a TDMA schedule. Each
input gets one turn per output per frame, and throughput is 100%. At low load
most preferential VOQs are empty. The longest-queue fallback then takes over,
and the switch behaves much like a FIFO. An input sends one request per slot,
so it can receive at most one grant per slot and needs no accept phase.

## What the round trip time does

A request made in slot `t` reaches its output selector in slot `t + RTT/2`.
The grant reaches the input in slot `t + RTT`. The input then sends the head
cell of the granted VOQ through the crossbar in that same slot. The output
selectors send the crossbar setting over a link with the same delay as the
grants.

The input selector keeps requesting every slot and does not track requests
that are still outstanding. This has two effects, and both appear in
simulation:

* **Wasted grants.** A VOQ that holds one cell gets requested in every slot
  until that cell's grant comes back. That takes RTT + 1 requests. The first
  grant takes the cell. The other RTT grants find the VOQ empty, and those
  slots of that input and output stay unused. `voq_bank` flags each one on
  `wasted`.
* **Early departures.** When a new cell arrives before such an extra grant
  comes back, it leaves on that grant. A cell can therefore leave just one
  slot after arriving, even when the RTT is 20.

A cell that arrives at an empty switch leaves exactly **RTT + 1 slots** after
its arrival slot: one slot to be queued and requested, then RTT slots for the
grant. With RTT = 0 the links are plain wires. Selection, grant, dequeue and
the crossbar transfer then all happen in one slot.

## Blocks

```
srr_switch                      top: N line cards + scheduler + crossbar
├── voq_bank        x N         line-card VOQs in one shared memory
├── srr_scheduler               the distributed scheduler
│   ├── slot_counter   x N      one per input-selector chip, all in step
│   ├── input_selector x N      SRR input rules
│   ├── rtt_link       x N      request links, RTT/2 slots
│   ├── output_selector x N     SRR output rule (LFSR for the random choice)
│   └── rtt_link       x N      grant/crossbar links, RTT - RTT/2 slots
└── crossbar                    N multiplexers, one per output
srr_pkg                         default sizes, LFSR step, modular add
```

| Module | Does | Timing |
|---|---|---|
| `slot_counter` | counts `s` = 0 .. N-1, wraps; `frame_start` when `s` = 0 | registered |
| `voq_bank` | N FIFOs in one shared `CELL_W`-wide memory with one write and one read per slot; reports every queue length; drops an arrival at a full VOQ | arrival written at the slot's clock edge; departure read combinationally in the slot of the grant |
| `input_selector` | preferential or longest-queue request, carrying a `pref` bit | combinational; only the tie pointer is a register |
| `output_selector` | grants the preferential request, otherwise the first requester from a random start | combinational; the LFSR steps every slot |
| `rtt_link` | delays a bundle by `DELAY` slots | register pipeline; `DELAY` = 0 is a wire |
| `srr_scheduler` | wires the selectors and links, decodes grants to the inputs and to the crossbar | grants arrive RTT slots after the request |
| `crossbar` | output j carries the cell of input `cfg_sel[j]` | combinational |

The whole design uses one clock, and one clock cycle is one slot. The reset
`rst_n` is synchronous and active low. It empties all VOQs, zeroes the slot
counters and tie pointers, clears the links and reloads the LFSRs.

### Top-level ports (`srr_switch`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `in_valid`, `in_dest`, `in_data` | in | N, N x log2 N, N x CELL_W | at most one arriving cell per input per slot |
| `in_drop` | out | N | that cell was dropped because its VOQ is full (same slot) |
| `out_valid`, `out_data`, `out_src` | out | N, N x CELL_W, N x log2 N | at most one departing cell per output per slot, and its input |
| `stat_req`, `stat_req_pref`, `stat_tie` | out | N | per input: a request, a preferential one, a request chosen by breaking a longest-queue tie |
| `stat_grant`, `stat_grant_pref`, `stat_contention` | out | N | per output: a grant, to a preferential request, several requests arrived (flags of the slot in which the grant is made, before the grant link) |
| `stat_wasted` | out | N | per input: a grant found its VOQ empty |

### Parameters

| Parameter | Default | Origin |
|---|---|---|
| `N` | 16 | the switch size that SRR was evaluated at |
| `RTT` | 4 | the evaluated RTTs are 0, 2, 4, 10 and 20 slots; 4 is the one used in every RTT comparison |
| `CELL_W` | 512 | a 64-byte cell |
| `DEPTH` | 64 | this design's choice (cells per VOQ; other values work, the memory is then rounded up to a power of two per VOQ) |

Only `rtt_link`'s depth changes with `RTT`. No selector grows with it.

## Choices made here

The SRR rules above are the scheme's own. The following points are left open
by the scheme and are this design's choices:

* **Random choice at outputs.** Each output selector runs a 16-bit
  maximal-length Galois LFSR (x^16+x^14+x^13+x^11+1), with a different seed per
  output. Its low bits give a random start position, and the first requester
  from there, round the ring, gets the grant. This is cheap, but not exactly
  uniform: a requester right after a long run of idle inputs wins more often.
* **The `pref` bit.** Each request carries a one-bit "preferential" flag, so
  output selectors need no slot counter. With synchronous counters at most one
  preferential request can reach an output per slot; an assertion checks this.
* **Tie pointer.** After a non-preferential choice the pointer moves one past
  the chosen output. It does not move after a preferential request.
* **Queue lengths.** The scheme suggests keeping each input's VOQs sorted by
  length, which is cheap because at most one arrival and one departure occur
  per slot. This design instead keeps one length counter per VOQ. The input
  selector searches them every slot with a comparator chain that starts at the
  tie pointer. The result is the same, but the chain is N deep.
* **Line card to input selector.** VOQ lengths reach the input selector of the
  same input with no delay. The RTT applies only between input and output
  selectors.
* **Odd RTT.** The extra slot goes on the grant path.
* **Finite VOQs.** An arrival at a full VOQ is dropped and flagged, even if a
  cell leaves that VOQ in the same slot. The evaluated model has unbounded
  queues.
* **Delay count.** Delays here run from the arrival slot to the departure
  slot, so the minimum at RTT = 0 is 1. Published SRR delay curves come out
  about one slot lower.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<m>` and has a cycle watchdog.

| Testbench | What it checks |
|---|---|
| `tb_slot_counter` | counting and wrap for N = 16 and N = 5, `frame_start`, reset |
| `tb_rtt_link` | delays 0, 2 and 10 against a history of random words; reset flushes |
| `tb_crossbar` | random partial permutations, 512-bit cells |
| `tb_voq_bank` | against a per-queue reference model: data, lengths, drops, wasted grants, same-slot arrival and departure |
| `tb_input_selector` | against a reference model: preferential choice, longest queue, round-robin ties, idle |
| `tb_output_selector` | preferential priority, random choice against a reference LFSR, one-hot grant, contention, spread of random grants |
| `tb_srr_scheduler` | grant exactly RTT slots after the request; TDMA pattern `(i + s - RTT) mod N` under saturation; matching legality and preferential priority under random queue lengths |
| `tb_srr_switch` | full default size end to end: lone-cell latency RTT + 1 with exactly RTT wasted grants, Bernoulli 0.3, bursty 0.6, hot spot with drops, full load with ≥ 99% throughput (measured 100%); every cell checked for route, content and per-flow order, and the switch must drain |
| `tb_srr_workloads` | 16-port switches with RTT 0, 2, 4, 10 and 20 side by side, under Bernoulli loads 0.2, 0.6 and 0.9, bursty load 0.5 and overload 1.0 |

Mean delays measured by `tb_srr_workloads`, in slots from arrival to departure:

| RTT | Bernoulli 0.2 | Bernoulli 0.6 | Bernoulli 0.9 | bursty 0.5 | throughput at load 1.0 |
|---|---|---|---|---|---|
| 0 | 1.14 | 4.07 | 45.7 | 7.2 | 0.983 |
| 2 | 3.59 | 9.15 | 49.6 | 10.7 | 0.983 |
| 4 | 5.96 | 11.6 | 50.4 | 13.9 | 0.984 |
| 10 | 12.4 | 18.1 | 57.6 | 20.0 | 0.985 |
| 20 | 21.4 | 25.6 | 67.4 | 38.7 | 0.983 |

At load 1.0 the runs are only 12,000 slots, and VOQs of 64 cells drop the
excess. Throughput is still rising at the end of the run. With evenly loaded
VOQs, `tb_srr_switch` measures exactly 100%.

To run a testbench with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_srr_switch \
    -y rtl -y tb +libext+.sv rtl/srr_pkg.sv tb/tb_srr_switch.sv
./obj_dir/Vtb_srr_switch
```

The same command works for the other testbenches when you change the name.
Lint with `verilator --lint-only -Wall -y rtl +libext+.sv rtl/srr_pkg.sv rtl/srr_switch.sv`.
Every testbench, including the full-size switch, finishes in a few seconds.

## Limits

* `srr_switch` is a cycle-level switch core. It has no line interfaces,
  segmentation into cells or output-side reassembly.
* The inter-chip links are ideal register pipelines. Serialization, pin
  sharing and link errors are not modelled.
* At the default size the VOQ memory holds 8 Mbit (16 line cards x 16 VOQs x
  64 cells x 512 bit). It is written as plain arrays and left to memory
  inference.
* The longest-queue search is a linear comparator chain over N queue lengths.
  For large N, a tree or the sorted-list organisation mentioned above would be
  needed for timing.
