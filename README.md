# Bypass-based structural test of a core-based SoC

A common way to test a system-on-chip built from embedded cores is to test each core
alone, in isolation. That approach never exercises the wires between cores, and it
needs a separate access mechanism (scan chains or a test bus) to reach every core.
This design does the opposite. Each core gets a **bypass mode**: test data entering
one of its input ports is passed to one of its output ports without going through
the core's logic. With the bypass, the system's own functional wires carry test data
through the cores that are not under test:

* an **input test path** carries a pattern from the global source (a pattern
  generator, TPGR) to an input port of the core under test;
* an **output test path** carries the core's response from its output port to the
  global sink (a signature register, MISR).

The interconnect is tested as a side effect, because every pattern and every response
travels over it.

Ports along a path have different widths, so a pattern moves as a stream of
**packets** and every bypass edge includes a **bit-match** circuit that changes the
packet width. Passing a `b`-bit pattern from an `m`-bit port to an `n`-bit port
takes about `ceil(b / min(m, n))` cycles. That number is the edge's weight in a
graph whose nodes are ports and whose edges are wires and bypass edges. The fastest
path is then a shortest-path search (Dijkstra). The paths are scheduled as soon as
possible, with cores taken in a fixed order. The output path of one core may overlap
the input path of the next. The search and the scheduling run off-line. The hardware
only stores their result as a table and plays it back.

The RTL here covers that architecture for a four-core example system: the bit-match
circuits, the core wrappers with normal, bypass and test modes, the pattern
generator, the signature register, the test controller and the system interconnect.
The four cores' own logic is not included. Each wrapper brings its core-side signals
out to the top level, so you can attach real cores there.

## Files

| file | module | role |
|---|---|---|
| `rtl/bypass_pkg.sv` | package | shared types (`core_mode_e`, `core_cfg_t`, `sched_step_t`), sizes, default schedule |
| `rtl/bitmatch_sp.sv` | `bitmatch_sp` | serial-to-parallel bit-match (narrow to wide) |
| `rtl/bitmatch_ps.sv` | `bitmatch_ps` | parallel-to-serial bit-match (wide to narrow) |
| `rtl/pkt_fifo2.sv` | `pkt_fifo2` | two-entry buffer, the bit-match of an equal-width edge |
| `rtl/bit_match.sv` | `bit_match` | picks one of the three above from the two port widths |
| `rtl/core_wrapper.sv` | `core_wrapper` | per-core mode control, one bit-match per input/output pair |
| `rtl/tpgr.sv` | `tpgr` | LFSR test pattern generator at the global source |
| `rtl/misr.sv` | `misr` | multiple-input signature register at the global sink |
| `rtl/test_controller.sv` | `test_controller` | plays the schedule table |
| `rtl/bypass_soc_top.sv` | `bypass_soc_top` | the four-core system, the top level |

Every module has a self-checking testbench `tb/tb_<module>.sv` (except `pkt_fifo2`,
which `tb_bit_match` tests).

## Links and packets

Every test link is a packet stream: a data bus the width of the port (at most
`WMAX` = 8 bits), plus `valid` and `ready`. A packet moves on each rising clock edge
where both are high. A pattern wider than a link is sent least significant packet
first. Every bit-match circuit computes its `in_ready` from registered state only.
No combinational path therefore runs from a sink's `ready` back to a source, even
when wires form loops through several cores. (Core 1 and Core 2 feed each other in
the example system.)

A wire that fans out to two input ports hands over a packet only when both
receivers are ready. An input port that is not taking part in a test is always
ready, so it never blocks the other receiver.

## Bit-match circuits

**Serial-to-parallel (`bitmatch_sp`, M -> N, M < N).** A bank of `R = N/M` cascaded
M-bit registers, all on the same clock: a shift register M bits wide. Each accepted
packet shifts in at the top, so the first packet ends up in the low bits. When the
R-th packet arrives, the full word moves to an output register in the same cycle.
The input therefore keeps taking one packet per cycle while the output is free. With
M = 4 and N = 16, a 16-bit pattern goes in as four packets and one word leaves
every 4 cycles. The first word is valid one cycle after its last packet. With M = 1
the circuit is a scan-in chain.

**Parallel-to-serial (`bitmatch_ps`, M -> N, M > N).** `N` lanes. Lane `l` is a
`K = M/N`-input, one-bit multiplexer that picks bit `k*N + l` of the held word. It
feeds a one-bit output register. One counter `k` drives every select, so the N
registers together form the outgoing packet. The input word waits in a word
register, and one more word can wait in a pending register. So the next word is
already there when the last slice of the current one leaves, and packets go out on
every cycle with no gap between words. A 16-bit word at N = 4 leaves in 4 cycles,
and an 8 -> 4 edge carries one packet per cycle. The first packet is handed on two
clock edges after its word is accepted. With N = 1 the circuit is a
scan-out chain.

**Equal widths (`pkt_fifo2`).** A two-entry buffer: one packet per cycle, one cycle
of latency.

`bit_match` chooses among the three at elaboration time. The two widths must divide
one another; an assertion checks this.

## Core wrapper

`core_wrapper` is configured each step by a `core_cfg_t` (`mode`, `byp[i][j]`,
`send[j]`):

* **`MODE_NORMAL`.** Input ports drive `func_in`, `func_out` drives the output ports
  (always valid), and `func_en` is high.
* **`MODE_BYPASS`.** Every enabled edge `(i, j)` routes input port `i` to output port
  `j` through its own `bit_match`. Several edges may be on at once (Core 1 bypasses
  in0 -> out1 and in1 -> out0 in the same step), but each output may be fed by only
  one edge. The core logic is held: `func_en` is low and `func_in` keeps its last
  captured value. Switching an edge off empties its bit-match.
* **`MODE_TEST`.** The core is under test. The first packet on each input port is
  captured, and later packets are dropped. Once all `NIN` ports hold a packet,
  `func_en` (and `test_apply`) is high for exactly one cycle. The core must register
  its outputs on that edge, because the wrapper latches `func_out` on the next one.
  Response port `j` then sends one packet once `send[j]` is set. Leaving test mode
  clears the capture and response state.

The wrapper has one bit-match for every input/output pair. So a core has the full
bipartite set of bypass edges, and the schedule can use any of them. Port widths are
parameters (`W_IN`, `W_OUT`: packed lists of bytes, built with `wl(...)`), up to
`MAXP` = 4 ports per side.

**Contract for a real core.** It must register its outputs from `func_in` on clock
edges where `func_en` is high. A core that tests itself with internal BIST would
hook in here too. This RTL does not model that.

## The example system (`bypass_soc_top`)

| driver | width | receivers |
|---|---|---|
| TPGR.p0 | 8 | Core 1 in1 |
| TPGR.p1 | 4 | Core 4 in2 |
| Core 1 out0 | 8 | Core 2 in0 and Core 3 in0 |
| Core 1 out1 | 8 | MISR.s0 |
| Core 2 out0 | 8 | Core 1 in0 |
| Core 2 out1 | 4 | MISR.s1 |
| Core 3 out0 | 8 | Core 4 in0 |
| Core 3 out1 | 8 | Core 4 in1 |
| Core 4 out0 | 4 | Core 2 in1 and MISR.s2 |

The cores have 2/2, 2/2, 1/2 and 3/1 input/output ports.
This wiring is one reading of the four-core example that the method was
demonstrated on. It is not part of the method, and other topologies need only a new
interconnect block and schedule.

Outside a test (`busy` low), the primary inputs `pi_*` drive the two wires the TPGR
drives in test. The three wires into the MISR are brought out as primary outputs
`po_*`.

Patterns can also be pre-defined instead of random. With `ext_pattern` high during a
test, each pattern packet is taken from `pi_*` instead of the LFSR, using the same
handshake. The TPGR still counts how many packets each step needs. Steps have fixed
lengths, so the outside source must offer a packet whenever one is due.

## Schedule and test controller

`test_controller` plays a table of `sched_step_t` entries (`SCHED`, `NSTEP` entries).
Each step gives:

* the configuration of all four wrappers;
* the number of packets each TPGR port sends (loaded on the step's first cycle);
* which MISR inputs are open;
* the step length in cycles.

On `start`, the controller clears the MISR, reseeds the TPGR and plays the table
`NPAT` times (one pass gives every core one pattern), then holds `done`. The default
`NPAT` = 270 comes from the reference experiment for this example system: its total
test time divided by its time per iteration (9,180 / 34 cycles). The default table (`default_schedule()` in the package) has nine steps:

| step | cycles | what happens |
|---|---|---|
| 0 | 5 | Core 1 captures: in1 from TPGR.p0; in0 from TPGR.p1 (two 4-bit packets) via Core 4 (in2->out0) and Core 2 (in1->out0, 4->8) |
| 1 | 6 | Core 1 sends: out1 -> MISR.s0; out0 via Core 2 (in0->out1, 8->4) -> MISR.s1 |
| 2 | 3 | Core 2 captures: in0 via Core 1 (in1->out0); in1 via Core 4 (in2->out0) |
| 3 | 4 | **overlap**: Core 2 sends (out0 via Core 1 in0->out1, out1 direct) while Core 3 captures via Core 1 (in1->out0) |
| 4 | 5 | Core 3 sends out0 via Core 4 (in0->out0, 8->4) -> MISR.s2 |
| 5 | 4 | Core 3 sends out1 via Core 4 (in1->out0, 8->4) -> MISR.s2 |
| 6 | 4 | Core 4 captures in0 via Core 1 and Core 3 (in0->out0), in2 direct from TPGR.p1 |
| 7 | 4 | Core 4 captures in1 via Core 1 and Core 3 (in0->out1) |
| 8 | 3 | Core 4 sends out0 -> MISR.s2 |

One iteration takes 38 cycles, so the whole 270-pattern test takes 10,260 cycles.
Each step length is the shortest at which every packet of that step still arrives
with this implementation's latencies. The controller does not detect completion, so
a step that is made shorter than its paths need loses packets. (The end-to-end
testbench catches that.) The reference experiment reports 34 cycles per iteration
for its own system. Its topology, widths and circuit latencies are not all known, so
the two numbers are not directly comparable. Here a core is busy for these
lengths: Core 1 for steps 0-1 (11 cycles), Core 2 for steps 2-3 (7), Core 3 for
steps 3-5 (13) and Core 4 for steps 6-8 (11). The reference gives 16, 15, 18 and
30 cycles per core, which overlap more heavily to reach 34.

To use another system or another schedule, fill a `sched_t` with `mk_step(...)`,
`cfg_normal()`, `cfg_bypass(i, j)`, `cfg_bypass2(...)` and `cfg_test(send_mask)`,
and pass it as `SCHED` with a matching `NSTEP` (up to 16 steps).

## Pattern generator and signature register

`tpgr` is a 16-bit Fibonacci LFSR, x^16 + x^14 + x^13 + x^11 + 1, seeded with
`16'hACE1`. Port 0 presents bits 7..0 and port 1 presents bits 11..8. The LFSR
steps once in each cycle where any port hands over a packet.

`misr` uses the same polynomial. Inputs s0, s1 and s2 are XORed in at bits 0, 8 and
12. The register shifts once in each cycle where at least one enabled input is
valid, so the signature depends on the order of the packets and not on idle
cycles. Disabled inputs are ignored, which matters for wires that also fan out to a
core.

The method only names these two blocks. Their polynomials, widths and folding are
choices of this design.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops on a watchdog. For
example, the end-to-end test at default parameters:

```
verilator --binary --timing --assert -Irtl rtl/bypass_pkg.sv tb/tb_bypass_soc_top.sv \
          --top-module tb_bypass_soc_top -o sim
./obj_dir/sim
```

`tb_bypass_soc_top` plays the four cores with fixed functions (Core 2 is a cubic, as
in the reference system) and checks, independently of the RTL:

* every pattern packet, against its own LFSR model;
* the pattern each core applies, against the packets meant for it;
* every packet arriving at the MISR, against the expected response packets;
* the final signature, against its own MISR model;
* the test length;
* that no response is left unsent.

It also counts how often each mechanism ran: S/P, P/S and equal-width bypass edges,
tests of each core, the overlapped step, and fan-out into a core in normal mode. It
runs the full test twice. The first run uses LFSR patterns. The second uses random
pre-defined patterns fed through `pi_*` with `ext_pattern` high. Each run is 270
iterations (10,262 cycles including start-up), and both together take well under a
second. The
unit testbenches cover widths, packet order, throughput and latency of the
bit-match circuits (including 1-bit ports, where they act as scan-in and scan-out
chains), every wrapper mode, the TPGR and MISR against models, and the
controller's cycle-by-cycle outputs.

## How far to trust it, and where it departs

Taken from the method:

* the bypass mode;
* the S/P structure (cascaded registers) and the P/S structure (multiplexer plus
  one-bit register per lane);
* edge costs of the form `ceil(b / min(m, n))`;
* an ASAP schedule with cores in fixed order and overlapping paths;
* the four-core system with a TPGR source and a MISR sink;
* 8-bit core datapaths;
* 270 patterns (9,180 / 34).

The method's text gives the cost with a floor and its figure gives it with a
ceiling. The ceiling is used here; it also matches the stage count of the S/P
circuit.

Choices of this design:

* the valid/ready handshake and the packet order (least significant first);
* the table-driven controller;
* the extra output, word and pending registers in the bit-match circuits;
* the test-mode sequence (capture, one-cycle apply, latch, send under `send[j]`);
* fixed step lengths instead of completion detection;
* the LFSR and MISR polynomials and port folding;
* asynchronous active-low reset;
* the normal-mode primary I/O;
* the exact wiring and port widths of the example system.

Not included:

* the logic of the four cores (a Facet benchmark, a cubic polynomial evaluator, a
  differential-equation solver and a fifth-order elliptic filter);
* their internal BIST;
* the off-line shortest-path search and scheduler (only its output, the schedule
  table, is in the RTL);
* the full-scan test that the method is compared with.

Each core captures exactly one packet per input port. A test pattern for a core is
therefore the concatenation of its port-wide patterns, for example two 8-bit ports
making 16 bits. Wider patterns per port would need a bit-match at the sink.

Lint is clean with `verilator -Wall` except for two notes. Some instances leave
parameters unused. The handshake assertions sample the reset synchronously. Port
bits above a port's width are tied to zero, and these show up as constant outputs
after synthesis.
