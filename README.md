# Path delay fault testing of an Omega network, in SystemVerilog

An n x n Omega multistage interconnection network (MIN) has n² source-to-destination
paths, plus 2n(n−1) more that start at a switch control input. Many of them are
equally critical, so testing only a selection for delay faults is not enough. This
RTL applies a test that needs only **2(3n−2) vector pairs** and still covers every
path, in both transition directions. It covers all M lines of a bus slice at once.
The test can be run in two ways:

* by a small **production tester** (Gray counter, T flip-flops, capture flip-flops,
  2-rail checker) attached to the network, or
* **on line**, through ordinary communication sessions of the processors the
  network connects, with the receive buffers as the response checker.

Both share one network in the top module `omega_min_system`, together with the
centralized switch control and the processors' buffered ports. The method follows
M. Bellos, E. Kalligeros, D. Nikolos and H. T. Vergos, "On-Line Path Delay Fault
Testing of Omega MINs". Where that description leaves a detail open, the choices
made here are listed under [Interpretations and departures](#interpretations-and-departures).

## The network

`omega_min` has N = log2 n stages of n/2 switches (`min_switch`). A perfect shuffle
(rotate-left of the N-bit position) comes before every stage. The last stage drives
the destinations directly. Switch k of a stage takes positions 2k (port 0) and
2k+1 (port 1). With `c = 0` it passes straight (direct state); with `c = 1` it
exchanges its inputs (cross state), which flips bit 0 of the position. Each switch is
2M two-input multiplexers sharing `c`. Every control line is a separate input
`ctrl[stage][switch]`; the network itself is purely combinational.

A *virtual line* stands for a whole M-bit bus. The tests always put the same value
on all M lines, so the M physical paths behind one virtual path are tested in
parallel.

## Why 2(3n−2) vector pairs are enough

The whole test uses only **uniform settings**: every switch of stage i gets the
same value c_i. A uniform setting connects each source to a different destination,
and the 2^N = n settings together connect every source to every destination
exactly once.

* **P paths** (source to destination). For each of the n settings, all n sources
  make a transition at once, first one way and then back. That is 2n sessions and
  n paths per session.
* **L paths** (from a control input). The source data stay fixed and one stage
  control changes. This only launches a transition through the switch if its two
  inputs differ, so the sources get a special vector: bit s is the parity of the
  bits of s. For n = 4 that is `0110`, and for n = 8 it is `01101001`. It is built by
  doubling: the next size is the vector followed by its complement. The vector is
  unchanged by the shuffle (a rotation keeps the parity), and its pairs (2k, 2k+1)
  always differ. So under any uniform setting, every stage sees either the vector or
  its complement. Every switch then has complementary inputs, and flipping c_i flips
  **every** destination.

The controls come from an up/down Gray counter with **c_1 as its least
significant bit**. One pass up and down flips c_1 under all values of the later
controls, c_2 under all values of c_3..c_N, and so on. Each path from a stage-i
control depends only on the controls after stage i, so the pass covers every L path.
Counting up gives one transition direction and counting down the other. Doing the
pass once with the vector and once with its complement gives 4(n−1) sessions.

For n = 8: 16 + 28 = 44 sessions. No test can do better, because at most n paths
can be observed per session.

The destination that a source must request to produce a uniform setting is
computed by `dest_calc`. It starts from the source label, and for i = 1..N it
rotates left and flips bit 0 when c_i = 1. In closed form this is
`dest = src XOR reverse(c)`. The destination data also follow in closed form:
under setting g, destination d receives the vector bit `v[d] XOR parity(g)`.

## Production tester (`low_cost_tester`)

```
            +-------------+  c_1..c_N (broadcast to every switch of a stage)
            | gray_counter|---------------------------+
            +-------------+                           v
 +----------------+   n*M sources   +-----------+   n*M   +------------------+   n*M pairs   +------------------+
 | tff_vector_gen |---------------->| omega_min |-------->| response_capture |-------------->| two_rail_checker |--> z0,z1
 +----------------+                 +-----------+         | (q1: last period,|               +------------------+
          ^                                               |  q2: the one     |                        |
          |                 tester_ctrl (sequencer) <-----|  before)         |<-----------------------+
          +-----------------------------------------------+------------------+
```

All parts run on one clock. At each edge, the capture flip-flops take the network
outputs (`q1`) and keep the previous ones (`q2`). If a transition arrived within one
period, every `(q1, q2)` pair is complementary and the checker output `(z0, z1)` is a
valid code. `z0 == z1` is a failed check. The checker is sampled at the edge that
ends a check period.

**P scheme**: 5 periods per Gray code, counting up through all n codes.

| period | Gray counter      | sources (T flip-flops) | checked at the end of the period |
|-------:|-------------------|------------------------|----------------------------------|
| 1      | new code          | v (held)               | –                                |
| 2      |                   | v (held)               | –                                |
| 3      |                   | ~v (toggle)            | –                                |
| 4      |                   | v (toggle)             | response of period 3 vs period 2 |
| 5      |                   | v (held)               | response of period 4 vs period 3 |

**L scheme**: the sources hold v. After two settling periods the counter steps every
two periods: up from 0 to n−1, then down to 0. The check is made in the second
period of each pair, comparing the response after the step with the one before.
The T flip-flops then toggle once to ~v, and the pass is repeated.

A complete test takes `5n + 4 + 8(n−1)` clock periods after the edge that samples
`start`; that is 100 periods for n = 8. It makes 2n P checks and 4(n−1) L checks.
`fail_p` and `fail_l` say which scheme saw a late transition. `checks` and `errors`
count the checks made and the checks failed.

## On-line test

### Communication sessions (`central_control`, `node_port`)

Processors exchange data in sessions, all timed by the common clock:

| edge | what happens |
|------|--------------|
| 1    | `req_valid`/`req_dest` of every requesting processor are registered |
| 2    | switch settings, `grant` and the receive notifications are registered; the network changes configuration |
| 3, 4, … | each granted source moves one word from its transmit buffer to its output register (the MIN source); each notified destination stores the word on its MIN output |

The session ends in the cycle in which all granted transmit buffers are empty.
That cycle still stores a word, and `session_done` pulses one cycle later. A
destination therefore stores **K+1 words when K are sent**:

* First, the word its source held from before, seen through the new configuration.
  This word exists because the output register keeps its value between sessions.
  For the L paths it is exactly the response, one period after the switch change.
* Then come the K new words.

The receive buffer has DEPTH+1 entries to make room for that extra word.

Routing uses the destination tag: at stage i a word leaves on output port bit N−i
of its destination. Requests are served in source order (source 0 first). A request
is granted if every switch on its path is free or already set to the state it needs.
Otherwise it is refused, with `grant` low; this also covers two requests for the same
destination. A refused processor keeps its words and may request again. Switches
that no granted path uses keep their state.

### Test agents (`online_test_agent`)

One agent per processor owns that processor's ports while `ol_mode` is high. All
agents start together and stay in step because they wait for the same sessions.
Each agent has its own Gray counter and `dest_calc`, so the requests of one session
always form a conflict-free uniform setting.

* **P sessions**, one per code counting up: the agent sends the three words
  `x, ~x, x`, where x is its vector bit on all M lines. Each word change is a
  transition on every source.
* **L sessions**, one word each: a session at code 0, then up through all codes and
  down again, first with the vector and then with its complement. Since the
  sources do not change their data, the first word stored in a session is the
  control-path transition.

After each session the agent reads its receive buffer and compares every word with
`{M{v[d] XOR parity(g) XOR polarity}}`. It also counts a refused request or a
missing word as a failure. The only word not checked is the first word of the very
first session, which holds data from before the test. The agent raises `done` at the
end, with `fail` telling whether any check failed. The buffers must be empty when
the test starts.

Per agent, n = 8 gives 8 P sessions (31 word checks) and 30 L sessions (60 word
checks).

## Interpretations and departures

The original description fixes the method but not every detail. Choices made here:

* **T flip-flops hold except at the starts of periods 3 and 4** of a P
  configuration. If they toggled at every clock, a line late by a whole period would
  still alternate, and the complementary check would miss it.
* **c_1 is the Gray counter's least significant bit.** This is the order that makes
  one up/down pass produce the control transitions of the published 8x8 L test set.
* **Capture flip-flops are two in series per line**, compared by the checker. The
  checker is sampled at the end of the check period, not half-way through.
* **The Gray counter's slower rate in the P scheme is an enable**, not a second
  clock.
* **The receive buffer is one word deeper than the transmit buffer.** The original
  assumes equal buffers, which leaves no room for the held word.
* **Centralized control priority**: lowest source number first, with a greedy
  conflict check. The original leaves the priority scheme open.
* **Switch polarity**: `c = 0` is the direct state.
* **Defaults**: slice width M = 8 and buffer depth 4 are choices of this design; the
  original gives no numbers for them. n = 8 is the example network of the original.
* **One slice**: a network for b-bit buses is b/M identical M-bit slices sharing the
  control lines. This RTL builds one slice, and the processors' words are M bits
  wide. With M = b, one slice is the whole network.
* **The on-line test routine is hardware** (`online_test_agent`). In the original,
  the processors carry it out with their own resources.
* **Shared network**: the production tester and the on-line system are joined on
  one network by multiplexers (`prod_mode`, `ol_mode`). This joining is this
  design's own.
* **Not included**:
  * the processors themselves; their port signals are the top's `proc_*` ports.
  * the alternative L test set with six different source vectors; only the
    two-vector test set is built.

## Files

| module | role |
|--------|------|
| `omega_pkg` | shuffle, parity and test-vector functions |
| `min_switch` | 2x2 multiplexer switch |
| `omega_min` | the n x n network |
| `gray_counter` | up/down Gray counter (tester and agents) |
| `tff_vector_gen` | n·M T flip-flops with the test-vector preset |
| `response_capture` | two capture flip-flops per output line |
| `two_rail_cell`, `two_rail_checker` | 2-rail checker cell and balanced tree |
| `tester_ctrl` | P/L sequencer of the tester |
| `low_cost_tester` | the production tester |
| `dest_calc` | destination for a source and counter value |
| `sync_fifo` | buffer used by `node_port` |
| `node_port` | a processor's transmit and receive buffers |
| `central_control` | request arbitration, switch settings, session timing |
| `online_test_agent` | per-processor on-line test routine |
| `omega_min_system` | top: network, control, ports, tester, agents |

Parameters of the top: `N_PORTS` (n, a power of two, default 8), `M` (default 8) and
`DEPTH` (transmit words, default 4). Reset is asynchronous and active low.

## Simulation and verification

Each module has a self-checking testbench `tb/<module>_tb.sv`. Each ends with a line
`TB_RESULT checks=… failures=…`. With Verilator 5:

```
verilator --binary --timing -Irtl rtl/omega_pkg.sv tb/omega_min_system_tb.sv \
          -y rtl -y tb --top-module omega_min_system_tb
./obj_dir/Vomega_min_system_tb
```

The testbenches show the following:

* `tb/slow_min.sv` is a test-only network model that injects a delay fault. It can
  make one destination line, or one switch control input, act a clock period late.
* `low_cost_tester_tb` and `online_test_agent_tb` run the full 8x8 test on that
  model:
  * fault free, all checks pass;
  * a late destination line fails both the P and the L checks;
  * a late control input of any of the 12 switches fails the L checks, and only the
    L checks at the tester.
* `omega_min_system_tb` runs the top at its default parameters:
  * normal traffic, including blocked permutations that need retries and
    deliberate conflicts;
  * the production test, which must make exactly 44 checks;
  * the on-line test;
  * normal traffic again.
* `omega_sizes_tb` repeats the production and on-line tests at n = 4 and n = 16.
  They make 20 and 92 tester checks, which is 2(3n−2).

`central_control` carries assertions for the session rules: only requesting
sources are granted, no destination is granted twice, and the switch settings do
not change during a transfer. `sync_fifo` checks its fill count, and `omega_min`
rejects an `N_PORTS` that is not a power of two when it is elaborated. Run with
`--assert` to enable the assertions.

These delay faults are modelled as whole-period delays in a zero-delay simulation.
The RTL shows that the sequences and checks catch a late transition. It says nothing
about real timing margins, which need gate-level timing simulation or silicon.
