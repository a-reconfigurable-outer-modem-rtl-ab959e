# Reconfigurable outer-modem platform: trellis decoder processors on a mesh network

Mobile and wireless standards use many different convolutional and turbo codes.
They differ in constraint length, rate, polynomials, block size and throughput.
This design puts sixteen small decoder processors (dr-ASIP nodes) on a 4 x 4 mesh
network-on-chip instead of building one hard-wired decoder per code. Each node
runs the Viterbi algorithm or the Log-MAP algorithm for any binary convolutional
code with constraint length Kc = 3..9, one to four code bits per information bit,
any generator polynomials and at most one feedback polynomial. The code is not
part of the command. It sits in a configuration register set that can be
replaced within one clock cycle. Nodes can work alone, one block each, or as a
cluster on one turbo-code block. In a cluster, every extrinsic value a node
produces goes as a one-flit packet to the node and address that need it next,
in interleaved order.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. Every module has a
self-checking testbench. Two testbenches run the full 4 x 4 platform: one
exercises every mechanism, the other decodes noisy turbo and GSM blocks.

## Contents

| file | what it is |
|---|---|
| `rtl/omp_pkg.sv` | shared types: flit, node address, packet classes, command word, code configuration, max / max* arithmetic |
| `rtl/omp_top.sv` | 4 x 4 mesh of `router` + `dr_asip_node`, two `io_if` |
| `rtl/dr_asip_node.sv` | one node: core, code control, CV memory, 2 IO memories, IL/DIL, network interface |
| `rtl/dr_asip_core.sv` | command sequencer and shared trellis datapath |
| `rtl/bmu.sv`, `rtl/acs16.sv`, `rtl/llr_unit.sv` | branch metrics, 16 add-compare-select lanes, pipelined soft output |
| `rtl/smm.sv` | single-ported state metric memory, 16 metrics per word, 64 words |
| `rtl/code_ctrl.sv` | working and shadow channel-code configuration |
| `rtl/ildil.sv` | interleaver / deinterleaver address mapping, builds the one-flit interleaver packets |
| `rtl/net_if.sv` | network interface of a node |
| `rtl/router.sv`, `rtl/vc_fifo.sv` | five-port, two-virtual-channel router and its queues |
| `rtl/io_if.sv` | host-side interface on a boundary router |
| `rtl/dp_ram.sv` | dual-ported synchronous RAM (CV and IO memories) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_omp_top` (end to end) and `tb_workloads` (turbo and GSM decoding with noise) |

## The trellis and its arithmetic

Everything in the datapath follows one convention, so it comes first.

* **State.** The encoder state `s` has m = Kc-1 bits. Bit 0 is the most recent
  register. The bit shifted in is `b = u ^ parity(fb & s)`, where `u` is the
  information bit and `fb` is the feedback polynomial. Bit j of `fb` taps
  register j, and `fb = 0` gives a feed-forward code. Code bit i is
  `parity(gen_i & {s, b})`, so bit 0 of a generator taps the register input.
  A systematic output of a recursive code is written as `gen = fb | 1`.
* **Butterflies.** The new state is `ns = {s, b}` truncated to m bits. Its two
  predecessors are `ns >> 1` and `(ns >> 1) + N/2`, and the branch bit is
  `ns[0]`. So the 16 new states `16g .. 16g+15` need the old states
  `8g .. 8g+7` and `N/2 + 8g .. N/2 + 8g+7`. That is half of each of two
  16-metric memory words. The load-store mode depends on this.
* **Metrics.** Channel values are signed 8-bit log-likelihood ratios in units
  of 1/4 nat. A positive value means the code bit is more likely 1. A branch
  metric is the sum of the channel values whose code bit is 1, plus the
  a-priori value when `u = 1`. This differs from the usual symmetric form
  only by a constant per step, which cancels in both algorithms. State
  metrics are 16 bits and are compared modulo 2^16, by the sign of their
  difference. So they are never normalised. Viterbi uses `max`. Log-MAP uses
  `max*(a,b) = max(a,b) + ln(1+e^-|a-b|)`, with the correction read from a
  four-step table in the same units (3, 2, 1, 0 for |d| = 0, 1..3, 4..8, >8).

## Inside a node

```
            network interface (port B of every memory)
      ┌──────────┬──────────┬──────────┬──────────┐
   CV memory  IO mem 0   IO mem 1   IL/DIL tables  shadow config ──swap──► working config
      │          │          │          ▲                                   │
      └──────────┴────┬─────┘          │ extrinsic values                  ▼
                      ▼                │                          (code parameters)
            core: bmu ─► acs16 ─► metric register / SMM ─► llr_unit
```

### Viterbi decoding (`OP_VA`)

* **Up to 16 states (Kc <= 5).** All path metrics sit in one register. Each
  cycle, one trellis step goes through the branch metric unit and the 16 ACS
  lanes, and its 16 survivor bits are written to IO memory 0 at address `t`.
  The channel values of the next step are fetched in the same cycle, so the
  recursion runs at one step per cycle.
* **More than 16 states (Kc = 6..9): load-store mode.** The path metrics live
  in the state metric memory (SMM), in two banks of N/16 words, old and new.
  Each group of 16 new states takes 4 cycles on the single SMM port:
  1. read the word with predecessors `8g..8g+7`;
  2. read the word with predecessors `N/2 + 8g..`;
  3. run the ACS lanes;
  4. write the new word, and write the 16 survivor bits to IO memory 0 at
     `t*G + g`.

  A 256-state step therefore takes 16 x 4 = 64 cycles. The banks swap after
  each step.
* **Trace back.** Decoding starts from state 0, so the block must be
  terminated with m tail bits. The trace back reads one survivor bit per step
  (2 cycles per step) and recovers `u` from the state bits and the feedback
  polynomial. It packs the decoded bits 16 per word into IO memory 1: bit t is
  bit t%16 of word t/16.

### Log-MAP decoding (`OP_MAP`, `OP_MAPB`, up to 16 states)

One window of up to 64 steps (the SMM depth) runs in two passes:

1. **Forward recursion.** One step per cycle. Each alpha vector is stored in
   the SMM at address t.
2. **Backward recursion.** One step per cycle. In the same cycle the stored
   alpha, the current beta and the branch metrics go to `llr_unit`.

The LLR unit reduces all 2N edges with max* in two trees, one for u = 0 and
one for u = 1. A register cuts the trees after their second level, so the LLR
is ready two cycles later. The extrinsic value is `L - la - y_sys`. The
a-priori values are read from the IO memory named in the command.

Each command describes its window, so that a long block can be cut into
windows:

* Alpha starts in state 0, or with all states equal when the window does not
  begin the block (`a_open`).
* Beta starts with all states equal at step `len + acq - 1`. With an
  acquisition length `acq` > 0 the backward pass first runs over the `acq`
  steps that follow the window, with no soft output and without touching the
  SMM. Those steps must be in the CV and IO memories. When it reaches the
  window end, beta is close to what a full-block recursion would give. With
  `acq` = 0 the window end is treated as an unterminated block end.

Each extrinsic value leaves the core with its global index (`base + t`). In
`ildil` the index selects a table entry giving the target node and the local
address there. This is done either through the interleave table or through the
deinterleave table. The result is a one-flit packet:
`{node, bank, address, value}`.

The receiving node's network interface writes the value straight into the
named IO memory. The core of that node then reads this memory as its a-priori
input in the next half-iteration, while its other IO memory collects the next
set of values. Which memory plays which role is chosen per command (`bank`,
`ext_bank`).

### Channel-code configuration

`code_ctrl` holds two complete configuration sets (Kc, number of channel
values, feedback polynomial, four generators, systematic index). The network
writes only the shadow set. A write to configuration address 15 copies the
shadow set into the working set in one cycle. A node can therefore load the
next code while it is still decoding with the current one.

## Network

* **Flits.** A flit is `{vc, head, tail, data[31:0]}`.
* **Two packet types, each on its own virtual channel.**
  * Interleaver packets are one flit on virtual channel 0:
    `[31:27]` target node, `[26]` bank, `[25:16]` address, `[15:0]` value.
  * Data packets use virtual channel 1. Flit 0 holds the target `[31:27]`,
    the class `[26:23]`, the payload length `[22:13]` and the source
    `[12:8]`. Flit 1 holds the local address `[9:0]`. Then come `length`
    payload flits.
* **Node address.** `{io, y, x}`. With `io = 1` the packet leaves the target
  router towards its IO interface: west in column 0, otherwise east.
* **Router.** `router` has five ports (local, N, E, S, W) and a 4-flit queue
  per port and virtual channel.
  * Routing is x first, then y.
  * Each output grants one of its ten input queues per cycle, round robin.
  * A data packet holds its output virtual channel from head to tail
    (wormhole). Interleaver flits can still use the same physical link in the
    cycles between.
  * Flow control is a valid signal plus one ready per virtual channel.
* **Traffic classes.** Interleaver traffic never waits behind a long
  channel-value transfer, because the two classes are separate virtual
  networks.
* **IO interfaces.** IO interface 0 is on the west port of router (0,0). IO
  interface 1 is on the east port of router (3,3).

## Programming the platform

Everything reaches a node as data packets. The class field says where the
payload goes:

| class | payload goes to |
|---|---|
| 0 `PC_CV` | CV memory from the header address on, one trellis step (4 x 8 bit) per flit |
| 1/2 `PC_IOMEM0/1` | IO memory 0/1 (low 16 bits) |
| 3 `PC_CFG` | shadow code registers: 0 `{ncv, k}`, 1 fb, 2-5 gen0-3, 6 `{sys_en, sys_idx}`; 15 = swap |
| 4 `PC_ILTAB` | IL/DIL table: bit 31 selects interleave / deinterleave, bits 14:0 = `{node, address}` |
| 5 `PC_CMD` | command words (`cmd_t`): `[31:30]` op (VA, MAP, SEND, MAPB), `[29]` bank, `[28]` table select, `[27]` target bank, `[26]` alpha open, `[25:16]` length, `[15:10]` acquisition length, `[9:0]` base / target |
| 6 `PC_RESULT` | sent by nodes: result words |

There are four commands:

* `OP_VA` decodes `len` steps.
* `OP_MAP` runs one Log-MAP window of `len` steps. A-priori values come from
  IO memory `bank`. Extrinsic values go through table `il_sel` to target bank
  `ext_bank`, with global indices from `base` on. `acq` and `a_open` set up
  the window edges as described above.
* `OP_MAPB` runs the same window with the backward recursion (and its
  acquisition) first. Beta goes to the SMM, and the soft output is computed
  during the forward recursion, in ascending step order.
* `OP_SEND` returns `len` words of IO memory `bank` to node `base[4:0]`. It
  starts only when the core is idle, so `VA` followed by `SEND` returns that
  decoding's bits.

A node holds one waiting command. Further command flits are back-pressured
until the core takes it.

Typical Viterbi job:

1. Write CFG registers 0..6.
2. Write CFG 15 to swap in the new code.
3. Load the CV memory.
4. Send the commands `VA` and `SEND` to an IO address.

## Timing

| operation | cycles |
|---|---|
| Viterbi, N <= 16 states, L steps | L + 2 (recursion) + 2L (trace back) + 2 |
| Viterbi, N = 16G states (G = 2..16) | G (metric init) + 4GL + 2L + 2 |
| Log-MAP window (either order), L <= 64 steps, A acquisition steps | 2L + A + about 5 (two recursions, soft output during the second) |
| router hop | 1 cycle after the flit is queued |
| configuration swap | 1 |

At Kc <= 5 this is 3 cycles per decoded Viterbi bit. Log-MAP takes 2 cycles per
bit and half-iteration. At Kc = 9 Viterbi takes 66 cycles per bit, because the
trace back is not overlapped with the next block.

## How far it can be trusted

These parts are verified bit-exact against independent models in the
testbenches:

* the branch metrics, the ACS lanes, the state metric memory and the code
  control;
* Viterbi decoding for Kc = 3, 4 (recursive), 5 (rate 1/4), 7 and 9
  (rate 1/3), with channel errors corrected, and with exact cycle counts.

Log-MAP is checked against a reference forward-backward recursion, for a
whole block and for an inner window with acquisition, with the extrinsic
values within ±3 (in practice ±1). The rounding of the final max*
tree differs from the reference. The router is checked under random traffic
and back-pressure: routing, order, no mixing of packets, no loss.

`tb_workloads` decodes noisy blocks end to end, with sigma = 0.95 for the
turbo code and 0.6 for GSM. Four 40-bit UMTS turbo blocks (18 systematic bits
received wrong), two 128-bit blocks split into two windows per component
(37 wrong) and one 512-bit block on all 16 nodes (80 wrong) are decoded
without error after 5 iterations. A GSM Kc = 5 block
(24 code bits wrong) is also decoded without error. That is a handful of
blocks, not a bit-error-rate curve. The fixed-point widths (8-bit channel values, 16-bit
metrics) have not been tuned for any standard.

## Departures from the architecture it implements

* **Commands instead of instructions.** The published processor is
  programmed through an instruction set with two nested zero-overhead loops,
  branches and interrupts, and an 11-stage pipeline. That instruction set is
  not available. Here the core runs whole tasks (VA, MAP window, SEND), and
  there is no program memory.
* **Windowing.** Either recursion can run first, but acquisition exists only
  for the backward recursion, after the window. There is no forward
  acquisition and no hand-over of state metrics from one window or iteration
  to the next. At
  the start of an inner window alpha is only "all states equal", which costs
  some decoding performance there. A MAP command always starts at CV
  address 0, so a node runs one window per half-iteration. The platform thus
  decodes turbo blocks of up to 16 x 64 = 1024 bits. The largest UMTS block
  (5114 bits) does not fit.
* **Log-MAP for more than 16 states is not built.** Only Viterbi uses the
  load-store mode.
* **No power-down** of unused lanes for small codes.
* **IO interfaces.** These carry a simple descriptor plus word stream, not OCP
  or AXI.
* **Memory sizes.** All memory sizes (1024 words) and all field layouts are
  choices of this design.
* **Survivor storage is not windowed.** A Viterbi block is limited by IO
  memory 0 to 1024 / G steps: 1024 steps for Kc <= 5, 64 steps for Kc = 9.
  UMTS convolutional blocks at Kc = 9 (up to about 500 bits) do not fit in
  one command. The GSM (Kc = 5, 189 bits) and 40-bit UMTS turbo blocks do.
* **Interleaver traffic analysis.** The platform is sized so that uniform
  random interleaver traffic loads the bisection of a 4 x 4 mesh to about
  0.11 x 4 = 0.44 flits per cycle when all 16 nodes emit at once. In the
  512-bit workload only the eight nodes of one component emit at a time. Their
  measured mean load is 0.151 flits per cycle per bisection channel, counted
  over the interleaving phases including command gaps, and no value is lost.
  A saturation sweep of the network has not been done.

## Simulating

Each testbench is standalone. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/omp_pkg.sv tb/tb_dr_asip_core.sv \
          --top-module tb_dr_asip_core -o sim && obj_dir/sim
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself; a
watchdog ends it with a failure if it hangs.

`tb_omp_top` runs the whole 4 x 4 platform at its default size with three jobs
at once:

* a Kc = 9 Viterbi decode with its result sent to IO interface 1, whose host
  back-pressures at random;
* a Log-MAP half-iteration whose extrinsic values are interleaved to two other
  nodes, sharing links with a channel-value transfer;
* a Kc = 3 Viterbi decode returned to IO interface 0.

It checks that each mechanism occurred and prints how often. Building it takes
about two minutes; it runs in under a second.

`tb_workloads` also runs on the full platform. Its channel is BPSK with
Gaussian noise, quantised to the 8-bit LLR format.

* A turbo decoder cluster works on UMTS blocks. Nodes in column 1 decode the
  first component code and nodes in column 2 the second. Their IL/DIL tables
  send the extrinsic values straight into the IO memory of whichever node owns
  that position in the other order, alternating banks each iteration. The
  permutation is pseudo-random, not the UMTS interleaver. The host only
  issues commands and, at the end, fetches the extrinsic banks with `SEND`.
  * 40-bit blocks use one node per component.
  * 128-bit blocks use two nodes per component, one 64-step window each. The
    first window acquires over 16 steps of the second. The second window
    starts with all states equal.
  * A 512-bit block uses all 16 nodes, eight windows per component, with the
    two components on a checkerboard. The interleaver flits that cross the
    two bisections of the mesh are counted.
* A GSM full-rate block (Kc = 5, 189 bits) is decoded on node (0,3) at the
  same time.

It prints the bit errors after each turbo iteration.
