# InOutInterlock WCHB: a fault-filtering buffer for QDI pipelines

Quasi delay-insensitive (QDI) circuits have no clock to sample data at one
instant. A stage accepts a dual-rail token whenever its rails say so. A
transient fault that raises a rail during that acceptance window looks just
like real data. The worst case is a stage that already holds valid data on one
rail and is waiting for the next stage's acknowledge (bubble-limited
operation). A fault on the opposite rail then arrives before the acknowledge.
When the acknowledge comes, a plain weak-conditioned half buffer (WCHB)
captures both rails at once and stores the illegal code word (1,1). The
*Interlocking* WCHB cross-couples the two storage C-elements so that the first
stored rail locks out the other. That lock takes a gate delay, though, and
when both rails are already waiting it comes too late.

The **InOutInterlock WCHB** adds a filter in front of the storage C-elements.
The filter locks out the second rail on the raw input wires, before the
acknowledge arrives, and it also swallows short pulses. This repository holds
that buffer as a gate-level SystemVerilog netlist, plus a multi-bit pipeline
stage and a linear pipeline built from it. The gates have simulation delays,
so the filtering can be watched and tested in an ordinary event-driven
simulator.

## Dual-rail conventions

Each bit `x` is a pair of rails `dr_t {r1, r0}` (`qdi_pkg`):

| r1 r0 | meaning |
|-------|---------|
| 0 0   | NULL (spacer between tokens) |
| 0 1   | LO   |
| 1 0   | HI   |
| 1 1   | illegal code word |

Transfers use the 4-phase return-to-zero protocol. The sender drives a valid
word and the receiver raises its acknowledge. The sender then returns to NULL
and the receiver drops the acknowledge. In this design every acknowledge is
active high and means "I hold your word" (the `ack` of a stage is the
completion signal of the stage after it).

## One bit of the buffer: three checks per rail

`ioil_wchb_bit` holds one dual-rail bit. Each rail `r` passes through three
cells. In this section `o` names the opposite rail.

1. **Input filter**, `in_filter_mce`. This is an asymmetric C-element. Its
   normal input is the raw rail `d.r`. Its "+" input is the inverted raw
   opposite rail `d.o`.

       f.r rises when d.r = 1 and d.o = 0
       f.r falls when d.r = 0
       otherwise f.r holds

   The lock-out acts on the input wires themselves. Whichever rail rises first
   keeps the other cell from rising, with no gate delay between them. If both
   rails rise in the same instant, neither is captured. The stage then simply
   waits until the fault has gone, which costs time but stores no wrong code.

2. **Glitch filter**, a NAND of `d.r` and `f.r`:

       n.r = NOT(d.r AND f.r)       (active low)

   `f.r` reacts only after the input C-element's delay `T_IN`. So the NAND
   sees both of its inputs high only if the raw pulse lasts longer than
   `T_IN`. A pulse shorter than that never leaves the filter.

   The raw rail also goes straight into the NAND. A fault pulse that did get
   past the input C-element is therefore withdrawn as soon as the raw rail
   drops, without waiting for `f.r` to fall. This *flush* matters when the
   stage is blocked: the pulse passes through the filter and disappears again
   before the acknowledge lets the storage cell fire.

3. **Output interlock**, `out_interlock_mce`. This is the storage C-element.
   Its normal inputs are `n.r` and `ack`, its negative input is the opposite
   stored rail `q.o`, and its output stage inverts.

       q.r rises when n.r = 0 and ack = 0 and q.o = 0
       q.r falls when n.r = 1 and ack = 1
       otherwise q.r holds

   This is the ordinary WCHB rule "store when there is data and the next stage
   is empty", written in the inverted data domain. No acknowledge inverter is
   needed because the NAND already inverts the data. The `q.o = 0` term is the
   interlock of the Interlocking WCHB. It now only has to catch what gets past
   the input filter, such as a fault that hits a NAND output directly.

Forward latency from an input rail to `q` is `T_IN + T_NAND + T_OUT`. With the
default delays that is 30 + 10 + 30 = 70 ps.

What the buffer does **not** fix is a fault in token-limited operation that
raises the wrong rail *before* the real data arrives. The first rail wins, so
a wrong value is stored, but never an illegal code. A fault that drops a
stored rail, or a storage node forced outright, can still give a wrong value
or stall the pipeline.

## Stage and pipeline

`ioil_wchb` places `WIDTH` bit cells side by side. They share the
acknowledge `ack_in` from the next stage. A completion detector
(`completion_tree`) drives `ack_out` to the previous stage. It ORs each bit's
two rails and joins the results in a balanced tree of two-input C-elements
(`c_element`). So `ack_out` rises only when every bit holds a code word and
falls only when every bit is NULL again.

`ioil_pipeline` is the top. It chains `STAGES` such stages into a FIFO:

| port       | dir | type              | meaning |
|------------|-----|-------------------|---------|
| `rst`      | in  | logic             | active-high reset. It empties every stage; keep `in_data` NULL while it is high. |
| `in_data`  | in  | `dr_t [WIDTH-1:0]`| word from the source |
| `in_ack`   | out | logic             | acknowledge to the source |
| `out_data` | out | `dr_t [WIDTH-1:0]`| word to the sink |
| `out_ack`  | in  | logic             | acknowledge from the sink |

Like any WCHB chain, `STAGES` stages hold at most `ceil(STAGES/2)` distinct
words, since each word needs a NULL spacer stage. When the sink stalls, the
stages settle alternately full and empty. The first stage then sits empty but
blocked by the full stage behind it. That is exactly the bubble-limited
situation the input filter is built for.

Parameters (defaults in brackets):

| parameter | meaning |
|-----------|---------|
| `STAGES` [4] | pipeline depth |
| `WIDTH` [8] | dual-rail bits per word. The buffer is meant for 4- and 8-bit datapaths, and 8 covers both. |
| `T_IN` [30 ps], `T_NG` [10 ps], `T_OUT` [30 ps], `T_C` [20 ps] | delays of the input C-element, NAND, storage C-element and each completion gate |

## How the netlist is modelled

* Each state-holding cell is written as its gate equation with its output fed
  back, for example `y = ab + y(a+b)` for the C-element. That loop is the
  cell's keeper. Synthesis therefore reports combinational loops, one per
  C-element, and this is intended. For a real implementation, map the cells
  onto library C-elements and keep the netlist hand-placed. A synthesis tool
  must not be allowed to restructure it, because QDI correctness depends on
  the gate structure, not only on the Boolean function.
* Every gate drives its output through `assign #(DLY)`. Simulators treat this
  as an inertial delay, so an input pulse shorter than a gate's delay does not
  move that gate's output. Synthesis ignores the delays. The default values
  are only placeholders that fix the relative speeds. The filter threshold is
  `T_IN`, so to model a technology, set the delays to its gate delays.
* All cells have an active-high reset that clears them to the empty state. A
  QDI pipeline needs one, but the buffer's description does not show it.
* Files: `qdi_pkg` (types, code classification, default delays),
  `c_element`, `in_filter_mce`, `out_interlock_mce`, `ioil_wchb_bit`,
  `completion_tree`, `ioil_wchb`, `ioil_pipeline`.

## Where this departs from, or goes beyond, the buffer's description

* The netlist follows the buffer's published description, which lists its
  parts rather than every connection: asymmetric input C-elements with
  one "+" and one normal input, NAND glitch filters, storage C-elements with
  two normal and one negative input, and no acknowledge inverter. Two details
  are this design's reading:
  * The "+" input of the input C-element is taken from the raw opposite rail,
    because the description stresses that the input lock-out acts without
    delay. Driving it from the opposite cell's output would be the other
    possible reading.
  * The negative input of the storage cell gates the rising edge of `q`,
    through the inverting output stage.
* The completion detector, the reset, the gate delays, the stage count and
  the active-high acknowledge are this design's choices.
* The two comparison buffers, the plain WCHB and the Interlocking WCHB, are
  not included. To reproduce the Interlocking WCHB from `ioil_wchb_bit`,
  remove the input C-elements and NANDs, feed the raw rail and the inverted
  acknowledge into the storage cells, and move the interlock to a "+" input.
* The buffer was originally evaluated inside pipelined arithmetic circuits:
  an adder, an ALU, a pipelined and an iterative multiplier, and an IIR
  filter, in DIMS and NCLX logic styles. Their logic was never specified
  along with the buffer, so they are not built. The pipeline in this
  repository connects stages back to back with no function blocks in between.
* The reported area (about 25 % over a plain WCHB) and throughput (about 5 %
  slower) are properties of transistor-level cells. This RTL makes no claim
  about them.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it establishes |
|-----------|---------------------|
| `tb_qdi_pkg` | classification of all four rail patterns; encode and decode |
| `tb_c_element`, `tb_in_filter_mce`, `tb_out_interlock_mce` | each cell against a reference next-state rule over hundreds of random input steps; exact delay; short-pulse rejection; lock-out and interlock cases |
| `tb_ioil_wchb_bit` | 4-phase cycles and latency (70 ps). Also: a short glitch is filtered; a 300 ps fault on the opposite rail while waiting for the acknowledge is locked out; a 100 ps fault is flushed before the acknowledge; simultaneous rails are not captured; a NAND output forced low for 1 ns is held off by the output interlock; the output is never (1,1). |
| `tb_completion_tree` | with a width of 5 (an uneven tree), `done` rises only on the last valid bit and falls only on the last NULL bit |
| `tb_ioil_wchb` | 200 random words with random source and sink delays; order and value; `ack_out` consistent with the stored word; latency |
| `tb_ioil_pipeline` | top at default size, end to end. It runs token-limited and bubble-limited streams, a stall with the pipeline full, short glitches, flushes, input lock-out under a 500 ps fault, and output interlock under a 1 ns forced NAND fault. It counts each of these and fails if one never happens. It also checks that the first word crosses the empty pipeline in exactly 4 × 70 ps. |
| `tb_plf_fault_campaign` (with `plf_campaign_env`) | single-fault injection at pipeline load factors 1/4, 1/2, 1, 2 and 4, at 4 and 8 bits (see below) |

**Fault campaign.** `tb_plf_fault_campaign` runs two 4-stage pipelines side
by side, one 4 bits wide and one 8 bits wide, each driven by its own
`plf_campaign_env`. The pipeline load factor (PLF) is set as the ratio of the
sink's response time to the source's: below 1 is token-limited, above 1 is
bubble-limited. For each PLF and width, the environment does a fault-free run
plus 300 runs of 6 words. Each run forces one randomly chosen signal to a
random value for 5 to 300 ps at a random moment. The possible signals are an
input rail, or one of the nodes of bit 0 of the second stage: input rails,
filter outputs, NAND outputs, stored rails and acknowledge. Each run is
classified as masked, value error, code error or deadlock. The campaign
checks three things:

* Fault-free runs deliver every word.
* No fault on an input rail produces an illegal word at the output.
* Every input-rail pulse shorter than `T_IN` is fully masked.

In one run, 93 % to 99 % of the faulty runs were masked for every PLF and
width. There were no code errors at all: even a stored rail forced high
inside the second stage is stopped by the input filter of the third stage.
The other runs were value errors and deadlocks. They came mostly from faults
forced directly onto stored rails, NAND outputs and the acknowledge.
Deadlocks were most frequent at PLF 4, where the stages spend the longest
time waiting on the acknowledge. The fault widths are scaled to the
placeholder gate delays, so these rates show the mechanisms at work and do
not predict silicon behaviour.

Running a testbench with Verilator 5 (the gate delays need `--timing`; the
testbenches use run-time delay values, which Verilator warns about, hence
`-Wno-fatal`):

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/qdi_pkg.sv tb/tb_ioil_pipeline.sv --top-module tb_ioil_pipeline -o sim
    ./obj_dir/sim

Swap in any other testbench name. All of them finish within about half a
minute; the fault campaign is the longest.
