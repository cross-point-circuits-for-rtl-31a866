# Cross-point circuits: switch, configurable memory, PUF, SONOS flash and adiabatic FRAM in SystemVerilog

A cross-point circuit is a grid of horizontal and vertical wires with a small
circuit at every crossing. A crossbar switch, a memory array and a CAM are all
cross-point circuits. What is interesting is where the decision logic sits:
inside the crossings, on the shared wires, or in the periphery that drives
them. The thesis *Cross-point Circuits for Computation, Interconnects,
Security and Storage* describes five such circuits, and this repository gives
RTL for their digital parts:

| Design | What it does | Top module |
|---|---|---|
| **Hi-Rise** | 64-port crossbar split over 4 stacked layers, with a fair class-based arbiter | `hirise_switch` |
| **Configurable memory** | one 6T SRAM array that also works as a binary CAM, a ternary CAM or a bit-wise logic unit | `cfgmem` |
| **Sequence-dependent PUF** | rows of that SRAM opened in pairs, so the response depends on the order of a challenge sequence | `seq_puf` |
| **Wide-write SONOS flash** | write state machine and bit-line rail selection for 1024-bit-wide programs, plus the 64-bit read path | `sonos_program_ctrl`, `sonos_bl_select`, `sonos_read_path` |
| **Adiabatic FRAM** | bit-line sequencer that takes every bit-line swing from a resonating plate-line | `fram_ctrl`, `fram_colmux` |

`crosspoint_top` places all five side by side with prefixed ports (`hr_`,
`cm_`, `pf_`, `sn_`, `fr_`). They share only `clk` and `rst_n`, because the
thesis treats them as separate chips. The analog parts (TSVs, charge pumps,
the LC tank, cell physics) are not RTL. They appear as inputs, as outputs, or
as the behavioural models named below.

Hi-Rise takes most of this text: its arbitration is the least obvious part
and the part where this design departs from the thesis.

---

## 1. Hi-Rise: a 3D high-radix switch

### 1.1 Structure

The switch has N = 64 inputs and 64 outputs on L = 4 layers, 16 of each per
layer. A flat 64x64 crossbar folded over four layers would need a TSV for
every row that crosses a layer. Hi-Rise instead makes every pair of layers
talk through a few dedicated **layer-to-layer channels (L2LCs)**, C = 4 per
ordered layer pair. Each layer has two stages:

* **Local switch** (`hirise_local_switch`), 16 x 28. It connects the layer's
  16 inputs to 16 *intermediate outputs*, one for each final output on the
  same layer, and to C*(L-1) = 12 outgoing L2LCs, four towards each other
  layer.
* **Inter-layer switch**: 16 sub-blocks (`hirise_clrg_subblock`), one per
  final output. Each is a 13 x 1 switch. Its 13 sources are the layer's own
  intermediate output for that port and the 12 L2LCs arriving from the other
  three layers.

`hirise_layer` wires one local switch to its 16 sub-blocks.
`hirise_switch` wires four layers together through the L2LC bundles.
Output `q` is on layer `q / 16`, port `q % 16`. Input `p` is numbered the
same way.

A request from input *p* for output *q* takes one of two paths:

* If *q* is on *p*'s layer, the request goes to the local intermediate
  output for *q*, then into *q*'s sub-block.
* Otherwise it goes to one of the four L2LCs towards *q*'s layer, which
  carries the requested port number, then into *q*'s sub-block on that
  layer.

### 1.2 Channel allocation: input binning

With four channels towards a layer, each input needs a rule for which channel
it may use. This design uses the thesis's preferred *input binned*
allocation:

* Channel *k* towards a given layer serves the four local inputs *i* with
  `i % 4 == k`.
* The interleaving keeps neighbouring inputs, which are often busy together,
  off the same channel.
* Each L2LC column of the local switch therefore arbitrates among only 4
  inputs.
* An intermediate-output column arbitrates among all 16.

The thesis also describes output binning and a priority-mux allocation.
Neither is built.

### 1.3 Arbitration in both stages, in one cycle

Every output column of both stages has a **least-recently-granted (LRG)
matrix arbiter** (`lrg_arbiter`). In silicon, its priority bits sit in the
cross-points of that column.

The whole decision completes in the cycle the request is seen:

1. The local stage picks a winner per column.
2. The winner's input index (`*_pid`) travels with its request to the
   sub-block.
3. The sub-block picks the final winner and returns a `*_win` signal.

The local LRG order is updated only when the local winner also wins the
second stage. An input that lost further on is not pushed to the back of
its local queue.

In silicon this is the two-phase pre-charged evaluation. Here it is
combinational logic between two clock edges.

### 1.4 CLRG: why plain LRG is unfair, and what the class counters do

Plain LRG in the sub-block is fair *between sources*, not between
*inputs*. Suppose four inputs share one L2LC and a fifth input arrives on
another. The sub-block alternates between the two channels. The lone input
gets half of the output, and the four others share the other half.

The thesis's adversarial example is exactly this: inputs 3, 7, 11 and 15 on
layer 1 and input 20 on layer 2, all to output 63.

**Class-based LRG (CLRG)** fixes this. Each sub-block keeps a 2-bit
thermometer counter for each of the 64 primary inputs that can reach it. The
counter codes 00, 01 and 11 are three priority classes. In each cycle:

* Among the requesting sources, only those whose *primary input* has the
  lowest class compete.
* The LRG arbiter across the 13 sources breaks ties among them.
* The winner's counter moves up one class.
* The LRG order is updated on every grant.

An input that has just been served therefore waits behind inputs that have
not been served, whichever channel they use. With the adversarial pattern,
each of the five inputs gets exactly one grant in every five. The testbenches
check this.

**Saturation — a deliberate departure.** The thesis says that when any
counter saturates, all counters in that sub-block are divided by two. Two
readings are possible:

* *Halve every counter, the winner's included.* The winner at 11 drops to
  01, level with or ahead of inputs it has just beaten. The 1-in-5 rotation
  of the adversarial pattern then breaks.
* *Halve all the other counters and keep the winner at 11.* This design does
  this. "Saturation" here means a win by an input already at 11. The class
  order is preserved and the adversarial pattern stays fair.

The exact winner order also differs from the thesis's example. There each
input is served once per five grants, starting 20, 15, 11, 7, 3. Here the
starting point depends on reset order and LRG state.

`out_class_win` is an observation output. It is high when a grant was
decided by class, i.e. some requester was excluded because it was in a
higher class.

### 1.5 Connection protocol

The thesis says only that request and release travel on two extra bit-lines.
The handshake below is this design's own. Per input:

* Hold `in_req` with `in_dest` until `in_grant` pulses. The grant is
  combinational in the request cycle; the connection is registered at that
  clock edge.
* While `in_connected`, the flit (`in_valid`, `in_data`, 128 bits) appears
  on `out_valid` and `out_data` of the connected output in the same cycle.
* Raise `in_release` in the last cycle. The path is free in the next cycle.

Each output reports `out_busy` and `out_src`. An output held by a connection
takes no new grant. Requests from a connected input are ignored.

### 1.6 Verification

* `tb_lrg_arbiter` compares the arbiter with an ordered-list model.
* `tb_hirise_local_switch` checks the binning, back-propagated update and
  protocol against a model.
* `tb_hirise_clrg_subblock` checks class order, tie-breaking, halving and
  1-in-5 fairness.
* `tb_hirise_switch` runs the full 64-port switch with:
  * uniform random traffic, with flit checks at every output;
  * hotspot traffic (all inputs to output 63), which must give class-decided
    grants;
  * the adversarial pattern, which must be fair;
  * a check that an isolated request is granted in its first cycle.

---

## 2. Configurable memory: SRAM, BCAM, TCAM and logic in one array

### 2.1 Idea

A 6T cell has two access transistors, one on the bit-line (BL) side and one
on the bit-line-bar (BLB) side. This design splits the word-line in two,
WLR for the BL side and WLL for the BLB side, so the two can be opened
separately. It also splits each column sense amplifier into two single-ended
halves. The same 64 x 64 array then supports four modes:

* **SRAM.** Words are stored in rows. Both word-lines open together and one
  differential amplifier per column compares BL with BLB.
* **BCAM.** Each column stores one 64-bit word, one bit per row, so the
  array holds 64 words. A search key is put on the word-lines:
  * WLR = key bit opens the BL side of rows searching for a 1;
  * WLL = NOT key bit opens the BLB side of rows searching for a 0.

  A cell storing 0 under an open WLR pulls BL down. A cell storing 1 under
  an open WLL pulls BLB down. A column **matches when neither line
  discharges**. The two single-ended amplifiers sense BL and BLB, and the
  match is their AND. All 64 columns search in parallel in one cycle. The
  search mask closes both word-lines of a row, so that row is ignored.
* **TCAM.** Two adjacent columns hold one ternary word, so the array holds
  32 words. The TCAM match of word *w* is BL of column 2w+1 AND BLB of
  column 2w.
* **Logic in memory.** A search that opens only two rows computes a
  function of those rows in every column at once:
  * key bits 1,1: BL stays high where both rows hold 1, giving A AND B;
  * key bits 0,0: BLB stays high where both rows hold 0, giving A NOR B;
  * key bits 1,0: `sa_out` gives B and `sa_outb` gives NOT A, so a single
    read yields both, and their AND is A AND NOT B.

### 2.2 Writing a column

A CAM word lies in a column, so writing one means writing one cell in each
of 64 rows at once. That works only if every row's cell in that column takes
the same bit-line value at the same time.

* **BCAM write, 2 cycles.**
  1. Open the rows whose new bit is 1 and drive the column to 1.
  2. Open the rows whose new bit is 0 and drive it to 0.
* **TCAM write, 3 cycles.** The 1s, then the 0s, then the don't-cares, as
  shown in the table below.

Columns that are not driven keep their data. In silicon this relies on an
under-driven word-line and a raised cell supply (Vdd_Lo). The array model
takes disturb-free operation as given.

### 2.3 TCAM cell code — a choice between two statements

| stored | column 2w | column 2w+1 |
|---|---|---|
| 0 | 0 | 0 |
| 1 | 1 | 1 |
| X | 0 | 1 |

The thesis's prose says an X stores 1 in both positions. Its write-sequence
table, however, writes 11, then 00, then 01. This design follows the table.

With this code, an X cell discharges neither sensed line for either key
value. The match uses BL of the odd column and BLB of the even column. A 1
in both columns would discharge BLB of the even column when the key is 1.

### 2.4 Modules and timing

* `cfgmem_ctrl` turns commands into word-line, column-driver and
  sense-amplifier settings. Its header has the full table of settings.
* `cfgmem_array` is a functional model of the cells with wired-AND
  bit-lines.
* `cfgmem_sense_amp` holds the reconfigurable amplifiers.
* `cfgmem` is the complete block.

A command is taken on `cmd_valid && cmd_ready`. Drive cycles start on the
next clock. `res_valid` comes one cycle after the single drive cycle of a
read or search. Searches and SRAM accesses run back to back at one per
clock. A BCAM write takes 2 cycles and a TCAM write 3.

---

## 3. Sequence-dependent PUF

A PUF turns manufacturing mismatch into a chip-unique response. This one
reuses the same SRAM:

1. Two rows are opened together with pre-charge and equalise released.
2. In every column where the two cells hold different values, they fight
   over the shared bit-lines.
3. The stronger cell wins, and both cells end with its value.

A challenge is a *sequence* of row pairs, for example (1,2), (2,3), (3,4).
Each fight changes the data the next fight starts from. The response, read
from a row at the end, therefore depends on:

* the initial data;
* the length of the sequence;
* the order of the sequence: (4,3), (3,2), (2,1) gives a different result.

`seq_puf` is the controller. It supports three commands:

* `CMD_WRITE` initialises a row.
* `CMD_SEQ` applies up to MAXSEQ = 4 pairs.
* `CMD_READ` returns a 64-bit row.

As in the thesis, the pre-charge (`preb`) and equalise (`eqb`) controls are
separate and each has an adjustable release point (`cfg_pre`, `cfg_eq`).
Equalise is held longer than pre-charge, so both cells fight without the
pre-charge devices helping either side. A pair takes `4 + cfg_eq` cycles.

`puf_array` is a **behavioural model**, not a circuit. Each cell gets two
hidden strengths, for holding 0 and for holding 1, from a hash of
`CHIP_SEED` and its position. A different seed stands for a different chip.
The model has no noise, so this RTL cannot reproduce the silicon's
bit-error rate and bias statistics. The thesis does not give the array size
of the PUF chip; 64 x 64 is assumed.

---

## 4. Wide-write SONOS flash: program path

SONOS cells program and erase by tunnelling, at very little current. This
lets the flash program a whole 1024-bit row at once: 1 Kb per program at
about 1 Mbps. The array is 1024 x 260.

The cost is moving 1024 bit-lines between rails near +1 V and -3.8 V. The
design saves that energy in two ways:

* It moves only the lines that change.
* It moves them through a dedicated transition pump that shares and recycles
  charge.

### 4.1 Rail selection (`sonos_bl_select`)

Each bit-line compares its new bit with the bit of the previous program and
picks one of four rails:

| previous | new | rail |
|---|---|---|
| same | same | stable: -3.8 V (program, data 0) or +1 V (inhibit, data 1) |
| 1 | 0 | falling rail |
| 0 | 1 | rising rail |

Lines whose data did not change stay on their stable rail and cost nothing.
The previous data register loads on `commit` at the end of a program. After
reset it reads all 1s, meaning everything inhibited. The block also counts
the rising and falling lines (`n_rise`, `n_fall`).

### 4.2 Write state machine (`sonos_program_ctrl`)

The state machine runs these phases in order:

1. **LOAD**: latch the row and its data.
2. **STEP1–STEP4**: move the changing lines in four steps.
   * Steps 1 and 2 let the transition pump move the rising and the falling
     rail.
   * Step 3 shorts the two rails together (charge sharing, `rail_short`),
     so half the swing comes free.
   * Step 4 charges one rail from the other through the pump (charge
     recycling, `rail_recycle`).
3. **SETTLE**: the lines move to their stable rails and the closed-loop
   pumps take over.
4. **PROGRAM**: the word-line is held at program level for `PROG_CYCLES`.
5. **DONE**: `commit` is pulsed.

`erase` runs a block erase of `ERASE_CYCLES`.

Every step, the settle and the entry into PROGRAM wait for `pump_ok`. In
silicon this is the comparator output of the charge-pump regulation loops,
so the state machine moves on only once the rails are stable.

The following are this design's own choices:

* what steps 1 and 2 do in detail;
* all cycle counts;
* `PROG_CYCLES = 1000`. The thesis gives 1 Kb at 1 Mbps, so about 1 ms per
  program, but no clock. 1000 cycles is 1 ms at an assumed 1 MHz.

### 4.3 Read path (`sonos_read_path`, behavioural)

* A 16:1 column mux selects 64 of the 1024 bit-lines: output bit *k* reads
  bit-line `16*k + col`.
* Each selected cell current is compared with a reference that tracks the
  row: (I_erase + I_program) / 2, or I_erase / 2 in erase verify.
* Currents are unsigned codes on input ports.
* Data is registered, with one cycle of latency.

The pumps, the reference cells and the array itself are analog and are not
modelled.

---

## 5. Adiabatic FRAM sequencer

In a ferroelectric 1T-1C memory, a cell is written by the voltage between
its bit-line (BL) and its plate-line (PL). Conventionally PL is pulsed and
BLs are driven hard, which dissipates C·V² on every swing. Here PL
*resonates* through an off-chip LC tank, and **every bit-line swing is taken
from that resonance**.

A bit-line does one of two things:

* It follows PL, with PLEN.
* It is clamped to a level with WREN.

It switches between the two only when its level equals PL's. Nothing is
ever driven abruptly.

Comparators turn PL's peak into a one-cycle `pu` strobe and its trough into
a `pd` strobe. `fram_ctrl` moves only on those strobes.

### 5.1 Row write: 1.5 resonance periods

Let X be PL's level at the first event E0: 1 at a peak, 0 at a trough.

| event | PL | word-line | group A (new bit = X) | group B (new bit = ~X) |
|---|---|---|---|---|
| E0 | X | on | clamp at X | follow PL |
| E1 | ~X | on | **written**: BL = X against PL = ~X | has reached ~X, clamp |
| E2 | X | on | rejoin PL | **written** |
| E3 | ~X | off | — | rejoin PL, row done |

A write takes three events, which is 1.5 PL periods. E3 has the opposite
level to E0, so the next row starts with the other polarity. The order of
writing ones and zeros therefore alternates from row to row, as the thesis
describes.

Columns with `col_en = 0` follow PL throughout and their cells see no field.
The exact event schedule is this design's reading of the thesis's
description.

### 5.2 Read with write-back

1. A read starts at a trough with a `pre` pulse, which discharges the
   enabled bit-lines. The word-line opens and the lines float.
2. As PL rises, the cell charge moves onto the bit-lines.
3. At the peak, `sa_en` is high, `sense_d` is captured, and the row is
   written back, because an FRAM read is destructive.

Read data (`rvalid`, `rdata`) appears at that peak. The write-back then runs
the write sequence starting from that peak.

### 5.3 1T-1C and 2T-2C (`fram_colmux`)

The physical row has 160 bit-lines, arranged as 80 column pairs. There are
two modes:

* **1T-1C**: 512 words of 80 bits. Only one column of each pair is used
  (`sel`), and it is sensed against `vref`.
* **2T-2C**: 256 words of 80 bits. True data goes in the even column and
  the complement in the odd column, and the two are sensed against each
  other. This gives more margin.

In `crosspoint_top`, the word address maps as follows:

* 1T-1C: row = address >> 1, column = address bit 0.
* 2T-2C: row = address.

---

## 6. Where this RTL departs from, or adds to, the thesis

* **CLRG saturation.** The winner stays at 11 and the other counters are
  halved; the thesis halves every counter. The serving order in the
  adversarial example differs, but the 1-in-5 share is the same (§1.4).
* **Hi-Rise handshake.** The request/grant/release protocol is this
  design's own. TSVs and two-phase pre-charged evaluation are ideal wires
  and one clock of combinational logic.
* **TCAM don't-care code.** X is stored as 01, following the write-sequence
  table rather than the prose (§2.3).
* **SONOS timing.** The program pulse length in cycles is assumed, as are
  all cycle counts of the transition steps.
* **FRAM schedule.** The per-event clamp schedule and the read/write-back
  timing are this design's. `pu` and `pd` are taken as clean strobes
  synchronous to `clk`.
* **Behavioural models.** `puf_array` and `sonos_read_path` stand for
  analog behaviour. Each says so in its first comment.
* **Not modelled.** Analog and physical parts: TSVs, dynamic pre-charge and
  sense circuits, the Vdd_Lo supply, charge pumps and reference cells, the
  SONOS and ferroelectric cells, the LC tank and its comparators.

---

## 7. Simulating

Every module has defaults equal to the thesis's sizes. Each testbench in
`tb/` checks itself, prints `TB_RESULT checks=<n> failures=<m>`, and has a
watchdog. Random stimulus uses `$urandom`.

A unit test needs the packages first, then the RTL, then the bench:

```sh
verilator --binary --timing -Wno-fatal -j 0 --top-module tb_hirise_switch \
  rtl/hirise_pkg.sv rtl/lrg_arbiter.sv rtl/hirise_local_switch.sv \
  rtl/hirise_clrg_subblock.sv rtl/hirise_layer.sv rtl/hirise_switch.sv \
  tb/tb_hirise_switch.sv
./obj_dir/Vtb_hirise_switch
```

To build everything at once:

```sh
verilator --binary --timing -j 0 --top-module tb_crosspoint_top \
  rtl/*_pkg.sv $(ls rtl/*.sv | grep -v _pkg) tb/tb_crosspoint_top.sv
```

`tb_crosspoint_top` runs the top at full size, with no parameter overrides.
It exercises every mechanism through the top-level ports and fails if any
mechanism's count stays at zero. The Hi-Rise mechanisms counted are local
and cross-layer connections, single-cycle grants and class-decided grants.
Building it takes a few minutes, because the 64-port switch with 128-bit
flits is large.

The RTL lints clean with `verilator --lint-only -Wall`. It also elaborates
in a slang-based yosys flow.

Each block was also checked against a deliberately broken copy: one changed
line, such as a swapped TCAM bit or ignoring the pump comparator. The
block's testbench had to report failures against it.
