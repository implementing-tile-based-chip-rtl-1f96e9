# A 6×6 GALS tile array: links, clock crossings and global signals

A chip multiprocessor built from identical tiles scales best when nothing has to be
redesigned as tiles are added. A global clock breaks that: the clock tree must be rebuilt
for every array size, and its skew grows with the chip. In this design there is no global
clock. It is *globally asynchronous, locally synchronous* (GALS): every tile has its own
oscillator, and data crosses between tiles over source-synchronous links that end in
dual-clock FIFOs. Signals that really must reach every tile, such as reset and
configuration, run on a separate slow clock and are passed from tile to tile. A tile
therefore abuts its neighbours with no logic between them, and the array is that one tile
repeated.

This RTL covers everything in a tile except the processor core:

| Part | Module | Kind |
|---|---|---|
| Array of R×C tiles (6×6), edge links, global-signal columns | `gals_array` | RTL (top) |
| One tile without its core | `gals_tile` | RTL |
| Link sender with a gated, forwarded clock | `clk_fwd_link` | RTL |
| Dual-clock input FIFO (32 words) | `dual_clock_fifo` | RTL |
| Synchronizer with 0–4 selectable stages | `sync_cfg` | RTL |
| Global-signal feed-through and configuration register | `tile_cfg` | RTL |
| Shared types and constants | `gals_pkg` | package |
| Local oscillator | `local_osc` | behavioural model |
| Selectable delay (DLY element + bypass mux) | `cfg_delay` | behavioural model |
| Clock tree of the receiving tile | `clk_tree` | behavioural model |

The processor core, the chip pads, the power grid and pin placement are not included. The
core's ports are brought out of every tile and out of the array (`core_*`). The testbenches
use a stand-in core that forwards each word plus one.

## How a word travels from tile A to tile B

This is the part of the design that needs the most care. Three kinds of signal run between
two neighbours:

* **A→B clock.** A sends its own clock along with the data. B does not use the forwarded
  clock for its own logic. It goes through B's clock tree and clocks only the write side of
  B's input FIFO.
* **A→B data and valid.** They are registered in A on A's clock (`clk_fwd_link`).
* **B→A FIFO full.** The flag runs against the clock. It is produced on the forwarded
  clock, so A samples it as a signal of its own clock domain.

### When the clock is forwarded

A forwarded clock that runs all the time wastes power. One that pulses only with the data
needs the data-to-clock delay held inside a window narrower than one clock period. The link
takes the middle course. The forwarded clock starts one cycle before a word and stops one
cycle after the last word. For a single word the receiver sees three edges: one before the
word, the one that captures it, and one after it. A burst of N words gives N+2 edges. With
this window the allowed skew between data and clock is −T < D_data − D_clk < 2T.

`clk_fwd_link` holds the word in one register (`data_out`, `valid_out`) and delays valid by
one more register (`valid_q2`). The clock is enabled when any of three signals is set: the
incoming `valid`, `valid_out` or `valid_q2`. The enable is latched while the clock is low,
so the forwarded clock cannot glitch. That latch is the one intended latch in the design.
Setting `always_on` forwards the clock every cycle instead. That mode is the safer choice
for links that leave the chip.

### Flow control without per-word handshakes

The link uses coarse-grain flow control. A sends one word per cycle without waiting for
acknowledgements, and stops only while B's FIFO reports full. `fifo_full_out` rises while
`RESERVE` (2) entries are still free. Those entries hold the words already on the way: one
in A's output register, and one sent in the cycle it takes the registered flag to reach A.

The full flag is computed on the forwarded clock. If that clock stopped while A was
stalled, the flag could never clear. So a stalled sender keeps its `valid` high, which keeps
the forwarded clock running: the word waits (`hold`) but the clock does not.

### Matching data delay to clock delay

In B the forwarded clock passes through a clock tree. The data has no such buffer tree. If
nothing were done, data would reach the FIFO at about the same moment as the clock edge.
Each tile therefore has a selectable delay stage on its outgoing data (`cfg_delay`, a mux
with an optional DLY element), and another on its incoming data. The delay inserted on a
link is

    D_insert = 2·D_MUX + {0, 1, 2}·D_DLY

The data must arrive after the clock edge that is capturing the previous word, and before
the next edge: t_hold < D_insert − D_clk_tree < T − t_setup − t_clk→Q. Centring the data in
that window gives D_MUX = D_clk_tree / 2 and D_DLY = T / 2. With a 6 FO4 clock tree and a
20 FO4 period this is 3 FO4 and 10 FO4. The models use 1 FO4 = 105 ps (the 475 MHz period
divided by 20): D_MUX = 315 ps, D_DLY = 1050 ps, clock tree 630 ps.

**Rule for configuration: exactly one DLY element per link.** Put it at the sender
(`dly_out_sel`) or at the receiver (`dly_in_sel`), not both. One DLY element puts the data
T/2 after the clock edge: 1050 ps inside a 2105 ps window. With no DLY element the data
changes on the clock edge. With two, it lands at the very end of the window. The reset
value puts the DLY element at the sender.

In RTL these delays exist only in the behavioural models. A synthesized chip gets them from
sized cells. The same figures become the timing constraints: the output delay of a
tile's data pins is T − D_data_A, and the input delay is T − D_data_B. Example values are
5 FO4 for data and valid and 10 FO4 for the full flags.

## Crossing into the receiving tile: `dual_clock_fifo`

The write side runs on the forwarded clock (called `clk_upstrm`). The read side runs on the
tile's own clock (`clk_dnstrm`). Each side keeps a binary and a Gray-coded pointer. Each
Gray pointer crosses to the other side through a `sync_cfg`, a chain of four flip-flops
followed by a mux. The mux selects 0, 1, 2, 3 or 4 stages, set by `sync_stages`. More stages
raise the mean time between synchronizer failures but add latency. One or two stages are
normally enough, and 0 is there for experiments.

* **Latency.** A word written at a write edge shows as `rd_valid` after `stages + 1` read
  edges: one for the write pointer update, `stages` in the synchronizer, and one for the
  registered not-empty flag. The word is read at the next edge. With two stages that is the
  roughly 4-cycle crossing the architecture budgets for.
* **Throughput.** One word per cycle on each side while the FIFO is neither full nor empty.
* **Read port.** The read port is fall-through: `rd_data` is the head word while `rd_valid`
  is high, and `rd_en` pops it.
* **Overflow.** An assertion flags any write made when no entry is free.

Each of these properties is checked in `tb_dual_clock_fifo`.

## Global signals on a slow clock: `tile_cfg`

Configuration and reset reach every tile, but they change rarely. Instead of distributing
them at full speed, they run on a dedicated slow clock. They enter at the top of each column
and pass through each tile to the one below, buffered inside the tile (in RTL the buffers
are plain wires). Each tile captures a configuration word on the slow clock when
`glob.cfg_wr` is set and `glob.cfg_addr` equals its `tile_id` or `CFG_BCAST` (all ones).
The global bundle `global_sig_t` holds:

| Field | Bits | Meaning |
|---|---|---|
| `rst_n` | 1 | asynchronous reset of the whole array |
| `cfg_wr` | 1 | write strobe, sampled on the slow clock |
| `cfg_addr` | 6 | target tile (`r*C + c`), or 63 for all tiles |
| `cfg_data` | 14 | `tile_cfg_t`, below |

`tile_cfg_t`, from MSB to LSB:

| Field | Bits | Reset | Meaning |
|---|---|---|---|
| `osc_en` | 1 | 0 | run the tile's oscillator |
| `clk_always_on` | 1 | 0 | forward the clock every cycle instead of only around data |
| `dly_out_sel` | 1 | 1 | DLY element on the outgoing link |
| `dly_in_sel` | 1 | 0 | DLY element on the incoming link |
| `in_en` | 1 | 0 | accept words into the input FIFO; clear it on tiles off the data path, which otherwise fill up from a neighbour's link they also see |
| `out_mask` | 4 | E | neighbours (bit = `dir_e`: N=0, E=1, S=2, W=3) whose full flags stall this tile's output |
| `in_dir` | 2 | W | neighbour whose link feeds the input FIFO |
| `sync_stages` | 3 | 2 | synchronizer depth, 0–4 |

The configuration is static. Write it while the oscillators are stopped, or while the
links it affects are idle. Its bits are used in the fast clock domains without
synchronizers. The reset state has every oscillator off. Reset therefore needs no
synchronizers either: deassert it while the clocks are stopped, configure the tiles, then
set `osc_en`.

## The array: `gals_array`

Tile (r, c) has number `r*C + c`. Row 0 is the north edge and column 0 the west edge.

* **Links.** Every tile's output link goes to all four neighbours, and each tile's
  `in_dir` picks which neighbour it listens to. A sender stalls only on the full flags of
  the neighbours in its `out_mask`, so that mask must name exactly the tiles that chose it.
* **Edges.** Links at the array edge become the ports `n_*`, `e_*`, `s_*` and `w_*`. These
  are where chip pads would connect two chips edge to edge. The same link timing applies
  across a chip boundary, and `always_on` is the safer setting there.
* **Oscillators.** The model gives each tile's oscillator a fixed period within ±30 ps of
  2105 ps, and its own phase. This makes neighbouring clocks unrelated, as free-running
  oscillators are.

## Interfaces at a glance

The tile's core port (`core_*`) is synchronous to `core_clk`, the tile's clock:

* **Output words.** `core_wdata` and `core_wvalid` offer a word. It is taken at a clock edge
  where `core_wstall` is low; otherwise hold it.
* **Input FIFO.** `core_rdata` and `core_rvalid` show the head word, and `core_rd` pops it.

A link (`link_t`) is `{clk, valid, data[15:0]}`. The full flag runs the other way as a
separate bit.

## Where this RTL makes its own choices

The architecture fixes the following: the tile structure, the forwarded-clock window, the
delay-matching scheme and its numbers, the 32-word FIFO, the 0–4 synchronizer stages, the
slow-clock global signals, and the 6×6 size at 475 MHz. These details are this
implementation's own:

* **Data width.** 16-bit data word (`gals_pkg::DATA_W`).
* **FIFO.** Gray-coded pointers, a fall-through read port, and the `RESERVE` rule for the
  full flag.
* **Clock gate and stall.** The latch-based clock gate. The `hold` input, which stalls a
  word but keeps the forwarded clock running.
* **Neighbours.** One input FIFO per tile fed from a chosen neighbour, and one output link
  seen by all four neighbours.
* **Global signals.** The global bus (address, strobe, broadcast address), the
  configuration fields and their reset values, and reset without synchronizers.
* **Timing figures.** The ps value of one FO4, and the oscillator spread across the array.
* **Empty logic clouds.** The output and input logic around the delay stages is empty.
* **No first method.** The clock-only-with-data method has no setting. It needs a tighter
  timing window and the design does not use it.

## Simulating

Every file sets `timeunit 1ps`. All files are SystemVerilog 2017, one module or package
per file, and the package must be read first. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/gals_pkg.sv tb/tb_gals_array.sv --top-module tb_gals_array
    ./obj_dir/Vtb_gals_array

Each testbench prints one summary line, `TB_RESULT checks=N failures=M`, and finishes.

| Testbench | What it shows |
|---|---|
| `tb_gals_array` | The full 6×6 array at its default size, end to end (takes a few seconds). It configures all 36 tiles over the global signals into one snake-shaped path and streams 400 words through it under random back-pressure and random core pauses. Each word must arrive once, in order, incremented 36 times. The path uses every synchronizer depth, both DLY placements, and gated and always-on clocks. Each of these, and stalls and gated cycles, is counted and must occur. |
| `tb_gals_tile` | One tile between a source and a sink, in two configurations. First: two synchronizer stages, DLY element in the sender's stage, gated clock. Second: four stages, DLY element in the tile's input stage, always-on clock. The link is drained before the settings change. Each word must arrive once, in order, incremented. |
| `tb_dct_workload` | The 2-D 8×8 DCT mapped onto four tiles of the full array: row DCT, transpose, column DCT, transpose, on four blocks. It runs once with the gated forwarded clock and once with the clock always on, checks every result against a reference, and reports how often each link's clock runs. |
| `tb_dual_clock_fifo` | Latency per synchronizer setting, one word per cycle, and random traffic with a fast or slow reader. |
| `tb_clk_fwd_link` | N+2 forwarded pulses per burst, none while idle, order under `hold`, and always-on mode. |
| `tb_sync_cfg`, `tb_tile_cfg`, `tb_cfg_delay`, `tb_clk_tree`, `tb_local_osc` | The leaf blocks. |

These testbench helpers live in `tb/`:

* `link_source`: an oscillator, a `clk_fwd_link` and a delay stage, so it looks like a
  neighbouring tile. Its `dly_sel` input says whether its stage holds the DLY element.
* `link_sink`: a clock tree, a delay stage (`dly_sel`) and a capture queue, with
  back-pressure windows.
* `dct_core_model`: a stand-in core for the DCT run. It computes an 8-point integer DCT
  (mode 0) or transposes a 64-word block (mode 1).
* `core_model`: the stand-in core.

In the DCT run, each of the three links carries 256 words in about 540 of its
sender's cycles. With the gated clock the forwarded clock runs in 52% of those cycles;
always on, it runs in all of them. The testbench also reports a rough communication power
figure: a cycle carrying a word costs 1, a clock pulse without a word 0.5, and a stopped
clock 0. By that figure the gated links use
about 0.68 of the always-on power for this traffic. A clock sent only with each word
would run in about 47% of the cycles and use about 0.65 of the always-on power. That
method is not built, because its timing window is too tight. The testbench works out its
figures from the word counts. This is a count of pulses and words
only, not a power estimate of a layout.

The delay stage and clock tree models use transport delays. Every change at the input reaches the
output after the delay, in order, even when the changes come closer together than the
delay.

For synthesis, leave out the three behavioural models. Replace `local_osc` with the
oscillator macro, and give the delay stages and the clock tree real cells and timing
constraints. Everything else is plain synthesizable RTL.
