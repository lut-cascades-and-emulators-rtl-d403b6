# LUT cascades and LUT cascade emulators

A multiple-output logic function of many inputs is too large for a single
memory, but it can often be split into a chain of small memories: each
memory (a *cell*) looks at a few new inputs plus a handful of wires coming
from the previous cell (the *rails*) and passes a few rails on. This chain
is an **LUT cascade**. Because cells only talk to their neighbours, the
wiring is trivial and the delay is simply the number of cells times one
memory read. How many rails a function needs is set by its *C-measure*, the
largest number of distinct column patterns over the decomposition charts
x = (x_L | x_H) taken along the input order: with C-measure mu, cells need
ceil(log2 mu) rails. Adders, symmetric functions, threshold functions,
weighted sums and segment-index encoders all have small C-measures.

A fixed cascade can only realize functions that fit its cell sizes. An
**emulator** trades speed for flexibility: it keeps all cell tables in one
large memory and evaluates the cells one after another, feeding each word
read back into the address of the next read. Several smaller emulator units
connected in a ring (an **LUT ring**) do the same with less power, since
only one unit reads its memory at a time.

This repository holds synthesizable SystemVerilog for:

| module | what it is |
|---|---|
| `lut_cascade` | 8-cell LUT cascade, 12-input/16-output cells, 8 rails, 40 inputs, combinational |
| `lut_emulator` | single-unit emulator of an LUT cascade, one cell per clock |
| `lut_ring_emulator` | emulator of two (or `UNITS`) units connected as an LUT ring, sequential or streaming |
| `ws_arith_decomp` | 16-input weighted-sum function with 16 outputs, built from two cascades and an adder |
| `lut_top` | all four side by side |

All tables (cell contents, emulator memories, emulator step words) are
programmable through write ports; nothing is hard-wired to one function.

## The LUT cascade (`lut_cascade`, `lut_cell`)

Cell 0 is addressed by inputs `x[11:0]`. Cell i > 0 is addressed by
`{x[12+4(i-1) +: 4], rails_{i-1}}`: the 8 rails (the low 8 bits of cell
i-1's 16-bit word) on the low address bits, four new inputs on top. So the
cascade has n = k + (s-1)(k-r) = 12 + 7*4 = 40 inputs for s = 8 cells of
k = 12 inputs and r = 8 rails. Every cell word is an output
(`y[16i +: 16]`); which of those bits mean something is decided by the
tables. A cell is a 4096 x 16 table with an asynchronous read and a
synchronous write port (`prog_en/prog_cell/prog_addr/prog_data`), i.e.
64 Kbit, the size of the asynchronous SRAMs of an 8-stage cascade chip.

To build the tables of a function, choose what each rail value means (a
state of the function after the inputs seen so far) and fill each cell with
"next state / outputs as a function of state and new inputs". Example used
in the tests, the number of ones among the 40 inputs:
cell 0 word = popcount(address); cell i word = rails + popcount(new inputs).

A two-cell cascade is the classic functional decomposition: block H reads
x_L and sends ceil(log2 mu) rails to block G, which also reads x_H.

## Emulating a cascade with one memory (`lut_emulator`)

### Datapath

```
  x ──► input reg ──►┐
                     │   ┌──────────────┐       ┌───────────────┐
  memory for ───────►│   │ interconnect │ addr  │ memory for    │ rd_data
  interconnection ──►└──►│ network (PIN)├──────►│ logic (sync)  ├────┬──► output shifter ──► output reg ──► y
  (step words)           └──────▲───────┘       └───────────────┘    │
                                │                                    │
                                └──── feedback shifter ◄─────────────┘
                control network: step counter, start / busy / done
```

* The **memory for logic** (`emu_logic_mem`, default 64 words x 4 bits =
  four 16-word pages) holds the cell tables. Its read is registered, so the
  word read in step i sits on `rd_data` during step i+1: that register *is*
  the rail register.
* The **programmable interconnection network** (`emu_pin`) drives every
  address bit from one of: constant 0, constant 1, a primary input, or a
  rail bit. Constants on the high address bits select the page of the
  current cell; inputs and rails fill the rest.
* The **feedback shifter** (`emu_shifter`) moves the rails down to bit 0
  before the network sees them, so rails may be stored in any data bits.
* The **output shifter** takes `out_cnt` bits of `rd_data` starting at
  `out_off` and writes them into the **output register** (`emu_out_reg`)
  at `out_pos`, leaving the other bits alone. Over the steps the outputs of
  all cells accumulate there.
* The **memory for interconnection** (`emu_icn_mem`) holds one step word
  per cell. The **control network** (`emu_control`) steps through them.

### Step word

With N_IN inputs, W data bits, OUT_W outputs and ADDR_W address bits, a
select code is SEL_W = ceil(log2(N_IN+W+2)) bits: 0 = constant 0,
1 = constant 1, 2..N_IN+1 = x[code-2], N_IN+2..N_IN+W+1 = rail bit
fb[code-N_IN-2]; larger codes give 0. The word, LSB first:

| field | bits (default emulator) | meaning |
|---|---|---|
| `sel[j]`, j = 0..ADDR_W-1 | `[4j+3:4j]` (23:0) | source of address bit j |
| `fb_shift` | 25:24 | right shift of the rails |
| `out_off` | 27:26 | first data bit that is an output |
| `out_pos` | 30:28 | where it goes in the output register |
| `out_cnt` | 33:31 | how many data bits are outputs (0 = none) |
| `last` | 34 | this is the last cell |

`lut_pkg::cfg_w()` computes the width for other sizes (35 bits by default).

### Timing

`start` (sampled in idle) latches `x` and clears the output register. Step
i (cell i) occupies clock i after the start edge; one flush clock follows,
and `done` is high for one clock starting s+1 clocks after the start edge
for s cells. `y` stays valid until the next start. A `start` while `busy`
is ignored. The run ends at the step word with `last` set, or after
`STEPS` words.

### Worked example: four cells and memory packing

The default sizes fit this four-cell cascade over x1..x8 (`x[0]` = x1)
with outputs f1..f5 (`y[0]` = f1):

| cell | inputs | data word |
|---|---|---|
| 1 | x1 x2 x3 x4 (A3..A0) | D1 D0 = rails u1 |
| 2 | x5, u1 | D3 D2 = f2 f1, D1 D0 = u2 |
| 3 | x6, u2 | D2 = f3, D1 D0 = u3 |
| 4 | x7 x8, u3 | D1 D0 = f5 f4 |

*One page per cell:* cell c in page c-1, address `{page, inputs, rails}`,
64 words used, with much of each page empty. *Packed:* since cells 1 and 4
both need 16 words but only two data bits each, they share addresses
0x00-0x0F, cell 1 in D1 D0 and cell 4 in D3 D2; cells 2 and 3 go to
0x10-0x17 and 0x18-0x1F. Only 32 words are used. The step words then say,
for cell 4: address bit 4 = constant 0, bits 3..2 = x7 x8, bits 1..0 =
rails; outputs: `out_off` = 2, `out_cnt` = 2, `out_pos` = 3. If a rail
pair is stored in the upper half of a word instead, the next cell's
`fb_shift` = 2 brings it down. `tb/emu_tb_pkg.sv` builds all these maps.

## Several units: the LUT ring (`lut_ring_emulator`)

Each unit (`emu_unit`) has its own inputs, step words, network, memory,
shifters and output register. The memory output of unit u drives the
feedback shifter of unit u+1, and the last unit drives unit 0, closing the
ring. Program a unit by setting `prog_unit` with the `lm_*`/`icn_*`
writes. Outputs of unit u are at `y[u*OUT_W +: OUT_W]`, inputs at
`x[u*N_IN +: N_IN]`. The ring has two modes, chosen by `stream` while
idle:

**Sequential (low power), `stream` = 0.** Cell i runs on unit i mod UNITS
using that unit's step word i div UNITS, so a unit can hold several cells
in several pages. Exactly one unit reads its memory per clock
(`unit_active`, one-hot); the others are in stand-by and keep their last
word, which is what the next unit needs as rails. Timing is that of the
single unit: `start`, then `done` s+1 clocks after the start edge.

**Streaming (high throughput), `stream` = 1.** For a cascade of exactly
UNITS cells, cell u on unit u (step word 0), all units work at once on
successive vectors, like a pipelined cascade. Every clock with `in_valid`
high a vector is sampled; unit u gets its inputs through a u-stage skew
register, reads its memory u+1 clocks later using the rails unit u-1 read
the clock before, and its outputs are delayed by UNITS-1-u clocks so that
all units' outputs of one vector appear together with `out_valid`,
UNITS+1 clocks after the vector was sampled. With two units this is one
result per clock instead of one per three.

## Weighted sums by arithmetic decomposition (`ws_arith_decomp`)

A WS function computes sum w_i x_i as a binary number. With 2q-bit weights
w_i = 2^q wA_i + wB_i, cascade A computes sum wA_i x_i mod 2^q (q rails,
two 12-input cells for N = 16, q = 8) and cascade B computes
sum wB_i x_i exactly in q + ceil(log2 N) = 12 bits (four 13-input cells).
The low q result bits are B's low bits; the high q bits are A plus B's top
ceil(log2 N) bits (`ws_adder`). Each cell's table is "rails + weights of
the new inputs that are 1", reduced modulo 2^(rails). The result is exact
when the whole sum fits 2q bits.

## Using and changing it

Each module's header gives its ports and timing. Parameters with their
defaults: `lut_cascade` (CELLS 8, IN_W 12, OUT_W 16, RAILS 8),
`lut_emulator` (N_IN 8, ADDR_W 6, DATA_W 4, OUT_W 5, STEPS 4),
`lut_ring_emulator` (same plus UNITS 2), `ws_arith_decomp` (N 16, Q 8,
A_IN_W 12, B_IN_W 13; cell sizes must cover exactly N inputs, checked by
an elaboration-time assertion). Cell tables and memories for logic are not reset; write them before
use. Step words reset to zero. Registers reset asynchronously on `rst_n` low.

Simulate a testbench with Verilator, for example the end-to-end one:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/lut_pkg.sv tb/emu_tb_pkg.sv tb/tb_lut_top.sv --top-module tb_lut_top
./obj_dir/Vtb_lut_top
```

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
`tb_<module>` tests one module; `tb_lut_top` runs all four subsystems at
full size and counts that each mechanism (rails, a shared page, a feedback
shift, output accumulation, an ignored start, a rail crossing between ring
units, stand-by, both units busy in streaming mode, an adder carry)
happened; `tb_cascade_sie` loads a segment index encoder (100 segments
over a 40-bit integer, boundaries clustered so that they share long
prefixes) into the cascade; `tb_emu_separate_cascades` runs
a function split into three separate cascades of 2, 3 and 4 cells (9
look-ups) on an emulator enlarged to 16 pages and 16 steps.
`tb/emu_tb_pkg.sv` holds the four-cell example, its reference model and
the step-word packing function.

## How far this follows the underlying design

Taken from the architecture: the cascade of cells joined only by rails;
the emulator's memory for logic, memory for interconnection,
interconnection network, the two shifters (one for packing, one for
accumulating outputs), output register and control network; page selection
by the high address bits with rails on the low bits; memory packing; the
multi-unit emulator with rails passed from unit to unit and one unit
active at a time; the A/B/adder structure of the WS decomposition and its
widths; the example sizes (8 inputs, 16-word pages, 4-bit words, 5
outputs, 4 cells, 2 units, 8 cascade stages of 64 Kbit).

Choices made here: exact cell shape 12 x 16 and 8 rails; uniform cells in
the fixed cascade; the full multiplexer per address bit in the network;
the offset/position/count shifters; the step-word layout; the streaming
mode's structure; synchronous
memory read, one cell per clock and the flush cycle; latching the inputs
at start; round-robin placement of cells on ring units; the WS sizes
(N = 16, q = 8) and cell sizes.

The streaming mode realizes the statement that several units can work at
the same time for higher throughput; its form (one cell per unit, input
skew and output alignment registers) is this design's own. Not built:
streaming for cascades longer than the ring; the design software that derives cascades from decision diagrams and computes
C-measures; the analog and process details of a fabricated chip.
