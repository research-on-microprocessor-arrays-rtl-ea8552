# MACS: a lockstep microprocessor array for radar signal processing

MACS is a linear chain of small microprogrammed processing elements (PEs).
Each PE is built from three 4-bit Am2901-class ALU slices, which gives a
12-bit word, plus a hardware multiplier and a small two-port memory. Every PE
runs its own 16-word microprogram, and all PEs step together, one
microinstruction per clock. A pass through the 16 words is a *microcycle*.
Data moves in two ways:

* **down the chain**: each PE reads the output latch of the PE above or below;
* **over one shared system bus**: the PEs and an "intelligent" working memory
  use it in fixed slots of the microcycle.

A stream enters at the top of the chain and results leave at the bottom. The
algorithms are cut so that each PE does a fixed share of the work every
microcycle. Examples are one FFT stage per PE, one term of a likelihood sum
per PE, or one gate test per space dimension. The throughput is therefore one
result per microcycle, or per shorter loop.

This RTL implements that array, in the configuration the original report
works with: the PE with the added hardware multiplier, and a working memory
that can act as lookup tables. The report suggests further changes for the
future: complex-data PEs, a 64-word external memory, more test conditions and
stacked activity bits. None of them is built here.

## The processing element (`rtl/macs_pe.sv`)

```
  sysbus  above  below  EM-A  mult-H  mult-L
     \      |      |      |      |      /
      +-------- input multiplexer ------+
                      | D
             +------------------+      opcode CRAM --MAR0
             |  3 x 2901 slices |<---- address CRAM --MAR1/MAR2
             +------------------+
                      | Y
                    latch ---------> PE above / PE below
                      |   \--------> external memory (write)
                      |    \-------> multiplier Y
    external memory --+--> bus output mux ---> sysbus
      port B ----------------------> multiplier X
```

* **ALU slices** (`am2901_slices`). This block has 16 registers addressed by
  A and B, a Q register, eight functions, and destinations that store F
  straight, halved or doubled. Its output Y is F, or register A. The source,
  function and destination codes are those of the Am2901.
* **Input multiplexer.** It selects D from the system bus, the PE above, the
  PE below, external-memory port A, or the high or low half of the product.
* **Output latch.** It is loaded with Y when the microinstruction sets `lat`.
  The neighbours, the external-memory write port, the multiplier's Y operand
  and the bus output multiplexer all take this latch. It is an edge-triggered
  register, so any word leaves a PE one cycle after it is computed.
* **External memory** (`macs_ext_mem`). It has 16 words. Port A feeds the
  input multiplexer. Port B feeds the bus and the multiplier, and it is the
  port written from the latch.
* **Hardware multiplier** (`macs_hw_mult`). It multiplies signed 12 x 12
  operands: X from external-memory port B and Y from the latch. When a
  microinstruction sets `mul` in slot *t*, the product can be read in slot
  *t+3*, leaving two wait slots between them. Starts may come every cycle. The
  outputs hold the last product.
* **Opcode CRAM with MAR0** (`macs_opcode_cram`). It stores 16
  microinstructions. Each one names its successor, so a routine can be any
  loop of up to 16 words. The gate test below is a 4-word loop.
* **Address CRAM with MAR1/MAR2** (`macs_addr_cram`). This is where the
  register addresses A and B come from; the next section explains how.

### Implicit shifting

A PE can use its register file as a shift register without any data being
moved. Each word of the address CRAM holds `{link, A, B}`. Normally the
microinstruction picks the word directly (the MAR1 path). With `implicit`
set, MAR2 picks the word instead. With `advance` also set, MAR2 is then loaded
with that word's `link`. Suppose the words link 0 -> 1 -> ... -> 15 -> 0 and
A = B = i. A routine that reads register[MAR2] (the old word) and then writes
the new word to the same register makes a 16-word delay line. Longer delays
chain PEs (see `tb_shift_chain`). Shorter ones use a shorter link cycle,
which leaves the other registers free (see `tb_macs_pe`).

### Conditional execution

Each PE has an enable flag. A microinstruction with `dis_neg` clears the flag
when its ALU result is negative. A microinstruction with `enable` sets the
flag and is itself executed. While the flag is clear, the PE keeps stepping
in lockstep but has no effect. It writes no register, Q, latch or memory,
starts no multiplication, does not drive the bus, and takes nothing from the
top buffer. The gate test for plot-to-track correlation is built this way:

1. Q <- plot, with `enable` set.
2. MAX - Q, disable if negative.
3. Q - MIN, disable if negative.
4. Latch and emit Q.

Only in-gate plots come out. Negative is the only condition that can be
tested.

### Microinstruction (`macs_pkg::uinstr_t`, 42 bits)

| field | bits | meaning |
|---|---|---|
| `src`, `fn`, `dst` | 3+3+3 | Am2901 operand source, function, destination |
| `cin` | 1 | carry in (set it for a true subtraction) |
| `dsel` | 3 | input multiplexer: sysbus, above, below, EM port A, product high, product low |
| `sh` | 2 | shift lines: zero fill, double length (register:Q), arithmetic, rotate |
| `ac_addr` | 4 | address-CRAM word (direct path) |
| `implicit`, `advance` | 1+1 | use MAR2; then load MAR2 with the link |
| `em_a`, `em_b`, `em_we` | 4+4+1 | external memory addresses; write latch to `em_b` |
| `mul` | 1 | start a multiplication |
| `lat`, `emit` | 1+1 | load latch; mark it as a result for the bottom buffer |
| `bus_out`, `bus_sel` | 1+1 | drive the bus with the latch (0) or EM port B (1) |
| `lut_req`, `lut_tbl` | 1+1 | the bus word is a lookup address into table 0/1 |
| `dis_neg`, `enable` | 1+1 | conditional execution |
| `next` | 4 | next microinstruction address |

Only the three Am2901 fields follow a standard. The original microcode word
format was documented separately and is not reproduced, so **the rest of the
layout is this design's own**. Microprograms written for the original machine
cannot be loaded unchanged.

## System bus, working memory and buffers

* **System bus** (`macs_sysbus`). It ORs the contributions of all PEs and of
  the working memory. The microprograms must keep to one driver per cycle, as
  the original schedules do. `bus_conflict` and an assertion catch a breach.
* **Working memory** (`macs_working_mem`, 4096 words). It provides three
  services:
  * A 16-entry *slot schedule*. For each slot it can read a fixed word onto
    the bus or store the bus word at a fixed address. It can also do either
    through an auto-incrementing pointer. This is how filter states, rotation
    factors and parameter streams reach the PEs, and how results return.
  * *Lookup*. A PE drives a word with `lut_req`, and in the next cycle the
    memory drives `mem[{tbl, word[10:0]}]`. This gives two tables of 2048
    entries, intended for exp and ln. A lookup answer wins over a scheduled
    read in the same slot, and `wm_collision` reports it.
  * A host port.
* **Top and bottom buffers** (`macs_buffer`, 1024 words each). PE0 reading
  "from above" takes the next word from the top buffer; an empty buffer reads
  0. Every word that the last PE latches with `emit` goes into the bottom
  buffer.
* **Controller** (`macs_ctrl`). On `start` it gives one restart cycle. That
  cycle sets every MAR0 and MAR2 to 0, re-enables every PE and rewinds the
  memory pointers. The controller then steps for `n_mcycles` x 16 cycles and
  pulses `done`. A word emitted in the last slot of the run reaches the bottom
  buffer one cycle after `done`.

## Using the top level (`rtl/macs_array.sv`)

Parameters: `N_PE` = 8, `EM_DEPTH` = 16, `WM_DEPTH` = 4096, `BUF_DEPTH` =
1024.

While the array is stopped, the host writes with `host_we`. `host_tgt` chooses
what is written:

| `host_tgt` | target | `host_addr` | `host_wdata` |
|---|---|---|---|
| `HT_OPC` | opcode CRAM of PE `host_pe` | word | a `uinstr_t` |
| `HT_ACR` | address CRAM of PE `host_pe` | word | an `acram_t` |
| `HT_EM` | external memory of PE `host_pe` | word | data |
| `HT_WM` | working memory | word | data |
| `HT_WMSCH` | working-memory schedule | slot | `{wm_op_e, 12-bit addr}` |
| `HT_WMPTR` | working-memory pointer | 0 read, 1 write | pointer value |
| `HT_TOP` | top buffer | unused | word to push |

Then pulse `start` with `n_mcycles`. While the array runs or after it stops,
read results with `bot_pop`/`bot_data`. Read the working memory with
`host_rd_addr`.

`tb/macs_tb_pkg.sv` has `op()` and `ac_word()`, which help in writing
microprograms.

Simulate any testbench with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/macs_pkg.sv tb/macs_tb_pkg.sv \
  rtl/*.sv tb/tb_macs_array.sv --top-module tb_macs_array -o sim && obj_dir/sim
```

Each testbench checks itself and prints `TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_macs_array` | Full default size, two operations in turn. (1) A plot stream is delayed 16 microcycles by implicit shifting in PE0, mapped through a lookup table by PE1, passed along, and gated by PE7. (2) A second-order MTI filter, Y = X + a1 W1 + a2 W2 and W0 = X + b1 W1 + b2 W2, with W1 and W2 kept in the working memory and four products from the multiplier. Every mechanism is counted and must occur. |
| `tb_gate_association` | The gate test on 1000 plots at one plot every 4 cycles, with the run length checked. |
| `tb_max_likelihood` | One track against the 20 plots in its gate, one likelihood per microcycle. PE3 forms the track's time term D = ln(c4 + c3 exp(c2 (T - V))) through both lookup tables and two multiplications. PE6 reads the ln answer straight off the bus. PE4 forms the track term C = (Y - U) c1 and puts it on the bus. PE5 forms the weighted squared distance ((x - u)^2 w) / 4096 with two multiplications. PE6 also looks up the plot's log term and adds the track's partial sum. PE7 keeps the best value so far with disable-if-negative and emits each new best with its plot index. |
| `tb_fft16` | A real-valued 16-point pipeline FFT on three blocks, one sample per microcycle. PE4 to PE7 are the four stages and run one routine. They differ only in delay length (8, 4, 2, 1 registers), two constants in external memory, and the bus slot that carries their rotation factor. For a stage with delay D, in the first half of each block of 2D samples it fills its delay chain and passes on what it held. In the second half it does the butterflies x + yW and x - yW. |
| `tb_mti_chain` | The MTI filter laid out over six PEs, one sample per microcycle. Four PEs each form one coefficient product. Two PEs sum the products into Y and W0. Each sample passes through all six within its own microcycle, because the next sample needs its W0. |
| `tb_shift_chain` | A 112-word delay line from seven PEs chained, each a 16-word implicit shifter running the same three words. |
| `tb_centre_of_gravity` | Partial-plot correlation: the centre of gravity sum(S R) / sum(S) of 8 plots on all 8 PEs, using only shifts, adds and disable-if-negative. PE0 multiplies by shift and add. PE1 sums. PE2 to PE5 divide by restoring division, two quotient bits each, with their programs rotated so each starts when its inputs arrive. One running quotient comes out per microcycle. |
| `tb_macs_pe`, `tb_am2901_slices`, ... | One per block, against independent models. |

## Trust and departures

These points follow the original design:

* the PE's blocks and their connections;
* the 12-bit slices;
* 16-word microprograms in lockstep;
* disable-if-negative;
* the multiplier's operand sources and its two-cycle delay;
* the lookup answered one cycle later on the same bus;
* the working memory feeding and taking back values on the system bus in set
  slots;
* the top and bottom buffers.

These points are this design's own choices, because the source leaves them
open:

* the microinstruction layout beyond the Am2901 fields;
* the latch as a register;
* the `{link, A, B}` address word;
* the slot schedule and pointers of the working memory;
* the table layout;
* signed multiplication;
* all memory and buffer depths;
* the host interface;
* the `emit` marker;
* reset clearing the register files. The real slices have no reset.

The microprograms in the testbenches were written for this design, in
12-bit integer arithmetic with scalings of its own. The likelihood test runs
the per-plot part of the original routine, the exp/ln time term and the
best-plot selection. It takes the weight as 1/(2 sigma^2) so no halving step
is needed. It uses five PEs, as the original does. The two track-term
chains (C and D) are longer than what is left of a microcycle, so they wrap
into the next one. The first likelihood therefore uses the values those
chains give from reset. The centre-of-gravity test keeps its
values small enough that every intermediate fits in 12 bits, and it computes
the range term only; the angle term is the same procedure. The FFT test uses
real arithmetic and small integer rotation factors, as in the original
real-valued analysis. Each stage takes a new factor from the working memory
in its own slot every microcycle. The original stages instead load a factor
only when a counter says it changes, and so they share one routine with no
stage-specific slot.

A timing note on the gate test: at 4 microinstructions per plot and a 60 ns
clock, one PE takes 240 ns per plot. 1000 plots then take 240 µs per track,
or 48 ms for 200 tracks.
