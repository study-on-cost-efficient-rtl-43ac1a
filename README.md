# Sandwich Ping-Pong Memory

A row-column 2-D transform, such as the 8x8 DCT of image coding, needs a
*transpose buffer* between its two 1-D passes. The first pass produces a block
row by row. The second pass needs it column by column, so it can only start
once the whole block is stored. The usual answer is a ping-pong (double)
buffer: two full M x N banks, one being filled while the other is drained.

The Sandwich Ping-Pong Memory (SPPM) stores less than that. Each bank is cut
into its first M-P rows and its last P rows. The first rows stay private, as
the *Ping* and *Pong* arrays. The last P rows of both banks are folded into
**one** single-port array that they share, the *Common Bar*, which sits
between Ping and Pong like the filling of a sandwich:

```
      Ping        (M-P) x N  words   bank 0, rows 0 .. M-P-1
      Common Bar    P   x N  words   rows M-P .. M-1 of whichever bank is active
      Pong        (M-P) x N  words   bank 1, rows 0 .. M-P-1
```

The saving is P x N words out of 2 x M x N. The cost is time: the writer must
pause for a few cycles after each block, so that the reader can empty the
Common Bar before the writer needs it again. This repository implements the
buffer and its timing rules, a built-in self-test for it, an 8x8 2-D DCT that
uses it, and a small 64-byte ping-pong memory chip. All of it is synthesizable
SystemVerilog.

## Timing: the Initially Idle Time and the Idle Time

This is the heart of the design, and the part to understand before changing
anything.

One word is written and one read per clock, at most. Within a block, word
(r, c) has the row-major index r·N + c. The writer stores words in row-major
order, so it fills the private rows first and the Common Bar last. The reader
takes them in column-major order, reading (0,c), (1,c) … (M-1,c) for each
column c. So it visits the Common Bar for P cycles at the end of every column.

The Common Bar has one port, so writer and reader may never use it in the
same cycle. The design goes further and gives each of them the Common Bar for
a whole window:

* **Initially Idle Time (INIT).** The reader starts a block INIT cycles after
  its first word was written. The reader's first Common Bar access is word
  (M-P, 0), which comes M-P reads after it starts. That access must come after
  the writer's last Common Bar write, at cycle M·N−1:
  INIT + (M−P) ≥ M·N, so **INIT = M·N − (M−P)**.
  INIT cannot be larger than M·N, or the buffer would sit empty.
* **Idle Time (IDLE).** The reader's last Common Bar access of a block is its
  final read, at cycle INIT + M·N − 1. The next block's writer reaches the
  Common Bar (M−P)·N cycles after it starts. If every block is followed by a
  gap of IDLE cycles, the next block starts at M·N + IDLE. Its writer must
  reach the Common Bar after the reader leaves it:
  M·N + IDLE + (M−P)·N > INIT + M·N − 1, so **IDLE = P·N − (M−P)**.

Both are the smallest values that satisfy the constraints: the shortest
latency and the highest rate. The geometry is legal when 1 ≤ P < M and
P·N ≥ M−P. `sppm_pkg` provides `init_idle()`, `idle_time()` and
`geometry_ok()`; the scheduler refuses an illegal geometry at start of
simulation.

For the 4x4 example with P = 1 this gives INIT = 13 and IDLE = 1. For the
default 16 x 512, P = 1 memory it gives INIT = 8177 and IDLE = 497 word times.
Blocks are accepted every M·N + IDLE cycles. The throughput loss is therefore
IDLE / (M·N + IDLE): 5.9 % for the 4x4 example and 5.7 % for the default.

Over those windows the private arrays never collide either. While the reader
drains Ping, the writer is already filling Pong, and the other way round.

In the RTL, `sppm_sched` produces this schedule. It is a row/column counter
pair for the writer and one for the reader, plus a bank bit for each. The
reader is armed when the writer accepts word INIT of a block. After the last
word of a block, an idle counter closes the input for IDLE cycles (`idle_gap`,
`in_ready` low). Reading overlaps writing: the reader of block k runs while
the writer fills block k+1 into the other bank.

### Flow control

The schedule above assumes a word arrives every cycle. The design allows gaps
in the middle of a block. A cycle with no input word (`in_valid` low while a
block is partly written) **freezes the writer and the reader together**, and
`stall` flags it. Their distance, and so every collision argument above, is
unchanged. The output has no back-pressure: `out_valid` words must be taken
when they appear. Between blocks (after the last word, outside the idle gap)
the reader keeps draining even without input, so the last block always
comes out completely. Once the next block has started, though, the tail of
the previous one drains only as fast as the new block's words arrive.

### Latency

The first word of a block appears on `out_data` INIT + 1 cycles after that
block's first word was accepted. The extra cycle is the synchronous array
read.

## Control unit: two banks outside, three arrays inside

To the scheduler the memory looks like an ordinary double buffer. There is one
write port and one read port, each with a bank bit and a logical address
row·N + column. `sppm_ctrl` maps these:

* A logical address below (M−P)·N goes to the bank's own array (bank 0 →
  Ping, bank 1 → Pong) at the same address.
* An address from (M−P)·N upward goes to the Common Bar, at address −
  (M−P)·N.

Each array gets an enable, a write strobe, an address and write data. The
read data of the array that was read are selected onto `rd_data` one cycle
later. A read and a write to the same array in one cycle set `conflict`, and
an assertion fires. The schedule above guarantees this never happens, and
the testbenches run with the assertion active.

`sppm_buffer` combines the scheduler, the control unit and the three `spram`
arrays into the complete transpose buffer. It also has a test-access port
(`test_en`, `t_*`) that hands the three arrays to the built-in test.

## Built-in self-test: modified March C-

March C- is the standard test for stuck-at, transition, address-decoder and
unlinked coupling faults:

```
{ (w0); ↑(r0,w1); ↑(r1,w0); ↓(r0,w1); ↓(r1,w0); (r0) }
```

The SPPM is tested in two parts, matching its structure:

1. Ping and Pong are tested **together**, as blocks A and B, under the
   ping-pong rule that when both are active one reads while the other
   writes.
2. The Common Bar is then tested alone with plain March C-.

For step 1, `march_tpg` stretches March C- into eight elements:

```
M0      A: ↑(w0)                    B: idle
M1      A: ↑(r0)                    B: ↑(w0)
M2..M5  A: March C- elements 1..4   B: the same operations, one cycle later
        (one cycle: A idle, B finishes)
M6      A: ↑(r0)                    B: idle
M7      A: idle                     B: ↑(r0)
```

Inside M2..M5, A alternates read and write, and B repeats A's previous
operation. So whenever A reads, B writes, and the other way round. The added
elements only insert reads and idle cycles, so March C-'s fault coverage is
kept for each block. A dual-block run over D words takes 12·D + 1 cycles. A
single-block run (step 1's generator with B off) takes 11·D cycles.

The March C- elements themselves follow the document. The exact placement of
the added read and idle elements is this design's reading of a description
the document only gives in outline.

The blocks involved:

* `march_ora`: the output response analyser. It compares each read word with
  the expected background (all-zero or all-one words) by XNOR and OR. It keeps
  a sticky fail flag and saturating counts of the mismatching and checked
  reads.
* `sppm_bist`: the sequencer. It runs step 1 with two analysers, then step 2,
  and reports `done`, `fail`, `errors` and `reads`.

The whole test takes 12·(M−P)·N + 1 + 11·P·N + 7 cycles. For the default
memory that is 97 800 cycles, with 87 552 reads checked. In `sppm_top` the test
takes the arrays through the buffer's test port while `bist_busy` is high.
During that time the input is closed. Start it only when no block is in
flight, and note that it overwrites the buffer's contents.

The test bench for `sppm_bist` uses a behavioural RAM with injectable faults:
stuck-at, transition, address-decoder and coupling faults, 11 kinds in all.
Every kind, in each of the three arrays, is detected.

## The 8x8 2-D DCT

`dct2d_sppm` is the application the buffer was designed for. It is the
row-column DCT-II, with the normalisation left out:

```
Z_pj = Σ_i X_ij · c(p,i)      first pass, one vector j at a time
Y_pq = Σ_j Z_pj · c(q,j)      second pass,   c(l,h) = cos(π/8 · (h + ½) · l)
```

The datapath is `dct1d_8` → `sppm_buffer` (8x8, P = 1, 12-bit words) →
`dct1d_8`:

* The first unit writes Z_0j … Z_7j as row j.
* The buffer returns column p, Z_p0 … Z_p7.
* The second unit turns that column into Y_p0 … Y_p7.

Blocks leave p-major: Y_00, Y_01 … Y_77.

Each `dct1d_8` uses the cosine symmetry. Even outputs depend only on
x_i + x_(7−i), and odd outputs only on x_i − x_(7−i). So each output is a
4-term inner product, computed by four parallel multipliers, one output per
clock. The cosines are 12-bit fraction constants, computed at elaboration with
`$cos`. Each pass is rounded half-up to an integer. Input samples are 8-bit
signed, the intermediate words 12-bit and the coefficients 16-bit.

The buffer's IDLE is 8 − 7 = 1, so one block is accepted every 65 cycles. The
unit can take a sample per cycle and holds one vector while it collects the
next. Its input is valid/ready. Its output, like the buffer's, has no
back-pressure.

## The 64-byte ping-pong chip

`pp_chip64` is a small ping-pong memory chip, modelled at the level of its
decoders and arrays.
It has no Common Bar. It has eight 8-word x 8-bit arrays (`sram_array8x8`).
Each array has a 3-to-8 word-line decoder (`wl_decoder`, a NAND per word line
with the memory enable as the fourth input). Two 2-to-4 global decoders
(`global_decoder`) drive the memory enables.

* Arrays 0–3 form the Ping half, and arrays 4–7 the Pong half.
* One `WE` pin sets both halves: WE = 1 writes the Ping half from `In` and
  reads the Pong half onto `Out`. WE = 0 does the opposite.
* G[1:0] selects the Ping array and G[3:2] the Pong array.
* PE1 is the word address in the Ping half and PE2 in the Pong half.

`Out` shows the word read in the previous cycle. In `sppm_top` the pins appear
as `chip_*`.

## Module map

```
sppm_top
├── sppm_buffer            transpose buffer (default 16 x 512 words, P = 1, 16 bit)
│   ├── sppm_sched         write/read sequences, INIT / IDLE, stall
│   ├── sppm_ctrl          bank/address → Ping / Common Bar / Pong
│   └── spram ×3           single-port arrays
├── sppm_bist              modified March C- test of the buffer
│   ├── march_tpg          element sequencer and address counters
│   └── march_ora ×2       response analysers
├── dct2d_sppm             8x8 2-D DCT
│   ├── dct1d_8 ×2
│   └── sppm_buffer        8 x 8, P = 1, 12 bit
└── pp_chip64              64-byte ping-pong chip
    ├── global_decoder ×2
    └── sram_array8x8 ×8
        └── wl_decoder
sppm_pkg                   INIT / IDLE / geometry functions, shared types
```

The buffer, the DCT and the chip are independent. Each has its own ports on
`sppm_top`. The parameters M, N, P and W of `sppm_top` size only the main
buffer and its test.

## Simulating

Every testbench in `tb/` is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb \
    rtl/sppm_pkg.sv tb/tb_sppm_top.sv --top-module tb_sppm_top -o sim
./obj_dir/sim
```

Replace `tb_sppm_top` with any other testbench name.

* `tb_sppm_top` runs the complete design at M = N = 4, P = 1. It covers
  back-to-back blocks (latency INIT + 1 and period M·N + IDLE are checked),
  blocks with random input gaps, a self-test run, and a block after the test.
  It also sends DCT blocks while buffer traffic is running, and exercises the
  chip. It counts stalls, idle gaps, Common Bar reads and writes, use of both
  banks, self-test passes, chip accesses and DCT blocks, and fails if any of
  them never happened.
* `tb_sppm_top_full` does the same with every parameter at its default
  (16 x 512 words of 16 bits). It runs in well under a minute.
* `tb_sppm_datasheet` builds the 16 x 512 memory for every Common Bar height
  P = 1 … 15 and checks latency, frame period and transposition at full size.
  It prints the throughput reduction of each next to the data sheet's value.
* `tb_sppm_sched` checks the scheduler against an independent model of the
  schedule. It uses the geometries 4x4 with P = 1, 8x8 with P = 2 and 6x5
  with P = 3. `tb_sppm_buffer` runs the same geometries end to end.

`sched_harness.sv` and `fault_ram.sv` in `tb/` are helpers used by these
testbenches.

The async-reset flip-flops whose reset also disables assertions draw
Verilator's `SYNCASYNCNET` note. It is harmless.

## Where this design departs from the document, or had to choose

* **Idle Time of the data sheet.** The document's formula gives
  IDLE = P·N − (M−P) word times, and its 4x4 example (IDLE = 1) agrees.
  Its data sheet for the 128K-bit memory (16 x 512 cells of 16 bits,
  P = 1 … 16), however, lists an Idle Time of P·(N−M) words. That is one
  word less than the formula for P = 1 and (P−1)·M + P words less in general,
  e.g. 7 936 instead of 7 952 bit-times for P = 1. The RTL follows the
  formula. Simulation confirms that one cycle less already makes the writer
  and reader meet in the Common Bar. The throughput reductions therefore come
  out slightly higher than the sheet's: 5.72 % against 5.709 % for P = 1, and
  48.38 % against 47.595 % for P = 15. The sheet's Initially Idle column
  (130 832 + 16·(P−1) bit-times) and Common Bar column (P·8 192 bits) match
  the design exactly. `tb_sppm_datasheet` builds every row P = 1 … 15 at full
  size and checks them. The row P = 16 has no Ping or Pong left and is not a
  legal geometry.
* **Cell width X.** The general form of the timing formulas has a factor X.
  The design reads X as the bits in one cell: the default word width is
  W = 16, and times are counted in words.
* **Control-unit table.** The document specifies the control unit as a truth
  table of read/write modes per array, including rows for the idle period.
  Here each array gets an enable and a write strobe instead, and during the
  idle period the writer simply issues nothing. The address split is the same:
  addresses from (M−P)·N upward go to the Common Bar.
* **March C- length.** The document quotes "8N operations" for its test. March C-
  alone has 10N, so the design keeps full March C- per block, plus the
  inserted reads.
* **Chip pins.** The pin list names In, Out, WE, G[0..3], PE1x and PE2x, but
  does not say how they divide between the halves. The mapping above is this
  design's reading. The precharge pin, supplies, pads, SRAM cells and sense
  amplifiers are transistor-level parts. They are modelled only by their word-
  level behaviour: flip-flop cells and a clocked output register.
* **DCT unit.** The document gives the row-column method, the even/odd
  decomposition and "parallel multipliers". The word widths, the 12-bit
  constants, the rounding, the output order and the choice of P = 1 for the
  DCT's buffer are this design's own.
* **Flow control, self-test handshake, test-access multiplexing and reset
  behaviour** are not specified by the document and are this design's own.

## Limits

* A block size is fixed per instance by M and N. The buffer transposes
  exactly M x N blocks.
* The output cannot be stalled. A consumer that needs back-pressure must add
  a FIFO, or the read side of the schedule would have to freeze too.
* The self-test must only be started while the buffer is idle, and it
  destroys the buffered data.
* The arrays are written as register arrays with a synchronous read. For an
  ASIC they would be replaced by single-port SRAM macros with the same
  one-cycle read timing.
