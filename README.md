# Self-ordering memory-based radix-2 FFT

A complex N-point FFT that computes one radix-2 butterfly per clock, in place,
in N words of memory, and that overlaps all its input and output with
computation: a new transform starts every **(N/2)·log2(N) clocks** (11264
clocks for N = 2048) with no load, unload or reordering cycles in between.

An in-place decimation-in-frequency FFT normally leaves its results in
bit-reversed order. That forces a choice: reorder the results, or read them
out in scrambled order. Either way the memory stays busy after the last stage,
and the next frame can only be loaded once the results are out. This design
permutes the address bits while it writes results back during the first half
of the stages (a self-sorting, Stockham-like schedule). When the last stage
starts, every value already sits at its natural index. The last stage can
therefore send its results straight to the output in order, without writing
them back. In the same clocks, the samples of the next frame go into the
memory words that the last stage has just read.

```
 stage:   s0  s1 ... sS-2 | sS-1 | s0  s1 ... sS-2 | sS-1 | ...
 input:                   | load |                 | load |
 output:                  | out  |                 | out  |
          <----- (N/2)·log2(N) clocks per frame ----->
```

The design follows a published architecture for small FPGAs. The sections
below give its address schedule, memory organisation and datapath, and mark
where this RTL fills gaps or departs from that description.

## Interface and timing

`fft_top #(N = 2048)`: N = 2^S with S odd and S ≥ 5 (32, 128, 512, 2048,
8192, ...).

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `di0`, `di1` | in | `fft_pkg::cplx_t` (18-bit signed re, im): x[k] and x[k+N/2] |
| `ird` | out | input ready: `di0`/`di1` are sampled in this clock |
| `do0`, `do1` | out | X[k] and X[k+N/2] |
| `ord` | out | output valid |
| `stage` | out | stage in progress, for monitoring |

* `ird` is high for N/2 consecutive clocks per frame. In the j-th such clock
  (j = 0 … N/2-1) the core takes x[j] on `di0` and x[j+N/2] on `di1`. The
  source must deliver in every `ird` clock, because the core never waits.
* `ord` follows `ird` by exactly two clocks. In the j-th `ord` clock the core
  gives X[j] on `do0` and X[j+N/2] on `do1`, for the frame loaded in the
  *previous* `ird` window.
* After reset the sequencer starts in the load window, so the first frame is
  loaded at once and `ord` stays low in that window. The output for a frame
  appears (N/2)·log2(N) clocks after its load window starts.
* Scaling: every stage halves its results, so X = DFT(x)/N. Nothing overflows
  while the input's complex magnitude stays below full scale (|x| < 2^17).
  Rounding is by truncation. Against a double-precision DFT the largest error
  per output component stayed below 5 LSB in every test (4.6 LSB at N = 2048,
  under 4 LSB at N = 32, 128 and 512).

## The address schedule (`addr_gen`)

This is the part that needs the most explanation. Let S = log2 N, SH = ⌊S/2⌋,
and let stage s = 0 … S-1 be a DIF stage. A PE counter `b` of S-1 bits counts
the N/2 butterflies of a stage, and a stage counter counts the stages. Each
clock, the counter value is turned into two read addresses R0/R1 and two write
addresses W0/W1:

1. if s ≠ S-1: invert counter bit `INV_BIT` = max(2, SH-1)
2. if s ≠ S-1: swap b1 and b_SH
3. if s < SH: swap b0 and b_s
4. R0/R1 = insert 0/1 at the butterfly bit, which is S-1-s for s ≤ SH and s
   for s > SH
5. if s < SH: W0/W1 = R0/R1 with bits S-1-s and s exchanged; otherwise W = R

The write addresses pass through two pipeline registers, because the results
of the reads issued in clock t are ready in clock t+2.

Why it works:

* **Self-ordering.** Step 5 moves the bit that the butterfly has just resolved
  from position S-1-s to position s. After the first SH stages, the address
  of every value has been bit-reversed relative to a textbook in-place DIF. At
  the end of the transform this cancels the DIF's own bit reversal. Stage SH
  (the centre bit) needs no swap. The later stages work "in place" on bit s,
  which is where the unprocessed bit now sits.
* **Pairwise processing.** A swapping stage reads the words {a, a+2^(S-1-s)}
  but writes to other words of the same 4-word group. Step 3 makes two
  consecutive butterflies (counter bit b0 = 0, 1) cover exactly such a group.
  Everything a butterfly pair overwrites was therefore read in the same clock
  or the clock before, so no extra buffer is needed.
* **Block conflicts.** Memory is four dual-port blocks, and the block of an
  address is its bits {SH, SH-1}. Step 2 puts counter bit b1 onto the
  block-select bits. So the read of clock t and the write issued two clocks
  later (clock t-2) always fall into different blocks for the same port.
* **Stage boundaries.** Step 1 reorders the butterflies of a stage so that the
  first reads of a stage do not touch what the last two butterflies of the
  previous stage are still writing. With bit 2, as in the original
  description, this holds only for N ≤ 128. With bit SH-1 it holds for every
  size that was checked.
* **Last stage.** The last stage runs in plain counter order, pairing address
  k with k+N/2. That is why samples and results come in pairs (k, k+N/2).

Example, N = 32, first four butterflies of each stage (R0/R1 → W0/W1):

```
s=0  00010/10010->00010/00011  00011/10011->10010/10011  00110/10110->00110/00111 ...
s=1  00001/01001->00001/00011  00011/01011->01001/01011  00101/01101->00101/00111 ...
s=2  00010/00110  (written back where read)  ...
s=3  00010/01010  00011/01011  00110/01110 ...
s=4  00000/10000  00001/10001  00010/10010 ...   (load new x, output X)
```

The twiddle index is computed from R0. The address generator undoes the
reversals done so far to recover the textbook in-place position p. It then
forms e = (p mod 2^(S-1-s)) · 2^s, which gives W_N^e.

## Memory blocks and routing (`mem_bank`, `port_router`, `dp_ram`, `read_mux`)

There are four dual-port RAMs of N/4 complex words each (36 bits, 512 words
for N = 2048). In each clock there are two reads and two writes. Each port
sees only two of the four addresses:

| port | read address | write address | write data |
|---|---|---|---|
| A | R0 | W1 (delayed) | Doy, or new sample x[k] (`di0`) in the last stage |
| B | R1 | W0 (delayed) | Dox, or new sample x[k+N/2] (`di1`) in the last stage |

`port_router` gives the write address priority when its block-select bits
name this block (WE = 1). Otherwise the read address goes through if it names
this block (CE = 1). Otherwise the port is idle. An assertion checks that the
two never name the same block in the same clock.

In the last stage, writes are suppressed. Instead, each port writes the new
sample at the address it reads in that same clock (WE = 1 on the read path).
This relies on **read-first** RAM ports: the read returns the old value, so
the last butterfly still sees its operands. `read_mux` uses the block-select
bits of R0 and R1, delayed by one clock, to route port A of R0's block to the
PE input Dix and port B of R1's block to Diy.

## Datapath (`pe`, `twiddle_gen`)

* `pe`: Dox = (Dix+Diy)/2 and Doy = ((Dix−Diy)/2)·tw. The sum and the
  difference are registered. The complex multiplier is combinational in the
  next clock, so the read latency of 1 plus the PE latency of 1 gives results
  at t+2. The PE uses four real multipliers.
* `twiddle_gen`: a quarter-wave sine table T[i] = round(sin(2πi/N)·(2^17−1)),
  i = 0 … N/4. The table is computed at elaboration with `$sin`. Two reads per
  clock and the sine symmetry give cos − j·sin for 0 ≤ e < N/2. The table has
  one clock of latency, and the twiddle index is delayed by one clock before
  it, so tw meets the multiplier at t+2.

## Files

```
rtl/fft_pkg.sv       types (cplx_t, tw_t), word lengths, address-bit helpers
rtl/fft_top.sv       top level
rtl/addr_gen.sv      counters, address permutation, write delay, ird/ord
rtl/mem_bank.sv      one RAM block + two port routers + write-data muxes
rtl/port_router.sv   per-port address/WE/CE routing
rtl/dp_ram.sv        true dual-port read-first RAM
rtl/read_mux.sv      block-output to PE-input selection
rtl/pe.sv            radix-2 butterfly
rtl/twiddle_gen.sv   quarter-wave twiddle table
tb/                  one self-checking testbench per module, plus end-to-end tests
```

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
after a fixed number of clocks if something hangs. For example, the
end-to-end test at N = 2048:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/fft_pkg.sv \
    tb/fft_stream_checker.sv tb/tb_fft_full.sv --top-module tb_fft_full -Mdir obj
obj/Vtb_fft_full
```

| testbench | what it checks |
|---|---|
| `tb_fft_full` | default N = 2048, 3 frames (impulse, tone, random) against a DFT; 11264-clock frame period, `ord` timing |
| `tb_fft_top` | same at N = 128, 5 frames |
| `tb_fft_sizes` | N = 32 and N = 512 side by side, 4 frames each |
| `tb_addr_gen` | runs an ideal floating-point FFT in the testbench on the generated schedule (catches any read-before-write or overwrite), every address read once per stage, no block conflicts, period and `ord` timing |
| `tb_port_router`, `tb_mem_bank`, `tb_dp_ram`, `tb_read_mux` | routing table, read-first loading, latencies, against reference models |
| `tb_pe` | butterfly against integer arithmetic |
| `tb_fft_pkg` | address-bit helpers against bit-by-bit loops |
| `tb_twiddle_gen` | all indices at N = 128 and a sweep at N = 2048 against cos/sin (≤ 0.6 LSB) |

`fft_top` also asserts that `ord` is never high without `ird` two clocks
earlier. `port_router` asserts that a port never receives a read and a write
for its block in the same clock. The end-to-end tests use `fft_stream_checker.sv`. It counts the clocks in
which loading and unloading overlap, the clocks spent in address-swapping
stages and the stage transitions, and it fails if any of these never happens.

## Choices and departures

Taken from the original design: the counter-based address generation, the
bit swaps, the four dual-port blocks selected by the centre address bits, the
port pairing (A: R0/W1, B: R1/W0) and its routing table, the two-clock PE with
registers between adders and multiplier, the quarter-wave twiddle table, and
the overlapped load/unload/last stage that gives (N/2)·log2(N) clocks per
frame. The following are this implementation's own:

* **Butterfly bit in the late stages.** The original flow diagram inserts the
  butterfly bit at S-1-s in every stage. Its own worked N = 32 example,
  however, pairs bit s in the stages after SH. The RTL uses bit s there;
  S-1-s would produce a wrong transform.
* **Inverted counter bit.** The original names bit 2 as its example, which
  works for N = 32 and 128. Here it is max(2, SH-1), which is conflict-free for
  N = 32 … 8192 (checked by simulating the schedule).
* **Write data on the ports.** The original routing drawing shows Dox on port
  A, but port A carries W1, which is Doy's address. Here port A writes Doy and
  port B writes Dox.
* **Output source.** The block diagram draws the output from the read-data
  multiplexers; its text says results are taken from the PE. The outputs come
  from the PE.
* **Loading through read-first ports**, the pairing of samples (k, k+N/2), the
  `ird`/`ord` timing and the reset behaviour are this design's.
* **Word lengths and scaling.** The 18-bit data follows the original; the
  18-bit twiddles, the halving in every stage and the truncation are choices
  made here.
* **Not implemented:**
  * Even log2(N) (for example N = 1024). The original handles it only with
    extra write-only clocks around stage SH, which it does not describe, so
    elaboration stops with an error.
  * A clock enable or back-pressure.
* The original reports 115 MHz, 116 flip-flops and 754 LUTs for N = 512 on a
  Spartan-3E, and 186 MHz, 174 registers and 607 LUTs for N = 2048 on a
  Virtex-6. This RTL was not put through FPGA tools. Its flip-flop count is
  higher mainly because of the 72-bit PE pipeline register and the 36-bit
  twiddle register.
