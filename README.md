# Variable-length FFT for 4×4 MIMO-OFDMA on 16 in-place radix-2 processors

A 4×4 MIMO-OFDMA receiver sees up to four symbols at once, one per spatial
stream, and each may have its own length: 128, 256, 512, 1024 or 2048 complex
points. The usual answer is four separate pipelined FFTs, each sized for 2048
points. This design handles them with one shared pool of hardware instead:

- There are **16 identical radix-2 butterfly processors**.
- Each processor owns **two 64-word banks**, so it holds 128 points.
- One processor alone computes a 128-point FFT completely in place.
- A **group of k = 2, 4, 8 or 16 neighbouring processors** computes a
  128·k-point FFT together. In the last passes, an interconnect lets each
  processor reach a bank of one other group member.
- Any set of symbols whose lengths add up to at most 2048 is transformed as
  one *frame*. All groups run at the same time. For example, 4 × 512 points is
  four groups of four processors, and 1024 + 512 + 256 + 128 also fits.
- A second, identical set of 32 banks takes in the next frame and sends out
  the previous results while the processors work on the current one.

The output of every symbol is its spectrum X[k]/N, in natural bin order. The
design follows the published organisation "A new FFT Architecture for 4×4
MIMO-OFDMA Systems with Variable Symbol Lengths". The points where it differs
are collected in [Departures from the source design](#departures-from-the-source-design).

All RTL is in `rtl/` and all self-checking testbenches are in `tb/`. The
sources are SystemVerilog-2017 and simulate with Verilator 5.

## Block structure

```
             in_data ─► fft_control ─► I/O set (32 banks) ─┐
            out_data ◄─      │                             │  ping-pong:
                             │ start/size                  │  sets swap roles
                             ▼                             │  per frame
  P0  P1 … P15  (fft_processor, each: fft_addr_gen, twiddle ROM, fft_butterfly)
   │upper port: own bank B(i,0)                            │
   │lower port: ─► fft_interconnect ─► some bank B(x,1)     │
   └──────────────────────────────► compute set (32 banks) ─┘   (fft_memory)
```

| File | Contents |
|---|---|
| `rtl/fft_pkg.sv` | Shared constants (16 processors, 64-word banks, 16-bit data) and types. |
| `rtl/fft_bank.sv` | 64 × 32-bit bank with one write port and one read port; the read is registered. |
| `rtl/fft_twiddle_rom.sv` | 1024-entry table of W₂₀₄₈ᵗ = e^(−j2πt/2048). It is computed at elaboration, so there is no data file. |
| `rtl/fft_butterfly.sv` | Radix-2 DIT butterfly with a 1/2 scale per pass, rounding and saturation. |
| `rtl/fft_addr_gen.sv` | Per-processor pass and pair counters. Generates the addresses, the exchange controls, the twiddle address and the interconnect select. |
| `rtl/fft_processor.sv` | One processor: address generator, ROM, butterfly, and the exchange multiplexers at the inputs and outputs. |
| `rtl/fft_interconnect.sv` | 5-way routing between each processor's lower port and the B(x,1) banks. |
| `rtl/fft_memory.sv` | The two 32-bank sets, with the compute and I/O roles selected by `io_sel`. |
| `rtl/fft_control.sv` | Frame control: places symbols, loads samples in bit-reversed order, swaps the sets, starts groups, and unloads in natural order. |
| `rtl/mimo_fft_top.sv` | The top level that wires all of the above. |

## The in-place permutation (the core idea)

### Where elements sit

A radix-2 FFT of N = 2ⁿ points has n passes, each of N/2 butterflies. In this
design:

- Every butterfly reads one word from a "0" bank and one from a "1" bank.
- It writes its two results **back to the same two addresses**.

So each processor needs only a single read stream and a single write stream per
bank, and no scratch memory. The subtle part is the placement of the elements.
The placement must satisfy two conditions:

1. Both partners of every butterfly in every pass sit in different banks at a
   computable address.
2. The final results come out sorted.

The placement rule rests on one idea: each element is identified by its
original index (its position after bit reversal). At load time, element d goes
to bank d[0] at address d[6:1] of processor d[10:7].

The processor then applies two exchanges:

- **Input exchange (`swapin`).** Before the butterfly, the two words read are
  exchanged when the "upper" operand x_r actually lies in bank 1. The two read
  addresses are exchanged along with them.
- **Output exchange (`swapout`).** After the butterfly, the two results are
  exchanged when a given index bit is 1. The result meant for bank 1 then goes
  to bank 0, and the other way round.

Together the two exchanges keep a sorting invariant from pass to pass. Just
before the pass that merges two sub-FFTs of size 2ʲ, each sub-FFT's results are
already ordered as follows:

- The lower half of the indices is in bank 0, in increasing order.
- The upper half is in bank 1, in decreasing order.

The pass then produces the same arrangement for the 2ʲ⁺¹-point result. After
the last pass:

- Bank 0 holds bins 0 … N/2−1 in ascending addresses.
- Bank 1 holds bin N−1−a at address a.

That is why the output can be read in natural order without a reorder buffer.
Unloading reads bank 0 upwards, then bank 1 downwards, across the group.

### Counter formulas

Let the 10-bit pair counter be c = {q, cnt6}. Here cnt6 counts the 64 pairs
of one processor, and q is its row inside a group. Pass j (0 ≤ j < n)
generates:

| Signal | Meaning | Formula | Hardware |
|---|---|---|---|
| `a0` | bank-0 address | c with bit j−1 cleared | an 11-bit rotate register preset to `1111111110_0`, rotated left once per pass; its 10 upper bits are ANDed with c |
| `a1` | bank-1 address | a0 XOR (j ones) | a shift register with serial input 1, shifted left once per pass |
| `swapin` | input exchange | c[j−1] (0 in pass 0) | bit selection |
| `swapout` | output exchange | c[j] | bit selection |
| read addresses | — | (a0, a1), exchanged when `swapin` = 1 | multiplexer |
| twiddle address | exponent k·2^(10−j) | t = the j low bits of c placed as the MSBs of a 10-bit word. If the MSB of t is 1, the remaining bits are inverted | a shift-right register with serial input 1 provides the inversion mask |

The twiddle rule comes from the sorting invariant. The first 2^(j−1) pairs of
a pass take their twiddles in increasing exponent order. The remaining pairs
take them in decreasing order, because their partner halves are stored
reversed.

Only the low 6 bits of a0 and a1 address a bank. The upper bits select the
processor. This logic is constant-depth for every FFT size: the registers are
just preset differently.

### Worked case

For 16 points (n = 4), one processor pass by pass:

| Pass j | Butterfly partners differ in index bit | `swapin` from | `swapout` from |
|---|---|---|---|
| 0 | bit 0 (bank 0 vs bank 1 from the start) | — | c[0] |
| 1 | bit 1 | c[0] | c[1] |
| 2 | bit 2 | c[1] | c[2] |
| 3 | bit 3 | c[2] | c[3] |

`tb_fft_addr_gen` runs the generator for all sizes and all 16 processors. It
tracks where every element index really is and checks that every pair read is
a genuine butterfly pair of that pass. It also checks that the final layout is
the sorted one described above.

## Groups of processors and the interconnect

Passes 0 … 6 of any FFT stay inside one processor (64 pairs, 128 points).

### Cross-processor passes

A 2ⁿ-point FFT with n > 7 runs on 2^(n−7) processors. It needs n−7 extra
passes, j = 7 … 10. Write j′ = j − 6 (1 ≤ j′ ≤ 4). In these passes:

- Each processor keeps its upper butterfly port on its **own** bank B(i,0).
- Its lower port goes to bank **B(x,1) with x = i XOR (2^j′ − 1)**.

Over the passes, processor i therefore uses five lower banks:

| Pass | Lower bank |
|---|---|
| 0–6 | its own B(i,1) |
| 7 | B(i ⊕ 1, 1) |
| 8 | B(i ⊕ 3, 1) |
| 9 | B(i ⊕ 7, 1) |
| 10 | B(i ⊕ 15, 1) |

### The interconnect

`fft_interconnect` is a 5-to-1 multiplexer in front of each processor's lower
input. A matching 5-to-1 multiplexer in front of each B(x,1) bank plays the
role of the lower output's demultiplexer. The partner relation
x = i ⊕ (2^j′ − 1) is symmetric, and every processor of a group is in the same
pass. So each bank can select its writer using its own processor's select
`ic_sel`.

Groups are aligned: a group of k processors starts at a multiple of k. As a
result the XOR never leaves the group, and groups of different sizes can run
side by side.

### Which pairs each processor computes

Keeping the upper port on the processor's own bank has a consequence for the
pair rows. A processor whose group-local index has bit j′−1 set computes the
pairs of row q = i_local ⊕ (2^(j′−1) − 1) rather than row i_local. This
correction is applied in `fft_addr_gen` to the four upper bits of the pair
counter, and it holds for passes 8 and up (pass 7 needs none).

## Frames, loading and unloading (`fft_control`, `fft_memory`)

### The two sets

The two bank sets alternate:

- The **compute set** is owned by the processors.
- The **I/O set** is owned by the control.

### Frame configuration

A frame is described by `cfg[0..3]`, one `{en, log2n}` entry per stream. The
rules are:

- Entries are ordered longest first.
- Lengths add up to at most 2048.
- Both rules are checked by assertions.

A symbol of 2ⁿ points gets the next aligned group of 2^(n−7) processors.

### Frame sequence

1. **Load.** Samples arrive one per clock with `in_valid`/`in_ready`,
   stream after stream. Sample m of a symbol goes to element
   d = bitreverse_n(m): processor base + d[10:7], bank d[0], address d[6:1].
2. **Swap.** The sets swap roles when both of these hold:
   - the I/O set is full;
   - the processors are idle.

   The same clock starts every group with its size. No sample is accepted in
   that clock. A frame whose loading has not begun can also let a finished
   result through: the sets swap so that the result can be read out.
3. **Compute.** All groups run; a 2ⁿ-point group is busy for n·66 clocks.
   `compute_busy` is high until the longest group is done.
4. **Unload.** After the next swap, the results are in the I/O set. They are
   read out before the next frame is loaded. For each symbol, bins
   0 … N/2−1 come from bank 0 ascending, then bins N/2 … N−1 from bank 1
   descending. The output is tagged with `out_sym`, `out_idx` and `out_last`.

Loading and unloading of one frame overlap with the computation of the other.

### Top-level ports (`mimo_fft_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | Single clock; synchronous active-low reset |
| `cfg[4]` | in | 4 × {en, log2n[3:0]} | Symbols of the next frame, longest first; sampled with its first sample |
| `in_valid`, `in_ready` | in / out | 1 | A sample is taken when both are high |
| `in_data` | in | 2 × 16 | Complex sample `{re, im}`; symbols back to back in stream order |
| `out_valid` | out | 1 | One result this clock (no back-pressure) |
| `out_data` | out | 2 × 16 | Bin X[k]/N |
| `out_sym`, `out_idx` | out | 2, 11 | Stream and bin index k of the result |
| `out_last` | out | 1 | Last bin of a symbol |
| `compute_busy` | out | 1 | The processors are working on a frame |

## Arithmetic

- Data are 16-bit two's-complement real and imaginary parts (`DW`).
- Twiddles are Q1.15 (`TWW`), rounded; +1.0 saturates to 32767.
- The butterfly computes:
  - O_R = (I_R + W·I_S)/2
  - O_S = (I_R − W·I_S)/2
- The product is rounded to 16 bits. Each half is rounded (add ½ LSB, then
  shift) and saturated.
- Halving in every pass makes the output X[k]/N, and prevents overflow for any
  input.
- The cost is precision for small signals. Against a floating-point reference,
  the worst error seen on random full-scale input is about 3.6 LSB at 2048
  points.

## Timing

### Compute

- Each processor issues one pair per clock.
- Pipeline:
  - clock 0: bank read, with the twiddle ROM read in parallel;
  - clock 1: butterfly;
  - clock 2: write-back to the addresses just read.
- A pass is 64 pairs followed by a 2-clock gap (`PIPE_LAT`). The gap makes sure
  the last results of one pass are written before the next pass reads them.
- A 2ⁿ-point FFT therefore takes **n·66 clocks**:

| Points | Clocks |
|---|---|
| 128 | 462 |
| 256 | 528 |
| 512 | 594 |
| 1024 | 660 |
| 2048 | 726 |

- `done` follows one clock after the last write.

### I/O

- One sample in and one bin out per clock, at most.
- A frame of S samples needs S clocks to load and S clocks to unload.
- These happen one after the other on the single I/O port of the idle set.
- With back-to-back 2048-point symbols, one frame leaves about every 4100
  clocks. A result that is ready before the next symbol starts loading is
  read out at once, so frames leave in pairs: 2049 clocks apart, then 6148.

### Reset

Reset is synchronous and active low. It clears all control state. The bank
contents are not reset: they are always written before they are read.

## Departures from the source design

- **Pass length.** The source organisation completes a pass in 64 clocks
  (704 clocks for 2048 points). Here it takes 66, because of the 2-clock
  write-back pipeline. Without the gap, the first pairs of a pass can read
  words still in flight for N ≥ 512.
- **Clocks and input rate.** The source organisation uses two clocks: a
  33.33 MHz core and a 24.24 MHz input, with four streams arriving in parallel.
  That is how it finishes four 2048-point symbols within 2048 input clocks.
  This design uses a single clock and a single one-sample-per-clock I/O port
  that first unloads, then loads. A 2048-point frame thus needs 4096 I/O
  clocks against 726 compute clocks. Four parallel input lanes and a clock
  crossing would be needed to reach the source throughput.
- **Twiddle address width.** The source describes the twiddle word as built
  from the j+1 low counter bits. The data flow it also describes needs the
  j low bits (exponent step 2^(10−j) in pass j). This design uses j bits,
  which gives correct transforms at every size.
- **Partner bank formula.** The source states both:
  - a partner formula that combines the output and input permutations into
    the bank index;
  - that the upper port always stays on the processor's own bank.

  This design keeps the second rule. It moves the input-permutation
  correction into the pair row instead (see above), so the lower bank is
  simply B(i ⊕ (2^j′−1), 1).
- **Address generator details.** The source draws a size input and a fixed
  preset for its counters. Here, the pass counter is preset to log2n−1, and
  the processor index enters the pair row directly.
- **Unspecified parts, chosen here:**
  - word length;
  - scaling and rounding;
  - the exact memory port count;
  - the ping-pong use of the second bank set;
  - symbol placement;
  - the I/O handshake;
  - the whole frame control.

## Verification

Every block has a self-checking testbench. Each one prints
`TB_RESULT checks=<n> failures=<n>`, and each has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_fft_bank` | Random writes and reads against a reference array, including the one-clock read latency. |
| `tb_fft_twiddle_rom` | All 1024 entries against cos/sin computed in the testbench (±1 LSB). |
| `tb_fft_butterfly` | Random operands and twiddles against an integer reference of the same rounding and saturation. |
| `tb_fft_interconnect` | Routing of all selects for random aligned group layouts, in both directions. |
| `tb_fft_addr_gen` | Element tracking for all sizes and processors; issue count and the n·66+1 clock latency. |
| `tb_fft_processor` | A full 128-point FFT of one processor, with behavioural banks, against a floating-point DFT; latency 7·66+1 clocks. |
| `tb_fft_memory` | Both sets on both sides, across role swaps. |
| `tb_fft_control` | Bit-reversed placement and natural-order unloading through an identity "FFT", group starts, and the swap and flush rules. |
| `tb_mimo_fft_top` | End to end at full size, default parameters. |
| `tb_mimo_fft_stream` | Worst-case load: four 2048-point symbols, one per stream, back to back. Checks every bin, 726 compute clocks per frame, and a rate of at least one frame per 2·2048+8 clocks (8197 clocks per two frames measured). |

### The end-to-end test

`tb_mimo_fft_top` runs these frames:

- one 2048-point symbol;
- 4 × 512;
- 1024 + 512 + 256 + 128;
- 256 + 256 + 128 + 128;
- a lone 128-point symbol on stream 2;
- 2 × 1024;
- 2048 again.

Every bin of every frame is compared against a floating-point DFT/N, within 6
LSB. The compute time of each frame is checked against n·66 clocks. The test
also counts each mechanism and fails if any of them never happened:

- input and output exchanges;
- every interconnect route 1–4;
- every group size from 1 to 16;
- multi-symbol frames;
- loading and unloading overlapping with computation.

### Running a test with Verilator

```
verilator --binary --timing --assert -Irtl -Wno-fatal \
    rtl/fft_pkg.sv rtl/*.sv tb/tb_mimo_fft_top.sv --top-module tb_mimo_fft_top
./obj_dir/Vtb_mimo_fft_top
```

Replace the testbench file and top module name to run any other test. The
full-size end-to-end test runs in well under a minute.

## Changing the design

- Sizes and widths are in `rtl/fft_pkg.sv`.
- `DW` and `TWW` can be changed freely; the testbenches' tolerance assumes 16
  bits.
- `NPROC`, `BANK_DEPTH` and the 11-bit maximum size are tied together
  (16 × 128 = 2048). The group, partner and counter logic assume 4 processor
  index bits and 6 bank address bits.
