# Radix-4 FFT processor with adder-free address generation

This is an in-place, memory-based radix-4 FFT for N = 4^v points (default
N = 64), with 32-bit complex samples (16-bit real and 16-bit imaginary parts).
The samples sit in four two-port memory banks. A single radix-4 butterfly
works through the passes, one butterfly per clock.

What makes the design unusual is its address generator. Conventional radix-4
address generators for multi-bank memories need modulo-r additions, and the
chain of additions grows with N. Here the address of every memory access is
just the butterfly counter, **rotated** by an amount that depends on the pass.
All four banks are read and written at the same address. The cost of this is
two small register files, 16 words each, that reorder data between the
memories and the butterfly. Their multiplexer selects depend only on the three
lowest counter bits, so their logic is the same for every N.

The scheme follows the one published by X. Xiao, E. Oruklu and J. Saniie
("Fast Memory Addressing Scheme for Radix-4 FFT Implementation"). The list
near the end says which details were added here.

## Data layout and passes

Bank k holds samples k·N/4 … k·N/4 + N/4 − 1. For N = 64, bank 0 holds
samples 0–15, bank 1 holds 16–31, and so on. The bank address is the sample
address modulo N/4.

The transform is decimation-in-frequency with v = log4 N passes. The
butterflies of pass p take four samples at a stride of N/4^(p+1):

* **Pass 0** has stride N/4. The four operands of a butterfly lie in four
  different banks at the same bank address, so one read of all banks gives
  one complete butterfly.
* **Passes 1 … v−1** have a stride of N/16 or less. All four operands of a
  butterfly lie in the *same* bank. One bank can deliver only one word per
  clock, so it takes four clocks to gather a butterfly. In those four clocks,
  the four banks together deliver four complete butterflies.

## Address generation (Counter D, barrel shifter)

`counter_d` holds the butterfly counter B (m = log2(N/4) bits) and the pass
counter P. P is v bits wide and one-hot.

* Bank address (read and write): **RR(B, 2p)**, which is B rotated right by
  2p bits. The two fastest bits of B, B1 and B0, are rotated up to bit
  positions m−2p+1 and m−2p. That is exactly the stride of pass p, so four
  consecutive clocks visit the four operands of one butterfly in every bank.
  The higher bits of B select the butterfly.
* Twiddle address: **B with its 2p low bits cleared**. B >> 2p is the
  position of the butterfly inside its pass-p sub-transform. Shifting it back
  left by 2p multiplies the twiddle exponent by 4^p, so one table of W_N^a
  serves all passes. In the last pass the address is 0 and every twiddle
  is 1.

Both are plain multiplexer/AND logic driven by the one-hot pass. There is no
adder and no decoder.

Example, N = 64, pass 1. Clocks 0–3 read bank address 0, 4, 8, 12: bank 0
delivers samples 0, 4, 8, 12, bank 1 delivers 16, 20, 24, 28, and so on.
Clocks 4–7 read bank address 1, 5, 9, 13.

## The register sets: a transpose without double buffering

This is the part that takes some thought. Each register set has 16 words,
viewed as a 4×4 matrix: register 4i+j is row i, column j.

Each clock, with slot t = B[1:0], the set names four registers. They are
either **column t** (registers t, 4+t, 8+t, 12+t) or **row t** (registers
4t … 4t+3). Lane x (0–3) of the input is written into the x-th named
register. In the same clock, that register's old content leaves on output
lane x. Which of the two is used flips every four clocks with B[2].

The result is a transpose:

* **Input set, R0–R15** (between the memories and the butterfly). In an even
  group (B[2] = 0), the word from bank j in slot t goes to register 4j+t, so
  bank j's butterfly fills row j. In the next group the slots name rows, so
  slot t hands out row t: the four operands of bank t's butterfly, in order
  a, b, c, d. At the same time, row t is refilled with the new group's word
  from each bank. The odd groups work the same way with rows and columns
  exchanged.
* **Output set, R16–R31** (between the butterfly and the memories). It does
  the reverse: one butterfly result per clock goes in, and four words per
  clock come out, one per bank, each at the bank address that was read in the
  same slot. This set starts with rows in the even groups.

The register contents this produces for pass 1 of the 64-point transform are
below (input set; sample numbers):

| after clock | R0–R3          | R4–R7          | R0 / R4 / R8 / R12 |
|-------------|----------------|----------------|--------------------|
| 3           | 0, 4, 8, 12    | 16, 20, 24, 28 | 0, 16, 32, 48      |
| 4           | 1, 17, 33, 49  | 16, 20, 24, 28 | 1, 16, 32, 48      |
| 5           | 1, 17, 33, 49  | 5, 21, 37, 53  | 1, 5, 32, 48       |
| 8           | 2, 17, 33, 49  | 18, 21, 37, 53 | 2, 18, 34, 50      |

Each clock reads the four registers it rewrites. So 16 registers per set are
enough, and the butterfly is busy on every clock of a pass.

**Pass 0.** The operands arrive together, so transposing them would be wrong.
During pass 0 both sets therefore stop alternating and keep their even-group
orientation, which makes each one a plain 4-clock delay. The first group of
pass 1 is also even. This lets the last pass-0 group leave a set while the
first pass-1 group enters it, with no gap between the passes. `mux_ctrl`
therefore sees a pass-0 flag as well as B[2:0].

## Pipeline and timing

Clocks after a read address is issued. These are stages of the `ctl_q`
control pipeline in `fft_radix4`, which carries valid, pass, B and the
address.

| stage | event |
|-------|-------|
| 0     | address RR(B, 2p) to all four banks (synchronous read) |
| 1     | bank words enter the input set |
| 4     | twiddle address to the three twiddle ROMs |
| 5     | butterfly input (the group read four clocks earlier) |
| 9     | butterfly result enters the output set |
| 13    | write-back to the stage-13 address (the write uses the bank's second port) |

A word read by pass p+1 must already have been written back by pass p.
Word a is read at clock RL(a, 2p) of pass p and at clock RL(a, 2p+2) of
pass p+1 (RL is rotate left). `counter_d` works out at elaboration time the
smallest gap between passes that satisfies this for every word:

| N    | passes | gap per pass boundary | clocks start→done | ideal N/4·log4 N |
|------|--------|-----------------------|-------------------|------------------|
| 64   | 3      | 7                     | 75                | 48               |
| 256  | 4      | 0                     | 269               | 256              |
| 1024 | 5      | 0                     | 1293              | 1280             |

From 256 points on, the passes follow each other without a gap. The only
overhead is the 13-clock drain at the end. At 64 points a pass (16 clocks)
is barely longer than the pipeline (13 clocks), which is why the gap is
needed there. `done` rises with the V·N/4 + (V−1)·gap + 13-th clock edge
after the edge that took `start`.

## Butterfly and number format

`radix4_butterfly` computes

    a' =  a + b + c + d
    b' = (a − jb − c + jd) · Wb        Wb = W_N^n
    c' = (a − b + c − d)   · Wc        Wc = W_N^2n
    d' = (a + jb − c − jd) · Wd        Wd = W_N^3n

in four pipeline stages: add, multiply, sum, then round/scale/clip. Sums
and products are kept at full precision (18-bit sums, 34-bit products).

Each result is scaled by 1/4 and rounded to nearest (ties go up). A part that
still does not fit in 16 bits is clipped, and this sets `ovf`. A complete
transform therefore returns **DFT/N**. It cannot clip when all input parts
have magnitude below about 23170 (2^15/√2).

Twiddles are 16-bit Q1.14 (1.0 = 16384). The three ROMs hold W_N^(K·a) for
a < N/4 and K = 1, 2, 3. They are computed by a constant function at
elaboration, so any N works without a table file.

**Output order.** The results stay in place, in base-4 digit-reversed
order. X(k) is at the sample address whose base-4 digits are those of k
reversed. For N = 64, X(1) is at address 16 and X(4) at address 4.

## Interface (`fft_radix4`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `start` | in | start a transform; taken only while `busy` is low |
| `busy` | out | transform running; the host port is ignored |
| `done` | out | one-clock pulse: all results are in the banks |
| `ovf` | out | some butterfly result was clipped; cleared by `start` |
| `host_we`, `host_waddr`, `host_wdata` | in | write one sample (address log2 N bits, data `cplx_t`) |
| `host_raddr` / `host_rdata` | in / out | read one sample; data arrive one clock after the address |

Typical use: write N samples, pulse `start`, wait for `done`, then read N
results. Parameters: `N` (power of 4, at least 64). `V`, `M` and `A` are
derived from `N` and should not be set.

## Files

| file | content |
|------|---------|
| `rtl/fft_pkg.sv` | `cplx_t`, `twid_t`, widths, pipeline latencies |
| `rtl/fft_radix4.sv` | top: banks, address pipeline, both register sets, butterfly, ROMs, host port |
| `rtl/counter_d.sv` | pass/butterfly counter, gap between passes, start/busy/done |
| `rtl/barrel_shifter.sv` | RR(B, 2p) |
| `rtl/twiddle_addr_gen.sv` | twiddle address |
| `rtl/twiddle_rom.sv` | one twiddle table (instantiated for K = 1, 2, 3) |
| `rtl/mem_bank.sv` | two-port synchronous RAM bank |
| `rtl/mux_ctrl.sv` | register-set selects from B[2:0] and the pass-0 flag |
| `rtl/reorder_regs.sv` | 16-register set with its input selectors and output multiplexers |
| `rtl/radix4_butterfly.sv` | pipelined butterfly |
| `tb/tb_<module>.sv` | self-checking test of each module |
| `tb/fft_model_pkg.sv` | reference fixed-point radix-4 FFT and floating-point DFT |
| `tb/fft_driver.sv` | load/run/unload/compare sequence for one processor instance |
| `tb/tb_fft_radix4.sv` | end-to-end test at the default N = 64 |
| `tb/tb_fft_workloads.sv` | the same test at N = 64, 256 and 1024 side by side |

## Simulation

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/fft_pkg.sv tb/fft_model_pkg.sv tb/tb_fft_radix4.sv \
        --top-module tb_fft_radix4
    obj_dir/Vtb_fft_radix4

Use the same command for any other `tb/tb_*.sv`; the unit tests do not need
`tb/fft_model_pkg.sv`. Each test ends with
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

The end-to-end tests run three transforms per size:

1. random data;
2. data built to clip in one pass-0 butterfly, with a host write and a
   second `start` during the run, both of which must be ignored;
3. random data again.

Every result word is compared bit for bit with a straightforward
triple-loop radix-4 model that knows nothing of banks or register sets. The
unclipped results are also compared with a floating-point DFT/N, to within
2+v LSB. The tests also check the clock count from start to done. They
check that the butterfly takes operands on every clock of a pass, and on
every clock of the whole transform when the passes run back to back. They
count how often each mechanism occurred and fail if one never did: pass-0
delay, row and column loads in both sets, gaps and drain, two passes
overlapping in the pipeline, and clipping.

## What is this design's own

These follow the original scheme:

* four two-port banks, one address for all four banks;
* RR(B, 2p) and the cleared-low-bits twiddle address;
* a V-bit pass counter (kept one-hot here);
* two 16-register sets with four selectors and four 16-to-1 multiplexers
  each;
* selects from B[2:0];
* a 4-clock butterfly;
* 16+16-bit data;
* register orientation as in the published pass-1 address tables.

These were added or chosen here:

* Synchronous bank reads and the 13-clock write-back latency.
* The computed gap between passes. The original claims N/4·log4 N clocks
  and does not discuss the pass-to-pass hazard; the 64-point build needs
  75 clocks.
* The pass-0 rule of the register sets. The original says the selects
  depend only on B[2:0]; here a pass-0 flag is added.
* The select logic, written as a 2:1 choice between {x, t} and {t, x}. It
  reduces to AND/OR gates on B[2:0] but does not claim to match the original
  gate drawing.
* The host port, start/busy/done, and reset.
* Q1.14 twiddles, 1/4 scaling per pass, rounding, clipping and `ovf`.
* Leaving the output in digit-reversed order.
* N must be a power of 4 and at least 64, because the selects use B[2].

Not reproduced: the original timing and area figures (0.18 µm CMOS,
about 5.5 ns, about 9000 cells for address generation). The RTL has only
been simulated and run through generic synthesis; it has not been taken to
a technology library.
