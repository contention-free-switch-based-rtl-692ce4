# Contention-free switch-based radix-2 FFT engine (1024 points, 2 PEs)

This engine computes a 1024-point radix-2 decimation-in-frequency (DIF) FFT.
It has two butterfly processing elements (PEs). They share four small
single-port RAMs through a switch fabric, in place of one large memory or a
pipeline of delay lines. Every stage runs without a stall: in each two-cycle
slot, every RAM is read once and written once. This holds even in the late
stages, where the two operands of a butterfly would normally sit in the same
RAM. A small memory-management rule, applied one stage ahead, moves data so
that this never happens. The whole transform takes
2 cycles x 256 slots x 10 stages = **5120 cycles**.

The RTL is parameterised over the transform size `N` (a power of two) and the
number of PEs `NPE` (a power of two). It always has `2*NPE` data RAMs of
`N/(2*NPE)` words and `NPE` twiddle ROMs of `N/2` words. The defaults are
`N = 1024` and `NPE = 2`: four 256 x 32 RAMs and two 512 x 32 ROMs.

## The contention problem

A DIF stage `t` (where `t = 0 .. log2 N - 1`) pairs `x(i)` with `x(i + D)`.
The stage distance is `D = N / 2^(t+1)`. Equivalently, it pairs indices that
differ only in bit `b = log2 N - 1 - t`. The samples start in natural order:
`x(n)` is in RAM `n / 256`, at address `n mod 256`.

* **Safe stages.** In stages 0 and 1 (in general, `t <= log2 NPE`), `D` is
  256 or more. The two operands are then at the same address of two different
  RAMs, so the two PEs together use all four RAMs.
* **Hazard stages.** In stages 2 .. 9, `D` is smaller than a RAM. Both
  operands would then come from the same single-port RAM, which needs two
  reads. In these stages every butterfly pair is a hazard pair: the XOR of its
  two indices equals the stage distance, and both indices fall into one RAM.

## Swap and shuffle

Each PE computes `c = a + b` and `d = (a - b) * w`. The fabric can change how
data reaches a PE and how results return:

| operation | effect |
|---|---|
| normal  | `x_i -> a`, `x_j -> b`; `c` is stored where `x_i` was, `d` where `x_j` was |
| swap    | the operands arrive reversed: the word from the PE's "first" RAM goes to `b` |
| shuffle | the results are crossed: `c` is stored where `x_j` was, `d` where `x_i` was |

Both can apply to the same butterfly. In the switch, the first RAM of the pair
receives `d` exactly when `swap XOR shuffle` is set.

**The rule** (it only looks one stage ahead):

* **Shuffle.** In stages `log2 NPE .. log2 N - 2`, shuffle the butterfly
  `(i, j)` when bit `b-1` of `i` is 1. Bit `b-1` is the bit the next stage
  pairs on. Take the four elements `i`, `j`, `i ^ 2^(b-1)` and
  `j ^ 2^(b-1)`. They form two butterflies now and two hazard pairs in the
  next stage. Shuffling one of the two current butterflies, and not the other,
  puts each next-stage pair into two different RAMs.
* **Swap.** When the word read from the PE's first RAM is the higher index
  `x_j`, swap the inputs.

Data only ever moves in place between the two places a butterfly owns, so
everything stays traceable by formula. With that rule, a hazard stage `t` has a
fixed schedule:

* PE `q` uses RAMs `2q` and `2q+1`.
* In slot `s`, the even RAM is read at address `s`. The odd RAM is read at
  `s XOR mask`, where `mask` sets address bits `b .. 7`.
* `swap = s[b]` and `shuffle = s[b-1]`.
* The twiddle exponent is `s[b-1:0] << t`.

In safe stages, both RAMs are read at `s` and there is no swap. With `NPE > 2`,
the RAM pairs follow the memory-index bit that the stage pairs on. Every RAM
address is read exactly once per stage, so no scheduling logic, queue or
pointer memory is needed: the whole memory-management unit is a few gates
driven by the stage and slot counters.

**Small example** (`N = 16`, 4 RAMs of 4 words):

* Shuffling in stage 1 leaves `x2(0)` in RAM 0 and `x2(2)` in RAM 1.
* Shuffling in stage 2 leaves `x3(0)` in RAM 0 and `x3(1)` in RAM 1.

Without the shuffles, each of these pairs would share RAM 0.

## Where the results end up

A DIF transform leaves `X(k)` at index `n = bitreverse(k)`. The shuffles then
move index `n` to the place `p` given by:

* `p[j] = n[j] ^ n[j-1] ^ ... ^ n[0]` for `j <= 8` (a prefix XOR);
* `p[9] = n[9]`.

`p[9:8]` is the RAM and `p[7:0]` the address. The read-out applies this map
(`fft_reorder`), so results leave in natural order.

## Number format

* A word is a complex number of 32 bits: `{re[15:0], im[15:0]}`, both parts
  two's complement.
* Twiddles use the same layout and hold `{cos, -sin}` in Q2.14, so 16384
  stands for 1.0. ROM entry `e` is `W_1024^e`, for `e = 0 .. 511`. The table
  is computed during elaboration from a Taylor series, and no data file is
  needed.
* The butterfly does not scale. `c` wraps to 16 bits. `d` is computed at full
  precision, rounded half-up at bit 14 and wrapped.

A 1024-point transform grows values by up to 1024x, so keep each input part
within about ±15 (in general, ±2^15/N) for a result that never wraps. Where the
binary point sits is up to the user.

## Interface and timing (`fft_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `in_valid`, `in_data` | in | one complex sample per accepted cycle, `x(0)` first |
| `in_ready` | out | high during the load phase |
| `busy` | out | high during the 5120 compute cycles |
| `out_valid`, `out_index`, `out_data` | out | `X(0) .. X(N-1)`, one per cycle, in order |
| `done` | out | pulses together with `X(N-1)` |

The engine cycles through three phases:

1. **Load.** `N` accepted samples. Gaps in `in_valid` are allowed.
2. **Compute.** `log2 N` stages of `N/(2*NPE)` slots. Each slot has a read
   cycle and then a write cycle:
   * **Read cycle:** every RAM and ROM latches its address.
   * **Write cycle:** the read data arrive, the combinational PEs compute,
     and the results are written back to the same addresses.
3. **Unload.** `N` cycles. The first output appears one cycle after compute
   ends. There is no back-pressure.

Then the engine is ready for the next frame. A frame therefore takes
`N + 5120 + N + 1` cycles at the default size.

## Modules

| file | role |
|---|---|
| `rtl/fft_pkg.sv` | word format (`cplx_t`), phase enum |
| `rtl/fft_top.sv` | the engine; also asserts that no slot has memory contention |
| `rtl/fft_ctrl.sv` | phase, stage, slot and read/write-cycle counters |
| `rtl/fft_agu.sv` | memory-management unit: RAM pairs, addresses, swap, shuffle, twiddle exponent |
| `rtl/fft_switch.sv` | switch fabric: multiplexers between RAMs and PEs, applying swap and shuffle |
| `rtl/fft_pe.sv` | combinational radix-2 DIF butterfly |
| `rtl/fft_ram.sv` | single-port RAM, one-cycle read latency (a register array standing in for an SRAM macro) |
| `rtl/fft_rom.sv` | twiddle ROM, one-cycle read latency |
| `rtl/fft_reorder.sv` | output index to RAM/address map |

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_fft_top` | default size, three frames: random data, a tone, random data with input gaps |
| `tb_fft_top_m4` | `N = 1024` with four PEs and eight RAMs; compute must take 2560 cycles, half the two-PE time |
| `tb_fft_agu` | memory-management unit |
| `tb_fft_reorder` | output reorder map |
| `tb_fft_pe`, `tb_fft_ram`, `tb_fft_rom`, `tb_fft_switch`, `tb_fft_ctrl` | unit tests |

**`tb_fft_top`** compares every bin bit-exactly with a plain in-place software
DIF FFT that uses the same fixed-point arithmetic. It compares every 16th bin
with a double-precision DFT; the largest error seen is about 5 LSB. It checks
that the compute phase takes exactly 5120 cycles. It also counts how often
swap, shuffle, both together, hazard and safe slots, and out-of-place read-out
occur, and fails if any of them never occurs.

**`tb_fft_agu`** and **`tb_fft_reorder`** use an independent model. It only
tracks where each element sits as the shuffle flags move it. Against it they
check:

* every slot is free of contention;
* every operand pair is a genuine DIF pair;
* the swap flags and twiddle exponents are correct;
* each butterfly and each RAM word is used once per stage.

They do this at `N = 1024` with 2 PEs, at `N = 16` with 2 PEs (including the
placements from the small example above) and at `N = 64` with 4 PEs.

To run a testbench with Verilator, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/fft_pkg.sv tb/tb_fft_top.sv --top-module tb_fft_top
./obj_dir/Vtb_fft_top
```

## Choices not fixed by the architecture, and departures

* **Shuffle condition and schedule.** The architecture fixes only the two
  rules: swap when the operands are reversed in memory, and shuffle when the
  pair would cause a hazard in the next stage. The concrete condition (bit
  `b-1` of `i`), the slot schedule, the twiddle addressing and the read-out
  map are this design's own. They are verified as described above.
* **No pointer memory.** Data locations follow from the stage and slot
  counters alone. The alternative of tracking each element with a separate
  pointer memory, which costs extra storage and an extra cycle per operand
  fetch, is not built.
* **Twiddle ROM size.** Each ROM has `N/2` words (512). An alternative sizing
  of `N/(2*NPE)` words (256) would need symmetry folding of the twiddle
  exponent. It is not used.
* **Hazard-stage boundary.** Hazard stages are `t > log2 NPE`, that is,
  stages 2 .. 9 for two PEs.
* **Interface and reset.** The load/unload interface, the phase sequencing,
  the reset, the number format details (Q2.14 twiddles, rounding,
  wrap-around) and the combinational PE are this design's own.
* **Memories.** The RAMs and ROMs are register arrays with the timing of the
  intended SRAM macros: a full cycle from address to data. For a physical
  implementation, replace `fft_ram` and `fft_rom` with macros that have the
  same ports.
* **Single-port only.** The two-cycle slot assumes single-port RAMs. A
  variant with dual-port RAMs or register files, taking one cycle per slot
  (2560 cycles), is not built.
* **Physical results.** Physical-design figures (65 nm, about 700 ps cycle)
  are not reproduced by RTL. Nothing here is pipelined for such a clock: the
  PE's complex multiply is combinational within the write cycle.
