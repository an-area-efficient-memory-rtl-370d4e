# Direct digital frequency synthesizer with a memory-less sine table

A direct digital frequency synthesizer (DDFS) makes a sine wave from a clock.
A phase accumulator adds a frequency control word (FCW) to its phase on every
clock. A phase-to-amplitude converter then turns the phase into a sine
sample, which goes to a digital-to-analog converter (DAC). The output
frequency is

    f_out = f_clk * FCW / 2^12

This design makes two choices to keep the converter small:

* **Quarter-wave symmetry.** Only the first quarter of the sine wave is
  tabulated, in 64 entries of 6 bits. The other three quarters come from
  inverting the table address and the amplitude.
* **A table without memory.** Those 64 × 6 = 384 table bits are not held in
  storage or read through 64:1 multiplexers. Each of the six output bits is a
  sum-of-products equation of the six address bits, so the table synthesizes
  to a small network of AND, OR and NOT gates.

The phase accumulator is 12 bits wide. It is pipelined into three 4-bit
slices, each built on a Kogge-Stone parallel-prefix adder, so the longest
carry path is one 4-bit addition.

## Data path

    fcw[11:0] ─► pipelined_pa ─► phase[11:0] ─► phase[11:4] ─► quarter_wave_pac ─► sample[6:0] ─► (DAC)
                 3 × ks_adder                   half, quadrant,    memoryless_rom
                                                6-bit address      + output register

| module | file | what it is |
|---|---|---|
| `ddfs_top` | `rtl/ddfs_top.sv` | the whole synthesizer |
| `pipelined_pa` | `rtl/pipelined_pa.sv` | 12-bit phase accumulator in three 4-bit pipeline slices |
| `ks_adder` | `rtl/ks_adder.sv` | Kogge-Stone adder, 4 bits by default |
| `quarter_wave_pac` | `rtl/quarter_wave_pac.sv` | quarter-wave phase-to-amplitude converter with its output register |
| `memoryless_rom` | `rtl/memoryless_rom.sv` | the 64 × 6 quarter-sine table as gate equations |
| `ddfs_pkg` | `rtl/ddfs_pkg.sv` | default sizes (PA_W = 12, SLICE_W = 4, ROM_A = 6, AMP_W = 6) |

Top-level ports of `ddfs_top`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; everything is on the rising edge |
| `rst_n` | in | 1 | asynchronous reset, active low; clears every register |
| `fcw` | in | 12 | frequency control word, sampled on every clock |
| `phase` | out | 12 | accumulator phase, for observation |
| `sample` | out | 7 | sine sample in offset binary (0…127, mid-scale 63.5) |

**Latency.** `phase` lags a plain, unpipelined accumulator by 2 clocks.
`sample` is registered, so it follows `phase` by one more clock. A new FCW
therefore shows in `sample` 3 clocks after a plain accumulator would have
used it. One sample leaves on every clock.

## The memory-less table

Entry *n* (n = 0…63) holds

    amp(n) = floor( 63 · sin( π/2 · n/64 ) )

so the values run 0, 1, 3, 4, 6, … 61, 62, 62. The largest value is 62. The
values are truncated, not rounded. This is the only reading of the formula
under which the published equations for the two top bits fit the table.

The address bits follow decoder notation: X0 is the **most** significant bit
and X5 the least. So `addr[5]` is X0 and `addr[0]` is X5. The two top output
bits are

    A5 = X0 + X0'·X1·(X2 + X3·X4)
    A4 = X0·(X3 + X2 + X1) + X0'·X1·X2'·(X3' + X3·X4') + X0'·X1'·X2·(X3 + X3'·X4·X5)

The third term of A4 needs the X1' factor. Without it, A4 would be set for
entries 27–31 (values 37–42), where it must be 0.

The equations for A3…A0 are this design's own, derived from the same table. The derivation found the prime implicants with
Quine–McCluskey and chose a cover greedily. The result is 11, 10, 13 and 12
product terms. They are correct for all 64 addresses, but they are not
guaranteed to be minimal, and a synthesis tool will restructure them anyway.
To change the table (another scaling, rounding, or a half-LSB address
offset), derive new equations from the formula above. `tb_memoryless_rom`
computes the expected table with `$sin`, so it needs only the new formula.

## Quarter-wave symmetry and the output code

The converter splits the top eight phase bits as `{half, quadrant, addr[5:0]}`.
The four low phase bits are dropped. Then:

* **Quadrant bit set** (2nd and 4th quarters): the address is
  one's-complemented (`~addr`, i.e. 63 − n). This plays the rising quarter
  backwards.
* **Half bit set** (2nd half): the amplitude is one's-complemented.

The output is offset binary:

    first half:   sample = {1, amp}  = 64 + amp
    second half:  sample = {0, ~amp} = 63 − amp

Both halves are symmetric about 63.5, which is half an LSB off the integer
grid. Because of this offset, negation is a plain inversion. No
two's-complement adder is needed after the table, and none is needed on the
address either.

Mirroring the address with `~addr` also has a cost. The second quarter uses
the table at 63 − k where exact symmetry would use 64 − k. This error is
small and inherent in the one's-complement scheme, and the spectrum figures
below include it.

## Pipelined phase accumulator

The accumulator `PA_W` = 12 is cut into `PA_W/SLICE_W` = 3 slices of 4 bits.
Each slice has a 4-bit `ks_adder` and a 4-bit register. Slice *k* runs one
clock after slice *k*−1:

* **Input skew.** The FCW bits of slice *k* pass through *k* delay registers.
  Slice *k* therefore adds the same FCW word that slice 0 used *k* clocks
  earlier.
* **Carry register.** Slice *k*−1 registers its carry out. Slice *k* adds it
  as its carry in on the next clock, which is exactly when it handles the same
  FCW word.
* **Output deskew.** The sum of slice *k* passes through NS−1−*k* registers,
  so all slices of one phase word leave together.

With these registers the output is bit-for-bit the sequence of an ordinary
accumulator, delayed by NS−1 clocks. This holds even while the FCW changes
from clock to clock. The parameters allow other widths, as long as `PA_W` is
a multiple of `SLICE_W`. The testbench also runs a 16-bit accumulator in four
slices.

Each slice's `ks_adder` merges the carry in into the generate signal of bit
0. It then combines (generate, propagate) pairs over log2(W) levels, at
distances 1, 2, 4, …, and each sum bit is p XOR the incoming carry.

## Measured behaviour

`tb/tb_ddfs_spectrum.sv` runs the full-size design for one accumulator
period (4096 clocks) per FCW. Because that period holds a whole number of
output cycles, it can take a DFT of the samples with no window. At the
digital output it measures:

| FCW | SNR (dB) | SFDR (dB) |
|---|---|---|
| 1, 3, 683 | 37.97 | 42.82 |
| 16 | 39.60 | 42.82 |
| 100 | 38.05 | 42.82 |
| 1000 | 38.32 | 42.82 |

An ideal 6-bit converter gives 6.02·6 + 1.76 = 37.88 dB, and the design meets
that figure. Hardware built on this architecture has been reported at about 45 dB SNR and
SFDR, measured after a DAC with a spectrum analyzer. The digital SFDR
here is about 2 dB below that. Analog measurements depend on the analyzer's
bandwidth and settings, so the two numbers are not directly comparable.

## Where this design makes its own choices

* **Output width.** The magnitude is 6 bits, as is the table. The sample
  carries a seventh sign bit in offset binary, because a full sine wave
  cannot be represented without one. A DAC described as 6 bits would need
  either this extra bit or a smaller table.
* **Table rounding and bit order.** See the memory-less table section above.
  A3…A0 are derived here.
* **Accumulator pipeline.** The exact register arrangement (input skew,
  registered carries, output deskew) is a standard carry-pipelined
  accumulator. No multi-phase ("clock-shifted") clocking is used: every
  register uses the same clock edge.
* **Phase truncation.** The four low phase bits are dropped before the
  converter.
* **Reset.** An asynchronous, active-low reset clears all registers.
* **DAC.** The DAC is not part of the RTL. `sample` is its input word.

## Simulating

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M`
and ends with `$finish`. With Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/ddfs_pkg.sv tb/tb_ddfs_top.sv --top-module tb_ddfs_top
    ./obj_dir/Vtb_ddfs_top

Replace `tb_ddfs_top` with any other testbench. The `-Irtl` option lets
Verilator find the modules by name.

| testbench | what it checks |
|---|---|
| `tb_ks_adder` | all 512 input combinations of the 4-bit adder, and random 8-bit operands |
| `tb_memoryless_rom` | all 64 entries against `floor(63·sin(π/2·n/64))`, and monotonic rise |
| `tb_quarter_wave_pac` | all 256 converter phases, the one-clock latency, odd symmetry and every quarter |
| `tb_pipelined_pa` | 12-bit and 16-bit accumulators against an integer model at exact latency, with FCW changes and carries across slices |
| `tb_ddfs_top` | the default-size design over about 32 000 clocks and 10 FCWs (see below) |
| `tb_ddfs_spectrum` | SNR, SFDR and the fundamental's frequency bin for six FCWs |

`tb_ddfs_top` checks:

* the exact phase and sample on every clock;
* the output frequency, by counting sign-bit crossings;
* that every mechanism occurs at least once: a carry across each slice
  boundary, accumulator wrap, address mirroring, amplitude inversion and an
  FCW change.

All testbenches run in a few seconds.
