# Low-power direct digital frequency synthesizer with a segmented parabolic sine

A direct digital frequency synthesizer (DDFS) makes a sine wave from a clock. It has no
feedback loop: a phase accumulator adds a frequency control word (FCW) to itself every
clock, and the top bits of that phase are turned into a sine amplitude. Changing the FCW
changes the frequency within a few clocks:

    f_out = FCW * f_clk / 2^32          (resolution f_clk / 2^32)

The costly part is the phase-to-amplitude step. A plain lookup table with 12-bit phase and
12-bit output needs tens of kilobits of ROM. This design keeps 400 bits of coefficients
instead. It cuts a quarter of the sine into 16 equal segments and draws each one as a short
parabola:

    y = (m_i - x / 2^k_i) * x + c_i

Here `x` is the position inside segment `i`, and `m_i`, `c_i`, `k_i` are per-segment
constants. One multiply-accumulate per sample gives a maximum error of 6.0e-4 of full scale
and a spurious-free dynamic range (SFDR) of 86.9 dBc. The target was 84 dBc. The arithmetic
uses a Wallace-tree multiplier and Han-Carlson parallel-prefix adders. These are cheaper than
the fastest adders while still giving logarithmic delay, which fits a low-power radio
synthesizer.

## Signal flow and timing

```
            +-------------------+  14 MSBs  +-------------------+  12-bit  +------------------------+
 fcw[31:0] ->| phase_accumulator |---------->| quarter_wave_fold |--addr--->| parabolic_sine_approx  |
            |  FCW reg + N-bit  |           |  bit 13 -> sign   |          |  segment_coef_mux      |
            |  accumulator      |           |  bit 12 -> mirror |--sign-+  |  10-bit HC subtractor  |
            +-------------------+           +-------------------+       |  wallace_mac 8x10+12   |
                                                                        |  -> amp = mac[20:9]    |
                                                                        |  +----------+-------------+
                                                                        v             v
                                                                   +-------------------------+
                                                                   | output register (13 b)  |--> dac_sign, dac_mag[11:0]
                                                                   +-------------------------+
```

`ddfs_top` ports: `clk`, `rst_n` (synchronous, active low), `fcw[31:0]`, `dac_sign` and
`dac_mag[11:0]`. The output is sign and magnitude, meant for a 12-bit DAC that does its own
sign inversion. The DAC and the analog reconstruction filter are not part of the RTL.

Every clock produces one sample. There is no handshake and no stall. An FCW applied before
clock edge `t` is first used by the DAC word that appears after edge `t + P + C + 1`. Here
`P` is the number of accumulator pipeline stages and `C` (`SINE_PIPE`, 0 by default) is the
number of register stages inside the sine converter:

| accumulator stages `P` (`PA_STAGE_W`) | converter stages `C` (`SINE_PIPE`) | FCW-to-phase | FCW-to-DAC word |
|---|---|---|---|
| 1 (32, default) | 0 (default) | 2 clocks | 3 clocks |
| 2 (16) | 0 | 3 clocks | 4 clocks |
| 4 (8) | 0 | 5 clocks | 6 clocks |
| 1 (32) | 1 | 2 clocks | 4 clocks |
| 2 (16) | 2 | 3 clocks | 6 clocks |

The latency is the frequency-switching time. It is why neither the accumulator nor the
converter is pipelined by default.

## The parabolic quarter-wave converter

This block is the heart of the design and the least obvious part.

**Address split.** The 14 phase MSBs split into a sign bit, a mirror bit and a 12-bit
quarter-wave address. The address splits again into a 4-bit segment number `i` and an 8-bit
offset `x` (0..255).

**Where the parabola comes from.** Start from a straight line through the ends of each
segment, sampled on the ideal 12-bit sine. The error of that line is almost a parabola that
peaks mid-segment. Subtract a parabola `(x - 128)^2 / 2^k_i` centred in the segment. Expand
it. Fold its linear and constant parts into a corrected slope and intercept. Only `-x^2 / 2^k_i`
remains, and it can be written as a single product:

    y = (m_i - (x >> k_i)) * x / 2^9 + c_i

**Scaling.** `m_i` is a 10-bit slope in units of 2^-9 output LSB per address step (805 means
1.572). `c_i` is the 12-bit value at the start of the segment. In hardware, `c_i` enters the
MAC nine places up, and the result is the top 12 bits of a 21-bit sum:

    mac = (m_i - (x >> k_i)) * x + c_i * 2^9        (21 bits)
    amp = mac[20:9]                                  (0 .. 4095)

`x >> k_i` is a truncating shift. The shift is fixed per segment, so the shifter is just a
16-to-1 multiplexer of pre-shifted copies of `x`.

**Coefficients** (`ddfs_pkg`, segment 1 first):

| i | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 | 14 | 15 | 16 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| m | 805 | 803 | 788 | 773 | 743 | 706 | 678 | 628 | 572 | 511 | 445 | 376 | 303 | 227 | 150 | 103 |
| c | 1 | 403 | 800 | 1190 | 1568 | 1932 | 2276 | 2599 | 2897 | 3167 | 3407 | 3613 | 3785 | 3921 | 4018 | 4074 |
| k | 7 | 5 | 5 | 4 | 4 | 4 | 3 | 3 | 3 | 3 | 3 | 3 | 3 | 3 | 3 | 2 |

That is 16 × (10 + 12 + 3) = 400 bits. They are written as constant inputs of three 16-to-1
multiplexers (`segment_coef_mux`), so no memory is needed. The last intercept is held slightly
low so that the peak value is 4095 and never wraps to 0.

**Accuracy, measured on the RTL.**
- Worst error over all 4096 quarter-wave addresses: 2.47 LSB, which is 6.0e-4 of full scale.
  It occurs near the peak, at address 3575.
- SFDR of the full synthesizer, from a 4096-point DFT: 86.9 dBc, for both 1 and 3 periods per
  4096 clocks.
- Near the peak the curve is not strictly monotonic. At 10 addresses the amplitude steps down
  by 1 to 3 LSB. This comes from the coefficient table and is inside the error budget above.

**Subtractor.** `m_i - (x >> k_i)` is a 10-bit Han-Carlson adder with the shifted offset
inverted and a carry-in of 1. For this table the result is never negative.

## Quarter-wave folding

Only the first quarter of the sine is computed.
- The phase MSB is the sign: the second half period is negative.
- The next bit mirrors the quarter in time. When it is set, the 12 address bits are inverted,
  giving `4095 - a`.

Inverting is cheaper than negating, but it puts the mirrored quadrants half an address step
off the ideal point. That adds at most 1.6 LSB of error. The end-to-end tests allow 4.1 LSB
against an ideal sine.

## Wallace-tree multiply-accumulate (`wallace_mac`)

The MAC computes `a*b + (c << C_SHIFT) mod 2^OUT_W`, 8 × 10 + 12 into 21 bits by default. It
works in three steps:

1. Each partial-product bit `a_i & b_j` goes into the column of weight `i+j`. The bits of `c`
   go into columns 9..20, so the accumulate costs one more bit per column, not a second adder.
2. Each layer feeds the bits of every column, three at a time, into a `counter_3_2` (full
   adder). The sum stays in the column and the carry moves one column up. Two leftover bits
   go into a `counter_2_2` (half adder), and one leftover bit passes through. For the default
   sizes, four layers bring every column to at most two bits (carry-save form).
3. A 21-bit `han_carlson_adder` adds the two remaining rows.

With `REG_CS = 1` the two carry-save rows are registered before the final adder. This splits
the MAC delay roughly in half and makes `y` appear one clock after the operands.

The wiring schedule is computed by constant functions at elaboration, so other operand sizes
need no code changes. Carries beyond bit 20 are dropped. Only `mac[20:9]` is used, so
synthesis removes the sum gates of the nine low bits. Their carries are still needed.

## Han-Carlson adder (`han_carlson_adder`)

This is a parallel-prefix adder with a carry-in. It has these layers:

- **Top layer:** `g = a & b` and `p = a ^ b`. The carry-in is merged into bit 0.
- **Row 1:** each odd bit is combined with the even bit below it.
- **Rows 2..ceil(log2 W):** a Kogge-Stone network over the odd bits only, at spans 2, 4, 8, ….
- **Last row:** each even bit takes its carry from the odd bit below.
- **Sum layer:** `s_j = p_j ^ G_(j-1)`.

Each black cell is `prefix_black_cell`: `G = Gh | Ph & Gl`, `P = Ph & Pl`. Fan-in and fan-out
stay at most 2. A 16-bit adder has 32 black cells in 5 rows. The design uses this adder in
three places: the accumulator (32 bits, or one per pipeline stage), the 21-bit MAC adder and
the 10-bit subtractor.

## Phase accumulator and its pipelined form (`phase_accumulator`)

With `STAGE_W = N` (the default) the accumulator is the plain form: an FCW input register, one
N-bit adder and one N-bit phase register. Setting `STAGE_W = N/P` splits it into `P` stages,
each with its own `STAGE_W`-bit adder and sum register:

- **Carry flip-flops.** Stage `j` adds the carry that stage `j-1` stored on the previous clock.
  The carry out of the top stage is the phase wrap and is not stored.
- **Skew registers.** A carry reaches stage `j` `j` clocks late. To match, the FCW slice of
  stage `j` passes through `j` extra registers after the common input register.
- **End registers.** The sums of lower stages are delayed `P-1-j` clocks so that all output
  bits leave together. Stages that lie wholly below the 14 output bits need no end registers.

The result equals the plain accumulator delayed by `P-1` clocks. Reset clears every register,
including the skew and carry registers. That state is consistent, so the pipeline needs no
flush after reset. Halving the stage width (`N/2`) roughly halves the adder delay for about
twice the flip-flops. The default stays unpipelined because lowest power and fastest frequency
switching are the goals here.

## Where this RTL makes its own choices

- **Quarter-wave address width.** The converter uses a 12-bit quarter-wave address, split 4 + 8
  bits, with 14 phase bits in all. The coefficient scaling only works with 256 steps per
  segment. The same figure is sometimes given as the precision of the whole phase word rather
  than of the quarter wave; the 4 + 8 bit split was followed.
- **Which MSB does what.** The assignment of the two MSBs (sign from the top bit, mirror from
  the next) is the usual convention. It was chosen, not derived.
- **Subtractor width.** The subtractor is 10 bits wide to match `m`. An 8-bit subtractor with
  a borrow into the top two bits would also do.
- **Converter pipeline off by default.** By default the sine converter has no internal
  register, so one clock must cover the accumulator-to-output path. That suits a low-clock,
  low-power part. For a faster clock, `SINE_PIPE = 1` registers the MAC's carry-save rows, and
  `SINE_PIPE = 2` also registers the subtractor result together with `x` and `c`. None of
  these stages has feedback, so the cuts are only a matter of latency. The sign bit is delayed
  to match. These converter registers reset to zero, not to the sine of phase 0, so for
  `C` clocks after reset the output is a zero word.
- **Reset and input register.** The synchronous active-low reset and the FCW input register
  are this implementation's choices.
- **Transistor-level work not included.** Sizing the non-critical black cells smaller, and the
  choice between static CMOS, pseudo-NMOS, dynamic and DCVS logic at normal or sub-threshold
  supply, are transistor-level decisions. They do not change the logic and are not
  represented.

## Files

`rtl/`: `ddfs_pkg` (sizes, coefficient tables, sample type), `ddfs_top`, `phase_accumulator`,
`quarter_wave_fold`, `parabolic_sine_approx`, `segment_coef_mux`, `wallace_mac`,
`han_carlson_adder`, `prefix_black_cell`, `counter_3_2`, `counter_2_2`.

`tb/`: one self-checking testbench per block (`tb_<module>`), `tb_ddfs_full` (the top at its
default sizes through complete periods of two tones), `tb_ddfs_sfdr` (spectral purity) and
`tb_ddfs_ref_pkg`, an integer reference model with its own copy of the coefficient table. Each
testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

What the testbenches cover:
- **Adder and MAC:** exhaustive and random checks at several widths, including odd tree shapes.
- **Accumulator:** five sizes run side by side (32 bits in 1, 2 and 4 stages; 24 bits in 2;
  16 bits in 16 one-bit stages). They are compared clock by clock with an integer model, and
  the FCW-to-phase latency is measured.
- **`tb_ddfs_top`:** the whole synthesizer with 1, 2 and 4 accumulator stages, and with 1 and
  2 converter stages, under random frequency hops. It checks every word and counts each mechanism: wrap-around, all four
  quadrants, all 16 segments, carries between stages and frequency switches.

## Simulating

With Verilator 5, for example the end-to-end test:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ddfs_pkg.sv tb/tb_ddfs_ref_pkg.sv tb/tb_ddfs_top.sv --top-module tb_ddfs_top
./obj_dir/Vtb_ddfs_top
```

Replace `tb_ddfs_top` with any other testbench name. Every testbench finishes in well under a
second.

## Changing it

- **Phase precision.** Set `N` on `ddfs_top` (16, 24 and 32 are tested in the accumulator).
  The converter always takes the top 14 bits.
- **Pipelining.** Set `PA_STAGE_W` to a divisor of `N`, and/or `SINE_PIPE` to 1 or 2. Latency
  grows by one clock per extra stage. `tb_ddfs_top` shows how to check it.
- **A different approximation.** Change the tables and widths in `ddfs_pkg`. `wallace_mac` and
  `han_carlson_adder` re-derive their structure from their parameters. Keep
  `M_W + X_W <= MAC_W` and make sure no segment's result overflows the 12-bit output.
  `tb_parabolic_sine_approx` reports the maximum error.
