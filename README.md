# Halfband interpolation filter for a hearing-aid class-D back end

A hearing-aid output stage built around a sigma-delta modulator and a class-D
amplifier needs the audio at 64 times its sample rate. The rate is raised in
four steps, each by a factor of two or more:

| stage | rate change | filter |
|---|---|---|
| 1 | fs → 2fs (22.05 → 44.1 kHz) | polyphase halfband FIR, order 74 |
| 2 | 2fs → 4fs | multiplier-less halfband filter built from subfilters |
| 3 | 4fs → 8fs | non-recursive CIC, order 3 |
| 4 | 8fs → 64fs | non-recursive CIC, order 1 |

The first stage has the steepest filter, and it is the main subject of this
RTL. It accepts 16-bit audio at 22.05 kHz and produces 22-bit audio at
44.1 kHz. Its images are at least 60 dB down from 12.05 kHz upward, and its
passband is flat to 10 kHz.

The filter runs on one multiplier. It has a 38-word sample RAM and a 19-word
coefficient ROM. One system clock of 384 cycles per input sample drives both
the arithmetic and an I2S interface. At 22.05 kHz that clock is 8.47 MHz.

Stages 3 and 4 are also provided, as a generic factorised CIC interpolator
(`cic_interp`). Stage 2 is not built: its coefficients are not available. The
CIC pair therefore sits next to the first stage in the top level, on its own
ports. Those ports are where the second stage's output would connect.

## Blocks

```
interp_proto_top
 ├─ i2s_s2p            serial → 16-bit sample (left channel)
 ├─ hb_interp_fir      first stage
 │   ├─ fir_timing     counters, bit_clk, lr_clk, control ticks
 │   ├─ fir_fsm        controller: states, RAM/ROM addresses, MAC resets
 │   ├─ ram_mem        38 × 16 delay line (circular buffer)
 │   ├─ rom_coefficients 19 × 18 coefficient table
 │   └─ fir_mac        6-stage pipelined multiplier + accumulator
 ├─ i2s_p2s            two 22-bit outputs → serial (left, right)
 ├─ cic_interp (M=3, K=1)   stage 3, ×2
 └─ cic_interp (M=1, K=3)   stage 4, ×8
       └─ cic_interp_stage  one ×2 section
```

`interp_pkg` holds the widths, sizes, types, the state encoding and the
coefficient table.

## The halfband filter and what is stored

The prototype filter h has 75 taps (order 74). It is a halfband filter:
- The centre tap h[37] is 0.5.
- Every other tap at an odd distance from the centre is zero.
- The filter is symmetric.

For ×2 interpolation, the input is zero-stuffed and filtered. In polyphase
form this splits into two sub-filters:
- **Even outputs.** y(2n) uses the 38 non-zero taps h[0], h[2], … h[74]. These
  are 19 distinct values because of the symmetry. A zero tap is added at the
  end to make the count even.
- **Odd outputs.** y(2n+1) uses only the centre tap. This output is the input
  delayed by 18 samples, times 0.5.

All coefficients are divided by the centre tap. The odd phase then becomes a
plain copy, y(2n+1) = x(n−18). The even phase becomes

    y(2n) = Σ_{a=0}^{37} c(min(a, 37−a)) · x(n−a)

Here c(0..18) are the 19 stored values, and c(18) ≈ 0.636 is the largest.
Under this normalisation the filter's passband gain is exactly 1 in the
numeric format:
- A full-scale Q1.15 input (±1) gives an output of the same value, ±1 in Q2.20.
- The output's extra integer bit gives headroom. The even-phase sum can
  overshoot by up to Σ|c| ≈ 3.6 for adversarial inputs, and anything beyond
  the Q2.20 range saturates.

The result is not multiplied back by 0.5. Dividing by the centre tap
supplies exactly the factor of 2 that zero-stuffing loses, so the output
carries the input's amplitude: 0 dB gain, as the tone test measures.
Against the 22-bit full scale of ±2, a full-scale input sine therefore sits
6 dB down, because the top integer bit is only headroom. Multiplying back by
0.5 would cost another 6 dB.

**Coefficients.** The table is an equiripple halfband design of order 74. It
was obtained the standard way:
- Design a 38-tap single-band filter g over 0–20 kHz at 44.1 kHz.
- Form h(z) = (z^-37 + g(z^2)) / 2.
- Divide by the centre tap.
- Round to 17 fractional bits.

The result has 0.012 dB passband ripple below 10 kHz and at least 62.9 dB
attenuation from 12.05 kHz. The original coefficient values are not
reproduced here. Any other order-74 halfband table can be dropped into
`COEF_ROM` in `interp_pkg.sv`, as 19 signed Q1.17 values: the outermost tap
first, the tap nearest the centre last.

### Fixed-point formats

| signal | format | width |
|---|---|---|
| input sample x | Q1.15 | 16 |
| coefficient c | Q1.17 | 18 |
| product | Q2.32 | 34 |
| accumulator | Q8.32 | 40 (cannot overflow for 38 terms) |
| output y | Q2.20 | 22 |

The even output is the accumulator shifted right by 12 bits, which rounds
towards −∞, then saturated to 22 bits. The odd output is the stored sample
shifted left by 5 bits, which is exact.

## One input period: 384 cycles, two halves

Everything is timed from four counters in `fir_timing`:

| counter | range | edge |
|---|---|---|
| count_1 | 0..191 | rising |
| count_2 | 0..191 | falling |
| count_3 | 0..383 | rising |
| count_4 | 0..383 | falling |

- `lr_clk` is low for the first 192 cycles and high for the second 192. It is
  the input sample rate.
- `bit_clk` is sys_clk/6, giving 64 bits per lr_clk period.
- The controller's ticks are decoded from the falling-edge counter. That
  places each one half a cycle ahead of the rising edge that uses it.

Each half runs the same state sequence:

```
        tick_0          lr_clk=0             tick_39
IDLE ─────────► WR ─────────────► LOW_OP ─────────────► READY ─┐
                 ▲  └───────────► HIGH_OP ────────────►   │    │
                 │     lr_clk=1                tick_39    │    │
                 └──────────────── tick_0 ────────────────┘◄───┘
```

The cycles in a half (count_2 value) are used as follows:

| cycle | first half (lr_clk = 0) | second half (lr_clk = 1) |
|---|---|---|
| 0 | tick_0: enter WR | tick_0: enter WR |
| 1 | write the new sample over the oldest | no write |
| 2..39 | LOW_OP: 38 multiply-accumulates | HIGH_OP: walk the RAM, pick out x(n−18) |
| 39 | tick_39: pointer moves to the oldest sample | tick_39 |
| 40..45 | READY, pipeline drains into the accumulator | READY |
| 47 | y(2n) captured (period cycle 48) | – |
| 22 | – | x(n−18) captured as y(2n+1) (period cycle 215) |

Two outputs leave the filter per input period, 167 cycles apart. Each carries
`dout_valid`. `dout_odd` tells them apart.

**The address walk.** The RAM is a circular buffer. The pointer `ram_pr`
marks the newest sample during a convolution.
- In LOW_OP the RAM address runs pr, pr+1, …, pr+37 (mod 38): first the
  newest sample, then the oldest one, and so on up to the second newest.
- At the same time the ROM address runs 0, 0, 1, 2, …, 18, 18, 17, …, 1. It
  counts up while `rom_tick_inc` is set (count_2 3..20) and down while
  `rom_tick_dec` is set (22..39). It holds at cycle 21.
- This pairs each sample of age a with c(min(a, 37−a)). Both ends of the
  symmetric filter are covered by a single pass through the table.
- At tick_39 the pointer and the address step to the oldest sample. That word
  is overwritten in the next period's write cycle.

In HIGH_OP the same walk runs with the ROM disabled. The sample of age 18 is
on the RAM output at count_2 = 22, where `lr_tick_m` picks it up.

**MAC resets.** The multiplier pipeline and the accumulator have separate
clears:
- `mac_rst` clears both.
- `reg_rst` clears only the accumulator.

Both are 0 during LOW_OP and for the first 6 cycles of READY, so the six
products still in the pipeline are added. Both are 1 otherwise. They are
registered in the controller and lag the state by one cycle. That matches the
one-cycle read latency of the memories. With this alignment the first and
last products land in the sum exactly.

## Memories

- **`ram_mem`**: 38 × 16 bits, single port. The read is synchronous and has an
  enable. During a write the read output holds. A reset clears the contents,
  so the delay line starts from silence.
- **`rom_coefficients`**: 19 × 18 bits. The read is synchronous and has an
  enable. Addresses from 19 to 31 read 0.

## I2S interface

The filter side is the clock master. It drives `bit_clk` and `lr_clk`, and
each lr_clk period carries two 32-bit slots:
- The left slot is sent while lr_clk is low.
- The MSB comes one bit clock after the lr_clk edge.
- Data changes on the falling edge of bit_clk.

`i2s_s2p` takes the 16 bits of the left slot from `i2s_din`, samples them in
the middle of each bit, and presents the sample at count_3 = 100. The filter
writes it at the start of the next period. The right-slot data is ignored.

`i2s_p2s` sends the two outputs of one period in the following period:
- y(2n) in the left slot.
- y(2n+1) in the right slot.
- Each is 22 bits, MSB first, padded with 10 zero bits.

The serial output is registered.

From `i2s_din` to `i2s_dout`, an input sample appears on the line 1.5 periods
later: the left slot of the period after it was filtered. The filter's own
group delay of 18.5 input samples comes on top of that.

## CIC stages (`cic_interp`, `cic_interp_stage`)

A CIC interpolator of order M and rate 2^K has the transfer function
Π_{i=0}^{K−1} (1 + z^{−2^i})^M. It factorises into K identical sections. Each
section doubles the rate and filters with (1 + z^{−1})^M. No integrators and
no feedback are needed.

Each section is computed in polyphase form at its input rate:

    y(2n + p) = Σ_{k ≡ p (mod 2), k ≤ M} C(M, k) · x(n − (k − p)/2)

The binomial weights are small constants.
- M = 3: phase 0 is x(n) + 3x(n−1), and phase 1 is 3x(n) + x(n−1).
- M = 1: each phase simply repeats x(n).

Each section grows the word by M−1 bits. Nothing is rounded.

| instance | M | K | input spacing | output spacing | width |
|---|---|---|---|---|---|
| stage 3 | 3 | 1 | 96 cycles (4fs) | 48 cycles (8fs) | 22 → 24 |
| stage 4 | 1 | 3 | 48 cycles | 6 cycles (64fs) | 24 → 24 |

Timing within a section:
- The first output follows its input by two cycles.
- The second output comes half an input period later.
- The outputs are therefore evenly spaced at the new rate.

## Where this design departs from or adds to the source description

- **Coefficients.** They are this design's own, from the same specification
  (order 74, 10 kHz passband edge, −60 dB from 12.05 kHz). The original
  values were not available.
- **Output scale.** There is a conflict between two statements in the
  original: one says to multiply the result back by the centre coefficient,
  the other describes measurements with an unused top integer bit. This
  design follows the measurements: no multiplication back.
- **Rounding and saturation.** The output rounds towards −∞ and saturates.
  This choice is this design's own.
- **Resets and alignment.** The MAC reset signals are registered, and the
  exact tick positions (`rom_tick_inc` 3..20, `rom_tick_dec` 22..39,
  `sum_ready_tick` at 47, `lr_tick_m` at 22) are derived here from the memory
  and multiplier latencies. The states, the counters, the 6-cycle hold and
  the cycle budget (write in cycle 1, operate in cycles 2..39) follow the
  original.
- **I2S.** The slot format, master mode and output packing are this design's
  own. The original only names the bus and its three lines.
- **Clock ratios.** The clocks follow the stated 384 system clocks per
  lr_clk period: bit_clk = sys_clk/6, and lr_clk = bit_clk/64.
- **CIC section order.** In each CIC section the rate is doubled before the
  (1 + z^−1)^M filter, which is the order that makes the cascade equal
  H_CIC(z). The section is computed in polyphase form.
- **Not built:** the second stage, the sigma-delta modulator, the pulse-width
  modulator, the class-D stage and output filter, the FPGA clock manager, and
  the measurement instruments.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. Each has a cycle watchdog. All of them pass
with registers that start at random values (Verilator
`--x-initial unique` with `+verilator+rand+reset+2`), so nothing depends on
power-up state that reset does not set.

| testbench | what it checks |
|---|---|
| `tb_fir_timing` | counter ranges and edges, bit_clk/lr_clk periods, every tick position |
| `tb_rom_coefficients` | signs, magnitudes, DC gain and end values of the table, enable, latency |
| `tb_ram_mem` | random reads and writes against a model, enable, reset |
| `tb_fir_mac` | sums of random products, pipeline drain, both resets, saturation, centre-sample path |
| `tb_fir_fsm` | state sequence, address and ROM sequences, pointer advance, reset timing, cycle by cycle over many periods |
| `tb_hb_interp_fir` | bit-exact outputs against a 75-tap reference (impulse, random, saturating, full-scale input) and output cycles 48/215 |
| `tb_i2s_s2p`, `tb_i2s_p2s` | serial framing against independently generated frames |
| `tb_cic_interp` | bit-exact outputs against direct zero-stuff-and-convolve models, for both configurations |
| `tb_interp_proto_top` | end to end at default parameters: I2S in, filter, I2S out, bit-exact; CIC chain. It counts writes, convolutions, centre outputs, buffer wrap-arounds, saturations and CIC outputs, and fails if any never happens. |
| `tb_workload_tones` | 43.07 Hz at 22.05 kHz and 997 Hz at 23.4 kHz, −0.2 dBFS. Measures passband gain (within 0.006 dB), image rejection (63.3 dB and 72.8 dB) and output SQNR against an ideal real-valued filter (97.7 dB and 98.1 dB; a 16-bit input allows about 98 dB). |

To simulate with Verilator 5, run for example:

```
verilator --binary --timing -Irtl rtl/interp_pkg.sv rtl/*.sv tb/tb_interp_proto_top.sv \
          --top-module tb_interp_proto_top -Mdir obj && ./obj/Vtb_interp_proto_top
```

Any testbench name can replace `tb_interp_proto_top`. Every testbench finishes
in seconds.

## Changing the design

- **A different filter.** Change `N_TAPS`, `N_COEF` and `COEF_ROM` in
  `interp_pkg.sv`. Then adjust the tick positions in `fir_timing`
  (`tick_39`, the `rom_tick_inc`/`rom_tick_dec` ranges and `lr_tick_m`,
  which picks the centre sample) to the new length. They are written for
  38 taps; only `sum_ready_tick` follows `MULT_LATENCY` on its own. The whole convolution must fit into the
  192-cycle half: it needs N_TAPS + MULT_LATENCY + 2 cycles.
- **A different clock ratio.** Change `FRAME`, `HALF` and `BIT_DIV`.
- **A different CIC.** Parameterise `cic_interp` with `M`, `K`, `W_IN` and
  `IN_PERIOD`.
