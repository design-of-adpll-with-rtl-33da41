# Bang-bang ADPLL with on-line proportional/integral gain co-optimisation

This is an all-digital PLL that multiplies a 100 MHz reference by 32 to
3.2 GHz. It has a one-bit (bang-bang) phase detector and a ring oscillator
tuned by a digitally controlled resistor. Its distinguishing feature is that
it does not rely on fixed loop gains. The best proportional gain β and
integral gain α of a bang-bang loop depend on how much jitter the reference
and the oscillator carry, and on the detector's effective gain, which itself
depends on that jitter. None of these are known before the chip runs.
The loop therefore measures whether its gains are right from its own detector
output and corrects them continuously:

* **β from the lag-1 sign autocorrelation.** If consecutive detector
  decisions tend to agree (`y[n]·y[n-1] > 0`), the loop is too slow to track
  the oscillator's noise, so β goes up. If they tend to alternate, the loop
  is over-correcting and adding its own dither, so β goes down. At the
  optimum the lag-1 autocorrelation is zero.
* **α from the lag-2 sign autocorrelation.** With β held at its own optimum,
  the sign of `y[n]·y[n-2]` tells whether the integral path is too weak
  (positive, low-frequency error left uncorrected) or too strong (negative,
  peaking). α moves by the same rule.

Only the sign of each product is used and nothing is averaged. Every
decision steps each gain's accumulator by one LSB up or down, and the random
walk settles where the positive and negative products balance.

## Loop structure

```
 ref_clk ──►┌────────┐ bb_up  ┌───────────────┐ beta,alpha ┌──────────┐  prop (15 b) ──────────┐
            │ BBPFD  ├───────►│ gain_optimizer├───────────►│   dlf    │                         ▼
 clk_fb ───►│ (model)│ bb_clk │ lag-1 → beta  │            │ P: ±beta │  code (10 b) ┌─────────────┐ row,col ┌───────┐
            └────────┘───────►│ lag-2 → alpha │            │ I: Σ±alpha├────────────►│ dcr_decoder ├────────►│  DCO  ├──► clk_out
                 ▲            └───────────────┘            └──────────┘              └─────────────┘ (31+31) │(model)│
                 │                                                                                           └───┬───┘
                 └───────────────────────────── divider (/32, ripple of 5 toggle flip-flops) ◄───────────────────┘

 scl/sda ──► i2c_regs (clocked by ~ref_clk) ──► enables, initial gains, initial code; reads back live gains and code
```

| Module | Kind | Role |
|---|---|---|
| `adpll_pkg` | package | widths, gain ranges, `gain_t`, config/status structs, register addresses |
| `bbpfd` | behavioural model | early/late decision per reference cycle, done strobe |
| `gain_optimizer` | RTL | two sign correlators, two `gain_accumulator`s |
| `gain_accumulator` | RTL | gain in mantissa/exponent form with renormalisation |
| `dlf` | RTL | direct proportional path and integral accumulator |
| `dcr_decoder` | RTL | 10-bit code to 31-bit row and 31-bit column thermometer codes |
| `dco` | behavioural model | ring oscillator plus resistor array, with phase noise |
| `divider`, `div2` | RTL | /32 ripple divider |
| `i2c_regs` | RTL | I2C slave and tuning registers |
| `adpll_top` | RTL | all of the above in a closed loop |

### Clocking

There are three clock domains:

* **Decision strobe.** The detector's comparison-done strobe, `bb_clk`,
  rises 10 ps after each decision. The gain optimiser and the loop filter
  are clocked by it, so a decision reaches the oscillator within about 10 ps
  plus a flip-flop delay. This choice matters. When the filter was clocked
  from the falling reference edge, a half-period of loop delay made the
  lag-1 correlation settle at a wrong β: the loop locked into an
  up-up-down-down limit cycle with zero lag-1 correlation and β stuck at its
  ceiling.
* **Divided oscillator clock.** The divider runs from the oscillator output.
* **Register clock.** `i2c_regs` runs on the inverted reference. Its outputs
  therefore change half a reference period away from the strobe.
  Configuration is quasi-static.

All flip-flops reset asynchronously on `rst_n` low. Out of reset both gains
adapt from their smallest values (β = 17·2⁻⁷, α = 17·2⁻²⁰) and the integral
code is 512, about 2.98 GHz. The loop acquires lock with no register access.

## Gains in mantissa/exponent form

Each gain is `mant · 2^exp` (`gain_t`: 6-bit unsigned mantissa, 6-bit
signed exponent):

| Gain | mantissa | exponent | value range |
|---|---|---|---|
| β | 17..48 | −7..+1 | 0.133 .. 96 code LSB |
| α | 17..48 | −20..−5 | 1.6·10⁻⁵ .. 1.5 code LSB |

A power-of-two-only gain can only move in factors of two, which is too coarse
for a loop that hunts around an optimum. With a mantissa, each step changes
the gain by about 2–6 %.

`gain_accumulator` holds the mantissa with `FRAC_BITS` = 4 extra fraction
bits. Each enabled decision adds or subtracts 1/16, so about 16 decisions
of one sign move the mantissa by 1. Renormalisation works as follows:

* If a step would take the mantissa above 48.0, the mantissa is halved
  (about 24) and the exponent increases.
* If a step would take it below 17.0, it is doubled (about 34) and the
  exponent decreases.
* The range 17..48 is wider than a factor of two. So after a renormalisation
  there is a margin (24→48 upwards, 34→17 downwards) before the next one,
  and a gain hunting around a power of two does not flip its exponent on
  every step.
* At the outermost exponent the mantissa saturates at 48 or 17 instead.

Each update reports `renorm_up`, `renorm_dn`, `sat_hi` or `sat_lo` for one
cycle on `beta_evt` and `alpha_evt`.

While `opt_beta_en` or `opt_alpha_en` is low, that gain is loaded every
cycle from its init register. This allows the comparisons the design is
judged by: both gains optimised, β optimised with α fixed large, and β
optimised with α fixed small.

## Loop filter number formats

The loop filter (`dlf`) has no adder between its two paths:

* **Proportional word** `prop` = ±β. It is signed, 15 bits, with LSB = 2⁻⁷ of
  an oscillator code step, so every β in range is exact. It is registered
  and has no memory.
* **Integral accumulator** `acc` = `acc ± α`. It is unsigned 10.20 fixed
  point (LSB = 2⁻²⁰ code step, so every α is exact) and saturates at 0 and
  at the top of the range. Its integer part is the 10-bit oscillator code.

`prop` goes straight to the oscillator's fine input and `code` to the
resistor decoder. Not summing them removes the adder's glitches from the
oscillator control, and it avoids a retiming register that would add loop
delay.

`load_code` forces the accumulator to `init_code`.

The gain stages are a multiply by the mantissa followed by a shift by the
exponent: `beta_mag = mant << (exp + 7)` and `alpha_mag = mant << (exp + 20)`.

## Resistor-array decoding

A 10-bit code would need 1023 thermometer lines. Instead the code is split
into two overlapping fields:

* `code[9:5]` gives the row code: `row[i] = i < code[9:5]`.
* `code[5:0]` gives the column code. Bit 5 is shared with the row field:
  * while `code[5]` = 0, ones fill from the LSB: `col[i] = i < code[4:0]`;
  * while `code[5]` = 1, the column code starts from all ones and clears from
    the LSB: `col[i] = i >= code[4:0]`.

So `6'b011111` and `6'b100000` both give `31'h7FFFFFFF`. The carry into the
next row is carried by the row code alone. Over the whole range each code
step changes exactly one of the 62 lines.

In the array, counting rows from 1, a cell in an odd row conducts where its
column bit is 1 and a cell in an even row where its column bit is 0. So the
cells switch on in a snake order: left to right along row 1, right to left
along row 2, and so on. The oscillator model counts conducting cells as
`32·rows + (rows odd ? 31 − ones(col) : ones(col))`, which equals the code.

## Behavioural models

The detector and the oscillator are analog circuits. They are modelled by
timing behaviour with `#` delays and real-valued time, not synthesised.

**`bbpfd`** is a PFD with an early/late output:

* The first rising edge arms its side and the other side's next edge
  completes the comparison. `bb_up` = 1 means the reference came first.
* Extra edges of the armed side are ignored. During a cycle slip, edge k is
  therefore still compared with its matching edge, which gives
  frequency-detector behaviour during acquisition.
* **Offset and hysteresis.** The detector has a 30 fs offset (`OFFSET_FS`)
  and a 50 fs hysteresis (`HYST_FS`), the post-layout figures of the real
  circuit. With lead = t_fb − t_ref, the output goes UP when the lead
  exceeds 5 fs if it was UP, or 55 fs if it was DN. At exactly the threshold
  it keeps its state. Leads are resolved to 1 fs. There is no metastability
  or resolution delay.
* `decisions` counts comparisons. A reference period with no completed
  comparison is a cycle slip.

**`dco`** works as follows:

* **Frequency:** `F_MIN_HZ + (cells + prop/128)·(F_MAX_HZ − F_MIN_HZ)/1023`,
  with 1.9–4.05 GHz (typical corner) as the default range. 3.2 GHz is at code
  ≈ 618.5. The slow and fast corners are 1.61–3.62 GHz and 2.21–4.38 GHz,
  with 3.2 GHz at codes ≈ 809 and ≈ 467.
* **Linear curve.** The real tuning curve is not linear, and the linear law is
  this model's simplification. The loop does not need a linear curve. What
  matters to it is the frequency step per code, 2.1 MHz here.
* **Noise:** `PN_1MHZ_DBC` (−90.5 dBc/Hz) is read as white frequency noise.
  Each half period gets an independent, near-Gaussian deviation, which gives
  about 165 fs rms period jitter at 3.2 GHz.
* **Optional drift:** `FWALK_HZ` adds a random walk of the frequency, a
  stand-in for flicker drift. It is off by default.
* **Edge times** are accumulated as real numbers and rounded to the 1 fs
  precision, so rounding never builds up into a frequency error.

## Tuning registers (I2C)

The slave uses 7-bit addressing, with device address `0x52` (parameter
`I2C_ADDR`):

* **Write:** START, address+W, pointer byte, then data bytes. Each byte is
  written at the pointer, which then increments.
* **Read:** START, address+W, pointer, repeated START, address+R, then bytes
  from the pointer, incrementing, until the master NACKs.
* SCL and SDA are synchronised to the register clock. Each SCL phase must
  last at least about four register-clock periods, so 1 MHz SCL against a
  100 MHz reference is fine.
* SDA is open drain: `sda_oe` = 1 pulls the line low.

| Addr | Access | Contents | Reset |
|---|---|---|---|
| 0x00 | RW | `[0]` opt_beta_en, `[1]` opt_alpha_en, `[2]` load_code | 0x03 |
| 0x01 / 0x02 | RW | β init mantissa / exponent (two's complement) | 17 / −7 |
| 0x03 / 0x04 | RW | α init mantissa / exponent | 17 / −20 |
| 0x05 / 0x06 | RW | init code `[7:0]` / `[9:8]` | 512 |
| 0x08 / 0x09 | RO | live β mantissa / exponent | – |
| 0x0A / 0x0B | RO | live α mantissa / exponent | – |
| 0x0C / 0x0D | RO | live code `[7:0]` / `[9:8]` | – |

Writes to read-only or unused addresses are acknowledged and dropped.

## Behaviour at the default parameters

In the end-to-end simulation at the default parameters:

* **Acquisition.** The loop starts at 2.98 GHz with the smallest gains.
  Consecutive decisions agree during acquisition, so β climbs to its
  ceiling (96 code LSB). α climbs from 17·2⁻²⁰ to about 0.6–1.0 code LSB,
  and this large integral gain speeds up the frequency acquisition.
* **Lock.** The loop locks within about 10,000 reference cycles: 32 output
  edges per reference cycle and no slips.
* **After lock.** β falls back to about 0.2–0.4 code LSB.
* **α.** With the default full-range oscillator, one integral code step
  (2.1 MHz) is coarse compared with the noise. The loop hunts between
  adjacent codes, and α settles around 0.7–1.3 code LSB, in the upper part of
  its range.
* **Fixed-gain cases.** All three α settings (optimised, fixed at 48·2⁻⁵,
  fixed at 17·2⁻²⁰) hold lock.

## Comparing the gain configurations

The benefit of adapting α shows only when the oscillator's low-frequency
noise, not the code quantisation, limits the loop. `tb_adpll_modes` therefore
sets up that case:

* **Oscillator.** It narrows the range to 3.0–3.4 GHz (0.39 MHz per code
  step) and adds a frequency random walk (`FWALK_HZ` = 2 kHz per period) to
  the white noise.
* **Measurement.** For each configuration, the rms timing error between the
  reference and divided-clock edges over 20,000 reference cycles.

Results over twelve noise seeds:

| Configuration | rms error | R(1) | R(2) | where the gains end |
|---|---|---|---|---|
| both optimised | 1.32–1.48 ps (one seed 3.0 ps) | within ±0.01 | within ±0.03 | β ≈ 0.75–1.0, α ≈ 0.0012–0.0055 |
| α fixed large (48·2⁻⁵) | 2.85–2.95 ps | within ±0.007 | −0.19 to −0.25 | β ≈ 0.75–1.1 |
| α fixed small (17·2⁻²⁰) | 1.7–9.9 ps | 0 to +0.07 | +0.01 to +0.16 | β rises (up to ~10) to make up for the weak integral path |
| α re-optimised from 48·2⁻⁵ | 1.36–1.69 ps | within ±0.011 | within ±0.034 | α comes back to the same octaves |

R(k) is the mean of y[n]·y[n−k] over the window. The lag-2 correlation
behaves as the α rule assumes: positive when α is too small, negative when
it is too large, and driven to zero when α adapts. In one seed, α had not
yet settled at the end of the first window, which gave the 3.0 ps result.
That is 4 % above the α-large case of the same seed, inside the 10 % margin
the testbench allows.

In eleven seeds of twelve the optimised loop is the best of the three, and α
settles inside its range rather than at either end. What the numbers mean:

* **α too large** adds a noise-peaking error.
* **α too small** lets the drift through, and only a large β holds it.

The absolute numbers belong to this oscillator model. They are not a
prediction for silicon. A fabricated part's integrated jitter and phase-noise
spectra are not reproduced here, since the oscillator model carries only the
two noise terms above.

## Simulation

Everything runs with plain Verilator 5 (two-state, `--timing`). For example,
the full-size end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
          --top-module tb_adpll_top rtl/adpll_pkg.sv tb/tb_adpll_top.sv -o sim
./obj_dir/sim
```

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and has a
watchdog.

| Testbench | What it checks |
|---|---|
| `tb_gain_accumulator` | against a reference model over long up and down runs, loads and random steps; all four renormalisation/saturation events |
| `tb_gain_optimizer` | against a model of both correlators on runs, alternations and up-up-down-down patterns; enable/hold |
| `tb_dlf` | proportional word and accumulator against a model, both rails, code load |
| `tb_dcr_decoder` | all 1024 codes against the decoding rule, the two overlap cases, cell count = code, one line changes per step |
| `tb_divider` | period of 32 input edges, 50 % duty, reset |
| `tb_bbpfd` | ideal instance: UP/DN down to femtosecond differences, ties, slips, strobe timing; default instance: the offset/hysteresis thresholds against a model |
| `tb_dco` | frequency at nine code/prop settings to 10⁻⁵, period jitter within 20 % of the value set by `PN_1MHZ_DBC` |
| `tb_i2c_regs` | reset values, every writable register written and read back, multi-byte reads, config outputs, live status read-back, a foreign address left unacknowledged (uses the bus master `tb/i2c_master.sv`) |
| `tb_adpll_top` | acquisition, lock, all three gain configurations, register read-back, code load |
| `tb_adpll_corners` | two PLLs with the slow (1.61–3.62 GHz) and fast (2.21–4.38 GHz) oscillator ranges: lock from reset at the code the oscillator law predicts |
| `tb_adpll_modes` | the configuration comparison above: no slips, optimised error within 10 % of the better fixed case, R(2) signs for the fixed cases, R(1) and R(2) near zero when adapting, α inside its range and returning from its maximum |

`tb_adpll_top` runs the top at its default parameters and configures it only
over I2C. It counts every mechanism and fails if one never occurred: UP and
DN decisions, cycle slips, β renormalisation both ways and saturation at the
top, α renormalisation up, mode switches, register writes and reads, and code
loads. It takes a few seconds, and so does `tb_adpll_modes`.

Some single-block testbenches set parameters explicitly where a case needs
it, for example a detector with zero offset and hysteresis so that decisions
can be checked down to femtosecond differences.

## Where this design makes its own choices

The following are not specified by the source design and were chosen here:

* **Filter and optimiser clock.** They are clocked by the detector's
  done strobe (see Clocking).
* **Gain step.** 1/16 of a mantissa LSB per decision (`BETA_FRAC`,
  `ALPHA_FRAC`).
* **Reset state.** Smallest gains, code 512.
* **Hold inputs and saturation at the exponent limits.** How the gains are
  held while not adapting, and how they saturate at the ends of the exponent
  range.
* **Loop filter number formats.** Also, `prop` is applied to the oscillator
  as a fractional code offset.
* **Row numbering.** Rows are counted from 1 when applying the odd/even
  row rule for the column cells.
* **Oscillator and detector models.** The linear frequency law, the noise
  model, how the detector's offset and hysteresis enter its decision, and its
  strobe.
* **Register interface.** The register map, the device address, the protocol
  subset and which parameters are tunable.

Not included: the output clock buffers and pad driver, which are analog
and have no logic function. `clk_out` is where they would connect.
