# All-digital Costas loop BPSK demodulator with AGC

A satellite downlink seen from a ground station arrives with an unknown
carrier phase and a Doppler frequency offset. This design removes both and
recovers the BPSK data with a fully digital, continuous-mode Costas loop. An
automatic gain control (AGC) stage sits in front of the loop: it
band-limits the incoming I/Q samples, brings them to a fixed level and
decimates them to the loop's rate.

The loop tracks phase and frequency together. When it is locked, its
in-phase (I) arm carries the data, so the sign of that arm is the bit
decision, and its quadrature (Q) arm carries almost nothing. Three choices
keep the design small:

* One sine ROM gives both the sine and the cosine. It is read twice per loop
  sample on the fast clock.
* The arm filters are first-order Butterworth IIR sections, not FIR
  filters.
* The phase detector is an arctangent (CORDIC). It stays linear over the
  whole ±90° range, which BPSK allows, and it does not depend on the signal
  amplitude.

Everything here is synthesizable SystemVerilog (IEEE 1800-2017) and needs no
vendor IP.

## Signal flow

```
 in_i ─► LPF ─► ×gain ─┬─► decimate ÷DECIM ─► agc_i ──► Costas loop ──► data_bit, i_arm
 in_q ─► LPF ─► ×gain ─┤        (agc_q is brought out)        │
                       └─► level detector ─► gain             └──► q_arm, phase_err, fcw
```

Inside the Costas loop:

```
             ┌──► PD2: x·cos ─► arm LPF ─► I ──┬──► data_bit = sign(I)
 x (agc_i) ──┤                                 ├─► PD3: atan(Q/I) ─► loop filter (PI) ─┐
             └──► PD1: x·sin ─► arm LPF ─► Q ──┘                                       │
                    ▲ sin, cos                                                         │
                    └──── NCO ◄── fcw = fcw_nominal − correction ◄────────────────────┘
                         (phase accumulator, ROM address controller, one sine ROM)
```

| Module | Role |
|---|---|
| `costas_demod_top` | AGC followed by the Costas loop. This is the top level. |
| `agc` | Two LPFs, the gain multiplier, `level_detector` and `decimator` |
| `level_detector` | Measures the envelope and integrates the gain |
| `decimator` | Keeps one sample in `DECIM` |
| `costas_loop` | PD1/PD2, two arm filters, PD3, loop filter and NCO |
| `pd_mixer` | PD1/PD2: a 16×16 multiply, scaled by 2⁻¹⁵ and saturated |
| `lpf_iir1` | First-order Butterworth IIR, used for the arm filters and the AGC LPF |
| `pd_atan` | PD3: arctangent of Q/I by CORDIC, folded into the right half-plane |
| `loop_filter` | Proportional-plus-integral filter |
| `nco` | 32-bit phase accumulator plus `rom_addr_ctrl` and `sine_rom` |
| `rom_addr_ctrl` | Reads the sine and then the cosine of each new phase from one ROM |
| `sine_rom` | 1024 × 16-bit sine table, computed at elaboration |
| `costas_pkg` | Widths, types, the saturation helper and the CORDIC angle table |

The analog front end is outside the design: IF amplification, filtering,
A/D conversion and the IF mixer. Its I/Q samples enter at `in_i` and `in_q`.

## Number formats

* **Samples** are 16-bit signed throughout: the input, mixer outputs, arm
  outputs and AGC outputs. Every narrowing step saturates.
* **NCO outputs** are 16-bit signed with an amplitude of 32767.
* **Filter state** is 32 bits. The IIR accumulator holds the output with 16
  fraction bits.
* **Coefficients** are Q1.15 integers.
* **AGC gain** is unsigned Q4.12: 4096 means ×1, so the range is 1/4096 to
  about ×16.
* **Angles** use π = 2¹⁵, so ±90° is ±16384.
* **Frequencies** are 32-bit words on the loop rate: the NCO's frequency is
  `fcw / 2³²` of the loop sample rate. For example, `32'h2000_0000` is fs/8.

## The Costas loop in detail

### Arms and sign convention

The input is `x = A·d·cos(ωn + φ)`. PD2 multiplies it by the NCO cosine and
PD1 by the NCO sine. After the arm filters remove the 2ω products, the two
arms are:

* `I ≈ (A/2)·d·cos(e)`
* `Q ≈ (A/2)·d·sin(e)`

where `e` is the NCO phase minus the carrier phase.

PD3 returns `e` itself, folded to ±90°. It computes `atan(Q/I)` after
negating both I and Q whenever I < 0. That fold removes the data sign `d`,
so the detector does not need to know the data. The NCO runs at
`fcw = fcw_nominal − F`, where `F` is the loop filter output. A positive
phase error therefore slows the NCO down.

BPSK carries the usual 180° ambiguity: the loop may lock with `data_bit`
inverted. Resolving that is left to the framing or differential coding of
the data above this design.

### Loop filter and dynamics

The loop filter computes:

```
integ[n] = integ[n−1] + KI·e[n]
F[n]     = KP·e[n] + integ[n]
```

The error `e` is in units of π/2¹⁵. The phase accumulator counts 2π as 2³²,
so one error unit, multiplied by `K`, moves the NCO by `K·2⁻¹⁶` rad/sample
for each radian of phase error. The normalised gains are therefore
`Kp = KP/2¹⁶` and `Ki = KI/2¹⁶`. With the defaults (KP = 6554,
KI = 655) these are Kp ≈ 0.1 and Ki ≈ 0.01. That gives a second-order loop
with:

* natural frequency ωₙT = √Ki ≈ 0.1 rad/sample
* damping ζ = Kp/(2√Ki) ≈ 0.5

The arctangent detector makes this gain independent of signal level. The
AGC is still needed, for the arm filters' fixed-point range and for the
data output.

The integrator holds the Doppler estimate. When the loop is locked,
`fcw_nominal − integ` is the received carrier frequency.

### Arm filters

The arm filters implement `y[n] = b·(x[n] + x[n−1]) + a·y[n−1]`, with
`K = tan(π·fc/fs)`, `b = K/(1+K)` and `a = (1−K)/(1+K)`. The DC gain is one.
The zero at fs/2 suits the double-frequency term.

The default cutoff is 0.06 of the loop rate (`B = 5249`, `A = 22269`). It
must pass the data bandwidth plus the Doppler beat that the loop sees
before it locks. It must also attenuate the product at twice the carrier
frequency.

The best NCO centre is a quarter of the loop rate
(`fcw_nominal = 32'h4000_0000`), which all the testbenches use. The
double-frequency product then falls at fs/2, exactly on the filter's zero.
With a Doppler offset δ it moves to fs/2 − 2δ and is still strongly
attenuated. A centre of fs/8 also works, but its product at fs/4 is only
attenuated about 6×, leaving ripple on Q and on the phase error.

### Pipeline and loop timing

The loop advances once per input strobe. Counted from a sample accepted in
clock `t`:

| Clock | Event |
|---|---|
| t | The mixers register their products. The NCO steps its phase with the current `fcw`. |
| t+1 | The arm filters update. `i_arm`, `q_arm`, `data_bit` and `data_valid` are visible at t+2. |
| t+2 | PD3 computes (a combinational CORDIC, then a register). `phase_err` is visible at t+3. |
| t+3 | The loop filter updates. The new `fcw` is visible at t+4. |
| t..t+2 | The ROM address controller reads the sine (address driven in t) and then the cosine (t+1). Both outputs change together at the end of t+2. |

Samples must therefore be at least 4 clocks apart. An assertion in
`costas_loop` checks this. The loop delay is one sample: the frequency
produced from sample n steps the phase for sample n+2.

## NCO: one ROM for sine and cosine

The table holds a single period of `round(32767·sin(2πk/1024))`. A constant
function computes it at elaboration, so no data file is needed, and
synthesis infers a 16 Kbit ROM.

For each new phase, `rom_addr_ctrl` drives these addresses:

* In the step cycle: the phase address, `phase_next[31:22]`.
* In the next cycle: that address plus 256, which is sin(θ + 90°) = cos θ.

The ROM's registered read returns the sine one clock after its address and
the cosine one clock after that. The controller presents the two values
together and reports `ready` 3 clocks after the step. After reset, the
values for phase 0 are read once without a step, so the first sample meets
valid sine and cosine outputs.

In a two-clock FPGA build, the controller and ROM would run on the fast
clock and the loop on a slower one. Here there is one clock, and the loop
rate is the AGC's decimated sample strobe.

## AGC

The I and Q inputs each pass a first-order LPF with a cutoff of 0.05 of
the input rate (`LPF_B = 4480`, `LPF_A = 23807`). Each is then multiplied by
the common gain and saturated to 16 bits. Using one gain keeps the I/Q
ratio intact.

`level_detector` regulates the gain in three steps:

1. It estimates the envelope of the scaled output as
   `max(|I|,|Q|) + min(|I|,|Q|)/2`. This is within 12% of the true
   magnitude and needs no multiplier.
2. It averages that estimate with a leaky integrator (time constant
   2^`LD_SHIFT` samples).
3. It adds `(REF_LEVEL − level) >>> G_SHIFT` to the gain at every sample.

The result is a feedback AGC: the output envelope settles near `REF_LEVEL`
= 8192, about a quarter of full scale, whatever the input level. After a
sudden rise in input level the multiplier saturates for a few samples,
until the gain has come down.

The decimator keeps every `DECIM`-th scaled sample; the LPF in front serves
as the anti-alias filter. Only the I output feeds the Costas loop, whose
phase detectors take one real input. The Q output is brought out as
`agc_q`.

## Interface of `costas_demod_top`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | Clock and active-low synchronous reset |
| `in_valid` | in | 1 | Input sample strobe, at most one per clock |
| `in_i`, `in_q` | in | 16 | I/Q from the IF mixer, signed |
| `fcw_nominal` | in | 32 | NCO centre frequency, as a fraction of the loop rate times 2³² |
| `agc_gain` | out | 16 | Current AGC gain (Q4.12) |
| `agc_q` | out | 16 | Scaled, decimated Q branch |
| `data_valid` | out | 1 | One pulse per loop sample |
| `data_bit` | out | 1 | Hard decision: 1 when `i_arm` ≥ 0 |
| `i_arm`, `q_arm` | out | 16 | Arm filter outputs: soft data, and a signal near zero when locked |
| `phase_err` | out | 16 | PD3 output (π = 2¹⁵) |
| `fcw` | out | 32 | NCO frequency word: carrier estimate plus proportional correction |

Parameters:

* `DECIM` on the top. The default is 4, which is also the minimum, because
  the loop needs 4 clocks per sample.
* On `costas_loop`: `ARM_B`/`ARM_A` (arm filter) and `KP`/`KI` (loop
  gains).
* On `agc`: `LPF_B`/`LPF_A`, `REF_LEVEL`, `LD_SHIFT` and `G_SHIFT`.

## What is this design's own

The block structure and the precision are the published architecture's:

* an AGC made of an LPF, a level detector, a multiplier and a decimator
* multiplying detectors PD1/PD2, with the NCO sine to PD1 and the cosine to
  PD2
* first-order Butterworth arm filters
* an arctangent error detector
* a first-order IIR, integrating loop filter
* an NCO whose single block-ROM table gives both sine and cosine through an
  address controller on a faster clock
* 16-bit data and NCO outputs, with 32-bit filter arithmetic

Everything below was chosen here:

* **Numbers:** all numeric values. These are the filter cutoffs and
  coefficients, the loop gains, the decimation factor, the ROM depth, the
  AGC reference and time constants, and the 32-bit phase accumulator.
* **Detector and loop filter:** the CORDIC realisation of the arctangent,
  and the proportional-integral form of the loop filter.
* **AGC:** the feedback arrangement and the envelope estimate.
* **Clocking:** modelling the two clocks as one clock with a sample strobe.
* **AGC output:** feeding only the AGC's I output to the loop.

One point was ambiguous. The architecture description once calls the arm
filters second-order Butterworth, but the arm-filter description itself
says first-order. First order is built.

## How far it has been verified, and known limits

Every module has a self-checking testbench in `tb/`:

| Testbench | What it checks |
|---|---|
| `tb_lpf_iir1` | Bit-exact against an integer model, plus DC gain and fs/2 rejection |
| `tb_pd_mixer` | Products, including saturation |
| `tb_pd_atan` | Against the real-valued arctangent (within 6 units) and the data-sign fold |
| `tb_loop_filter` | Exact PI arithmetic |
| `tb_sine_rom` | All 1024 entries |
| `tb_rom_addr_ctrl` | Addresses and latency |
| `tb_nco` | Phase model, sine and cosine, 3-clock latency |
| `tb_decimator` | Which samples are kept, and when |
| `tb_level_detector` | Exact model and direction of regulation |
| `tb_agc` | Output level for inputs 10× apart, gain ratio, decimation count and latency, fs/2 rejection |
| `tb_costas_loop` | Lock and error-free data for Doppler offsets of 0, +0.005, −0.01, +0.02 and −0.03 of the loop rate |
| `tb_doppler_snr_sweep` | Reports lock, symbol error rate and lock time over offsets from −0.2 to +0.2 of the loop rate, at three noise levels. Only the designed range (±0.03) is checked. |

`tb_costas_demod_top` runs the whole demodulator at its default parameters.
It covers three cases, each 150 symbols at 32 loop samples per symbol:

* Doppler offsets of +0.02, −0.025 and 0 of the loop rate, around an NCO
  centre of fs/4.
* Gaussian noise of 0.15, 0.3 and 0.5 of the amplitude on each of I and Q.
* A 10× fade up or down halfway through.

Every case runs with no symbol errors after lock-in. The mean frequency
word after lock is within 10⁻⁵ of the loop rate of the true carrier. The
integrator's frequency estimate settles within 0.3% of the loop rate in
1.2 to 4.4 symbols. The testbench also counts, and requires, these
events: gain increases and decreases, multiplier saturation, 4:1
decimation, NCO read cycles, the PD3 fold, and loop-filter frequency
pulls.

Known limits:

* **Capture range.** At the default gains, the loop captures offsets up to
  ±0.03 of the loop rate, which is 0.0075 of the input rate. In
  `tb_doppler_snr_sweep` every offset up to ±0.03 locked at all three
  noise levels with no symbol errors. Offsets of ±0.05, ±0.1 and ±0.2 did
  not lock.

  This matches the lock-in range of the loop: about Kp·π/2 rad/sample,
  which is 0.025 of the rate at Kp = 0.1. Wider arm filters and loop gains
  (Kp up to 0.8) were also tried. They reached ±0.05 without noise, but
  not beyond, and were less robust to noise. The loop delay of about three
  samples (pipeline plus arm filters) keeps the gain from being raised
  further. Capturing offsets of the order of 20% of the sample rate would
  need a frequency-locked acquisition phase or another acquisition aid.
  This design does not include one.
* **Lock time.** By the measure above, lock takes up to about four and a
  half symbol times at 32 samples per symbol, and more than one symbol
  except at zero offset.
* **No lock detector.** There is no lock detector and no resolution of the
  180° ambiguity.
* **Resources.** These have not been measured on an FPGA. Coarse synthesis
  gives about 565 flip-flop bits, a 16 Kbit ROM, and 18 multiply or
  multiply-add operators, several of them wider than 18×18.

## Simulating and changing it

Every testbench is stand-alone and prints
`TB_RESULT checks=N failures=M` at the end. With plain Verilator 5, from
the project root:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/costas_pkg.sv \
    tb/tb_costas_demod_top.sv --top-module tb_costas_demod_top
./obj_dir/Vtb_costas_demod_top
```

Replace the testbench name to run any other one. The package file has to be
named first; the other modules are found through `-y rtl`. The end-to-end
run takes a few seconds.

To retune the loop:

* Choose ωₙT and ζ, then set `KP = round(2ζωₙT·2¹⁶)` and
  `KI = round((ωₙT)²·2¹⁶)`.
* Choose the arm cutoff fc, then set `ARM_B = round(2¹⁵·K/(1+K))` and
  `ARM_A = round(2¹⁵·(1−K)/(1+K))` with `K = tan(π·fc/fs)`. Keep
  `2·B + A ≈ 32768` for unit DC gain.

Raising `DECIM` slows the loop relative to the input. Lowering it below 4
violates the loop's sample-spacing assertion.
