# Interleaved bit-stream digital beamforming receivers

A digital beamformer usually needs one decimation filter and one multiplier set for
every antenna element. At GHz sample rates those dominate power and area. The two
16-element receivers here avoid both. The band-pass delta-sigma ADCs are never
decimated per element. Their coarse 5-level outputs go straight through
down-conversion and complex weighting. Those steps are multiplexers, not multipliers,
because the operands take only five values. Decimation happens once per beam,
after the 16 elements have been summed.

Two receivers are provided, each with 16 elements, a 1 GHz IF, 100 MHz of bandwidth
and 4 independent simultaneous beams:

* **`pa_dbf`, a phased array.** It steers each beam with a per-element complex weight
  (6-bit cos/sin) and outputs 13-bit quadrature beams at 125 MS/s.
* **`tta_dbf`, a true-time-delay array.** Before weighting, each element's baseband
  stream is delayed by 0-15 samples of 500 ps (0-7500 ps). The weights are 10-bit.
  Beams come out at 250 MS/s. The delay removes beam squint, the shift of a
  phase-steered beam's direction with frequency across a wide band.

`dbf_top` places both side by side with their own ports. The architecture, rates,
widths and sizes are those of the two prototype chips described in the thesis
"A CMOS Digital Beamforming Receiver". Where that description leaves a detail open,
the choice made here is listed under "How far it can be trusted".

## Signal path

```
 rf_in[k] ─► ctbpdsm ─► interleaver ─► ddc ─┬─► [ddl] ─► cwm ─┐
 (4 GS/s)   5-level    2 GS/s I/Q    ±1 LO  │   (beam b, el. k)├─► beam_adder ─► cic_decimator ─► beam b
                                             └─► … 16 elements ─┘   (2 GS/s)       ÷16 / ÷8
```

| stage | rate | what it does |
|---|---|---|
| `ctbpdsm` | 4 GS/s | 4th-order band-pass ΔΣ ADC. Noise-shaping zeros at fs/4 = 1 GHz. Output −2…2. **Behavioural model.** |
| `interleaver` | 4 → 2 GS/s | Even samples become I, odd samples Q. |
| `ddc` | 2 GS/s | Multiplies by a ±1 LO: I·(−1)^m, Q·−(−1)^m. Output still 5-level. |
| `ddl` (timed array only) | 2 GS/s | Delay of 0-15 samples (500 ps each), per beam and element. |
| `cwm` | 2 GS/s | I' = c·I + s·Q, Q' = −s·I + c·Q. Each product is a 5:1 mux over {−2w, −w, 0, w, 2w}. |
| `beam_adder` | 2 GS/s | Sums 16 elements, full precision (13 or 17 bits). |
| `cic_decimator` | ÷16 / ÷8 | 3rd-order CIC, gain removed, so the output keeps the beam-sum scale. |

## Why the interleaver works

This is the least obvious step. The IF sits at exactly a quarter of the 4 GS/s
sample rate, so the sampled LO is cos = 1, 0, −1, 0 and −sin = 0, −1, 0, 1. Mixing
the ADC stream x[n] with it gives I only at even n and Q only at odd n. Every other
value of each rail is zero. A (1 + z⁻¹) CIC followed by decimation by 2 therefore
just holds each nonzero value. That filter-and-decimator is moved ahead of the
beamforming and collapses into a demultiplexer: the earlier sample of each pair
goes to I, the later one to Q. The zero LO values vanish, and the LO becomes a
±1 sequence at 2 GS/s. The decimation by 2 costs nothing in noise, because
down-mixing moves the modulator's fs/4 noise null to fs/2, which aliases onto the
signal band. Everything after the interleaver runs at 2 GHz.

The pairing order matters. Taking the later sample as I would mirror every beam
about broadside. Mixing both rails with the same LO sign instead of opposite signs
has the same effect. The chip-level tests steer to signed angles and would catch
either.

## True time delay

A phase weight e^{jπk·sinψ} aligns the elements only at the carrier frequency. For a
tone Δf off the carrier, element k is left with a phase error of πk·(Δf/fc)·sinψ.
The timed array delays the baseband of element k by round((15 − k)·sinψ) samples for
ψ > 0, or round(−k·sinψ) for ψ < 0. It then applies the phase ωc·kτ = πk·sinψ through
the complex weight, as in the phased array. The delay is applied after
down-conversion, so it does not touch the carrier phase. The weight therefore
carries the whole carrier term. The rounding of the delay to 500 ps leaves at most
250 ps of envelope misalignment, which does not measurably squint a 100 MHz signal.
At ψ = 90° the element spacing is exactly one delay step (λ/2 at 1 GHz is 500 ps).
A 16-element array there uses the full 0-7500 ps range.

## Configuration

Both chips have the same parallel register port, clocked by `clk_dbf`. The address
is `{field[1:0], beam[1:0], element[3:0]}`:

| field | meaning | data |
|---|---|---|
| 0 | cos weight c of (beam, element) | WW-bit two's complement (6 or 10) |
| 1 | sin weight s | same |
| 2 | delay of (beam, element), timed array only | 0-15 |
| 3 | ADC trims of element, beam bits ignored | `{q_delay[2:0], res_trim[2:0]}` |

To steer a beam to ψ on a λ/2 array, with A = 31 or 511: c_k = round(A·cos(πk·sinψ)),
s_k = round(−A·sin(πk·sinψ)). Tapering multiplies A by a window per element. Nulls
and multiple main lobes are other weight sets; a two-lobe beam is the average of
two single-lobe sets. Reset clears all weights and delays and sets both trims to 4.
`cfg_rdata` reads the addressed register combinationally.

## Interfaces and timing

* `clk_adc` is the 4 GHz sample clock. `clk_dbf` must be `clk_adc`/2, with its rising
  edges on rising edges of `clk_adc`. Both come from outside. `rst_n` is
  asynchronous and active low.
* `rf_in[k]` is element k's IF input as a signed 16-bit sample per `clk_adc` cycle. A
  value of 8192 (`dbf_pkg::ADC_STEP`) is one quantizer step. Keep |rf_in| below about
  8192 for a stable modulator.
* `beam_valid` pulses for one `clk_dbf` cycle every 16 cycles (phased array) or every
  8 (timed array). All four beams update together. Latency from the input to the
  decimator is a few cycles plus the selected delay. The CIC adds its usual group
  delay of about 1.5 output samples.
* Widths: the phased array's beam sum and outputs are 13 bits. The timed array's are
  17 bits. A beam with all 16 weights at full scale and a full-scale input reaches
  about 16·A·|x|.

## How far it can be trusted

* The digital path (interleaver to decimator) is complete RTL. It is checked
  bit-exactly, block by block, against independent integer models.
* `ctbpdsm` is a behavioural model. It is an integer error-feedback loop with
  NTF = (1 + a z⁻¹ + z⁻²)², unit signal gain, and the resonator trim moving the zeros.
  It has no thermal noise, DAC mismatch, STF shaping or excess loop delay. Its 3-bit
  sampling-delay trim is stored but has no effect. The real modulator's analog parts
  are not RTL: RC resonators, nested Gm-C op-amps, passive summer, offset-calibrated
  quantizer, RZ/HZ feedback DACs and the constant-output-impedance auxiliary DAC.
* End-to-end results at full size, from synthetic array inputs:
  * Phased array: array gain 253 (ideal 16² = 256). A beam steered 60° away is
    suppressed by more than 30 dB. A two-lobe beam gives 0.25 of the main beam's
    power.
  * Timed array at +50 MHz offset and 90°: the delay beam keeps the full gain of
    256. The phase-only beam drops to 0.574 of it, as the array factor predicts.
* Beam patterns (`tb_beam_patterns`, 10° steps). The sets tested:
  * Phased array: four simultaneous beams at 0/30/60/−45°; two main lobes at 10/50°;
    a −25 dB Dolph-Chebyshev taper; beams 50 MHz off the carrier, where phase
    steering squints.
  * Timed array: beams at −60° and 90°; a beam at −30° with a null at 20°; a
    Chebyshev-tapered beam. Each at −50, 0 and +50 MHz.

  Every main-lobe point agrees with the array factor of the programmed (quantized)
  weights within 1.5 dB. The steered null is 53 dB deep at the carrier. It is only
  about 25 dB deep 50 MHz away, because a phase-projected null is narrowband.
* Modulated signals (`tb_tta_qam`, 5 MBd rectangular symbols):
  * QAM-256 from −30° gives an EVM of −68 dB. The ADC model has no thermal noise,
    so this is far better than silicon would reach.
  * QAM-64 with a QAM-16 interferer 12 dB stronger at a steered null gives −55 dB
    EVM. Without the null it gives −13 dB.
* Array gain in noise (`tb_array_snr`, tone at 1.013 GHz from 20°). Each element
  gets independent input noise, set so that one element alone reaches 48.3 dB SNR
  over 100 MHz. 16 elements allow at most 12 dB more. The phased-array beam reaches
  58.2 dB, a 9.9 dB gain. Its 13-bit output costs the rest, since by itself it
  limits the beam to about 62 dB at this level. The timed-array beam, with 17 bits,
  reaches 59.9 dB, an 11.6 dB gain.
* These details are not given in the published description and were chosen here:
  the CIC decimator (order 3, no compensation filter, truncation), the 17-bit output
  width of the timed array, the register port and address map, the reset values,
  the output registers of each stage, and the two-clock scheme.
* Departures from a silicon implementation: the 16-input adder is a single
  combinational sum with one register, and the CIC accumulators (25/26 bits) are not
  pipelined. Both would need pipelining to close timing at 2 GHz.

## Files

`rtl/`: `dbf_pkg` (types, address fields), `ctbpdsm`, `interleaver`, `ddc`, `ddl`,
`cwm`, `beam_adder`, `cic_decimator`, `dbf_cfg_regs`, `dbf_beam` (the processing of
one beam), `pa_dbf`, `tta_dbf`, `dbf_top`.

`tb/`: one self-checking testbench per block, `tb_<module>`. Each prints
`TB_RESULT checks=N failures=M`. `tb_dbf_top` runs both receivers at full size and
counts every mechanism. `tb_beam_patterns` sweeps the incidence angle from −90° to
+90° for both receivers and several weight sets. `tb_tta_qam` sends QAM streams
through the timed array, with and without a strong interferer. `tb_array_snr`
compares the SNR of one element with that of a 16-element beam in each receiver.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
  +libext+.sv --top-module tb_dbf_top rtl/dbf_pkg.sv tb/tb_dbf_top.sv -o sim
./obj_dir/sim
```

Replace `tb_dbf_top` with any other testbench. The full-size top-level test takes
about 15 s.
