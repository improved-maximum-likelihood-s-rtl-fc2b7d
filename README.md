# S-FSK power-line modem with an improved maximum-likelihood receiver

This is synthesizable SystemVerilog for the digital part of a narrowband power-line modem. The modem is meant for automatic meter reading in the CENELEC-A band (3–95 kHz) and follows the S-FSK profile of IEC 61334-5-1. It runs at 9.6 kbit/s.

S-FSK (spread frequency shift keying) sends a 0 as a tone at f0 and a 1 as a tone at f1. The two tones sit far enough apart (19.2 kHz in the default plan) that the line treats them as two independent channels. Each channel has its own attenuation and its own noise.

A plain FSK receiver compares the energies at f0 and f1. It fails when one tone arrives much weaker or noisier than the other. This receiver instead estimates, for each channel, the signal amplitude and the noise power from a known preamble. It then decides each bit with an approximation of the maximum-likelihood rule, which weights each channel by how trustworthy it is. When one tone is lost in noise, the decision rests on the other one.

The design follows a published DSP-software implementation of this modem (Improved Maximum Likelihood S-FSK Receiver for PLC Modem in AMR, J. Electrical and Computer Engineering, 2012). The DSP loops are recast here as hardware. Where the RTL departs from that description, or fills a gap in it, the text below says so.

## Signal path

```
                 k0,k1                                   adc_strobe (fs/2)
                   |                                          |
 bits -> sfsk_modulator --dds(sine_lut)--> dac_sample   adc_sample
                                                               |
        sfsk_demodulator:  dds f0 (sin,cos)  dds f1 (sin,cos)  |
                           4 x correlator  <-------------------+
                           2 x envelope_detector (r_i, r_i^2)
                 first P symbols |           later symbols |
                      channel_estimator --> ml_decision (2 x g_function) --> bits
```

`sfsk_modem` (the top) holds `sample_timer`, `sfsk_modulator` and `sfsk_demodulator`. The DAC, ADC, line driver, filters and mains coupling are outside it. So are the host link, the zero-crossing bit synchronisation and the IEC 61334-5-1 frame/time-slot state machine. Their signals are brought out as ports.

## Tone synthesis (`sine_lut`, `dds`, `sfsk_modulator`)

- **Sine table.** A table holds one sine period of `LEN` = 656 signed 16-bit samples, `round(32767·sin(2πi/656))`. The table is computed at elaboration, so changing `LEN` or `WIDTH` regenerates it.
- **Synthesizer.** The synthesizer keeps an index modulo `LEN` and adds an integer step `k` per sample, which gives a tone of f = k·fs/LEN.
- **Cosine.** The cosine output reads the same table a quarter period (164 entries) ahead.
- **Modulator timing.** The modulator spends exactly `SPB_TX` = 320 samples on each bit, stepping by `k0` for a 0 and `k1` for a 1.
- **Phase.** The phase is cleared when a transmission starts. After that it runs on across bit changes, so bit boundaries cause no phase jump.
- **Input handshake.** Bits come in on valid/ready. When idle, a bit is taken in any cycle. While transmitting, the next bit is taken only in the cycle of the last sample of the current bit, which keeps bits back to back.

**Tone plan.** The package gives `k0 = 19`, `k1 = 15` as defaults: 91.2 and 72 kHz if one step is 4.8 kHz. The source design also lists the pairs 18/14, 17/13, 16/12 and 15/11. Its numbers for the table do not agree with each other:

- It gives a 656-entry table and 320 samples per 9.6 kbit/s bit, which means fs = 3.072 MHz.
- It also gives a 4.8 kHz step, which needs fs/LEN = 4.8 kHz.
- It also quotes fs = 3.125 MHz.

This RTL keeps the table length of 656 and the 320 samples per bit. At a 3.072 MHz clock one step is then 4.683 kHz, and the tones land about 2.4 % below the listed frequencies. The receiver uses the same table and steps, so transmitter and receiver always agree. To get exact 4.8 kHz steps at 3.072 MHz, set `LEN = 640` (it must stay a multiple of 4). The tones then fit a whole number of half cycles into a bit and are orthogonal over it, so less of one tone leaks into the other channel's correlators; in the end-to-end test the noise estimates drop to about a third.

## Receiver (`sfsk_demodulator`)

The ADC runs at half the DAC rate (`ADC_DIV` = 2), so a bit is `SPB_RX` = 160 ADC samples. The receiver's synthesizers step by 2·k mod LEN, which produces the same tone frequencies at the lower rate.

**Correlators.** Four correlators multiply each sample by sin f0, cos f0, sin f1 and cos f1. The product is scaled by 2^-15 and accumulated in 26 bits over one bit. Sine and cosine together capture the tone whatever its phase, so no carrier recovery is needed (noncoherent detection).

**Envelopes.** For each channel, `envelope_detector` forms the energy r_i² = I² + Q² and the envelope r_i = floor(√r_i²). The square root is computed sequentially, one bit per cycle.

**Packet flow.**

1. A `rx_start` pulse marks the bit border of the first preamble symbol. The next `adc_en` sample is the first sample of that symbol.
2. The first `P` = 32 symbols are the preamble, alternating 1, 0, 1, 0, … (1 first). They go to the estimator.
3. Every later symbol goes to the decision.
4. `phase` shows idle / preamble / data. `rx_stop` returns to idle.

**Timing.** A decision is ready about 92 clock cycles after the last sample of its bit: 27 for the envelope, 63 for the decision and 2 for handover. All per-bit work must finish before the next bit's correlations complete. At the default clocking (one clock per DAC sample) a bit lasts 320 clocks. If bits are ever shorter than about 100 clocks, the sticky `overrun` flag is raised.

## Channel estimation (`channel_estimator`)

The preamble alternates between the two tones, so its 32 symbols are 16 symbols on each hypothesis. On a 1-symbol, channel 0 carries only noise. On a 0-symbol, channel 0 carries signal plus noise. Channel 1 is the mirror image. This gives:

```
sigma0^2 = (2/P) * sum over 1-symbols of r0^2        noise power, channel 0
sigma1^2 = (2/P) * sum over 0-symbols of r1^2        noise power, channel 1
mu0^2    = | (2/P) * sum over 0-symbols of r0^2 - sigma0^2 |   signal power, channel 0
mu1^2    = | (2/P) * sum over 1-symbols of r1^2 - sigma1^2 |   signal power, channel 1
```

With P = 32, 2/P is a right shift by 4, and `P` must be a power of two. After the last preamble symbol, the estimator computes two values per channel in parallel:

- the amplitude mu_i = floor(√mu_i²);
- the constant c_i = mu_i²/sigma_i², in Q.16.

This takes two square roots and two 68-cycle dividers. The estimates are ready about 70 cycles after the preamble ends, well before the first data bit finishes.

**SNR cap.** Before dividing, the noise estimate is floored at mu_i²/2^20 and at 1. This caps the estimated SNR at 60 dB. Without the cap, a nearly noise-free line would give a huge c_i, while the decision argument X_i saturates at 2^24. The two channel metrics could then end up nearly equal, and decisions would become random. The cap is parameter `SNR_CAP_LOG2` and is this design's addition.

## The decision (`g_function`, `ml_decision`)

This is the part that needs the most care.

### The likelihood ratio

The envelope of a channel that carries the tone is Rician. The envelope of a channel that carries only noise is Rayleigh. The log-likelihood ratio contributed by channel i is therefore:

```
l_i = (2i-1) * ( ln I0( 2 r_i mu_i / sigma_i^2 ) - mu_i^2 / sigma_i^2 )
```

Here I0 is the modified Bessel function of order 0. The sign (2i−1) makes channel 1 vote for a 1 and channel 0 vote for a 0.

### The approximation g(X)

ln I0 is replaced by a piecewise linear g(X) with 8 segments:

- **Breakpoints.** The segments meet at X = 0, 2, 4, 8, …, 256.
- **Coefficients.** Each segment's line passes through ln I0 at both of its ends.
- **Above 256.** The last segment is extended; ln I0 is almost linear there.
- **Formats.** The slopes A_j are 16-bit Q1.15 and the offsets B_j are 32-bit signed Q16.16. Both are computed at elaboration from the power series I0(x) = Σ((x/2)^k/k!)².
- **Segment choice.** The segment index is the position of the leading one of the integer part of X.
- **Accuracy.** Over [0, 256] the mean square error against ln I0 is 5.9·10⁻⁴.

### Per-bit computation

For each bit, `ml_decision` does the following:

1. It computes X_i = 2·r_i·mu_i / sigma_i² with two dividers (one per channel). X_i is in Q24.8 and saturates at 2^24.
2. It forms the channel metrics m_i = g(X_i) − c_i, signed, 48 bits, Q.16.
3. It decides **1 if m1 > m0**, otherwise 0. Ties go to 0.

Step 3 is the sign of the total log-likelihood ratio, l_0 + l_1. The published description writes the rule as a comparison of l'_1 against l'_0. Taken literally, with the sign of l'_0, that comparison is not the likelihood test, so the RTL uses the sum.

A channel with a small mu_i or a large sigma_i² produces small X_i and c_i, and therefore contributes little to the decision. `seg0`/`seg1` report which g segment each channel used.

## Top-level interface (`sfsk_modem`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset (all blocks) |
| `k0`, `k1` | in | 10 | step indices of f0 and f1 (both directions) |
| `tx_bit_valid/ready/data` | in/out/in | 1 | bits to send |
| `tx_busy` | out | 1 | transmitting |
| `dac_sample`, `dac_valid` | out | 16, 1 | one sample per fs strobe |
| `adc_strobe` | out | 1 | ADC sampling instant (fs/2); `adc_sample` must hold the sample in that cycle |
| `adc_sample` | in | 16 | ADC sample |
| `rx_start`, `rx_stop` | in | 1 | bit border at packet start / end of reception |
| `rx_phase` | out | 2 | idle, preamble, data |
| `rx_est_valid`, `rx_sigma2_*`, `rx_mu2_*` | out | 1, 52 | channel estimates |
| `rx_bit_valid`, `rx_bit_data` | out | 1 | decided payload bits |
| `rx_seg0`, `rx_seg1` | out | 3 | g segment used per channel |
| `rx_overrun` | out | 1 | per-bit work did not keep up |

Parameters: `LEN` (656), `WIDTH` (16), `SPB_TX` (320), `ADC_DIV` (2), `P` (32), `CLKS_PER_SAMPLE` (1). Shared constants and the `rx_phase_e` type are in `sfsk_pkg`.

**Duplex.** The line itself is half duplex: the modem either sends or receives. The top does not enforce this. Both directions may run at once, which the tests use to loop the DAC back to the ADC. The controller driving the ports is expected to keep to one direction at a time.

## Choices made here where the source design is silent

- **ADC and arithmetic widths.** The ADC is 16 bits. The accumulators are 26 bits, energies 52 bits, the g argument is Q24.8 and the metrics are 48-bit Q.16.
- **Envelope.** The envelope is an exact integer square root, not an approximation.
- **Estimator extras.** The first preamble symbol is a 1, and the SNR is capped at 60 dB (see above).
- **Clocking.** The default clock is one cycle per DAC sample. The source ran its modem as software on a 400 MIPS DSP.
- **Reset.** Reset is synchronous, active low.
- **Bit border.** The receiver is told the bit border by `rx_start`. The mains zero-crossing and correlation-based bit-border adjustment that would produce it are not part of this RTL.

## Simulation

Every testbench is self-checking and ends with `TB_RESULT checks=N failures=M`. Build and run any of them with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl rtl/sfsk_pkg.sv tb/tb_sfsk_modem.sv \
          -y rtl +libext+.sv --top-module tb_sfsk_modem -Mdir obj_modem -o sim
obj_modem/sim
```

| testbench | what it shows |
|---|---|
| `tb_sfsk_modem` | Whole modem at default parameters, DAC looped to ADC through a channel model. Covers all five tone pairs, balanced and 10/20 dB unbalanced channels, heavy noise, and a case where plain FSK makes dozens of errors in 304 bits and the ML rule none. Checks every bit, the 320-clock bit period on both sides, the decision latency, the estimates, and that each mechanism occurred. |
| `tb_sfsk_ber` | Error counts against SNR_av (4/8/12 dB) for x = 5/10/20 dB, 608 bits per point, ML against plain FSK on the same envelopes. |
| `tb_sfsk_demodulator` | Receiver alone with signals of random carrier phase; estimates, restart mid-packet, overrun. |
| `tb_channel_estimator`, `tb_ml_decision`, `tb_g_function` | Exact or floating-point references for the estimator equations, the metrics and decision, and the ln I0 fit. |
| `tb_correlator`, `tb_envelope_detector`, `tb_dds`, `tb_sine_lut`, `tb_sfsk_modulator`, `tb_sample_timer` | Building blocks against reference models. |

One run of `tb_sfsk_ber`:

```
 x dB  SNR_av dB   ML errors   FSK errors   (of 608 bits)
  5.0      4.0        127          140
  5.0      8.0         49           58
  5.0     12.0          1           14
 10.0      4.0         38          134
 10.0      8.0          3           56
 10.0     12.0          0           24
 20.0      4.0          0          101
 20.0      8.0          0           81
 20.0     12.0          0           23
```

The trend matches the published simulations: plain FSK gets worse as the channels become unbalanced, and the ML receiver gains the most there. Curves over 1000 packets per point, as in the published evaluation, were not simulated; each point here is two packets.

## Known limits

- **Tone frequencies.** The table length and the 4.8 kHz tone grid cannot both hold at 320 samples per bit (see Tone synthesis).
- **Bit synchronisation.** Bit synchronisation, frame and delimiter detection, time slots and the PHY state machine are not included. `rx_start` must be supplied at a bit border; a border that is off by a few samples costs some margin but still works.
- **Preamble assumption.** The estimator assumes the preamble symbols really are the alternating pattern. A wrong start position corrupts the estimates for the whole packet.
