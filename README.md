# Costas-loop subcarrier demodulator for HF RFID readers

A tag answering an HF RFID reader (13.56 MHz carrier) load-modulates the field
with a subcarrier. The subcarrier is either switched on and off per half bit
(Manchester: ISO/IEC 14443 type A at 106 kbit/s, ISO/IEC 15693) or phase-shifted
by 180 degrees (BPSK: ISO/IEC 14443 type B). After the analog front end has
mixed the antenna signal down in quadrature and two ADCs have sampled the I and
Q channels, this RTL recovers the bits.

The main idea is to correlate the incoming subcarrier with a *local copy of
itself* instead of with sampled sine/cosine tables. The local copies are two
one-bit square waves, 90 degrees apart, produced by a counter. "Multiplying"
by a one-bit clock is only a sign flip, and the correlation integral becomes
an accumulator. A Costas loop keeps the local clocks on the tag's phase
using only the *signs* of the two correlator outputs, with one-sample phase
steps. This makes the receiver insensitive to tag clock drift and phase
jumps, and needs no multipliers in the loop. Every protocol runs on the same
hardware: only run-time settings change (subcarrier period, periods per bit,
filter cutoff, coding, thresholds).

Everything runs from one clock at fc = 13.56 MHz with one ADC sample per
clock. The fc/16 subcarrier of ISO/IEC 14443 therefore has 16 samples per
period, and the fc/32 subcarrier of ISO/IEC 15693 has 32.

## Signal path

```
adc_i --> digital_bpf --> subcarrier_demod (channel 0) --> bits, sop, eop, collision, pos
adc_q --> digital_bpf --> subcarrier_demod (channel 1) --> bits, sop, eop, collision, pos

subcarrier_demod:
  din -+-> sc_mixer(lo_i) -> lp_fir -> lp_iir -+-> square -+
       |                        |              |           +-> sra --> bit stream
       +-> sc_mixer(lo_q) -> lp_fir -> lp_iir -|-> square -+    ^
                                |              +----- I --------+
                                +-- signs --> ncp --> lo_i, lo_q, dump
                       sra.phase_change --> ncp.freeze
```

The two ADC channels are demodulated independently and both results are
brought out (`[0]` is I, `[1]` is Q). How much of the tag's signal lands in
each channel depends on the reader-tag geometry, so choosing or combining the
channels is left to the frame decoder that follows.

| Module | Job |
|---|---|
| `rfid_rx_top` | two channels of `digital_bpf` + `subcarrier_demod`, one shared configuration |
| `digital_bpf` | y[n] = x[n] - x[n-2]: removes the ADC DC offset and the fs/2 image |
| `subcarrier_demod` | one Costas-loop demodulator (the "DCS") |
| `sc_mixer` | sign flip by a one-bit local clock |
| `lp_fir` | integrate-and-dump over one local subcarrier period, one output per period |
| `lp_iir` | two first-order low-pass sections, cutoff set at run time |
| `energy_sum` | E = I^2 + Q^2 |
| `ncp` | numerically controlled phase: local clocks, phase detector, loop filter |
| `sra` | symbol recognition: bits, start/end of packet, collisions |
| `rfid_demod_pkg` | configuration struct `demod_cfg_t` and widths |

## The Costas loop and the NCP

The NCP is a counter that runs from 0 to `sc_period - 1`.
- `lo_i` is high for the first half of the count.
- `lo_q` is `lo_i` delayed by a quarter period.
- The last count raises `dump`, which makes both FIRs output their sum and
  restart.

The FIR outputs are therefore the correlations of the input with the I and
Q square waves over exactly one local period.

For a subcarrier that lags the I clock by a fraction of a period, the I sum
keeps the sign of the subcarrier phase. The Q sum is positive or negative
depending on whether the subcarrier is late or early. The *product* of the
two signs does not depend on the BPSK data: equal signs mean "late" and
different signs mean "early". Once per period this vote drives the phase
correction:
- **retard:** the counter holds for one cycle, so the period is one sample
  longer;
- **advance:** the counter skips a value, so the period is one sample
  shorter.

With 16 samples per period the worst initial error is a quarter period,
which the loop removes in a few steps.

Two additions make this work in practice:

- **Freezing during phase changes.** A BPSK phase change inside the window
  corrupts both sums. The SRA raises `phase_change` for the two periods after
  every sign change of I, and while the subcarrier is absent. The NCP makes
  no correction while it is high. The correction is applied at count 3 of the
  next period, because that is when the SRA already knows about the same
  period.
- **Loop filter of votes (`LOOP_VOTES`, default 4).** In lock, Q is near zero
  and its sign is mostly noise. One correction per period then random-walks
  the clock. In white noise it drifts by more than half a period within a
  100-bit packet, which inverts all later bits. The NCP therefore counts
  votes up and down and moves the clock only when the count reaches ±4. In
  the noise test this took the loss at 16 dB Eb/N0 from 11 of 12 packets to
  none. The price is a pull-in four times slower, still well inside a BPSK
  pilot tone. `VOTES = 1` on `ncp` gives the plain one-step-per-period loop.

## Filters

- **`digital_bpf`**, y = x[n] - x[n-2], has zeros at DC and fs/2. At fc/16
  its gain is 2·sin(2π/16) = 0.77, and at fc/32 it is 0.39. It passes white
  noise with a power gain of 2, which costs 5.3 dB of Eb/N0 at fc/16 when the
  ADC noise is white over fc/2. An analog bandpass in front of the ADC hides
  most of this loss.
- **`lp_fir`** is a boxcar one subcarrier period long. Its zeros fall on the
  harmonics of the local subcarrier, which is exactly what must be removed
  after square-wave mixing. Dumping once per period also decimates to the
  subcarrier rate, so everything after it runs once per period.
- **`lp_iir`** is two cascaded sections `y += (x - y) >> iir_shift`, with 8
  fractional bits and unity DC gain. Shift 0 bypasses it. A larger shift
  averages more periods. Tested settings:
  - 1 for BPSK at 8 or 4 periods per bit and for ISO/IEC 15693 at 16 periods
    per bit;
  - 0 for ISO/IEC 14443 type A (1 in the noise test; 2 fails);
  - 2 for ISO/IEC 15693 at 64 periods per bit.

## Symbol recognition (SRA)

The SRA gets one energy value `E` and one filtered I value per subcarrier
period.

**BPSK.**
- **Reference phase.** During the pilot tone the I values are summed. The
  sign of the sum is the reference and means logic 1.
- **Bit grid.** The first sign change of I after at least `PILOT_MIN`
  (8) periods starts a grid of bit cells `ppb` periods long. Each bit is the
  sign of the reference-corrected I sum over its cell (integrate and dump).
  Sign changes of I re-align the grid in the SOF ones, and in the data only
  within two periods of a cell boundary.
- **Start of frame.** `sof_zeros` or more zeros, then at least one 1, then
  the 0 that is the start bit of the first character. This 0 raises `sop`
  and is output as the first bit.
- **Loop settled on the other phase.** If the loop settles on the opposite
  phase during the pilot, the pilot reads as a run of zeros. The rule is: a 1
  that follows two or more, but too few, zeros inverts the reference, and
  that cell counts as the first SOF zero.
- **End of frame.** `eop` comes when E stays below `energy_th` for one bit
  time.

**Manchester.**
- **Half-bit grid.** The first period in which E reaches `energy_th` starts
  a half-bit grid. It counts as the second period of the half, to make up for
  the filter delay.
- **Decision.** At the end of each half bit, E is compared with the
  threshold, giving pairs:
  - (on, off) = 1;
  - (off, on) = 0;
  - (on, on) = a collision, output as a bit with `collision` set and its
    index in `pos`;
  - (off, off) = end of packet.
- **Start.** The first symbol must be a 1 (start of communication). It
  raises `sop` and is not output.

**Threshold.** Set `energy_th` to about a quarter of the locked energy. For
sine amplitude A at the ADC and period P, that energy is
E = (0.64 · P · A · 2·sin(2π/P))².

## Configuration per protocol

`demod_cfg_t` fields: `coding`, `sc_period`, `ppb`, `iir_shift`,
`energy_th`, `sof_zeros`, `track_en`.

| Protocol, rate | coding | sc_period | ppb | iir_shift | tested |
|---|---|---|---|---|---|
| ISO/IEC 14443 B, fc/128 (106 kbit/s) | BPSK | 16 | 8 | 1 | yes, with noise sweep |
| ISO/IEC 14443 B, fc/64 (212 kbit/s) | BPSK | 16 | 4 | 1 | yes |
| ISO/IEC 14443 A, fc/128 | Manchester | 16 | 8 | 0 or 1 (1 in noise) | yes, with collisions and noise sweep |
| ISO/IEC 15693, fc/512 (26.48 kbit/s) | Manchester | 32 | 16 | 1 | yes |
| ISO/IEC 15693, fc/2048 | Manchester | 32 | 64 | 2 | yes |
| ISO/IEC 14443 A/B, fc/32 and fc/16 | BPSK | 16 | 2, 1 | – | not supported: the bit grid fails at 2 periods per bit |
| FeliCa fc/64 | – | 64 | 1 | – | not supported |

`sc_period` must be a multiple of 4 and at least 8. Change the configuration
only between packets. `track_en = 0` stops the phase tracking.

## Timing

- One sample per clock, taken while `adc_valid` is high (the tests hold it high).
- The BPF adds 1 cycle.
- From the last sample of a subcarrier period, the FIR output arrives after
  1 cycle, the IIR after 2, E after 3, and the SRA decision after 4.
- All outputs are registered single-cycle pulses at the subcarrier rate.
  `pos` is valid with `bit_valid`.
- Reset is asynchronous and active low.

## Noise performance

`tb_per_14443b` sends ISO/IEC 14443 type B packets: pilot, SOF, 8 data bytes
and 2 CRC bytes as 10-bit characters, and EOF. It adds Gaussian noise to
every ADC sample. With white noise over fc/2 and sine amplitude A,
Eb/N0 = 32·A²/σ². A packet counts as received when the start of packet is
found and all 100 character bits are right. With 12 packets per point:

| Eb/N0 at the ADC | lost packets |
|---|---|
| no noise | 0/12 |
| 19 dB | 0/12 |
| 16 dB | 0/12 |
| 13 dB | about 5/12 |
| 10 dB | 12/12 |

`tb_per_14443a` does the same for ISO/IEC 14443 type A: the start symbol,
then 10 bytes with odd parity (90 bits), and IIR shift 1. Here the
subcarrier is on for half of each bit, so Eb/N0 = 16·A²/σ².

| Eb/N0 at the ADC | lost packets |
|---|---|
| no noise | 0/12 |
| 22 dB | 0/12 |
| 19 dB | 8/12 |
| 16 dB | 11/12 |
| 13 dB | 12/12 |

Manchester reception is the weaker part of this design. Each half bit is
decided by comparing one filtered energy value with a fixed threshold, which
causes two kinds of loss in noise:
- in idle noise the threshold is crossed and false packet starts appear;
- inside a packet the energy dips below it and the packet ends early.

An energy detector that integrates over the whole half bit, with a
threshold scaled to match, is the obvious next step.

The bandpass loss of about 5.3 dB on white noise explains much of the gap to
an ideal coherent BPSK receiver. That receiver would reach 10 % PER at about
7 dB for this packet. The published measurements of this architecture, with
band-limited noise, reach 10 % PER at 10.2 dB, so the two sets of numbers
cannot be compared one to one.

## Departures and own choices

- **Filter coefficients and orders.** The coefficients of the digital
  bandpass and of the low-pass FIR and IIR are not specified by the
  architecture. The simplest filters that do the stated job were chosen
  (see Filters).
- **Energy branch.** The multipliers after the IIRs are read as squarers,
  so E = I² + Q².
- **SRA inputs.** The SRA reads the I value as well as E. BPSK bits need the
  phase, and only I carries it.
- **SRA rules.** The whole SRA algorithm (grids, SOF rules, thresholds,
  phase-change detection) is this design's own. The architecture only says
  what the SRA must deliver.
- **Loop filter.** The NCP loop filter is an addition.
- **Not recognised.** The ISO/IEC 15693 SOF/EOF patterns and the FeliCa
  preamble and sync code. ISO/IEC 15693 packets are decoded as plain
  Manchester bits after a leading 1.
- **FeliCa not supported.** FeliCa at fc/64 would need one "subcarrier"
  period per bit. The Costas loop may lock 180 degrees off, and then every
  integration window straddles two bits. The FeliCa preamble is a plain
  square wave, so it cannot tell the two locks apart.
- **Outside the RTL.** The analog front end, the ADCs and the frame decoder
  (CRC, framing) are not part of this RTL.
- **Widths.** 10-bit ADC, 19-bit FIR/IIR values and a 39-bit energy are
  this design's choice.

## Simulating

Every testbench is self-checking, prints
`TB_RESULT checks=<n> failures=<n>` and stops itself. For example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/rfid_demod_pkg.sv tb/rfid_tb_pkg.sv rtl/*.sv tb/tb_rfid_rx_top.sv \
  --top-module tb_rfid_rx_top -o sim && ./obj_dir/sim
```

`tb/rfid_tb_pkg.sv` holds the tag signal model used by the testbenches. It
renders a pilot, SOF and bits (BPSK), or Manchester symbols with collisions,
as a sampled subcarrier, with any delay, amplitude, DC offset and noise.

- **`tb_rfid_rx_top`** runs the top at its defaults. It receives five
  replies back to back: 14443 B at 106 and 212 kbit/s, 14443 A with two
  collisions, and 15693 at both rates. Between replies it switches coding,
  period and IIR cutoff. It fails if any mechanism never occurred:
  - start or end of packet;
  - collision;
  - retard or advance;
  - freeze;
  - each of the three switches.
- **`tb_subcarrier_demod`** checks lock and decoding over several
  subcarrier delays and noise levels.
- **`tb_per_14443b`** and **`tb_per_14443a`** are the packet error rate
  sweeps above.
- **Block testbenches** check each block against an independent model:
  `tb_sc_mixer`, `tb_lp_fir`, `tb_lp_iir`, `tb_energy_sum`, `tb_digital_bpf`,
  `tb_ncp` and `tb_sra`.
