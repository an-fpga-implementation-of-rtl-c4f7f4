# OFDM transceiver for a 10 MHz LTE-style channel

This is a complete OFDM transmitter and receiver in synthesizable SystemVerilog.
It runs from one 61.44 MHz clock and puts out, and takes in, a real
intermediate-frequency (IF) signal at 15 MHz. In between it does what an LTE
downlink receiver has to do:

- find where a frame starts;
- measure and remove the carrier frequency offset (CFO) between the two oscillators;
- estimate the channel from scattered pilots;
- equalise it;
- turn the carriers back into bits.

The receiver finds the frame with the cyclic-prefix correlation method of van de
Beek. It estimates the channel with least squares on the pilots, using linear
interpolation across frequency and a hold across time. It equalises with zero
forcing.

The transmitter and the receiver are independent halves. `ofdm_transceiver` places
them side by side. The IF output `tx_if` goes to a DAC and the IF input `rx_if`
comes from an ADC. In the testbenches the two are joined through a model channel.

```
 TX:  prbs_source -> qam_mapper --+
                     zc_gen ------+-> tx_frame_assembly -> fft (inverse) -> cp_insert
                                                                              |
      tx_if <- tx_mixer_dds (DDS 15 MHz) <- duc (SRRC x2, halfband x2) <------+

 RX:  rx_if -> rx_mixer_dds -> ddc (halfband /2, SRRC /2) -> beek_sync --(peak, angle)--+
                                                       \                                |
                                                        +-> data_forward (delay, FIFO, cfo_correct)
                                                                   |
      bits <- qam_demapper <- pilot_dc_removal <- zf_equalizer <- ls_chest <- fft
```

## Numbers that shape everything

| Quantity | Value |
|---|---|
| System clock | 61.44 MHz, one IF sample per clock |
| Baseband rate | 15.36 MS/s: one sample every `OSR` = 4 clocks |
| FFT size / cyclic prefix | N = 1024 / CP = 256 samples |
| Subcarrier spacing | 15 kHz |
| Symbol + CP | 1280 samples = 5120 clocks = 83.3 µs |
| IF | 15 MHz, DDS word `FCW_IF` = 1048576000 (f = fcw · 61.44 MHz / 2^32) |
| Frame | 1 Zadoff-Chu training symbol + 12 symbols = 66560 clocks |
| Guard bands | 208 unloaded carriers at each edge |
| Loaded carriers | 607, not counting DC, which is carried but set to zero |
| Pilots | symbols 0, 4, 8 of the frame; every 6th loaded carrier, both edge carriers included: 102 pilots |
| Data carriers per frame | 9·607 + 3·505 = 6978 (13956 bits QPSK, 27912 bits 16-QAM) |
| Modulation | QPSK or 16-QAM, chosen per frame |

Carriers are numbered in "logical" (spectrum) order, c = 0..1023, with DC at c = 512.
Logical carrier c sits in FFT bin c XOR 512.

Loaded carrier u counts the loaded carriers from the lowest one, skipping DC.
Carriers 208..815 minus 512 give u = 0..606. In a pilot symbol, u is a pilot when
u mod 6 = 0.

All of this is in `ofdm_pkg`: `carrier_kind(c, pilot_sym)` classifies a carrier, and
every block that needs the layout uses it.

## Fixed point

| Signal | Format |
|---|---|
| Baseband samples, carriers | `cplx_t`: two signed 16-bit rails |
| QPSK | ±2048 per rail |
| 16-QAM | ±1024, ±3072 |
| Pilots | QPSK ±2048, signs from a PRBS-9 |
| ZC training carriers | amplitude 2896 (same power as QPSK) |
| Angles | 24-bit binary angle: 2^24 = one turn |
| Channel estimate h | 16-bit, 2048 = gain 1 |
| IF samples | signed 16 bits |

Every stage rounds and saturates rather than wrapping.

The inverse and forward FFTs each scale by 1/32, spread over five of their ten
stages. Together with the filter gains, this keeps a full frame well inside 16 bits
at the IF: the testbench checks that the IF never reaches full scale.

## Transmitter

**Bits and constellation.**

- `prbs_source` is a PRBS-23 (b[n] = b[n-23] ⊕ b[n-18], seeded with ones). It hands
  out 2 or 4 bits per request.
- `qam_mapper` uses LTE Gray mapping. Bits 0 and 1 are the signs of I and Q (0 means
  positive). For 16-QAM, bits 2 and 3 pick the outer level.

**Frame assembly** (`tx_frame_assembly`). Each symbol slot walks the 1024 logical
carriers in order and sends them to the IFFT, one carrier per clock:

- guard carriers and DC get 0;
- in the training slot, loaded carriers get successive elements of the Zadoff-Chu
  sequence from `zc_gen` (length 607, root 25);
- in symbols 0, 4 and 8, pilot carriers get the PRBS-9 pilot values. The PRBS-9 is
  x^9+x^5+1, restarted every pilot symbol, and gives two sign bits per pilot;
- all other loaded carriers get data.

A slot starts when three things are true:

- the IFFT is idle;
- the CP inserter has a free buffer;
- the previous slot has left the IFFT's load phase.

`zc_gen` computes the ZC phase u·n·(n+1)/2 mod 607 with two modular accumulators. It
then turns the phase into a binary angle with one constant multiply and rotates the
amplitude in a CORDIC. Its 18-clock latency is matched by a delay line on the other
carrier sources.

**The FFT** (`fft`) is one module, used as the IFFT here and as the FFT in the
receiver. It is a burst radix-2 decimation-in-frequency transform working in place on
a register array, with two butterflies per clock. It has three phases:

| Phase | Clocks |
|---|---|
| Load | N = 1024 |
| Compute | 10 stages of N/4 = 2560 |
| Unload | N = 1024 |
| **Total** | **4608** |

One symbol period at the baseband rate is 5120 clocks, so one transform per symbol
always keeps up.

- Twiddle factors are computed at elaboration by an integer CORDIC constant function,
  so no table file is needed.
- `SHIFT` = 1 puts the frequency side in logical order: input order for the inverse
  transform, output order for the forward one.
- `SCALE_MASK` selects the stages that halve. Every stage saturates, and there are 4
  guard bits inside.

**Cyclic prefix** (`cp_insert`). This is a ping-pong pair of symbol buffers, filled by
the IFFT's output bursts. At the baseband strobe it plays the last 256 samples and then
all 1024, which forms the 1280-sample symbol. Symbols follow each other without gaps
while frames are enabled.

**Up-conversion** (`duc`, `fir_filter`). There are two ×2 interpolation stages, each
with zero stuffing and a gain of 2:

- a 21-tap square-root raised-cosine filter (roll-off 0.25) at 30.72 MS/s;
- a 15-tap half-band filter (Hamming window) at 61.44 MS/s.

The taps are Q15 integer constants in `ofdm_pkg`, `srrc_coef` and `hb_coef`. They were
computed from the standard SRRC and windowed-sinc formulas, and the half-band centre
tap is trimmed so its taps sum to exactly 2^15.

**IF mixer** (`dds`, `tx_mixer_dds`). The DDS is a 32-bit phase accumulator whose top
24 bits drive a CORDIC rotation of (32000, 0), giving cos and sin. The mixer output is
(I·cos − Q·sin)/2^15.

## Receiver

**Down-conversion** (`rx_mixer_dds`, `ddc`). The mixer multiplies the real IF by
2·(cos − j·sin). The DDC mirrors the DUC: the half-band filter runs at 61.44 MS/s and
keeps every second output, then the SRRC matched filter keeps every second output
again. This gives one baseband sample every four clocks, flagged by `y_valid`. The
30 MHz image from the mixer falls in the half-band stopband.

### Frame and CFO synchronisation (`beek_sync`)

This is the part that needs the most care. For each new baseband sample r(k), two
running sums over the last L = CP = 256 samples are updated:

```
ms1 = 1/2 · Σ (|r(k)|² + |r(k−N)|²)      energy term
ms2 =       Σ  r(k) · conj(r(k−N))        correlation term
```

Each sum adds the newest term and subtracts the one L samples older. A 2048-sample
delay memory supplies r(k−N) and the terms leaving the window. After reset a fill
counter makes every read from a memory location not yet written return zero. The
sums therefore start from a clean state whatever the memory held at power-up.

- When the last 256 samples are a cyclic prefix and its copy, |ms2| reaches ms1.
- The angle of ms2 is −2π·ε, where ε is the CFO in subcarrier spacings (|ε| < 1/2).
- Both sums are 48 bits wide. They are shifted right by `SH` = 16, and then a
  vectoring CORDIC gives |ms2| and the angle.

**The metric** is ms1 − |ms2|: a difference rather than a ratio, so no divider is
needed. It falls to nearly zero at the end of a prefix window.

**Detection rule.** A sample is "below threshold" when both of these hold:

- metric · 2^`TH_SHIFT` < ms1;
- ms1 > `EFLOOR`, which stops silence from triggering.

While below threshold, the first sample whose successor has a larger metric is the
peak, and only one peak is taken per pass below threshold. The angle recorded is the
angle at that sample.

**Latency.** The peak for a window ending on sample t is flagged after sample t+5 has
arrived. The minimum is only known once the next metric has come out of the 18-clock
CORDIC.

Two limitations follow from the rule.

- **Early peaks.** On noisy or data-like signals the first local minimum can come a
  few samples before the true minimum. This is why the frame start is moved 3 samples
  into the cyclic prefix: a slightly early start only rotates the carriers, which the
  channel estimate removes. A late start would cause interference between symbols.
  The training symbol is a ZC sequence, which has a constant envelope in time, so its
  metric is smooth. The testbenches measure its peak at exactly the nominal latency.
- **SNR floor.** With `TH_SHIFT` = 3, the correlation coefficient must exceed 7/8,
  which is about 8.5 dB SNR, for a frame to be found. `TH_SHIFT` = 1 lowers that to
  about 0 dB. The cost is detections up to a few tens of samples early, with an angle
  from an incomplete correlation.

Every symbol's prefix produces a peak, not just the training symbol's. The forwarding
logic below decides which peak starts a frame.

### Data forwarding (`data_forward`, `cfo_correct`)

The incoming stream passes through a fixed delay line (`FWD_DELAY` = 4, five stages).
With it, the samples that reach the frame logic line up with the synchroniser's peak.
A peak seen while idle starts a frame, in this order:

1. **Load the CFO corrector.** The peak's angle goes into the CFO corrector.
2. **Skip the rest of the prefix.** CP − 3 samples of the first data symbol's prefix
   are skipped, so the FFT window starts 3 samples inside the prefix. The training
   symbol itself is not forwarded.
3. **Write the useful samples.** For each of the 12 symbols, 1024 samples are written
   into a 2048-entry FIFO, and the next 256 (a prefix) are skipped.
4. **Hold off.** After the frame, peaks are ignored for one more prefix length
   (`holdoff`). The last data symbol's own prefix peak falls in that time and would
   otherwise look like a new frame.

`cfo_correct` holds the angle and accumulates it once per sample, with 10 extra
fraction bits, so that it divides by N. It rotates each written sample by ang·k/N,
where k counts samples since the peak. The phase keeps running across prefixes and
symbols, so all symbols of a frame are corrected consistently. The constant phase
that remains is part of what the channel estimate absorbs.

The FIFO is written at the sample rate and read at the clock rate, four times faster.
When it holds a whole symbol and the FFT is idle, 1024 samples go out on 1024
consecutive clocks. Each burst is tagged with its symbol number 0..11. The burst
reading recreates the gap between symbols that the burst FFT needs.

In the data-forwarding testbench, the first burst starts 41 clocks after its last
sample arrived:

| Stage | Clocks |
|---|---|
| Delay line | 20 |
| CORDIC | 18 |
| FIFO write and read | 3 |

### Channel estimation (`ls_chest`)

The FFT output of each symbol, in logical order, is stored in a symbol buffer.

**In a pilot symbol:**

- Each pilot gives the least-squares estimate h = y·conj(s)/|s|². With pilots of
  amplitude 2048 and known signs this is y·conj(sign)/2, so h comes out in units of
  2048 and needs no divider.
- After the symbol, a 607-clock pass joins neighbouring pilot estimates with straight
  lines. Loaded carrier u gets h_i + (h_{i+1} − h_i)·(u mod 6)/6, with the weight in
  Q15. The result goes into a channel memory.
- That memory is used unchanged for the following symbols until the next pilot symbol
  (a hold in time).

**Replay.** Every symbol is then replayed from the buffer one carrier per clock, with
its channel value, carrier kind and symbol number. Null carriers get h = 0.

Replay starts 608 clocks after a pilot symbol's last carrier and 1 clock after a data
symbol's. Both fit in the gap before the next FFT burst.

### Equalisation, removal, decisions

- **Equalisation.** `zf_equalizer` computes x = y·conj(h)·2048/|h|², so x is back in
  transmit constellation units. It uses two pipelined restoring dividers (`pipe_div`),
  one for each rail. The quotient saturates at 32767 and h = 0 gives 0. Latency is 17
  clocks.
- **Removal.** `pilot_dc_removal` drops the guards, DC and pilots. It classifies each
  carrier again from its number and its symbol's number, and raises `mismatch` if the
  tag that came with the carrier disagrees.
- **Decisions.** `qam_demapper` makes hard decisions: thresholds at 0, and for 16-QAM
  at ±2048.

### Receiver outputs

| Output | Meaning |
|---|---|
| `rx_bits`, `rx_bits_valid`, `rx_bits_sym` | Decoded bits, 2 or 4 per carrier, first bit in bit 0, in carrier order; and the symbol number |
| `rx_eq_sym` | Equalised constellation point |
| `rx_peak`, `rx_cfo_angle` | Synchroniser peak and CFO angle, for observation |
| `rx_frame_active`, `rx_holdoff` | Frame-forwarding state |
| `rx_fifo_overflow` | Sticky FIFO overflow |
| `rx_class_mismatch` | Carrier classification mismatch |

The receiver's modulation input `rx_mod16` must match the transmitter's. Nothing in
the frame signals it.

## Where this design follows the published one and where it chooses

**Follows.** These come from the published design:

- the chain of blocks and their order;
- N = 1024, CP = 256;
- 12-symbol frames with a ZC training symbol in front;
- pilots in the 1st, 5th and 9th symbols, 6 carriers apart, including both edge carriers;
- 208-carrier guards and a nulled DC;
- ×4 up- and down-conversion with SRRC and half-band filters;
- DDS mixing to a 15 MHz IF at 61.44 MHz;
- the van de Beek estimator, with ρ = 1, the difference metric and a CORDIC for
  magnitude and angle;
- peak detection at the first rising metric below a threshold, with the frame start
  moved 3 samples into the prefix;
- the angle used only at the peak;
- a constant delay before the FIFOs, with the FIFOs read four times faster than they
  are written;
- CFO correction by a CORDIC rotation with the angle divided by N and accumulated;
- the LS estimate on pilots, linear interpolation in frequency, and a hold until the
  next pilot symbol;
- zero forcing;
- pilot and DC removal.

**Own choices.** These are not specified by the published design:

- the source generator and the mapping details;
- the ZC length and root;
- the pilot values;
- the threshold and energy floor;
- the burst FFT architecture and its scaling (the original used a vendor core);
- filter lengths and taps;
- all word widths;
- the forwarding hold-off;
- not forwarding the training symbol;
- a single FIFO;
- the replay-based channel-estimator schedule;
- the divider-based equaliser.

The sum limits of the energy and correlation terms are taken as exactly one prefix
length (L = 256 terms).

**Not built.** These are outside the design or not part of it:

- the ADC/DAC card, which is the IF ports here;
- the host co-simulation and logic-analyser setup;
- 64-QAM, which was only named as a possible extension;
- run-time changes of N, CP or symbols per frame, which are elaboration parameters here.

The published bit-error-rate measurements (QPSK against SNR) are not reproduced by
the testbenches. See the SNR floor above for what the default threshold allows.

## Verification

Every block has a self-checking testbench in `tb/`. Each compares the block against
values worked out independently inside the testbench, for example:

- floating-point filters, DFTs and rotations;
- separate recurrences for PRBS-23 and PRBS-9;
- an independent carrier map.

Each testbench prints `TB_RESULT checks=… failures=…` and has a watchdog.

Cycle counts are checked where the design fixes them:

- CORDIC latency 18;
- FFT schedule 4608 clocks;
- symbol period 5120 clocks;
- frame period 66560 clocks;
- synchroniser peak latency;
- forwarding latency 41;
- channel-estimator replay start;
- equaliser latency 17.

| Testbench | What it runs |
|---|---|
| `tb_ofdm_transceiver` | The whole design at its defaults: three frames over a channel with delay, gain 7/8, noise and a 6 kHz oscillator offset (ε = 0.4). The first frame is QPSK, then 16-QAM. All bits must match a model of the source. The CFO estimate must be within 0.02 of ε, and frames must be found one frame period apart. Frame detections, CFO estimates, pilot and hold symbols, both modulations and the hold-off must all occur. About 210k clocks. |
| `tb_ofdm_rx` | Transmitter into receiver through a two-path echo channel (frequency-selective, inside the prefix). Error-free bits, every equalised point within 512 of its ideal position, frame completions 66560 clocks apart. |
| `tb_ofdm_tx` | Two frames checked by DFT in the testbench: the prefix equals the symbol end, the ZC sequence, the pilots, the data bits, the null carriers, and the symbol and frame timing. |
| `tb_beek_sync`, `tb_data_forward`, `tb_cfo_correct`, `tb_ls_chest`, `tb_zf_equalizer`, `tb_pilot_dc_removal` | Receiver blocks on their own. |
| `tb_fft`, `tb_cp_insert`, `tb_tx_frame_assembly`, `tb_zc_gen`, `tb_prbs_source`, `tb_qam_mapper`, `tb_qam_demapper`, `tb_cordic`, `tb_duc`, `tb_ddc`, `tb_tx_mixer_dds`, `tb_rx_mixer_dds` | Transmitter and shared blocks. |

In the full-size run, both QPSK and 16-QAM are decoded with zero bit errors. The
estimated ε is −0.4000 ± 0.0003, where the sign is the receiver's view of the offset.

### Running a testbench with Verilator

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/ofdm_pkg.sv tb/tb_ofdm_transceiver.sv \
          --top-module tb_ofdm_transceiver -j 8
./obj_dir/Vtb_ofdm_transceiver
```

Replace the testbench name for any other block. The full transceiver test takes a few
seconds of simulation after a build of about a minute.

## Changing the design

- **Frame layout.** `NFFT`, `NCP`, `GUARD`, `PSPACE`, `NSYM` and `PPERIOD` in `ofdm_pkg`
  define it. The blocks take `N`, `CP` and `NSYMS` as parameters; for a consistent
  change, edit both. A different number of loaded carriers also changes the ZC length
  (`zc_gen.NZC`, best kept prime).
- **IF.** The carrier frequency is a run-time input (`tx_fcw`, `rx_fcw`).
- **Detection sensitivity.** `beek_sync.TH_SHIFT` trades detection at low SNR against
  timing accuracy (see the synchroniser section). `EFLOOR` sets the energy below which
  nothing is detected.
- **Pilot sequence.** A different pilot sequence needs the same change in
  `tx_frame_assembly` and `ls_chest`. Both use `pilot_prbs_step`.
