# FBMC/OQAM baseband transceiver in SystemVerilog

Filter-bank multicarrier with offset QAM (FBMC/OQAM) replaces the cyclic prefix
of OFDM with a well-localised prototype filter on every sub-carrier. The price
is that sub-carriers are orthogonal only in the real domain: each complex QAM
symbol is split into a real and an imaginary part sent half a symbol apart, and
every received value picks up imaginary "intrinsic interference" from its
time/frequency neighbours. This RTL implements a complete FBMC/OQAM
transmitter and receiver at the base-band sample rate, including the three
pieces that make such a link work in practice: pre-coded reference signals
(so the receiver can estimate the channel despite the intrinsic interference),
Zadoff-Chu based frame synchronisation, and a zero-forcing channel equaliser.

The numbers are those of an LTE-like 5 MHz carrier:

| quantity | value |
|---|---|
| (I)FFT size M | 256 |
| sub-carriers in the grid / active | 144 / 137 (k = 3..139) |
| symbols per frame | 16 (symbol 0 is the sync symbol) |
| base-band sample rate | 3.84 MHz |
| clock | 30.72 MHz, i.e. 8 clocks per base-band sample (OSR) |
| prototype filter | PHYDYAS, overlap K = 4, 1024 taps, 16-bit Q15 |
| reference signals | every 8th sub-carrier (k = 3, 11, ..., 139) in every 4th symbol (l = 1, 5, 9, 13) |
| constellations | LTE 4-, 16- and 64-QAM, selected at run time |

All complex samples are `cplx_t` (16-bit real, 16-bit imaginary) from
`rtl/fbmc_pkg.sv`; QAM symbols use 1.0 = 8192. Every block accepts one sample
or resource element per 8 clocks, so the whole chain runs in real time at the
30.72 MHz clock.

## Signal chain

```
payload_rom -> qam_mapper -> resource_grid_gen -> rs_precoder -> oqam_mapper
   -> fft (inverse, real branch) + fft (inverse, imaginary branch) -> tx_filter_bank
   -> [TX base-band out]                     [RX base-band in]
   -> time_sync (4 x correlation_unit + peak_detector)
   -> rx_filter_bank -> fft (real) + fft (imaginary) -> oqam_demapper
   -> channel_equalizer -> payload_sink (soft/hard bits, bit-error count)
```

`rtl/fbmc_top.sv` wires the chain. The transmit output (`tx_valid`,
`tx_sample`) and receive input (`rx_valid`, `rx_sample`) are base-band streams
at 3.84 MHz; the digital up- and down-converters and the converters
themselves are not part of this RTL. Counters on the top (`bit_count`,
`bit_errors`, `payload_symbols`) and event strobes (`tx_frame_start`,
`rs_precoded`, `sync_strobe`, `est_update`, `eq_valid`) make the link
observable.

### Resource grid and payload

`resource_grid_gen` emits each symbol as 144 elements, one every 8 clocks, in
a burst started by `sym_start`. Symbol 0 holds a length-62 Zadoff-Chu sequence
(root 25, scaled by 1/4) placed twice, once in each Nyquist zone of the
M/4-decimated spectrum, so that the receiver can correlate on a quarter-rate
signal: entry n (0..61) goes to k = n + 41, and its mirror image to
k = 40 - n (n = 0..30) or k = 165 - n (n = 31..61). Reference signals carry 1.0; the remaining
active elements take payload symbols from `qam_mapper`, which reads a 6-bit
word per element from `payload_rom` (a 16-bit LFSR, x^16+x^14+x^13+x^11+1,
seed 0xACE1, 2048 words). A frame carries 15 x 137 - 72 = 1983 payload
elements. The sink reads the same ROM to count errors.

### Reference-signal pre-coding (`rs_precoder`)

This is the least obvious block. After the receiver's filter bank, a
reference value r arrives as r plus a sum of neighbours times fixed complex
coefficients (the filter's ambiguity function sampled at the neighbour
positions). The transmitter knows the neighbours, so it sends
`r - sum(c_i * neighbour_i)` instead, and the receiver sees a clean r (times
the channel). The block keeps a shift register of 4 symbols + 3 elements of
the grid; when the element in the centre is a reference signal, four real
multiplier-accumulators run over its 3 x 5 neighbourhood (sub-carriers k-1..k+1,
symbols l-2..l+2) and push the correction to a FIFO, which is read when the
reference leaves the shift register. Real and imaginary parts of each
neighbour have separate complex coefficients, because in OQAM they are sent
half a symbol apart and interfere differently.

The coefficient table `rtl/precoder_coef.hex` holds 30 Q15 values
(15 positions x (re, im) for the real-part and the imaginary-part
neighbour). They are the response of this design's own modulator/demodulator
pair (PHYDYAS K=4 and the phase convention below) to a unit real and a unit
imaginary element at each neighbour offset, read at the reference position.
If the prototype or the OQAM phase convention is changed, this table must be
recomputed the same way.

### OQAM modulation (`oqam_mapper`, `fft`, `tx_filter_bank`)

`oqam_mapper` places sub-carrier k on IFFT bin k - 72 (mod 256), so bins
1..72 carry k = 72..143 and bins 185..255 carry k = 1..71, and multiplies the
real part by j^m (-1)^l and the imaginary part by j^(m+1) (-1)^l. It buffers
one symbol and bursts the 256 bins of both branches to two IFFTs.

`fft` is a 256-point radix-2 decimation-in-time engine with one butterfly per
clock and two banks: one loads while the other transforms. A transform takes
N/2 log2 N = 1024 clocks, far less than the 2048 clocks between symbols. It
uses Q15 twiddles from `rtl/twiddle_256.hex` (cos/sin(2 pi i / 256)), an
internal width of 26 bits and a final right shift (5 for the IFFTs, 3 for the
FFTs) with saturation to 16 bits.

`tx_filter_bank` is the polyphase synthesis bank. Each IFFT output block is
written into a circular RAM of 8 blocks (2048 entries per branch); every
output sample m of symbol slot n is
`sum_k RAM[n-k][m mod 256] * h[m + 256 k]` over the blocks that overlap it,
computed one tap per clock, 8 clocks per sample. The prototype LUT
(`rtl/phydyas_k4_m256.hex`, 1024 PHYDYAS coefficients from
H1 = 0.971960, H2 = 1/sqrt(2), H3 = 0.235147, normalised to peak 1) is
addressed with an offset of M/2 for the imaginary branch, which implements the
half-symbol OQAM delay without extra shift registers. IFFT outputs enter
through a FIFO per branch (256 deep). The block clears its RAMs after reset
and reports `ready`; the top starts generating symbols only then, and from then
on every 2048 clocks.

### Frame synchronisation (`time_sync`, `correlation_unit`, `peak_detector`)

The receiver correlates the incoming stream decimated by 4 against the
96-sample time-domain image of the sync symbol (`rtl/sync_ref96.hex`,
conjugated, Q15; generated with a single-tap prototype, which keeps it short
but only approximates the real transmitted waveform). Four correlation units,
one per decimation phase, each use 3 complex multipliers over 32 clocks and
produce one squared magnitude per 4 samples; a multiplexer interleaves them
into one power value per base-band sample (`corr_valid`, every 8 clocks).

`peak_detector` compares each power with 16 times a moving average over the
last 256 values, follows the peak while the power keeps rising and fires one
sample after the maximum, then holds off for 256 samples. The sync strobe
restarts the receiver's frame position and the payload sink's ROM pointer.

The decimated correlation peak is broad: in a noise-free loop-back the strobe
lands on the same sample for 4- and 16-QAM payloads but one sample earlier for
64-QAM. One sample of timing error destroys OQAM orthogonality (see below), so
64-QAM frames are not decoded in that test.

### OQAM demodulation (`rx_filter_bank`, `fft`, `oqam_demapper`)

`rx_filter_bank` writes each input sample into a 2048-entry circular RAM and,
in the 8 clocks before the next sample, filters it for both branches, one tap
per clock: `y[m] = sum_k RAM[wa + 256 (k+1)] * g[256 (7-k) + m]` (time-reversed
prototype; the imaginary branch uses the prototype shifted by M/2). A frame
position counter tags each output with its symbol l and filter m. On a sync
strobe it sets that counter to `SYNC_POS` and restarts the symbol count,
keeping the RAM contents. `SYNC_POS = 2951` in the top is the number of
samples between the start of the transmitted frame and the sample after the
strobe, as seen through the chain; the block windows are only correct if this
value is exact.

Two FFTs then feed `oqam_demapper`, which undoes the bin placement and the
j^(m+2l)-type phases and keeps the real part of each branch, re-forming one
complex element per sub-carrier (144 per symbol, one per 8 clocks).

### Channel estimation and equalisation (`channel_equalizer`)

When a reference signal arrives, its value (real and imaginary branches
already combined into one complex number) is held and its reciprocal is
computed with one division and four multiplications:
`1/(a+jb) = (a - jb) * (1/(a^2+b^2))`. The correction for the sub-carriers
between this reference and the previous one in the same symbol is filled in
by linear interpolation, 8 RAM writes, one per clock; sub-carriers above
the last reference keep its value. The 144-entry correction RAM (Q13) is used
for all data symbols until the next reference symbol updates it. Data
elements are delayed by 24 clocks (`DLY`) so that they meet the updated
correction, then multiplied by it. Latency is `DLY + 1` clocks.

### Payload sink (`payload_sink`)

Payload elements (every active element that is not a reference and not in
symbol 0) are turned into soft bits with the usual LTE max-log rules
(4-QAM: sign; 16-QAM: |x| - 2/sqrt(10); 64-QAM: |x| - 4/sqrt(42),
||x| - 4/sqrt(42)| - 2/sqrt(42)), sliced to hard bits and compared with the
payload ROM. `bit_count` and `bit_errors` accumulate across frames.

## Timing and latency

* One base-band sample or grid element per 8 clocks everywhere; the FFT
  engines and the filter-bank bursts run at the full clock rate inside that
  budget.
* A symbol is 256 samples = 2048 clocks; a frame is 4096 samples = 32768
  clocks.
* End-to-end latency, from the generation of element (k=0, l=0) to the same
  element leaving the equaliser: 29243 clocks (about 14.3 symbols), constant
  frame to frame. The pre-coder buffer accounts for 4 symbols + 3 elements,
  the filter-bank pair with its IFFT/FFT blocks for most of the rest.

## Where it differs from the published prototype

The design follows a published FPGA proof of concept of this link. Things
this RTL does differently, or had to decide because they were not specified:

* **Up/down conversion** (interpolation to the DAC rate with low-pass
  filtering; band-pass filtering and decimation of an ADC signal centred at
  one eighth of the ADC rate) is not implemented. The top
  exchanges base-band samples.
* **Latency**: the prototype reports 32100 clocks; this design measures 29243.
  Its pre-coder buffers 4 symbols + 3 elements where the prototype buffers 5
  symbols.
* **Pre-coder coefficients**, the Zadoff-Chu root (25), the placement of the
  first reference signal (k = 3, l = 1) and the sync reference waveform
  (single-tap approximation) are this design's own.
* **64-QAM soft-bit thresholds** use 4/sqrt(42) first and 2/sqrt(42) second, as
  the LTE constellation requires; the opposite order appears in the
  description that was followed.
* **Filter-bank LUT addressing** is `m + M k`; the description writes the
  stride as the overlap factor, which cannot address a 256 x 8 table.
* **Peak detector** constants (window 256, gain 16, hold-off 256) and the
  equaliser delay (24) are chosen here.
* **Transmit FIFOs**: one per branch here, four in the prototype.
* **Synchronisation jitter**: detection can move by one sample with the
  payload statistics (seen with 64-QAM), which is not tolerated by the
  receiver. A sharper correlator reference (the full prototype filter) or
  timing refinement after detection would be needed.

## Parameters worth knowing

| module | parameter | default | meaning |
|---|---|---|---|
| fbmc_top | SYNC_POS | 2951 | receiver frame position after the sync strobe |
| tx_filter_bank / rx_filter_bank | MM, TAPS | 256, 8 | polyphase length and RAM depth in symbols |
| tx_filter_bank | FIFO_D | 256 | input FIFO depth per branch |
| rs_precoder | FIFO_D | 32 | correction FIFO depth |
| fft | N, OUT_SHIFT | 256, 5 / 3 | size and output scaling |
| peak_detector / time_sync | W, GAIN_SH, HOLD | 256, 4, 256 | threshold window, gain 2^4, hold-off |
| channel_equalizer | DLY | 24 | data delay to meet the updated correction |

Changing M, the grid or the prototype means regenerating the `.hex` tables
(twiddles, prototype, ZC sequence, sync reference, pre-coder coefficients) by
the formulas above.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<n>`. From the project root (the `.hex` files are
read by paths relative to it):

```
verilator --binary --timing -Wno-fatal -Irtl rtl/fbmc_pkg.sv $(ls rtl/*.sv | grep -v fbmc_pkg) \
    tb/tb_fbmc_top.sv --top-module tb_fbmc_top
./obj_dir/Vtb_fbmc_top
```

Replace `tb_fbmc_top` by any other testbench in `tb/`; the package
`rtl/fbmc_pkg.sv` must come first.

| testbench | what it checks |
|---|---|
| tb_fbmc_top | full chain in loop-back, 16-QAM: every mechanism occurs, sync period 4096 samples, error-free frames after lock with exactly 7932 bits each, constant 29243-clock latency, one TX sample per 8 clocks, no FIFO overflow (about 15 frames) |
| tb_payload_rom | every word against the LFSR sequence; read latency |
| tb_qam_mapper | every bit pattern of every mode against the LTE levels |
| tb_resource_grid_gen | every element of two frames against independent grid rules, 8-clock spacing |
| tb_rs_precoder | each correction against a reference model; delay 4 x 144 + 3 elements |
| tb_oqam_mapper / tb_oqam_demapper | bin placement and branch phases against a real-arithmetic model |
| tb_fft | forward and inverse transforms against a direct DFT (6 LSB), back-to-back blocks, latency |
| tb_tx_filter_bank / tb_rx_filter_bank | every output against the polyphase sums in real arithmetic; output rate, FIFO overflow, frame position after a sync strobe |
| tb_correlation_unit | bit-exact correlation against a 64-bit model |
| tb_peak_detector | detection position, hold-off, reported peak |
| tb_time_sync | strobes at the sync pattern, exactly one frame apart; correlation rate |
| tb_channel_equalizer | equalisation of a sub-carrier-dependent channel, update count, latency |
| tb_payload_sink | error counting for 64-QAM and 16-QAM frames with injected sign errors |

The full-chain test runs about half a million clocks and takes under a minute.
The mode input of the top can be set to QAM4 in the testbench for a 4-QAM run;
QAM64 shows the synchronisation limitation described above.
