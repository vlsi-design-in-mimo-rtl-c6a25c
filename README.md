# MIMO-OFDM wireless LAN baseband in SystemVerilog

This is the digital baseband of an IEEE 802.11a-style MIMO-OFDM transceiver
with four antennas. The chip receives four real IF streams from four ADCs
and does the following:
- sets the gain of each antenna;
- brings the streams to complex baseband;
- finds the start of a frame;
- estimates and removes the carrier frequency offset;
- strips the cyclic prefixes;
- transforms every antenna's symbol with one shared 64-point FFT;
- estimates the channel matrix of every tone;
- separates two spatially multiplexed data streams, tone by tone, with
  either a zero-forcing detector or an MMSE V-BLAST detector, selected at
  run time.

In the other direction, it maps bits to QAM and runs the same FFT as an
IFFT. It then adds cyclic prefixes and up-converts each stream to the IF
for a DAC. Everything runs from one 80 MHz clock and is configured over
an AMBA APB port.

The main idea is time sharing. At 80 MHz there are 320 clocks in one
802.11a OFDM symbol (4 µs, 80 samples at 20 MS/s). Four antennas × 64 FFT
points is 256 samples, so the four antennas can take turns on a single
datapath running at one sample per clock. Five units use this trick: the
FFT (one radix-4 butterfly), the frequency-offset estimator (six real
multipliers), the frequency-offset corrector (one complex multiplier),
the CP remover/frame buffer and the detector.

## Block overview

```
 adc[0..3] -> agc -> ddc --\                               /-> chan_est (H per tone)
 (80 MHz IF)   (x4)   (x4)  serialiser -> foc -> ofdm_framer -> fft64_r4 -+
                              |  1 sample/clk, antenna tag                 \-> data_fifo -> mimo_detector -> det_s
                              +-> foe --(periodic, dphi)--> fsd                       or mmse_vblast
 tx_bits -> qam_mapper -> fft64_r4 (inverse) -> cp_insert (x2) -> duc (x2) -> dac[0..1]
 APB -> apb_regs (mode, thresholds, frame length, status)
```

| File | Role |
|------|------|
| `rtl/mimo_pkg.sv` | shared widths, complex type, Q15 multiply and saturation helpers |
| `rtl/mimo_ofdm_top.sv` | top level: receive chain, transmit chain, sequencing |
| `rtl/agc.sv` | two-stage (analog code + digital shift) gain control per antenna, power-rise detect |
| `rtl/ddc.sv`, `rtl/duc.sv` | fs/4 digital down/up conversion, 80 MHz ↔ 20 MS/s |
| `rtl/foe.sv`, `rtl/cordic_vec.sv` | Schmidl-Cox offset estimator and its angle CORDIC |
| `rtl/foc.sv` | phase-accumulator frequency-offset corrector |
| `rtl/fsd.sv` | frame start detection |
| `rtl/ofdm_framer.sv` | CP removal, ping-pong symbol buffer, stream to the FFT |
| `rtl/fft64_r4.sv` | 64-point single-butterfly radix-4 FFT/IFFT |
| `rtl/qam_mapper.sv`, `rtl/cp_insert.sv` | transmit mapping and CP insertion |
| `rtl/chan_est.sv` | per-tone 2×2 channel estimate and channel memory |
| `rtl/zf_inverse.sv`, `rtl/mimo_detector.sv` | 2×2 zero-forcing preprocessing and detection |
| `rtl/mmse_vblast.sv` | 2×2 MMSE V-BLAST preprocessing and detection |
| `rtl/data_fifo.sv` | FIFO that holds data while the detector preprocesses |
| `rtl/apb_regs.sv` | APB register file |

## Receive timeline

A frame goes through these phases:

1. **Idle.** Each AGC watches the mean magnitude of its antenna over
   32-sample windows. It learns a noise floor and pulses `pwr_rise` when a
   window is four times above it. The floor drops at once but rises only
   by 1/8 per window, so the leading edge of a frame cannot hide the
   rise.
2. **Acquisition.** Frame start (`frame_start`) needs two things in the
   same 512-clock window:
   - power rises on at least three of the four antennas;
   - the FOE reporting a periodic signal, meaning the lag-16 correlation
     is large compared with the energy.

   The FOE's latest phase increment is then frozen for the corrector.
   Meanwhile the AGCs settle:
   - four windows steer the analog gain code `again`;
   - one more window picks a power-of-two digital gain;
   - 256 clocks (3.2 µs) after the power rise, both gains freeze.

   An antenna that saw no rise of its own starts the same acquisition
   at frame start.
3. **Training.** Symbol framing (`sym_sync`) starts with the first sample
   period after all four AGCs have locked. The transmitter therefore has
   to start its first training symbol at that point. The first two
   symbols are training symbols. In each, one transmit antenna sends the
   802.11a long training sequence alone. `chan_est` stores
   H(:,j) = Y·L for every tone, which needs no division because L is ±1.
4. **Preprocessing.** When the FFT has delivered the second training
   symbol, the selected detector reads the 64 channel matrices, one per
   clock, and stores what it needs per tone:
   - ZF inverts each matrix in an 8-stage pipeline; the first G is
     written 11 clocks after the start, and all 64 tones take 74 clocks;
   - MMSE V-BLAST runs a 10-stage pipeline; the first tone is written
     after 13 clocks and all 64 after 76 (see below).

   Data symbols that arrive meanwhile wait in `data_fifo`.
5. **Detection.** The detector drains the FIFO and outputs the two
   stream estimates per tone on `det_s`, in Q3.12. For ZF this is
   s = G·(y0, y1). The sample of antenna 0 is parked in a per-tone buffer
   until the antenna-1 sample of the same tone arrives.
6. **End.** The framer stops after 2 + NDATA symbols (register `NDATA`).
   The frame ends once the FFT has delivered the last symbol. The AGCs
   then return to idle tracking.

## The shared FFT

`fft64_r4` is a radix-4 decimation-in-frequency FFT:
- it has 3 stages of 16 butterflies, with one butterfly per clock, so a
  transform takes 48 clocks;
- each stage scales by 1/4, so the forward result is DFT/64 and cannot
  overflow;
- the inverse conjugates the input and the output.

Three banks rotate between three roles:
- *load*: 64 samples in natural order;
- *compute*: 48 clocks;
- *unload*: 64 samples in digit-reversed order, each tagged with its tone
  index and antenna.

Blocks can therefore stream back to back at one sample per clock. The
consumers (channel memory, FIFO, detector, CP inserter) all address by
the tone tag, so the outputs are never reordered. Twiddles are computed
at elaboration as round(32767·e^(−j2πe/64)).

## Offset estimation and correction

The estimator forms conj(x[n−16])·x[n] and |x[n]|² for every sample of
every antenna, with six real multipliers in total. Each antenna's terms
are shifted right by 2·dshift, which undoes that antenna's digital AGC
gain before the four antennas are summed. That is why the digital gain is
restricted to powers of two. After a window of 16 sample periods, a
16-iteration CORDIC gives the magnitude and angle of the sum:
- `periodic` is the test |P| > thr/256 · R;
- the phase increment is angle/16, in units of 2^16 per turn.

The corrector keeps a phase accumulator that advances once per sample
period. It rotates all four antennas' samples of that period with one
complex multiplier and a 256-entry sine/cosine table.

## MMSE V-BLAST detector

V-BLAST detects the more reliable stream first, subtracts its
contribution, and then detects the other stream from the cleaned signal.
With two streams the recursion is unrolled. Everything that depends only
on the channel is computed once per tone during preprocessing (H has
columns h1 and h2; σ² is the NOISE register):

- G1 = (HᴴH + σ²I)⁻¹Hᴴ, the joint MMSE filter. A = HᴴH + σ²I is
  Hermitian, so its determinant is real and the inverse is
  adj(A)/det(A);
- G2a = h2ᴴ/(|h2|² + σ²) and G2b = h1ᴴ/(|h1|² + σ²), the single-stream
  filters used after one stream has been cancelled;
- k, the row of G1 with the smaller norm, which is the stream to trust
  first.

Detection then takes three clocks per tone, and both orders are
computed in parallel:

1. ya = (G1 row 1)·r and yb = (G1 row 2)·r;
2. slice each to the nearest constellation point (QAM order from
   TX_MOD), then cancel: ra = r − Q[ya]·h1 and rb = r − Q[yb]·h2;
3. ya' = G2a·ra (stream 2 with stream 1 removed) and yb' = G2b·rb.

The output is (ya, ya') when k picks stream 1, and (yb', yb) otherwise.
The outputs are soft MMSE estimates, so with a large σ² they are pulled
towards zero.

σ² is in units of 2⁻³⁰ of |h|² as the channel estimate sees it. The
channel estimates come from FFT outputs scaled by 1/64, so σ² should be
small. The default of 1024 suits a clean link.

## Transmit path

Set CTRL.tx_mode = 1. The interface then works as follows:
- `tx_bits`/`tx_valid`/`tx_ready` accept one group of up to 6 bits per
  used tone, for the modulation in TX_MOD (BPSK/QPSK/16/64-QAM, 802.11a
  Gray map);
- each stream fills 52 used tones (no pilots) and runs through the FFT
  in inverse mode;
- `cp_insert` of each stream holds the 64 time samples and sends
  16 + 64 of them on a common 20 MS/s strobe;
- the DUC holds each sample for four clocks and mixes it to the 20 MHz
  IF.

The IFFT result (1/64 scaled) is multiplied by 16 for the DAC.

## Register map (APB, zero wait states)

| Addr | Name | Bits |
|------|------|------|
| 0x00 | CTRL | [0] tx_mode, [1] enable, [2] clear status (self-clearing), [3] detector: 0 ZF, 1 MMSE V-BLAST |
| 0x04 | AGC_REF | [11:0] target mean magnitude |
| 0x08 | FSD_THR | [7:0] periodicity threshold |
| 0x0C | TX_MOD | [1:0] 0 BPSK, 1 QPSK, 2 16-QAM, 3 64-QAM (mapper and V-BLAST slicer) |
| 0x10 | STATUS | [0] in frame, [1] overflow (sticky), [15:8] symbols received |
| 0x14 | FOE | [15:0] frozen phase increment per sample |
| 0x18 | NDATA | [7:0] data symbols per frame (default 4) |
| 0x1C | NOISE | [31:0] noise variance σ² for the MMSE filters (default 1024) |

## Where this design departs from the source architecture

- **Two streams, four antennas.** The architecture is a 4×4 system, but
  its detector is worked out only for 2×2. The 4×4 detector rests on a QR
  decomposition whose algorithm is not given. The four-antenna front end
  (AGC, DDC, FOE, FSD, framer, FFT) is complete. Antennas 2 and 3 stop
  at the FFT: the detector uses receive antennas 0 and 1, and two streams
  are transmitted.
- **Not included:** the soft demapper, Viterbi decoder, scrambler,
  interleaver, pilots and PLCP header. The detector output is the
  equalised constellation point.
- **The ZF pipeline (8 stages, 11 cycles) and the MMSE V-BLAST latency
  (13 cycles) match the source.** Both fit well inside the 64-clock guard
  interval. The following are this design's:
  - the number formats (H Q1.15, G Q11.12);
  - the use of plain integer dividers;
  - the V-BLAST output ordering.

  The source quotes multiplier counts: 8 real and 11 complex for ZF, and
  16 real and 27 complex for V-BLAST. Here the operator count is left to
  synthesis.
- **Where σ² comes from** is this design's choice: a register. The
  design does not estimate the noise itself.
- **This design's own choices** are listed in each file's header. They
  include:
  - the AGC's window length, step sizes and power-of-two digital gain;
  - the DDC filter ([−1 0 9 16 9 0 −1]/16) and the DUC's sample-and-hold;
  - the training format and symbol timing (framing starts when the AGCs
    lock);
  - the FSD window;
  - the FIFO depth (256);
  - the register map;
  - the forced AGC start at frame start.

## Verification

Each block has a self-checking testbench in `tb/`. It compares the block
with an independent model: a floating-point DFT, complex arithmetic in
`real`, or bit-exact reference sequences. Each testbench ends with a
`TB_RESULT checks=N failures=M` line. The FFT, ZF, AGC and detector
testbenches also check cycle counts:
- 48 compute clocks;
- the 8-stage pipeline;
- 256-clock AGC settling;
- 11-clock preprocessing latency.

`tb/tb_mmse_vblast.sv` compares the V-BLAST detector with a
floating-point model of the same procedure on noisy 16-QAM. It checks
that both detection orders occur and that every hard decision is right.

`tb/tb_mimo_ofdm_top.sv` runs the whole chip at its default parameters:
- it models a 4×2 channel with a frequency offset, analog gain, 12-bit
  ADCs and noise;
- it receives two frames, the first with ZF and the second with MMSE
  V-BLAST; each frame has a short preamble, two training symbols and two
  QPSK data symbols;
- it checks every detected symbol, the offset estimate and the status
  register;
- it then switches to transmit and compares the DAC samples with a
  floating-point IDFT of the mapped bits.

It also counts each mechanism and fails if one never happens: power rise,
analog and digital gain steps, frame start, symbol sync, FFT and IFFT
blocks, training writes, preprocessing, FIFO bridging, detection, frame
end, CP output, offset correction and V-BLAST preprocessing.

Simulating with Verilator 5, for example the top:

```
verilator --binary --timing -Wno-fatal -Irtl --top-module tb_mimo_ofdm_top \
    rtl/mimo_pkg.sv rtl/*.sv tb/tb_mimo_ofdm_top.sv -o sim
./obj_dir/sim
```

Any block works the same way with its own testbench. The whole-chip run
takes a few seconds.
