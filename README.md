# Tile signal processing for a low-frequency aperture-array station

This RTL models the signal processing of one *Tile Processing Module* (TPM):
a board that digitises 16 dual-polarisation antennas at 800 MS/s, splits each
signal into 512 oversampled frequency channels, forms partial station beams,
and sends those beams along a daisy chain of tiles. The last tile of the chain
holds the whole station beam. It packs the beam into frames for the correlator
and beamformer downstream, the "CSP", with a SPEAD header on each frame.

The real board has two FPGAs. Each takes 8 antennas, at 4 samples per clock on a 200 MHz clock.
`tpm_top` holds both FPGA chains in one module with a single clock.

## Signal chain

```
ADC lanes ─► adc_framer ─► cable_delay ─► channelizer (per antenna, ×2 pol) ─► tile_beamformer ─┐
 PPS ─► pps_sampler ┘                                  │                                         │
                                                     ├─► coarse_spectrometer                   │
                     total_power ◄── framed samples    └─► channel_capture                        │
                                                                                                  ▼
 chain in ─► station_beam_adder ◄── axis_packet_mux ◄── corner_turner (FPGA 0, FPGA 1) ◄── even/odd split
                    │
                    ├─ not last tile ─► chain out
                    └─ last tile ───► csp_packer ─► spead_formatter ─► CSP out
```

The modules share one package, `rtl/lfaa_pkg.sv`, which holds the sizes, the SPEAD constants and two
rounding and saturation helpers. `rtl/lfaa_trig.svh` holds integer sine and cosine macros.
The macros fill the coefficient and twiddle ROMs at elaboration.

## Time keeping

Everything is timed in frames of 864 samples. A frame is 216 clocks or 1080 ns.

- `pps_sampler` receives the PPS already sampled at 4 phases per clock. It finds the phase where the
  edge falls, and from then on uses the phase half a clock away. Clock jitter near the edge therefore
  cannot move the detected second by one clock.
- `adc_framer` waits for `arm`. It then starts frame 0 on the first valid beat at or after a PPS rising edge.
  - `sync_time` counts seconds. It can be loaded from a port and increments on each PPS.
  - `start_time` takes a copy of `sync_time` when framing starts.
  - `time_stamp` advances 1080 ns per frame.
- No timestamp travels with the data up to the beamformer. A packet's time is computed from its frame
  number as `frame × 1080 ns + 7560 ns`. The 7560 ns is the filter preload (7 frames).
  Each SPEAD header carries this time in ns, together with `start_time`.

## Channelizer: the hard part

A critically sampled filter bank leaves gaps at the channel edges. This one is oversampled by 32/27:
every frame of M = 864 new samples produces a transform of N = 1024 points. Each of the 512 channels
therefore sits 781.25 kHz from its neighbour but is 925.9 kHz wide, so neighbouring channels overlap.

`wola_filter` (weight, overlap, add) forms each output point as a sum over 14 taps.
Each tap multiplies the prototype filter by input samples spaced N apart:

    y[n] = Σ_k h[kN + n] · x[s0 + kN + n],   n = 0..N-1

How it is built:

- The input history is stored in 16 banks of N samples each. The 14 samples needed for one
  output sit at the same address in 14 different banks, so each output point takes one read per bank.
- The frame advances by M while the transform is N long. This gives each channel a phase that
  rotates from frame to frame.
- The filter removes that rotation by emitting the frame cyclically rotated by `s0 mod N` before the FFT.
  After this, channel phases refer to absolute sample time, which the beamformer's delay model needs.

`fft_real` computes the 1024-point transform of a real frame:

1. The 1024 real samples are packed as 512 complex points.
2. A 512-point radix-2 decimation-in-frequency FFT runs in place in one memory.
3. A separation stage recovers the 512 real-signal channels.

Stages scale by one bit as set by `OSHIFT`. A saturated channel raises its overflow flag. This can
happen with strong narrow-band interference, not with noise.

**The prototype filter is not the original.** The original is a designed equiripple filter whose
coefficients are not available. The ROM is filled at elaboration with a Blackman-windowed sinc of
the same length (14 × 1024), cut off at half a channel spacing. To use a real coefficient set, replace
the `initial` block in `wola_filter.sv`.

**Throughput is below real time.** The filter makes 4 outputs per clock, so 256 clocks per frame.
The FFT uses a single butterfly, about 3N clocks per frame. The input frame period is 216 clocks.
The channelizer drops frames that arrive while it is busy and counts them. A real-time version needs
a pipelined FFT with one stage per radix-2 level, and 5 output lanes in the filter (or a faster clock).

## Beamforming

`tile_beamformer` works from a table of 384 slots. Each slot names one channel and one of 8 beams.
The 16 sub-bands are ranges of channels that fill this table.

For each slot and antenna, `antenna_calib` does the following:

1. It scales the 18-bit channel sample by the 3-bit exponent of the calibration matrix, and rounds to 12 bits.
2. It rotates the sample by the geometric delay phase from `delay_phase_gen`. The phase has 4096 steps per turn.
   The delay is a start value plus a rate, updated every 1024 channel samples.
3. It multiplies the two polarisations by the 2×2 complex Jones matrix, with 16+16-bit mantissas.
4. It rounds the result to 8+8 bits.

The FPGA's antennas are summed in 16 bits.

The two FPGAs split the work by channel. FPGA 0 completes the even channel groups and FPGA 1 the odd
ones. Each feeds its own `corner_turner`, which reorders the samples from "all slots at one time" into
packets of 128 times × 8 channels. `axis_packet_mux` merges the two packet streams. It keeps
each run of 16 packets from one source together, so that a CSP frame is never interleaved with another.

## Station chain and CSP output

`station_beam_adder` adds the local packet to the packet arriving from the previous tile, with 16-bit saturation.

- It checks that the channel and time in the two headers agree, and raises `align_err` if they do not.
- In the first tile it only forwards the local packet.

In the last tile:

- `csp_packer` collects 16 packets into one frame of 2048 time samples for one channel.
  - It requantises each 16-bit sum to 8+8 bits with a programmable shift.
  - Byte order within a sample, from the low byte up: H imaginary, H real, V imaginary, V real.
  - It has two frame buffers. When both are busy it holds the input back and counts a stall.
- `spead_formatter` writes a 72-byte SPEAD-64-48 header. The first word is `0x5304020600000008`.
  The eight items that follow are:
  - heap counter
  - packet length
  - reference time
  - timestamp
  - centre frequency (781.25 kHz × channel)
  - beam and physical channel
  - sub-array, station and number of antennas
  - the offset of the sample vector

  The header and the payload then leave as a 64-bit AXI4-Stream.
- `spead_receiver` is the counterpart between FPGAs and tiles. It parses the header, brings the fields
  out as signals, and drops packets whose header is malformed.

## Diagnostics

| block | what it gives |
|---|---|
| `total_power` | sum of squares of each ADC input over a programmable number of frames |
| `coarse_spectrometer` | auto- or cross-power per channel of two selected signals, 32-bit saturating |
| `channel_capture` | one selected channel for all 16 signals, 8+8 bit, in blocks of 128 samples, double buffered |

## Where this departs from the original design

- Not real time (see the channelizer section). All other blocks keep up with one beat per clock.
- The corner turner holds 2048 time samples in on-chip memory. The original uses an external memory
  bank with blocks of about 0.23 s.
- One clock domain is used. The SPEAD FIFOs do not cross clock domains.
- Only the CSP header type is generated.
- Calibration tables take effect when written. There is no timed switch between table sets.
- Some external parts are not included:
  - the ADC JESD204B links
  - the clock chips
  - the 40 GbE MACs
  - the external memory
  - the control bus

  Their signals are ports of `tpm_top`: aligned ADC lanes, PPS phases, chain and CSP streams, and configuration inputs.
- Own choices where the original gives no detail:
  - counter widths
  - rounding (half up, with saturation)
  - the number of PPS phases (4)
  - the FIFO depths
  - the error and overflow counters

  Each is noted in the header comment of the file concerned.
- The original description gives two lengths for chain packets, 256 and 128 time samples. 128 is used, since
  16 × 128 = 2048 matches the CSP frame.

## Simulating

Each block has a self-checking testbench, `tb/tb_<block>.sv`. Each one prints one
`TB_RESULT` line with the number of checks and failures. Example with Verilator 5:

```
verilator --binary --timing -Irtl rtl/lfaa_pkg.sv rtl/total_power.sv tb/tb_total_power.sv \
          --top-module tb_total_power -o sim
./obj_dir/sim
```

The ROM-filling `initial` blocks need the include path `-Irtl`. `-Irtl` also lets Verilator find
sub-modules such as `axis_fifo` on its own. `tb_tpm_top` is built the same way, with all files in `rtl/`.

The testbenches use reduced sizes so that they finish in minutes. The largest simulated configuration is
`tb_tpm_top`:

- 2 antennas per FPGA
- N = 64, M = 48, 4 taps
- 16 beam slots
- chain packets of 4 times × 2 channels
- CSP frames of 8 times
- FFT scaling off

It drives a tone into one channel plus a full-scale burst that forces an overflow. It runs the tile
first as the last tile of a chain, then as the first tile. It checks every SPEAD field, the tone's
channel, and about 24,000 values in total.

No simulation at the full default size (16 antennas, 1024-point channelizer, 384 slots) has been run.
At that size one CSP frame needs 2048 frames of 32 signals through the 1024-point filter bank.
With the slow FFT that is tens of millions of clocks of a very large design, far beyond a practical
run time. The full-size design is checked by Verilator lint and Yosys elaboration only.
