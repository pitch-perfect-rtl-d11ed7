# Real-time phase-vocoder pitch shifter

This is SystemVerilog for an FPGA pitch shifter. It takes live audio from a codec, raises or
lowers its pitch by a factor set from software, and plays the result back, all without changing
its speed. It targets a Cyclone V board with a Wolfson codec (DE1-SoC class) and Intel's
streaming FFT core, but every block here is plain synthesizable SystemVerilog. The vendor parts
are the FFT cores, the audio core and the processor, and their signals are ports of the top.

The method is the classic phase vocoder:

1. Cut the input into overlapping windows of 4096 samples, one new window every 1024 samples
   (the *hop*).
2. Taper each window with a Hann window and take its FFT.
3. In polar form, work out for each bin how far the tone it holds sits from the bin's centre. The
   phase advance since the previous window tells you this.
4. Move each bin's energy to the bin at (bin + deviation) × scale, and build phases that advance
   consistently at the new frequencies.
5. Inverse-FFT, taper again, and overlap-add the windows back into one stream.

At 48 kHz one hop is 21.3 ms. The hardware finishes a window in about 41,000 clocks, under 1 ms
at 50 MHz.

## Signal flow

Each stage owns its input and output buffers. A stage is started by the previous stage's
one-cycle `go` pulse and finishes with its own `go_out`.

```
 ADC ─► sampler ─► ring_buf (5120) ─► first_hannifier ─► pre_fft_buf
   (audio clock)                          ▲ hann_rom port A
 pre_fft_buf ─► ffter ◄─► FFT core ─► post_fft_real / post_fft_imag
 ─► cart_to_polar ─► pre_scaler mag/phase, pair 0 or pair 1 (ping-pong)
 ─► scaler (+ synth_mags, synth_devs) ─► post_scaler mag/phase, pair 0 or 1
 ─► polar_to_cart ─► pre_ifft_real / pre_ifft_imag
 ─► ffter #(.INVERSE(1)) ◄─► IFFT core ─► post_ifft_buf
 ─► stitcher ─► output ring (5120) ─► emitter ─► DAC   (audio clock)
                   ▲ hann_rom port B
 software_interface (Avalon-MM) ─► scale amount ─► scaler
```

`pitch_perfect_top` wires all of this together. Its `stage_done` output gives each stage's
finish pulse, which is handy on a logic analyser.

## Number formats

| Quantity | Format |
|---|---|
| Samples and buffer words | 16-bit signed Q8.8 |
| Phases | Q8.8 radians, always wrapped to [−π, π). π = 804, π/2 = 402, 2π = 1608 |
| Hann coefficients | Q0.16 unsigned: w[n] = ½(1 − cos 2πn/4096), clipped to 65535 |
| Scale amount | Q2.6 unsigned, 8 bits. 64 is unity, 128 is one octave up, 32 one octave down; the maximum is 255/64 ≈ 3.98 |
| Bin positions and deviations in the scaler | Q.8 (256 = one bin) |

Scaling through the chain:

| Stage | Scaling |
|---|---|
| First hannifier | x·w / 2^16 |
| FFT core | Expected to return X[k]/N |
| IFFT core | Expected to return the plain sum, so the pair is the identity |
| Stitcher | Adds x·w / 2^17, "half the windowed value" |

A periodic Hann window at 75 % overlap has Σ w = 2 and Σ w² = 1.5 across the four windows that
cover a sample. A spectrum passed through unchanged would therefore come back at ¾ of its level.
A steady tone comes back at full level: the scaler sees the neighbouring main-lobe bins point at
the same frequency and gathers them into the tone's bin, so the IFFT returns an unwindowed
sinusoid, and the stitcher's Σ w/2 = 1 restores it. The end-to-end test measures 7999–8000 out
for 8000 in.

## The scaler, step by step

The scaler is the heart of the design and the least obvious part. It works on one window at a
time and only on bins 0–2047; the upper half of the spectrum is rebuilt later. It has two passes.

### Analysis pass (4 clocks per bin)

For each bin i:

1. **Measure.** Read the current magnitude and phase from the pre-scaler pair that
   cart_to_polar just wrote. Read the previous window's phase from the other pair.
2. **Phase error.**
   - Subtract the advance that a tone exactly at the bin's centre would show over one hop. That
     advance is 2π·i·1024/4096 = i·π/2.
   - Modulo 2π it is just (i mod 4)·π/2, so it costs a 2-bit multiplexer, not a modulo unit.
   - Wrap the result to [−π, π) with a few bounded add/subtract-2π steps (`pv_pkg::wrap_phase`).
3. **Bin deviation.** Multiply the wrapped error by 2/π (163/256 in Q.8) to get the offset from
   the bin centre, in bins. An error of ±π means ±2 bins.
4. **Synthesis bin.** Compute new = (i·256 + deviation) × scale / 64 (Q.8 bins). Round it half-up
   to an integer bin b; the rounding remainder is the synthesis deviation.
5. **Accumulate.**
   - If 0 ≤ b < 2048, add the magnitude into `synth_mags[b]` and the remainder into
     `synth_devs[b]`, both saturating.
   - Bins pushed above 2047 (scales above 1) or below 0 are dropped.
   - Two bins that land on the same b simply add.
   - The read-modify-write takes two of the four clocks, so each write lands before the next
     bin's read and no forwarding logic is needed.

### Synthesis pass (2 clocks per bin)

For each output bin i:

- The new phase is wrap(previous output phase of bin i + deviation·π/2 + (i mod 4)·π/2).
- deviation·π/2 is taken modulo 2π from the two low integer bits of the Q8.8 deviation, plus its
  fraction times π/2.
- The previous output phase comes from the post-scaler pair written one window earlier. The top
  multiplexes that pair's read address between the scaler and polar_to_cart, which never run at
  the same time.
- The magnitude is `synth_mags[i]`.
- Both values go to the post-scaler pair named by `cur_window`. The accumulators are written back
  to zero behind the read, ready for the next window.

### Timing and drops

A window takes 6·2048 + 3 = 12,291 clocks from `go_in` to `go_out`. Bins dropped at the top of
the band are visible as `acc_ok == 0` inside the scaler; the end-to-end test counts them.

## Windows, rings and slots

### Input ring

The input ring holds 5120 words: one window plus one hop. It is written by the sampler in the
audio-clock domain.

- After every 1024th sample the sampler pulses `go_out`.
- It also reports `window_start`: the 1024-word slot (0–4) where the newest complete 4096-sample
  window begins. That is the slot written three hops before the current one.
- first_hannifier reads 4096 words from `window_start·1024`, wrapping at 5120.
- The ring starts at zero, so the first three windows contain leading silence.

### Output ring

The output ring is also 5120 words and is built the same way.

- For window w the stitcher writes slots w … w+3 (mod 5).
- The first 3072 samples are added to what the three earlier windows left there.
- The last 1024 overwrite a slot that held samples from five hops ago.
- After a window, the slot at offset 0 has received all four of its contributions. The stitcher
  hands that slot to the emitter through its own `window_start`.

### Two copies of the output ring

The output ring exists as two RAMs written together:

- an `sdp_ram` on the system clock for the stitcher's read-modify-write;
- a dual-clock `ring_buf` that the emitter reads on the audio clock.

An M10K simple dual-port RAM has only one read port, and the design needs two reads of this ring.

### Clock domains

Only two things cross between `clk` and `audio_clk`:

- the dual-clock ring RAMs;
- the two `go` pulses, which pass through `pulse_sync`, a toggle synchroniser.

The `window_start` values that go with the pulses are held for a whole hop, far longer than the
synchroniser delay, so they are read directly.

### Ping-pong pairs

The polar buffers come in pairs. The scaler needs the current and the previous window side by
side, both at its input (pre-scaler) and at its output (post-scaler).

- cart_to_polar flips its pair at each `go_in` and reports it as `cur_buf`.
- The scaler writes the post-scaler pair with the same index.
- polar_to_cart reads the pair the scaler names.

## Interfaces to the vendor parts

**FFT / IFFT cores.** Each core sits behind `ffter`. The same wrapper serves both; `INVERSE`
selects the direction.

- **Sink side:** a 4096-word Avalon-ST packet with `sop` and `eop`.
  - `ram_to_stream` feeds it from a synchronous RAM through a 4-entry queue.
  - It honours `fft_sink_ready`, so the core may stall it at any time.
- **Source side:** must deliver 4096 words in natural order, with `sop` on the first. The
  wrapper is always ready.
- **Configuration:** `fft_fftpts` is 4096 and `fft_inverse` follows `INVERSE`.
- **Expected scaling:** forward X[k]/N, inverse the unnormalised sum. If a core is configured
  otherwise, change the shifts in first_hannifier or the stitcher.

**Audio core.** The four streaming channels of the audio core are top-level ports.

- **Sampler:** raises both `*_in_ready` for one cycle and samples `*_in_valid`/`*_in_data` on the
  next. The left channel is kept; the right is read and dropped so the codec FIFOs drain. A poll
  takes three audio clocks and repeats until a sample is there.
- **Emitter:** watches each channel's `*_out_ready` and answers with a one-cycle `*_out_valid`
  carrying the sample. It moves to the next sample only when both channels have taken it; the
  codec plays a sample only once both are written.
- The output is mono on both channels.

**Scale register.** `software_interface` is a one-register Avalon-MM slave. A write with
`chipselect` loads the 8-bit scale amount, whatever the address. It resets to 64 (unity).

## Where this departs from the reference description

- **Output ring size and `window_start` width.** The output ring holds 5120 words, so the
  stitcher→emitter `window_start` is 3 bits and counts five slots. The description of the
  stitcher gives a 2-bit index over four 1024-word slots, but also gives both rings 5120 words.
  This design keeps the 5120-word ring throughout.
- **Hann coefficients.** They follow the periodic Hann over 4096 samples, sin²(πn/4096). This
  sums to a constant over the four overlapping windows, which the reconstruction relies on.
- **Scale width.** The scale amount is 8 bits (Q2.6) from the register through to the scaler.
- **Scale register reset.** It resets to unity rather than 0. A scale of 0 would map every bin
  to bin 0.
- **Spectrum halves.**
  - The scaler handles bins 0–2047 only.
  - polar_to_cart rebuilds bins 2049–4095 as complex conjugates and zeroes the Nyquist bin, so
    the IFFT output is real.
  - The original software model scales every bin.
- **CORDICs.** Both CORDICs are written here: 16 stages, pipelined, with the gain corrected by
  39797/65536. No third-party CORDIC is used.
- **Buffer count.** There are 16 buffers of 4096 words plus three 5120-word rings, counting the
  duplicate output ring. That is 166 M10K blocks. With about 279 blocks for two FFT cores this
  is **more than the 397 blocks of the target FPGA**. To fit, share one buffer pair between
  pre_fft and post_ifft, drop `synth_devs` in favour of a narrower field, or give the output
  ring a true dual-port RAM.
- **Unused core signals.** The FFT cores' error signals and the audio configuration core's bus
  are not used.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The references are computed in the testbench in double
precision or with an independent integer model, never taken from the RTL.

| Testbench | What it checks |
|---|---|
| `tb_sdp_ram`, `tb_ring_buf` | Zeroed contents, one-cycle reads, read-during-write returns the old word; full 5120-word pass across two unrelated clocks |
| `tb_hann_rom` | Every coefficient on both ports against 65536·sin²(πn/4096), symmetry |
| `tb_software_interface` | Reset value, writes only with `chipselect` and `write`, hold |
| `tb_sampler` | Handshake with a slow ADC, ring addresses, `window_start` sequence, hop count |
| `tb_first_hannifier` | Every product against x·w/2^16, ring wrap, 4096+3 cycles |
| `tb_ffter` | Forward and inverse instances with a stalling core model: tone bins, sop/eop, write count |
| `tb_fft_roundtrip` | Forward then inverse wrapper on a 4096-sample multi-tone window, stalling cores: output equals input within 6 LSB (measured 4) |
| `tb_cart_to_polar` | Magnitude and phase against `$sqrt`/`$atan2`, bank alternation |
| `tb_scaler` | Five windows at scales 1, 0.5, 2, 1.56, 3.1 against an integer model; unity identity; accumulators cleared; 12,291 cycles |
| `tb_polar_to_cart` | Against mag·cos/sin, conjugate half, Nyquist zero |
| `tb_stitcher` | Overlap-add against a ring model over 7 windows, saturation, slot sequence |
| `tb_emitter` | Order and one-cycle valids under random readies, wrap past 5119, restart |
| `tb_pitch_perfect_top` | Full-size end-to-end run, described below |

### End-to-end test

`tb_pitch_perfect_top` runs the whole design with no parameter overrides:

- a sine at 1/64 cycle per sample on the ADC;
- the scale register written with 64 (unity), after 12 windows with 128 (×2.0), and after 10
  more with 32 (×0.5);
- FFT core models (`tb/fft_ip_model.sv`) that stall their sinks.

It checks that:

- the output blocks at unity carry the input tone at the input level;
- at ×2.0 and ×0.5 they carry the octave above or below and little of the original tone;
- both DAC channels receive the same stream.

It also counts, and fails if one never happens:

- each stage's finish pulse;
- both ping-pong banks;
- both rings wrapping;
- FFT stalls;
- dropped bins;
- the scale change;
- DAC playback.

It runs in a few seconds.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  --top-module tb_pitch_perfect_top -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/pv_pkg.sv tb/tb_pitch_perfect_top.sv
./obj_dir/Vtb_pitch_perfect_top
```

Swap in any other `tb_*` name the same way.

### What the tests do not cover

The tests use a behavioural FFT model, not the vendor core. The scaling and latency of a real
core must be checked against its settings. The design has not been run on hardware.

## Files

| File | Contents |
|---|---|
| `rtl/pv_pkg.sv` | Sizes, Q8.8 phase constants, `wrap_phase`, `sat16` |
| `rtl/pitch_perfect_top.sv` | Top level |
| `rtl/sampler.sv`, `rtl/emitter.sv` | Audio-core stream interfaces (audio clock) |
| `rtl/first_hannifier.sv`, `rtl/stitcher.sv` | Hann windowing and overlap-add |
| `rtl/hann_rom.sv` | Coefficient ROM, computed at elaboration |
| `rtl/ffter.sv`, `rtl/ram_to_stream.sv` | FFT core wrapper |
| `rtl/cart_to_polar.sv`, `rtl/cordic_vectoring.sv` | Rectangular to polar |
| `rtl/polar_to_cart.sv`, `rtl/cordic_rotation.sv` | Polar to rectangular |
| `rtl/scaler.sv` | Phase-vocoder scaling |
| `rtl/software_interface.sv` | Scale register |
| `rtl/sdp_ram.sv`, `rtl/ring_buf.sv` | Single-clock and dual-clock buffer RAMs |
| `rtl/pulse_sync.sv` | Clock-domain crossing for the window pulses |
| `tb/fft_ip_model.sv` | FFT core model |
| `tb/tb_*.sv` | Testbenches |
