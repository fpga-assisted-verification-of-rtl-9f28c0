# Hardware emulation of a calibrated 8-channel time-interleaved ADC

A time-interleaved ADC (TI-ADC) reaches a high sample rate by letting M slow
converter cores take turns. Mismatch between the cores (offset, gain,
sampling-time skew, differing non-linearity) puts spurious tones into the
spectrum, so real TI-ADCs run digital background calibration. That
calibration settles over millions of samples, too slowly for a software
model or an RTL simulation.

This RTL builds an emulation model of such a converter for an FPGA. Each of
the 8 channels has three parts:

- an input generator;
- a behavioural model of one ADC core with programmable non-idealities;
- the offset and gain calibration logic that a real chip would contain.

The channels run in parallel and together deliver one calibrated sample per
clock. At 100 MHz that is 1/20 of the speed of a 2 GS/s converter. A host
loads the waveform and the ADC characteristics, sets the mismatch through
registers, and reads windows of the output stream over AXI4-Lite.

```
 AXI4-Lite ──► axil_mm_bridge ──► bank decode ─┬─► control_regs ──► configuration
                                               ├─► NCO / ADC table write ports
                                               └─◄ output buffer reads
 channel m (m = 0..7), all in lock step:
   nco ──► adc_model ──► offset_bca ──► gain_bca ──► hold register ─┐
              ▲              ▲ ref          ▲ ref                    │
              │      channel 0's samples at the same stage ──────────┘
                                                                     ▼
                                   reorderer (channel 0,1,..,7,0,..) ──► mm_fifo (65536 x 18)
```

## The sample path of one channel

All samples are 18-bit two's-complement words. Every link is a valid/ready
stream (AXI4-Stream handshake), and every stage holds its output while it is
not taken.

**Input generator (`nco`).**
- A 32-bit phase accumulator addresses an 8192-entry table through its top
  13 bits. The table holds one period of the input waveform and is written
  by the host.
- Channel m of an M-way interleaved converter sees samples n·M + m of the
  input. The host therefore programs `NCO_STEP = M·f_in/f_S·2^32` for every
  channel and `NCO_START = m·f_in/f_S·2^32` for channel m.
- Sampling-time skew of a channel can be modelled in two ways:
  - load its table with the waveform shifted by the skew's phase at the
    input frequency, which works at any resolution;
  - move its start phase, in steps of 2^-13 of a period as seen by the
    table.
  The tables are per channel, so every channel can have its own skew.
- One sample per clock; one clock of latency.

**ADC core model (`adc_model`).**
- Computes `S_out = T(sat(sat(G·S_in / 2^16) + O))`:
  - G is the per-channel gain word (1.0 = 0x10000).
  - O is the per-channel offset.
  - T is a 16384 x 10-bit table.
- The product and the sum saturate to 18 bits.
- The table is addressed by bits 17:4 of the sample, dropping 4 LSBs to fit
  the memory. The 10-bit code comes out MSB-aligned as `{code, 8'b0}`.
- The table therefore sets both the resolution and the static non-linearity.
  Loading `code = addr[13:4]` gives an ideal 10-bit quantiser.
- Each of the three operations has its own bypass bit.
- Two pipeline stages: the product and offset, then the table read.

**Offset calibration (`offset_bca`).**
- A 32-bit accumulator `A_o` integrates the difference between this channel's
  corrected output and the reference channel's input at the same sample
  index:

  `S_out = sat(S_in − (A_o >>> 16))`, `A_o += S_out − S_ref`.

- With a sine input whose mean is zero, `A_o/2^16` settles at the offset of
  this channel relative to the reference channel. The time constant is 2^16
  samples, so γ_offset = 2^-16.

**Gain calibration (`gain_bca`).**
- A 32-bit accumulator `A_g` starts at 0 and equalises the mean magnitude
  with the reference channel:

  `S_out = sat(A_g·S_in >>> 30)`, `A_g += |S_ref| − |S_out|`.

- `A_g/2^30` settles at `g_ref/g_m`, so γ_gain = 2^-30. The time constant is
  about 15,000 samples per channel.
- The step size is a trade-off. Each update moves `A_g` by `|S|`, which is
  up to 2^17 for 18-bit samples. With a shift of 20 that is a ripple of about
  6 % on every sample, and the SNDR stalls near 36 dB. A shift of 30 cuts the
  ripple to about 0.007 %, and the converter reaches its ideal SNDR. 30 is
  also the largest shift for which `A_g` fits in 32 bits, as long as
  `g_ref/g_m < 2`.
- The 32 x 18 product is built from two partial products: the signed top 15
  bits and the zero-extended low 17 bits of `A_g`. Each partial product fits
  one FPGA DSP multiplier.
- The output is zero until the accumulator has grown, so the first few
  thousand samples of a run are attenuated.

**Channel 0 is the reference.**
- Its offset and gain stages run on their own samples, so its offset
  correction stays 0 and its gain settles at 1.
- Every other channel is pulled towards channel 0.
- Latency from the NCO phase to the calibrated sample is 5 clocks.

## Keeping the channels in step

The calibration only works if the reference sample of index k meets every
channel's sample k at the same clock edge. The channels are separate
pipelines, though, and the reorderer drains them one channel at a time.

The top level handles this with one hold register per channel behind the gain
stage:

- All eight channels share one `m_ready`, which is raised only when every
  enabled channel's hold register is empty or is being read by the reorderer
  in that clock.
- Every pipeline therefore moves on the same edges, and channel 0's stage
  inputs can be broadcast as the reference.
- The reorderer reads hold registers 0, 1, …, 7 on consecutive clocks. As it
  takes the last one, the channels advance and refill all hold registers, so
  the buffer still receives one sample per clock.
- A disabled channel keeps running, so the reference stays available, but its
  samples are neither held nor forwarded. With E channels enabled, the
  channels advance every E clocks and the output still carries one sample per
  clock.
- When the buffer is full in FIFO mode, the reorderer stalls, and through the
  shared ready signal every channel stalls with it. No sample is lost or
  repeated.

An assertion in the top level checks that the channels always present their
samples together.

## Output buffer

`mm_fifo` is a 65536 x 18-bit memory with 17-bit write and read pointers.
Occupancy is `WP − RP`.

- **FIFO mode** (`MODE = 0`): the buffer stops accepting samples when full,
  so the model pauses until the host reads. This gives exact, gap-free
  windows of 2^16 samples, the FFT length.
- **Circular mode** (`MODE = 1`): the buffer always accepts. When it is full,
  each new sample overwrites the oldest one, and the read pointer moves with
  the write pointer. The model then runs continuously, and the host sees the
  newest 2^16 samples whenever it reads. This mode is for long runs where
  only the calibration state over time is of interest.

A read of the data word pops the oldest sample, sign-extended to 32 bits. A
read of an empty buffer returns 0 and changes nothing.

## Host interface

Each AXI4-Lite access becomes one word access on an internal bus:

- **Bank**: address bits 27:20.
- **Word**: address bits 17:2. Bits 31:28, 19:18 and 1:0 are ignored.
- **Timing**: reads return data one clock after the internal strobe.
- **Responses**: always OKAY.
- **Concurrency**: one read and one write may be in flight at once.

| Bank        | Contents                                          | Access |
|-------------|---------------------------------------------------|--------|
| 0x00        | control registers                                 | R/W    |
| 0x01        | output buffer: word 0 data (pops), 1 occupancy, 2 status `{full, empty}` | R |
| 0x10 + m    | NCO table of channel m, 8192 x 18 bits            | W      |
| 0x20 + m    | ADC table of channel m, 16384 x 10 bits           | W      |

Control registers (bank 0, word offsets):

| Word       | Name        | Bits / reset value |
|------------|-------------|--------------------|
| 0x00       | RESET       | bit 0; 1 after power-on. While 1, the channels, the reorderer and the buffer pointers are held in reset. Tables and registers keep their contents. |
| 0x01       | CH_ENABLE   | bit m enables channel m; 0xFF |
| 0x02       | ADC_BYPASS  | bit 2 table, bit 1 offset, bit 0 gain; 0 |
| 0x03       | BCA_BYPASS  | bit 1 gain calibration, bit 0 offset calibration; 0 |
| 0x04       | MODE        | 0 FIFO, 1 circular; 0 |
| 0x10 + m   | NCO_START   | 32-bit start phase; 0 |
| 0x20 + m   | NCO_STEP    | 32-bit phase step; 0 |
| 0x30 + m   | ADC_OFFSET  | signed 18 bits; 0 |
| 0x40 + m   | ADC_GAIN    | signed 18 bits, 16 fraction bits; 0x10000 |

To start a run:

1. Load the tables.
2. Write the configuration.
3. Write `RESET = 0`. The NCOs load their start phases while RESET is 1.

To change the configuration, write `RESET = 1`, reconfigure, and then write
`RESET = 0` again. This starts a new run with cleared calibration.

## Verification

Each block has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=… failures=…` line and has a watchdog.

| Testbench | What it checks |
|-----------|----------------|
| `tb_sdp_ram` | Read-during-write, the read enable, random traffic against a model. |
| `tb_nco` | Phase arithmetic against a model for several start and step settings, a stall that holds the sample, one sample per clock. |
| `tb_adc_model` | Random table, gain and offset values, all 8 bypass combinations against a model; saturation; 2-clock latency; stalls. |
| `tb_offset_bca` | Sample-exact against a model; convergence of the offset to within ±8 LSB; bypass. |
| `tb_gain_bca` | Sample-exact; convergence to 1/1.06 and 1/0.96; saturation; bypass. |
| `tb_ti_adc_channel` | The whole chain, sample-exact under random backpressure and all 32 bypass settings; 5-clock latency; convergence to a known reference offset and gain. |
| `tb_reorderer` | Order with random enable masks and random backpressure. |
| `tb_mm_fifo` | Both modes against a model at 64 entries; stall and overwrite. |
| `tb_axil_mm_bridge` | Address-first, data-first and simultaneous writes; reads; address decoding; hold of B and R. |
| `tb_control_regs` | Reset values, random read/write of every word, unmapped words read 0. |
| `tb_ti_adc_fpga_model` | End to end at full size (see below). |
| `tb_sndr_workload` | The SNDR experiment at full size (see below). |

`tb_ti_adc_fpga_model` runs the top level with its default parameters, only
through the AXI4-Lite port. A sample-exact model of all eight channels and a
mirror of the buffer check every sample entering the buffer and every word
read back. The run goes through these phases:

1. Power-on reads.
2. Loading of all 16 tables: a 0.9-of-full-scale sine, and an ideal 10-bit
   quantiser.
3. FIFO mode with the mismatch of the reference experiment:
   - gains 1, 1.03, 0.98, 1.04, 0.96, 1.04, 0.96, 1.06;
   - offsets 0.001, 0.0031, −0.004, −0.0014, −0.005, 0.002, 0.001, 0.0027 of
     full scale;
   - f_in/f_S = 27 MHz / 2 GS/s.

   The buffer must fill in exactly 65536 clocks, stall, and give 70000 correct
   samples.
4. Eight random configurations of channel enables and bypasses. One of them
   drives the ADC model into saturation.
5. 2^23 clocks in circular mode, followed by a check of the calibration
   state.
6. A tanh characteristic in channel 5's ADC table with sampling-time skew
   between channels.

The testbench counts stalls, overwrites, soft resets, empty reads, bypassed
and disabled-channel samples, and saturations. A mechanism that never
happened counts as a failure. The run takes about 10 million clocks, about
20 s with Verilator.

Calibration state after 2^23 samples, averaged over the last 2^18 clocks.
Offsets are relative to channel 0 in LSB of 2^17; the gain is the
coefficient `A_g/2^30`. The testbench accepts ±30 LSB for the offset and
±0.1 % for the gain.

| ch | offset got / ideal | gain got / ideal |
|----|--------------------|------------------|
| 1 | 275.0 / 275.3   | 0.97093 / 0.97087 |
| 2 | −660.4 / −655.4 | 1.02041 / 1.02041 |
| 3 | −314.5 / −314.6 | 0.96161 / 0.96154 |
| 4 | −787.2 / −786.4 | 1.04159 / 1.04167 |
| 5 | 125.7 / 131.1   | 0.96158 / 0.96154 |
| 6 | −2.1 / 0.0      | 1.04187 / 1.04167 |
| 7 | 220.4 / 222.8   | 0.94342 / 0.94340 |

### SNDR while the calibration converges

`tb_sndr_workload` repeats the characterisation a host would run.

- The model runs in FIFO mode with the mismatch above.
- Every 2^16-sample window is read out over AXI4-Lite.
- Each window's SNDR comes from a least-squares fit of DC, cosine and sine
  at the known input frequency. The residual counts as noise and
  distortion.
- With an ideal 10-bit quantiser and a 0.9 full-scale input, the limit is
  6.02·10 + 1.76 + 20·log10(0.9) = 61.05 dB.

| Run | Samples | SNDR, window 1 → last |
|-----|---------|-----------------------|
| offset + gain mismatch | 2^23 (128 windows) | 5.6 → 58.9 (window 16) → 60.8 (window 32) → 61.0 dB |
| same, calibration bypassed | 2^18 | 28.7 dB throughout |
| plus skew of up to 0.034 sample periods, as phase-shifted NCO tables | 2^21 | 5.6 → 54.0 dB (skew is not calibrated) |
| plus tanh(0.3x) characteristic in channel 5 | 2^21 | 5.6 → 51.7 dB (non-linearity is not calibrated) |

The first window is low because the gain coefficients start at zero. The
testbench checks these trends; it takes about 75 s with Verilator.

To run a testbench with Verilator, from the directory holding `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/ti_adc_pkg.sv tb/tb_ti_adc_fpga_model.sv --top-module tb_ti_adc_fpga_model
./obj_dir/Vtb_ti_adc_fpga_model
```

## Size

At the default parameters the model holds 3,670,016 bits of memory:

- 8 NCO tables of 8192 x 18 bits;
- 8 ADC tables of 16384 x 10 bits;
- the 65536 x 18-bit buffer.

Generic synthesis gives about 1200 cells and 2600 flip-flops outside the
memories.

## Design choices and limits

Taken from the original design:

- the channel chain and its order;
- the full-table NCO with an 8192-entry table;
- the ADC model with gain, offset and table, in that order, each saturating
  and each with its own bypass;
- the ADC table addressed by bits 17:4;
- the offset and gain calibration algorithms, with 32-bit accumulators and the
  split gain product;
- the reorderer that skips disabled channels;
- a buffer with FIFO and circular modes and pointer-difference occupancy;
- the register set;
- bank and word fields at address bits 27:20 and 17:2.

This design's own choices:

- **Step sizes.** γ_offset = 2^-16 and γ_gain = 2^-30, set by the parameters
  `OFF_SHIFT` and `GAIN_SHIFT`. The gain step was chosen for 18-bit integer
  samples, as explained above.
- **Bus layout.** The bank numbers, the register offsets and the buffer's
  occupancy and status words.
- **Reference channel.** Channel 0.
- **Lock-step hold registers.** They keep the reference aligned, as described
  above.
- **Reset.** RESET acts as a level and comes up at 1, so nothing runs before
  the host has configured it.
- **Empty reads.** An empty buffer reads as 0.
- **Bypass.** While a calibration stage is bypassed, its accumulator holds.
- **Accumulators.** They wrap instead of saturating, so drift stays
  observable.
- **Sign of the offset accumulator.** It holds +(o_m − o_ref), the value that
  is subtracted.

Not included:

- Time-skew calibration: only offset and gain are calibrated; skew is only
  emulated.
- The FPGA vendor's clock generator, reset block and JTAG-to-AXI master: the
  top level takes a clock, an active-low reset and an AXI4-Lite slave port.
- Timing closure at 100 MHz has not been checked with FPGA tools.
