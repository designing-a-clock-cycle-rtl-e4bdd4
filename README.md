# Push-button audio synthesizer with an I2C-configured codec

This is the RTL of a small FPGA audio system built for an Altera DE2-class
board with a Wolfson WM8731 codec. It has two independent halves:

* a **four-tone synthesizer**: four push-buttons each turn on a triangle wave
  of its own pitch. The four waves are summed and the mono sample is streamed
  to the codec's DAC over its serial audio interface;
* an **I2C configuration controller**: when reset is released it writes ten
  configuration words into the codec's registers over I2C (standard mode,
  50 kHz), resending any word the codec does not acknowledge, and then idles.

The I2C side is the part that needs care. It is a control-oriented,
clock-cycle-exact block: SCLK is derived by counting system clocks, every
change on SDAT must fall at the right point of the SCLK waveform, and the SDAT
direction must be held steady for whole bus phases. The design hands SDAT
to a pad buffer as three plain signals (`sdat_out`, `sdat_in`, `sdat_dir`)
instead of an `inout` port.

## Block diagram

```
                 clk_18m (from an external PLL, 27 -> 18 MHz)
                    |
 buttons[3:0] --> audio_synthesizer ----------------------------+
                    | 2-FF button synchronizer                  |
                    | 4 x wave_generator  --16b each-->         |
                    |                      64b operand bus      |
                    |   adder (sum of 4, two MSBs dropped) -16b-+--> left_data_in
                    |                                           +--> right_data_in
                    |   audio_controller -> aud_bclk_out, aud_lrclk_out, aud_data_out
                    |
 clk_50m ------> i2c_controller -> sclk_out, sdat_out, sdat_dir, <- sdat_in, done
```

`audio_system` (`rtl/audio_system.sv`) is the top. The two halves share only
the asynchronous active-low `rst_n`, which each clock domain releases through
its own two-flip-flop synchronizer. The PLL and the SDAT pad buffer are vendor
primitives and sit outside the top. On an Altera device the pad is an
`ALT_IOBUF` with `oe = sdat_dir`, `i = sdat_out`, `o = sdat_in`. A generic
equivalent is `assign pin = sdat_dir ? sdat_out : 1'bz; assign sdat_in = pin;`.

| file | module | role |
|---|---|---|
| `rtl/audio_pkg.sv` | package | sample type, tone steps, codec address, the ten configuration words |
| `rtl/audio_system.sv` | `audio_system` | top: both halves and the reset synchronizers |
| `rtl/i2c_controller.sv` | `i2c_controller` | codec configuration over I2C |
| `rtl/audio_synthesizer.sv` | `audio_synthesizer` | generators, adder and serializer |
| `rtl/wave_generator.sv` | `wave_generator` | one button-gated triangle oscillator |
| `rtl/adder.sv` | `adder` | four-input sample mixer with wrap-around |
| `rtl/audio_controller.sv` | `audio_controller` | parallel-to-serial conversion with bit and left-right clocks |

## The I2C controller

### SCLK generation

A counter runs from 0 to `HALF-1`, where `HALF = CLK_HZ / (2*SCL_HZ)`. That is
500 for 50 MHz and 50 kHz. SCLK toggles each time the counter wraps. SCLK
never stops: it keeps toggling while the bus is idle. This is harmless
because no start or stop condition can happen while SDAT is held high. After
reset SCLK starts high.

### Where things happen within an SCLK period

All bus decisions are tied to three points of the SCLK waveform, each one
system clock wide:

| point | counter / SCLK | used for |
|---|---|---|
| mid-low | `cnt == HALF/2-1`, SCLK low | put the next data bit on SDAT |
| mid-high | `cnt == HALF/2-1`, SCLK high | start (SDAT 1->0), stop (SDAT 0->1), sample the acknowledge |
| falling edge | the clock on which SCLK goes low | hand SDAT to the codec for the acknowledge slot, and take it back |

So data bits change only while SCLK is low and stay stable through the high
half. The only SDAT edges under SCLK high are the start and stop conditions.

### One configuration write

```
state:    START | BIT x8 | ACK | BIT x8 | ACK | BIT x8 | ACK | STOP
SDAT:     1->0    b7..b0   codec  reg/d8   codec  d7..d0   codec  0->1
sdat_dir: 1       1        0      1        0      1        0      1
```

Each transfer sends three bytes, MSB first:

1. `0x34`: the codec's device address `0x1A` with the write bit cleared;
2. `{register[6:0], data[8]}`;
3. `data[7:0]`.

During each acknowledge slot `sdat_dir` is 0 for exactly one SCLK period,
from the falling edge after bit 0 to the next falling edge. The codec
acknowledges by pulling SDAT low, and the controller samples that in the
middle of the high half.

When the controller takes the line back, it drives it low, the same level as
a codec acknowledge. If the codec is late releasing the line there is then no
contention. A next data bit replaces the low at the next mid-low. For a stop
the line just stays low until mid-high.

An acknowledged transfer lasts exactly 28 SCLK periods (560 us) from start to
stop. The next start follows one period after the stop. The ten words take
about 5.8 ms.

### Resend on a missing acknowledge

If the codec leaves SDAT high in any of the three acknowledge slots, the
controller ends the transfer right away. It drives SDAT low on the falling
edge, makes a stop at the next mid-high, then a fresh start one period later,
and sends all three bytes of the same word again. This repeats until the word
is acknowledged. There is no retry limit: a codec that never acknowledges
keeps the controller retrying forever.

### Why every output is a register

All outputs are registers that are updated on every clock. `sdat_dir`
therefore holds its value for whole bus phases. It is a clean enable for the
pad buffer and never pulses while the controller is driving. The controller
does one complete step of its state machine per clock, so it needs no
multi-cycle schedule or pipeline to meet the bus timing.

### Configuration words

The words are in `audio_pkg::CODEC_CFG`, as `{register[6:0], data[8:0]}`:

| # | word | register | setting |
|---|---|---|---|
| 0 | `001A` | R0 left line in | 0 dB, unmuted |
| 1 | `021A` | R1 right line in | 0 dB, unmuted |
| 2 | `046E` | R2 left headphone | volume 0x6E |
| 3 | `066E` | R3 right headphone | volume 0x6E |
| 4 | `0812` | R4 analogue path | DAC selected, microphone muted |
| 5 | `0A00` | R5 digital path | no soft mute, no de-emphasis |
| 6 | `0C00` | R6 power down | all blocks on |
| 7 | `0E01` | R7 interface | slave, 16 bit, left-justified |
| 8 | `1002` | R8 sampling | normal mode, 384 fs |
| 9 | `1201` | R9 active | interface on |

The address byte `0x34` and the R2 write (`0x04`, `0x6E`) are those of the
original system's example bus transfer. The other nine words are this
design's own choice, taken from the WM8731 register map. They were picked to
match the serial format of `audio_controller` (R7) and the 18 MHz clock (R8).
To change the configuration, edit the table and `NUM_CFG`. The controller
sizes its counters from `NUM_CFG`.

## The synthesizer

**Wave generators.** A pressed button makes its generator ramp a 16-bit
two's-complement value by `STEP` per clock. The ramp goes up to +32767, down
to -32767 and back, clamping at each peak. The period is
`2*ceil(2*PEAK/STEP)` clocks. A released button forces the output to zero,
and the next press starts a new ramp from zero. The steps are 2, 3, 4 and 5,
which at 18 MHz gives 274.7, 412.0, 549.3 and 686.7 Hz. Those pitches are this
design's choice.

**Adder.** The four samples arrive packed in a 64-bit bus, tone *i* in bits
`[16i+15:16i]`. They are summed at 18 bits and the two MSBs are dropped. Each
tone is full-scale, so two or more tones near their peaks make the sum wrap
around. This is audible as distortion and is deliberate. The adder is purely
combinational.

**Audio controller.** It generates `aud_bclk_out` (18 MHz / 6 = 3 MHz) and
`aud_lrclk_out`, which is high for the left slot and low for the right. A
frame is two 32-bit slots: 384 clocks, or 46.875 kHz.

On the falling bit-clock edge that starts a frame, the controller captures
both channel inputs into a 64-bit shift register. Both inputs carry the same
mono sample. It then sends them left-justified: each word goes MSB first
from the first bit clock of its slot, followed by 16 zero bits. Data and
`aud_lrclk_out` change on falling bit-clock edges and the codec samples on
rising edges. Capturing the inputs at the frame start means an input that
changes during a frame only affects the next frame.

The codec's master clock (MCLK) is not produced by this RTL. R8 assumes the
18 MHz clock is also routed to the codec as MCLK.

## Clocks, reset and timing summary

| signal | clock | rate |
|---|---|---|
| `sclk_out` | 50 MHz | 50 kHz, toggles every 500 clocks |
| `aud_bclk_out` | 18 MHz | 3 MHz, toggles every 3 clocks |
| `aud_lrclk_out` | 18 MHz | 46.875 kHz, 384 clocks per frame |
| wave samples | 18 MHz | new value every clock |

The buttons are asynchronous and go through a two-flip-flop synchronizer. A
press reaches the generator two clocks later and shows up in the audio stream
at the next frame start after that. The two clock domains exchange no signals.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_adder` | 2000+ random and directed sums against an integer reference cut to 16 bits; at least one wrap |
| `tb_wave_generator` | cycle-by-cycle against a reference triangle; periods of 1334 clocks (small instance) and 65534 clocks (defaults); zero on release; restart from zero |
| `tb_audio_controller` | 60 frames with inputs changed at random points mid-frame; the captured words, zero padding, 32-bit slots, 6-clock bit clock, 384-clock frame |
| `tb_i2c_controller` | the ten writes in order; SCLK half period of 500 clocks; 28-period transfers and one-period gaps; no SDAT change under SCLK high other than start/stop; no drive contention; `sdat_dir` low once per acknowledge slot for one SCLK period; two refused acknowledges resent; bus quiet after `done` |
| `tb_audio_synthesizer` | about 1470 frames compared with a cycle-level reference while buttons play single tones, pairs and all four; each tone played and released; wrapped sums seen |
| `tb_audio_system` | the whole top at its only configuration: both halves at once, counting configuration writes, resends, tone presses and releases, and wrapped frames, each of which must occur |

The testbenches use three behavioural helpers, also in `tb/`:

* `codec_i2c_model`: the codec's I2C slave, with acknowledge refusal on
  demand;
* `codec_audio_rx`: the codec's serial audio input;
* `synth_ref_model`: a cycle-level reference of the sample stream.

To run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
  rtl/audio_pkg.sv tb/tb_audio_system.sv --top-module tb_audio_system
./obj_dir/Vtb_audio_system
```

`tb_audio_system` simulates about 32 ms of board time in a few seconds.

## Departures and open points

* The pitches, the triangle amplitude and slope, the serial audio format and
  sample rate, and nine of the ten configuration words are choices made for
  this design. The reference system specifies only that they exist.
* The I2C controller does one step per clock with registered outputs. It has
  no multi-cycle schedule, so the pipelining needed to keep the SDAT direction
  steady is built into the structure rather than added as a stage.
* The resend always restarts the whole word with a stop/start pair. A
  repeated start would work equally well.
* The PLL, the SDAT pad buffer and the codec are not part of the RTL.
* The `config_done` / `done` output and the reset synchronizers are additions.
* The acknowledge is only checked for the level; no timeout, arbitration or
  clock stretching is implemented. Neither the WM8731 nor a single-master bus
  needs them.
