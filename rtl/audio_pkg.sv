// audio_pkg: types and constants shared by the push-button audio synthesizer
// and by the I2C controller that configures its WM8731 audio codec.
//
// The sample format is 16-bit two's complement, the codec's word width. The
// I2C device address byte 0x34 (codec address 0x1A plus a cleared write bit)
// and the register write 0x04/0x6E are the ones shown in the system's example
// bus transfer. The other nine configuration words, their order and the four
// tone step sizes are this design's own choices: the system is described as
// writing ten values that set volume, data format and sampling rate, without
// listing them.
package audio_pkg;

  localparam int unsigned SAMPLE_W = 16;
  typedef logic signed [SAMPLE_W-1:0] sample_t;

  localparam int unsigned NUM_TONES = 4;

  // Per-clock step of each triangle generator (18 MHz clock, peak 32767):
  // f = 18e6 * STEP / (4 * 32767), i.e. about 275, 412, 549 and 687 Hz.
  localparam int unsigned TONE_STEP [NUM_TONES] = '{2, 3, 4, 5};

  // I2C write: byte 1 = device address + R/W bit, byte 2 = {register[6:0],
  // data[8]}, byte 3 = data[7:0].
  localparam logic [7:0] CODEC_ADDR_W = 8'h34;

  localparam int unsigned NUM_CFG = 10;
  typedef logic [15:0] cfg_word_t;   // {reg[6:0], data[8:0]}

  localparam cfg_word_t CODEC_CFG [NUM_CFG] = '{
    16'h001A,   // R0  left line in: 0 dB, unmuted
    16'h021A,   // R1  right line in: 0 dB, unmuted
    16'h046E,   // R2  left headphone out volume
    16'h066E,   // R3  right headphone out volume
    16'h0812,   // R4  analogue path: DAC selected, microphone muted
    16'h0A00,   // R5  digital path: no soft mute, no de-emphasis
    16'h0C00,   // R6  power down: everything powered
    16'h0E01,   // R7  interface: slave, 16 bit, left justified
    16'h1002,   // R8  sampling: normal mode, 384 fs (18 MHz MCLK)
    16'h1201    // R9  interface active
  };

endpackage
