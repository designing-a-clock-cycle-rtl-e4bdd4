// audio_system: FPGA top level of the push-button audio synthesizer with
// I2C-configured WM8731 codec.
//
// Two independent parts share only the board reset. The audio synthesizer
// runs on the 18 MHz clock (made by a PLL from the board's 27 MHz oscillator,
// outside this module) and drives the codec's serial audio interface. The I2C
// controller runs on the board's 50 MHz clock and, after reset, writes the
// codec's configuration registers over I2C; its SDAT line is brought out as
// separate output, input and direction signals (sdat_dir = 1: drive
// sdat_out onto the pin) for a bidirectional pad buffer outside this module.
// rst_n is asynchronous and active low; each clock domain releases its own
// copy of it synchronously through two flip-flops.
//
// The partition into the two blocks, their clocks and the separate
// SDAT_IN/SDAT_OUT/SDAT_DIR connection follow the described system; the reset
// synchronizers and the config_done status output are this design's own.
// Lint reports the synchronizer flops as used both synchronously and as an
// asynchronous reset; that is the intended reset-synchronizer structure.
module audio_system
  import audio_pkg::*;
(
  input  logic                 clk_18m,
  input  logic                 clk_50m,
  input  logic                 rst_n,
  input  logic [NUM_TONES-1:0] buttons,
  output logic                 aud_bclk_out,
  output logic                 aud_lrclk_out,
  output logic                 aud_data_out,
  output logic                 sclk_out,
  input  logic                 sdat_in,
  output logic                 sdat_out,
  output logic                 sdat_dir,
  output logic                 config_done
);

  logic [1:0] rst18_q, rst50_q;

  always_ff @(posedge clk_18m or negedge rst_n) begin
    if (!rst_n) rst18_q <= '0;
    else        rst18_q <= {rst18_q[0], 1'b1};
  end

  always_ff @(posedge clk_50m or negedge rst_n) begin
    if (!rst_n) rst50_q <= '0;
    else        rst50_q <= {rst50_q[0], 1'b1};
  end

  audio_synthesizer u_synth (
    .clk           (clk_18m),
    .rst_n         (rst18_q[1]),
    .buttons_in    (buttons),
    .aud_bclk_out  (aud_bclk_out),
    .aud_lrclk_out (aud_lrclk_out),
    .aud_data_out  (aud_data_out)
  );

  i2c_controller u_i2c (
    .clk      (clk_50m),
    .rst_n    (rst50_q[1]),
    .sclk_out (sclk_out),
    .sdat_in  (sdat_in),
    .sdat_out (sdat_out),
    .sdat_dir (sdat_dir),
    .done     (config_done)
  );

endmodule
