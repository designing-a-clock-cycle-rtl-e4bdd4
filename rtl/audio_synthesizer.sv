// audio_synthesizer: four-tone push-button synthesizer in the 18 MHz domain.
//
// Each of the four buttons enables one triangle wave generator of its own
// frequency (steps from audio_pkg::TONE_STEP). The four 16-bit outputs are
// concatenated into a 64-bit operand bus, summed by the adder with the two
// MSBs of the sum dropped, and the resulting mono sample is given to both the
// left and the right input of the audio controller, which serializes it to the
// codec. The buttons are asynchronous to the clock and pass through a
// two-flip-flop synchronizer first.
//
// The generators, the adder, the audio controller and the wiring between them,
// with their widths, follow the described system; the synchronizer, the
// active-low asynchronous reset and the active-high (pressed = 1) buttons
// are this design's own choices.
module audio_synthesizer
  import audio_pkg::*;
#(
  parameter int unsigned BCLK_HALF = 3,
  parameter int unsigned SLOT_BITS = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NUM_TONES-1:0] buttons_in,
  output logic                 aud_bclk_out,
  output logic                 aud_lrclk_out,
  output logic                 aud_data_out
);

  logic [NUM_TONES-1:0]          btn_meta, btn_sync;
  logic [NUM_TONES*SAMPLE_W-1:0] operands;
  logic [SAMPLE_W-1:0]           sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      btn_meta <= '0;
      btn_sync <= '0;
    end else begin
      btn_meta <= buttons_in;
      btn_sync <= btn_meta;
    end
  end

  for (genvar i = 0; i < NUM_TONES; i++) begin : g_tone
    sample_t value;
    wave_generator #(.STEP(TONE_STEP[i])) u_wave (
      .clk       (clk),
      .rst_n     (rst_n),
      .button_in (btn_sync[i]),
      .value_out (value)
    );
    assign operands[i*SAMPLE_W +: SAMPLE_W] = value;
  end

  adder #(.N(NUM_TONES), .W(SAMPLE_W)) u_adder (
    .operands_in (operands),
    .sum_out     (sum)
  );

  audio_controller #(
    .W         (SAMPLE_W),
    .SLOT_BITS (SLOT_BITS),
    .BCLK_HALF (BCLK_HALF)
  ) u_audio_ctrl (
    .clk           (clk),
    .rst_n         (rst_n),
    .left_data_in  (sum),
    .right_data_in (sum),
    .aud_bclk_out  (aud_bclk_out),
    .aud_lrclk_out (aud_lrclk_out),
    .aud_data_out  (aud_data_out)
  );

endmodule
