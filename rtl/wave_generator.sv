// wave_generator: push-button controlled triangle wave generator.
//
// While button_in is high the 16-bit two's complement output ramps up by STEP
// every clock until it reaches +PEAK, then down by STEP until it reaches -PEAK,
// and so on: a triangle of period about 4 * PEAK / STEP clocks. While
// button_in is low the output is held at zero and the next press starts a
// fresh ramp upwards from zero. The output is a register, updated on every
// clock.
//
// Generating a triangle wave on a button press and returning to zero on
// release follows the described synthesizer, as do the 16-bit output and the
// use of one generator per tone. The signed format, the per-clock step,
// the peak value and the clamping at the peaks are this design's own choices.
module wave_generator
  import audio_pkg::*;
#(
  parameter int unsigned STEP = 2,
  parameter int unsigned PEAK = 32767
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    button_in,
  output sample_t value_out
);

  initial assert (STEP > 0 && STEP < PEAK && PEAK <= 32767)
    else $error("wave_generator: need 0 < STEP < PEAK <= 32767");

  localparam logic signed [17:0] PEAK_S = 18'(PEAK);
  localparam logic signed [17:0] STEP_S = 18'(STEP);

  logic              rising;
  logic signed [17:0] up_nxt, dn_nxt;

  assign up_nxt = 18'(value_out) + STEP_S;
  assign dn_nxt = 18'(value_out) - STEP_S;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      value_out <= '0;
      rising    <= 1'b1;
    end else if (!button_in) begin
      value_out <= '0;
      rising    <= 1'b1;
    end else if (rising) begin
      if (up_nxt >= PEAK_S) begin
        value_out <= sample_t'(PEAK_S);
        rising    <= 1'b0;
      end else begin
        value_out <= sample_t'(up_nxt);
      end
    end else begin
      if (dn_nxt <= -PEAK_S) begin
        value_out <= sample_t'(-PEAK_S);
        rising    <= 1'b1;
      end else begin
        value_out <= sample_t'(dn_nxt);
      end
    end
  end

endmodule
