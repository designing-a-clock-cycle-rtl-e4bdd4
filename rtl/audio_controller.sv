// audio_controller: parallel-to-serial converter feeding the codec's DAC.
//
// The controller generates the codec's bit clock (aud_bclk_out) and
// left-right clock (aud_lrclk_out) and shifts the samples out on
// aud_data_out. aud_bclk_out toggles every BCLK_HALF clocks. One sample
// period (frame) is 2 * SLOT_BITS bit clocks: aud_lrclk_out is high for the
// left slot and low for the right slot. At the falling bit-clock edge that
// starts a frame, left_data_in and right_data_in are both captured into a
// shift register; the left word is then sent MSB first starting on that same
// edge, followed by zeros up to the end of the slot, and the right word the
// same way in the second slot (left-justified format). Data and aud_lrclk_out
// change only on falling bit-clock edges, so the codec samples them on rising
// edges (an assertion checks this). With the 18 MHz clock and the defaults a frame is
// 2 * 32 * 2 * 3 = 384 clocks, 46.875 kHz, and aud_bclk_out is 3 MHz.
//
// The two clocks, the serial data output, the parallel-to-serial conversion
// and the snapshot of both channel inputs at the start of each sample period
// follow the described system. The left-justified format, the slot length,
// the bit-clock divider and thus the sample rate are this design's own
// choices, matched to the codec's interface settings written by the I2C
// controller.
module audio_controller #(
  parameter int unsigned W         = 16,
  parameter int unsigned SLOT_BITS = 32,
  parameter int unsigned BCLK_HALF = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] left_data_in,
  input  logic [W-1:0] right_data_in,
  output logic         aud_bclk_out,
  output logic         aud_lrclk_out,
  output logic         aud_data_out
);

  initial assert (SLOT_BITS >= W && BCLK_HALF >= 1)
    else $error("audio_controller: need SLOT_BITS >= W and BCLK_HALF >= 1");

  localparam int unsigned FRAME_BITS = 2 * SLOT_BITS;
  localparam int unsigned DW = (BCLK_HALF > 1) ? $clog2(BCLK_HALF) : 1;
  localparam int unsigned BW = $clog2(FRAME_BITS);

  logic [DW-1:0]         div;
  logic [BW-1:0]         bit_idx;
  logic [FRAME_BITS-1:0] shreg;
  logic                  bclk_fall;

  assign bclk_fall = (div == DW'(BCLK_HALF - 1)) && aud_bclk_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div          <= '0;
      aud_bclk_out <= 1'b1;
    end else if (div == DW'(BCLK_HALF - 1)) begin
      div          <= '0;
      aud_bclk_out <= !aud_bclk_out;
    end else begin
      div          <= div + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_idx       <= BW'(FRAME_BITS - 1);
      shreg         <= '0;
      aud_lrclk_out <= 1'b0;
    end else if (bclk_fall) begin
      if (bit_idx == BW'(FRAME_BITS - 1)) begin
        bit_idx       <= '0;
        shreg         <= {left_data_in,  (SLOT_BITS - W)'(0),
                          right_data_in, (SLOT_BITS - W)'(0)};
        aud_lrclk_out <= 1'b1;
      end else begin
        bit_idx       <= bit_idx + 1'b1;
        shreg         <= shreg << 1;
        aud_lrclk_out <= (bit_idx + 1'b1) < BW'(SLOT_BITS);
      end
    end
  end

  assign aud_data_out = shreg[FRAME_BITS-1];

  // Data and the left-right clock change only on falling bit-clock edges.
  a_data_on_fall: assert property (@(posedge clk) disable iff (!rst_n)
      (aud_data_out != $past(aud_data_out) || aud_lrclk_out != $past(aud_lrclk_out))
      |-> $past(bclk_fall))
    else $error("serial data changed away from a falling bit-clock edge");

endmodule
