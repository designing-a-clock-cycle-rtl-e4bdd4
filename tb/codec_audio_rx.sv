// codec_audio_rx: behavioural model of the WM8731 DAC serial input in slave,
// left-justified mode, for testbenches only.
//
// On every rising edge of bclk it samples lrclk and data. A rise of lrclk
// starts a frame: the left word is the first W bits of the lrclk-high slot,
// MSB first, and the right word the first W bits of the lrclk-low slot. The
// remaining bits of each slot are expected to be zero (pad_errors counts the
// ones that are not). When the right word is complete, left_q and right_q are
// updated and frame_tgl toggles. bits_left/bits_right record the length of the
// last complete slots in bit clocks.
module codec_audio_rx #(
  parameter int unsigned W = 16
) (
  input  logic bclk,
  input  logic lrclk,
  input  logic data
);

  logic [W-1:0] left_q = '0, right_q = '0, sh = '0, left_sh = '0;
  logic         frame_tgl = 1'b0;
  logic         lr_p = 1'b0, in_frame = 1'b0;
  int unsigned  cnt = 0, n_frames = 0, pad_errors = 0;
  int unsigned  bits_left = 0, bits_right = 0;

  always @(posedge bclk) begin
    lr_p <= lrclk;
    if (lrclk && !lr_p) begin                       // left slot starts
      if (in_frame) bits_right <= cnt;
      in_frame <= 1'b1;
      sh       <= {{(W-1){1'b0}}, data};
      cnt      <= 1;
    end else if (!lrclk && lr_p) begin              // right slot starts
      bits_left <= cnt;
      sh        <= {{(W-1){1'b0}}, data};
      cnt       <= 1;
    end else if (in_frame) begin
      cnt <= cnt + 1;
      if (cnt < W) sh <= {sh[W-2:0], data};
      else if (data) pad_errors <= pad_errors + 1;
      if (cnt == W - 1) begin
        if (lrclk) left_sh <= {sh[W-2:0], data};
        else begin
          left_q    <= left_sh;
          right_q   <= {sh[W-2:0], data};
          n_frames  <= n_frames + 1;
          frame_tgl <= !frame_tgl;
        end
      end
    end
  end

endmodule
