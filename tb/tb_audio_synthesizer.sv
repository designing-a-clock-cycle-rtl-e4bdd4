// tb_audio_synthesizer: self-checking testbench of the four-tone synthesizer.
//
// Presses and releases the four buttons in a fixed sequence of single tones,
// pairs and all four together, held long enough for the triangles to reach
// their peaks, at an 18 MHz clock. A codec receiver model deserializes the
// output and every received frame is compared with a cycle-level reference of
// the generators, adder and sample capture: the left and right words must
// both equal the reference's mono sample. Also required: each tone on for a
// while and released at least once, at least one frame whose sum wrapped,
// and frames of 384 clocks.
`timescale 1ns / 1ps
module tb_audio_synthesizer;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] buttons = '0;
  logic bclk, lrclk, data;
  int checks = 0, failures = 0, mism = 0, frames = 0;

  always #27.78 clk = !clk;

  audio_synthesizer dut (
    .clk (clk), .rst_n (rst_n), .buttons_in (buttons),
    .aud_bclk_out (bclk), .aud_lrclk_out (lrclk), .aud_data_out (data));

  codec_audio_rx rx (.bclk (bclk), .lrclk (lrclk), .data (data));
  synth_ref_model ref_m (.clk (clk), .rst_n (rst_n), .buttons (buttons), .lrclk (lrclk));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Compare every received frame with the reference.
  always @(rx.frame_tgl) if (rx.n_frames != 0) begin
    logic [15:0] e;
    e = ref_m.exp_q.pop_front();
    frames++;
    if (rx.left_q != e || rx.right_q != e) begin
      mism++;
      if (mism < 10) $display("FAIL: frame %0d got %h/%h expected %h", frames, rx.left_q, rx.right_q, e);
    end
  end

  // Frame period.
  longint unsigned cyc = 0, t_f = 0;
  int unsigned frame_bad = 0;
  logic lr_p = 1'b0;
  always @(posedge clk) begin
    cyc  <= cyc + 1;
    lr_p <= lrclk;
    if (rst_n && lrclk && !lr_p) begin
      if (t_f != 0 && cyc - t_f != 384) frame_bad <= frame_bad + 1;
      t_f <= cyc;
    end
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [3:0] PATTERN [8] = '{4'b0001, 4'b0010, 4'b0100, 4'b1000,
                                         4'b0011, 4'b0000, 4'b1100, 4'b1111};

  initial begin
    repeat (3) @(posedge clk);
    #5 rst_n = 1'b1;
    repeat (1000) @(posedge clk);
    foreach (PATTERN[i]) begin
      #5 buttons = PATTERN[i];
      repeat (70_000 + $urandom_range(0, 999)) @(posedge clk);
    end
    #5 buttons = '0;
    repeat (2000) @(posedge clk);
    check(frames > 1400, $sformatf("frames received (%0d)", frames));
    check(mism == 0, $sformatf("frames matching the reference (%0d mismatches)", mism));
    check(rx.left_q == 16'h0000, "silence after all buttons released");
    check(frame_bad == 0, "frame of 384 clocks");
    for (int i = 0; i < 4; i++) begin
      check(ref_m.on_clocks[i] > 0, $sformatf("tone %0d played", i));
      check(ref_m.n_releases[i] > 0, $sformatf("tone %0d released", i));
    end
    check(ref_m.n_wraps > 0, $sformatf("sum wrapped in %0d frames", ref_m.n_wraps));
    $display("frames %0d, wrapped %0d", frames, ref_m.n_wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
