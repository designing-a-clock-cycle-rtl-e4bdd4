// tb_audio_controller: self-checking testbench of the serial audio output.
//
// Runs the controller at its defaults on an 18 MHz clock. At every rise of
// aud_lrclk_out the testbench notes the left and right inputs as the
// expected words of the frame just started, then, at a random point inside
// the frame, changes the inputs, so a word that was not captured at the frame
// start would be caught. A codec receiver model deserializes the stream.
// Checked for 60 frames: both words of every frame, zero padding, 32 bit
// clocks per slot, a bit clock of 6 clocks (3 MHz) and a frame of 384 clocks
// (46.875 kHz).
`timescale 1ns / 1ps
module tb_audio_controller;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] left = '0, right = '0;
  logic bclk, lrclk, data;
  int checks = 0, failures = 0;

  always #27.78 clk = !clk;

  audio_controller dut (
    .clk (clk), .rst_n (rst_n), .left_data_in (left), .right_data_in (right),
    .aud_bclk_out (bclk), .aud_lrclk_out (lrclk), .aud_data_out (data));

  codec_audio_rx rx (.bclk (bclk), .lrclk (lrclk), .data (data));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Clock counters for the bit-clock and frame periods.
  longint unsigned cyc = 0, t_b = 0, t_f = 0;
  int unsigned bclk_bad = 0, frame_bad = 0, frame_seen = 0;
  logic bclk_p = 1'b0, lr_p = 1'b0;
  always @(posedge clk) begin
    cyc    <= cyc + 1;
    bclk_p <= bclk;
    lr_p   <= lrclk;
    if (rst_n && bclk && !bclk_p) begin
      if (t_b != 0 && cyc - t_b != 6) bclk_bad <= bclk_bad + 1;
      t_b <= cyc;
    end
    if (rst_n && lrclk && !lr_p) begin
      if (t_f != 0) begin
        frame_seen <= frame_seen + 1;
        if (cyc - t_f != 384) frame_bad <= frame_bad + 1;
      end
      t_f <= cyc;
    end
  end

  logic [15:0] exp_l [$], exp_r [$];

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stimulus: record the inputs at each frame start, then change them.
  initial begin
    left  = 16'hA5C3;
    right = 16'h3C5A;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    forever begin
      @(posedge lrclk);
      exp_l.push_back(left);
      exp_r.push_back(right);
      repeat (1 + $urandom_range(0, 370)) @(negedge clk);
      left  = 16'($urandom);
      right = 16'($urandom);
    end
  end

  initial begin
    logic [15:0] el, er;
    for (int f = 0; f < 60; f++) begin
      do @(rx.frame_tgl); while (rx.n_frames == 0);
      el = exp_l.pop_front();
      er = exp_r.pop_front();
      check(rx.left_q == el, $sformatf("frame %0d left %h expected %h", f, rx.left_q, el));
      check(rx.right_q == er, $sformatf("frame %0d right %h expected %h", f, rx.right_q, er));
    end
    check(rx.pad_errors == 0, "zero padding bits");
    check(rx.bits_left == 32 && rx.bits_right == 32, "32 bit clocks per slot");
    check(bclk_bad == 0, "bit clock period of 6 clocks");
    check(frame_seen >= 59 && frame_bad == 0, "frame of 384 clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
