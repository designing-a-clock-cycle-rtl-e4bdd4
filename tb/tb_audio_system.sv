// tb_audio_system: end-to-end testbench of the whole FPGA design at its
// default (and only) configuration: 18 MHz synthesizer clock, 50 MHz I2C
// controller clock.
//
// A model of the codec answers on the I2C bus (through a model of the
// bidirectional SDAT pad buffer) and receives the serial audio. The codec
// refuses two acknowledge slots, forcing two resent configuration words.
// Meanwhile the four buttons play single tones, pairs and all four together.
// Checked: the ten configuration writes, in order and with the expected
// values; config_done and a quiet bus afterwards; every received audio frame
// against a cycle-level reference of the synthesizer; frames of 384 clocks.
// Each mechanism of the design is counted and must occur at least once:
// configuration writes, resends after a refused acknowledge, tone presses
// and releases for every button, and a wrapped (overflowing) sum.
`timescale 1ns / 1ps
module tb_audio_system;

  logic clk_18m = 1'b0, clk_50m = 1'b0, rst_n = 1'b1;

  // Reset is asserted with an edge before the first clock edge, so that the
  // reset synchronizers are cleared asynchronously.
  initial #2 rst_n = 1'b0;
  logic [3:0] buttons = '0;
  logic bclk, lrclk, adata;
  logic sclk, sdat_in, sdat_out, sdat_dir, config_done;
  logic drive_low, nack_next, sda;
  int checks = 0, failures = 0, mism = 0, frames = 0;

  localparam logic [15:0] EXP [10] = '{
    16'h001A, 16'h021A, 16'h046E, 16'h066E, 16'h0812,
    16'h0A00, 16'h0C00, 16'h0E01, 16'h1002, 16'h1201
  };

  always #27.78 clk_18m = !clk_18m;
  always #10    clk_50m = !clk_50m;

  audio_system dut (
    .clk_18m (clk_18m), .clk_50m (clk_50m), .rst_n (rst_n), .buttons (buttons),
    .aud_bclk_out (bclk), .aud_lrclk_out (lrclk), .aud_data_out (adata),
    .sclk_out (sclk), .sdat_in (sdat_in), .sdat_out (sdat_out),
    .sdat_dir (sdat_dir), .config_done (config_done));

  // Pad buffer and pull-up: the controller drives when sdat_dir is high,
  // otherwise the codec pulls the line low or it floats high.
  assign sda     = sdat_dir ? sdat_out : !drive_low;
  assign sdat_in = sda;

  codec_i2c_model codec (
    .clk (clk_50m), .scl (sclk), .sda (sda), .nack_next (nack_next),
    .drive_low (drive_low));
  // Refuse slot 10 (second byte of word 3) and slot 23 (address byte of the
  // first attempt at word 7, after word 3 was resent).
  assign nack_next = (codec.n_ack_slots == 10) || (codec.n_ack_slots == 23);

  codec_audio_rx rx (.bclk (bclk), .lrclk (lrclk), .data (adata));
  synth_ref_model ref_m (.clk (clk_18m), .rst_n (rst_n), .buttons (buttons), .lrclk (lrclk));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(rx.frame_tgl) if (rx.n_frames != 0) begin
    logic [15:0] e;
    e = ref_m.exp_q.pop_front();
    frames++;
    if (rx.left_q != e || rx.right_q != e) begin
      mism++;
      if (mism < 10) $display("FAIL: frame %0d got %h/%h expected %h", frames, rx.left_q, rx.right_q, e);
    end
  end

  longint unsigned cyc = 0, t_f = 0;
  int unsigned frame_bad = 0;
  logic lr_p = 1'b0;
  always @(posedge clk_18m) begin
    cyc  <= cyc + 1;
    lr_p <= lrclk;
    if (rst_n && lrclk && !lr_p) begin
      if (t_f != 0 && cyc - t_f != 384) frame_bad <= frame_bad + 1;
      t_f <= cyc;
    end
  end

  initial begin
    #60ms;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [3:0] PATTERN [8] = '{4'b0001, 4'b0010, 4'b0100, 4'b1000,
                                         4'b0011, 4'b0000, 4'b1100, 4'b1111};

  // Buttons, in the 18 MHz domain.
  bit play_done = 1'b0;
  initial begin
    repeat (3) @(posedge clk_18m);
    #5 rst_n = 1'b1;
    repeat (1000) @(posedge clk_18m);
    foreach (PATTERN[i]) begin
      #5 buttons = PATTERN[i];
      repeat (70_000) @(posedge clk_18m);
    end
    #5 buttons = '0;
    repeat (2000) @(posedge clk_18m);
    play_done = 1'b1;
  end

  initial begin
    int unsigned starts_at_done;
    codec.exp_len = 28 * 1000;
    codec.exp_gap = 1000;
    wait (!rst_n);
    wait (rst_n);
    check(!config_done, "configuration not done right after reset");
    wait (config_done);
    starts_at_done = codec.n_starts;
    wait (play_done);
    check(codec.n_starts == starts_at_done, "I2C bus quiet after configuration");
    check(codec.n_writes == 10, $sformatf("10 configuration writes (got %0d)", codec.n_writes));
    for (int i = 0; i < 10; i++)
      check(codec.wlog[i] == EXP[i],
            $sformatf("write %0d: got %h expected %h", i, codec.wlog[i], EXP[i]));
    check(codec.n_nacks == 2 && codec.n_starts == 12,
          $sformatf("2 resends after refused acknowledges (%0d refused, %0d starts)",
                    codec.n_nacks, codec.n_starts));
    check(codec.n_glitches == 0 && codec.n_len_bad == 0 && codec.n_gap_bad == 0,
          "I2C bus timing");
    check(frames > 1400, $sformatf("audio frames received (%0d)", frames));
    check(mism == 0, $sformatf("audio frames match the reference (%0d mismatches)", mism));
    check(frame_bad == 0, "audio frame of 384 clocks");
    for (int i = 0; i < 4; i++) begin
      check(ref_m.on_clocks[i] > 0, $sformatf("tone %0d played", i));
      check(ref_m.n_releases[i] > 0, $sformatf("tone %0d released", i));
    end
    check(ref_m.n_wraps > 0, "sum overflow (wrap) occurred");
    $display("mechanisms: config writes %0d, resends %0d, wrapped frames %0d, frames %0d",
             codec.n_writes, codec.n_nacks, ref_m.n_wraps, frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
