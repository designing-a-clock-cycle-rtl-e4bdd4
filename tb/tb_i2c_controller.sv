// tb_i2c_controller: self-checking testbench of the I2C codec configuration
// controller at its default 50 MHz / 50 kHz setting.
//
// A behavioural codec model acknowledges the bytes, except for two slots the
// testbench makes it refuse (the second byte of word 3 and the address byte of
// word 7), which must make the controller resend those words. Checked: the
// ten logged register writes against the expected words, in order; SCLK half
// periods of exactly 500 clocks; 28 SCLK periods from each acknowledged start
// to its stop and one period from a stop to the next start; one start per
// transfer attempt; SDAT changing under SCLK high only as a start or stop;
// no contention (controller driving high while the codec pulls low); SDAT_DIR
// low exactly once per acknowledge slot, for one SCLK period; done raised
// after the last word and the bus quiet afterwards.
`timescale 1ns / 1ps
module tb_i2c_controller;

  localparam int unsigned HALF = 500;

  logic clk = 1'b0, rst_n = 1'b0;
  logic sclk, sdat_in, sdat_out, sdat_dir, done;
  logic drive_low, nack_next;
  logic sda;

  int checks = 0, failures = 0;

  // Expected configuration words {register[6:0], data[8:0]}.
  localparam logic [15:0] EXP [10] = '{
    16'h001A, 16'h021A, 16'h046E, 16'h066E, 16'h0812,
    16'h0A00, 16'h0C00, 16'h0E01, 16'h1002, 16'h1201
  };

  always #10 clk = !clk;   // 50 MHz

  assign sda     = sdat_dir ? sdat_out : !drive_low;
  assign sdat_in = sda;

  i2c_controller dut (
    .clk (clk), .rst_n (rst_n), .sclk_out (sclk), .sdat_in (sdat_in),
    .sdat_out (sdat_out), .sdat_dir (sdat_dir), .done (done)
  );

  codec_i2c_model codec (
    .clk (clk), .scl (sclk), .sda (sda), .nack_next (nack_next),
    .drive_low (drive_low)
  );

  always_comb begin
    // Acknowledge slots are numbered from 0, three per word. Slots before the first refusal run 3 per word. After refusing slot 10
    // (word 3, byte 1) the resent word 3 takes slots 11..13, word 4..6 take
    // 14..22, so the address byte of word 7 is slot 23.
    nack_next = (codec.n_ack_slots == 10) || (codec.n_ack_slots == 23);
  end

  // SCLK half period and SDAT_DIR low period.
  longint unsigned cyc = 0, t_sclk = 0, t_dir = 0;
  int unsigned half_bad = 0, half_seen = 0, dir_lows = 0, dir_bad = 0, contention = 0;
  logic sclk_p = 1'b1, dir_p = 1'b1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      sclk_p <= sclk;
      dir_p  <= sdat_dir;
      if (sclk != sclk_p) begin
        if (t_sclk != 0) begin
          half_seen <= half_seen + 1;
          if (cyc - t_sclk != HALF) half_bad <= half_bad + 1;
        end
        t_sclk <= cyc;
      end
      if (dir_p && !sdat_dir) begin
        dir_lows <= dir_lows + 1;
        t_dir    <= cyc;
      end
      if (!dir_p && sdat_dir && (cyc - t_dir != 2 * HALF)) dir_bad <= dir_bad + 1;
    end
  end
  always @(negedge clk) if (sdat_dir && sdat_out && drive_low) contention <= contention + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Watchdog.
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned starts_at_done;
    codec.exp_len = 28 * 2 * HALF;
    codec.exp_gap = 2 * HALF;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    check(done == 1'b0, "done low after reset");
    wait (done);
    starts_at_done = codec.n_starts;
    // The bus must stay quiet after the configuration.
    repeat (40 * 2 * HALF) @(posedge clk);
    check(codec.n_starts == starts_at_done, "no start after done");
    check(codec.n_writes == 10, $sformatf("10 writes logged (got %0d)", codec.n_writes));
    for (int i = 0; i < 10; i++)
      check(codec.wlog[i] == EXP[i],
            $sformatf("write %0d: got %h expected %h", i, codec.wlog[i], EXP[i]));
    check(codec.n_nacks == 2, $sformatf("two refused slots (got %0d)", codec.n_nacks));
    check(codec.n_starts == 12, $sformatf("12 starts (got %0d)", codec.n_starts));
    check(codec.n_stops == 12, $sformatf("12 stops (got %0d)", codec.n_stops));
    // 30 ack slots for the ten words, 2 for the word refused at its second
    // byte, 1 for the word refused at its address byte.
    check(codec.n_ack_slots == 33, $sformatf("33 ack slots (got %0d)", codec.n_ack_slots));
    check(dir_lows == 33, $sformatf("SDAT_DIR low 33 times (got %0d)", dir_lows));
    check(dir_bad == 0, "SDAT_DIR low for exactly one SCLK period");
    check(codec.n_bad_addr == 0, "device address byte 0x34");
    check(codec.n_glitches == 0, "SDAT stable while SCLK high");
    check(codec.n_len_bad == 0, "28 SCLK periods from start to stop");
    check(codec.n_gap_bad == 0, "one SCLK period from stop to next start");
    check(contention == 0, "no drive contention on SDAT");
    check(half_seen > 600 && half_bad == 0, $sformatf("seen %0d bad %0d: SCLK half period of 500 clocks (50 kHz)", half_seen, half_bad));
    check(sdat_dir && sdat_out, "idle bus driven high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
