// codec_i2c_model: behavioural model of the I2C slave side of a WM8731 codec,
// for testbenches only.
//
// The model oversamples SCLK and the resolved SDAT line on the falling edge of
// the system clock. It detects start and stop conditions, shifts in a bit on
// every rising SCLK edge, and after eight bits pulls SDAT low (drive_low)
// from the next falling SCLK edge to the one after it, unless nack_next is
// high, in which case it leaves the line high (not acknowledged). A transfer
// of three acknowledged bytes whose first byte is the device address 0x34
// ends, at its stop condition, as one logged 16-bit register write. It also
// counts starts, stops, acknowledge slots, refused slots, SDAT changes during
// SCLK high that were not a start or stop, and the clocks from each start to
// its stop and from each stop to the next start.
module codec_i2c_model #(
  parameter int unsigned MAX_LOG = 64
) (
  input  logic clk,
  input  logic scl,
  input  logic sda,        // resolved bus value
  input  logic nack_next,  // refuse the next acknowledge slot
  output logic drive_low
);

  logic        scl_p = 1'b1, sda_p = 1'b1;
  logic        in_xfer = 1'b0, ack_phase = 1'b0, all_acked = 1'b0;
  int unsigned bit_cnt = 0, byte_cnt = 0;
  logic [7:0]  shreg = '0;
  logic [7:0]  bytes [3];

  logic [15:0] wlog [MAX_LOG];
  int unsigned n_writes = 0, n_starts = 0, n_stops = 0;
  int unsigned n_ack_slots = 0, n_nacks = 0, n_bad_addr = 0, n_glitches = 0;
  longint unsigned cyc = 0, t_start = 0, t_stop = 0;
  int unsigned last_xfer_len = 0, last_gap = 0;
  int unsigned n_len_bad = 0, n_gap_bad = 0;
  int unsigned exp_len = 0, exp_gap = 0;   // set by the testbench, 0 = unchecked

  initial drive_low = 1'b0;

  always @(negedge clk) begin
    cyc <= cyc + 1;
    scl_p <= scl;
    sda_p <= sda;
    if (scl_p && scl && sda_p && !sda) begin                 // start
      n_starts  <= n_starts + 1;
      in_xfer   <= 1'b1;
      ack_phase <= 1'b0;
      all_acked <= 1'b1;
      bit_cnt   <= 0;
      byte_cnt  <= 0;
      t_start   <= cyc;
      if (n_stops > 0) begin
        last_gap <= int'(cyc - t_stop);
        if (exp_gap != 0 && int'(cyc - t_stop) != exp_gap) n_gap_bad <= n_gap_bad + 1;
      end
    end else if (scl_p && scl && !sda_p && sda) begin        // stop
      n_stops <= n_stops + 1;
      t_stop  <= cyc;
      if (in_xfer) begin
        last_xfer_len <= int'(cyc - t_start);
        if (exp_len != 0 && all_acked && int'(cyc - t_start) != exp_len)
          n_len_bad <= n_len_bad + 1;
      end
      if (in_xfer && all_acked && byte_cnt == 3) begin
        if (bytes[0] != 8'h34) n_bad_addr <= n_bad_addr + 1;
        if (n_writes < MAX_LOG) wlog[n_writes] <= {bytes[1], bytes[2]};
        n_writes <= n_writes + 1;
      end
      in_xfer <= 1'b0;
    end else if (scl_p && scl && sda_p != sda) begin
      n_glitches <= n_glitches + 1;
    end else if (!scl_p && scl && in_xfer && !ack_phase) begin  // rising SCLK
      shreg   <= {shreg[6:0], sda};
      bit_cnt <= bit_cnt + 1;
    end else if (scl_p && !scl && in_xfer) begin              // falling SCLK
      if (!ack_phase && bit_cnt == 8) begin
        ack_phase   <= 1'b1;
        bit_cnt     <= 0;
        n_ack_slots <= n_ack_slots + 1;
        if (byte_cnt < 3) bytes[byte_cnt] <= shreg;
        byte_cnt    <= byte_cnt + 1;
        if (nack_next) begin
          n_nacks   <= n_nacks + 1;
          all_acked <= 1'b0;
          drive_low <= 1'b0;
        end else begin
          drive_low <= 1'b1;
        end
      end else if (ack_phase) begin
        ack_phase <= 1'b0;
        drive_low <= 1'b0;
      end
    end
  end

endmodule
