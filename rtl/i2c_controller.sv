// i2c_controller: configures the WM8731 audio codec over I2C after reset.
//
// When reset is released the controller writes NUM_CFG configuration words to
// the codec, one I2C transfer each: a start condition, three bytes sent MSB
// first (device address + write bit, {register, data[8]}, data[7:0]), each
// followed by an acknowledge slot, and a stop condition. If the codec does not
// pull SDAT low in an acknowledge slot, the transfer is ended with a stop and
// all three bytes of the same word are sent again, until it is acknowledged.
// After the last word the controller idles with SDAT high and raises done.
//
// SCLK is produced by a free-running counter that toggles it every
// CLK_HZ / (2 * SCL_HZ) clocks (500 clocks: 50 kHz from 50 MHz), so SCLK keeps
// toggling while the bus is idle. SDAT changes in the middle of SCLK half
// periods: in the middle of a low half it gets the next data bit, in the
// middle of a high half a start (SDAT falls) or a stop (SDAT rises) is made
// and the acknowledge is sampled. Data are therefore stable over every SCLK
// high half, as the I2C standard requires. The line is handed to the codec
// for the acknowledge slot on the SCLK falling edge after the eighth bit and
// taken back, driven low, on the falling edge that ends the slot, the edges
// on which the codec itself starts and stops driving. One transfer takes 28
// SCLK periods from start to stop, and the next start follows one period
// after the stop.
//
// The SDAT pin is not driven here: sdat_out, sdat_in and sdat_dir go to an
// external bidirectional pad buffer. sdat_dir is 1 when the controller drives
// the line and 0 during the acknowledge slots, when the codec drives it. All
// outputs are registers written on every clock, so sdat_dir does not
// oscillate while the controller drives the line: one complete controller
// step per clock, the behaviour the pipelined schedule gives.
//
// From the described system: the 50 MHz clock, the 50 kHz SCLK and its
// counter-based generation, the ten words of three bytes, MSB-first bytes,
// the acknowledge slot, the resend on a missing acknowledge, the
// SDAT_DIR convention and the idle state. Two assertions state the bus rules
// the controller keeps. This design's own choices: the
// mid-half-period and falling-edge decision points, the stop/start pair used for a resend,
// the active-low asynchronous reset, SCLK starting high, and the done output.
module i2c_controller
  import audio_pkg::*;
#(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned SCL_HZ = 50_000
) (
  input  logic clk,
  input  logic rst_n,
  output logic sclk_out,
  input  logic sdat_in,
  output logic sdat_out,
  output logic sdat_dir,
  output logic done
);

  localparam int unsigned HALF = CLK_HZ / (2 * SCL_HZ);
  localparam int unsigned MID  = HALF / 2;
  localparam int unsigned CW   = $clog2(HALF + 1);
  localparam int unsigned IW   = $clog2(NUM_CFG + 1);

  initial assert (HALF >= 4) else $error("CLK_HZ must be at least 8 * SCL_HZ");

  typedef enum logic [2:0] {
    ST_START, ST_BIT, ST_ACK, ST_STOP, ST_IDLE
  } state_t;

  state_t         state;
  logic [CW-1:0]  cnt;
  logic           sclk_q;
  logic [3:0]     bit_cnt;
  logic [1:0]     byte_idx;
  logic [IW-1:0]  cfg_idx;
  logic           acked;

  // Decision points in the middle of an SCLK half period.
  // The falling SCLK edge is the clock on which sclk_q goes low.
  logic mid, mid_high, mid_low, fall;
  assign mid      = (cnt == CW'(MID - 1));
  assign mid_high = mid &&  sclk_q;
  assign mid_low  = mid && !sclk_q;
  assign fall     = (cnt == CW'(HALF - 1)) && sclk_q;

  function automatic logic [7:0] tx_byte(input logic [IW-1:0] c, input logic [1:0] b);
    cfg_word_t w;
    w = CODEC_CFG[c];
    unique case (b)
      2'd0:    return CODEC_ADDR_W;
      2'd1:    return w[15:8];
      default: return w[7:0];
    endcase
  endfunction

  logic [7:0] cur_byte;
  assign cur_byte = tx_byte(cfg_idx, byte_idx);

  // SCLK generation.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      sclk_q <= 1'b1;
    end else if (cnt == CW'(HALF - 1)) begin
      cnt    <= '0;
      sclk_q <= !sclk_q;
    end else begin
      cnt    <= cnt + 1'b1;
    end
  end

  // Transfer state machine.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_START;
      sdat_out <= 1'b1;
      sdat_dir <= 1'b1;
      bit_cnt  <= '0;
      byte_idx <= '0;
      cfg_idx  <= '0;
      acked    <= 1'b0;
      done     <= 1'b0;
    end else begin
      unique case (state)
        ST_START: if (mid_high) begin
          sdat_out <= 1'b0;              // start: SDAT falls while SCLK high
          bit_cnt  <= '0;
          byte_idx <= '0;
          state    <= ST_BIT;
        end
        ST_BIT: begin
          if (mid_low && bit_cnt != 4'd8) begin
            sdat_out <= cur_byte[3'd7 - bit_cnt[2:0]];
            bit_cnt  <= bit_cnt + 4'd1;
          end
          if (fall && bit_cnt == 4'd8) begin
            sdat_dir <= 1'b0;            // release SDAT for the acknowledge
            state    <= ST_ACK;
          end
        end
        ST_ACK: begin
          if (mid_high) acked <= !sdat_in;  // codec pulls SDAT low to acknowledge
          if (fall) begin
            sdat_dir <= 1'b1;            // take SDAT back, low like the acknowledge
            sdat_out <= 1'b0;
            if (acked && byte_idx != 2'd2) begin
              byte_idx <= byte_idx + 2'd1;
              bit_cnt  <= '0;
              state    <= ST_BIT;
            end else begin
              state    <= ST_STOP;       // SDAT stays low until the stop
            end
          end
        end
        ST_STOP: if (mid_high) begin
          sdat_out <= 1'b1;              // stop: SDAT rises while SCLK high
          if (!acked) begin
            state <= ST_START;           // resend the whole word
          end else if (cfg_idx == IW'(NUM_CFG - 1)) begin
            done  <= 1'b1;
            state <= ST_IDLE;
          end else begin
            cfg_idx <= cfg_idx + 1'b1;
            state   <= ST_START;
          end
        end
        ST_IDLE: begin
          sdat_out <= 1'b1;
          sdat_dir <= 1'b1;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign sclk_out = sclk_q;

  // Bus rules: while SCLK stays high, SDAT changes only as a start or stop
  // condition, and the line is released only during an acknowledge slot.
  a_sdat_stable_high: assert property (@(posedge clk) disable iff (!rst_n)
      (sclk_q && $past(sclk_q) && sdat_out != $past(sdat_out))
      |-> ($past(state) == ST_START || $past(state) == ST_STOP))
    else $error("SDAT changed while SCLK high outside start/stop");
  a_release_in_ack: assert property (@(posedge clk) disable iff (!rst_n)
      !sdat_dir |-> state == ST_ACK)
    else $error("SDAT released outside an acknowledge slot");

endmodule
