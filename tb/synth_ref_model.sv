// synth_ref_model: cycle-level reference of the audio synthesizer's sample
// stream, for testbenches only.
//
// It mirrors, on the falling clock edge, what the synthesizer's registers
// hold after each rising edge: a two-stage button synchronizer and four
// triangle generators (per-clock steps 2, 3, 4, 5, peak +/-32767, zero while
// the button is released), and their sum cut to 16 bits. When it sees
// aud_lrclk_out rise it appends the sum the controller captured on that edge
// (the one from before the edge) to exp_q, the queue of words the next frame
// must carry. It also counts frames whose true sum left the 16-bit range
// (n_wraps) and, per tone, clocks with the tone on (on_clocks) and releases
// (n_releases).
module synth_ref_model (
  input logic       clk,
  input logic       rst_n,
  input logic [3:0] buttons,
  input logic       lrclk
);

  localparam int STEP [4] = '{2, 3, 4, 5};
  localparam int PEAK = 32767;

  int   v [4] = '{0, 0, 0, 0};
  bit   up [4] = '{1, 1, 1, 1};
  logic [3:0] b_in = '0, b_meta = '0, b_sync = '0;
  logic lr_p = 1'b0;
  logic [15:0] exp_q [$];
  int unsigned n_wraps = 0;
  int unsigned on_clocks [4] = '{0, 0, 0, 0};
  int unsigned n_releases [4] = '{0, 0, 0, 0};

  always @(negedge clk) begin
    int s;
    s = v[0] + v[1] + v[2] + v[3];
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) begin v[i] = 0; up[i] = 1'b1; end
      b_meta = '0;
      b_sync = '0;
      lr_p   = 1'b0;
    end else begin
      if (lrclk && !lr_p) begin
        exp_q.push_back(s[15:0]);
        if (s > 32767 || s < -32768) n_wraps++;
      end
      lr_p = lrclk;
      for (int i = 0; i < 4; i++) begin
        if (!b_sync[i]) begin
          if (v[i] != 0 || !up[i]) n_releases[i]++;
          v[i] = 0;
          up[i] = 1'b1;
        end else begin
          on_clocks[i]++;
          if (up[i]) begin
            if (v[i] + STEP[i] >= PEAK) begin v[i] = PEAK; up[i] = 1'b0; end
            else v[i] = v[i] + STEP[i];
          end else begin
            if (v[i] - STEP[i] <= -PEAK) begin v[i] = -PEAK; up[i] = 1'b1; end
            else v[i] = v[i] - STEP[i];
          end
        end
      end
      b_sync = b_meta;
      b_meta = b_in;
    end
    // The buttons seen here are the ones the synthesizer samples on the
    // next rising edge (the testbenches change them just after a rising edge).
    if (!rst_n) b_in = '0;
    else begin
      b_in = buttons;
    end
  end

endmodule
