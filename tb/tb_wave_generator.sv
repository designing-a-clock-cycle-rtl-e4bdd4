// tb_wave_generator: self-checking testbench of the triangle wave generator.
//
// Two instances run: one with a small peak (STEP 3, PEAK 1000) for a fast,
// cycle-by-cycle comparison with a reference triangle computed here, and one
// at the default parameters (STEP 2, PEAK 32767). For both, the time between
// two successive +PEAK samples must be 2 * ceil(2 * PEAK / STEP) clocks
// (65534 clocks by default: 274.7 Hz at 18 MHz). Releasing the button must
// bring the output to zero on the next clock and keep it there, and a new
// press must restart the ramp from zero.
`timescale 1ns / 1ps
module tb_wave_generator;

  import audio_pkg::*;

  localparam int SSTEP = 3, SPEAK = 1000;

  logic clk = 1'b0, rst_n = 1'b0, btn_s = 1'b0, btn_d = 1'b0;
  sample_t val_s, val_d;
  int checks = 0, failures = 0;

  always #27.78 clk = !clk;   // 18 MHz

  wave_generator #(.STEP(SSTEP), .PEAK(SPEAK)) dut_s (
    .clk (clk), .rst_n (rst_n), .button_in (btn_s), .value_out (val_s));
  wave_generator dut_d (
    .clk (clk), .rst_n (rst_n), .button_in (btn_d), .value_out (val_d));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Reference model for the small instance.
  int ref_v = 0;
  bit ref_up = 1'b1;
  int mism = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (!btn_s) begin
        ref_v  = 0;
        ref_up = 1'b1;
      end else if (ref_up) begin
        if (ref_v + SSTEP >= SPEAK) begin ref_v = SPEAK; ref_up = 1'b0; end
        else ref_v = ref_v + SSTEP;
      end else begin
        if (ref_v - SSTEP <= -SPEAK) begin ref_v = -SPEAK; ref_up = 1'b1; end
        else ref_v = ref_v - SSTEP;
      end
    end
  end
  always @(negedge clk) if (rst_n && int'(val_s) != ref_v) mism++;

  // Measure the period between +PEAK samples of an instance.
  task automatic period(input bit dflt, input int peak, output int clocks);
    int t;
    t = 0;
    if (dflt) begin
      while (int'(val_d) != peak) @(negedge clk);
      @(negedge clk);
      while (int'(val_d) != peak) begin @(negedge clk); t++; end
    end else begin
      while (int'(val_s) != peak) @(negedge clk);
      @(negedge clk);
      while (int'(val_s) != peak) begin @(negedge clk); t++; end
    end
    clocks = t + 1;
  endtask

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check(val_s == 0 && val_d == 0, "zero while released");
    btn_s = 1'b1;
    @(negedge clk);
    check(int'(val_s) == SSTEP, "first step after press");
    period(1'b0, SPEAK, p);
    check(p == 2 * ((2 * SPEAK + SSTEP - 1) / SSTEP),
          $sformatf("small period %0d clocks", p));
    repeat (137) @(negedge clk);
    btn_s = 1'b0;
    @(negedge clk);
    check(val_s == 0, "zero on release");
    repeat (50) @(negedge clk);
    check(val_s == 0, "held at zero while released");
    btn_s = 1'b1;
    repeat (2) @(negedge clk);
    check(int'(val_s) == 2 * SSTEP, "restart from zero");
    repeat (3000) @(negedge clk);
    check(mism == 0, $sformatf("cycle-by-cycle match (%0d mismatches)", mism));
    // Default instance: full-scale triangle.
    btn_d = 1'b1;
    period(1'b1, 32767, p);
    check(p == 65534, $sformatf("default period %0d clocks", p));
    while (int'(val_d) != -32767) @(negedge clk);
    check(1'b1, "reaches -32767");
    btn_d = 1'b0;
    @(negedge clk);
    check(val_d == 0, "default zero on release");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
