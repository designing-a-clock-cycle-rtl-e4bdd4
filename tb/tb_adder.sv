// tb_adder: self-checking testbench of the four-operand sample adder.
//
// Drives directed cases (zeros, one operand, full-scale sums that wrap in both
// directions) and 2000 random operand sets, and compares sum_out with the
// reference: the integer sum of the four sign-extended 16-bit operands, cut to
// its 16 low bits. It also counts how many cases wrapped (the true sum left the
// 16-bit signed range) and fails if none did.
`timescale 1ns / 1ps
module tb_adder;

  logic [63:0] ops;
  logic [15:0] sum;
  int checks = 0, failures = 0, wraps = 0;

  adder dut (.operands_in (ops), .sum_out (sum));

  task automatic apply(input logic [15:0] a, b, c, d);
    int full;
    logic [15:0] exp;
    ops = {d, c, b, a};
    #1;
    full = int'($signed(a)) + int'($signed(b)) + int'($signed(c)) + int'($signed(d));
    exp  = full[15:0];
    if (full > 32767 || full < -32768) wraps++;
    checks++;
    if (sum !== exp) begin
      failures++;
      $display("FAIL: %h+%h+%h+%h got %h expected %h", a, b, c, d, sum, exp);
    end
  endtask

  initial begin
    #100_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(16'h0000, 16'h0000, 16'h0000, 16'h0000);
    apply(16'h1234, 16'h0000, 16'h0000, 16'h0000);
    apply(16'h0000, 16'h0000, 16'h0000, 16'hFEDC);
    apply(16'h7FFF, 16'h7FFF, 16'h0000, 16'h0000);   // wraps positive
    apply(16'h7FFF, 16'h7FFF, 16'h7FFF, 16'h7FFF);
    apply(16'h8001, 16'h8001, 16'h8001, 16'h8001);   // wraps negative
    apply(16'h4000, 16'h4000, 16'hC000, 16'hC000);
    for (int i = 0; i < 2000; i++)
      apply(16'($urandom), 16'($urandom), 16'($urandom), 16'($urandom));
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("FAIL: no overflow case exercised");
    end
    $display("adder: %0d of %0d cases wrapped", wraps, checks - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
