// adder: mixes the synthesizer's tone generators into one sample.
//
// operands_in holds N two's complement samples of W bits side by side,
// operand i in bits [i*W +: W]. They are added at full precision
// (W + log2(N) bits) and the sum is cut back to W bits by dropping its most
// significant bits, two of them for the four 16-bit operands. The result thus
// wraps around when the true sum leaves the W-bit range, which distorts the
// sound when several tones are on together. Purely combinational.
//
// The four 16-bit operands, the 64-bit operand bus, the 16-bit sum and the
// dropping of the two MSBs follow the described system; treating the samples
// as signed is this design's own choice (it does not change the kept bits).
module adder #(
  parameter int unsigned N = 4,
  parameter int unsigned W = 16
) (
  input  logic [N*W-1:0] operands_in,
  output logic [W-1:0]   sum_out
);

  localparam int unsigned SW = W + $clog2(N);

  logic signed [SW-1:0] full_sum;

  always_comb begin
    full_sum = '0;
    for (int i = 0; i < N; i++)
      full_sum = full_sum + SW'($signed(operands_in[i*W +: W]));
  end

  assign sum_out = full_sum[W-1:0];

endmodule
