// array_mult: combinational two's complement array multiplier.
//
// p = a * b, with a and b signed. The multiplier is built as an array: one
// row per bit of b, each row adding the partial product b[i] * a, shifted
// left by i, to the sum of the rows above it. The row of the sign bit of b
// has weight -2^(B_W-1) in two's complement, so that row subtracts its
// partial product instead of adding it. The result is exact over the full
// A_W + B_W bit product width.
//
// Interface: a (A_W bits, signed), b (B_W bits, signed), p (A_W+B_W bits,
// signed). Purely combinational, no clock.
//
// The design is evaluated with array multipliers of 8 x 8, 16 x 16 and
// 24 x 24 bits; which array organisation is used is not specified, and the
// row-by-row ripple form here is this design's own choice.
module array_mult #(
  parameter int unsigned A_W = 8,
  parameter int unsigned B_W = 8
) (
  input  logic signed [A_W-1:0]     a,
  input  logic signed [B_W-1:0]     b,
  output logic signed [A_W+B_W-1:0] p
);

  localparam int unsigned P_W = A_W + B_W;

  // Partial sums after each row of the array.
  logic signed [P_W-1:0] row_sum [B_W+1];
  logic signed [P_W-1:0] a_ext;

  assign a_ext      = P_W'(a);  // sign extended multiplicand
  assign row_sum[0] = '0;

  for (genvar i = 0; i < B_W; i++) begin : g_row
    logic signed [P_W-1:0] pp;
    assign pp = b[i] ? (a_ext <<< i) : '0;
    if (i == B_W - 1) begin : g_sign_row
      assign row_sum[i+1] = row_sum[i] - pp;
    end else begin : g_row_add
      assign row_sum[i+1] = row_sum[i] + pp;
    end
  end

  assign p = row_sum[B_W];

endmodule
