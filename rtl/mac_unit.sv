// mac_unit: the multiply-add unit of the single multiplier filter processor.
//
// Computes one Pre-Calculated Value per clock of the processor:
//   pcv = acc_in + x * h        (neg = 0)
//   pcv = acc_in - x * h        (neg = 1)
// where acc_in is the content of the PCVM cell addressed by the current
// coefficient word. The product comes from an array_mult instance and is
// sign extended to the PCV width. The subtraction is applied after the
// multiplier, so a folded anti-symmetric pair can reuse one product without
// the multiplier inputs changing.
//
// Interface: x (DATA_W, signed data sample), h (COEF_W, signed coefficient),
// neg, acc_in and pcv (PCV_W, signed). Combinational.
//
// The multiply-add operation is the one the scheme defines; the neg input
// for anti-symmetric coefficient pairs is this design's addition.
module mac_unit #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned COEF_W = 8,
  parameter int unsigned PCV_W  = 23
) (
  input  logic signed [DATA_W-1:0] x,
  input  logic signed [COEF_W-1:0] h,
  input  logic                     neg,
  input  logic signed [PCV_W-1:0]  acc_in,
  output logic signed [PCV_W-1:0]  pcv
);

  logic signed [DATA_W+COEF_W-1:0] prod;
  logic signed [PCV_W-1:0]         prod_ext;

  array_mult #(.A_W(DATA_W), .B_W(COEF_W)) u_mult (
    .a(x),
    .b(h),
    .p(prod)
  );

  assign prod_ext = PCV_W'(prod);

  always_comb begin
    if (neg) pcv = acc_in - prod_ext;
    else     pcv = acc_in + prod_ext;
  end

endmodule
