// cdma_gilbert_cell - four-quadrant multiplier of two correlator outputs.
//
// In the synchronizers a Gilbert cell multiplies the correlations with codes
// "c" and "e". Because both codes carry the same data bit, the product is
// positive at alignment whatever that bit is. Here it is an exact signed
// product.
//
// Purely combinational; p is twice as wide as the inputs.
module cdma_gilbert_cell #(
  parameter int unsigned W = 11
) (
  input  logic signed [W-1:0]    a,
  input  logic signed [W-1:0]    b,
  output logic signed [2*W-1:0]  p
);

  assign p = (2*W)'(a) * (2*W)'(b);

endmodule
