// shift_242: the [2 4 2] row kernel (centre row of the 3x3 Gaussian) without
// a multiplier. y = 2*a + 4*b + 2*c, built from shifts by one and two places.
// Purely combinational; full precision output (8*255 = 2040 fits PIX_W+3
// bits at PIX_W = 8). Normalisation is left to the caller.
module shift_242 #(
  parameter int unsigned PIX_W = 8
) (
  input  logic [PIX_W-1:0] a,   // left pixel
  input  logic [PIX_W-1:0] b,   // centre pixel
  input  logic [PIX_W-1:0] c,   // right pixel
  output logic [PIX_W+2:0] y
);
  always_comb begin
    y = ((PIX_W+3)'(a) << 1) + ((PIX_W+3)'(b) << 2) + ((PIX_W+3)'(c) << 1);
  end
endmodule
