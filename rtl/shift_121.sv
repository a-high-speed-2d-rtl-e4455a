// shift_121: the [1 2 1] row kernel without a multiplier.
// y = a + 2*b + c, the weight 2 being a one-place left shift of the centre
// pixel. Purely combinational; the enclosing pipeline registers y.
// The kernel values follow the design's Gaussian kernel; the output is kept
// at full precision (PIX_W+2 bits, 4*255 = 1020 at PIX_W = 8) and
// normalisation is left to the caller.
module shift_121 #(
  parameter int unsigned PIX_W = 8
) (
  input  logic [PIX_W-1:0] a,   // left pixel
  input  logic [PIX_W-1:0] b,   // centre pixel
  input  logic [PIX_W-1:0] c,   // right pixel
  output logic [PIX_W+1:0] y
);
  always_comb begin
    y = (PIX_W+2)'(a) + ((PIX_W+2)'(b) << 1) + (PIX_W+2)'(c);
  end
endmodule
