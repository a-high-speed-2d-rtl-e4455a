// mult_kernel: a 3-tap row kernel built with multipliers, the alternative to
// the shift-based kernels. y = K0*a + K1*b + K2*c. The coefficients are
// parameters, so the same module gives [1 2 1] (defaults) and [2 4 2].
// Purely combinational; the enclosing pipeline registers y. COEF_W must
// hold the largest coefficient, and y is wide enough for
// (K0+K1+K2) * (2**PIX_W - 1) as long as K0+K1+K2 < 2**COEF_W.
module mult_kernel #(
  parameter int unsigned PIX_W  = 8,
  parameter int unsigned COEF_W = 3,
  parameter int unsigned K0     = 1,
  parameter int unsigned K1     = 2,
  parameter int unsigned K2     = 1
) (
  input  logic [PIX_W-1:0]        a,   // left pixel
  input  logic [PIX_W-1:0]        b,   // centre pixel
  input  logic [PIX_W-1:0]        c,   // right pixel
  output logic [PIX_W+COEF_W-1:0] y
);
  localparam int unsigned YW = PIX_W + COEF_W;
  localparam logic [COEF_W-1:0] C0 = COEF_W'(K0);
  localparam logic [COEF_W-1:0] C1 = COEF_W'(K1);
  localparam logic [COEF_W-1:0] C2 = COEF_W'(K2);

  always_comb begin
    y = YW'(a) * YW'(C0) + YW'(b) * YW'(C1) + YW'(c) * YW'(C2);
  end
endmodule
