// product_term: one signed product of the complex multiplier, built the
// sign-magnitude way.
//
// Both operands go through a sign_converter, the two magnitudes are
// multiplied as unsigned numbers, and a sign_corrector restores the sign
// from the two operand sign bits. NEG_ON_SAME = 1 builds the b*d term, whose
// result is -(b*d) because of j*j = -1. The result is WA+WB bits, enough for
// every operand pair. Combinational; the surrounding block registers it.
module product_term #(
  parameter int WA          = 18,
  parameter int WB          = 28,
  parameter bit NEG_ON_SAME = 1'b0
) (
  input  logic signed [WA-1:0]    a,     // multiplicand
  input  logic signed [WB-1:0]    b,     // multiplier
  output logic signed [WA+WB-1:0] p
);
  logic [WA-1:0]    mag_a;
  logic [WB-1:0]    mag_b;
  // |a| <= 2^(WA-1) and |b| <= 2^(WB-1), so |a*b| <= 2^(WA+WB-2) fits WA+WB-1 bits
  logic [WA+WB-2:0] mag_p;

  sign_converter #(.W(WA)) u_conv_a (.sign(a[WA-1]), .value(a), .magnitude(mag_a));
  sign_converter #(.W(WB)) u_conv_b (.sign(b[WB-1]), .value(b), .magnitude(mag_b));

  assign mag_p = (WA+WB-1)'(mag_a) * (WA+WB-1)'(mag_b);

  sign_corrector #(.W(WA+WB-1), .NEG_ON_SAME(NEG_ON_SAME)) u_corr (
    .sign_a(a[WA-1]), .sign_b(b[WB-1]), .magnitude(mag_p), .product(p)
  );
endmodule
