// sign_corrector: gives an unsigned product the sign of the signed product.
//
// A comparator looks at the two operand sign bits. In the normal variant
// (NEG_ON_SAME = 0) the product is negated (two's complement) when the signs
// differ. The variant for the b*d term of the complex product
// (NEG_ON_SAME = 1) negates when the signs are equal, which folds the
// j*j = -1 of that term into the sign. The output is one bit wider than the
// magnitude so that every result is representable. Combinational.
module sign_corrector #(
  parameter int W           = 46,
  parameter bit NEG_ON_SAME = 1'b0
) (
  input  logic                sign_a,
  input  logic                sign_b,
  input  logic [W-1:0]        magnitude,
  output logic signed [W:0]   product
);
  logic negate;
  always_comb begin
    negate  = NEG_ON_SAME ? (sign_a == sign_b) : (sign_a != sign_b);
    product = negate ? -$signed({1'b0, magnitude}) : $signed({1'b0, magnitude});
  end
endmodule
