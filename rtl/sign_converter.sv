// sign_converter: turns a two's-complement operand into its magnitude.
//
// When the sign bit is 1 the output is the two's complement of the operand,
// otherwise the operand is copied. The magnitude is W bits wide and unsigned,
// so even the most negative input, -2^(W-1), comes out right. The sign bit is
// a separate input, as in the multiplier drawing this follows; it is normally
// the operand's MSB. Purely combinational.
module sign_converter #(
  parameter int W = 18
) (
  input  logic         sign,
  input  logic [W-1:0] value,
  output logic [W-1:0] magnitude
);
  always_comb magnitude = sign ? (~value + W'(1)) : value;
endmodule
