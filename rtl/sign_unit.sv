// sign_unit: sign of the product.
//
// The sign of a product is negative exactly when one operand is negative,
// so the result sign is the exclusive OR of the two operand sign bits
// (third step of the multiplication procedure and the XOR box of the
// multiplier block diagram). Purely combinational, no timing of its own.
module sign_unit (
  input  logic sign_a,   // sign bit of operand A
  input  logic sign_b,   // sign bit of operand B
  output logic sign_y    // sign bit of the product
);
  assign sign_y = sign_a ^ sign_b;
endmodule
