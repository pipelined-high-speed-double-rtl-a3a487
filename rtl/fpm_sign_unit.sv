// fpm_sign_unit: sign of the product of two IEEE-754 numbers.
//
// The product is negative when exactly one operand is negative, so the
// result sign is the exclusive-or of the two sign bits (bit 63 of each
// binary64 operand). This is the design description's sign calculation
// unit, unchanged.
//
// Interface: sign_a, sign_b in; sign_result out. Combinational.
module fpm_sign_unit (
  input  logic sign_a,
  input  logic sign_b,
  output logic sign_result
);

  assign sign_result = sign_a ^ sign_b;

endmodule
