// fpm_exponent_unit: exponent of the product before normalization.
//
// The two biased 11-bit exponents are added with an unsigned adder and the
// bias (1023) is subtracted once, as in the design description:
//   exponent_result = exponent_a + exponent_b - 1023.
// The sum is formed on 12 bits, as in the block diagram (0 .. 4094). The
// difference is returned as a 13-bit signed value (-1023 .. 3071): the
// extra bit is this design's own, so that results below the normal range
// stay negative and can be recognised as underflow later.
//
// Interface: exponent_a, exponent_b (biased, 11 bits) in; exponent_sum
// (12 bits) and exponent_result (signed, fpm_pkg::EXPI_W bits) out.
// Combinational.
module fpm_exponent_unit
  import fpm_pkg::*;
(
  input  logic [EXP_W-1:0] exponent_a,
  input  logic [EXP_W-1:0] exponent_b,
  output logic [EXP_W:0]   exponent_sum,
  output exp_t             exponent_result
);

  assign exponent_sum    = {1'b0, exponent_a} + {1'b0, exponent_b};
  assign exponent_result = exp_t'({1'b0, exponent_sum}) - exp_t'(BIAS);

endmodule
