// fpm_multiplier: pipeline stage 1 of the double precision multiplier.
//
// Each 64-bit operand is unpacked into sign, 11-bit biased exponent and
// 52-bit fraction. The sign unit XORs the signs, the exponent unit adds the
// exponents and removes the bias, and the Dadda multiplier forms the
// 106-bit product of the two 53-bit significands 1.M (the hidden one is
// prepended). The product of two numbers in [1,2) lies in [1,4): when its
// top bit is set it is shifted right by one place and the exponent is
// incremented (the normalization and exponent adjust of the block
// diagram). The normalized product is handed on as a 56-bit word:
//   bit 55      0, room for the carry of a later rounding increment
//   bits 54:2   53-bit significand, leading one at bit 54
//   bit 1       guard bit, the first bit below the significand
//   bit 0       sticky bit, OR of every bit below the guard bit
//
// Interface: operand_a, operand_b (binary64), enable, clk, rst in;
// sign_result, exponent_result (signed, before rounding) and
// product_result (56 bits) out, all registered.
// Timing: one clock of latency; the output registers load on every clock
// edge with enable high and hold otherwise; rst (synchronous, active high)
// clears them.
//
// The unpacking, the three units, the 106-bit product and the 56-bit
// result width follow the design description. The hidden bit is cleared
// when an exponent is zero, so zeros and subnormal operands give a zero
// significand; the exceptions stage returns a signed zero for them. The
// split of the 56 bits into carry room, significand, guard and sticky,
// the synchronous reset and the 13-bit exponent are this design's own.
module fpm_multiplier
  import fpm_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              enable,
  input  logic [63:0]       operand_a,
  input  logic [63:0]       operand_b,
  output logic              sign_result,
  output exp_t              exponent_result,
  output logic [NORM_W-1:0] product_result
);

  fp64_t op_a, op_b;
  assign op_a = fp64_t'(operand_a);
  assign op_b = fp64_t'(operand_b);

  logic              sign_c;
  logic [EXP_W:0]    exponent_add;
  exp_t              exponent_1;
  logic [SIG_W-1:0]  mul_a, mul_b;
  logic [PROD_W-1:0] product;

  fpm_sign_unit u_sign (
    .sign_a      (op_a.sign),
    .sign_b      (op_b.sign),
    .sign_result (sign_c)
  );

  fpm_exponent_unit u_exponent (
    .exponent_a      (op_a.exponent),
    .exponent_b      (op_b.exponent),
    .exponent_sum    (exponent_add),
    .exponent_result (exponent_1)
  );

  // 1.M: hidden one, present for normal operands only
  assign mul_a = {|op_a.exponent, op_a.fraction};
  assign mul_b = {|op_b.exponent, op_b.fraction};

  dadda_mult #(.N(SIG_W)) u_significand (
    .a (mul_a),
    .b (mul_b),
    .p (product)
  );

  // Normalization: leading one at bit 105 or at bit 104 of the product.
  logic              shift;
  logic [SIG_W-1:0]  significand;
  logic              guard, sticky;
  exp_t              exponent_adj;

  always_comb begin
    shift = product[PROD_W-1];
    if (shift) begin
      significand = product[PROD_W-1 -: SIG_W];
      guard       = product[PROD_W-1-SIG_W];
      sticky      = |product[PROD_W-2-SIG_W:0];
    end else begin
      significand = product[PROD_W-2 -: SIG_W];
      guard       = product[PROD_W-2-SIG_W];
      sticky      = |product[PROD_W-3-SIG_W:0];
    end
    exponent_adj = exponent_1 + exp_t'(shift);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sign_result     <= 1'b0;
      exponent_result <= '0;
      product_result  <= '0;
    end else if (enable) begin
      sign_result     <= sign_c;
      exponent_result <= exponent_adj;
      product_result  <= {1'b0, significand, guard, sticky};
    end
  end

endmodule
