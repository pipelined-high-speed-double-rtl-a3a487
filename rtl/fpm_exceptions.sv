// fpm_exceptions: pipeline stage 3 of the double precision multiplier.
//
// Decides the final 64-bit result and the status flags from the original
// operands, the rounded result of stage 2 and the rounding mode. In order
// of priority:
//   * an operand is NaN: the result is the quiet NaN 7FF8_0000_0000_0000;
//     invalid is raised when that NaN is signalling (fraction MSB clear);
//   * infinity times zero: quiet NaN, invalid;
//   * infinity times anything else: infinity with the product's sign;
//   * zero (exponent field 0, which includes subnormals) times a finite
//     number: zero with the product's sign;
//   * biased exponent of the rounded result 2047 or more: overflow and
//     inexact; the result is infinity, or the largest finite number when
//     the rounding mode points toward zero for that sign;
//   * biased exponent 0 or less: underflow and inexact; the result is a
//     zero with the product's sign (no subnormal results);
//   * otherwise the rounded result, with inexact set when a guard or
//     sticky bit was lost.
// exception is raised with invalid, overflow or underflow, and whenever an
// operand is an infinity or a NaN. ready follows valid_in by one clock and
// marks output_FPM as holding a result.
//
// Interface: operand_a, operand_b, in_except (rounded result),
// mantissa_in (guard and sticky), exponent_in (signed), rmode, valid_in,
// enable, clk, rst in; output_FPM, exception, inexact, invalid, overflow,
// underflow, ready out, all registered.
// Timing: one clock of latency, loads when enable is high, synchronous
// active-high reset.
//
// The set of flags and the inputs follow the design description; the
// exact rules (which NaN is returned, subnormals flushed to zero, what
// raises exception) are this design's own, as the description names the
// conditions without defining them.
module fpm_exceptions
  import fpm_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic [1:0]  rmode,
  input  logic        valid_in,
  input  logic [63:0] operand_a,
  input  logic [63:0] operand_b,
  input  logic [63:0] in_except,
  input  logic [1:0]  mantissa_in,
  input  exp_t        exponent_in,
  output logic [63:0] output_FPM,
  output logic        exception,
  output logic        inexact,
  output logic        invalid,
  output logic        overflow,
  output logic        underflow,
  output logic        ready
);

  fp64_t op_a, op_b;
  assign op_a = fp64_t'(operand_a);
  assign op_b = fp64_t'(operand_b);

  logic a_nan, b_nan, a_snan, b_snan, a_inf, b_inf, a_zero, b_zero;
  logic sign;

  assign a_nan  = (op_a.exponent == EXP_MAX) && (op_a.fraction != '0);
  assign b_nan  = (op_b.exponent == EXP_MAX) && (op_b.fraction != '0);
  assign a_snan = a_nan && !op_a.fraction[FRAC_W-1];
  assign b_snan = b_nan && !op_b.fraction[FRAC_W-1];
  assign a_inf  = (op_a.exponent == EXP_MAX) && (op_a.fraction == '0);
  assign b_inf  = (op_b.exponent == EXP_MAX) && (op_b.fraction == '0);
  assign a_zero = (op_a.exponent == '0);
  assign b_zero = (op_b.exponent == '0);
  assign sign   = op_a.sign ^ op_b.sign;

  logic [63:0] result_c;
  logic        inexact_c, invalid_c, overflow_c, underflow_c, special_c;
  logic        to_inf;

  always_comb begin
    result_c    = in_except;
    inexact_c   = 1'b0;
    invalid_c   = 1'b0;
    overflow_c  = 1'b0;
    underflow_c = 1'b0;
    special_c   = a_nan | b_nan | a_inf | b_inf;
    // on overflow: round to infinity unless the mode rounds toward zero
    // for this sign
    unique case (rmode_e'(rmode))
      RM_NEAREST_EVEN: to_inf = 1'b1;
      RM_TO_ZERO:      to_inf = 1'b0;
      RM_TO_POS_INF:   to_inf = ~sign;
      RM_TO_NEG_INF:   to_inf = sign;
      default:         to_inf = 1'b1;
    endcase
    if (a_nan || b_nan) begin
      result_c  = QNAN;
      invalid_c = a_snan | b_snan;
    end else if ((a_inf && b_zero) || (b_inf && a_zero)) begin
      result_c  = QNAN;
      invalid_c = 1'b1;
    end else if (a_inf || b_inf) begin
      result_c  = {sign, EXP_MAX, {FRAC_W{1'b0}}};
    end else if (a_zero || b_zero) begin
      result_c  = {sign, {(63){1'b0}}};
    end else if (exponent_in >= exp_t'(EXP_MAX)) begin
      overflow_c = 1'b1;
      inexact_c  = 1'b1;
      result_c   = to_inf ? {sign, EXP_MAX, {FRAC_W{1'b0}}}
                          : {sign, EXP_MAX - 1'b1, {FRAC_W{1'b1}}};
    end else if (exponent_in <= exp_t'(0)) begin
      underflow_c = 1'b1;
      inexact_c   = 1'b1;
      result_c    = {sign, {(63){1'b0}}};
    end else begin
      inexact_c = |mantissa_in;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      output_FPM <= '0;
      exception  <= 1'b0;
      inexact    <= 1'b0;
      invalid    <= 1'b0;
      overflow   <= 1'b0;
      underflow  <= 1'b0;
      ready      <= 1'b0;
    end else if (enable) begin
      output_FPM <= result_c;
      exception  <= invalid_c | overflow_c | underflow_c | special_c;
      inexact    <= inexact_c;
      invalid    <= invalid_c;
      overflow   <= overflow_c;
      underflow  <= underflow_c;
      ready      <= valid_in;
    end
  end

endmodule
