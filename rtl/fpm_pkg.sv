// fpm_pkg: constants and types shared by the pipelined double precision
// floating point multiplier.
//
// The IEEE-754 binary64 layout (1 sign bit, 11 exponent bits biased by 1023,
// 52 fraction bits) and the widths of the inter-stage buses (106-bit raw
// product, 56-bit normalized product, 64-bit packed result) follow the
// design description. Two choices are this design's own:
//   * internal exponents are carried as 13-bit signed values instead of the
//     12-bit buses of the block diagram, because e_a + e_b - 1023 spans
//     -1021 .. 3072 and 12 bits cannot hold that range with a sign;
//   * the 2-bit rounding mode uses the order in which the IEEE modes are
//     listed: 00 nearest-even, 01 toward zero, 10 toward +inf, 11 toward -inf.
package fpm_pkg;

  localparam int unsigned FRAC_W = 52;            // stored fraction bits
  localparam int unsigned EXP_W  = 11;            // stored exponent bits
  localparam int unsigned SIG_W  = FRAC_W + 1;    // significand with hidden one
  localparam int unsigned PROD_W = 2 * SIG_W;     // raw product, 106 bits
  localparam int unsigned NORM_W = SIG_W + 3;     // normalized product, 56 bits
  localparam int unsigned EXPI_W = 13;            // internal signed exponent
  localparam int unsigned BIAS   = 1023;
  localparam logic [EXP_W-1:0] EXP_MAX = '1;      // 2047: infinity / NaN

  // Canonical quiet NaN returned for invalid operations and NaN operands.
  localparam logic [63:0] QNAN = 64'h7FF8_0000_0000_0000;

  typedef logic signed [EXPI_W-1:0] exp_t;

  typedef enum logic [1:0] {
    RM_NEAREST_EVEN = 2'b00,
    RM_TO_ZERO      = 2'b01,
    RM_TO_POS_INF   = 2'b10,
    RM_TO_NEG_INF   = 2'b11
  } rmode_e;

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exponent;
    logic [FRAC_W-1:0] fraction;
  } fp64_t;

endpackage
