// fpm_rounding: pipeline stage 2 of the double precision multiplier.
//
// Takes the normalized 56-bit product of stage 1 (carry room, 53-bit
// significand, guard, sticky) and rounds the significand to 53 bits in one
// of the four IEEE-754 modes chosen by rmode:
//   00  round to nearest, ties to even: add 1 when guard & (sticky | lsb)
//   01  round toward zero:              never add
//   10  round toward +infinity:         add 1 when positive and inexact
//   11  round toward -infinity:         add 1 when negative and inexact
// If the increment carries out of the significand (1.11..1 + 1 = 10.0) the
// significand is shifted right once and the exponent incremented, the
// exponent correction that goes with a change to the mantissa. The result
// is packed as sign, low 11 bits of the exponent and 52-bit fraction
// (round_out); the full signed exponent (exponent_final) and the guard
// and sticky bits (round_bits) go on to the exceptions stage, which judges
// range and exactness.
//
// Interface: sign_r, exponent_r (signed), mantissa_r (56 bits), rmode,
// enable, clk, rst in; round_out (64 bits), exponent_final (signed),
// round_bits (2 bits) out, all registered.
// Timing: one clock of latency, loads when enable is high, synchronous
// active-high reset.
//
// The four modes and the exponent correction follow the design
// description; the rmode encoding (the order in which the modes are
// listed), the guard/sticky scheme and the round_bits output are this
// design's own.
module fpm_rounding
  import fpm_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              enable,
  input  logic [1:0]        rmode,
  input  logic              sign_r,
  input  exp_t              exponent_r,
  input  logic [NORM_W-1:0] mantissa_r,
  output logic [63:0]       round_out,
  output exp_t              exponent_final,
  output logic [1:0]        round_bits
);

  logic             lsb, guard, sticky, inexact, increment;
  logic [SIG_W:0]   rounded;      // carry room + 53-bit significand
  logic [SIG_W-1:0] significand;
  exp_t             exponent_c;

  always_comb begin
    lsb     = mantissa_r[2];
    guard   = mantissa_r[1];
    sticky  = mantissa_r[0];
    inexact = guard | sticky;
    unique case (rmode_e'(rmode))
      RM_NEAREST_EVEN: increment = guard & (sticky | lsb);
      RM_TO_ZERO:      increment = 1'b0;
      RM_TO_POS_INF:   increment = ~sign_r & inexact;
      RM_TO_NEG_INF:   increment =  sign_r & inexact;
      default:         increment = 1'b0;
    endcase
    rounded = mantissa_r[NORM_W-1:2] + (SIG_W+1)'(increment);
    if (rounded[SIG_W]) begin
      significand = rounded[SIG_W:1];
      exponent_c  = exponent_r + exp_t'(1);
    end else begin
      significand = rounded[SIG_W-1:0];
      exponent_c  = exponent_r;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      round_out      <= '0;
      exponent_final <= '0;
      round_bits     <= '0;
    end else if (enable) begin
      round_out      <= {sign_r, exponent_c[EXP_W-1:0], significand[FRAC_W-1:0]};
      exponent_final <= exponent_c;
      round_bits     <= {guard, sticky};
    end
  end

endmodule
