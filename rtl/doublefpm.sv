// doublefpm: three-stage pipelined IEEE-754 double precision multiplier.
//
// Two binary64 operands enter every clock cycle in which enable is high
// and their product leaves three enabled cycles later:
//   stage 1  fpm_multiplier  sign XOR, exponent sum minus bias, 53 x 53
//                            Dadda significand product, normalization
//   stage 2  fpm_rounding    rounding in the mode given by rmode
//   stage 3  fpm_exceptions  NaN / infinity / zero operands, overflow,
//                            underflow, inexact; final result and flags
// enable is a clock enable for the whole pipeline: with enable low every
// register holds and the pipeline stalls. The operands and rmode are
// delayed alongside the data so that stages 2 and 3 see the values that
// belong to the operation they are working on, and a valid bit travels
// with each operation; ready is high when output_FPM and the flags hold a
// result. rst is synchronous and active high.
//
// Interface (names as in the published top-level view): operandA,
// operandB (64 bits), rmode (2 bits: 00 nearest-even, 01 toward zero,
// 10 toward +inf, 11 toward -inf), clk, enable, rst in; output_FPM
// (64 bits), exception, inexact, invalid, overflow, underflow, ready out.
// Timing: latency 3 enabled clock cycles, one result per enabled cycle.
//
// The three stages, the ports and the module split follow the design
// description. The clock-enable reading of enable, the pipelining of the
// operands, rmode and the valid bit, and the synchronous reset are this
// design's own.
module doublefpm
  import fpm_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic [1:0]  rmode,
  input  logic [63:0] operandA,
  input  logic [63:0] operandB,
  output logic [63:0] output_FPM,
  output logic        exception,
  output logic        inexact,
  output logic        invalid,
  output logic        overflow,
  output logic        underflow,
  output logic        ready
);

  // ---- stage 1 --------------------------------------------------------
  logic              sign_r;
  exp_t              exponent_r;
  logic [NORM_W-1:0] mantissa_r;

  fpm_multiplier u_multiplier (
    .clk             (clk),
    .rst             (rst),
    .enable          (enable),
    .operand_a       (operandA),
    .operand_b       (operandB),
    .sign_result     (sign_r),
    .exponent_result (exponent_r),
    .product_result  (mantissa_r)
  );

  // operands, rounding mode and valid bit travelling with the data
  logic [63:0] op_a_1, op_b_1, op_a_2, op_b_2;
  logic [1:0]  rmode_1, rmode_2;
  logic        valid_1, valid_2;

  always_ff @(posedge clk) begin
    if (rst) begin
      op_a_1  <= '0;
      op_b_1  <= '0;
      op_a_2  <= '0;
      op_b_2  <= '0;
      rmode_1 <= '0;
      rmode_2 <= '0;
      valid_1 <= 1'b0;
      valid_2 <= 1'b0;
    end else if (enable) begin
      op_a_1  <= operandA;
      op_b_1  <= operandB;
      op_a_2  <= op_a_1;
      op_b_2  <= op_b_1;
      rmode_1 <= rmode;
      rmode_2 <= rmode_1;
      valid_1 <= 1'b1;
      valid_2 <= valid_1;
    end
  end

  // ---- stage 2 --------------------------------------------------------
  logic [63:0] round_out;
  exp_t        exponent_final;
  logic [1:0]  round_bits;

  fpm_rounding u_rounding (
    .clk            (clk),
    .rst            (rst),
    .enable         (enable),
    .rmode          (rmode_1),
    .sign_r         (sign_r),
    .exponent_r     (exponent_r),
    .mantissa_r     (mantissa_r),
    .round_out      (round_out),
    .exponent_final (exponent_final),
    .round_bits     (round_bits)
  );

  // ---- stage 3 --------------------------------------------------------
  fpm_exceptions u_exceptions (
    .clk         (clk),
    .rst         (rst),
    .enable      (enable),
    .rmode       (rmode_2),
    .valid_in    (valid_2),
    .operand_a   (op_a_2),
    .operand_b   (op_b_2),
    .in_except   (round_out),
    .mantissa_in (round_bits),
    .exponent_in (exponent_final),
    .output_FPM  (output_FPM),
    .exception   (exception),
    .inexact     (inexact),
    .invalid     (invalid),
    .overflow    (overflow),
    .underflow   (underflow),
    .ready       (ready)
  );

endmodule
