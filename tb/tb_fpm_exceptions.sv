// tb_fpm_exceptions: checks pipeline stage 3 on directed special cases.
//
// Covers NaN operands (quiet and signalling), infinity times zero,
// infinity times a number, zero operands, overflow in each rounding mode
// and sign, underflow, in-range results with and without lost bits, the
// ready bit, the one-cycle latency and the hold when enable is low.
// Expected values are written out by hand from the IEEE-754 rules.
module tb_fpm_exceptions;
  import fpm_pkg::*;

  localparam logic [63:0] ONE    = 64'h3FF0_0000_0000_0000;
  localparam logic [63:0] INF    = 64'h7FF0_0000_0000_0000;
  localparam logic [63:0] MAXF   = 64'h7FEF_FFFF_FFFF_FFFF;
  localparam logic [63:0] SNAN   = 64'h7FF0_0000_0000_0001;
  localparam logic [63:0] QNANIN = 64'hFFF8_0000_0000_1234;
  localparam logic [63:0] ZERO   = 64'h0000_0000_0000_0000;
  localparam logic [63:0] SUB    = 64'h0000_0000_0000_0FFF;

  logic        clk = 0;
  logic        rst, enable, valid_in;
  logic [1:0]  rmode;
  logic [63:0] a, b, in_except;
  logic [1:0]  mantissa_in;
  exp_t        exponent_in;
  logic [63:0] out;
  logic        exc, inx, inv, ovf, unf, ready;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  fpm_exceptions dut (
    .clk(clk), .rst(rst), .enable(enable), .rmode(rmode), .valid_in(valid_in),
    .operand_a(a), .operand_b(b), .in_except(in_except),
    .mantissa_in(mantissa_in), .exponent_in(exponent_in),
    .output_FPM(out), .exception(exc), .inexact(inx), .invalid(inv),
    .overflow(ovf), .underflow(unf), .ready(ready)
  );

  // flags: {exception, inexact, invalid, overflow, underflow}
  task automatic run_one(input logic [63:0] x, input logic [63:0] y,
                         input logic [1:0] rm, input logic [63:0] rnd,
                         input logic [1:0] lost, input int e,
                         input logic [63:0] r_exp, input logic [4:0] f_exp);
    a = x;
    b = y;
    rmode = rm;
    in_except = rnd;
    mantissa_in = lost;
    exponent_in = exp_t'(e);
    @(posedge clk);
    #1;
    checks++;
    if (out !== r_exp || {exc, inx, inv, ovf, unf} !== f_exp || ready !== 1'b1) begin
      failures++;
      $display("FAIL %h * %h rm=%0d e=%0d: %h %b ready %b, expected %h %b",
               x, y, rm, e, out, {exc, inx, inv, ovf, unf}, ready, r_exp, f_exp);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] rnd;
    rst = 1;
    enable = 1;
    valid_in = 0;
    rmode = 0;
    a = '0;
    b = '0;
    in_except = '0;
    mantissa_in = '0;
    exponent_in = '0;
    @(posedge clk);
    #1;
    checks++;
    if (ready !== 0 || out !== '0) begin
      failures++;
      $display("FAIL reset");
    end
    rst = 0;
    @(posedge clk);
    #1;
    checks++;
    if (ready !== 0) begin
      failures++;
      $display("FAIL ready without valid_in");
    end
    valid_in = 1;
    // the example: -18.0 * 9.5 = -171.0, exact
    run_one(64'hC032_0000_0000_0000, 64'h4023_0000_0000_0000, 2'b00,
            64'hC065_6000_0000_0000, 2'b00, 1030, 64'hC065_6000_0000_0000, 5'b00000);
    // NaN operands
    run_one(SNAN, ONE, 2'b00, 64'h1234, 2'b00, 100, QNAN, 5'b10100);
    run_one(ONE, QNANIN, 2'b00, 64'h1234, 2'b00, 100, QNAN, 5'b10000);
    run_one(QNANIN, INF, 2'b01, 64'h1234, 2'b00, 100, QNAN, 5'b10000);
    // infinity times zero, both orders, zero also as a subnormal
    run_one(INF, ZERO, 2'b00, 64'h1234, 2'b00, 100, QNAN, 5'b10100);
    run_one(SUB, {1'b1, INF[62:0]}, 2'b00, 64'h1234, 2'b00, 100, QNAN, 5'b10100);
    // infinity times a number or infinity
    run_one(INF, {1'b1, ONE[62:0]}, 2'b00, 64'h1234, 2'b00, 3000,
            {1'b1, INF[62:0]}, 5'b10000);
    run_one(INF, INF, 2'b11, 64'h1234, 2'b00, 3000, INF, 5'b10000);
    // zero operands give a signed zero
    run_one(ZERO, {1'b1, MAXF[62:0]}, 2'b00, 64'h1234, 2'b11, 3000,
            64'h8000_0000_0000_0000, 5'b00000);
    run_one(ONE, SUB, 2'b10, 64'h1234, 2'b11, -900, ZERO, 5'b00000);
    // overflow in each mode and sign
    for (int m = 0; m < 4; m++) begin
      for (int s = 0; s < 2; s++) begin
        logic to_inf;
        to_inf = (m == 0) || (m == 2 && s == 0) || (m == 3 && s == 1);
        run_one({1'(s), MAXF[62:0]}, MAXF, 2'(m), 64'h1234, 2'b00,
                2047 + int'($urandom % 1000),
                {1'(s), to_inf ? INF[62:0] : MAXF[62:0]}, 5'b11010);
      end
    end
    // underflow
    run_one(64'h0010_0000_0000_0000, 64'h8010_0000_0000_0000,
            2'b00, 64'h1234, 2'b00, -1021, 64'h8000_0000_0000_0000, 5'b11001);
    run_one(64'h0010_0000_0000_0000, ONE, 2'b01, 64'h1234, 2'b01, 0, ZERO, 5'b11001);
    // in-range results, exact and inexact
    for (int i = 0; i < 500; i++) begin
      logic [1:0] lost;
      int e;
      rnd = {$urandom, $urandom};
      lost = 2'($urandom);
      e = 1 + int'($urandom % 2046);
      run_one(ONE, ONE, 2'($urandom), rnd, lost, e, rnd, {1'b0, |lost, 3'b000});
    end
    // enable low: everything holds
    enable = 0;
    rnd = out;
    in_except = ~in_except;
    valid_in = 0;
    @(posedge clk);
    #1;
    checks++;
    if (out !== rnd || ready !== 1) begin
      failures++;
      $display("FAIL hold with enable low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
