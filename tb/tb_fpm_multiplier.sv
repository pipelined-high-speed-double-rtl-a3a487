// tb_fpm_multiplier: checks pipeline stage 1 (sign, exponent, normalized
// 56-bit product) against values computed with the simulator's '*', its
// one-cycle latency, the hold when enable is low and the reset.
module tb_fpm_multiplier;
  import fpm_pkg::*;
  import fpm_ref_pkg::*;

  logic        clk = 0;
  logic        rst, enable;
  logic [63:0] a, b;
  logic        sign;
  exp_t        expo;
  logic [55:0] prod;
  int checks = 0;
  int failures = 0;
  int shifts = 0;

  always #5 clk = ~clk;

  fpm_multiplier dut (
    .clk(clk), .rst(rst), .enable(enable), .operand_a(a), .operand_b(b),
    .sign_result(sign), .exponent_result(expo), .product_result(prod)
  );

  task automatic expect_of(input logic [63:0] x, input logic [63:0] y,
                           output logic s, output int e, output logic [55:0] p);
    logic [105:0] full;
    full = {|x[62:52], x[51:0]} * {|y[62:52], y[51:0]};
    s = x[63] ^ y[63];
    e = int'(x[62:52]) + int'(y[62:52]) - 1023;
    if (full[105]) begin
      e = e + 1;
      p = {1'b0, full[105:53], full[52], |full[51:0]};
    end else begin
      p = {1'b0, full[104:52], full[51], |full[50:0]};
    end
  endtask

  initial begin : watchdog
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic        s_e;
    int          e_e;
    logic [55:0] p_e;
    rst = 1;
    enable = 1;
    a = '0;
    b = '0;
    @(posedge clk);
    @(posedge clk);
    #1;
    checks++;
    if (prod !== '0 || sign !== 0 || expo !== '0) begin
      failures++;
      $display("FAIL reset");
    end
    rst = 0;
    // the example operands: -18.0 * 9.5
    a = 64'hC032_0000_0000_0000;
    b = 64'h4023_0000_0000_0000;
    @(posedge clk);
    #1;
    checks++;
    if (sign !== 1 || int'(expo) != 1030 || prod !== {1'b0, 53'h15_6000_0000_0000, 2'b00}) begin
      failures++;
      $display("FAIL example: %b %0d %h", sign, expo, prod);
    end
    for (int i = 0; i < 3000; i++) begin
      a = rand_fp(1, 2046);
      b = rand_fp(1, 2046);
      if (i % 5 == 0) begin
        a[51:0] = '1;
        b[51:0] = '1 << ($urandom % 52);
      end
      expect_of(a, b, s_e, e_e, p_e);
      @(posedge clk);
      #1;
      checks++;
      if (p_e[54] == 0) begin
        failures++;
        $display("FAIL not normalized");
      end
      if (e_e == int'(a[62:52]) + int'(b[62:52]) - 1022) shifts++;
      if (sign !== s_e || int'(expo) != e_e || prod !== p_e) begin
        failures++;
        $display("FAIL %h * %h: %b %0d %h expected %b %0d %h",
                 a, b, sign, expo, prod, s_e, e_e, p_e);
      end
    end
    // enable low: the registers hold
    enable = 0;
    expect_of(a, b, s_e, e_e, p_e);
    a = rand_fp(1, 2046);
    @(posedge clk);
    @(posedge clk);
    #1;
    checks++;
    if (prod !== p_e || int'(expo) != e_e) begin
      failures++;
      $display("FAIL hold with enable low");
    end
    checks++;
    if (shifts == 0) begin
      failures++;
      $display("FAIL normalization shift never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
