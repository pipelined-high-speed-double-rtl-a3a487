// tb_fpm_exponent_unit: checks exponent_a + exponent_b - 1023 on the
// extreme exponents and on random pairs, as integers.
module tb_fpm_exponent_unit;
  import fpm_pkg::*;

  logic [10:0] ea, eb;
  logic [11:0] sum;
  exp_t        res;
  int checks = 0;
  int failures = 0;

  fpm_exponent_unit dut (
    .exponent_a(ea), .exponent_b(eb), .exponent_sum(sum), .exponent_result(res)
  );

  task automatic check(input int x, input int y);
    ea = 11'(x);
    eb = 11'(y);
    #1;
    checks++;
    if (int'(sum) != x + y || int'(res) != x + y - 1023) begin
      failures++;
      $display("FAIL %0d + %0d: sum %0d result %0d", x, y, sum, res);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0);
    check(2047, 2047);
    check(1, 1);
    check(1023, 1023);
    check(2046, 1);
    check(1023, 0);
    for (int i = 0; i < 5000; i++) check(int'($urandom % 2048), int'($urandom % 2048));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
