// tb_fpm_sign_unit: checks the sign unit on all four sign combinations
// against the rule "negative when exactly one operand is negative".
module tb_fpm_sign_unit;

  logic sa, sb, sr;
  int checks = 0;
  int failures = 0;

  fpm_sign_unit dut (.sign_a(sa), .sign_b(sb), .sign_result(sr));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      sa = i[1];
      sb = i[0];
      #1;
      checks++;
      if (sr !== (i == 1 || i == 2)) begin
        failures++;
        $display("FAIL sign %b %b -> %b", sa, sb, sr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
