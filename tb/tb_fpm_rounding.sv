// tb_fpm_rounding: checks pipeline stage 2 in all four rounding modes.
//
// The expected result treats the two low bits of the 56-bit input as a
// remainder below the significand (above, equal to or below one half) and
// rounds the significand as an integer. Covers the carry out of an all-ones
// significand (exponent + 1), the one-cycle latency and the hold when
// enable is low.
module tb_fpm_rounding;
  import fpm_pkg::*;

  logic        clk = 0;
  logic        rst, enable;
  logic [1:0]  rmode;
  logic        sign;
  exp_t        expo;
  logic [55:0] mant;
  logic [63:0] round_out;
  exp_t        exp_final;
  logic [1:0]  round_bits;
  int checks = 0;
  int failures = 0;
  int carries = 0;
  int increments[4] = '{0, 0, 0, 0};

  always #5 clk = ~clk;

  fpm_rounding dut (
    .clk(clk), .rst(rst), .enable(enable), .rmode(rmode), .sign_r(sign),
    .exponent_r(expo), .mantissa_r(mant), .round_out(round_out),
    .exponent_final(exp_final), .round_bits(round_bits)
  );

  task automatic run_one(input logic [1:0] rm, input logic s, input int e,
                         input logic [51:0] frac, input logic [1:0] rest);
    logic        up;
    logic [53:0] sig;
    int          e_exp;
    logic [63:0] r_exp;
    rmode = rm;
    sign  = s;
    expo  = exp_t'(e);
    mant  = {1'b0, 1'b1, frac, rest};
    // rest: 2'b10 is exactly one half, 2'b11 above, 2'b01 below
    case (rm)
      2'b00:   up = (rest == 2'b11) || (rest == 2'b10 && frac[0]);
      2'b01:   up = 1'b0;
      2'b10:   up = !s && rest != 0;
      default: up = s && rest != 0;
    endcase
    sig = {2'b01, frac} + 54'(up);
    e_exp = e;
    if (sig[53]) begin
      e_exp = e + 1;
      sig = sig >> 1;
      carries++;
    end
    if (up) increments[rm]++;
    r_exp = {s, 11'(e_exp), sig[51:0]};
    @(posedge clk);
    #1;
    checks++;
    if (round_out !== r_exp || int'(exp_final) != e_exp || round_bits !== rest) begin
      failures++;
      $display("FAIL rm=%0d s=%b e=%0d frac=%h rest=%b: %h %0d, expected %h %0d",
               rm, s, e, frac, rest, round_out, exp_final, r_exp, e_exp);
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
    rst = 1;
    enable = 1;
    rmode = 0;
    sign = 0;
    expo = '0;
    mant = '0;
    @(posedge clk);
    #1;
    rst = 0;
    // exact example: -171 = -1.0101011 * 2^7
    run_one(2'b00, 1'b1, 1030, 52'h5_6000_0000_0000, 2'b00);
    checks++;
    if (round_out !== 64'hC065_6000_0000_0000) begin
      failures++;
      $display("FAIL example %h", round_out);
    end
    for (int m = 0; m < 4; m++) begin
      for (int r = 0; r < 4; r++) begin
        for (int s = 0; s < 2; s++) begin
          run_one(2'(m), 1'(s), 1000, '1, 2'(r));          // all ones: carry out
          run_one(2'(m), 1'(s), 1000, 52'h1, 2'(r));       // odd lsb
          run_one(2'(m), 1'(s), 1000, 52'h2, 2'(r));       // even lsb
          run_one(2'(m), 1'(s), 2046, '1, 2'(r));          // carry to 2047
        end
      end
    end
    for (int i = 0; i < 4000; i++)
      run_one(2'($urandom), 1'($urandom), int'($urandom % 3000) - 1000,
              {20'($urandom), $urandom}, 2'($urandom));
    // hold with enable low
    enable = 0;
    begin
      logic [63:0] held;
      held = round_out;
      mant = ~mant;
      @(posedge clk);
      #1;
      checks++;
      if (round_out !== held) begin
        failures++;
        $display("FAIL hold with enable low");
      end
    end
    checks++;
    if (carries == 0 || increments[0] == 0 || increments[2] == 0 || increments[3] == 0) begin
      failures++;
      $display("FAIL coverage: carries %0d increments %0d %0d %0d %0d", carries,
               increments[0], increments[1], increments[2], increments[3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
