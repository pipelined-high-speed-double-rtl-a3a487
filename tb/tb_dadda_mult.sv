// tb_dadda_mult: self-checking testbench for the Dadda significand multiplier.
//
// Checks the full-size 53 x 53 tree against the simulator's own '*' on
// corner operands (all ones, powers of two, hidden-one-only) and on random
// operands with the hidden one set, and checks a small 6 x 6 tree
// exhaustively. The multiplier is combinational, so each result is sampled
// one time step after the operands change.
module tb_dadda_mult;

  localparam int unsigned N  = 53;
  localparam int unsigned NS = 6;

  logic [N-1:0]    a, b;
  logic [2*N-1:0]  p;
  logic [NS-1:0]   as, bs;
  logic [2*NS-1:0] ps;

  int checks = 0;
  int failures = 0;

  dadda_mult #(.N(N))  dut   (.a(a),  .b(b),  .p(p));
  dadda_mult #(.N(NS)) dut_s (.a(as), .b(bs), .p(ps));

  task automatic check_big(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [2*N-1:0] expected;
    a = x;
    b = y;
    #1;
    expected = {{N{1'b0}}, x} * {{N{1'b0}}, y};
    checks++;
    if (p !== expected) begin
      failures++;
      $display("FAIL %h * %h: got %h expected %h", x, y, p, expected);
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
    check_big('0, '0);
    check_big('1, '1);
    check_big('1, 53'd1);
    check_big({1'b1, 52'd0}, {1'b1, 52'd0});
    check_big({1'b1, 52'd0}, '1);
    for (int i = 0; i < N; i++) check_big(N'(1) << i, '1);
    for (int i = 0; i < 3000; i++) begin
      check_big({1'b1, 20'($urandom), $urandom},
                {1'b1, 20'($urandom), $urandom});
      check_big({21'($urandom), $urandom}, {21'($urandom), $urandom});
    end
    for (int x = 0; x < (1 << NS); x++) begin
      for (int y = 0; y < (1 << NS); y++) begin
        as = NS'(x);
        bs = NS'(y);
        #1;
        checks++;
        if (int'(ps) != x * y) begin
          failures++;
          $display("FAIL small %0d * %0d = %0d", x, y, ps);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
