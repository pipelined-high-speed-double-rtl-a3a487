// tb_doublefpm: end-to-end testbench of the three-stage pipelined double
// precision multiplier, at its default (and only) size.
//
// A new operation is offered every clock; enable is dropped at random to
// stall the pipeline. A three-entry model of the pipeline, advanced only on
// enabled clock edges, holds the expected result of each accepted
// operation (from fpm_ref_pkg::ref_mul); after every clock edge the DUT's
// ready, output_FPM and five flags must match the model's last entry,
// which also checks the three-cycle latency, the hold during a stall and
// one result per enabled cycle. In nearest-even mode, in-range results are
// also compared with the simulator's own double precision product.
//
// Operands mix the worked example (-18.0 * 9.5 = -171.0), exact small
// integers, random normal numbers, halfway (tie) cases, all-ones
// significands that carry on rounding (1.5 * 1.0101..01), huge and tiny exponents for
// overflow and underflow, and zeros, subnormals, infinities and NaNs. Each
// mechanism is counted and one that never happens counts as a failure.
module tb_doublefpm;
  import fpm_ref_pkg::*;

  localparam int NUM_OPS = 20000;

  logic        clk = 0;
  logic        rst, enable;
  logic [1:0]  rmode;
  logic [63:0] operandA, operandB;
  logic [63:0] output_FPM;
  logic        exception, inexact, invalid, overflow, underflow, ready;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  doublefpm dut (
    .clk(clk), .rst(rst), .enable(enable), .rmode(rmode),
    .operandA(operandA), .operandB(operandB), .output_FPM(output_FPM),
    .exception(exception), .inexact(inexact), .invalid(invalid),
    .overflow(overflow), .underflow(underflow), .ready(ready)
  );

  // mechanism counters
  typedef enum int {
    EV_SHIFT, EV_ROUND_UP, EV_ROUND_CARRY, EV_TIE, EV_EXACT, EV_INEXACT,
    EV_OVERFLOW, EV_UNDERFLOW, EV_INVALID, EV_NAN, EV_INF, EV_ZERO,
    EV_RM0, EV_RM1, EV_RM2, EV_RM3, EV_STALL, EV_EXAMPLE, EV_LAST
  } ev_e;
  int ev[EV_LAST];
  string ev_name[EV_LAST] = '{
    "normalization shift", "rounding increment", "rounding carry-out",
    "halfway tie", "exact result", "inexact result", "overflow",
    "underflow", "invalid", "NaN operand", "infinity operand",
    "zero operand", "rmode 00", "rmode 01", "rmode 10", "rmode 11",
    "stall", "worked example"};

  // note which datapath events an accepted operation exercises
  task automatic count_events(input logic [63:0] x, input logic [63:0] y,
                              input logic [1:0] rm, input ref_t r);
    logic [105:0] p;
    logic [52:0]  rem;
    logic         normal;
    normal = x[62:52] != 0 && x[62:52] != 11'h7FF && y[62:52] != 0 && y[62:52] != 11'h7FF;
    ev[EV_RM0 + int'(rm)]++;
    if (x[62:52] == 11'h7FF && x[51:0] != 0 || y[62:52] == 11'h7FF && y[51:0] != 0) ev[EV_NAN]++;
    if (x[62:0] == 63'h7FF0_0000_0000_0000 || y[62:0] == 63'h7FF0_0000_0000_0000) ev[EV_INF]++;
    if (x[62:52] == 0 || y[62:52] == 0) ev[EV_ZERO]++;
    if (r.invalid) ev[EV_INVALID]++;
    if (r.overflow) ev[EV_OVERFLOW]++;
    if (r.underflow) ev[EV_UNDERFLOW]++;
    if (r.inexact) ev[EV_INEXACT]++;
    if (x == 64'hC032_0000_0000_0000 && y == 64'h4023_0000_0000_0000) ev[EV_EXAMPLE]++;
    if (normal) begin
      p = {1'b1, x[51:0]} * {1'b1, y[51:0]};
      if (p[105]) ev[EV_SHIFT]++;
      else p = p << 1;
      rem = p[52:0];
      if (rem == 0) ev[EV_EXACT]++;
      if (rem == (53'd1 << 52)) ev[EV_TIE]++;
      if (!r.overflow && !r.underflow &&
          (r.result[51:0] != p[104:53] || r.result[62:52] != 11'(int'(x[62:52]) + int'(y[62:52]) - 1023 + int'(p[105])))) begin
        ev[EV_ROUND_UP]++;
        if (r.result[51:0] == 0 && p[104:53] == '1) ev[EV_ROUND_CARRY]++;
      end
    end
  endtask

  function automatic logic [63:0] pick_operand(int kind);
    logic [63:0] v;
    case (kind)
      0, 1, 2, 3: v = rand_fp(700, 1350);                       // ordinary
      4:  v = {1'($urandom), 11'(1023 + $urandom % 12), 6'($urandom), 46'd0}; // short
      5:  v = {1'($urandom), 11'(900 + $urandom % 200), 52'hF_FFFF_FFFF_FFFF};
      6:  v = rand_fp(1800, 2046);                               // huge
      7:  v = rand_fp(1, 250);                                   // tiny
      8:  v = {1'($urandom), 11'd0, ($urandom % 2 == 0) ? 52'd0 : {20'($urandom), $urandom}};
      9:  v = {1'($urandom), 11'h7FF, 52'd0};                    // infinity
      10: v = {1'($urandom), 11'h7FF, 1'($urandom), 51'($urandom) | 51'd1}; // NaN
      default: v = rand_fp(1, 2046);
    endcase
    return v;
  endfunction

  // model of the pipeline contents
  logic [2:0]  mv;
  ref_t        mr[3];

  initial begin : watchdog
    #((NUM_OPS * 4 + 1000) * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int          kind_a, kind_b;
    ref_t        r;
    int          accepted;
    rst = 1;
    enable = 0;
    rmode = 0;
    operandA = '0;
    operandB = '0;
    mv = '0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (ready !== 0 || output_FPM !== 0) begin
      failures++;
      $display("FAIL reset state");
    end
    rst = 0;
    accepted = 0;
    // first operation: the worked example, then three enabled cycles of
    // latency before it shows at the output
    while (accepted < NUM_OPS) begin
      if (accepted == 0) begin
        operandA = 64'hC032_0000_0000_0000;
        operandB = 64'h4023_0000_0000_0000;
        rmode = 2'b00;
      end else if (accepted % 7 == 3) begin
        // halfway case: 1.1 * 1.00..01 has remainder exactly one half
        operandA = {1'($urandom), 11'(1000 + $urandom % 40), 1'b1, 51'd0};
        operandB = {1'($urandom), 11'(1000 + $urandom % 40), 51'd0, 1'b1};
        rmode = 2'($urandom);
      end else if (accepted % 7 == 5) begin
        // 1.5 * 1.0101..01 = 2 - 2^-53: all-ones significand, remainder
        // one half, so rounding up carries into the exponent
        operandA = {1'($urandom), 11'(1000 + $urandom % 40), 1'b1, 51'd0};
        operandB = {1'($urandom), 11'(1000 + $urandom % 40), 52'h5_5555_5555_5555};
        rmode = 2'($urandom);
      end else begin
        kind_a = int'($urandom % 12);
        kind_b = (kind_a == 6 || kind_a == 7) ? kind_a : int'($urandom % 12);
        operandA = pick_operand(kind_a);
        operandB = pick_operand(kind_b);
        rmode = 2'($urandom);
      end
      enable = (accepted < 4) ? 1'b1 : ($urandom % 5 != 0);
      if (!enable && mv != 0) ev[EV_STALL]++;
      @(posedge clk);
      if (enable) begin
        r = ref_mul(operandA, operandB, rmode);
        count_events(operandA, operandB, rmode, r);
        // the reference itself against real arithmetic
        if (rmode == 2'b00 && !r.underflow && operandA[62:52] != 0 &&
            operandB[62:52] != 0 && operandA[62:52] != 11'h7FF &&
            operandB[62:52] != 11'h7FF) begin
          checks++;
          if (r.result != $realtobits($bitstoreal(operandA) * $bitstoreal(operandB))) begin
            failures++;
            $display("FAIL reference vs real: %h * %h", operandA, operandB);
          end
        end
        mr[2] = mr[1];
        mr[1] = mr[0];
        mr[0] = r;
        mv = {mv[1:0], 1'b1};
        accepted++;
      end
      #1;
      checks++;
      if (ready !== mv[2]) begin
        failures++;
        $display("FAIL ready %b expected %b after %0d operations", ready, mv[2], accepted);
      end else if (mv[2] && ({output_FPM, exception, inexact, invalid, overflow, underflow}
                             !== mr[2])) begin
        failures++;
        $display("FAIL result %h flags %b, expected %h %b", output_FPM,
                 {exception, inexact, invalid, overflow, underflow},
                 mr[2].result, mr[2][4:0]);
      end
      if (accepted == 3 && enable) begin
        checks++;
        if (output_FPM !== 64'hC065_6000_0000_0000 || {exception, inexact, invalid, overflow, underflow} !== 0) begin
          failures++;
          $display("FAIL worked example: %h", output_FPM);
        end
      end
    end
    for (int i = 0; i < EV_LAST; i++) begin
      $display("%-22s %0d", ev_name[i], ev[i]);
      checks++;
      if (ev[i] == 0) begin
        failures++;
        $display("FAIL mechanism never exercised: %s", ev_name[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
