// fpm_ref_pkg: reference model of IEEE-754 binary64 multiplication used by
// the testbenches.
//
// It follows the same conventions as the RTL (zeros and subnormal operands
// count as zero, results below the normal range flush to a signed zero,
// NaN results are the quiet NaN 7FF8_0000_0000_0000, rounding mode encoding
// 00 nearest-even, 01 toward zero, 10 toward +inf, 11 toward -inf) but is
// written independently of it: the significand product is the
// simulator's '*', and rounding compares the whole discarded remainder
// with one half instead of using guard and sticky bits. For results in the
// normal range in nearest-even mode the testbenches also compare it with
// the simulator's own double precision multiplication.
package fpm_ref_pkg;

  typedef struct packed {
    logic [63:0] result;
    logic        exception;
    logic        inexact;
    logic        invalid;
    logic        overflow;
    logic        underflow;
  } ref_t;

  function automatic ref_t ref_mul(logic [63:0] a, logic [63:0] b, logic [1:0] rm);
    ref_t   r;
    logic   s;
    int     ea, eb, e;
    logic   a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
    logic [105:0] prod;
    logic [52:0]  rem, half;
    logic [53:0]  sig;
    logic         up;
    r = '0;
    s  = a[63] ^ b[63];
    ea = int'(a[62:52]);
    eb = int'(b[62:52]);
    a_nan  = (ea == 2047) && (a[51:0] != 0);
    b_nan  = (eb == 2047) && (b[51:0] != 0);
    a_inf  = (ea == 2047) && (a[51:0] == 0);
    b_inf  = (eb == 2047) && (b[51:0] == 0);
    a_zero = (ea == 0);
    b_zero = (eb == 0);
    r.exception = a_nan || b_nan || a_inf || b_inf;
    if (a_nan || b_nan) begin
      r.result  = 64'h7FF8_0000_0000_0000;
      r.invalid = (a_nan && !a[51]) || (b_nan && !b[51]);
    end else if ((a_inf && b_zero) || (b_inf && a_zero)) begin
      r.result  = 64'h7FF8_0000_0000_0000;
      r.invalid = 1'b1;
    end else if (a_inf || b_inf) begin
      r.result = {s, 11'h7FF, 52'd0};
    end else if (a_zero || b_zero) begin
      r.result = {s, 63'd0};
    end else begin
      prod = {53'd1, a[51:0]} * {53'd1, b[51:0]};
      e = ea + eb - 1023;
      if (prod[105]) e = e + 1;
      else prod = prod << 1;
      rem  = prod[52:0];
      half = 53'd1 << 52;
      case (rm)
        2'b00:   up = (rem > half) || (rem == half && prod[53]);
        2'b01:   up = 1'b0;
        2'b10:   up = !s && (rem != 0);
        default: up = s && (rem != 0);
      endcase
      sig = {1'b0, prod[105:53]} + 54'(up);
      if (sig[53]) begin
        sig = sig >> 1;
        e = e + 1;
      end
      r.inexact = (rem != 0);
      if (e >= 2047) begin
        r.overflow = 1'b1;
        r.inexact  = 1'b1;
        if (rm == 2'b00 || (rm == 2'b10 && !s) || (rm == 2'b11 && s))
          r.result = {s, 11'h7FF, 52'd0};
        else
          r.result = {s, 11'h7FE, {52{1'b1}}};
      end else if (e <= 0) begin
        r.underflow = 1'b1;
        r.inexact   = 1'b1;
        r.result    = {s, 63'd0};
      end else begin
        r.result = {s, 11'(e), sig[51:0]};
      end
    end
    r.exception = r.exception || r.invalid || r.overflow || r.underflow;
    return r;
  endfunction

  // Random binary64 operand whose exponent is drawn from [lo, hi].
  function automatic logic [63:0] rand_fp(int lo, int hi);
    logic [63:0] v;
    v = {$urandom, $urandom};
    v[62:52] = 11'(lo + int'($urandom % 32'(hi - lo + 1)));
    return v;
  endfunction

endpackage
