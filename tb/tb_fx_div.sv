// tb_fx_div: checks the fixed-point divider against real arithmetic.
// Random dividends and divisors of both signs and varied magnitude; the
// result must equal trunc(a/b * 2^24) to within one unit, or the saturation
// value when the true quotient is outside the range. Division by zero must
// give FX_MAX (FX_MIN for a negative dividend).
module tb_fx_div;
  import sinn_pkg::*;

  fx_t a, b, y;
  int  checks = 0, failures = 0;

  fx_div dut (.a(a), .b(b), .y(y));

  task automatic check(input fx_t ai, input fx_t bi);
    real q, e;
    fx_t expv;
    a = ai;
    b = bi;
    #1;
    checks++;
    if (bi == 0) expv = (ai < 0) ? FX_MIN : FX_MAX;
    else begin
      q = real'(ai) / real'(bi) * 16777216.0;
      if (q >= 2147483647.0)       expv = FX_MAX;
      else if (q <= -2147483648.0) expv = FX_MIN;
      else                         expv = fx_t'($rtoi(q));
    end
    e = real'(y) - real'(expv);
    if (e > 1.0 || e < -1.0) begin
      failures++;
      $display("FAIL %0d / %0d = %0d, expected %0d", ai, bi, y, expv);
    end
  endtask

  function automatic fx_t rnd();
    logic [31:0] r;
    r = $urandom;
    r = r >> ($urandom % 30);
    return ($urandom % 2) ? -fx_t'(r) : fx_t'(r);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(FX_ONE, fx_const(2.0));
    check(fx_const(0.8), fx_const(0.3));
    check(fx_const(-3.0), fx_const(0.5));
    check(fx_const(100.0), fx_const(0.001));   // saturates
    check(fx_const(-100.0), fx_const(0.001));  // saturates low
    check(fx_const(1.0), 0);
    check(fx_const(-1.0), 0);
    for (int i = 0; i < 3000; i++) check(rnd(), rnd());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
