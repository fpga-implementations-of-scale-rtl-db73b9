// tb_frac_pow: checks x^gamma against real exponentiation.
// The exponent digits are those of gamma = sum a_k 2^-k (M = 9, most
// significant bit = 1/2). Checks: the document's tabulated exponents
// (0.567, 0.433, 0.806, 0.194, 0.618, 0.382 rounded to 9 digits must be
// within 0.001 of the named value), gamma = 0 (result 1), x = 0, x = 1, and
// 3000 random pairs with x in about [0.004, 120]. Tolerance: 2e-5 relative
// plus 4e-6 absolute, which covers the truncation of nine roots.
module tb_frac_pow;
  import sinn_pkg::*;

  localparam int M = 9;

  fx_t          x, y;
  logic [M-1:0] g;
  int           checks = 0, failures = 0;

  frac_pow #(.M(M)) dut (.x(x), .gamma(g), .y(y));

  task automatic check(input fx_t xi, input logic [M-1:0] gi);
    real xr, gr, er, yr;
    x = xi;
    g = gi;
    #1;
    checks++;
    xr = real'(xi) / 16777216.0;
    gr = real'(gi) / real'(1 << M);
    er = (gi == 0) ? 1.0 : (xr == 0.0 ? 0.0 : $pow(xr, gr));
    yr = real'(y) / 16777216.0;
    if ((yr - er) > 2e-5 * er + 4e-6 || (er - yr) > 2e-5 * er + 4e-6) begin
      failures++;
      $display("FAIL %f ^ %f = %f, expected %f", xr, gr, yr, er);
    end
  endtask

  real named [6] = '{0.567, 0.433, 0.806, 0.194, 0.618, 0.382};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Nine digits represent each tabulated exponent to +-0.001.
    foreach (named[i]) begin
      logic [M-1:0] gi;
      real gq;
      gi = M'($rtoi(named[i] * 512.0 + 0.5));
      gq = real'(gi) / 512.0;
      checks++;
      if (gq - named[i] > 0.001 || named[i] - gq > 0.001) begin
        failures++;
        $display("FAIL digits for %f give %f", named[i], gq);
      end
      check(fx_const(0.5), gi);
      check(fx_const(7.25), gi);
    end
    check(fx_const(3.7), '0);
    check(0, 9'h1ff);
    check(FX_ONE, 9'h155);
    check(fx_const(16.0), 9'h100);   // 16^0.5 = 4
    check(fx_const(16.0), 9'h080);   // 16^0.25 = 2
    for (int i = 0; i < 3000; i++) begin
      fx_t xi;
      xi = fx_t'(($urandom % 32'h7fff0000) >> ($urandom % 12)) + fx_const(0.004);
      check(xi, M'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
