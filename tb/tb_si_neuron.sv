// tb_si_neuron: checks one neuron update against real arithmetic.
// v_next = v0 * |1 - drive/sum|^(-gamma) for random drive, sum, v0 and
// 9-digit gamma; cases where |1 - drive/sum| < 0.02 or the result leaves
// the number range are skipped in the random part. Tolerance 2e-4
// relative. Directed cases: gamma = 0 gives v0; drive = sum gives the
// saturated value; drive = 0 gives v0; the default operating point (F = 0.8, S = 0.3, V0 = 0.1, gamma = 222/512).
module tb_si_neuron;
  import sinn_pkg::*;

  localparam int M = 9;

  fx_t          drive, sum, v0, vn;
  logic [M-1:0] g;
  int           checks = 0, failures = 0;

  si_neuron #(.M(M)) dut (.drive(drive), .sum(sum), .v0(v0), .gamma(g), .v_next(vn));

  function automatic real rl(input fx_t a);
    return real'(a) / 16777216.0;
  endfunction

  task automatic check(input real d, input real s, input real t, input logic [M-1:0] gi,
                       input bit directed);
    real r, e, y;
    drive = fx_const(d);
    sum   = fx_const(s);
    v0    = fx_const(t);
    g     = gi;
    #1;
    r = rl(drive) / rl(sum);
    r = (1.0 - r < 0.0) ? r - 1.0 : 1.0 - r;
    if (!directed && (r < 0.02)) return;
    e = rl(v0) * $pow(r, -real'(gi) / 512.0);
    if (!directed && (e > 100.0)) return;
    y = rl(vn);
    checks++;
    if ((y - e) > 2e-4 * e + 1e-6 || (e - y) > 2e-4 * e + 1e-6) begin
      failures++;
      $display("FAIL d=%f s=%f v0=%f g=%0d: %f expected %f", d, s, t, gi, y, e);
    end
  endtask

  function automatic real urand(input real lo, input real hi);
    return lo + (hi - lo) * real'($urandom % 1000000) / 1000000.0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0.8, 0.3, 0.1, 9'd222, 1);
    check(0.8, 0.3, 0.1, 9'd0, 1);
    check(0.0, 0.3, 0.25, 9'd300, 1);
    check(1.2, 0.6, 0.1, 9'd256, 1);     // |1-2|^-0.5 = 1
    // drive equal to the sum: the power is zero and the result saturates
    drive = fx_const(0.5); sum = fx_const(0.5); v0 = fx_const(0.1); g = 9'd222;
    #1;
    checks++;
    if (vn != FX_MAX) begin
      failures++;
      $display("FAIL singular case gave %0d", vn);
    end
    for (int i = 0; i < 3000; i++)
      check(urand(-2.0, 2.0), urand(0.05, 3.0), urand(0.01, 1.0), M'($urandom), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
