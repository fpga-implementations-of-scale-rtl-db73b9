// tb_si_net_eq3: checks the first-method network step by step.
// Three neurons with different thresholds and exponents share a field
// F_n = 0.8 (1 + 0.4 sin(2 pi n / 37)) driven by the testbench. After each
// step the new potentials must equal, to 5e-4 relative, the real-valued law
// V_k = V0_k |1 - F / sum_j V_j|^(-gamma_k) evaluated on the potentials seen
// before the step, and must appear in the cycle after the step. The state
// must hold while step is low, and all potentials must start at 0.1.
module tb_si_net_eq3;
  import sinn_pkg::*;

  localparam int N = 3;
  localparam int M = 9;

  logic         clk = 0, rst_n = 0, step = 0;
  fx_t          field, sum;
  fx_t          v0 [N];
  logic [M-1:0] gamma [N];
  fx_t          v [N];
  int           checks = 0, failures = 0, cycles = 0;

  si_net_eq3 #(.N(N), .M(M)) dut (.clk, .rst_n, .step, .field, .v0, .gamma, .v, .sum);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  function automatic real rl(input fx_t a);
    return real'(a) / 16777216.0;
  endfunction

  initial begin
    wait (cycles == 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real s, e[N], r;
    fx_t hold;
    v0[0] = fx_const(0.1);  gamma[0] = 9'd222;
    v0[1] = fx_const(0.12); gamma[1] = 9'd290;
    v0[2] = fx_const(0.08); gamma[2] = 9'd150;
    field = fx_const(0.8);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < N; k++) begin
      checks++;
      if (v[k] != fx_const(0.1)) begin
        failures++;
        $display("FAIL reset value %0d", v[k]);
      end
    end
    for (int n = 0; n < 1000; n++) begin
      field = fx_const(0.8 * (1.0 + 0.4 * $sin(6.283185307179586 * real'(n) / 37.0)));
      s = 0.0;
      for (int k = 0; k < N; k++) s += rl(v[k]);
      r = 1.0 - rl(field) / s;
      if (r < 0.0) r = -r;
      for (int k = 0; k < N; k++) e[k] = rl(v0[k]) * $pow(r, -real'(gamma[k]) / 512.0);
      step = 1;
      @(negedge clk);
      step = 0;
      for (int k = 0; k < N; k++) begin
        checks++;
        if ($pow(rl(v[k]) - e[k], 2.0) > $pow(5e-4 * e[k] + 1e-6, 2.0)) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d k=%0d v=%f expected %f", n, k, rl(v[k]), e[k]);
        end
      end
      if (n % 100 == 0) begin
        hold = v[0];
        @(negedge clk);
        checks++;
        if (v[0] != hold) begin
          failures++;
          $display("FAIL state moved without step");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
