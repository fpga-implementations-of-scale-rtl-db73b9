// tb_si_chain_eq5: checks the second-method chain step by step.
// Three neurons: neuron 1 is the field F_n = 0.8 (1 + 0.4 sin(2 pi n / 53)),
// neurons 2 and 3 follow V_k = V0_k |1 - V_(k-1) / S|^(-gamma_k) with S the
// sum of all three (field included), evaluated on the values before the
// step. Checked to 5e-4 relative each step, one cycle after the step; v[0]
// must show the field; the state must hold while step is low.
module tb_si_chain_eq5;
  import sinn_pkg::*;

  localparam int N = 3;
  localparam int M = 9;

  logic         clk = 0, rst_n = 0, step = 0;
  fx_t          field, sum;
  fx_t          v0 [N];
  logic [M-1:0] gamma [N];
  fx_t          v [N];
  int           checks = 0, failures = 0, cycles = 0;

  si_chain_eq5 #(.N(N), .M(M)) dut (.clk, .rst_n, .step, .field, .v0, .gamma, .v, .sum);

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
    real s, e[N], r, prev[N];
    fx_t hold;
    v0[0] = fx_const(0.0);  gamma[0] = 9'd0;
    v0[1] = fx_const(0.1);  gamma[1] = 9'd256;
    v0[2] = fx_const(0.15); gamma[2] = 9'd222;
    field = fx_const(0.8);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 1000; n++) begin
      field = fx_const(0.8 * (1.0 + 0.4 * $sin(6.283185307179586 * real'(n) / 53.0)));
      #1;
      checks++;
      if (v[0] != field) begin
        failures++;
        $display("FAIL v[0] is not the field");
      end
      for (int k = 0; k < N; k++) prev[k] = rl(v[k]);
      s = prev[0] + prev[1] + prev[2];
      for (int k = 1; k < N; k++) begin
        r = 1.0 - prev[k-1] / s;
        if (r < 0.0) r = -r;
        e[k] = rl(v0[k]) * $pow(r, -real'(gamma[k]) / 512.0);
      end
      step = 1;
      @(negedge clk);
      step = 0;
      for (int k = 1; k < N; k++) begin
        checks++;
        if ($pow(rl(v[k]) - e[k], 2.0) > $pow(5e-4 * e[k] + 1e-6, 2.0)) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d k=%0d v=%f expected %f", n, k, rl(v[k]), e[k]);
        end
      end
      if (n % 100 == 0) begin
        hold = v[2];
        @(negedge clk);
        checks++;
        if (v[2] != hold) begin
          failures++;
          $display("FAIL state moved without step");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
