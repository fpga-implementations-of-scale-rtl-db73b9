// tb_si_hier_eq6: checks the three-layer hierarchical network step by step.
// Field F_n = 0.45 (1 + 0.5 sin(2 pi n / 61)), V0 = 0.1, gamma = 0.5 (two
// digits, "10"). Per step the expected values are computed in real
// arithmetic from the last layer's potentials before the step:
//   layer 1: V0/3 * |1 - F / S3|^-g,  layer l: V0 * |1 - F / S(l-1)|^-g
// with S the sum of a layer. All nine potentials are checked to 1e-3
// relative (widened by 1e-5/|1 - F/S| for layers fed by another layer) one cycle after the step; the state must hold while step is low.
module tb_si_hier_eq6;
  import sinn_pkg::*;

  localparam int L = 3;
  localparam int K = 3;
  localparam int M = 2;

  logic         clk = 0, rst_n = 0, step = 0;
  fx_t          field, v0, top_sum;
  logic [M-1:0] gamma;
  fx_t          v [L][K];
  int           checks = 0, failures = 0, cycles = 0;

  si_hier_eq6 #(.L(L), .K(K), .M(M)) dut (.clk, .rst_n, .step, .field, .v0, .gamma, .v, .top_sum);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  function automatic real rl(input fx_t a);
    return real'(a) / 16777216.0;
  endfunction

  function automatic real f(input real thr, input real fld, input real s, input real g);
    real r;
    r = 1.0 - fld / s;
    if (r < 0.0) r = -r;
    return thr * $pow(r, -g);
  endfunction

  initial begin
    wait (cycles == 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real s, e[L], fr, tol[L], r;
    fx_t hold;
    v0    = fx_const(0.1);
    gamma = 2'b10;
    field = fx_const(0.45);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 1000; n++) begin
      field = fx_const(0.45 * (1.0 + 0.5 * $sin(6.283185307179586 * real'(n) / 61.0)));
      fr = rl(field);
      s = rl(v[L-1][0]) + rl(v[L-1][1]) + rl(v[L-1][2]);
      e[0] = f(0.1 / 3.0, fr, s, 0.5);
      tol[0] = 1e-3 * e[0];
      for (int l = 1; l < L; l++) begin
        e[l] = f(0.1, fr, 3.0 * e[l-1], 0.5);
        // rounding of the layer below is amplified by 1/|1 - F/S|
        r = 1.0 - fr / (3.0 * e[l-1]);
        if (r < 0.0) r = -r;
        tol[l] = e[l] * (1e-3 + 1e-5 / r);
      end
      step = 1;
      @(negedge clk);
      step = 0;
      for (int l = 0; l < L; l++)
        for (int k = 0; k < K; k++) begin
          checks++;
          if ($pow(rl(v[l][k]) - e[l], 2.0) > $pow(tol[l] + 1e-6, 2.0)) begin
            failures++;
            if (failures < 10) $display("FAIL n=%0d l=%0d k=%0d v=%f expected %f", n, l, k, rl(v[l][k]), e[l]);
          end
        end
      if (n % 100 == 0) begin
        hold = v[2][1];
        @(negedge clk);
        checks++;
        if (v[2][1] != hold) begin
          failures++;
          $display("FAIL state moved without step");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
