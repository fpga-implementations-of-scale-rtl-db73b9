// tb_wl_eq3_points: long runs of the field-driven network, as in the timing
// comparison of 1.5 million and 10 million points.
//
// A field_gen and an si_net_eq3 at their default parameters (A = 0.8,
// B = 0.4, W = 88.8 pi, three neurons, V0 = 0.1, gamma = 222/512 = 0.4336)
// run with the strobe held high, one iteration per clock, for POINTS
// iterations. The testbench checks that exactly one point is produced per
// cycle: the cycle count from the first iteration equals SHORT_RUN after
// 1.5 million points and POINTS after 10 million.
// checks every 251st iteration against a real-valued one-step prediction
// of all three neurons, and checks that the potentials stay positive and
// finite throughout. It also reports the range of neuron 1.
module tb_wl_eq3_points;
  import sinn_pkg::*;

  localparam int  SHORT_RUN = 1_500_000;
  localparam int  POINTS    = 10_000_000;
  localparam int  N      = 3;
  localparam int  M      = 9;

  logic         clk = 0, rst_n = 0, step = 0;
  fx_t          field, sum;
  logic [31:0]  phase;
  fx_t          v0 [N];
  logic [M-1:0] gamma [N];
  fx_t          v [N];
  int           checks = 0, failures = 0;
  longint       cycles = 0;

  field_gen u_field (.clk, .rst_n, .step, .field, .phase);
  si_net_eq3 dut (.clk, .rst_n, .step, .field, .v0, .gamma, .v, .sum);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  function automatic real rl(input fx_t a);
    return real'(a) / 16777216.0;
  endfunction

  initial begin
    wait (cycles == longint'(POINTS) + 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint c0, c1;
    real    e[N], s, r, vmin, vmax;
    for (int k = 0; k < N; k++) begin
      v0[k]    = fx_const(0.1);
      gamma[k] = 9'd222;
    end
    vmin = 1.0e9;
    vmax = -1.0e9;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    step = 1;
    c0 = cycles;
    for (int n = 0; n < POINTS; n++) begin
      if (n % 251 == 0) begin
        s = rl(v[0]) + rl(v[1]) + rl(v[2]);
        r = 1.0 - rl(field) / s;
        if (r < 0.0) r = -r;
        for (int k = 0; k < N; k++) e[k] = 0.1 * $pow(r, -222.0 / 512.0);
      end
      @(negedge clk);
      if (n % 251 == 0)
        for (int k = 0; k < N; k++) begin
          checks++;
          if ($pow(rl(v[k]) - e[k], 2.0) > $pow(5e-4 * e[k] + 1e-6, 2.0)) begin
            failures++;
            if (failures < 10) $display("FAIL n=%0d k=%0d v=%f expected %f", n, k, rl(v[k]), e[k]);
          end
        end
      if (v[0] <= 0 || v[0] == FX_MAX) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d potential out of range", n);
      end
      if (n == SHORT_RUN - 1) begin
        checks++;
        if (cycles - c0 != longint'(SHORT_RUN)) begin
          failures++;
          $display("FAIL %0d points took %0d cycles", SHORT_RUN, cycles - c0);
        end
        $display("points=%0d cycles=%0d", SHORT_RUN, cycles - c0);
      end
      if (rl(v[0]) < vmin) vmin = rl(v[0]);
      if (rl(v[0]) > vmax) vmax = rl(v[0]);
    end
    c1 = cycles;
    step = 0;
    checks++;
    if (c1 - c0 != longint'(POINTS)) begin
      failures++;
      $display("FAIL %0d points took %0d cycles", POINTS, c1 - c0);
    end
    $display("points=%0d cycles=%0d neuron1 range %f .. %f", POINTS, c1 - c0, vmin, vmax);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
