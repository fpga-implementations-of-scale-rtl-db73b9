// tb_sinn_top: end-to-end run of all five models at the default parameters.
//
// The strobe is high on most cycles (one iteration per clock) and low on a
// few (stalls). Every cycle the testbench predicts, in real arithmetic and
// from the state it observed before the clock edge, the next state of each
// model and checks it one cycle later:
//   * FitzHugh-Nagumo and Hindmarsh-Rose: one Euler step, dt = 1/32;
//   * the three fields: A (1 + B sin(2 pi n inc / 2^32)) after n iterations;
//   * the field-driven network, the chain and the hierarchical network: their
//     update laws with the exponents 222/512, 1/2 and 1/2;
//   * every 8-bit code: the windowed value of its variable, one cycle later;
//   * with the strobe low, nothing may move.
// It counts the events the design is built to show and fails if any never
// happened: FHN spikes, HR spikes, HR bursts (a spike after a quiet gap of
// more than 3000 iterations),
// field peaks for each field, stalls, and clipped output codes.
module tb_sinn_top;
  import sinn_pkg::*;

  localparam int  STEPS = 30000;
  localparam real TWO_PI = 6.283185307179586;

  logic       clk = 0, rst_n = 0, step = 0;
  logic [7:0] code_fhn, code_hr, code_eq3, code_eq5, code_eq6;
  logic [4:0] code_clipped;
  fx_t        fhn_v, fhn_w, hr_x, hr_y, hr_z, field3, field5, field6;
  fx_t        eq3_v [3];
  fx_t        eq5_v [3];
  fx_t        eq6_v [3][3];

  sinn_top dut (.*);

  int checks = 0, failures = 0, cycles = 0;
  int fhn_spikes = 0, hr_spikes = 0, hr_bursts = 0, stalls = 0, clips = 0;
  int peaks [3] = '{0, 0, 0};

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  function automatic real rl(input fx_t a);
    return real'(a) / 16777216.0;
  endfunction

  function automatic real ab(input real a);
    return (a < 0.0) ? -a : a;
  endfunction

  function automatic real law(input real thr, input real d, input real s, input real g);
    return thr * $pow(ab(1.0 - d / s), -g);
  endfunction

  task automatic near(input string what, input real got, input real expv, input real tol);
    checks++;
    if (ab(got - expv) > tol) begin
      failures++;
      if (failures < 20) $display("FAIL %s: %f expected %f (cycle %0d)", what, got, expv, cycles);
    end
  endtask

  function automatic int win(input fx_t x, input real off, input int sh);
    real c;
    c = $floor((rl(x) - off) * 16777216.0 / real'(1 << sh));
    return (c < 0.0) ? -1 : (c > 255.0 ? 256 : $rtoi(c));
  endfunction

  task automatic check_code(input string what, input logic [7:0] code, input logic clip,
                            input int expc);
    checks++;
    if ((expc < 0 && !(code == 0 && clip)) || (expc > 255 && !(code == 255 && clip)) ||
        (expc >= 0 && expc <= 255 && !(code == 8'(expc) && !clip))) begin
      failures++;
      if (failures < 20) $display("FAIL code %s: %0d/%0d expected %0d", what, code, clip, expc);
    end
    if (clip) clips++;
  endtask

  initial begin
    wait (cycles == STEPS * 2 + 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // predictions
    real ev, ew, ex, ey, ez, ef[3], e3[3], e5[3], e6[3], t6[3];
    real v, w, x, y, z, s;
    int  c_fhn, c_hr, c_eq3, c_eq5, c_eq6;
    longint n;
    real prev_f[3], prev2_f[3], prev_hx;
    int  quiet;
    logic st;

    n = 0;
    quiet = 0;
    prev_hx = -1.6;
    for (int i = 0; i < 3; i++) begin
      prev_f[i]  = 0.0;
      prev2_f[i] = 0.0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    for (int cyc = 0; cyc < STEPS; cyc++) begin
      st = ($urandom % 50) != 0;
      // expected codes of the current state, visible after the next edge
      c_fhn = win(fhn_v, -2.5, 21);
      c_hr  = win(hr_x, -2.5, 21);
      c_eq3 = win(eq3_v[0], 0.0, 16);
      c_eq5 = win(eq5_v[2], 0.0, 16);
      c_eq6 = win(eq6_v[2][0], 0.0, 16);
      v = rl(fhn_v); w = rl(fhn_w);
      x = rl(hr_x);  y = rl(hr_y);  z = rl(hr_z);
      if (st) begin
        ev = v + (v - v * v * v / 3.0 - w + 0.5) / 32.0;
        ew = w + ((v + 0.7 - 0.8 * w) / 12.5) / 32.0;
        ex = x + (y - x * x * x + 3.0 * x * x - z + 2.0) / 32.0;
        ey = y + (1.0 - 5.0 * x * x - y) / 32.0;
        ez = z + (0.001 * (4.0 * (x + 1.6) - z)) / 32.0;
        s = rl(eq3_v[0]) + rl(eq3_v[1]) + rl(eq3_v[2]);
        for (int k = 0; k < 3; k++) e3[k] = law(0.1, rl(field3), s, 222.0 / 512.0);
        s = rl(eq5_v[0]) + rl(eq5_v[1]) + rl(eq5_v[2]);
        e5[1] = law(0.1, rl(eq5_v[0]), s, 0.5);
        e5[2] = law(0.1, rl(eq5_v[1]), s, 0.5);
        s = rl(eq6_v[2][0]) + rl(eq6_v[2][1]) + rl(eq6_v[2][2]);
        e6[0] = law(0.1 / 3.0, rl(field6), s, 0.5);
        e6[1] = law(0.1, rl(field6), 3.0 * e6[0], 0.5);
        e6[2] = law(0.1, rl(field6), 3.0 * e6[1], 0.5);
        // layers 2 and 3 amplify the rounding of the layer below by 1/|1 - F/S|
        t6[0] = 1e-3 * e6[0];
        t6[1] = e6[1] * (1e-3 + 1e-5 / ab(1.0 - rl(field6) / (3.0 * e6[0])));
        t6[2] = e6[2] * (1e-3 + 1e-5 / ab(1.0 - rl(field6) / (3.0 * e6[1])));
        n++;
      end else begin
        ev = v; ew = w; ex = x; ey = y; ez = z;
        for (int k = 0; k < 3; k++) begin
          e3[k] = rl(eq3_v[k]);
          e5[k] = rl(eq5_v[k]);
          e6[k] = rl(eq6_v[k][0]);
          t6[k] = 0.0;
        end
        stalls++;
      end
      ef[0] = 0.8  * (1.0 + 0.4 * $sin(TWO_PI * real'((n * 64'd186227098) % 64'h1_0000_0000) / 4294967296.0));
      ef[1] = 0.8  * (1.0 + 0.4 * $sin(TWO_PI * real'((n * 64'd16777216) % 64'h1_0000_0000) / 4294967296.0));
      ef[2] = 0.45 * (1.0 + 0.5 * $sin(TWO_PI * real'((n * 64'd8388608) % 64'h1_0000_0000) / 4294967296.0));

      step = st;
      @(negedge clk);
      step = 0;

      near("fhn v", rl(fhn_v), ev, 1e-5);
      near("fhn w", rl(fhn_w), ew, 1e-5);
      near("hr x", rl(hr_x), ex, 1e-5);
      near("hr y", rl(hr_y), ey, 1e-5);
      near("hr z", rl(hr_z), ez, 1e-6);
      near("field3", rl(field3), ef[0], 2e-5);
      near("field5", rl(field5), ef[1], 2e-5);
      near("field6", rl(field6), ef[2], 2e-5);
      for (int k = 0; k < 3; k++) near("eq3", rl(eq3_v[k]), e3[k], 5e-4 * e3[k] + 1e-6);
      for (int k = 1; k < 3; k++) near("eq5", rl(eq5_v[k]), e5[k], 5e-4 * e5[k] + 1e-6);
      for (int l = 0; l < 3; l++) near("eq6", rl(eq6_v[l][0]), e6[l], t6[l] + 1e-6);
      check_code("fhn", code_fhn, code_clipped[0], c_fhn);
      check_code("hr",  code_hr,  code_clipped[1], c_hr);
      check_code("eq3", code_eq3, code_clipped[2], c_eq3);
      check_code("eq5", code_eq5, code_clipped[3], c_eq5);
      check_code("eq6", code_eq6, code_clipped[4], c_eq6);

      // events
      if (v < 1.0 && rl(fhn_v) >= 1.0) fhn_spikes++;
      if (prev_hx < 1.0 && rl(hr_x) >= 1.0) begin
        hr_spikes++;
        if (quiet > 3000) hr_bursts++;
        quiet = 0;
      end else if (st) quiet++;
      prev_hx = rl(hr_x);
      if (st) begin
        real fv[3];
        fv[0] = rl(field3); fv[1] = rl(field5); fv[2] = rl(field6);
        for (int i = 0; i < 3; i++) begin
          if (prev_f[i] > prev2_f[i] && prev_f[i] >= fv[i] && prev_f[i] > 0.9 * ((i == 2) ? 0.675 : 1.12))
            peaks[i]++;
          prev2_f[i] = prev_f[i];
          prev_f[i]  = fv[i];
        end
      end
    end

    $display("iterations=%0d stalls=%0d fhn_spikes=%0d hr_spikes=%0d hr_bursts=%0d peaks=%0d/%0d/%0d clipped_codes=%0d",
             n, stalls, fhn_spikes, hr_spikes, hr_bursts, peaks[0], peaks[1], peaks[2], clips);
    $display("final: eq3 %f  eq5 %f %f  eq6 %f %f %f", rl(eq3_v[0]), rl(eq5_v[1]), rl(eq5_v[2]),
             rl(eq6_v[0][0]), rl(eq6_v[1][0]), rl(eq6_v[2][0]));
    checks++; if (fhn_spikes == 0) begin failures++; $display("FAIL no FHN spike"); end
    checks++; if (hr_spikes == 0)  begin failures++; $display("FAIL no HR spike"); end
    checks++; if (hr_bursts == 0)  begin failures++; $display("FAIL no HR burst"); end
    checks++; if (stalls == 0)     begin failures++; $display("FAIL no stall"); end
    checks++; if (clips == 0)      begin failures++; $display("FAIL no clipped code"); end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (peaks[i] == 0) begin failures++; $display("FAIL field %0d never peaked", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
