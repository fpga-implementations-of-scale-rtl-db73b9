// tb_hr_neuron: checks the Hindmarsh-Rose integrator against a real-valued
// Euler model with the same step (dt = 1/32) and the parameters a = 1,
// b = 3, c = 1, d = 5, s = 4, xR = -1.6, r = 1e-3, I = 2. Over 3000 steps
// x, y and z must stay within 0.05 of the model (z within 0.002), the
// state must hold while step is low, and x must spike (rise through 1.0)
// at least three times.
module tb_hr_neuron;
  import sinn_pkg::*;

  logic clk = 0, rst_n = 0, step = 0;
  fx_t  x, y, z;
  int   checks = 0, failures = 0, cycles = 0, spikes = 0;

  hr_neuron dut (.clk, .rst_n, .step, .x, .y, .z);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rl(input fx_t a);
    return real'(a) / 16777216.0;
  endfunction

  function automatic real ab(input real a);
    return (a < 0.0) ? -a : a;
  endfunction

  initial begin
    real rx, ry, rz, dx, dy, dz, prev;
    fx_t hx;
    rx = -1.6;
    ry = -11.8;
    rz = 0.0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    prev = rx;
    for (int n = 1; n <= 3000; n++) begin
      @(negedge clk);
      step = 1;
      @(negedge clk);
      step = 0;
      dx = ry - rx * rx * rx + 3.0 * rx * rx - rz + 2.0;
      dy = 1.0 - 5.0 * rx * rx - ry;
      dz = 0.001 * (4.0 * (rx + 1.6) - rz);
      rx = rx + dx / 32.0;
      ry = ry + dy / 32.0;
      rz = rz + dz / 32.0;
      checks++;
      if (ab(rl(x) - rx) > 0.05 || ab(rl(y) - ry) > 0.05 || ab(rl(z) - rz) > 0.002) begin
        failures++;
        if (failures < 10)
          $display("FAIL n=%0d x=%f y=%f z=%f expected %f %f %f", n, rl(x), rl(y), rl(z), rx, ry, rz);
      end
      if (prev < 1.0 && rl(x) >= 1.0) spikes++;
      prev = rl(x);
      if (n % 500 == 0) begin
        hx = x;
        repeat (2) @(negedge clk);
        checks++;
        if (x != hx) begin
          failures++;
          $display("FAIL state moved without step");
        end
      end
    end
    checks++;
    if (spikes < 3) begin
      failures++;
      $display("FAIL only %0d spikes", spikes);
    end
    $display("spikes=%0d", spikes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
