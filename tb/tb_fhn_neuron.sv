// tb_fhn_neuron: checks the FitzHugh-Nagumo integrator against a real-valued
// Euler model with the same step (dt = 1/32) and parameters (I = 0.5,
// tau = 12.5, a = 0.7, b = 0.8). Over 4000 steps (two to three spikes)
// v and w must stay within 0.02 of the model, the state must change only in
// the cycle after a step (held while step is low), and the oscillator must
// spike (v rising through 1.0) at least twice.
module tb_fhn_neuron;
  import sinn_pkg::*;

  logic clk = 0, rst_n = 0, step = 0;
  fx_t  v, w;
  int   checks = 0, failures = 0, cycles = 0, spikes = 0;

  fhn_neuron dut (.clk, .rst_n, .step, .v, .w);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real rv, rw, dv, dw, yv, yw, prev;
    fx_t hv, hw;
    rv = -1.0;
    rw = 0.0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    prev = rv;
    for (int n = 1; n <= 4000; n++) begin
      @(negedge clk);
      step = 1;
      @(negedge clk);
      step = 0;
      dv = rv - rv * rv * rv / 3.0 - rw + 0.5;
      dw = (rv + 0.7 - 0.8 * rw) / 12.5;
      rv = rv + dv / 32.0;
      rw = rw + dw / 32.0;
      yv = real'(v) / 16777216.0;
      yw = real'(w) / 16777216.0;
      checks++;
      if (yv - rv > 0.02 || rv - yv > 0.02 || yw - rw > 0.02 || rw - yw > 0.02) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d v=%f w=%f expected %f %f", n, yv, yw, rv, rw);
      end
      if (prev < 1.0 && yv >= 1.0) spikes++;
      prev = yv;
      if (n % 500 == 0) begin
        hv = v;
        hw = w;
        repeat (2) @(negedge clk);
        checks++;
        if (v != hv || w != hw) begin
          failures++;
          $display("FAIL state moved without step");
        end
      end
    end
    checks++;
    if (spikes < 2) begin
      failures++;
      $display("FAIL only %0d spikes", spikes);
    end
    $display("spikes=%0d", spikes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
