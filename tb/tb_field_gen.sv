// tb_field_gen: checks F(t) = A (1 + B sin(W t)) step by step.
// Uses A = 0.8, B = 0.4 and a coarse phase increment so that several
// periods pass in 300 iterations. After reset F must equal A; after every
// step (one clock cycle later) F must match the real formula at phase
// 2 pi n PHASE_INC / 2^32 to within 2e-5; with step low for a few cycles
// the field and phase must hold.
module tb_field_gen;
  import sinn_pkg::*;

  localparam logic [31:0] INC = 32'd97_000_000;
  localparam real         A   = 0.8;
  localparam real         B   = 0.4;

  logic        clk = 0, rst_n = 0, step = 0;
  fx_t         field;
  logic [31:0] phase;
  int          checks = 0, failures = 0, cycles = 0;

  field_gen #(.A(fx_const(A)), .B(fx_const(B)), .PHASE_INC(INC)) dut (
    .clk, .rst_n, .step, .field, .phase
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic expect_field(input longint n);
    real ph, e, y;
    ph = 6.283185307179586 * real'((n * longint'(INC)) % 64'h1_0000_0000) / 4294967296.0;
    e  = A * (1.0 + B * $sin(ph));
    y  = real'(field) / 16777216.0;
    checks++;
    if (y - e > 2e-5 || e - y > 2e-5) begin
      failures++;
      $display("FAIL n=%0d field=%f expected %f", n, y, e);
    end
  endtask

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ph_hold;
    fx_t         f_hold;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_field(0);
    for (int n = 1; n <= 300; n++) begin
      step = 1;
      @(negedge clk);
      step = 0;
      expect_field(n);
      checks++;
      if (phase != 32'(longint'(n) * longint'(INC))) begin
        failures++;
        $display("FAIL phase %0d", phase);
      end
      if (n % 50 == 0) begin
        ph_hold = phase;
        f_hold  = field;
        repeat (3) @(negedge clk);
        checks++;
        if (phase != ph_hold || field != f_hold) begin
          failures++;
          $display("FAIL field moved without step");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
