// tb_code_out: checks the 8-bit output mapping.
// With OFFSET = -1.0 and SHIFT = 20 the window is [-1, 15): the code must be
// floor((x + 1) * 16) for x inside, 0 or 255 with `clipped` set outside,
// and must appear one clock after x is applied.
module tb_code_out;
  import sinn_pkg::*;

  logic       clk = 0, rst_n = 0;
  fx_t        x;
  logic [7:0] code;
  logic       clipped;
  int         checks = 0, failures = 0, cycles = 0;

  code_out #(.OFFSET(fx_const(-1.0)), .SHIFT(20)) dut (.clk, .rst_n, .x, .code, .clipped);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      real xr, c;
      int  ec;
      bit  eclip;
      xr = -3.0 + 20.0 * real'($urandom % 100000) / 100000.0;
      @(negedge clk);
      x = fx_const(xr);
      c = $floor((real'(x) / 16777216.0 + 1.0) * 16.0);
      eclip = (c < 0.0) || (c > 255.0);
      ec = (c < 0.0) ? 0 : (c > 255.0 ? 255 : $rtoi(c));
      @(negedge clk);   // one clock of latency
      checks++;
      if (code != 8'(ec) || clipped != eclip) begin
        failures++;
        $display("FAIL x=%f code=%0d clip=%0d expected %0d %0d", xr, code, clipped, ec, eclip);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
