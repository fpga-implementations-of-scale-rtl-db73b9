// tb_fx_sqrt: checks the combinational square root exactly.
// For every input the result y must be the integer square root of the
// widened radicand X = x * 2^24, i.e. y^2 <= X < (y+1)^2, checked with
// 128-bit integer arithmetic. Inputs: zero, one, the largest value,
// negatives (expected 0) and 2000 random values of varied magnitude.
module tb_fx_sqrt;
  import sinn_pkg::*;

  fx_t x, y;
  int  checks = 0, failures = 0;

  fx_sqrt dut (.x(x), .y(y));

  task automatic check(input fx_t xin);
    logic [127:0] big, lo, hi;
    x = xin;
    #1;
    checks++;
    if (xin < 0) begin
      if (y != 0) begin
        failures++;
        $display("FAIL sqrt(neg %0d) = %0d", xin, y);
      end
    end else begin
      big = 128'(xin) << FX_FRAC;
      lo  = 128'(y) * 128'(y);
      hi  = (128'(y) + 1) * (128'(y) + 1);
      if (y < 0 || lo > big || hi <= big) begin
        failures++;
        $display("FAIL sqrt(%0d) = %0d", xin, y);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0);
    check(1);
    check(FX_ONE);
    check(fx_const(4.0));
    check(fx_const(2.0));
    check(FX_MAX);
    check(-5);
    check(FX_MIN);
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] r;
      r = $urandom;
      check(fx_t'(r[30:0] >> ($urandom % 31)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
