// fx_div: combinational fixed-point quotient y = a / b with saturation.
//
// The scale-invariant neuron needs two divisions per update: the field (or
// the preceding neuron) over the sum of all potentials, and the threshold
// potential over the fractional power. This block forms (a * 2^24) / b with a
// 56-bit dividend, truncating toward zero, and clips the result to the fx_t
// range. Division by zero saturates to FX_MAX, or to FX_MIN for a negative
// dividend. Purely combinational, no clock.
//
// The document does not describe the divider; it is the simplest exact one.
module fx_div
  import sinn_pkg::*;
(
  input  fx_t a,
  input  fx_t b,
  output fx_t y
);

  logic signed [63:0] num;
  logic signed [63:0] q;

  always_comb begin
    num = 64'(a) <<< FX_FRAC;
    q   = '0;
    if (b == 0) y = (a < 0) ? FX_MIN : FX_MAX;
    else begin
      q = num / 64'(b);
      y = fx_sat(q);
    end
  end

endmodule
