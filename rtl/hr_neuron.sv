// hr_neuron: Hindmarsh-Rose neuron integrated with the explicit Euler rule.
//
// Model:  dx/dt = y - a x^3 + b x^2 - z + I
//         dy/dt = c - d x^2 - y
//         dz/dt = r (s (x - xR) - z)
// x is the membrane potential, y the fast recovery current and z the slow
// adaptation current. At every iteration (step = 1) the three variables
// advance by dt = 2^-DT_SHIFT times their derivatives from the old state.
// One iteration per clock cycle at most; the new state is visible the cycle
// after the step.
//
// Interface: clk, rst_n (active low, asynchronous; loads the initial state),
// step, x, y, z (sinn_pkg format).
// The equations and a = 1, b = 3, c = 1, d = 5, s = 4, xR = -8/5, r = 1e-3,
// I = 2 are the document's; Euler, dt = 1/32 and the initial state (x at
// rest, y at its nullcline value 1 - 5 xR^2, z = 0) are this design's choice.
module hr_neuron
  import sinn_pkg::*;
#(
  parameter fx_t A        = fx_const(1.0),
  parameter fx_t B        = fx_const(3.0),
  parameter fx_t C        = fx_const(1.0),
  parameter fx_t D        = fx_const(5.0),
  parameter fx_t S        = fx_const(4.0),
  parameter fx_t XR       = fx_const(-1.6),
  parameter fx_t R        = fx_const(0.001),
  parameter fx_t I_EXT    = fx_const(2.0),
  parameter int  DT_SHIFT = 5,
  parameter fx_t X_INIT   = fx_const(-1.6),
  parameter fx_t Y_INIT   = fx_const(-11.8),
  parameter fx_t Z_INIT   = fx_const(0.0)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic step,
  output fx_t  x,
  output fx_t  y,
  output fx_t  z
);

  fx_t x2, x3, dx, dy, dz;

  always_comb begin
    x2 = fx_mul(x, x);
    x3 = fx_mul(x2, x);
    dx = fx_sat(64'(y) - 64'(fx_mul(A, x3)) + 64'(fx_mul(B, x2)) - 64'(z) + 64'(I_EXT));
    dy = fx_sat(64'(C) - 64'(fx_mul(D, x2)) - 64'(y));
    dz = fx_mul(R, fx_sat(64'(fx_mul(S, fx_sat(64'(x) - 64'(XR)))) - 64'(z)));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      x <= X_INIT;
      y <= Y_INIT;
      z <= Z_INIT;
    end else if (step) begin
      x <= fx_sat(64'(x) + 64'(dx >>> DT_SHIFT));
      y <= fx_sat(64'(y) + 64'(dy >>> DT_SHIFT));
      z <= fx_sat(64'(z) + 64'(dz >>> DT_SHIFT));
    end

endmodule
