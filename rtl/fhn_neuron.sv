// fhn_neuron: FitzHugh-Nagumo neuron integrated with the explicit Euler rule.
//
// Model:  dv/dt = v - v^3/3 - w + I,   tau dw/dt = v + a - b w
// with v the membrane potential and w the recovery variable. At every
// iteration (step = 1) both variables advance by dt = 2^-DT_SHIFT times
// their derivative, evaluated from the old state:
//     v <= v + (v - v^3/3 - w + I) * dt
//     w <= w + (v + a - b w) / tau * dt
// One iteration per clock cycle at most; the new state is visible the cycle
// after the step. Multiplications use sinn_pkg::fx_mul; 1/3 and 1/tau are
// constants; the dt scaling is an arithmetic shift.
//
// Interface: clk, rst_n (active low, asynchronous; loads V_INIT, W_INIT),
// step, v, w (sinn_pkg format).
// The equations and I = 0.5, tau = 12.5, a = 0.7, b = 0.8 are the
// document's; the Euler method, dt = 1/32 and the initial state are this
// design's choice.
module fhn_neuron
  import sinn_pkg::*;
#(
  parameter fx_t I_EXT    = fx_const(0.5),
  parameter fx_t TAU      = fx_const(12.5),
  parameter fx_t A        = fx_const(0.7),
  parameter fx_t B        = fx_const(0.8),
  parameter int  DT_SHIFT = 5,
  parameter fx_t V_INIT   = fx_const(-1.0),
  parameter fx_t W_INIT   = fx_const(0.0)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic step,
  output fx_t  v,
  output fx_t  w
);

  localparam fx_t THIRD   = fx_const(1.0 / 3.0);
  localparam fx_t INV_TAU = fx_div_const(FX_ONE, TAU);

  // Constant quotient, used only for the parameter above.
  function automatic fx_t fx_div_const(input fx_t n, input fx_t d);
    return fx_t'((64'(n) <<< FX_FRAC) / 64'(d));
  endfunction

  fx_t v3, dv, dw;

  always_comb begin
    v3 = fx_mul(fx_mul(v, v), v);
    dv = fx_sat(64'(v) - 64'(fx_mul(v3, THIRD)) - 64'(w) + 64'(I_EXT));
    dw = fx_mul(fx_sat(64'(v) + 64'(A) - 64'(fx_mul(B, w))), INV_TAU);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      v <= V_INIT;
      w <= W_INIT;
    end else if (step) begin
      v <= fx_sat(64'(v) + 64'(dv >>> DT_SHIFT));
      w <= fx_sat(64'(w) + 64'(dw >>> DT_SHIFT));
    end

endmodule
