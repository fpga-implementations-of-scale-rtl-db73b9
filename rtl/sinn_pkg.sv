// sinn_pkg: number format and shared arithmetic for the neuron models.
//
// Every state variable, parameter and signal of the models is a signed
// two's-complement fixed-point number with FX_W = 32 bits, FX_FRAC = 24 of
// them fractional (range about +-128, step 6e-8). The format is this design's
// own choice: the models need values from about 1e-3 (the Hindmarsh-Rose
// slow rate) to about 20 (its recovery variable), and fractional parts fine
// enough that the slow variable still moves at each Euler step.
//
// fx_mul multiplies two such numbers, rounds to nearest and saturates;
// fx_sat clips a wide intermediate value to the 32-bit range; fx_abs is a
// saturating absolute value. All are pure combinational functions.
package sinn_pkg;

  localparam int FX_W    = 32;
  localparam int FX_FRAC = 24;

  typedef logic signed [FX_W-1:0] fx_t;

  localparam fx_t FX_ONE = fx_t'(1 <<< FX_FRAC);
  localparam fx_t FX_MAX = fx_t'({1'b0, {(FX_W-1){1'b1}}});
  localparam fx_t FX_MIN = fx_t'({1'b1, {(FX_W-1){1'b0}}});

  // Constant conversion from a real number, for parameter defaults only.
  function automatic fx_t fx_const(input real r);
    return fx_t'($rtoi(r * 16777216.0 + ((r < 0.0) ? -0.5 : 0.5)));
  endfunction

  // Clip a 64-bit value to the fx_t range.
  function automatic fx_t fx_sat(input logic signed [63:0] v);
    if (v > 64'(FX_MAX))      return FX_MAX;
    else if (v < 64'(FX_MIN)) return FX_MIN;
    else                      return fx_t'(v);
  endfunction

  // Product of two fx_t values, rounded to nearest, saturated.
  function automatic fx_t fx_mul(input fx_t a, input fx_t b);
    logic signed [63:0] p;
    p = 64'(a) * 64'(b);
    p = (p + 64'sd8388608) >>> FX_FRAC;  // + 2^(FRAC-1): round half up
    return fx_sat(p);
  endfunction

  // Absolute value; |FX_MIN| saturates to FX_MAX.
  function automatic fx_t fx_abs(input fx_t a);
    if (a == FX_MIN)   return FX_MAX;
    else if (a < 0)    return -a;
    else               return a;
  endfunction

endpackage
