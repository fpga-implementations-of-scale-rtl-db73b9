// field_gen: modulation-periodic external field F(t) = A (1 + B sin(W t)).
//
// A 32-bit phase accumulator advances by PHASE_INC at every iteration
// (step = 1), so that W * dt = 2 pi * PHASE_INC / 2^32 per iteration. The
// sine is read from a 2^TBL_BITS-entry table of one full period, computed at
// elaboration, and linearly interpolated between neighbouring entries with
// the next 16 phase bits, which keeps the error below 1e-5. The output is
// F = A + (A*B) * sin.
//
// Interface: clk, rst_n (active low, asynchronous; clears the phase so
// that F starts at A), step (advance one iteration), field (sinn_pkg
// format), phase (the accumulator, for observation). The field is a
// registered-state function: it changes in the cycle after a step.
// A, B and W are the document's (the defaults are those of its first-method
// experiment: A = 0.8, B = 0.4, W = 88.8 pi); the time per iteration
// dt = 1/1024 and the table method are this design's choice.
module field_gen
  import sinn_pkg::*;
#(
  parameter fx_t         A         = fx_const(0.8),
  parameter fx_t         B         = fx_const(0.4),
  parameter logic [31:0] PHASE_INC = 32'd186227098,   // 88.8 pi / 1024 rad
  parameter int          TBL_BITS  = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        step,
  output fx_t         field,
  output logic [31:0] phase
);

  localparam int  NTBL  = 1 << TBL_BITS;
  localparam int  IBITS = 16;                       // interpolation bits
  localparam fx_t AB    = fx_mul(A, B);

  typedef fx_t table_t [NTBL];

  function automatic table_t make_table();
    table_t t;
    for (int i = 0; i < NTBL; i++)
      t[i] = fx_const($sin(6.283185307179586 * real'(i) / real'(NTBL)));
    return t;
  endfunction

  localparam table_t SIN_TBL = make_table();

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    phase <= '0;
    else if (step) phase <= phase + PHASE_INC;

  logic [TBL_BITS-1:0] idx, idx_n;
  logic [IBITS-1:0]    frac;
  fx_t                 s0, s1, s;
  logic signed [63:0]  interp;

  always_comb begin
    idx    = phase[31 -: TBL_BITS];
    idx_n  = idx + 1'b1;
    frac   = phase[31-TBL_BITS -: IBITS];
    s0     = SIN_TBL[idx];
    s1     = SIN_TBL[idx_n];
    interp = (64'(s1 - s0) * 64'({1'b0, frac})) >>> IBITS;
    s      = fx_t'(64'(s0) + interp);
    field  = fx_sat(64'(A) + 64'(fx_mul(AB, s)));
  end

endmodule
