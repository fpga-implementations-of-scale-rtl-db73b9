// fx_sqrt: combinational square root of a non-negative fixed-point number.
//
// The fractional-power unit is built from exact square roots, the one root
// the logic can compute directly. This block gives y = sqrt(x) for x in the
// sinn_pkg format (Q7.24 in a signed 32-bit word). The radicand is widened to
// x * 2^24, so that its integer square root is the result in the same format.
// The integer root is formed by the classic bit-by-bit (digit recurrence)
// method: 28 stages, each trying one result bit with a subtraction, unrolled
// into a purely combinational network. The result is truncated (floor).
// Negative inputs give 0.
//
// Interface: x in, y out, no clock; the delay is that of 28 cascaded
// 56-bit compare/subtract stages. The algorithm is this design's choice; the
// document only says that the power unit is made from exact roots.
module fx_sqrt
  import sinn_pkg::*;
(
  input  fx_t x,
  output fx_t y
);

  localparam int RW = 56;          // radicand width: 32 + 24
  localparam int NB = RW / 2;      // result bits

  always_comb begin
    logic [RW-1:0] op;
    logic [RW-1:0] res;
    logic [RW-1:0] bitv;
    op   = (x[FX_W-1]) ? '0 : {1'b0, x[FX_W-2:0], {FX_FRAC{1'b0}}};
    res  = '0;
    bitv = RW'(1) << (RW - 2);
    for (int i = 0; i < NB; i++) begin
      if (op >= res + bitv) begin
        op  = op - (res + bitv);
        res = (res >> 1) + bitv;
      end else begin
        res = res >> 1;
      end
      bitv = bitv >> 2;
    end
    y = fx_t'(res[FX_W-1:0]);
  end

endmodule
