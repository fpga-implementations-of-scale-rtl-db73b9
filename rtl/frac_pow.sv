// frac_pow: fractional power y = x^gamma from a chain of square roots.
//
// The exponent is a binary fraction with M digits, gamma = sum a_k 2^-k for
// k = 1..M, given as the vector `gamma` whose most significant bit is a_1
// (weight 1/2) and whose least significant bit is a_M (weight 2^-M). Since
// x^gamma = prod_k (x^(2^-k))^a_k, the unit forms the successive roots
// r_1 = sqrt(x), r_2 = sqrt(r_1), ..., r_M, and multiplies together those
// whose digit a_k is 1. gamma = 0 gives 1; x = 0 with gamma > 0 gives 0.
// With the document's M = 9 digits any exponent is met to within 2^-10, which
// covers its tabulated exponents (0.567, 0.806, 0.618 and their complements)
// to +-0.001.
//
// Interface: x (non-negative, sinn_pkg format), gamma (M bits), y. Purely
// combinational: M cascaded square roots and up to M multiplications. The
// structure (root chain, product of selected roots, M = 9) follows the
// document; the root and multiplier circuits are this design's own.
module frac_pow
  import sinn_pkg::*;
#(
  parameter int M = 9
) (
  input  fx_t          x,
  input  logic [M-1:0] gamma,
  output fx_t          y
);

  // Stage k holds root = x^(2^-k) and prod = product of the selected roots
  // among stages 1..k.
  for (genvar k = 1; k <= M; k++) begin : g_stage
    fx_t root_in, prod_in, root, prod;
    if (k == 1) begin : g_head
      assign root_in = x;
      assign prod_in = FX_ONE;
    end else begin : g_link
      assign root_in = g_stage[k-1].root;
      assign prod_in = g_stage[k-1].prod;
    end
    fx_sqrt u_sqrt (.x(root_in), .y(root));
    assign prod = gamma[M-k] ? fx_mul(prod_in, root) : prod_in;
  end

  assign y = g_stage[M].prod;

endmodule
