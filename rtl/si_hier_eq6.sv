// si_hier_eq6: hierarchical (multilayer) scale-invariant network.
//
// L layers of K neurons. One iteration nests the neuron law L times:
//     f(V0, S) = V0 * |1 - F / S| ^ (-gamma)
//     layer 1:  U_1k = f(V0 / L, sum_j V_Lj)        (previous iteration)
//     layer l:  U_lk = f(V0,     sum_j U_(l-1)j)    (same iteration)
// and all L*K potentials are registered at the end of the iteration. The
// innermost layer therefore works like the first-method network with its
// threshold divided by the order L, and each further layer sees the summed
// output of the layer below, as the nesting V_n = f(...f(V0/n, V_n)...)
// prescribes. Each of the L*K neurons has its own si_neuron datapath, so an
// iteration is L datapaths deep.
//
// Interface: clk, rst_n (active low, asynchronous; potentials start at
// V_INIT), step, field, v0 (threshold of every neuron), gamma (M-digit
// exponent of every neuron), v[L][K] (registered potentials), top_sum.
// The nesting, L = 3, K = 3 and the short exponent (M = 2, "m = 1, 2") are
// the document's; sharing one V0 and gamma across neurons, and the reading of
// the nesting as layers joined through their sums, are this design's.
module si_hier_eq6
  import sinn_pkg::*;
#(
  parameter int  L      = 3,
  parameter int  K      = 3,
  parameter int  M      = 2,
  parameter fx_t V_INIT = fx_const(0.1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,
  input  fx_t          field,
  input  fx_t          v0,
  input  logic [M-1:0] gamma,
  output fx_t          v [L][K],
  output fx_t          top_sum
);

  fx_t thr1;            // threshold of the first layer, V0 / L

  fx_div u_thr (.a(v0), .b(fx_t'(L <<< FX_FRAC)), .y(thr1));

  function automatic fx_t row_sum(input fx_t r [K]);
    logic signed [63:0] acc;
    acc = '0;
    for (int k = 0; k < K; k++) acc += 64'(r[k]);
    return fx_sat(acc);
  endfunction

  assign top_sum = row_sum(v[L-1]);

  // Layer l holds u (this iteration's new potentials), in_sum (the sum it
  // is driven with) and thr (its threshold).
  for (genvar l = 0; l < L; l++) begin : g_layer
    fx_t u [K];
    fx_t in_sum, thr;
    if (l == 0) begin : g_first
      assign in_sum = top_sum;
      assign thr    = thr1;
    end else begin : g_next
      assign in_sum = row_sum(g_layer[l-1].u);
      assign thr    = v0;
    end

    for (genvar k = 0; k < K; k++) begin : g_neuron
      si_neuron #(.M(M)) u_neuron (
        .drive (field),
        .sum   (in_sum),
        .v0    (thr),
        .gamma (gamma),
        .v_next(u[k])
      );

      always_ff @(posedge clk or negedge rst_n)
        if (!rst_n)    v[l][k] <= V_INIT;
        else if (step) v[l][k] <= u[k];
    end
  end

endmodule
