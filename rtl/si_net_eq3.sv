// si_net_eq3: scale-invariant network, first method (field on every neuron).
//
// N neurons share one external field F(t). At each iteration every neuron k
// is updated in parallel from the potentials of the previous iteration:
//     V_k <= V0_k * |1 - F / sum_j V_j| ^ (-gamma_k)
// Each neuron has its own si_neuron datapath, threshold V0_k and exponent
// gamma_k; the sum of the N potentials is one adder tree that all of them
// read, which is what couples the neurons into a network.
//
// Interface: clk, rst_n (active low, asynchronous; all potentials start at
// V_INIT), step (one iteration, at most one per clock), field, v0[N],
// gamma[N] (M-digit binary fractions), v[N] (registered potentials),
// sum (their sum). Latency one cycle per iteration.
// The update law, N = 3 and M = 9 are the document's; the common initial
// potential (equal to the document's V0 = 0.1) is this design's choice.
module si_net_eq3
  import sinn_pkg::*;
#(
  parameter int  N      = 3,
  parameter int  M      = 9,
  parameter fx_t V_INIT = fx_const(0.1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,
  input  fx_t          field,
  input  fx_t          v0    [N],
  input  logic [M-1:0] gamma [N],
  output fx_t          v     [N],
  output fx_t          sum
);

  fx_t v_next [N];

  always_comb begin
    logic signed [63:0] acc;
    acc = '0;
    for (int k = 0; k < N; k++) acc += 64'(v[k]);
    sum = fx_sat(acc);
  end

  for (genvar k = 0; k < N; k++) begin : g_neuron
    si_neuron #(.M(M)) u_neuron (
      .drive (field),
      .sum   (sum),
      .v0    (v0[k]),
      .gamma (gamma[k]),
      .v_next(v_next[k])
    );

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)    v[k] <= V_INIT;
      else if (step) v[k] <= v_next[k];
  end

endmodule
