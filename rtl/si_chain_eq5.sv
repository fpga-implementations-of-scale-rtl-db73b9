// si_chain_eq5: scale-invariant network, second method (chain of neurons).
//
// The field drives only the first neuron, whose potential is the field
// itself (V_1 = F). Every further neuron k = 2..N is driven by its
// predecessor:
//     V_k <= V0_k * |1 - V_(k-1) / sum_j V_j| ^ (-gamma_k)
// where the sum runs over all N neurons, V_1 = F included, and all
// right-hand values are those of the current iteration. Neurons 2..N each
// have an si_neuron datapath and a register.
//
// Interface: clk, rst_n (active low, asynchronous; registered potentials
// start at V_INIT), step, field, v0[N], gamma[N] (entries 0 unused, since
// neuron 1 is the field), v[N] (v[0] = field, v[1..N-1] registered), sum.
// Latency one cycle per iteration.
// The update law and N = 3 are the document's; including V_1 = F in the sum
// and the initial potential are this design's reading.
module si_chain_eq5
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

  fx_t v_reg  [N];
  fx_t v_next [N];

  assign v_reg[0]  = field;
  assign v_next[0] = field;

  always_comb begin
    logic signed [63:0] acc;
    acc = '0;
    for (int k = 0; k < N; k++) acc += 64'(v_reg[k]);
    sum = fx_sat(acc);
    for (int k = 0; k < N; k++) v[k] = v_reg[k];
  end

  for (genvar k = 1; k < N; k++) begin : g_neuron
    si_neuron #(.M(M)) u_neuron (
      .drive (v_reg[k-1]),
      .sum   (sum),
      .v0    (v0[k]),
      .gamma (gamma[k]),
      .v_next(v_next[k])
    );

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)    v_reg[k] <= V_INIT;
      else if (step) v_reg[k] <= v_next[k];
  end

endmodule
