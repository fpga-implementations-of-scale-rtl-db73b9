// si_neuron: one update of a scale-invariant neuron.
//
// Computes the neuron's next action potential
//     v_next = v0 * |1 - drive / sum| ^ (-gamma)
// where `drive` is the external field F(t) (first method) or the
// potential of the preceding neuron (second method), `sum` is the sum of the
// potentials of all neurons of the network at the current iteration, v0 is
// the neuron's threshold potential and gamma its fractional exponent
// (fractal minus topological dimension). The datapath is: quotient
// q = drive / sum, ratio r = |1 - q|, power p = r^gamma from frac_pow, and
// the result v0 / p, which realises the negative exponent.
//
// Interface: all values in the sinn_pkg format, gamma as an M-digit binary
// fraction (see frac_pow). Purely combinational; the networks register its
// output once per iteration. Edge cases are this design's choice: a zero sum
// saturates the quotient, and r = 0 (p = 0) saturates v_next to FX_MAX,
// after which the next iteration's large sum brings the neuron back near v0.
module si_neuron
  import sinn_pkg::*;
#(
  parameter int M = 9
) (
  input  fx_t          drive,
  input  fx_t          sum,
  input  fx_t          v0,
  input  logic [M-1:0] gamma,
  output fx_t          v_next
);

  fx_t q, r, p;

  fx_div u_ratio (.a(drive), .b(sum), .y(q));

  always_comb r = fx_abs(fx_sat(64'(FX_ONE) - 64'(q)));

  frac_pow #(.M(M)) u_pow (.x(r), .gamma(gamma), .y(p));

  fx_div u_scale (.a(v0), .b(p), .y(v_next));

endmodule
