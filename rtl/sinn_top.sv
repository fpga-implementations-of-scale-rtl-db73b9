// sinn_top: the five neuron models side by side, each with its 8-bit output.
//
// The design holds five independent signal generators that share only the
// clock, the reset and the iteration strobe `step`:
//   * fhn_neuron   - FitzHugh-Nagumo oscillator (I = 0.5, tau = 12.5,
//                    a = 0.7, b = 0.8);
//   * hr_neuron    - Hindmarsh-Rose burster (a = 1, b = 3, c = 1, d = 5,
//                    s = 4, xR = -8/5, r = 1e-3, I = 2);
//   * si_net_eq3   - three scale-invariant neurons all driven by a field
//                    F = 0.8 (1 + 0.4 sin(88.8 pi t)), V0 = 0.1,
//                    gamma = 0.433 with a 9-digit exponent;
//   * si_chain_eq5 - a chain of three neurons whose first one is the field
//                    F = 0.8 (1 + 0.4 sin(8 pi t)), V0 = 0.1, gamma = 0.5;
//   * si_hier_eq6  - three layers of three neurons under the field
//                    F = 0.45 (1 + 0.5 sin(4 pi t)), V0 = 0.1, gamma = 0.5
//                    with a 2-digit exponent.
// Each model advances one iteration per cycle in which step is high, and one
// chosen variable of each is turned into an 8-bit code by code_out.
//
// Ports: clk, rst_n (active low, asynchronous), step; the codes and the
// full-precision variables behind them (sinn_pkg format). The model
// parameters are the document's; the time per iteration (1/32 for the
// Euler models, 1/1024 for the field phase), the output windows and the
// shared strobe are this design's choice.
module sinn_top
  import sinn_pkg::*;
#(
  parameter logic [8:0] GAMMA_EQ3 = 9'd222,   // 0.433 * 512, rounded
  parameter logic [8:0] GAMMA_EQ5 = 9'd256,   // 0.5
  parameter logic [1:0] GAMMA_EQ6 = 2'b10     // 0.5
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       step,
  // 8-bit output codes, one per model
  output logic [7:0] code_fhn,
  output logic [7:0] code_hr,
  output logic [7:0] code_eq3,
  output logic [7:0] code_eq5,
  output logic [7:0] code_eq6,
  output logic [4:0] code_clipped,   // {eq6, eq5, eq3, hr, fhn}
  // full-precision state
  output fx_t        fhn_v,
  output fx_t        fhn_w,
  output fx_t        hr_x,
  output fx_t        hr_y,
  output fx_t        hr_z,
  output fx_t        field3,
  output fx_t        eq3_v [3],
  output fx_t        field5,
  output fx_t        eq5_v [3],
  output fx_t        field6,
  output fx_t        eq6_v [3][3]
);

  localparam fx_t V0 = fx_const(0.1);

  // ---------------- FitzHugh-Nagumo ----------------
  fhn_neuron u_fhn (
    .clk, .rst_n, .step, .v(fhn_v), .w(fhn_w)
  );
  code_out #(.OFFSET(fx_const(-2.5)), .SHIFT(21)) u_code_fhn (
    .clk, .rst_n, .x(fhn_v), .code(code_fhn), .clipped(code_clipped[0])
  );

  // ---------------- Hindmarsh-Rose ----------------
  hr_neuron u_hr (
    .clk, .rst_n, .step, .x(hr_x), .y(hr_y), .z(hr_z)
  );
  code_out #(.OFFSET(fx_const(-2.5)), .SHIFT(21)) u_code_hr (
    .clk, .rst_n, .x(hr_x), .code(code_hr), .clipped(code_clipped[1])
  );

  // ---------------- first method: field-driven network ----------------
  logic [31:0] phase3, phase5, phase6;
  fx_t         sum3, sum5, sum6;

  field_gen #(.A(fx_const(0.8)), .B(fx_const(0.4)), .PHASE_INC(32'd186227098))
    u_field3 (.clk, .rst_n, .step, .field(field3), .phase(phase3));

  fx_t          v0_3 [3];
  logic [8:0]   g_3  [3];
  always_comb for (int k = 0; k < 3; k++) begin
    v0_3[k] = V0;
    g_3[k]  = GAMMA_EQ3;
  end

  si_net_eq3 #(.N(3), .M(9)) u_eq3 (
    .clk, .rst_n, .step, .field(field3), .v0(v0_3), .gamma(g_3),
    .v(eq3_v), .sum(sum3)
  );
  code_out #(.OFFSET(fx_const(0.0)), .SHIFT(16)) u_code_eq3 (
    .clk, .rst_n, .x(eq3_v[0]), .code(code_eq3), .clipped(code_clipped[2])
  );

  // ---------------- second method, chain ----------------
  field_gen #(.A(fx_const(0.8)), .B(fx_const(0.4)), .PHASE_INC(32'd16777216))
    u_field5 (.clk, .rst_n, .step, .field(field5), .phase(phase5));

  fx_t          v0_5 [3];
  logic [8:0]   g_5  [3];
  always_comb for (int k = 0; k < 3; k++) begin
    v0_5[k] = V0;
    g_5[k]  = GAMMA_EQ5;
  end

  si_chain_eq5 #(.N(3), .M(9)) u_eq5 (
    .clk, .rst_n, .step, .field(field5), .v0(v0_5), .gamma(g_5),
    .v(eq5_v), .sum(sum5)
  );
  code_out #(.OFFSET(fx_const(0.0)), .SHIFT(16)) u_code_eq5 (
    .clk, .rst_n, .x(eq5_v[2]), .code(code_eq5), .clipped(code_clipped[3])
  );

  // ---------------- hierarchical network ----------------
  field_gen #(.A(fx_const(0.45)), .B(fx_const(0.5)), .PHASE_INC(32'd8388608))
    u_field6 (.clk, .rst_n, .step, .field(field6), .phase(phase6));

  si_hier_eq6 #(.L(3), .K(3), .M(2)) u_eq6 (
    .clk, .rst_n, .step, .field(field6), .v0(V0), .gamma(GAMMA_EQ6),
    .v(eq6_v), .top_sum(sum6)
  );
  code_out #(.OFFSET(fx_const(0.0)), .SHIFT(16)) u_code_eq6 (
    .clk, .rst_n, .x(eq6_v[2][0]), .code(code_eq6), .clipped(code_clipped[4])
  );

endmodule
