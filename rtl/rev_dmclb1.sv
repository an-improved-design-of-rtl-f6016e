// rev_dmclb1: reversible dual-mode carry-lookahead leaf block with carry out
// (DMCLB1), one per even bit position of the reconfigurable CLA.
//
//   app = 0 (accurate):    p = a ^ b, g = a b, s = p ^ cin, cout = g + p cin
//   app = 1 (approximate): p = b,     g = a,   s = b,       cout = a
//
// These equations are the published ones. The gate-level realisation is this
// design's own: Feynman gates with a 0 input copy a, b and g; a Peres gate
// with C = 0 forms p and g; a second Peres gate forms s = p ^ cin and
// cout = (p cin) ^ g, which equals g + p cin because p and g of one bit are
// never both 1; four Fredkin gates controlled by app select the outputs, each
// passing app on to the next. Gate count: 4 Feynman, 2 Peres, 4 Fredkin.
//
// Purely combinational.
module rev_dmclb1 (
  input  logic a,
  input  logic b,
  input  logic cin,
  input  logic app,
  output logic p,
  output logic g,
  output logic s,
  output logic cout
);
  logic a_0, a_1, b_0, b_1, b_2, b_3;
  logic a_r, p_x, g_x, g_0, g_1, p_r, s_x, c_x;
  logic app_1, app_2, app_3;
  logic unused_r0, unused_r1, unused_r2, unused_r3, unused_app;

  feynman_gate u_cp_a  (.a(a),   .b(1'b0), .p(a_0), .q(a_1));
  feynman_gate u_cp_b  (.a(b),   .b(1'b0), .p(b_0), .q(b_1));
  feynman_gate u_cp_b2 (.a(b_1), .b(1'b0), .p(b_2), .q(b_3));

  peres_gate u_pg (.a(a_0), .b(b_0), .c(1'b0), .p(a_r), .q(p_x), .r(g_x));
  feynman_gate u_cp_g (.a(g_x), .b(1'b0), .p(g_0), .q(g_1));
  peres_gate u_sc (.a(p_x), .b(cin), .c(g_0), .p(p_r), .q(s_x), .r(c_x));

  fredkin_gate u_sel_p (.a(app),   .b(p_r), .c(b_2), .p(app_1),      .q(p),    .r(unused_r0));
  fredkin_gate u_sel_g (.a(app_1), .b(g_1), .c(a_r), .p(app_2),      .q(g),    .r(unused_r1));
  fredkin_gate u_sel_s (.a(app_2), .b(s_x), .c(b_3), .p(app_3),      .q(s),    .r(unused_r2));
  fredkin_gate u_sel_c (.a(app_3), .b(c_x), .c(a_1), .p(unused_app), .q(cout), .r(unused_r3));
endmodule
