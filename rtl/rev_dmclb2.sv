// rev_dmclb2: reversible dual-mode carry-lookahead leaf block without carry
// out (DMCLB2), one per odd bit position of the reconfigurable CLA.
//
//   app = 0 (accurate):    p = a ^ b, g = a b, s = p ^ cin
//   app = 1 (approximate): p = b,     g = a,   s = b
//
// These equations are the published ones. The gate-level realisation is this
// design's own: Feynman gates make two spare copies of b; a Peres gate with
// C = 0 forms p and g and hands a back; a Feynman gate forms s = p ^ cin; three
// Fredkin gates controlled by app select the outputs, each passing app on.
// Gate count: 3 Feynman, 1 Peres, 3 Fredkin.
//
// Purely combinational.
module rev_dmclb2 (
  input  logic a,
  input  logic b,
  input  logic cin,
  input  logic app,
  output logic p,
  output logic g,
  output logic s
);
  logic b_0, b_1, b_2, b_3;
  logic a_r, p_x, g_x, p_r, s_x;
  logic app_1, app_2;
  logic unused_r0, unused_r1, unused_r2, unused_app;

  feynman_gate u_cp_b  (.a(b),   .b(1'b0), .p(b_0), .q(b_1));
  feynman_gate u_cp_b2 (.a(b_1), .b(1'b0), .p(b_2), .q(b_3));

  peres_gate   u_pg  (.a(a), .b(b_0), .c(1'b0), .p(a_r), .q(p_x), .r(g_x));
  feynman_gate u_sum (.a(p_x), .b(cin), .p(p_r), .q(s_x));

  fredkin_gate u_sel_p (.a(app),   .b(p_r), .c(b_2), .p(app_1),      .q(p), .r(unused_r0));
  fredkin_gate u_sel_g (.a(app_1), .b(g_x), .c(a_r), .p(app_2),      .q(g), .r(unused_r1));
  fredkin_gate u_sel_s (.a(app_2), .b(s_x), .c(b_3), .p(unused_app), .q(s), .r(unused_r2));
endmodule
