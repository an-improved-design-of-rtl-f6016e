// rev_dmpgb1: reversible dual-mode propagate/generate block with carry out
// (DMPGB1), used for the less significant child of every pair in the
// reconfigurable CLA tree and for the root. Input pair A comes from the less
// significant half, pair B from the more significant half; cin is the carry
// into the group's lowest bit.
//
//   app = 0 (accurate):    p = pa pb, g = gb + ga pb
//   app = 1 (approximate): p = pa,    g = gb
//   both modes:            cout = g + p cin   (from the selected p and g)
//
// cout is the carry into the bit just above the group. These equations are
// the published ones. The realisation is this design's own: the same gates as
// rev_dmpgb2 select p and g; a third Peres gate forms p cin and hands p back,
// and a Fredkin gate with C = 1 forms g + p cin and hands g back. Gate count:
// 3 Peres, 4 Fredkin.
//
// Purely combinational.
module rev_dmpgb1 (
  input  logic pa,
  input  logic ga,
  input  logic pb,
  input  logic gb,
  input  logic cin,
  input  logic app,
  output logic p,
  output logic g,
  output logic cout
);
  logic pb_r, x_gp, pa_r, p_x, gb_r, g_x, app_1;
  logic p_sel, g_sel, y_pc;
  logic unused_q0, unused_q1, unused_q2, unused_r0, unused_r1, unused_r2, unused_r3, unused_app;

  peres_gate   u_and_g (.a(pb),   .b(ga),   .c(1'b0), .p(pb_r), .q(unused_q0), .r(x_gp));
  peres_gate   u_and_p (.a(pa),   .b(pb_r), .c(1'b0), .p(pa_r), .q(unused_q1), .r(p_x));
  fredkin_gate u_or_g  (.a(gb),   .b(x_gp), .c(1'b1), .p(gb_r), .q(g_x),       .r(unused_r0));

  fredkin_gate u_sel_p (.a(app),   .b(p_x), .c(pa_r), .p(app_1),      .q(p_sel), .r(unused_r1));
  fredkin_gate u_sel_g (.a(app_1), .b(g_x), .c(gb_r), .p(unused_app), .q(g_sel), .r(unused_r2));

  peres_gate   u_and_c (.a(p_sel), .b(cin),  .c(1'b0), .p(p), .q(unused_q2), .r(y_pc));
  fredkin_gate u_or_c  (.a(g_sel), .b(y_pc), .c(1'b1), .p(g), .q(cout),      .r(unused_r3));
endmodule
