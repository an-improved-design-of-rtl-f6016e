// rev_dmpgb2: reversible dual-mode propagate/generate block without carry out
// (DMPGB2), used for the more significant child of every pair in the
// reconfigurable CLA tree. Input pair A comes from the less significant half,
// pair B from the more significant half.
//
//   app = 0 (accurate):    p = pa pb, g = gb + ga pb
//   app = 1 (approximate): p = pa,    g = gb
//
// These equations are the published ones. The realisation is this design's
// own: two Peres gates with C = 0 form the AND terms ga pb and pa pb and hand
// pb and pa back; a Fredkin gate with control gb, B = ga pb and C = 1 gives
// gb + ga pb and hands gb back; two Fredkin gates controlled by app select the
// outputs. The OR is kept as an OR (not an XOR) because an accurate block can
// receive p = g = 1 from an approximated child. Gate count: 2 Peres,
// 3 Fredkin.
//
// Purely combinational.
module rev_dmpgb2 (
  input  logic pa,
  input  logic ga,
  input  logic pb,
  input  logic gb,
  input  logic app,
  output logic p,
  output logic g
);
  logic pb_r, x_gp, pa_r, p_x, gb_r, g_x, app_1;
  logic unused_q0, unused_q1, unused_r0, unused_r1, unused_r2, unused_app;

  peres_gate   u_and_g (.a(pb),   .b(ga),   .c(1'b0), .p(pb_r), .q(unused_q0), .r(x_gp));
  peres_gate   u_and_p (.a(pa),   .b(pb_r), .c(1'b0), .p(pa_r), .q(unused_q1), .r(p_x));
  fredkin_gate u_or_g  (.a(gb),   .b(x_gp), .c(1'b1), .p(gb_r), .q(g_x),       .r(unused_r0));

  fredkin_gate u_sel_p (.a(app),   .b(p_x), .c(pa_r), .p(app_1),      .q(p), .r(unused_r1));
  fredkin_gate u_sel_g (.a(app_1), .b(g_x), .c(gb_r), .p(unused_app), .q(g), .r(unused_r2));
endmodule
