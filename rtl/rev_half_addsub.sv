// rev_half_addsub: reversible half adder/subtractor.
//
//   ctrl = 0 (add):      sd = a ^ b, cb = a b    (carry of a + b)
//   ctrl = 1 (subtract): sd = a ^ b, cb = a' b   (borrow of a - b)
//
// so {cb, sd} is a + b, or a - b in two's complement. Two Feynman and two
// Fredkin gates, two constant-0 inputs, three garbage outputs, quantum cost
// 2 x 1 + 2 x 5 = 12, as published:
//   FG2(b, 0)         -> two copies of b
//   FG1(a, b)         -> a (passed on), sd = a ^ b
//   F1(a, b, 0)       -> P = a (garbage g1), Q = a' b, R = a b
//   F2(ctrl, ab, a'b) -> P = ctrl (g2), Q = cb, R = the unused term (g3)
// The gate list, constants, garbage count and the use of ctrl on the second
// Fredkin gate follow the published circuit; the order of the lines between
// the gates is this design's reading of it.
//
// Purely combinational.
module rev_half_addsub (
  input  logic a,
  input  logic b,
  input  logic ctrl,
  output logic sd,
  output logic cb
);
  logic b_0, b_1, a_r, nab, ab;
  logic unused_g1, unused_g2, unused_g3;

  feynman_gate u_fg2 (.a(b),   .b(1'b0), .p(b_0), .q(b_1));
  feynman_gate u_fg1 (.a(a),   .b(b_0),  .p(a_r), .q(sd));
  fredkin_gate u_f1  (.a(a_r), .b(b_1),  .c(1'b0), .p(unused_g1), .q(nab), .r(ab));
  fredkin_gate u_f2  (.a(ctrl), .b(ab),  .c(nab),  .p(unused_g2), .q(cb),  .r(unused_g3));
endmodule
