// rev_full_addsub: reversible full adder/subtractor (Design I gate mix).
//
//   ctrl = 0 (add):      sd = a ^ b ^ cin, cb = majority(a,  b, cin)
//   ctrl = 1 (subtract): sd = a ^ b ^ cin, cb = majority(a', b, cin)
//
// With ctrl = 1, cb is the borrow of a - b - cin, so {cb, sd} is the two-bit
// result of a + b + cin or, in two's complement, a - b - cin. Chaining cb into
// the next cell's cin gives a ripple adder/subtractor.
//
// Built, like the published circuit, from five Feynman gates, two Fredkin
// gates and one TR gate; the wiring is this design's own:
//   FG1(a, ctrl) -> a ^ ctrl;  FG2(b, 0), FG3(cin, 0) -> copies of b and cin;
//   FG4, FG5 -> sd = a ^ b ^ cin;
//   F1(b, cin, 0) -> R = b cin, Q = b' cin;
//   TR(b' cin, 0, b) -> R = b' cin ^ b = b + cin;
//   F2(a ^ ctrl, b cin, b + cin) -> Q = majority(a ^ ctrl, b, cin) = cb.
// Four constant inputs and six garbage outputs.
//
// Purely combinational.
module rev_full_addsub (
  input  logic a,
  input  logic b,
  input  logic cin,
  input  logic ctrl,
  output logic sd,
  output logic cb
);
  logic a_r, a_x, b_0, b_1, c_0, c_1, ab_x;
  logic b_r, nb_c, b_and_c, b_or_c;
  logic unused_g1, unused_g2, unused_g3, unused_g4, unused_g5, unused_g6;

  feynman_gate u_fg1 (.a(a),    .b(ctrl), .p(a_r),       .q(a_x));
  feynman_gate u_fg2 (.a(b),    .b(1'b0), .p(b_0),       .q(b_1));
  feynman_gate u_fg3 (.a(cin),  .b(1'b0), .p(c_0),       .q(c_1));
  feynman_gate u_fg4 (.a(a_r),  .b(b_0),  .p(unused_g1), .q(ab_x));
  feynman_gate u_fg5 (.a(ab_x), .b(c_0),  .p(unused_g2), .q(sd));

  fredkin_gate u_f1 (.a(b_1), .b(c_1), .c(1'b0), .p(b_r), .q(nb_c), .r(b_and_c));
  tr_gate      u_tr (.a(nb_c), .b(1'b0), .c(b_r), .p(unused_g3), .q(unused_g4), .r(b_or_c));
  fredkin_gate u_f2 (.a(a_x), .b(b_and_c), .c(b_or_c), .p(unused_g5), .q(cb), .r(unused_g6));
endmodule
