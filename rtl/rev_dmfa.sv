// rev_dmfa: reversible 1-bit dual-mode full adder (DMFA).
//
// In accurate mode (app = 0) it is an exact full adder: s = a ^ b ^ cin,
// cout = majority(a, b, cin). In approximate mode (app = 1) it relays its
// operands, s = b and cout = a, which is right for more than half of the
// input patterns and breaks the carry chain at this bit.
//
// The exact adder is an HNG gate with its fourth input tied to 0; the HNG
// gate hands A and B back unchanged, and those copies feed the approximate
// side of two selectors. Each selector is a Fredkin gate controlled by app
// (Q = app ? approx : exact); the first passes app on to the second, so no
// signal is fanned out by a plain wire. The selector input order (S: 1 = B,
// 0 = sum; Cout: 0 = carry, 1 = A) and the modes follow the published cell;
// realising the multiplexers as Fredkin gates is this design's own choice.
// The supply switch that powers the exact adder down in approximate mode is
// a circuit-level element and is not represented here.
//
// Purely combinational.
module rev_dmfa (
  input  logic a,
  input  logic b,
  input  logic cin,
  input  logic app,
  output logic s,
  output logic cout
);
  logic a_cp, b_cp, sum_x, carry_x;
  logic app_1, unused_sr, unused_app, unused_cr;

  hng_gate u_fa (
    .a(a), .b(b), .c(cin), .d(1'b0),
    .p(a_cp), .q(b_cp), .r(sum_x), .s(carry_x)
  );

  fredkin_gate u_sel_s (
    .a(app), .b(sum_x), .c(b_cp),
    .p(app_1), .q(s), .r(unused_sr)
  );

  fredkin_gate u_sel_c (
    .a(app_1), .b(carry_x), .c(a_cp),
    .p(unused_app), .q(cout), .r(unused_cr)
  );
endmodule
