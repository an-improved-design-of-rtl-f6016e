// fredkin_gate: 3x3 reversible controlled-swap (Fredkin) gate.
//
// P = A, Q = A'B + AC, R = AB + A'C: when A is 1 the lines B and C are
// exchanged. Q is therefore a 2:1 multiplexer (B when A = 0, C when A = 1),
// which is how this design builds the accurate/approximate selectors; with
// B = x and C = 1 and control y, Q = x + y gives an OR. Combinational.
// Quantum cost 5.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = (~a & b) | (a & c);
  assign r = (a & b) | (~a & c);
endmodule
