// feynman_gate: 2x2 reversible controlled-NOT (Feynman) gate.
//
// P = A, Q = A ^ B. With B tied to 0 it copies A onto two lines, which is how
// the reversible cells in this design fan a signal out. Combinational, no
// clock. Quantum cost 1.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
