// peres_gate: 3x3 reversible Peres gate.
//
// P = A, Q = A ^ B, R = AB ^ C. With C = 0 it is a reversible half adder
// (Q = A ^ B, R = AB), used here to form propagate/generate pairs and AND
// terms. Combinational. Quantum cost 4.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
