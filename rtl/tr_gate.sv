// tr_gate: 3x3 reversible TR gate.
//
// P = A, Q = A ^ B, R = AB' ^ C (the usual definition of the TR gate, which
// is quoted with quantum cost 6). Combinational.
module tr_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & ~b) ^ c;
endmodule
