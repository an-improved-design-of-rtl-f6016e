// hng_gate: 4x4 reversible HNG gate.
//
// P = A, Q = B, R = A ^ B ^ C, S = (A ^ B)C ^ AB ^ D (the usual definition of
// the HNG gate). With D = 0 it is a complete full adder: R is the sum and S
// the carry of A + B + C, while A and B come back unchanged on P and Q, so the
// approximate outputs of a dual-mode adder can be taken from P and Q without
// extra fan-out gates. Combinational.
module hng_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  assign p = a;
  assign q = b;
  assign r = a ^ b ^ c;
  assign s = ((a ^ b) & c) ^ (a & b) ^ d;
endmodule
