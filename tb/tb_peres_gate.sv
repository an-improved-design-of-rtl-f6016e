// tb_peres_gate: exhaustive self-check of peres_gate.
// Expected: P = A, Q = A ^ B, R = AB ^ C; with C = 0, {R, Q} is the arithmetic sum A + B.
// All eight output patterns must also be distinct (the gate is reversible).
module tb_peres_gate;
  logic a, b, c, p, q, r;
  logic ep, eq, er;
  int checks = 0, failures = 0;
  bit [7:0] seen = '0;

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      ep = a;
      eq = a ^ b;
      er = (a & b) ^ c;
      if (!c) begin
        checks++;
        if (2'({r, q}) != 2'(a) + 2'(b)) begin
          failures++;
          $display("FAIL half-adder use a=%b b=%b", a, b);
        end
      end
      checks++;
      if ({p, q, r} !== {ep, eq, er}) begin
        failures++;
        $display("FAIL abc=%b%b%b -> pqr=%b%b%b expected %b%b%b", a, b, c, p, q, r, ep, eq, er);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL output %b%b%b repeated", p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
