// tb_fredkin_gate: exhaustive self-check of fredkin_gate.
// Expected: A passes through; when A = 1 lines B and C are swapped.
// All eight output patterns must also be distinct (the gate is reversible).
module tb_fredkin_gate;
  logic a, b, c, p, q, r;
  logic ep, eq, er;
  int checks = 0, failures = 0;
  bit [7:0] seen = '0;

  fredkin_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

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
      if (a) begin eq = c; er = b; end
      else   begin eq = b; er = c; end
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
