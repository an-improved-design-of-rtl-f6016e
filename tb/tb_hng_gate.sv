// tb_hng_gate: exhaustive self-check of hng_gate.
// Expected: P = A, Q = B, R = A ^ B ^ C, and with D = 0 {S, R} is the
// arithmetic sum A + B + C; D = 1 inverts S. All sixteen output patterns must
// be distinct (the gate is reversible).
module tb_hng_gate;
  logic a, b, c, d, p, q, r, s;
  logic [1:0] sum2;
  int checks = 0, failures = 0;
  bit [15:0] seen = '0;

  hng_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      sum2 = 2'(a) + 2'(b) + 2'(c);
      checks++;
      if (p !== a || q !== b || r !== sum2[0] || s !== (sum2[1] ^ d)) begin
        failures++;
        $display("FAIL abcd=%b%b%b%b -> pqrs=%b%b%b%b", a, b, c, d, p, q, r, s);
      end
      checks++;
      if (seen[{p, q, r, s}]) begin
        failures++;
        $display("FAIL output repeated");
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
