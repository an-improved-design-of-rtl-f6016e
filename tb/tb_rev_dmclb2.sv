// tb_rev_dmclb2: exhaustive self-check of the DMCLB2 leaf block.
// Accurate: s = (a + b + cin) mod 2, p = a ^ b, g = a & b.
// Approximate: p = s = b, g = a.
module tb_rev_dmclb2;
  logic a, b, cin, app, p, g, s;
  logic [1:0] sum2;
  int checks = 0, failures = 0;

  rev_dmclb2 dut (.a(a), .b(b), .cin(cin), .app(app), .p(p), .g(g), .s(s));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {app, a, b, cin} = 4'(v);
      #1;
      sum2 = 2'(a) + 2'(b) + 2'(cin);
      checks++;
      if (!app && (s !== sum2[0] || p !== (a ^ b) || g !== (a & b))) begin
        failures++;
        $display("FAIL accurate a=%b b=%b cin=%b -> p=%b g=%b s=%b", a, b, cin, p, g, s);
      end
      if (app && (p !== b || s !== b || g !== a)) begin
        failures++;
        $display("FAIL approximate a=%b b=%b cin=%b -> p=%b g=%b s=%b", a, b, cin, p, g, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
