// tb_rev_dmfa: exhaustive self-check of the reversible dual-mode full adder.
// Accurate mode (app = 0) must give {cout, s} = a + b + cin; approximate mode
// (app = 1) must relay s = b and cout = a.
module tb_rev_dmfa;
  logic a, b, cin, app, s, cout;
  logic [1:0] sum2;
  int checks = 0, failures = 0;

  rev_dmfa dut (.a(a), .b(b), .cin(cin), .app(app), .s(s), .cout(cout));

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
      sum2 = app ? {a, b} : 2'(a) + 2'(b) + 2'(cin);
      checks++;
      if ({cout, s} !== sum2) begin
        failures++;
        $display("FAIL app=%b a=%b b=%b cin=%b -> cout=%b s=%b expected %b", app, a, b, cin, cout, s, sum2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
