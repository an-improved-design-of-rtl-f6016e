// tb_rev_dmpgb1: exhaustive self-check of the DMPGB1 block over all 64 input
// patterns (including p = g = 1 pairs, which approximated children produce).
// Accurate: p = pa pb, g = gb | ga pb. Approximate: p = pa, g = gb.
// Both: cout = g | p cin.
module tb_rev_dmpgb1;
  logic pa, ga, pb, gb, cin, app, p, g, cout;
  logic ep, eg;
  int checks = 0, failures = 0;

  rev_dmpgb1 dut (.pa(pa), .ga(ga), .pb(pb), .gb(gb), .cin(cin), .app(app),
                  .p(p), .g(g), .cout(cout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {app, pa, ga, pb, gb, cin} = 6'(v);
      #1;
      if (app) begin
        ep = pa;
        eg = gb;
      end else begin
        ep = pa && pb;
        eg = gb || (ga && pb);
      end
      checks++;
      if (p !== ep || g !== eg || cout !== (eg || (ep && cin))) begin
        failures++;
        $display("FAIL app=%b pa=%b ga=%b pb=%b gb=%b cin=%b -> p=%b g=%b cout=%b",
                 app, pa, ga, pb, gb, cin, p, g, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
