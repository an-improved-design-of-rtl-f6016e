// tb_rev_dmpgb2: exhaustive self-check of the DMPGB2 block over all 32 input
// patterns. Accurate: p = pa pb, g = gb | ga pb. Approximate: p = pa, g = gb.
module tb_rev_dmpgb2;
  logic pa, ga, pb, gb, app, p, g;
  logic ep, eg;
  int checks = 0, failures = 0;

  rev_dmpgb2 dut (.pa(pa), .ga(ga), .pb(pb), .gb(gb), .app(app), .p(p), .g(g));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {app, pa, ga, pb, gb} = 5'(v);
      #1;
      if (app) begin
        ep = pa;
        eg = gb;
      end else begin
        ep = pa && pb;
        eg = gb || (ga && pb);
      end
      checks++;
      if (p !== ep || g !== eg) begin
        failures++;
        $display("FAIL app=%b pa=%b ga=%b pb=%b gb=%b -> p=%b g=%b", app, pa, ga, pb, gb, p, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
