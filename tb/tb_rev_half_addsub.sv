// tb_rev_half_addsub: exhaustive self-check of the reversible half
// adder/subtractor. ctrl = 0: {cb, sd} = a + b. ctrl = 1: sd is the difference
// bit of a - b and cb its borrow, i.e. {cb, sd} = (a - b) mod 4 read as
// borrow and difference.
module tb_rev_half_addsub;
  logic a, b, ctrl, sd, cb;
  logic [1:0] res;
  int checks = 0, failures = 0;

  rev_half_addsub dut (.a(a), .b(b), .ctrl(ctrl), .sd(sd), .cb(cb));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {ctrl, a, b} = 3'(v);
      #1;
      res = ctrl ? 2'(a) - 2'(b) : 2'(a) + 2'(b);
      checks++;
      if ({cb, sd} !== res) begin
        failures++;
        $display("FAIL ctrl=%b a=%b b=%b -> cb=%b sd=%b expected %b", ctrl, a, b, cb, sd, res);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
