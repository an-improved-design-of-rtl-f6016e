// tb_rev_full_addsub: self-check of the reversible full adder/subtractor.
// Exhaustive on one cell: ctrl = 0 gives {cb, sd} = a + b + cin, ctrl = 1 gives
// {cb, sd} = (a - b - cin) mod 4 (borrow, difference). Then eight cells are
// chained through cb -> cin to form 8-bit ripple adder/subtractors, checked
// on random operands against + and -.
module tb_rev_full_addsub;
  logic a, b, cin, ctrl, sd, cb;
  logic [1:0] res;
  int checks = 0, failures = 0;

  rev_full_addsub dut (.a(a), .b(b), .cin(cin), .ctrl(ctrl), .sd(sd), .cb(cb));

  // Chained instance: 8-bit ripple adder/subtractor.
  logic [7:0] x, y, z;
  logic       mode;
  logic       chain [9];
  assign chain[0] = 1'b0;
  for (genvar i = 0; i < 8; i++) begin : g_chain
    rev_full_addsub u_cell (.a(x[i]), .b(y[i]), .cin(chain[i]), .ctrl(mode),
                            .sd(z[i]), .cb(chain[i+1]));
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0; y = '0; mode = 1'b0;
    for (int v = 0; v < 16; v++) begin
      {ctrl, a, b, cin} = 4'(v);
      #1;
      res = ctrl ? 2'(a) - 2'(b) - 2'(cin) : 2'(a) + 2'(b) + 2'(cin);
      checks++;
      if ({cb, sd} !== res) begin
        failures++;
        $display("FAIL ctrl=%b a=%b b=%b cin=%b -> cb=%b sd=%b expected %b", ctrl, a, b, cin, cb, sd, res);
      end
    end
    for (int t = 0; t < 2000; t++) begin
      x = 8'($urandom);
      y = 8'($urandom);
      mode = t[0];
      #1;
      checks++;
      if ({chain[8], z} !== (mode ? {1'b0, x} - {1'b0, y} : {1'b0, x} + {1'b0, y})) begin
        failures++;
        $display("FAIL chain mode=%b x=%0d y=%0d -> %b %0d", mode, x, y, chain[8], z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
