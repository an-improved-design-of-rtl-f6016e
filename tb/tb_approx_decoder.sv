// tb_approx_decoder: checks every value of da: the select vector must hold
// exactly min(da, N) ones, all in the lowest positions.
module tb_approx_decoder;
  localparam int N = 8;
  localparam int DA_W = $clog2(N + 1);
  logic [DA_W-1:0] da;
  logic [N-1:0]    app;
  int checks = 0, failures = 0;
  int k;

  approx_decoder dut (.da(da), .app(app));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << DA_W); v++) begin
      da = DA_W'(v);
      #1;
      k = (v > N) ? N : v;
      checks++;
      if ($countones(app) != k || app != N'((64'(1) << k) - 1)) begin
        failures++;
        $display("FAIL da=%0d app=%b", v, app);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
