// tb_rev_reconf_rca: exhaustive self-check of the 8-bit reconfigurable RCA.
// Every a, b, cin and every value of da (0 .. 15, values above 8 act as 8) is
// applied. With da = 0 the result must equal a + b + cin; for every da it
// must match the bit-serial model in tb_approx_ref_pkg. A second, 16-bit
// instance is then checked on 100000 random operations.
module tb_rev_reconf_rca;
  import tb_approx_ref_pkg::*;
  localparam int N = 8;
  localparam int DA_W = $clog2(N + 1);
  logic [N-1:0]    a, b, s;
  logic            cin, cout;
  logic [DA_W-1:0] da;
  logic [MAXN:0]   r;
  int checks = 0, failures = 0;

  // 16-bit instance, checked on random operands
  localparam int N16 = 16;
  localparam int DA16_W = $clog2(N16 + 1);
  logic [N16-1:0]    a16, b16, s16;
  logic              cin16, cout16;
  logic [DA16_W-1:0] da16;
  rev_reconf_rca #(.N(N16)) dut16 (.a(a16), .b(b16), .cin(cin16), .da(da16), .s(s16), .cout(cout16));

  rev_reconf_rca dut (.a(a), .b(b), .cin(cin), .da(da), .s(s), .cout(cout));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < (1 << DA_W); d++) begin
      for (int v = 0; v < (1 << (2 * N + 1)); v++) begin
        {a, b, cin} = (2 * N + 1)'(v);
        da = DA_W'(d);
        #1;
        r = rca_ref(N, MAXN'(a), MAXN'(b), cin, d);
        checks++;
        if ({cout, s} !== r[N:0]) begin
          failures++;
          if (failures < 10)
            $display("FAIL da=%0d a=%0d b=%0d cin=%b -> %b %0d, expected %b %0d",
                     d, a, b, cin, cout, s, r[N], r[N-1:0]);
        end
        if (d == 0) begin
          checks++;
          if ({cout, s} !== {1'b0, a} + {1'b0, b} + (N+1)'(cin)) begin
            failures++;
            if (failures < 10) $display("FAIL exact a=%0d b=%0d cin=%b", a, b, cin);
          end
        end
      end
    end
    for (int t = 0; t < 100000; t++) begin
      {a16, b16} = $urandom;
      cin16 = 1'($urandom);
      da16 = DA16_W'($urandom_range(0, N16 + 1));
      #1;
      r = rca_ref(N16, MAXN'(a16), MAXN'(b16), cin16, int'(da16));
      checks++;
      if ({cout16, s16} !== r[N16:0]) begin
        failures++;
        if (failures < 10) $display("FAIL N=16 da=%0d a=%0d b=%0d", da16, a16, b16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
