// tb_rev_reconf_cla: exhaustive self-check of the 8-bit reconfigurable CLA.
// Every a, b, cin and every value of da (0 .. 15) is applied and sum, carry
// out and root p/g are compared with the reference model in
// tb_approx_ref_pkg. Independent closed forms are checked too: da = 0 gives
// exactly a + b + cin with root p = &(a ^ b); da >= 8 gives s = b,
// p = b[0], g = a[7], cout = a[7] | (b[0] & cin). A second, 16-bit
// instance is then checked on 100000 random operations.
module tb_rev_reconf_cla;
  import tb_approx_ref_pkg::*;
  localparam int N = 8;
  localparam int DA_W = $clog2(N + 1);
  logic [N-1:0]    a, b, s;
  logic            cin, cout, p, g;
  logic [DA_W-1:0] da;
  logic [MAXN+2:0] r;
  int checks = 0, failures = 0;

  // 16-bit instance, checked on random operands
  localparam int N16 = 16;
  localparam int DA16_W = $clog2(N16 + 1);
  logic [N16-1:0]    a16, b16, s16;
  logic              cin16, cout16, p16, g16;
  logic [DA16_W-1:0] da16;
  rev_reconf_cla #(.N(N16)) dut16 (.a(a16), .b(b16), .cin(cin16), .da(da16), .s(s16),
                                   .cout(cout16), .p(p16), .g(g16));

  rev_reconf_cla dut (.a(a), .b(b), .cin(cin), .da(da), .s(s), .cout(cout), .p(p), .g(g));

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
        r = cla_ref(N, MAXN'(a), MAXN'(b), cin, d);
        checks++;
        if ({g, p, cout, s} !== r[N+2:0]) begin
          failures++;
          if (failures < 10)
            $display("FAIL da=%0d a=%0d b=%0d cin=%b -> g=%b p=%b cout=%b s=%0d, expected %b",
                     d, a, b, cin, g, p, cout, s, r[N+2:0]);
        end
        if (d == 0) begin
          checks++;
          if ({cout, s} !== {1'b0, a} + {1'b0, b} + (N+1)'(cin) || p !== &(a ^ b)) begin
            failures++;
            if (failures < 10) $display("FAIL exact a=%0d b=%0d cin=%b", a, b, cin);
          end
        end
        if (d >= N) begin
          checks++;
          if (s !== b || p !== b[0] || g !== a[N-1] || cout !== (a[N-1] | (b[0] & cin))) begin
            failures++;
            if (failures < 10) $display("FAIL full approx a=%0d b=%0d cin=%b", a, b, cin);
          end
        end
      end
    end
    for (int t = 0; t < 100000; t++) begin
      {a16, b16} = $urandom;
      cin16 = 1'($urandom);
      da16 = DA16_W'($urandom_range(0, N16 + 1));
      #1;
      r = cla_ref(N16, MAXN'(a16), MAXN'(b16), cin16, int'(da16));
      checks++;
      if ({g16, p16, cout16, s16} !== r[N16+2:0]) begin
        failures++;
        if (failures < 10) $display("FAIL N=16 da=%0d a=%0d b=%0d", da16, a16, b16);
      end
      if (da16 == 0) begin
        checks++;
        if ({cout16, s16} !== {1'b0, a16} + {1'b0, b16} + (N16+1)'(cin16)) begin
          failures++;
          if (failures < 10) $display("FAIL N=16 exact a=%0d b=%0d", a16, b16);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
