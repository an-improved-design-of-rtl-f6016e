// tb_cla_mode_decoder: checks every value of da. Leaf i must be approximate
// exactly when i < da; a tree node (level L, index j, covering bits
// j*2^L .. (j+1)*2^L - 1) exactly when its top bit is below da, which is the
// case in which every block of its fan-in cone is approximate.
module tb_cla_mode_decoder;
  localparam int N = 8;
  localparam int DA_W = $clog2(N + 1);
  logic [DA_W-1:0] da;
  logic [N-1:0]    leaf_app;
  logic [N-2:0]    node_app;
  int checks = 0, failures = 0;
  int idx;

  cla_mode_decoder dut (.da(da), .leaf_app(leaf_app), .node_app(node_app));

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
      for (int i = 0; i < N; i++) begin
        checks++;
        if (leaf_app[i] !== (i < v)) begin
          failures++;
          $display("FAIL da=%0d leaf %0d = %b", v, i, leaf_app[i]);
        end
      end
      idx = 0;
      for (int l = 1; (1 << l) <= N; l++) begin
        for (int j = 0; j < (N >> l); j++) begin
          checks++;
          if (node_app[idx] !== (((j + 1) << l) - 1 < v)) begin
            failures++;
            $display("FAIL da=%0d level %0d node %0d = %b", v, l, j, node_app[idx]);
          end
          idx++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
