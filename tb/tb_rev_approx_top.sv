// tb_rev_approx_top: end-to-end test of rev_approx_top at its default
// parameters (8-bit adders).
//
// Each operation drives fresh random operands into all four units at once and
// a new degree of approximation into each adder, then checks every output:
// the adders against the reference models in tb_approx_ref_pkg (and against
// plain a + b + cin when da = 0), the adder/subtractors against + and -.
// A directed sweep first walks both adders through every da with one fixed
// operand pair. The testbench counts how often each mechanism of the design
// occurred and counts a failure for any that never did:
//   exact addition (da = 0), partial approximation (0 < da < 8), full
//   approximation (da >= 8), a switch of da between consecutive operations,
//   an approximated DMPGB node in the CLA (da >= 2), an accurate DMPGB node
//   fed by an approximated child (da odd, below 8), carry out of an
//   approximated cell reaching the accurate part (0 < da < 8 with a[da-1] = 1),
//   an approximate result that differs from the exact sum, addition and
//   subtraction in both adder/subtractors, and a borrow out of the
//   subtractors.
module tb_rev_approx_top;
  import tb_approx_ref_pkg::*;
  localparam int N = 8;
  localparam int DA_W = $clog2(N + 1);
  localparam int OPS = 200000;

  logic [N-1:0]    rca_a, rca_b, rca_s, cla_a, cla_b, cla_s;
  logic            rca_cin, rca_cout, cla_cin, cla_cout, cla_p, cla_g;
  logic [DA_W-1:0] rca_da, cla_da;
  logic            has_a, has_b, has_ctrl, has_sd, has_cb;
  logic            fas_a, fas_b, fas_cin, fas_ctrl, fas_sd, fas_cb;

  int checks = 0, failures = 0;

  typedef enum int {
    EV_EXACT, EV_PARTIAL, EV_FULL, EV_SWITCH, EV_NODE_APPROX, EV_NODE_MIXED,
    EV_APPROX_CARRY, EV_ERROR_SEEN, EV_HAS_ADD, EV_HAS_SUB, EV_FAS_ADD,
    EV_FAS_SUB, EV_BORROW, EV_COUNT
  } event_e;
  int unsigned ev [EV_COUNT];
  string ev_name [EV_COUNT] = '{"exact addition", "partial approximation",
    "full approximation", "approximation switch", "approximated DMPGB",
    "accurate DMPGB with approximated child", "approximate carry into accurate part",
    "approximate result differs from exact", "half adder/subtractor add",
    "half adder/subtractor subtract", "full adder/subtractor add",
    "full adder/subtractor subtract", "borrow out"};

  rev_approx_top dut (.*);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all(input int prev_rca_da, input int prev_cla_da);
    logic [MAXN:0]   rr;
    logic [MAXN+2:0] cr;
    logic [1:0]      hexp, fexp;
    int d;
    #1;
    rr = rca_ref(N, MAXN'(rca_a), MAXN'(rca_b), rca_cin, int'(rca_da));
    cr = cla_ref(N, MAXN'(cla_a), MAXN'(cla_b), cla_cin, int'(cla_da));
    checks++;
    if ({rca_cout, rca_s} !== rr[N:0]) begin
      failures++;
      $display("FAIL rca da=%0d a=%0d b=%0d cin=%b", rca_da, rca_a, rca_b, rca_cin);
    end
    checks++;
    if ({cla_g, cla_p, cla_cout, cla_s} !== cr[N+2:0]) begin
      failures++;
      $display("FAIL cla da=%0d a=%0d b=%0d cin=%b", cla_da, cla_a, cla_b, cla_cin);
    end
    if (rca_da == 0) begin
      checks++;
      if ({rca_cout, rca_s} !== {1'b0, rca_a} + {1'b0, rca_b} + (N+1)'(rca_cin)) begin
        failures++;
        $display("FAIL rca exact");
      end
    end
    if (cla_da == 0) begin
      checks++;
      if ({cla_cout, cla_s} !== {1'b0, cla_a} + {1'b0, cla_b} + (N+1)'(cla_cin)) begin
        failures++;
        $display("FAIL cla exact");
      end
    end
    hexp = has_ctrl ? 2'(has_a) - 2'(has_b) : 2'(has_a) + 2'(has_b);
    fexp = fas_ctrl ? 2'(fas_a) - 2'(fas_b) - 2'(fas_cin) : 2'(fas_a) + 2'(fas_b) + 2'(fas_cin);
    checks++;
    if ({has_cb, has_sd} !== hexp || {fas_cb, fas_sd} !== fexp) begin
      failures++;
      $display("FAIL add/sub");
    end
    // mechanism counters
    for (int u = 0; u < 2; u++) begin
      d = (u == 0) ? int'(rca_da) : int'(cla_da);
      if (d == 0) ev[EV_EXACT]++;
      else if (d < N) ev[EV_PARTIAL]++;
      else ev[EV_FULL]++;
    end
    if (int'(rca_da) != prev_rca_da || int'(cla_da) != prev_cla_da) ev[EV_SWITCH]++;
    if (int'(cla_da) >= 2) ev[EV_NODE_APPROX]++;
    if (int'(cla_da) < N && cla_da[0]) ev[EV_NODE_MIXED]++;
    if (int'(rca_da) > 0 && int'(rca_da) < N && rca_a[rca_da-1]) ev[EV_APPROX_CARRY]++;
    if (int'(cla_da) > 0 && int'(cla_da) < N && cla_a[cla_da-1]) ev[EV_APPROX_CARRY]++;
    if ({rca_cout, rca_s} != {1'b0, rca_a} + {1'b0, rca_b} + (N+1)'(rca_cin)) ev[EV_ERROR_SEEN]++;
    if (has_ctrl) ev[EV_HAS_SUB]++; else ev[EV_HAS_ADD]++;
    if (fas_ctrl) ev[EV_FAS_SUB]++; else ev[EV_FAS_ADD]++;
    if ((has_ctrl && has_cb) || (fas_ctrl && fas_cb)) ev[EV_BORROW]++;
  endtask

  initial begin
    int prev_r, prev_c;
    foreach (ev[k]) ev[k] = 0;
    // directed sweep: one operand pair through every degree of approximation
    prev_r = 0; prev_c = 0;
    for (int d = 0; d < (1 << DA_W); d++) begin
      rca_a = 8'hB7; rca_b = 8'h5D; rca_cin = 1'b1; rca_da = DA_W'(d);
      cla_a = 8'hB7; cla_b = 8'h5D; cla_cin = 1'b1; cla_da = DA_W'(d);
      {has_a, has_b, has_ctrl} = 3'(d);
      {fas_a, fas_b, fas_cin, fas_ctrl} = 4'(d);
      check_all(prev_r, prev_c);
      prev_r = d; prev_c = d;
    end
    // random operations with a new degree of approximation each time
    for (int t = 0; t < OPS; t++) begin
      {rca_a, rca_b} = 16'($urandom);
      {cla_a, cla_b} = 16'($urandom);
      {rca_cin, cla_cin, has_a, has_b, has_ctrl, fas_a, fas_b, fas_cin, fas_ctrl} = 9'($urandom);
      rca_da = DA_W'($urandom_range(0, N + 1));
      cla_da = DA_W'($urandom_range(0, N + 1));
      check_all(prev_r, prev_c);
      prev_r = int'(rca_da); prev_c = int'(cla_da);
    end
    for (int k = 0; k < EV_COUNT; k++) begin
      $display("  %-42s %0d", ev_name[k], ev[k]);
      checks++;
      if (ev[k] == 0) begin
        failures++;
        $display("FAIL mechanism never exercised: %s", ev_name[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
