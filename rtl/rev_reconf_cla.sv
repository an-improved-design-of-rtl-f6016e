// rev_reconf_cla: N-bit reconfigurable approximate carry-lookahead adder built
// from reversible dual-mode blocks.
//
// The adder is a binary tree. Every bit has a leaf block that makes the bit's
// propagate/generate pair and its sum: DMCLB1 at even bits, which also forms
// the carry into the odd bit above it, and DMCLB2 at odd bits. Each level
// above pairs the nodes below: the less significant node of each pair (and the
// root) is a DMPGB1, which also forms the carry into the first bit of its
// sibling from the carry into its own first bit; the more significant one is
// a DMPGB2. For N = 8: DMCLB1/DMCLB2 x4, DMPGB1 on bits 0-1 and 4-5, DMPGB2
// on 2-3 and 6-7, DMPGB1 on 0-3, DMPGB2 on 4-7, and the root DMPGB1 on 0-7
// that delivers the carry out C8 and the group p, g. Every carry C1..CN is
// made by exactly one block: an odd carry by the DMCLB1 below it, carry
// k = m*2^L (m odd) by the level-L DMPGB1 that ends at bit k-1.
//
// Mode control: da leaves run approximately from bit 0 upward, and a DMPGB is
// approximated only when its whole fan-in cone is (cla_mode_decoder). With
// da = 0 the sum is exactly a + b + cin. Tree shape, block types and the mode
// rule follow the published design; the binary da encoding is this design's
// choice. N must be a power of two, default 8 as published.
//
// Interface: a, b, cin, da in; s, cout, p, g out. Purely combinational.
module rev_reconf_cla
  import approx_pkg::*;
#(
  parameter int N    = 8,
  parameter int DA_W = $clog2(N + 1)
) (
  input  logic [N-1:0]    a,
  input  logic [N-1:0]    b,
  input  logic            cin,
  input  logic [DA_W-1:0] da,
  output logic [N-1:0]    s,
  output logic            cout,
  output logic            p,
  output logic            g
);
  localparam int LOG_N = $clog2(N);

  if (N < 2 || (1 << LOG_N) != N) begin : g_bad_n
    $error("rev_reconf_cla: N must be a power of two of at least 2");
  end

  logic [N-1:0] leaf_app;
  logic [N-2:0] node_app;
  // tree[0 .. N-1] are the leaves; level L node j sits at N + node_base(N, L) + j.
  pg_t  tree  [2*N-1];
  logic carry [N+1];

  cla_mode_decoder #(.N(N), .DA_W(DA_W)) u_dec (
    .da(da), .leaf_app(leaf_app), .node_app(node_app)
  );

  assign carry[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_leaf
    if (i % 2 == 0) begin : g_clb1
      rev_dmclb1 u_clb (
        .a(a[i]), .b(b[i]), .cin(carry[i]), .app(leaf_app[i]),
        .p(tree[i].p), .g(tree[i].g), .s(s[i]), .cout(carry[i+1])
      );
    end else begin : g_clb2
      rev_dmclb2 u_clb (
        .a(a[i]), .b(b[i]), .cin(carry[i]), .app(leaf_app[i]),
        .p(tree[i].p), .g(tree[i].g), .s(s[i])
      );
    end
  end

  for (genvar lvl = 1; lvl <= LOG_N; lvl++) begin : g_lvl
    for (genvar j = 0; j < (N >> lvl); j++) begin : g_node
      localparam int ME = N + node_base(N, lvl) + j;
      localparam int CA = (lvl == 1) ? 2*j     : N + node_base(N, lvl-1) + 2*j;
      localparam int CB = (lvl == 1) ? 2*j + 1 : N + node_base(N, lvl-1) + 2*j + 1;
      if (j % 2 == 0) begin : g_pgb1
        rev_dmpgb1 u_pgb (
          .pa(tree[CA].p), .ga(tree[CA].g), .pb(tree[CB].p), .gb(tree[CB].g),
          .cin(carry[j << lvl]), .app(node_app[node_base(N, lvl) + j]),
          .p(tree[ME].p), .g(tree[ME].g), .cout(carry[(j+1) << lvl])
        );
      end else begin : g_pgb2
        rev_dmpgb2 u_pgb (
          .pa(tree[CA].p), .ga(tree[CA].g), .pb(tree[CB].p), .gb(tree[CB].g),
          .app(node_app[node_base(N, lvl) + j]),
          .p(tree[ME].p), .g(tree[ME].g)
        );
      end
    end
  end

  assign cout = carry[N];
  assign p    = tree[2*N-2].p;
  assign g    = tree[2*N-2].g;
endmodule
