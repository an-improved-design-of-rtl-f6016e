// cla_mode_decoder: mode decoder of the reconfigurable carry-lookahead adder.
//
// Leaf selects: the da least significant DMCLB leaves run approximately,
// leaf_app[i] = (i < da), taken from approx_decoder. Node selects follow the
// published fan-in rule: a DMPGB node is approximated only when every block in
// its transitive fan-in cone is, which is the AND of its two children's
// selects, i.e. the AND of all the leaf selects it covers. node_app is
// flattened level by level from the leaves up: level L (1 .. log2 N) starts at approx_pkg::node_base(N, L) = N - (N >> (L-1)), and
// node j of level L covers bits j*2^L .. (j+1)*2^L - 1 (the flattening is this
// design's own). N must be a power of two.
//
// Purely combinational.
module cla_mode_decoder
  import approx_pkg::*;
#(
  parameter int N    = 8,
  parameter int DA_W = $clog2(N + 1)
) (
  input  logic [DA_W-1:0] da,
  output logic [N-1:0]    leaf_app,
  output logic [N-2:0]    node_app
);
  localparam int LOG_N = $clog2(N);

  approx_decoder #(.N(N), .DA_W(DA_W)) u_therm (.da(da), .app(leaf_app));

  // A node's fan-in cone holds exactly the leaves it covers and the nodes
  // between them, whose own selects are ANDs of the same leaves, so the AND of
  // the covered leaf selects is the AND over the whole cone.
  for (genvar lvl = 1; lvl <= LOG_N; lvl++) begin : g_lvl
    for (genvar j = 0; j < (N >> lvl); j++) begin : g_node
      assign node_app[node_base(N, lvl) + j] = &leaf_app[((j+1) << lvl) - 1 : j << lvl];
    end
  end
endmodule
