// approx_pkg: types and helpers shared by the reconfigurable approximate adders.
//
// pg_t bundles the propagate/generate pair that travels up the carry-lookahead
// tree. node_base() gives the index at which a tree level starts in the
// flattened per-node select vector produced by cla_mode_decoder. The
// flattening scheme is this design's own choice.
package approx_pkg;

  typedef struct packed {
    logic p;
    logic g;
  } pg_t;

  // Level lvl (1 .. log2 n) of an n-leaf binary tree holds n >> lvl nodes;
  // the levels are stored one after another, starting with level 1.
  function automatic int node_base(input int n, input int lvl);
    return n - (n >> (lvl - 1));
  endfunction

endpackage
