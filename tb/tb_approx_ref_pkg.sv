// tb_approx_ref_pkg: reference models of the reconfigurable approximate
// adders, written at the behavioural level for the testbenches.
//
// rca_ref: bit-serial model. The low da bits are approximate cells (sum bit =
// b, carry onward = a); the rest add exactly.
//
// cla_ref: evaluates the same published block equations in a different
// order from the RTL. First all propagate/generate pairs are formed level by
// level (they do not depend on carries), then the carries C1..CN are formed in
// increasing order (an odd carry from the leaf below it, carry k = m*2^L with
// m odd from the level-L node that ends at bit k-1 and the carry k - 2^L),
// then the sums. A leaf is approximate when its bit is below da, a node when
// all the bits it covers are.
package tb_approx_ref_pkg;

  localparam int MAXN = 64;

  function automatic logic [MAXN:0] rca_ref(input int n, input logic [MAXN-1:0] a,
                                            input logic [MAXN-1:0] b, input logic cin,
                                            input int da);
    logic [MAXN:0] res = '0;
    logic c = cin;
    for (int i = 0; i < n; i++) begin
      if (i < da) begin
        res[i] = b[i];
        c      = a[i];
      end else begin
        res[i] = a[i] ^ b[i] ^ c;
        c      = (a[i] & b[i]) | (a[i] & c) | (b[i] & c);
      end
    end
    res[n] = c;
    return res;
  endfunction

  // Result packing: bits n-1:0 sum, bit n carry out, bit n+1 root p, bit n+2 root g.
  function automatic logic [MAXN+2:0] cla_ref(input int n, input logic [MAXN-1:0] a,
                                              input logic [MAXN-1:0] b, input logic cin,
                                              input int da);
    logic pp [8][MAXN];   // pp[level][node]
    logic gg [8][MAXN];
    logic cc [MAXN+1];
    logic [MAXN+2:0] res = '0;
    int levels = $clog2(n);
    int lvl, j, span;
    logic lp, lg, approx;
    for (int i = 0; i < n; i++) begin
      approx = (i < da);
      pp[0][i] = approx ? b[i] : a[i] ^ b[i];
      gg[0][i] = approx ? a[i] : a[i] & b[i];
    end
    for (int l = 1; l <= levels; l++) begin
      for (int k = 0; k < (n >> l); k++) begin
        approx = (((k + 1) << l) <= da);
        if (approx) begin
          pp[l][k] = pp[l-1][2*k];
          gg[l][k] = gg[l-1][2*k+1];
        end else begin
          pp[l][k] = pp[l-1][2*k] & pp[l-1][2*k+1];
          gg[l][k] = gg[l-1][2*k+1] | (gg[l-1][2*k] & pp[l-1][2*k+1]);
        end
      end
    end
    cc[0] = cin;
    for (int k = 1; k <= n; k++) begin
      if (k % 2 == 1) begin
        if (k - 1 < da) cc[k] = a[k-1];                 // approximate leaf relays a
        else            cc[k] = gg[0][k-1] | (pp[0][k-1] & cc[k-1]);
      end else begin
        lvl = 0;
        while (((k >> lvl) & 1) == 0) lvl++;
        span = 1 << lvl;
        j = (k >> lvl) - 1;
        lp = pp[lvl][j];
        lg = gg[lvl][j];
        cc[k] = lg | (lp & cc[k - span]);
      end
    end
    for (int i = 0; i < n; i++) begin
      res[i] = (i < da) ? b[i] : pp[0][i] ^ cc[i];
    end
    res[n]   = cc[n];
    res[n+1] = pp[levels][0];
    res[n+2] = gg[levels][0];
    return res;
  endfunction

endpackage
