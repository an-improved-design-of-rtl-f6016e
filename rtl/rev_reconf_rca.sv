// rev_reconf_rca: N-bit reconfigurable approximate ripple-carry adder built
// from reversible dual-mode full adders.
//
// N rev_dmfa cells are chained through their carries. A decoder turns the
// degree of approximation da into one mode select per cell: the da least
// significant cells run in approximate mode (s[i] = b[i], carry to the next
// cell = a[i]); the rest add exactly, starting from the carry a[da-1] left by
// the last approximate cell (or cin when da = 0). With da = 0 the result is
// exactly a + b + cin. The default width of 8 bits is the published one; the
// binary encoding of da is this design's choice (see approx_decoder).
//
// Interface: a, b, cin, da in; s, cout out. Purely combinational; the
// critical path is the ripple through the accurate cells.
module rev_reconf_rca #(
  parameter int N    = 8,
  parameter int DA_W = $clog2(N + 1)
) (
  input  logic [N-1:0]    a,
  input  logic [N-1:0]    b,
  input  logic            cin,
  input  logic [DA_W-1:0] da,
  output logic [N-1:0]    s,
  output logic            cout
);
  logic [N-1:0] app;
  logic         carry [N+1];

  approx_decoder #(.N(N), .DA_W(DA_W)) u_dec (.da(da), .app(app));

  assign carry[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_bit
    rev_dmfa u_dmfa (
      .a(a[i]), .b(b[i]), .cin(carry[i]), .app(app[i]),
      .s(s[i]), .cout(carry[i+1])
    );
  end

  assign cout = carry[N];
endmodule
