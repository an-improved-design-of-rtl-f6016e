// rev_approx_top: the reversible-logic approximate arithmetic units side by
// side, each with its own ports.
//
//   rca_*  N-bit reconfigurable approximate ripple-carry adder (rev_reconf_rca)
//   cla_*  N-bit reconfigurable approximate carry-lookahead adder
//          (rev_reconf_cla), with its root group propagate/generate
//   has_*  reversible half adder/subtractor (rev_half_addsub)
//   fas_*  reversible full adder/subtractor (rev_full_addsub)
//
// For both adders *_da is the degree of approximation: the number of least
// significant bit positions that run in approximate mode (sum bit = b, carry
// onward = a). 0 gives the exact sum. The adder/subtractors add when ctrl = 0
// and subtract when ctrl = 1. Everything is combinational; there is no clock.
// The units are independent, as the published design presents them; bringing
// them out on separate ports is this design's choice.
module rev_approx_top #(
  parameter int N    = 8,
  parameter int DA_W = $clog2(N + 1)
) (
  input  logic [N-1:0]    rca_a,
  input  logic [N-1:0]    rca_b,
  input  logic            rca_cin,
  input  logic [DA_W-1:0] rca_da,
  output logic [N-1:0]    rca_s,
  output logic            rca_cout,

  input  logic [N-1:0]    cla_a,
  input  logic [N-1:0]    cla_b,
  input  logic            cla_cin,
  input  logic [DA_W-1:0] cla_da,
  output logic [N-1:0]    cla_s,
  output logic            cla_cout,
  output logic            cla_p,
  output logic            cla_g,

  input  logic            has_a,
  input  logic            has_b,
  input  logic            has_ctrl,
  output logic            has_sd,
  output logic            has_cb,

  input  logic            fas_a,
  input  logic            fas_b,
  input  logic            fas_cin,
  input  logic            fas_ctrl,
  output logic            fas_sd,
  output logic            fas_cb
);
  rev_reconf_rca #(.N(N), .DA_W(DA_W)) u_rca (
    .a(rca_a), .b(rca_b), .cin(rca_cin), .da(rca_da), .s(rca_s), .cout(rca_cout)
  );

  rev_reconf_cla #(.N(N), .DA_W(DA_W)) u_cla (
    .a(cla_a), .b(cla_b), .cin(cla_cin), .da(cla_da),
    .s(cla_s), .cout(cla_cout), .p(cla_p), .g(cla_g)
  );

  rev_half_addsub u_has (
    .a(has_a), .b(has_b), .ctrl(has_ctrl), .sd(has_sd), .cb(has_cb)
  );

  rev_full_addsub u_fas (
    .a(fas_a), .b(fas_b), .cin(fas_cin), .ctrl(fas_ctrl), .sd(fas_sd), .cb(fas_cb)
  );
endmodule
