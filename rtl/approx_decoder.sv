// approx_decoder: degree-of-approximation decoder of the reconfigurable adders.
//
// The degree of approximation da is a binary count of how many least
// significant bit positions run in approximate mode. The decoder turns it into
// one select per bit position, app[i] = (i < da), a thermometer code, so the
// approximation always grows from bit 0 upward. Values of da above N
// approximate every bit. Encoding and width of da (clog2(N+1) bits, enough
// for 0..N) are this design's choice; the published design only says a small
// two-mode decoder drives the 2:1 selectors of every cell.
//
// Purely combinational.
module approx_decoder #(
  parameter int N    = 8,
  parameter int DA_W = $clog2(N + 1)
) (
  input  logic [DA_W-1:0] da,
  output logic [N-1:0]    app
);
  always_comb begin
    for (int i = 0; i < N; i++) begin
      app[i] = (DA_W'(i) < da);
    end
  end
endmodule
