// buf_row32: one 1x32-Buffer row of the transposition buffer.
//
// 32 registers, each behind a 2-to-1 multiplexer with a common select en.
// With en = 0 every register keeps its value; with en = 1 the new value din
// enters q[0] and each older value moves one place along (q[j] <= q[j-1]).
// After N enabled cycles that wrote z0..z(N-1) in this order, z(r) sits in
// q[N-1-r]. No reset: the row is always written before it is read. The
// register/multiplexer structure follows the document; the shifting order
// is this design's own.
module buf_row32 #(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                en,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] q [32]
);
  always_ff @(posedge clk) begin
    for (int j = 0; j < 32; j++)
      q[j] <= en ? ((j == 0) ? din : q[j-1]) : q[j];
  end
endmodule
