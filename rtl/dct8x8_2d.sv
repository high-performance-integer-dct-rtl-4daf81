// dct8x8_2d: 8 x 8 2D DCT by row-column decomposition.
//
// A row dct8_1d transforms each row of 8 pixels (unsigned PIX_W bits, widened
// to 12-bit signed), transpose8x8 turns the 12-bit row results into columns,
// and a second dct8_1d transforms each column. The result is the orthonormal
// 2D DCT-II of the block, rounded to 12-bit integers (DC = sum / 8).
//
// Interface: one pixel row per cycle with in_valid && in_ready, in whole
// blocks of 8 rows. out_coef[u] is coefficient (u, out_v) (vertical u,
// horizontal out_v), one column per cycle with out_valid, columns v = 0..7
// of a block in order. A block's first column appears 3 cycles after its
// last row if no further block follows, or while the next block streams in.
// The structure (two 1D DCTs and the transpose) follows the document; the
// widths and the handshake are this design's own.
module dct8x8_2d #(
  parameter int unsigned PIX_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [PIX_W-1:0] in_row [8],
  output logic             out_valid,
  output logic [2:0]       out_v,
  output logic signed [11:0] out_coef [8]
);
  logic signed [11:0] px [8];
  logic signed [11:0] rrow [8];
  logic signed [11:0] tcol [8];
  logic               rvalid, tvalid, t_ready, t_next;

  always_comb
    for (int i = 0; i < 8; i++) px[i] = 12'(in_row[i]);

  // a row accepted now reaches the transpose next cycle, so use its
  // next-cycle readiness
  assign in_ready = t_next;

  dct8_1d #(.IW(12), .OW(12)) u_row (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid && in_ready), .x(px),
    .out_valid(rvalid), .y(rrow)
  );

  transpose8x8 #(.W(12)) u_tr (
    .clk(clk), .rst_n(rst_n), .in_valid(rvalid), .in_ready(t_ready), .accept_next(t_next),
    .in_row(rrow), .out_valid(tvalid), .out_col(tcol)
  );

  dct8_1d #(.IW(12), .OW(12)) u_col (
    .clk(clk), .rst_n(rst_n), .in_valid(tvalid), .x(tcol),
    .out_valid(out_valid), .y(out_coef)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)         out_v <= '0;
    else if (out_valid) out_v <= out_v + 3'd1;

  // a row from the row DCT is never dropped by the transpose
  assert property (@(posedge clk) disable iff (!rst_n) rvalid |-> t_ready);
endmodule
