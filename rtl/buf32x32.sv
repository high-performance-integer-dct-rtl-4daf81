// buf32x32: 32 x 32 transposition buffer between the row and column passes.
//
// Write side: a column of 32 5-to-1 multiplexers, all on the transform-size
// select se, feeds the 32 buf_row32 rows. Multiplexer i passes the scaled
// adder-tree output of level log2N for sub-transform i >> log2N. Row i takes
// that value when en[i] = 1. The row-pass controller enables row s*N + k
// while it computes frequency k of input row r, so after the N rows of a
// block, row s*N + k holds column k of the row-pass result of sub-block s,
// with row r of the block at tap N-1-r.
//
// Read side (the b32i .. b2i views of the rows): for the column pass of
// column rd_k, input j = s*N + r of the 1D core gets row s*N + rd_k, tap
// N-1-r. Combinational read; writes on the clock edge.
module buf32x32
  import dct_pkg::*;
#(
  parameter int unsigned W = DW
) (
  input  logic                clk,
  input  se_t                 se,
  input  logic [31:0]         en,
  input  logic signed [W-1:0] din [5][16],
  input  se_t                 rd_se,
  input  logic [4:0]          rd_k,
  output logic signed [W-1:0] rd_vec [32]
);
  logic signed [W-1:0] mux_q [32];
  logic signed [W-1:0] row_q [32][32];

  // column of 5-to-1 multiplexers
  always_comb
    for (int i = 0; i < 32; i++)
      unique case (se)
        3'd0:    mux_q[i] = din[4][0];
        3'd1:    mux_q[i] = din[3][i >> 4];
        3'd2:    mux_q[i] = din[2][i >> 3];
        3'd3:    mux_q[i] = din[1][i >> 2];
        default: mux_q[i] = din[0][i >> 1];
      endcase

  for (genvar i = 0; i < 32; i++) begin : g_row
    buf_row32 #(.W(W)) u_row (.clk(clk), .en(en[i]), .din(mux_q[i]), .q(row_q[i]));
  end

  // transposed read
  always_comb begin
    int unsigned l2n, n, s, r;
    l2n = se_log2n(rd_se);
    n = 1 << l2n;
    for (int j = 0; j < 32; j++) begin
      s = j >> l2n;
      r = j % n;
      rd_vec[j] = row_q[s * n + (int'(rd_k) % n)][n - 1 - r];
    end
  end
endmodule
