// hevc_dct_top: the transform engines side by side.
//
// Three independent engines, each with its own ports and a shared clock and
// reset:
//   f_*  dct2d_folded   - HEVC 2D integer DCT, 32 x 32 or 2/4/8/16 smaller
//                         blocks at once, one 1D core used for both passes;
//   p_*  dct2d_parallel - the same transform with a row core and a column
//                         core working on consecutive blocks;
//   e_*  dct8x8_2d      - 8 x 8 2D DCT of 8-bit pixels with array multipliers
//                         and a shift-register transpose.
// See the modules for the handshakes and timing. Nothing is shared between
// the engines.
module hevc_dct_top
  import dct_pkg::*;
#(
  parameter int unsigned BIT_DEPTH = 8,
  parameter int unsigned IN_W      = BIT_DEPTH + 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // folded HEVC engine
  input  se_t                    f_se,
  input  logic                   f_in_valid,
  output logic                   f_in_ready,
  input  logic signed [IN_W-1:0] f_in_row [32],
  output logic                   f_out_valid,
  output se_t                    f_out_se,
  output logic [4:0]             f_out_u,
  output logic [4:0]             f_out_k,
  output word_t                  f_out_coef [16],
  output logic                   f_out_last,
  // parallel HEVC engine
  input  se_t                    p_se,
  input  logic                   p_in_valid,
  output logic                   p_in_ready,
  input  logic signed [IN_W-1:0] p_in_row [32],
  output logic                   p_out_valid,
  output se_t                    p_out_se,
  output logic [4:0]             p_out_u,
  output logic [4:0]             p_out_k,
  output word_t                  p_out_coef [16],
  output logic                   p_out_last,
  // 8 x 8 DCT engine
  input  logic                   e_in_valid,
  output logic                   e_in_ready,
  input  logic [7:0]             e_in_row [8],
  output logic                   e_out_valid,
  output logic [2:0]             e_out_v,
  output logic signed [11:0]     e_out_coef [8]
);
  dct2d_folded #(.BIT_DEPTH(BIT_DEPTH), .IN_W(IN_W)) u_folded (
    .clk(clk), .rst_n(rst_n), .se_in(f_se), .in_valid(f_in_valid), .in_ready(f_in_ready),
    .in_row(f_in_row), .out_valid(f_out_valid), .out_se(f_out_se), .out_u(f_out_u),
    .out_k(f_out_k), .out_coef(f_out_coef), .out_last(f_out_last)
  );

  dct2d_parallel #(.BIT_DEPTH(BIT_DEPTH), .IN_W(IN_W)) u_parallel (
    .clk(clk), .rst_n(rst_n), .se_in(p_se), .in_valid(p_in_valid), .in_ready(p_in_ready),
    .in_row(p_in_row), .out_valid(p_out_valid), .out_se(p_out_se), .out_u(p_out_u),
    .out_k(p_out_k), .out_coef(p_out_coef), .out_last(p_out_last)
  );

  dct8x8_2d #(.PIX_W(8)) u_dct8 (
    .clk(clk), .rst_n(rst_n), .in_valid(e_in_valid), .in_ready(e_in_ready), .in_row(e_in_row),
    .out_valid(e_out_valid), .out_v(e_out_v), .out_coef(e_out_coef)
  );
endmodule
