// dct1d_32: configurable 32-point 1D HEVC integer DCT core.
//
// Every cycle it computes one output frequency k of either one 32-point DCT
// or of 2, 4, 8 or 16 independent 16-, 8-, 4- or 2-point DCTs laid side by
// side over the 32 inputs (se = 0..4). Input j belongs to sub-transform
// s = j >> log2N at position n = j mod N. A coefficient decoder turns (se, k, j)
// into the HEVC coefficient and its cell selects for Block j (csa_block);
// the 32 products enter the adder tree, whose level log2N gives the 32/N
// results. Levels of the tree other than log2N are meaningless for the
// chosen se. lvl is a fixed 5 x 16 array: entries s >= 32 >> L of level L
// do not exist in the tree and are constant zero.
//
// Timing: x, se and k are taken every cycle; the products are registered and
// the tree sums are registered, so lvl shows the result two cycles after the
// inputs (throughput one k per cycle). The Blocks and adder tree follow the
// document; the one-frequency-per-cycle schedule and the two pipeline
// registers are this design's own.
module dct1d_32
  import dct_pkg::*;
#(
  parameter int unsigned IN_W = CORE_IW
) (
  input  logic                   clk,
  input  logic signed [IN_W-1:0] x   [32],
  input  se_t                    se,
  input  logic [4:0]             k,
  output sum_t                   lvl [5][16]
);
  localparam int unsigned PW = IN_W + COEF_W;

  logic [14:0]           sels [32];
  logic                  cneg [32];
  logic signed [PW-1:0]  prod [32];
  logic signed [PW-1:0]  prod_q [32];
  logic signed [PW+4:0]  tree [5][16];

  // coefficient decoder
  always_comb begin
    int unsigned l2n, n;
    int c;
    l2n = se_log2n(se);
    for (int j = 0; j < 32; j++) begin
      n = j % (1 << l2n);
      c = hevc_coef(l2n, int'(k) % (1 << l2n), n);
      cneg[j] = (c < 0);
      sels[j] = cell_sels((c < 0) ? -c : c);
    end
  end

  for (genvar j = 0; j < 32; j++) begin : g_blk
    csa_block #(.IN_W(IN_W)) u_blk (.x(x[j]), .sels(sels[j]), .coef_neg(cneg[j]), .p(prod[j]));
  end

  always_ff @(posedge clk) prod_q <= prod;

  adder_tree32 #(.P_W(PW)) u_tree (.p(prod_q), .lvl(tree));

  always_ff @(posedge clk)
    for (int l = 0; l < 5; l++)
      for (int s = 0; s < 16; s++) lvl[l][s] <= SUM_W'(tree[l][s]);
endmodule
