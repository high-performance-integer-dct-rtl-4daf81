// adder_tree32: five-level signed adder tree over 32 products.
//
// Level L (1..5) adds neighbouring pairs of level L-1, so lvl[L-1][s] is the
// sum of products s*2^L .. s*2^L+2^L-1. Every level is brought out: level
// log2(N) holds the results of the 32/N independent N-point transforms the
// 1D core computes at once (N = 2..32). Entries s >= 32>>L of a level are
// zero. Each level grows one bit; depth is five adders. Combinational.
module adder_tree32
  import dct_pkg::*;
#(
  parameter int unsigned P_W = PROD_W
) (
  input  logic signed [P_W-1:0]   p   [32],
  output logic signed [P_W+4:0]   lvl [5][16]
);
  localparam int unsigned OW = P_W + 5;

  logic signed [OW-1:0] l0 [32];
  logic signed [OW-1:0] l1 [16];
  logic signed [OW-1:0] l2 [8];
  logic signed [OW-1:0] l3 [4];
  logic signed [OW-1:0] l4 [2];
  logic signed [OW-1:0] l5;

  always_comb begin
    for (int i = 0; i < 32; i++) l0[i] = OW'(p[i]);
    for (int i = 0; i < 16; i++) l1[i] = l0[2*i] + l0[2*i+1];
    for (int i = 0; i < 8;  i++) l2[i] = l1[2*i] + l1[2*i+1];
    for (int i = 0; i < 4;  i++) l3[i] = l2[2*i] + l2[2*i+1];
    for (int i = 0; i < 2;  i++) l4[i] = l3[2*i] + l3[2*i+1];
    l5 = l4[0] + l4[1];
    for (int l = 0; l < 5; l++)
      for (int s = 0; s < 16; s++) lvl[l][s] = '0;
    for (int s = 0; s < 16; s++) lvl[0][s] = l1[s];
    for (int s = 0; s < 8;  s++) lvl[1][s] = l2[s];
    for (int s = 0; s < 4;  s++) lvl[2][s] = l3[s];
    for (int s = 0; s < 2;  s++) lvl[3][s] = l4[s];
    lvl[4][0] = l5;
  end
endmodule
