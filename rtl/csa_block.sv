// csa_block: signed configurable carry-save-adder-tree multiplier (a "Block").
//
// p = c * x for a signed sample x and a coefficient c given as five cell
// selects (the set bits of |c|) and a sign. Five csa_cell instances pick the
// shifted copies of |x|; a three-level tree of 3:2 carry-save adders
// (log2 5 rounded up) reduces the five terms to a sum and a carry word, which
// one carry-propagate adder combines; a final multiplexer takes the product
// or its negation according to sign(x) xor sign(c). Purely combinational.
// The cell / CSA tree / sign multiplexer split follows the document; the
// order in which the five terms enter the tree is this design's own.
module csa_block #(
  parameter int unsigned IN_W = 16
) (
  input  logic signed [IN_W-1:0] x,
  input  logic [14:0]            sels,      // cell c select in sels[3c +: 3]
  input  logic                   coef_neg,
  output logic signed [IN_W+6:0] p
);
  localparam int unsigned TW = IN_W + 7;

  logic [IN_W-1:0] mag;
  logic [TW-1:0]   t [5];
  logic [TW-1:0]   s1, c1, s2, c2, s3, c3, mag_p;

  assign mag = x[IN_W-1] ? IN_W'(-x) : IN_W'(x);

  for (genvar c = 0; c < 5; c++) begin : g_cell
    csa_cell #(.W(IN_W)) u_cell (.mag(mag), .sel(sels[3*c +: 3]), .term(t[c]));
  end

  // level 1: t0 + t1 + t2
  assign s1 = t[0] ^ t[1] ^ t[2];
  assign c1 = ((t[0] & t[1]) | (t[0] & t[2]) | (t[1] & t[2])) << 1;
  // level 2: s1 + c1 + t3
  assign s2 = s1 ^ c1 ^ t[3];
  assign c2 = ((s1 & c1) | (s1 & t[3]) | (c1 & t[3])) << 1;
  // level 3: s2 + c2 + t4
  assign s3 = s2 ^ c2 ^ t[4];
  assign c3 = ((s2 & c2) | (s2 & t[4]) | (c2 & t[4])) << 1;
  // final carry-propagate adder
  assign mag_p = s3 + c3;

  // sign multiplexer
  assign p = (x[IN_W-1] ^ coef_neg) ? -signed'(mag_p) : signed'(mag_p);
endmodule
