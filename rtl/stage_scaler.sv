// stage_scaler: per-stage scaling of the adder-tree sums.
//
// HEVC scales the forward transform after each pass so that intermediate and
// final values fit 16 bits: after the row pass by 2^-(log2N + B - 9), after
// the column pass by 2^-(log2N + 6). Level L of the tree (N = 2^L) is shifted
// by L + SHIFT_OFS with rounding (add half, arithmetic shift) and clipped to
// 16 bits. Because each level has a fixed shift no variable shifter is
// needed. Combinational. The shift amounts follow the document; rounding to
// nearest and saturation are this design's choices.
module stage_scaler
  import dct_pkg::*;
#(
  parameter int SHIFT_OFS = -1          // B - 9 for the row pass (B = 8)
) (
  input  sum_t  lvl [5][16],
  output word_t q   [5][16]
);
  always_comb
    for (int l = 0; l < 5; l++)
      for (int s = 0; s < 16; s++)
        q[l][s] = round_clip(lvl[l][s], $unsigned(l + 1 + SHIFT_OFS));
endmodule
