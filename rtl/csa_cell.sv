// csa_cell: one "Cell" of the configurable carry-save multiplier.
//
// A series of multiplexers chooses one power-of-two multiple of the input
// magnitude: sel = 0 gives zero, sel = s (1..7) gives mag << (s-1). Five cells,
// configured from the set bits of a coefficient, together present the
// addends of c*|x| to the carry-save adder tree of csa_block. Purely
// combinational. The cell structure follows the document; the select encoding
// is this design's own.
module csa_cell #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0]   mag,
  input  logic [2:0]     sel,
  output logic [W+6:0]   term
);
  always_comb begin
    unique case (sel)
      3'd0:    term = '0;
      3'd1:    term = (W+7)'(mag);
      3'd2:    term = (W+7)'(mag) << 1;
      3'd3:    term = (W+7)'(mag) << 2;
      3'd4:    term = (W+7)'(mag) << 3;
      3'd5:    term = (W+7)'(mag) << 4;
      3'd6:    term = (W+7)'(mag) << 5;
      default: term = (W+7)'(mag) << 6;
    endcase
  end
endmodule
