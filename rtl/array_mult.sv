// array_mult: unsigned AW x BW array multiplier built from AND gates and
// full adders.
//
// Partial-product bit pp[i][j] = a[j] & b[i]. Row i (i >= 1) of full adders
// adds pp row i to the upper AW bits of the previous row's result and its
// carry-out, in ripple fashion; each row retires one product bit at the
// bottom, and the last row gives the top AW bits. AW*BW AND gates and
// (BW-1)*AW full adders, as the document describes. Combinational.
module array_mult #(
  parameter int unsigned AW = 15,
  parameter int unsigned BW = 7
) (
  input  logic [AW-1:0]    a,
  input  logic [BW-1:0]    b,
  output logic [AW+BW-1:0] p
);
  logic [AW-1:0] acc  [BW];      // row result
  logic [AW:0]   cy   [BW];      // ripple carries of each row
  logic [AW-1:0] xin  [BW];      // upper bits of the previous row + its carry-out

  for (genvar j = 0; j < AW; j++) begin : g_row0
    assign acc[0][j] = a[j] & b[0];
  end
  assign cy[0] = '0;
  assign p[0]  = acc[0][0];

  for (genvar i = 1; i < BW; i++) begin : g_row
    assign xin[i]  = {cy[i-1][AW], acc[i-1][AW-1:1]};
    assign cy[i][0] = 1'b0;
    for (genvar j = 0; j < AW; j++) begin : g_fa
      logic y;
      assign y            = a[j] & b[i];
      assign acc[i][j]    = xin[i][j] ^ y ^ cy[i][j];
      assign cy[i][j+1]   = (xin[i][j] & y) | (xin[i][j] & cy[i][j]) | (y & cy[i][j]);
    end
    assign p[i] = acc[i][0];
  end

  assign p[AW+BW-1:BW] = {cy[BW-1][AW], acc[BW-1][AW-1:1]};
  assign xin[0] = '0;
endmodule
