// transpose8x8: 8 x 8 array of W-bit shift registers that turns rows into
// columns.
//
// Rows of one block shift in vertically (each new row enters at the bottom,
// m[7][*], and every row moves up one place). Once a block is complete the
// shift direction flips: the next block's rows enter as columns at the right
// (m[r][7] <= in_row[r]) while the stored block leaves column by column at
// the left, so the columns of block b come out while block b+1 goes in.
// Directions alternate every 8 shifts, so a continuous row stream gives a
// continuous column stream 8 shifts behind it.
//
// Interface: in_row is taken when in_valid && in_ready. Rows must come in
// whole blocks of 8 (pauses inside a block are allowed). If a full block is
// held and no row arrives at a block boundary, the array drains by itself:
// it shifts 8 times with zero fill and in_ready low. out_col (element r =
// row r of the column) is valid with out_valid in the cycle of the shift.
// accept_next is in_ready of the next cycle, for an upstream pipeline stage.
// The shift-register array follows the document; the alternating direction
// and the drain are this design's own.
module transpose8x8 #(
  parameter int unsigned W = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  output logic                accept_next,
  input  logic signed [W-1:0] in_row [8],
  output logic                out_valid,
  output logic signed [W-1:0] out_col [8]
);
  logic signed [W-1:0] m [8][8];
  logic [2:0] cnt;
  logic       dir;        // 0: rows enter vertically, 1: rows enter as columns
  logic       held;       // the array holds a complete block not yet sent
  logic       draining, start_drain, shift;

  assign in_ready    = !draining;
  assign start_drain = !draining && !in_valid && held && cnt == 3'd0;
  assign shift       = (in_valid && in_ready) || draining || start_drain;
  assign accept_next = !(start_drain || (draining && cnt != 3'd7));

  // the element that leaves: top row (dir 0) or left column (dir 1),
  // read out as the transpose of what was written
  always_comb
    for (int r = 0; r < 8; r++)
      out_col[r] = dir ? m[r][0] : m[0][r];
  assign out_valid = shift && held;

  always_ff @(posedge clk) begin
    if (shift) begin
      if (!dir) begin
        for (int r = 0; r < 7; r++) m[r] <= m[r+1];
        for (int c = 0; c < 8; c++) m[7][c] <= (in_valid && in_ready) ? in_row[c] : '0;
      end else begin
        for (int r = 0; r < 8; r++) begin
          for (int c = 0; c < 7; c++) m[r][c] <= m[r][c+1];
          m[r][7] <= (in_valid && in_ready) ? in_row[r] : '0;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      dir      <= 1'b0;
      held     <= 1'b0;
      draining <= 1'b0;
    end else if (shift) begin
      cnt <= cnt + 3'd1;
      if (start_drain) draining <= 1'b1;
      if (cnt == 3'd7) begin
        dir      <= ~dir;
        held     <= !(draining || start_drain);
        draining <= 1'b0;
      end
    end
  end
endmodule
