// dct2d_folded: folded 2D HEVC forward integer DCT on one 1D core.
//
// The 2D transform Y = C * X * C^T is done by row-column decomposition. One
// dct1d_32 core first runs the row pass: each input row of 32 samples
// (32/N blocks of N x N side by side, N = 32 >> se) is held for N cycles
// while the core produces frequencies k = 0..N-1; the results, scaled by
// 2^-(log2N + BIT_DEPTH - 9) and clipped to 16 bits, enter the 32 x 32
// buffer (row s*N + k of buf32x32). After the N rows of the block and two
// cycles for the core pipeline to empty, the same core runs the column pass:
// for each column k it reads the transposed vector from the buffer and
// produces vertical frequencies u = 0..N-1, scaled by 2^-(log2N + 6).
//
// Interface: in_row is taken when in_valid && in_ready; se_in is sampled
// with the first row of a block and holds for the whole block. The next row
// is accepted in the cycle the core starts the last frequency of the current
// one, so rows stream at one per N cycles. out_coef[s] is coefficient
// (out_u, out_k) (vertical, horizontal frequency) of sub-block s,
// s < 32/N; out_last marks the last output of a block. Outputs are
// registered; a block takes 2*N*N + 3 cycles from its first row to its
// last output start. The core, buffer and scaling follow the document; the
// schedule, the handshake and the drain cycles are this design's own.
module dct2d_folded
  import dct_pkg::*;
#(
  parameter int unsigned BIT_DEPTH = 8,
  parameter int unsigned IN_W      = BIT_DEPTH + 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  se_t                    se_in,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic signed [IN_W-1:0] in_row [32],
  output logic                   out_valid,
  output se_t                    out_se,
  output logic [4:0]             out_u,
  output logic [4:0]             out_k,
  output word_t                  out_coef [16],
  output logic                   out_last
);
  typedef enum logic [1:0] {S_ROW, S_DRAIN, S_COL} state_t;

  typedef struct packed {
    logic       valid;
    logic       col;    // 0 = row pass, 1 = column pass
    se_t        se;
    logic [4:0] f;      // frequency computed (k in row pass, u in column pass)
    logic [4:0] kc;     // column read (column pass)
    logic       last;
  } tag_t;

  state_t      state;
  se_t         se_q;
  logic        have_row;
  logic [5:0]  rows_in;
  logic [4:0]  k_cnt, col_k, col_u, nm1;
  logic [1:0]  drain;
  logic signed [CORE_IW-1:0] xin [32];
  logic signed [CORE_IW-1:0] core_x [32];
  logic signed [CORE_IW-1:0] rd_vec [32];
  logic [4:0]  core_k;
  tag_t        tag_in, tag1, tag2;
  sum_t        lvl [5][16];
  word_t       sc_row [5][16];
  word_t       sc_col [5][16];
  logic [31:0] buf_en;
  logic        accept, issue_row, issue_col;

  assign nm1       = 5'((1 << se_log2n(se_q)) - 1);
  assign in_ready  = (state == S_ROW) &&
                     (rows_in == 0 || (rows_in <= 6'(nm1) && (!have_row || k_cnt == nm1)));
  assign accept    = in_valid && in_ready;
  assign issue_row = (state == S_ROW) && have_row;
  assign issue_col = (state == S_COL);

  always_comb begin
    for (int j = 0; j < 32; j++) core_x[j] = issue_col ? rd_vec[j] : xin[j];
    core_k = issue_col ? col_u : k_cnt;
    tag_in = '{valid: issue_row || issue_col, col: issue_col, se: se_q,
               f: core_k, kc: col_k, last: issue_col && col_k == nm1 && col_u == nm1};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_ROW;
      se_q     <= '0;
      have_row <= 1'b0;
      rows_in  <= '0;
      k_cnt    <= '0;
      col_k    <= '0;
      col_u    <= '0;
      drain    <= '0;
    end else begin
      unique case (state)
        S_ROW: begin
          if (accept && rows_in == 0) se_q <= se_in;
          if (accept) begin
            have_row <= 1'b1;
            k_cnt    <= '0;
            rows_in  <= rows_in + 6'd1;
          end else if (have_row) begin
            if (k_cnt == nm1) begin
              have_row <= 1'b0;
              if (rows_in == 6'(nm1) + 6'd1) begin
                state <= S_DRAIN;
                drain <= 2'd1;
              end
            end else k_cnt <= k_cnt + 5'd1;
          end
        end
        S_DRAIN: begin
          if (drain == 0) begin
            state <= S_COL;
            col_k <= '0;
            col_u <= '0;
          end else drain <= drain - 2'd1;
        end
        default: begin  // S_COL
          if (col_u == nm1) begin
            col_u <= '0;
            if (col_k == nm1) begin
              state   <= S_ROW;
              rows_in <= '0;
            end else col_k <= col_k + 5'd1;
          end else col_u <= col_u + 5'd1;
        end
      endcase
    end
  end

  // input row register (sign-extended to the core width)
  always_ff @(posedge clk)
    if (accept)
      for (int j = 0; j < 32; j++) xin[j] <= CORE_IW'(in_row[j]);

  // tags follow the two core pipeline stages
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag1 <= '0;
      tag2 <= '0;
    end else begin
      tag1 <= tag_in;
      tag2 <= tag1;
    end
  end

  dct1d_32 #(.IN_W(CORE_IW)) u_core (.clk(clk), .x(core_x), .se(se_q), .k(core_k), .lvl(lvl));

  stage_scaler #(.SHIFT_OFS(int'(BIT_DEPTH) - 9)) u_sc_row (.lvl(lvl), .q(sc_row));
  stage_scaler #(.SHIFT_OFS(6))                   u_sc_col (.lvl(lvl), .q(sc_col));

  // row-pass results: rows s*N + k of the buffer
  always_comb begin
    int unsigned n;
    n = 1 << se_log2n(tag2.se);
    buf_en = '0;
    if (tag2.valid && !tag2.col)
      for (int s = 0; s < 32; s++)
        if (s < 32 / n) buf_en[s * n + int'(tag2.f)] = 1'b1;
  end

  buf32x32 #(.W(DW)) u_buf (
    .clk(clk), .se(tag2.se), .en(buf_en), .din(sc_row),
    .rd_se(se_q), .rd_k(col_k), .rd_vec(rd_vec)
  );

  // column-pass results
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_se    <= '0;
      out_u     <= '0;
      out_k     <= '0;
      out_last  <= 1'b0;
      for (int s = 0; s < 16; s++) out_coef[s] <= '0;
    end else begin
      out_valid <= tag2.valid && tag2.col;
      out_se    <= tag2.se;
      out_u     <= tag2.f;
      out_k     <= tag2.kc;
      out_last  <= tag2.valid && tag2.last;
      for (int s = 0; s < 16; s++)
        out_coef[s] <= sc_col[se_log2n(tag2.se) - 1][s];
    end
  end

  // a row is only taken while no block is being transformed in the column pass
  assert property (@(posedge clk) disable iff (!rst_n) accept |-> state == S_ROW);
endmodule
