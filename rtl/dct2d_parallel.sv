// dct2d_parallel: parallel 2D HEVC forward integer DCT on two 1D cores.
//
// Same transform, scaling, interface and output order as dct2d_folded, but
// the row pass and the column pass each have their own dct1d_32 core and
// run at the same time on consecutive blocks. Two 32 x 32 buffers
// (buf32x32) alternate: while the row core fills one with block b+1, the
// column core reads block b from the other. When the row core has finished
// a block (N rows, then two cycles for its pipeline to empty) it hands the
// buffer over as soon as the column core is free, and carries on with the
// next block in the other buffer.
//
// Interface: as dct2d_folded. With a continuous input a new block starts
// every N*N + 3 cycles (one row per N cycles), about twice the throughput of
// the folded engine. The 1D core, buffer and scaling follow the document;
// the document names the parallel design only, so the two-buffer
// arrangement, hand-over and handshake are this design's own.
module dct2d_parallel
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
  typedef enum logic {S_ROW, S_DRAIN} rstate_t;

  // row core: which buffer and which row to write
  typedef struct packed {
    logic       valid;
    logic       bsel;   // buffer written
    se_t        se;
    logic [4:0] f;      // frequency k
  } rtag_t;

  // column core: which coefficient leaves
  typedef struct packed {
    logic       valid;
    se_t        se;
    logic [4:0] f;      // vertical frequency u
    logic [4:0] kc;     // column k
    logic       last;
  } ctag_t;

  // ---------------- row side ----------------
  rstate_t     rstate;
  se_t         se_r;
  logic        have_row, wsel;
  logic [5:0]  rows_in;
  logic [4:0]  k_cnt, nm1_r;
  logic [1:0]  drain;
  logic signed [CORE_IW-1:0] xin [32];
  rtag_t       rtag1, rtag2;
  sum_t        rlvl [5][16];
  word_t       sc_row [5][16];
  logic [31:0] en_a, en_b;
  logic        accept, handoff;

  // ---------------- column side ----------------
  logic        col_busy, rsel;
  se_t         se_c;
  logic [4:0]  col_k, col_u, nm1_c;
  logic signed [CORE_IW-1:0] rd_a [32];
  logic signed [CORE_IW-1:0] rd_b [32];
  logic signed [CORE_IW-1:0] col_x [32];
  ctag_t       ctag1, ctag2;
  sum_t        clvl [5][16];
  word_t       sc_col [5][16];

  assign nm1_r    = 5'((1 << se_log2n(se_r)) - 1);
  assign nm1_c    = 5'((1 << se_log2n(se_c)) - 1);
  assign in_ready = (rstate == S_ROW) &&
                    (rows_in == 0 || (rows_in <= 6'(nm1_r) && (!have_row || k_cnt == nm1_r)));
  assign accept   = in_valid && in_ready;
  assign handoff  = (rstate == S_DRAIN) && drain == 0 && !col_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rstate   <= S_ROW;
      se_r     <= '0;
      have_row <= 1'b0;
      rows_in  <= '0;
      k_cnt    <= '0;
      drain    <= '0;
      wsel     <= 1'b0;
    end else begin
      unique case (rstate)
        S_ROW: begin
          if (accept && rows_in == 0) se_r <= se_in;
          if (accept) begin
            have_row <= 1'b1;
            k_cnt    <= '0;
            rows_in  <= rows_in + 6'd1;
          end else if (have_row) begin
            if (k_cnt == nm1_r) begin
              have_row <= 1'b0;
              if (rows_in == 6'(nm1_r) + 6'd1) begin
                rstate <= S_DRAIN;
                drain  <= 2'd1;
              end
            end else k_cnt <= k_cnt + 5'd1;
          end
        end
        default: begin  // S_DRAIN: wait for the pipeline, then for the column core
          if (drain != 0) drain <= drain - 2'd1;
          else if (handoff) begin
            rstate  <= S_ROW;
            rows_in <= '0;
            wsel    <= ~wsel;
          end
        end
      endcase
    end
  end

  always_ff @(posedge clk)
    if (accept)
      for (int j = 0; j < 32; j++) xin[j] <= CORE_IW'(in_row[j]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rtag1 <= '0;
      rtag2 <= '0;
    end else begin
      rtag1 <= '{valid: (rstate == S_ROW) && have_row, bsel: wsel, se: se_r, f: k_cnt};
      rtag2 <= rtag1;
    end
  end

  dct1d_32 #(.IN_W(CORE_IW)) u_row_core (.clk(clk), .x(xin), .se(se_r), .k(k_cnt), .lvl(rlvl));
  stage_scaler #(.SHIFT_OFS(int'(BIT_DEPTH) - 9)) u_sc_row (.lvl(rlvl), .q(sc_row));

  always_comb begin
    int unsigned n;
    n = 1 << se_log2n(rtag2.se);
    en_a = '0;
    en_b = '0;
    if (rtag2.valid)
      for (int s = 0; s < 32; s++)
        if (s < 32 / n) begin
          if (rtag2.bsel) en_b[s * n + int'(rtag2.f)] = 1'b1;
          else            en_a[s * n + int'(rtag2.f)] = 1'b1;
        end
  end

  buf32x32 #(.W(DW)) u_buf_a (
    .clk(clk), .se(rtag2.se), .en(en_a), .din(sc_row),
    .rd_se(se_c), .rd_k(col_k), .rd_vec(rd_a)
  );
  buf32x32 #(.W(DW)) u_buf_b (
    .clk(clk), .se(rtag2.se), .en(en_b), .din(sc_row),
    .rd_se(se_c), .rd_k(col_k), .rd_vec(rd_b)
  );

  // ---------------- column core ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_busy <= 1'b0;
      rsel     <= 1'b0;
      se_c     <= '0;
      col_k    <= '0;
      col_u    <= '0;
    end else if (handoff) begin
      col_busy <= 1'b1;
      rsel     <= wsel;
      se_c     <= se_r;
      col_k    <= '0;
      col_u    <= '0;
    end else if (col_busy) begin
      if (col_u == nm1_c) begin
        col_u <= '0;
        if (col_k == nm1_c) col_busy <= 1'b0;
        else                col_k    <= col_k + 5'd1;
      end else col_u <= col_u + 5'd1;
    end
  end

  always_comb
    for (int j = 0; j < 32; j++) col_x[j] = rsel ? rd_b[j] : rd_a[j];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctag1 <= '0;
      ctag2 <= '0;
    end else begin
      ctag1 <= '{valid: col_busy, se: se_c, f: col_u, kc: col_k,
                 last: col_busy && col_k == nm1_c && col_u == nm1_c};
      ctag2 <= ctag1;
    end
  end

  dct1d_32 #(.IN_W(CORE_IW)) u_col_core (.clk(clk), .x(col_x), .se(se_c), .k(col_u), .lvl(clvl));
  stage_scaler #(.SHIFT_OFS(6)) u_sc_col (.lvl(clvl), .q(sc_col));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_se    <= '0;
      out_u     <= '0;
      out_k     <= '0;
      out_last  <= 1'b0;
      for (int s = 0; s < 16; s++) out_coef[s] <= '0;
    end else begin
      out_valid <= ctag2.valid;
      out_se    <= ctag2.se;
      out_u     <= ctag2.f;
      out_k     <= ctag2.kc;
      out_last  <= ctag2.valid && ctag2.last;
      for (int s = 0; s < 16; s++)
        out_coef[s] <= sc_col[se_log2n(ctag2.se) - 1][s];
    end
  end

  // the column core never reads the buffer the row core is writing
  assert property (@(posedge clk) disable iff (!rst_n) col_busy && rtag2.valid |-> rtag2.bsel != rsel);
endmodule
