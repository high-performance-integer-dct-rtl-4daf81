// dct8_1d: 8-point 1D DCT with the even/odd (sparse matrix) factorisation.
//
// Y(k) = 1/2 * sum_n c(k) x(n) cos((2n+1) k pi / 16), c(0) = 1/sqrt2, i.e. the
// orthonormal DCT-II. Four adders and four subtracters form s(i) = x(i) +
// x(7-i) and d(i) = x(i) - x(7-i). The even outputs come from s:
//   Y0 = C4 (s0+s1+s2+s3), Y4 = C4 (s0-s1-s2+s3),
//   Y2 = C2 (s0-s3) + C6 (s1-s2), Y6 = C6 (s0-s3) - C2 (s1-s2),
// the odd outputs Y1, Y3, Y5, Y7 from a 4x4 matrix of C1, C3, C5, C7 times d.
// Every product uses an unsigned array_mult on magnitudes with the sign
// applied after it (22 multipliers). Coefficients are K(k) = round(128 *
// cos(k pi / 16)), i.e. 1/2 cos(k pi/16) with 8 fraction bits; each output is
// rounded back to an integer and clipped to OW bits.
//
// Timing: one row of 8 samples per cycle when in_valid; y and out_valid are
// registered, one cycle later. The factorisation and the array multipliers
// follow the document; the word-parallel datapath (the document uses
// bit-serial adders), the coefficient precision and the widths are this
// design's own.
module dct8_1d #(
  parameter int unsigned IW = 12,
  parameter int unsigned OW = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] x [8],
  output logic                 out_valid,
  output logic signed [OW-1:0] y [8]
);
  localparam int unsigned MW = IW + 3;   // magnitude width of any multiplier operand
  localparam int unsigned KW = 7;
  localparam int unsigned PW = MW + KW + 1;
  localparam int unsigned FRAC = 8;

  // K(k) = round(128 cos(k pi / 16)), k = 0..7 (index 0 unused)
  localparam logic [KW-1:0] K [8] = '{7'd0, 7'd126, 7'd118, 7'd106, 7'd91, 7'd71, 7'd49, 7'd25};

  // odd part: row r (Y1, Y3, Y5, Y7), column c (d0..d3): coefficient index and sign
  localparam int unsigned OIDX [4][4] = '{'{1, 3, 5, 7}, '{3, 7, 1, 5}, '{5, 1, 7, 3}, '{7, 5, 3, 1}};
  localparam logic        ONEG [4][4] = '{'{0, 0, 0, 0}, '{0, 1, 1, 1}, '{0, 1, 0, 0}, '{0, 1, 0, 1}};

  logic signed [MW-1:0] s [4], d [4], e [4], ev [6];
  logic signed [PW-1:0] po [4][4];   // odd products
  logic signed [PW-1:0] pe [6];      // even products
  logic signed [PW+1:0] acc [8];

  // butterflies
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      s[i] = MW'(x[i]) + MW'(x[7-i]);
      d[i] = MW'(x[i]) - MW'(x[7-i]);
    end
    e[0] = s[0] + s[3];
    e[1] = s[1] + s[2];
    e[2] = s[0] - s[3];
    e[3] = s[1] - s[2];
    ev[0] = e[0] + e[1];   // * C4 -> Y0
    ev[1] = e[0] - e[1];   // * C4 -> Y4
    ev[2] = e[2];          // * C2
    ev[3] = e[3];          // * C6
    ev[4] = e[2];          // * C6
    ev[5] = e[3];          // * C2
  end

  localparam int unsigned EIDX [6] = '{4, 4, 2, 6, 6, 2};

  for (genvar m = 0; m < 6; m++) begin : g_even
    logic [MW-1:0]    mag;
    logic [MW+KW-1:0] pm;
    assign mag = ev[m][MW-1] ? MW'(-ev[m]) : MW'(ev[m]);
    array_mult #(.AW(MW), .BW(KW)) u_mul (.a(mag), .b(K[EIDX[m]]), .p(pm));
    assign pe[m] = ev[m][MW-1] ? -signed'(PW'(pm)) : signed'(PW'(pm));
  end

  for (genvar r = 0; r < 4; r++) begin : g_odd_r
    for (genvar c = 0; c < 4; c++) begin : g_odd_c
      logic [MW-1:0]    mag;
      logic [MW+KW-1:0] pm;
      assign mag = d[c][MW-1] ? MW'(-d[c]) : MW'(d[c]);
      array_mult #(.AW(MW), .BW(KW)) u_mul (.a(mag), .b(K[OIDX[r][c]]), .p(pm));
      assign po[r][c] = (d[c][MW-1] ^ ONEG[r][c]) ? -signed'(PW'(pm)) : signed'(PW'(pm));
    end
  end

  always_comb begin
    acc[0] = (PW+2)'(pe[0]);
    acc[4] = (PW+2)'(pe[1]);
    acc[2] = (PW+2)'(pe[2]) + (PW+2)'(pe[3]);
    acc[6] = (PW+2)'(pe[4]) - (PW+2)'(pe[5]);
    for (int r = 0; r < 4; r++)
      acc[2*r+1] = (PW+2)'(po[r][0]) + (PW+2)'(po[r][1]) + (PW+2)'(po[r][2]) + (PW+2)'(po[r][3]);
  end

  function automatic logic signed [OW-1:0] rnd_clip(input logic signed [PW+1:0] v);
    logic signed [PW+1:0] t;
    t = (v + (PW+2)'(1 << (FRAC - 1))) >>> FRAC;
    if (t > (PW+2)'((1 << (OW - 1)) - 1)) return OW'((1 << (OW - 1)) - 1);
    if (t < -(PW+2)'(1 << (OW - 1)))     return OW'(-(1 << (OW - 1)));
    return OW'(t);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < 8; k++) y[k] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int k = 0; k < 8; k++) y[k] <= rnd_clip(acc[k]);
    end
  end
endmodule
