// dct_pkg: types, sizes and coefficient functions shared by the HEVC integer
// DCT datapath.
//
// The 32-point HEVC forward transform matrix is not stored as a table. Entry
// (k, n) is the integer approximation of 64*sqrt(2)*cos(pi*k*(2n+1)/64): the
// angle index a = k*(2n+1) mod 128 is folded into the first quadrant (index m
// in 1..31, with a sign), and m is mapped to the 31 distinct HEVC magnitudes
// (90, 90, 90, 89, 88, ... 4). Row 0 is 64 everywhere. The N-point matrix
// (N = 16, 8, 4, 2) is rows k*32/N of the 32-point matrix, restricted to its
// first N columns, as in the HEVC standard.
//
// Each magnitude has at most five set bits, so a product c*x is the sum of at
// most five left-shifted copies of |x|: cell_sels() lists those shifts as the
// five 3-bit cell selects (0 = zero term, s = shift by s-1).
package dct_pkg;

  localparam int unsigned NLVL     = 5;    // adder-tree levels, log2(32)
  localparam int unsigned NCELL    = 5;    // cells per multiplier block
  localparam int unsigned COEF_W   = 7;    // magnitude bits of a coefficient
  localparam int unsigned DW       = 16;   // word between the two passes
  localparam int unsigned CORE_IW  = 16;   // input word of the 1D core
  localparam int unsigned PROD_W   = CORE_IW + COEF_W;  // 23
  localparam int unsigned SUM_W    = PROD_W + NLVL;     // 28

  // Transform size select, the document's "se": 0..4 = 32, 16, 8, 4, 2 points.
  typedef logic [2:0] se_t;

  typedef logic signed [SUM_W-1:0] sum_t;
  typedef logic signed [DW-1:0]    word_t;

  // log2 of the transform size selected by se
  function automatic int unsigned se_log2n(input se_t se);
    return (se > 3'd4) ? 1 : 5 - int'(se);
  endfunction

  // Magnitude of cos(m*pi/64) in HEVC integer form, m in 1..31.
  function automatic int unsigned hevc_mag(input int unsigned m);
    case (m)
      1, 2, 3: return 90;
      4:  return 89;   5:  return 88;   6:  return 87;   7:  return 85;
      8:  return 83;   9:  return 82;   10: return 80;   11: return 78;
      12: return 75;   13: return 73;   14: return 70;   15: return 67;
      16: return 64;   17: return 61;   18: return 57;   19: return 54;
      20: return 50;   21: return 46;   22: return 43;   23: return 38;
      24: return 36;   25: return 31;   26: return 25;   27: return 22;
      28: return 18;   29: return 13;   30: return 9;    31: return 4;
      default: return 0;
    endcase
  endfunction

  // Signed entry (k, n) of the 32-point HEVC DCT matrix, k, n in 0..31.
  function automatic int hevc_coef32(input int unsigned k, input int unsigned n);
    int unsigned a;
    if (k == 0) return 64;
    a = (k * (2 * n + 1)) % 128;
    if (a <= 32)      return  int'(hevc_mag(a));
    else if (a <= 64) return -int'(hevc_mag(64 - a));
    else if (a <= 96) return -int'(hevc_mag(a - 64));
    else              return  int'(hevc_mag(128 - a));
  endfunction

  // Signed entry (k, n) of the N-point HEVC matrix, N = 2^log2n.
  function automatic int hevc_coef(input int unsigned log2n, input int unsigned k,
                                   input int unsigned n);
    return hevc_coef32(k << (5 - log2n), n);
  endfunction

  // Cell selects for a coefficient magnitude: one select per set bit, lowest
  // bit first, unused cells get 0 (zero term).
  function automatic logic [NCELL*3-1:0] cell_sels(input int unsigned mag);
    logic [NCELL*3-1:0] s;
    int unsigned c;
    s = '0;
    c = 0;
    for (int unsigned b = 0; b < COEF_W; b++) begin
      if (mag[b] && c < NCELL) begin
        s[c*3 +: 3] = 3'(b + 1);
        c++;
      end
    end
    return s;
  endfunction

  // Round half up and arithmetic shift right by sh, then clip to DW bits.
  function automatic word_t round_clip(input sum_t v, input int unsigned sh);
    logic signed [SUM_W:0] t;
    t = (SUM_W+1)'(v);
    if (sh != 0) t = (t + ((SUM_W+1)'(1) << (sh - 1))) >>> sh;
    if (t > (SUM_W+1)'(32767))       return word_t'(16'sh7fff);
    else if (t < -(SUM_W+1)'(32768)) return word_t'(16'sh8000);
    else                               return word_t'(t);
  endfunction

endpackage
