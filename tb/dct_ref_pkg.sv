// dct_ref_pkg: reference models used by the testbenches.
//
// The HEVC coefficients are derived here independently of the RTL: entry
// (k, n) of the 32-point matrix is the HEVC integer magnitude nearest to
// 64*sqrt(2)*|cos(pi*k*(2n+1)/64)|, with the sign of the cosine (64 for
// k = 0). ref_2d() is the two-pass HEVC forward transform of one N x N
// block with rounding shifts log2N+B-9 and log2N+6 and 16-bit clipping.
// The 8-point DCT reference uses K(m) = round(128 cos(m pi / 16)) in a plain
// matrix product.
package dct_ref_pkg;

  localparam int HEVC_VALS [29] = '{90, 89, 88, 87, 85, 83, 82, 80, 78, 75, 73, 70, 67, 64,
                                    61, 57, 54, 50, 46, 43, 38, 36, 31, 25, 22, 18, 13, 9, 4};
  localparam real PI = 3.14159265358979323846;

  // loop bound kept in a variable so that simulators do not unroll the
  // reference loops
  int n8 = 8;

  function automatic int ref_coef32(int k, int n);
    real c, v, best_d;
    int best;
    if (k == 0) return 64;
    c = $cos(PI * real'(k * (2 * n + 1)) / 64.0);
    v = 64.0 * $sqrt(2.0) * ((c < 0.0) ? -c : c);
    best = 0;
    best_d = 1.0e9;
    foreach (HEVC_VALS[i]) begin
      real d;
      d = (v > real'(HEVC_VALS[i])) ? v - real'(HEVC_VALS[i]) : real'(HEVC_VALS[i]) - v;
      if (d < best_d) begin
        best_d = d;
        best = HEVC_VALS[i];
      end
    end
    return (c < 0.0) ? -best : best;
  endfunction

  // N-point matrix entry, N = 2^l2n
  function automatic int ref_coef(int l2n, int k, int n);
    return ref_coef32(k * (32 >> l2n), n);
  endfunction

  function automatic longint ref_round(longint v, int sh);
    if (sh == 0) return v;
    return (v + (longint'(1) << (sh - 1))) >>> sh;
  endfunction

  function automatic longint clip16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  // two-pass forward transform of an N x N block (row-major in x), B-bit video
  function automatic void ref_2d(int l2n, int b, const ref longint x [32][32],
                                 ref longint y [32][32]);
    int n;
    longint z [32][32];
    longint acc;
    n = 1 << l2n;
    for (int r = 0; r < n; r++)
      for (int k = 0; k < n; k++) begin
        acc = 0;
        for (int i = 0; i < n; i++) acc += longint'(ref_coef(l2n, k, i)) * x[r][i];
        z[r][k] = clip16(ref_round(acc, l2n + b - 9));
      end
    for (int u = 0; u < n; u++)
      for (int k = 0; k < n; k++) begin
        acc = 0;
        for (int r = 0; r < n; r++) acc += longint'(ref_coef(l2n, u, r)) * z[r][k];
        y[u][k] = clip16(ref_round(acc, l2n + 6));
      end
  endfunction

  // 8-point DCT coefficient magnitude round(128 cos(m pi / 16))
  function automatic int ref_k8(int m);
    return int'($floor(128.0 * $cos(PI * real'(m) / 16.0) + 0.5));
  endfunction

  // 8-point DCT with 8 fraction bits, rounded and clipped to 12 bits
  function automatic int ref_dct8(int k, const ref int x [8]);
    longint acc;
    acc = 0;
    for (int n = 0; n < n8; n++) begin
      int a, m, sg;
      if (k == 0) a = ref_k8(4);
      else begin
        m = (k * (2 * n + 1)) % 32;
        sg = 1;
        if (m > 8 && m < 24) sg = -1;
        if (m > 16) m = 32 - m;
        if (m > 8) m = 16 - m;
        a = sg * ref_k8(m);
      end
      acc += longint'(a) * x[n];
    end
    acc = (acc + 128) >>> 8;
    if (acc > 2047) acc = 2047;
    if (acc < -2048) acc = -2048;
    return int'(acc);
  endfunction

endpackage
