// idct_ref_pkg: reference model for the 8x8 IDCT testbenches.
//
// ck(n, u) is the kernel element C[n][u] = 0.5 * c_u * cos((2n+1) u pi / 16)
// in double precision. model() fills in, for an input block x[u][v], the
// expected result Z = C X C^T rounded to the nearest integer and clipped to
// [-256, 255], the number k1 of non-zero inputs, the number k2 of non-zero
// first-pass words (computed with the 14-bit kernel and the 4 fraction bits
// the datapath keeps between passes, rounded half up), and counts of empty
// input columns, empty first-pass rows and saturating pixels.
package idct_ref_pkg;
  localparam int N = 8;
  localparam real PI = 3.14159265358979323846;

  function automatic real ck(int n, int uu);
    real cu = (uu == 0) ? 1.0/$sqrt(2.0) : 1.0;
    return 0.5 * cu * $cos((2.0*n + 1.0) * uu * PI / 16.0);
  endfunction

  typedef struct {
    int  x [N][N];      // x[u][v]
    int  z [N][N];      // expected pixel z[r][c]
    int  k1, k2, sat, empty_cols, empty_rows;
  } blk_t;

  // reference model
  function automatic void model(ref blk_t b);
    real y [N][N], z;
    longint kq [N][N];
    b.k1 = 0; b.k2 = 0; b.sat = 0; b.empty_cols = 0; b.empty_rows = 0;
    for (int n = 0; n < N; n++) for (int u = 0; u < N; u++) begin
      real kv = ck(n, u) * 16384.0;
      kq[n][u] = longint'($rtoi(kv + (kv >= 0 ? 0.5 : -0.5)));
    end
    for (int u = 0; u < N; u++) for (int v = 0; v < N; v++) if (b.x[u][v] != 0) b.k1++;
    for (int v = 0; v < N; v++) begin
      bit any = 0;
      for (int u = 0; u < N; u++) if (b.x[u][v] != 0) any = 1;
      if (!any) b.empty_cols++;
    end
    // first pass, as the fixed-point datapath is specified: 4 + 14 fraction
    // bits, rounded half up to 4 fraction bits
    for (int n = 0; n < N; n++) begin
      bit any = 0;
      for (int v = 0; v < N; v++) begin
        longint s = 0;
        for (int u = 0; u < N; u++) s += longint'(b.x[u][v]) * 16 * kq[n][u];
        s = (s + 8192) >>> 14;
        if (s != 0) begin b.k2++; any = 1; end
      end
      if (!any) b.empty_rows++;
    end
    // exact double-precision reference
    for (int n = 0; n < N; n++) for (int v = 0; v < N; v++) begin
      y[n][v] = 0.0;
      for (int u = 0; u < N; u++) y[n][v] += ck(n, u) * b.x[u][v];
    end
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      z = 0.0;
      for (int v = 0; v < N; v++) z += y[r][v] * ck(c, v);
      if (z > 255.5 || z < -256.5) b.sat++;
      z = $floor(z + 0.5);
      if (z > 255.0) z = 255.0;
      if (z < -256.0) z = -256.0;
      b.z[r][c] = $rtoi(z);
    end
  endfunction

endpackage
