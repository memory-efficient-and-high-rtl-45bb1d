// dwt_ref_pkg - reference models for the DWT testbenches.
//
// Two independent models of the transform:
//  * an integer model of the modified lifting with the same signed-digit
//    coefficients, written directly from the lifting equations on whole
//    arrays (no pipeline, no delay lines). A negative power of two is applied
//    as floor division, not as a shift. It must match the RTL bit for bit.
//  * a floating-point model of the textbook 9/7 lifting (alpha..delta, zeta),
//    used to check that the fixed-point result is the wavelet transform.
// Both use symmetric extension at the borders.
package dwt_ref_pkg;
  import dwt_pkg::*;

  localparam real ALPHA = -1.586134342;
  localparam real BETA  = -0.05298011854;
  localparam real GAMMA =  0.8829110762;
  localparam real DELTA =  0.4435068522;
  localparam real ZETA  =  1.149604398;

  typedef longint vec_t [];

  function automatic longint floor_div_pow2(longint x, int e);
    longint d, q;
    d = longint'(1) << e;
    q = x / d;
    if ((x % d) != 0 && x < 0) q = q - 1;
    return q;
  endfunction

  // x times a signed-digit coefficient, each digit truncated toward -inf.
  function automatic longint ref_mult(longint x, coef_t c);
    longint acc = 0, t;
    for (int k = 0; k < 4; k++) begin
      if (c[k].en) begin
        if (c[k].exp >= 0) t = x * (longint'(1) << c[k].exp);
        else               t = floor_div_pow2(x, -int'(c[k].exp));
        acc = c[k].neg ? acc - t : acc + t;
      end
    end
    return acc;
  endfunction

  function automatic real coef_value(coef_t c);
    real v = 0.0, p;
    int  e;
    for (int k = 0; k < 4; k++) begin
      if (c[k].en) begin
        e = int'(c[k].exp);
        p = 1.0;
        for (int q = 0; q < e; q++) p = p * 2.0;
        for (int q = 0; q < -e; q++) p = p / 2.0;
        v = c[k].neg ? v - p : v + p;
      end
    end
    return v;
  endfunction

  // One modified 1-D lifting pass on an even-length signal.
  function automatic void lift1d(input longint x[], output longint h1[], output longint l1[],
                                 output longint h2[], output longint l2[]);
    int m = x.size() / 2;
    h1 = new[m]; l1 = new[m]; h2 = new[m]; l2 = new[m];
    for (int j = 0; j < m; j++)
      h1[j] = ref_mult(x[2*j+1], COEF_A) + x[2*j] + ((j == m-1) ? x[2*j] : x[2*j+2]);
    for (int j = 0; j < m; j++)
      l1[j] = ref_mult(x[2*j], COEF_B) + h1[j] + ((j == 0) ? h1[0] : h1[j-1]);
    for (int j = 0; j < m; j++)
      h2[j] = ref_mult(h1[j], COEF_C) + l1[j] + ((j == m-1) ? l1[j] : l1[j+1]);
    for (int j = 0; j < m; j++)
      l2[j] = ref_mult(l1[j], COEF_D) + h2[j] + ((j == 0) ? h2[0] : h2[j-1]);
  endfunction

  // Textbook 9/7 lifting in floating point: lo = zeta*s2, hi = d2/zeta.
  function automatic void lift1d_real(input real x[], output real lo[], output real hi[]);
    int m = x.size() / 2;
    real d1[], s1[], d2[], s2[];
    d1 = new[m]; s1 = new[m]; d2 = new[m]; s2 = new[m]; lo = new[m]; hi = new[m];
    for (int j = 0; j < m; j++)
      d1[j] = x[2*j+1] + ALPHA * (x[2*j] + ((j == m-1) ? x[2*j] : x[2*j+2]));
    for (int j = 0; j < m; j++)
      s1[j] = x[2*j] + BETA * (d1[j] + ((j == 0) ? d1[0] : d1[j-1]));
    for (int j = 0; j < m; j++)
      d2[j] = d1[j] + GAMMA * (s1[j] + ((j == m-1) ? s1[j] : s1[j+1]));
    for (int j = 0; j < m; j++)
      s2[j] = s1[j] + DELTA * (d2[j] + ((j == 0) ? d2[0] : d2[j-1]));
    for (int j = 0; j < m; j++) begin
      lo[j] = ZETA * s2[j];
      hi[j] = d2[j] / ZETA;
    end
  endfunction

  // Coefficient at band b, row i, column j of an n/2 x n/2 subband array.
  function automatic int bidx(int n, band_t b, int i, int j);
    return (int'(b) * (n / 2) + i) * (n / 2) + j;
  endfunction

  // One level of the integer 2-D model. img is n*n raster order; out holds
  // the four scaled subbands (index bidx), un the unscaled ones.
  function automatic void dwt2d_level(input longint img[], input int n,
                                      output longint out[], output longint un[]);
    longint row[], h1[], l1[], h2[], l2[], col[];
    longint hb[], lb[];   // horizontal high / low bands, (n) x (n/2)
    hb = new[n * n / 2]; lb = new[n * n / 2];
    out = new[n * n]; un = new[n * n];
    row = new[n]; col = new[n];
    for (int r = 0; r < n; r++) begin
      for (int c = 0; c < n; c++) row[c] = img[r*n + c];
      lift1d(row, h1, l1, h2, l2);
      for (int j = 0; j < n/2; j++) begin
        hb[r*(n/2) + j] = h2[j];
        lb[r*(n/2) + j] = l2[j];
      end
    end
    for (int j = 0; j < n/2; j++) begin
      for (int r = 0; r < n; r++) col[r] = hb[r*(n/2) + j];
      lift1d(col, h1, l1, h2, l2);
      for (int i = 0; i < n/2; i++) begin
        un[bidx(n, BAND_HH, i, j)] = h2[i];
        un[bidx(n, BAND_HL, i, j)] = l2[i];
      end
      for (int r = 0; r < n; r++) col[r] = lb[r*(n/2) + j];
      lift1d(col, h1, l1, h2, l2);
      for (int i = 0; i < n/2; i++) begin
        un[bidx(n, BAND_LH, i, j)] = h2[i];
        un[bidx(n, BAND_LL, i, j)] = l2[i];
      end
    end
    for (int i = 0; i < n/2; i++)
      for (int j = 0; j < n/2; j++) begin
        out[bidx(n, BAND_LL, i, j)] = ref_mult(un[bidx(n, BAND_LL, i, j)], COEF_T);
        out[bidx(n, BAND_HL, i, j)] = ref_mult(un[bidx(n, BAND_HL, i, j)], COEF_U);
        out[bidx(n, BAND_LH, i, j)] = ref_mult(un[bidx(n, BAND_LH, i, j)], COEF_U);
        out[bidx(n, BAND_HH, i, j)] = ref_mult(un[bidx(n, BAND_HH, i, j)], COEF_R);
      end
  endfunction

  // One level of the floating-point 2-D transform, same layout as above.
  function automatic void dwt2d_level_real(input real img[], input int n, output real out[]);
    real row[], col[], lo[], hi[], hb[], lb[];
    hb = new[n * n / 2]; lb = new[n * n / 2]; out = new[n * n];
    row = new[n]; col = new[n];
    for (int r = 0; r < n; r++) begin
      for (int c = 0; c < n; c++) row[c] = img[r*n + c];
      lift1d_real(row, lo, hi);
      for (int j = 0; j < n/2; j++) begin
        hb[r*(n/2) + j] = hi[j];
        lb[r*(n/2) + j] = lo[j];
      end
    end
    for (int j = 0; j < n/2; j++) begin
      for (int r = 0; r < n; r++) col[r] = hb[r*(n/2) + j];
      lift1d_real(col, lo, hi);
      for (int i = 0; i < n/2; i++) begin
        out[bidx(n, BAND_HH, i, j)] = hi[i];
        out[bidx(n, BAND_HL, i, j)] = lo[i];
      end
      for (int r = 0; r < n; r++) col[r] = lb[r*(n/2) + j];
      lift1d_real(col, lo, hi);
      for (int i = 0; i < n/2; i++) begin
        out[bidx(n, BAND_LH, i, j)] = hi[i];
        out[bidx(n, BAND_LL, i, j)] = lo[i];
      end
    end
  endfunction

  // Extract the LL band of a level result as the next level's image.
  function automatic void ll_band(input longint res[], input int n, output longint img[]);
    img = new[(n/2) * (n/2)];
    for (int i = 0; i < n/2; i++)
      for (int j = 0; j < n/2; j++) img[i*(n/2) + j] = res[bidx(n, BAND_LL, i, j)];
  endfunction

  function automatic void ll_band_real(input real res[], input int n, output real img[]);
    img = new[(n/2) * (n/2)];
    for (int i = 0; i < n/2; i++)
      for (int j = 0; j < n/2; j++) img[i*(n/2) + j] = res[bidx(n, BAND_LL, i, j)];
  endfunction

  // DW-bit wrap of a reference value, as the datapath holds it.
  function automatic word_t to_word(longint v);
    return word_t'(v);
  endfunction
endpackage
