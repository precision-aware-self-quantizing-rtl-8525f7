// dwt_ref_pkg: reference model for the testbenches.
// Multilevel 2-D 9/7 DWT in real arithmetic using the plain lifting steps
// (alpha, beta, gamma, delta, then zeta on the low-pass and 1/zeta on the
// high-pass band), whole-sample symmetric extension at both line ends, and
// dead-zone quantization toward zero of the final subbands with a step that
// halves per level. Shares no code with the RTL.
package dwt_ref_pkg;

  localparam real ALPHA = -1.586134342;
  localparam real BETA  = -0.05298011854;
  localparam real GAMMA = 0.8829110762;
  localparam real DELTA = 0.4435068522;
  localparam real ZETA  = 1.149604398;

  typedef real rvec_t[];

  // One line: x[0..n-1] -> low half then high half.
  function automatic rvec_t dwt1d(rvec_t x);
    int n = x.size();
    int h = n / 2;
    real xe [];
    real s0 [], d0 [], d1 [], s1 [], d2 [], s2 [];
    rvec_t y;
    // index offset: sample i is stored at i+4, pair index m at m+2
    xe = new[n + 8];
    for (int i = -4; i < n + 4; i++) begin
      int k = (i < 0) ? -i : (i > n - 1) ? 2 * (n - 1) - i : i;
      xe[i + 4] = x[k];
    end
    s0 = new[h + 4]; d0 = new[h + 4]; d1 = new[h + 4];
    s1 = new[h + 4]; d2 = new[h + 4]; s2 = new[h + 4];
    for (int m = -2; m <= h + 1; m++) begin
      s0[m + 2] = xe[2 * m + 4];
      d0[m + 2] = xe[2 * m + 5];
    end
    for (int m = -2; m <= h; m++)
      d1[m + 2] = d0[m + 2] + ALPHA * (s0[m + 2] + s0[m + 3]);
    for (int m = -1; m <= h; m++)
      s1[m + 2] = s0[m + 2] + BETA * (d1[m + 2] + d1[m + 1]);
    for (int m = -1; m <= h - 1; m++)
      d2[m + 2] = d1[m + 2] + GAMMA * (s1[m + 2] + s1[m + 3]);
    for (int m = 0; m <= h - 1; m++)
      s2[m + 2] = s1[m + 2] + DELTA * (d2[m + 2] + d2[m + 1]);
    y = new[n];
    for (int k = 0; k < h; k++) begin
      y[k]     = ZETA * s2[k + 2];
      y[h + k] = d2[k + 2] / ZETA;
    end
    return y;
  endfunction

  // Dead-zone quantization index of y for a step of 2^sh LSBs of 2^-fb.
  function automatic longint dz_index(real y, int sh, int fb);
    real step = (2.0 ** sh) / (2.0 ** fb);
    real a = (y < 0) ? -y : y;
    longint q = longint'($floor(a / step));
    return (y < 0) ? -q : q;
  endfunction

  // img is rows*cols, row-major, transformed in place over `levels` levels.
  // final_q marks the entries that hold final coefficients.
  function automatic void dwt2d(ref real img [], input int rows, input int cols,
                                input int levels);
    int r_l = rows, c_l = cols;
    for (int l = 1; l <= levels; l++) begin
      rvec_t line, res;
      line = new[c_l];
      for (int r = 0; r < r_l; r++) begin
        for (int c = 0; c < c_l; c++) line[c] = img[r * cols + c];
        res = dwt1d(line);
        for (int c = 0; c < c_l; c++) img[r * cols + c] = res[c];
      end
      line = new[r_l];
      for (int c = 0; c < c_l; c++) begin
        for (int r = 0; r < r_l; r++) line[r] = img[r * cols + c];
        res = dwt1d(line);
        for (int r = 0; r < r_l; r++) img[r * cols + c] = res[r];
      end
      r_l /= 2; c_l /= 2;
    end
  endfunction

  // Level of the subband that holds (r, c) after `levels` levels.
  function automatic int level_of(int r, int c, int rows, int cols, int levels);
    int r_l = rows, c_l = cols;
    for (int l = 1; l <= levels; l++) begin
      if (r >= r_l / 2 || c >= c_l / 2) return l;
      r_l /= 2; c_l /= 2;
    end
    return levels;  // LL of the last level
  endfunction

endpackage
