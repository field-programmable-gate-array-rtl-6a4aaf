// tb_ref_pkg: reference models for the testbenches, written independently of
// the RTL. The GHM transform matrix is built here in floating point straight
// from the multiwavelet filter definitions (H0..H3 low-pass, G0..G3
// high-pass, 2x2 each, periodic over 8 vector samples); the RTL uses rounded
// integer coefficients, so results are compared with a small tolerance.
package tb_ref_pkg;

  localparam int NF = 16;

  typedef real rvec_t [NF];

  function automatic real ghm(input bit hi, input int k, input int r, input int c);
    real s;
    real h [4][2][2];
    real g [4][2][2];
    s = $sqrt(2.0);
    h[0][0][0] = 3.0/(5.0*s); h[0][0][1] = 0.8;   h[0][1][0] = -0.05; h[0][1][1] = -3.0/(10.0*s);
    h[1][0][0] = 3.0/(5.0*s); h[1][0][1] = 0.0;   h[1][1][0] = 0.45;  h[1][1][1] = 1.0/s;
    h[2][0][0] = 0.0;         h[2][0][1] = 0.0;   h[2][1][0] = 0.45;  h[2][1][1] = -3.0/(10.0*s);
    h[3][0][0] = 0.0;         h[3][0][1] = 0.0;   h[3][1][0] = -0.05; h[3][1][1] = 0.0;
    g[0][0][0] = -0.05; g[0][0][1] = -3.0/(10.0*s); g[0][1][0] = 1.0/(10.0*s);  g[0][1][1] = 0.3;
    g[1][0][0] = 0.45;  g[1][0][1] = -1.0/s;        g[1][1][0] = -9.0/(10.0*s); g[1][1][1] = 0.0;
    g[2][0][0] = 0.45;  g[2][0][1] = -3.0/(10.0*s); g[2][1][0] = 9.0/(10.0*s);  g[2][1][1] = -0.3;
    g[3][0][0] = -0.05; g[3][0][1] = 0.0;           g[3][1][0] = -1.0/(10.0*s); g[3][1][1] = 0.0;
    return hi ? g[k][r][c] : h[k][r][c];
  endfunction

  // forward matrix W(row, col)
  function automatic real w(input int row, input int col);
    int blk, vrow, vcol, k;
    bit hi;
    hi   = row >= NF/2;
    blk  = (hi ? row - NF/2 : row) / 2;     // output vector index
    vcol = col / 2;
    k    = vcol - 2*blk;
    if (k < 0) k += NF/2;
    if (k > 3) return 0.0;
    vrow = row % 2;
    return ghm(hi, k, vrow, col % 2);
  endfunction

  // y = W x (inverse = 0) or y = W^T x (inverse = 1), in real numbers
  function automatic rvec_t apply(input bit inverse, input rvec_t x);
    rvec_t y;
    for (int i = 0; i < NF; i++) begin
      y[i] = 0.0;
      for (int j = 0; j < NF; j++) y[i] += (inverse ? w(j, i) : w(i, j)) * x[j];
    end
    return y;
  endfunction

endpackage
