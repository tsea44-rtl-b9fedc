// dct_ref: reference model for the accelerator testbenches, in real
// arithmetic and independent of the RTL. For an 8x8 block of pixels p it
// computes R[r][v] = floor(sqrt(2)c(v) sum_n (p[r][n]-128) cos((2n+1)v pi/16))
// on the rows, the same transform on the columns of R to give B[u][v]
// (8 times the 2-D DCT), and Y[u][v] = B/(4*Q[u][v]) rounded to nearest with
// halves away from zero, Q being the JPEG luminance table.
package dct_ref;
  import jpeg_pkg::*;

  typedef int blk_t [8][8];

  function automatic int dct_pt(int k, int v [8]);
    real s = 0.0;
    for (int n = 0; n < 8; n++)
      s += real'(v[n]) * $cos(real'((2*n+1)*k) * 3.14159265358979 / 16.0);
    s = s * ((k == 0) ? 1.0 : $sqrt(2.0));
    return int'($floor(s + 1e-9));
  endfunction

  function automatic blk_t coeffs(blk_t pix);
    blk_t r, b;
    int v [8];
    for (int row = 0; row < 8; row++) begin
      for (int n = 0; n < 8; n++) v[n] = pix[row][n] - 128;
      for (int k = 0; k < 8; k++) r[row][k] = dct_pt(k, v);
    end
    for (int col = 0; col < 8; col++) begin
      for (int n = 0; n < 8; n++) v[n] = r[n][col];
      for (int k = 0; k < 8; k++) b[k][col] = dct_pt(k, v);
    end
    return b;
  endfunction

  function automatic blk_t quant(blk_t b);
    blk_t y;
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++) begin
        real q = real'(b[u][v]) / real'(4 * QTAB[u*8+v]);
        y[u][v] = (q < 0.0) ? -int'($floor(-q + 0.5)) : int'($floor(q + 0.5));
      end
    return y;
  endfunction
endpackage
