// dct_ref_pkg: floating-point reference for the 2-D DCT testbenches.
// dct_a(k,n) = 0.5*c(k)*cos((2n+1)*k*pi/16), c(0) = 1/sqrt(2); the 2-D
// transform of an 8x8 block x is Z(u,v) = sum_r sum_c a(u,r) a(v,c) x(r,c),
// and its inverse is x(r,c) = sum_u sum_v a(u,r) a(v,c) Z(u,v).
package dct_ref_pkg;
  localparam real PI = 3.14159265358979323846;

  function automatic real dct_a(input int k, input int n);
    real ck;
    ck = (k == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    return 0.5 * ck * $cos((2.0 * n + 1.0) * k * PI / 16.0);
  endfunction

  function automatic real dct2(input real x [8][8], input int u, input int v);
    real acc;
    acc = 0.0;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) acc += dct_a(u, r) * dct_a(v, c) * x[r][c];
    return acc;
  endfunction

  function automatic real idct2(input real z [8][8], input int r, input int c);
    real acc;
    acc = 0.0;
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++) acc += dct_a(u, r) * dct_a(v, c) * z[u][v];
    return acc;
  endfunction
endpackage
