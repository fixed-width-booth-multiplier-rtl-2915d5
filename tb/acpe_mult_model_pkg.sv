// acpe_mult_model_pkg: reference model for the testbenches of the fixed-width
// ACPE Booth multiplier. It works on whole integers, not on the RTL's bit
// vectors: it recodes Y into Booth digits, forms each row value d*X, sums the
// truncation part column by column and applies
//   out = floor((X*Y + 2^(L-1)) / 2^L) - floor(TP / 2^L) + sigma,
// which holds because the whole array adds up to X*Y + 2^(L-1).
// sigma = floor((4*M + E) / 2^(W+2)) with M the major columns' bits in units
// of 2^(L-W) and E = 2 per nonzero digit i < Q-1 with 2i <= L-W-1, plus 1
// for a nonzero last digit when W = 1.
package acpe_mult_model_pkg;

  function automatic longint sext(input longint v, input int bits);
    longint m;
    m = longint'(1) << bits;
    v = v & (m - 1);
    return (v >= (m >> 1)) ? v - m : v;
  endfunction

  // rounded exact product: floor((x*y + 2^(L-1)) / 2^L)
  function automatic longint rounded_product(input longint x, input longint y, input int L);
    return (x * y + (longint'(1) << (L - 1))) >>> L;
  endfunction

  function automatic longint acpe_model(input longint x, input longint y, input int L, input int W);
    int     q;
    longint d, n, v, pp, tp, m, e, bitv, sigma, res, ubits;
    longint yy;
    longint ppa [32];
    longint na  [32];
    longint nza [32];
    longint e_last, lam;
    q  = L / 2;
    yy = y & ((longint'(1) << L) - 1);
    for (int i = 0; i < q; i++) begin
      longint b2, b1, b0;
      b2 = (yy >> (2 * i + 1)) & 1;
      b1 = (yy >> (2 * i)) & 1;
      b0 = (i == 0) ? 0 : ((yy >> (2 * i - 1)) & 1);
      d  = -2 * b2 + b1 + b0;
      n  = (d < 0) ? 1 : 0;
      v  = d * x - n;                  // row bits as a signed value
      ppa[i] = v & ((longint'(1) << (L + 1)) - 1);
      na[i]  = n;
      nza[i] = (d != 0) ? 1 : 0;
    end
    e_last = (ppa[q-1] & 1) ^ na[q-1];
    lam    = ((ppa[q-1] & 1) & na[q-1]) ? 0 : 1;
    // truncation part total and major-column sum
    tp = 0;
    m  = 0;
    for (int i = 0; i < q; i++)
      for (int j = 0; j < L; j++)
        if (j + 2 * i < L) begin
          bitv = (ppa[i] >> j) & 1;
          if (i == q - 1 && j == 0) bitv = e_last;
          tp += bitv << (j + 2 * i);
          if (j + 2 * i >= L - W) m += bitv << (j + 2 * i - (L - W));
        end
    for (int i = 0; i < q - 1; i++) begin
      tp += na[i] << (2 * i);
      if (2 * i >= L - W) m += na[i] << (2 * i - (L - W));
    end
    tp += lam << (L - 1);
    m  += lam << (W - 1);
    e = 0;
    for (int i = 0; i < q - 1; i++) if (nza[i] != 0 && 2 * i <= L - W - 1) e += 2;
    if (W == 1 && nza[q-1] != 0) e += 1;
    sigma = (4 * m + e) >> (W + 2);
    res   = rounded_product(x, y, L) - (tp >> L) + sigma;
    ubits = res;
    return sext(ubits, L);
  endfunction

endpackage
