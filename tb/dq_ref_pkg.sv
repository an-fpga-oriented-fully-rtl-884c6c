// dq_ref_pkg: reference arithmetic for the testbenches.
//
// dq_product multiplies two dual quaternions directly, the schoolbook way,
// using the multiplication table of the units 1, i, j, k, e, ei, ej, ek
// (64 real multiplications, e*e = 0). It shares nothing with the RTL's
// factored algorithm and serves as the golden model. h4 is the order-4
// Sylvester Hadamard transform written as a matrix product.
package dq_ref_pkg;

  typedef longint dq8_t [8];
  typedef longint v4_t [4];

  // Unit product table: unit a times unit c = sign * unit idx.
  // Units are numbered 0:1 1:i 2:j 3:k; the dual units add 4.
  function automatic void quat_unit(input int a, input int c,
                                    output int sign, output int idx);
    // rows: a, columns: c
    int unsigned tidx [4][4] = '{'{0,1,2,3}, '{1,0,3,2}, '{2,3,0,1}, '{3,2,1,0}};
    int          tsgn [4][4] = '{'{1,1,1,1}, '{1,-1,1,-1}, '{1,-1,-1,1}, '{1,1,-1,-1}};
    sign = tsgn[a][c];
    idx  = tidx[a][c];
  endfunction

  function automatic dq8_t dq_product(input dq8_t x, input dq8_t b);
    dq8_t y;
    int   sg, ix;
    for (int n = 0; n < 8; n++) y[n] = 0;
    for (int p = 0; p < 8; p++)
      for (int q = 0; q < 8; q++) begin
        if (p >= 4 && q >= 4) continue;          // e * e = 0
        quat_unit(p % 4, q % 4, sg, ix);
        y[ix + ((p >= 4 || q >= 4) ? 4 : 0)] += sg * x[p] * b[q];
      end
    return y;
  endfunction

  function automatic v4_t h4(input v4_t a);
    v4_t y;
    for (int i = 0; i < 4; i++) begin
      y[i] = 0;
      for (int k = 0; k < 4; k++)
        y[i] += ($countones(i & k) % 2 == 1) ? -a[k] : a[k];
    end
    return y;
  endfunction

  // Uniform random signed value of w bits; every 8th draw is an extreme.
  function automatic longint rnd(input int w);
    longint lo, hi;
    int unsigned r;
    lo = -(longint'(1) << (w - 1));
    hi = (longint'(1) << (w - 1)) - 1;
    r  = $urandom_range(0, 15);
    if (r == 0) return lo;
    if (r == 1) return hi;
    return lo + longint'({$urandom, $urandom} % 64'(hi - lo + 1));
  endfunction

endpackage
