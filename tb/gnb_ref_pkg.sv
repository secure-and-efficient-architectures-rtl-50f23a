// Reference model for the testbenches: arithmetic in GF(2^m) over a type-T
// Gaussian normal basis, written independently of the RTL.  Multiplication
// uses the direct Gauss-period formula
//     c_l = sum_{k=1}^{p-2} a_{F(k+1)+l} * b_{F(p-k)+l}      (indices mod m)
// with p = m*T+1 and F the map 2^i u^j -> i, rather than the reduced
// (m-1) x T table and digit-serial structure of the hardware.  Elements are
// held in MAXM-bit vectors, bit i = coefficient of beta^(2^i).
package gnb_ref_pkg;

  localparam int MAXM = 1024;
  typedef logic [MAXM-1:0] elem_t;

  class gnb_ref;
    int m, t, p;
    int pa[], pb[];

    function new(int m_, int t_);
      int fmap[];
      int u, w, n, x, ord;
      m = m_;
      t = t_;
      p = m * t + 1;
      fmap = new[p];
      u = 0;
      for (int c = 2; c < p && u == 0; c++) begin
        x = 1;
        ord = 0;
        for (int e = 1; e <= t; e++) begin
          x = (x * c) % p;
          if (x == 1 && ord == 0) ord = e;
        end
        if (ord == t) u = c;
      end
      w = 1;
      for (int j = 0; j < t; j++) begin
        n = w;
        for (int i = 0; i < m; i++) begin
          fmap[n] = i;
          n = (2 * n) % p;
        end
        w = (w * u) % p;
      end
      pa = new[p - 2];
      pb = new[p - 2];
      for (int k = 1; k <= p - 2; k++) begin
        pa[k-1] = fmap[k+1];
        pb[k-1] = fmap[p-k];
      end
    endfunction

    function elem_t one();
      elem_t r = '0;
      for (int i = 0; i < m; i++) r[i] = 1'b1;
      return r;
    endfunction

    // a^(2^s), s of either sign
    function elem_t sqr(elem_t a, int s);
      elem_t r = '0;
      for (int i = 0; i < m; i++) r[i] = a[(((i - s) % m) + m) % m];
      return r;
    endfunction

    function elem_t mul(elem_t a, elem_t b);
      elem_t c = '0;
      int ia, ib;
      logic acc;
      for (int l = 0; l < m; l++) begin
        acc = 1'b0;
        for (int k = 0; k < p - 2; k++) begin
          ia = pa[k] + l;
          if (ia >= m) ia -= m;
          ib = pb[k] + l;
          if (ib >= m) ib -= m;
          acc ^= a[ia] & b[ib];
        end
        c[l] = acc;
      end
      return c;
    endfunction

    // a^e by right-to-left square and multiply, e taken as an m-bit integer
    function elem_t pow(elem_t a, elem_t e);
      elem_t r = one();
      elem_t s = a;
      for (int i = 0; i < m; i++) begin
        if (e[i]) r = mul(r, s);
        s = sqr(s, 1);
      end
      return r;
    endfunction

    function elem_t rand_elem();
      elem_t r = '0;
      for (int i = 0; i < m; i++) r[i] = 1'($urandom);
      return r;
    endfunction
  endclass

endpackage
