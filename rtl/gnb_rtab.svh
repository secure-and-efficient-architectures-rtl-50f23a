// Multiplication table of a type-T Gaussian normal basis of GF(2^M).
// Included inside a module body that declares the integer parameters M
// (field degree) and T (GNB type, even) and the localparam IW = $clog2(M).
//
// With p = M*T+1 prime and u an element of order T modulo p, every nonzero
// residue modulo p is 2^i * u^j for a unique i < M, j < T; write
// F(2^i u^j) = i.  Row i of the table holds R(i,j) = F(1 - 2^i u^j mod p)
// for j = 0..T-1, and coordinate 0 of a product A*B is
//     c0 = a0*b1 + sum_{i=1}^{M-1} a_i * (sum_{j<T} b_{R(i,j)})
// (for an even type the terms of row 0 reduce to a0*b1).  Coordinate l is
// the same formula applied to both operands rotated by l places.
//
// F(v) is found without tables: v^T = (2^T)^F(v) mod p, and 2^T has order M,
// so F(v) is the number of multiplications by 2^T that reach v^T from 1.
//
// gnb_find_u()   : smallest residue of multiplicative order exactly T
// gnb_row(i, u)  : row i, T entries packed IW bits wide, entry j at j*IW

function automatic int gnb_mulmod(input int a, input int b);
  return int'((longint'(a) * longint'(b)) % longint'(M * T + 1));
endfunction

function automatic int gnb_find_u();
  int xv, ord, u;
  u = 0;
  for (int cand = 2; cand < M * T + 1 && u == 0; cand++) begin
    xv  = 1;
    ord = 0;
    for (int e = 1; e <= T; e++) begin
      xv = gnb_mulmod(xv, cand);
      if (xv == 1 && ord == 0) ord = e;
    end
    if (ord == T) u = cand;
  end
  return u;
endfunction

function automatic logic [T*IW-1:0] gnb_row(input int i, input int u);
  logic [T*IW-1:0] r;
  int p, pw2, g, uj, v, vt, gi, k;
  p   = M * T + 1;
  pw2 = 1;
  for (int e = 0; e < i; e++) pw2 = (2 * pw2) % p;
  g = 1;
  for (int e = 0; e < T; e++) g = (2 * g) % p;
  uj = 1;
  r  = '0;
  for (int j = 0; j < T; j++) begin
    v  = (1 + p - gnb_mulmod(pw2, uj)) % p;
    vt = 1;
    for (int e = 0; e < T; e++) vt = gnb_mulmod(vt, v);
    gi = 1;
    k  = 0;
    while (gi != vt && k < M) begin
      gi = gnb_mulmod(gi, g);
      k++;
    end
    r[j*IW +: IW] = IW'(k);
    uj = gnb_mulmod(uj, u);
  end
  return r;
endfunction
