// Cyclic rotations of GF(2^M) elements in normal basis.  Included inside a
// module body that declares the integer parameter M (field degree).
//
// gnb_sqr(v, s)  : v^(2^s),  bit i <- bit (i-s) mod M  (s successive squarings)
// gnb_sqrt(v, s) : v^(2^-s), bit i <- bit (i+s) mod M  (s successive square roots)

function automatic logic [M-1:0] gnb_sqr(input logic [M-1:0] v, input int s);
  logic [2*M-1:0] w;
  w = {v, v} << (s % M);
  return w[2*M-1:M];
endfunction

function automatic logic [M-1:0] gnb_sqrt(input logic [M-1:0] v, input int s);
  logic [2*M-1:0] w;
  w = {v, v} >> (s % M);
  return w[M-1:0];
endfunction

