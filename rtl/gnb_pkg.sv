// Shared types for the GNB single-exponentiation datapath.
//
// Field elements are m-bit vectors in a Gaussian normal basis: bit i is the
// coefficient of beta^(2^i).  Squaring is therefore a one-place cyclic
// rotation (bit i of A^2 is bit i-1 of A), and the multiplicative identity is
// the all-ones vector.
//
// opsel_e is the encoding of the three 4-to-1 operand multiplexers: the two
// select bits are {q_i, k_i}, one exponent bit from each half of P, and they
// pick 1, A, B or A*B in that order (mux inputs 0..3 of the architecture).
package gnb_pkg;

  typedef enum logic [1:0] {
    SEL_ONE = 2'd0,   // q_i = 0, k_i = 0
    SEL_A   = 2'd1,   // q_i = 0, k_i = 1
    SEL_B   = 2'd2,   // q_i = 1, k_i = 0
    SEL_AB  = 2'd3    // q_i = 1, k_i = 1
  } opsel_e;

  // Controller states of the exponentiator.
  typedef enum logic [2:0] {
    ST_IDLE,    // waiting for start
    ST_LOAD,    // A, B latched; start A*B*1 on the multiplier
    ST_PRE,     // multiplier computes A*B
    ST_FIRST,   // start iteration 1 with C0 selected by (q0, k0)
    ST_ITER     // iterations 1 .. N, back to back
  } exp_state_e;

endpackage
