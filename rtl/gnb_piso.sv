// Digit-level parallel-in serial-out (LSD-out) multiplier core over GF(2^M)
// in a type-T Gaussian normal basis.
//
// Given the two operand registers x and y of the hybrid-double multiplier,
// already rotated so that they hold X^(2^(-n*D)) and Y^(2^(-n*D)) in clock n,
// it produces the D product coordinates c_{nD}, ..., c_{nD+D-1} of X*Y.
// Coordinate t of the digit is the normal-basis formula for coordinate 0,
//     c0(a, b) = a0*b1 + sum_{i=1}^{M-1} a_i * sum_{j<T} b_{R(i,j)},
// applied to the operands rotated by a further t places, so the block is D
// copies of that AND/XOR network on fixed rewirings of x and y.  mask clears
// the coordinates past M-1 in the last, shorter digit.
//
// Purely combinational; the caller registers the digit (the d-bit "Reg." of
// the multiplier) and rotates x and y by D after every digit.
// The digit-serial LSD-first order and the coordinate formula follow the
// architecture; the table R is generated at elaboration (gnb_rtab.svh) from
// M and T.  The default T = 10 is the type-10 Gaussian normal basis of
// GF(2^571); T must be even.
module gnb_piso #(
  parameter int M = 571,
  parameter int T = 10,
  parameter int D = 13
) (
  input  logic [M-1:0] x,
  input  logic [M-1:0] y,
  input  logic [D-1:0] mask,
  output logic [D-1:0] c
);
  localparam int IW = $clog2(M);

  `include "gnb_rtab.svh"

  localparam int U = gnb_find_u();

  // sum over the T table entries of row (rotated by t) of operand b
  function automatic logic row_sum(input logic [M-1:0] b, input logic [T*IW-1:0] row,
                                   input int t);
    logic s;
    s = 1'b0;
    for (int j = 0; j < T; j++) s ^= b[(int'(row[j*IW +: IW]) + t) % M];
    return s;
  endfunction

  // term[i][t]: contribution of row i to digit coordinate t
  logic [M-1:0][D-1:0] term;

  for (genvar t = 0; t < D; t++) begin : g_row0
    assign term[0][t] = x[t % M] & y[(t + 1) % M];
  end

  for (genvar i = 1; i < M; i++) begin : g_row
    localparam logic [T*IW-1:0] ROW = gnb_row(i, U);
    for (genvar t = 0; t < D; t++) begin : g_dig
      assign term[i][t] = x[(i + t) % M] & row_sum(y, ROW, t);
    end
  end

  always_comb begin
    c = '0;
    for (int i = 0; i < M; i++) c ^= term[i];
    c &= mask;
  end

endmodule
