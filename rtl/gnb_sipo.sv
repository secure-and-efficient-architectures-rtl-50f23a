// Digit-level serial-in parallel-out (LSD-in) multiplier core over GF(2^M)
// in a type-T Gaussian normal basis.
//
// It takes one digit of D coordinates c_{nD+t} of the first product C = X*Y
// (least significant digit first) and folds C*F into the accumulator Z with
// a Horner step in the squaring direction:
//     z_next = ( Z + sum_t c_{nD+t} * (beta^(2^t) * F') ) ^ (2^-w)
// where F' = F^(2^(-nD)) is the rotating F register and w = D, or
// w = M - (Q-1)*D on the last digit so that after Q digits Z holds exactly
// C*F.  Each beta^(2^t)*F' is a fixed linear map of F' given by the same
// multiplication table as the PISO core.  clear treats Z as zero (first
// digit of a new product), last selects the final rotation.
//
// Purely combinational; the hybrid-double multiplier registers z_next into Z
// and rotates F by D per digit.  The LSD-in digit-serial order and the
// rotating F and Z registers follow the architecture; the exact Horner form
// and the shorter final rotation are this implementation's choice.
module gnb_sipo #(
  parameter int M = 571,
  parameter int T = 10,
  parameter int D = 13
) (
  input  logic [M-1:0] z,
  input  logic [M-1:0] f,
  input  logic [D-1:0] digit,
  input  logic         clear,
  input  logic         last,
  output logic [M-1:0] z_next
);
  localparam int IW    = $clog2(M);
  localparam int Q     = (M + D - 1) / D;
  localparam int RLAST = M - (Q - 1) * D;

  `include "gnb_rot.svh"
  `include "gnb_rtab.svh"

  localparam int U = gnb_find_u();

  function automatic logic row_sum(input logic [M-1:0] b, input logic [T*IW-1:0] row,
                                   input int off);
    logic s;
    s = 1'b0;
    for (int j = 0; j < T; j++) s ^= b[(int'(row[j*IW +: IW]) + off) % M];
    return s;
  endfunction

  // sterm[r][t]: term of digit bit t that lands on coordinate (t - r) mod M.
  // Coordinate b of beta^(2^t) * F' is the product formula with a first
  // operand whose only one sits at position r = (t - b) mod M.
  logic [M-1:0][D-1:0] sterm;
  logic [M-1:0]        s, acc;

  for (genvar t = 0; t < D; t++) begin : g_row0
    assign sterm[0][t] = digit[t] & f[(t + 1) % M];
  end

  for (genvar r = 1; r < M; r++) begin : g_row
    localparam logic [T*IW-1:0] ROW = gnb_row(r, U);
    for (genvar t = 0; t < D; t++) begin : g_dig
      assign sterm[r][t] = digit[t] & row_sum(f, ROW, (t - r + M) % M);
    end
  end

  for (genvar b = 0; b < M; b++) begin : g_coord
    always_comb begin
      s[b] = 1'b0;
      for (int t = 0; t < D; t++) s[b] ^= sterm[(t - b + M) % M][t];
    end
  end

  always_comb begin
    acc    = (clear ? '0 : z) ^ s;
    z_next = last ? gnb_sqrt(acc, RLAST) : gnb_sqrt(acc, D);
  end

endmodule
