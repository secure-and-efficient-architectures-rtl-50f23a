// Operand selection of the single-exponentiation architecture: the three
// 4-to-1 multiplexers, the B = A^(2^H) rewiring (H = ceil(M/2)) and the
// successive squarers.
//
// Three M-bit registers hold A, B and A*B.  Instead of variable-distance
// squarers in front of the multiplier, the registers are rotated by two
// places (squared twice) every iteration, so in iteration j (j >= 1) they
// hold A^(2^(2j-2)), B^(2^(2j-2)) and (AB)^(2^(2j-2)).  The operand for
// exponent bit i = 2j-1 is then the selected register squared once, and for
// bit i+1 squared twice: both squarers are fixed rewirings.
//   c0    = mux(sel0)       initial value C0 (mux on {q0,k0}), iteration 1
//   y_op  = mux(sel1)^2     R_i     for bits (k_i, q_i)
//   f_op  = mux(sel2)^4     R_{i+1} for bits (k_{i+1}, q_{i+1})
// Each select is {q, k}: 0 -> 1 = (11...1), 1 -> A, 2 -> B, 3 -> A*B.
//
// Timing: load latches A (and B by rewiring) at the clock edge; ab_load
// latches A*B (and wins over
// advance for that register); advance squares the registers twice.  a_op and b_op
// expose A and B for the precomputation of A*B.
//
// The multiplexer inputs and encodings follow the architecture; rotating the
// registers to turn the successive squarers into fixed rewirings is the
// option the architecture mentions, taken here.  Holding A*B in a register
// of its own is this implementation's choice.
module gnb_operand_sel
  import gnb_pkg::*;
#(
  parameter int M = 571
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [M-1:0] a_in,
  input  logic         ab_load,
  input  logic [M-1:0] ab_in,
  input  logic         advance,
  input  opsel_e       sel0,
  input  opsel_e       sel1,
  input  opsel_e       sel2,
  output logic [M-1:0] c0,
  output logic [M-1:0] y_op,
  output logic [M-1:0] f_op,
  output logic [M-1:0] a_op,
  output logic [M-1:0] b_op
);
  localparam int H = (M + 1) / 2;

  `include "gnb_rot.svh"

  logic [M-1:0] a_q, b_q, ab_q;

  function automatic logic [M-1:0] pick(opsel_e s, logic [M-1:0] a, logic [M-1:0] b,
                                        logic [M-1:0] ab);
    case (s)
      SEL_ONE: return '1;
      SEL_A:   return a;
      SEL_B:   return b;
      default: return ab;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q  <= '0;
      b_q  <= '0;
      ab_q <= '0;
    end else if (load) begin
      a_q <= a_in;
      b_q <= gnb_sqr(a_in, H);
    end else begin
      if (advance) begin
        a_q <= gnb_sqr(a_q, 2);
        b_q <= gnb_sqr(b_q, 2);
      end
      if (ab_load)      ab_q <= ab_in;
      else if (advance) ab_q <= gnb_sqr(ab_q, 2);
    end
  end

  assign c0   = pick(sel0, a_q, b_q, ab_q);
  assign y_op = gnb_sqr(pick(sel1, a_q, b_q, ab_q), 1);
  assign f_op = gnb_sqr(pick(sel2, a_q, b_q, ab_q), 2);
  assign a_op = a_q;
  assign b_op = b_q;

endmodule
