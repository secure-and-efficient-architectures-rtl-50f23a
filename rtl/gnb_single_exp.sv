// Single exponentiation C = A^P over GF(2^M) in a type-T Gaussian normal
// basis, using one digit-level hybrid-double multiplier (digit size D).
//
// The m-bit exponent P is split into halves K = P[H-1:0] and
// Q = P[M-1:H], H = ceil(M/2) (Q zero-padded to H bits), so that
// A^P = A^K * B^Q with B = A^(2^H), a fixed rotation of A.  After the
// initial value C0 in {1, A, B, AB} is chosen by (k0, q0), every iteration
// consumes two bit positions of both halves and performs one double
// multiplication
//     C_j = C_{j-1} * R_i * R_{i+1},   i = 2j-1,
// where R_i = (A^k_i * B^q_i)^(2^i) is 1, A, B or AB squared i times.  There
// are N = ceil((H-1)/2) iterations (143 for M = 571), each of Q+1 clocks,
// Q = ceil(M/D).  A double multiplication is performed in every iteration,
// including the dummy C_{j-1}*1*1 when all four exponent bits are zero, so
// the sequence of operations and the run time do not depend on P.
//
// Sequence: start (in IDLE) latches A and P.  One clock later the multiplier
// computes A*B*1 (Q+1 clocks) and the product is kept as AB.  The next clock
// starts iteration 1 with C0 from the (q0,k0) multiplexer; iterations 2..N
// start in the last clock of the previous one, taking the new partial result
// straight from the multiplier's Z input (the 2-to-1 "ctrl" multiplexer).
// Start to done: 3 + (N+1)*(Q+1) clocks, of which N*(Q+1) are the
// iterations.  done pulses for one clock with c_out valid; c_out holds until
// the next result.  busy is high from start until done.
//
// The exponent split, the operand multiplexers, the dummy multiplication and
// the iteration count follow the architecture.  Computing AB with the same
// multiplier before the iterations, the back-to-back start of iterations and
// the handshake are this implementation's choices.
module gnb_single_exp
  import gnb_pkg::*;
#(
  parameter int M = 571,
  parameter int T = 10,
  parameter int D = 13
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a_in,
  input  logic [M-1:0] p_in,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] c_out
);
  localparam int H  = (M + 1) / 2;     // bits of K and of Q
  localparam int N  = H / 2;           // iterations, ceil((H-1)/2)
  localparam int EW = 2 * N + 1;       // exponent half incl. zero padding
  localparam int JW = $clog2(N + 1);

  exp_state_e    state_q;
  logic [EW-1:0] k_q, q_q;             // exponent halves, bit 0 = next to use
  logic [JW-1:0] iter_q;

  logic [M-1:0]  c0, y_op, f_op, a_op, b_op;
  logic          m_start, m_ready, m_busy, m_last, m_done;
  logic [M-1:0]  m_x, m_y, m_f, m_z, m_znext;
  logic          os_load, os_ab_load, os_advance;
  logic          first_iter, next_iter, finish;

  opsel_e sel0, sel1, sel2;
  assign sel0 = opsel_e'({q_q[0], k_q[0]});
  assign sel1 = opsel_e'({q_q[1], k_q[1]});
  assign sel2 = opsel_e'({q_q[2], k_q[2]});

  assign first_iter = (state_q == ST_FIRST);
  assign finish     = (state_q == ST_ITER) && m_last && (int'(iter_q) == N);
  assign next_iter  = (state_q == ST_ITER) && m_last && (int'(iter_q) != N);

  gnb_operand_sel #(.M(M)) u_opsel (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (os_load),
    .a_in   (a_in),
    .ab_load(os_ab_load),
    .ab_in  (m_znext),
    .advance(os_advance),
    .sel0   (sel0),
    .sel1   (sel1),
    .sel2   (sel2),
    .c0     (c0),
    .y_op   (y_op),
    .f_op   (f_op),
    .a_op   (a_op),
    .b_op   (b_op)
  );

  assign os_load    = (state_q == ST_IDLE) && start;
  assign os_ab_load = (state_q == ST_PRE) && m_last;
  assign os_advance = first_iter || next_iter;

  // multiplier operands: A*B*1 for the precomputation, otherwise the
  // 2-to-1 ctrl multiplexer (C0 or the previous result) times R_i and R_{i+1}
  always_comb begin
    if (state_q == ST_LOAD) begin
      m_x = a_op;
      m_y = b_op;
      m_f = '1;
    end else begin
      m_x = first_iter ? c0 : m_znext;
      m_y = y_op;
      m_f = f_op;
    end
  end
  assign m_start = (state_q == ST_LOAD) || first_iter || next_iter;

  gnb_hdm #(.M(M), .T(T), .D(D)) u_hdm (
    .clk   (clk),
    .rst_n (rst_n),
    .start (m_start),
    .x_in  (m_x),
    .y_in  (m_y),
    .f_in  (m_f),
    .ready (m_ready),
    .busy  (m_busy),
    .last  (m_last),
    .done  (m_done),
    .z     (m_z),
    .z_next(m_znext)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= ST_IDLE;
      k_q     <= '0;
      q_q     <= '0;
      iter_q  <= '0;
      c_out   <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        ST_IDLE: if (start) begin
          k_q     <= EW'(p_in[H-1:0]);
          q_q     <= EW'(p_in[M-1:H]);
          state_q <= ST_LOAD;
        end
        ST_LOAD:  state_q <= ST_PRE;
        ST_PRE:   if (m_last) state_q <= ST_FIRST;
        ST_FIRST: begin
          // bit 0 went to C0 and bits 1, 2 to this iteration; bits 3, 4
          // move to positions 1, 2 for the next one
          k_q     <= k_q >> 2;
          q_q     <= q_q >> 2;
          iter_q  <= JW'(1);
          state_q <= ST_ITER;
        end
        ST_ITER: begin
          if (next_iter) begin
            k_q    <= k_q >> 2;
            q_q    <= q_q >> 2;
            iter_q <= iter_q + 1'b1;
          end
          if (finish) begin
            c_out   <= m_znext;
            done    <= 1'b1;
            state_q <= ST_IDLE;
          end
        end
        default: state_q <= ST_IDLE;
      endcase
    end
  end

  assign busy = (state_q != ST_IDLE);

  // the multiplier is only started when it can accept an operation
  a_mult_ready: assert property (@(posedge clk) disable iff (!rst_n) m_start |-> m_ready)
    else $error("gnb_single_exp: multiplier started while busy");

endmodule
