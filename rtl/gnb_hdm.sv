// Digit-level hybrid-double multiplier: E = X * Y * F over GF(2^M) in a
// type-T Gaussian normal basis, in Q+1 clock cycles with Q = ceil(M/D).
//
// Two digit-serial multipliers run interleaved.  The PISO core (gnb_piso)
// emits D coordinates of C = X*Y per clock, least significant digit first,
// while X and Y rotate by D places (X <- X^(2^-D)).  The digit is held one
// clock in the D-bit digit register and then folded into Z by the SIPO core
// (gnb_sipo), which multiplies it by the rotating F register.  The PISO core
// works in clocks 0..Q-1 of an operation and the SIPO core in clocks 1..Q,
// so the whole double product takes Q+1 clocks, the one extra clock being
// the digit register between the two multipliers.
//
// Interface: when start is high in a clock where ready is high, x_in, y_in
// and f_in are loaded into X, Y and F.  Z is not cleared at load; the first
// SIPO step ignores its old contents, so Z keeps the previous product during
// clock 0 of the next operation.  last is high in the final clock of an
// operation; z_next is the value Z takes at the end of that clock.  ready is
// high when idle and in the last clock, so a new operation can be started
// in the same clock the previous one finishes (with x_in taken from z_next).
// done pulses in the clock after last, when z holds E.
//
// Follows the architecture: the four M-bit registers X, Y, F, Z, the D-bit
// register between the two cores, rotation of X, Y, F, Z by D per clock and
// the latency Q+1.  Load timing, the ready/last/done signals and the reset
// values are this implementation's choices.
module gnb_hdm #(
  parameter int M = 571,
  parameter int T = 10,
  parameter int D = 13
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] x_in,
  input  logic [M-1:0] y_in,
  input  logic [M-1:0] f_in,
  output logic         ready,
  output logic         busy,
  output logic         last,
  output logic         done,
  output logic [M-1:0] z,
  output logic [M-1:0] z_next
);
  localparam int Q  = (M + D - 1) / D;
  localparam int CW = $clog2(Q + 1);

  `include "gnb_rot.svh"

  logic [M-1:0]  x_q, y_q, f_q, z_q;
  logic [D-1:0]  dig_q, dig_d, mask;
  logic [CW-1:0] cnt_q;
  logic          busy_q, done_q;

  assign last  = busy_q && (int'(cnt_q) == Q);
  assign ready = !busy_q || last;
  assign busy  = busy_q;
  assign done  = done_q;
  assign z     = z_q;

  // coordinates of the current digit that lie inside the field
  always_comb begin
    for (int t = 0; t < D; t++) mask[t] = (int'(cnt_q) * D + t) < M;
  end

  gnb_piso #(.M(M), .T(T), .D(D)) u_piso (
    .x   (x_q),
    .y   (y_q),
    .mask(mask),
    .c   (dig_d)
  );

  gnb_sipo #(.M(M), .T(T), .D(D)) u_sipo (
    .z     (z_q),
    .f     (f_q),
    .digit (dig_q),
    .clear (int'(cnt_q) == 1),
    .last  (last),
    .z_next(z_next)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q    <= '0;
      y_q    <= '0;
      f_q    <= '0;
      z_q    <= '0;
      dig_q  <= '0;
      cnt_q  <= '0;
      busy_q <= 1'b0;
      done_q <= 1'b0;
    end else begin
      done_q <= last;
      // SIPO half: clocks 1..Q
      if (busy_q && cnt_q != '0) begin
        z_q <= z_next;
        f_q <= gnb_sqrt(f_q, D);
      end
      // PISO half: clocks 0..Q-1
      if (busy_q && int'(cnt_q) < Q) begin
        dig_q <= dig_d;
        x_q   <= gnb_sqrt(x_q, D);
        y_q   <= gnb_sqrt(y_q, D);
      end
      if (start && ready) begin
        x_q    <= x_in;
        y_q    <= y_in;
        f_q    <= f_in;
        cnt_q  <= '0;
        busy_q <= 1'b1;
      end else if (busy_q) begin
        if (last) busy_q <= 1'b0;
        else      cnt_q  <= cnt_q + 1'b1;
      end
    end
  end

  // an operation may only be started when the multiplier can accept it
  a_start_ready: assert property (@(posedge clk) disable iff (!rst_n) start |-> ready)
    else $error("gnb_hdm: start while busy");

endmodule
