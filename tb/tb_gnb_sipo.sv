// Testbench for gnb_sipo: one Horner step Z <- (Z + digit*F)^(2^-w) is
// compared with the reference product, for the normal (w = D) and the last
// (w = M - (Q-1)*D) digit and with and without clearing Z.
// GF(2^17) with a type-6 Gaussian normal basis, digit size 4.
module tb_gnb_sipo;
  import gnb_ref_pkg::*;

  localparam int M = 17;
  localparam int T = 6;
  localparam int D = 4;
  localparam int Q = (M + D - 1) / D;
  localparam int RLAST = M - (Q - 1) * D;

  logic [M-1:0] z, f, z_next;
  logic [D-1:0] digit;
  logic         clear, last;
  int checks = 0, failures = 0;

  gnb_sipo #(.M(M), .T(T), .D(D)) dut (
    .z(z), .f(f), .digit(digit), .clear(clear), .last(last), .z_next(z_next));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gnb_ref rf = new(M, T);
    elem_t za, fa, da, e;
    for (int n = 0; n < 300; n++) begin
      za = rf.rand_elem();
      fa = rf.rand_elem();
      da = '0;
      da[D-1:0] = D'($urandom);
      if (n < 4) da[D-1:0] = D'(1 << n);   // single basis elements
      z = za[M-1:0];
      f = fa[M-1:0];
      digit = da[D-1:0];
      clear = n[0];
      last  = n[1];
      #1;
      e = rf.mul(da, fa);
      if (!clear) e ^= za;
      e = rf.sqr(e, last ? -RLAST : -D);
      checks++;
      if (z_next !== e[M-1:0]) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d got %h exp %h", n, z_next, e[M-1:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
