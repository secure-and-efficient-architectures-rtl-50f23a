// Testbench for gnb_piso: the digit of D product coordinates produced from
// rotated operands is compared with the reference normal-basis product.
// GF(2^17) with a type-6 Gaussian normal basis, digit size 4.
module tb_gnb_piso;
  import gnb_ref_pkg::*;

  localparam int M = 17;
  localparam int T = 6;
  localparam int D = 4;

  logic [M-1:0] x, y;
  logic [D-1:0] mask, c;
  int checks = 0, failures = 0;

  gnb_piso #(.M(M), .T(T), .D(D)) dut (.x(x), .y(y), .mask(mask), .c(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gnb_ref rf = new(M, T);
    elem_t xa, ya, pr, xr, yr;
    for (int n = 0; n < 300; n++) begin
      xa = rf.rand_elem();
      ya = rf.rand_elem();
      if (n == 0) xa = rf.one();           // identity: product is y
      // present the operands rotated by a random digit position s, as the
      // multiplier does after s/D digits
      begin
        int s = $urandom_range(0, M - 1);
        xr = rf.sqr(xa, -s);
        yr = rf.sqr(ya, -s);
        x = xr[M-1:0];
        y = yr[M-1:0];
        mask = (n < 20) ? '1 : D'($urandom);
        #1;
        pr = rf.mul(xa, ya);
        for (int t = 0; t < D; t++) begin
          checks++;
          if (c[t] !== (mask[t] & pr[(s + t) % M])) begin
            failures++;
            if (failures < 10)
              $display("FAIL n=%0d s=%0d t=%0d got %b exp %b", n, s, t, c[t],
                       mask[t] & pr[(s + t) % M]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
