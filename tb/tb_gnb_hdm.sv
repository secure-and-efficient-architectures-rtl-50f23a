// Testbench for gnb_hdm: double products X*Y*F against the reference model,
// the latency of Q+1 clocks from start to result, and back-to-back
// operations started in the last clock of the previous one with the new X
// taken from z_next.  GF(2^17), type-6 normal basis, digit size 4 (Q = 5,
// last digit one coordinate wide).
module tb_gnb_hdm;
  import gnb_ref_pkg::*;

  localparam int M = 17;
  localparam int T = 6;
  localparam int D = 4;
  localparam int Q = (M + D - 1) / D;

  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [M-1:0] x_in = '0, y_in = '0, f_in = '0, z, z_next;
  logic         ready, busy, last, done;
  int checks = 0, failures = 0;

  gnb_hdm #(.M(M), .T(T), .D(D)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .x_in(x_in), .y_in(y_in), .f_in(f_in),
    .ready(ready), .busy(busy), .last(last), .done(done), .z(z), .z_next(z_next));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // advance one clock; inputs change and outputs are sampled 1 time unit
  // after the edge
  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  task automatic check(string what, logic [M-1:0] got, logic [M-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    gnb_ref rf = new(M, T);
    elem_t xa, ya, fa, e;
    int cyc;
    repeat (3) tick();
    rst_n = 1'b1;
    tick();
    // single operations with latency check
    for (int n = 0; n < 40; n++) begin
      xa = rf.rand_elem();
      ya = rf.rand_elem();
      fa = (n == 1) ? rf.one() : rf.rand_elem();
      if (n == 0) begin
        ya = rf.one();
        fa = rf.one();
      end
      x_in  = xa[M-1:0];
      y_in  = ya[M-1:0];
      f_in  = fa[M-1:0];
      start = 1'b1;
      tick();
      start = 1'b0;
      cyc = 0;
      do begin
        tick();
        cyc++;
      end while (!done);
      // Q+1 clock edges after the one that accepted start, Z holds X*Y*F
      checks++;
      if (cyc != Q + 1) begin
        failures++;
        $display("FAIL latency %0d expected %0d", cyc, Q + 1);
      end
      e = rf.mul(rf.mul(xa, ya), fa);
      check("product", z, e[M-1:0]);
    end
    // chained operations: each new X is the previous product, loaded from
    // z_next in the last clock of the previous operation
    xa   = rf.rand_elem();
    e    = xa;
    x_in = xa[M-1:0];
    for (int n = 0; n < 12; n++) begin
      ya = rf.rand_elem();
      fa = rf.rand_elem();
      e  = rf.mul(rf.mul(e, ya), fa);
      y_in  = ya[M-1:0];
      f_in  = fa[M-1:0];
      start = 1'b1;
      tick();
      start = 1'b0;
      cyc = 1;
      while (!last) begin
        tick();
        cyc++;
      end
      checks++;
      if (cyc != Q + 1) begin
        failures++;
        $display("FAIL chained latency %0d expected %0d", cyc, Q + 1);
      end
      check("z_next", z_next, e[M-1:0]);
      x_in = z_next;
    end
    tick();
    check("chained", z, e[M-1:0]);
    checks++;
    if (!done) begin
      failures++;
      $display("FAIL done missing after chain");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
