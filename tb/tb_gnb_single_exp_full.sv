// Full-size testbench: gnb_single_exp with its default parameters
// (GF(2^571), type-10 Gaussian normal basis, digit size 13).  Runs two
// exponentiations: a random A to a random 571-bit exponent, checked against
// the reference square-and-multiply, and A^(2^571 - 1), which must be 1.
// Each must take 3 + 144*45 clocks, of which 143*45 = 6435 are the
// iterations (the latency L of the 13-bit-digit configuration).
module tb_gnb_single_exp_full;
  import gnb_ref_pkg::*;

  localparam int M = 571;
  localparam int T = 10;
  localparam int D = 13;
  localparam int N = ((M + 1) / 2) / 2;
  localparam int Q = (M + D - 1) / D;

  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [M-1:0] a_in = '0, p_in = '0, c_out;
  logic         busy, done;
  int checks = 0, failures = 0;

  gnb_single_exp dut (
    .clk(clk), .rst_n(rst_n), .start(start), .a_in(a_in), .p_in(p_in),
    .busy(busy), .done(done), .c_out(c_out));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  task automatic run(elem_t a, elem_t p);
    int cyc;
    a_in  = a[M-1:0];
    p_in  = p[M-1:0];
    start = 1'b1;
    tick();
    start = 1'b0;
    cyc = 1;
    while (!done) begin
      tick();
      cyc++;
    end
    checks++;
    if (cyc != 3 + (N + 1) * (Q + 1) || N * (Q + 1) != 6435) begin
      failures++;
      $display("FAIL latency %0d expected %0d", cyc, 3 + (N + 1) * (Q + 1));
    end
  endtask

  initial begin
    gnb_ref rf;
    elem_t a, p, e;
    rf = new(M, T);
    repeat (3) tick();
    rst_n = 1'b1;
    tick();
    a = rf.rand_elem();
    p = rf.rand_elem();
    run(a, p);
    e = rf.pow(a, p);
    checks++;
    if (c_out !== e[M-1:0]) begin
      failures++;
      $display("FAIL random exponent");
    end
    p = '0;
    p[M-1:0] = '1;
    run(a, p);
    checks++;
    if (c_out !== '1) begin
      failures++;
      $display("FAIL A^(2^m-1) != 1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
