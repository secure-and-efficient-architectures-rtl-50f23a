// Testbench for gnb_operand_sel: after loading A (and A*B), the three
// multiplexer outputs are checked for every select value over several
// iterations, against 1, A, B = A^(2^H) and AB squared 2j-2, 2j-1 and 2j
// times in iteration j.  GF(2^17), H = 9.
module tb_gnb_operand_sel;
  import gnb_pkg::*;
  import gnb_ref_pkg::*;

  localparam int M = 17;
  localparam int T = 6;
  localparam int H = (M + 1) / 2;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         load = 1'b0, ab_load = 1'b0, advance = 1'b0;
  logic [M-1:0] a_in = '0, ab_in = '0;
  opsel_e       sel0 = SEL_ONE, sel1 = SEL_ONE, sel2 = SEL_ONE;
  logic [M-1:0] c0, y_op, f_op, a_op, b_op;
  int checks = 0, failures = 0;

  gnb_operand_sel #(.M(M)) dut (
    .clk(clk), .rst_n(rst_n), .load(load), .a_in(a_in), .ab_load(ab_load), .ab_in(ab_in),
    .advance(advance), .sel0(sel0), .sel1(sel1), .sel2(sel2),
    .c0(c0), .y_op(y_op), .f_op(f_op), .a_op(a_op), .b_op(b_op));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
    elem_t a, b, ab, opt[4];
    repeat (2) tick();
    rst_n = 1'b1;
    for (int run = 0; run < 6; run++) begin
      a  = rf.rand_elem();
      ab = rf.rand_elem();
      b  = rf.sqr(a, H);
      a_in = a[M-1:0];
      load = 1'b1;
      tick();
      load = 1'b0;
      check("a_op", a_op, a[M-1:0]);
      check("b_op", b_op, b[M-1:0]);
      ab_in   = ab[M-1:0];
      ab_load = 1'b1;
      tick();
      ab_load = 1'b0;
      for (int j = 1; j <= 5; j++) begin
        opt[0] = rf.one();
        opt[1] = rf.sqr(a, 2 * j - 2);
        opt[2] = rf.sqr(b, 2 * j - 2);
        opt[3] = rf.sqr(ab, 2 * j - 2);
        for (int s = 0; s < 4; s++) begin
          sel0 = opsel_e'(s);
          sel1 = opsel_e'((s + 1) % 4);
          sel2 = opsel_e'((s + 2) % 4);
          #1;
          check("c0", c0, opt[s][M-1:0]);
          check("y_op", y_op, rf.sqr(opt[(s + 1) % 4], 1));
          check("f_op", f_op, rf.sqr(opt[(s + 2) % 4], 2));
        end
        advance = 1'b1;
        tick();
        advance = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
