// End-to-end testbench for gnb_single_exp in GF(2^17) (type-6 normal basis,
// digit size 4, so Q = 5 clocks + 1 per double multiplication and N = 4
// iterations).
//  * Worked example: A^104853 with K = 405, Q = 204.  The partial result
//    after each iteration is compared with A^(K_j + 2^9 Q_j), where K_j and
//    Q_j keep the exponent bits consumed so far: A^5B^4, A^21B^12,
//    A^21B^76, A^405B^204.
//  * Random and corner exponents (0, 1, 2^m - 1, all-zero pairs) against the
//    reference square-and-multiply; A^(2^m-1) = 1 for A != 0.
//  * Constant latency: every exponentiation takes 3 + (N+1)(Q+1) clocks, of
//    which N(Q+1) are iterations.
//  * Coverage of the mechanisms: each operand multiplexer input (1, A, B,
//    AB), the dummy double multiplication X*1*1, both settings of the
//    C0/previous-result multiplexer; a mechanism never seen is a failure.
module tb_gnb_single_exp;
  import gnb_pkg::*;
  import gnb_ref_pkg::*;

  localparam int M = 17;
  localparam int T = 6;
  localparam int D = 4;
  localparam int H = (M + 1) / 2;
  localparam int N = H / 2;
  localparam int Q = (M + D - 1) / D;

  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [M-1:0] a_in = '0, p_in = '0, c_out;
  logic         busy, done;
  int checks = 0, failures = 0;

  gnb_single_exp #(.M(M), .T(T), .D(D)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .a_in(a_in), .p_in(p_in),
    .busy(busy), .done(done), .c_out(c_out));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, sampled at every multiplier start of an iteration
  int n_sel_y[4], n_sel_f[4], n_sel_c0[4];
  int n_dummy = 0, n_first = 0, n_chain = 0, n_pre = 0;
  always @(posedge clk) begin
    if (rst_n && dut.m_start) begin
      if (dut.state_q == ST_LOAD) n_pre++;
      else begin
        n_sel_y[dut.sel1]++;
        n_sel_f[dut.sel2]++;
        if (dut.sel1 == SEL_ONE && dut.sel2 == SEL_ONE) n_dummy++;
        if (dut.first_iter) begin
          n_first++;
          n_sel_c0[dut.sel0]++;
        end else n_chain++;
      end
    end
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

  gnb_ref rf;

  // run one exponentiation; optionally check partial results per iteration
  task automatic run(elem_t a, elem_t p, bit partials);
    int cyc, j;
    elem_t e, kk, qq, exp_res;
    logic [H-1:0] kh, qh;
    kh = p[H-1:0];
    qh = H'(p[M-1:0] >> H);
    a_in  = a[M-1:0];
    p_in  = p[M-1:0];
    start = 1'b1;
    tick();
    start = 1'b0;
    cyc = 1;
    j = 0;
    while (!done) begin
      if (partials && dut.state_q == ST_ITER && dut.m_last) begin
        j++;
        kk = '0;
        qq = '0;
        kk[H-1:0] = kh & H'((1 << (2 * j + 1)) - 1);
        qq[H-1:0] = qh & H'((1 << (2 * j + 1)) - 1);
        e = kk + (qq << H);
        check($sformatf("partial %0d", j), dut.m_znext, rf.pow(a, e));
      end
      tick();
      cyc++;
    end
    checks++;
    if (cyc != 3 + (N + 1) * (Q + 1)) begin
      failures++;
      $display("FAIL latency %0d expected %0d", cyc, 3 + (N + 1) * (Q + 1));
    end
    exp_res = rf.pow(a, p);
    check("result", c_out, exp_res[M-1:0]);
  endtask

  initial begin
    elem_t a, p;
    rf = new(M, T);
    repeat (3) tick();
    rst_n = 1'b1;
    tick();

    // worked example: P = 405 + 2^9 * 204 = 104853
    checks++;
    if (405 + (204 << 9) != 104853) failures++;
    a = rf.rand_elem();
    p = '0;
    p[M-1:0] = M'(104853);
    run(a, p, 1'b1);

    // corner cases
    p = '0;
    run(a, p, 1'b0);                   // A^0 = 1
    p[0] = 1'b1;
    run(a, p, 1'b0);                   // A^1 = A
    p = '0;
    p[M-1:0] = '1;
    run(a, p, 1'b0);                   // Fermat: A^(2^m-1) = 1
    check("fermat", c_out, '1);
    p = '0;
    p[0] = 1'b1;
    p[H] = 1'b1;
    run(a, p, 1'b1);                   // only k0 and q0 set: C0 = AB, all later pairs dummy
    run(rf.one(), p, 1'b0);            // 1^P = 1
    run('0, p, 1'b0);                  // 0^P = 0 for P > 0

    for (int n = 0; n < 25; n++) begin
      a = rf.rand_elem();
      p = rf.rand_elem();
      run(a, p, n < 5);
    end

    // mechanisms
    for (int s = 0; s < 4; s++) begin
      checks += 3;
      if (n_sel_y[s] == 0 || n_sel_f[s] == 0 || n_sel_c0[s] == 0) begin
        failures++;
        $display("FAIL operand select %0d never used", s);
      end
    end
    checks += 3;
    if (n_dummy == 0) begin failures++; $display("FAIL no dummy multiplication"); end
    if (n_first == 0 || n_chain == 0) begin failures++; $display("FAIL ctrl mux not exercised"); end
    if (n_pre == 0) begin failures++; $display("FAIL no AB precomputation"); end
    $display("mechanisms: dummy=%0d first=%0d chained=%0d precompute=%0d sel_y=%0d/%0d/%0d/%0d",
             n_dummy, n_first, n_chain, n_pre, n_sel_y[0], n_sel_y[1], n_sel_y[2], n_sel_y[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
