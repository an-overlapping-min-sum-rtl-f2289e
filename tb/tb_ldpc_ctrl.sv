// tb_ldpc_ctrl: runs the control unit with a 3-iteration limit and checks
// the issue pattern clock by clock against the overlapped schedule (row
// slot k at clock 3k for k mod 6 < 4, column slot k at clock 3k for k >= 2),
// the start-to-done time of (6*I + 2) * 3 + 1 clocks, the number of
// overlapped clocks, and both stop rules: iteration limit and parity check
// passing after the first iteration.
module tb_ldpc_ctrl;
  localparam int MAXI = 3;
  localparam int SC   = 3;
  logic clk = 0, rst_n = 0, start = 0, early_stop_en = 0, syn_ok = 0;
  logic busy, done, early_stop, row_issue, col_issue, overlap;
  logic [7:0] iterations;
  logic [1:0] row_slot;
  logic [2:0] col_slot;
  int checks = 0, failures = 0;

  ldpc_ctrl #(.MAX_ITER(MAXI), .SLOT_CLKS(SC)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // one decode; 'iters' is the number of iterations the run must take
  task automatic run(bit en, bit ok, int iters, bit exp_early);
    int t, ovl, nrow, ncol, exp_rows, exp_cols;
    @(negedge clk);
    early_stop_en = en; syn_ok = ok; start = 1;
    @(negedge clk);
    start = 0;
    t = 0; ovl = 0; nrow = 0; ncol = 0;
    while (!done && t < 1000) begin
      int k;
      bit row_exp, col_exp;
      k = t / SC;
      row_exp = (t % SC == 0) && (k % 6 < 4) && (k / 6 < MAXI) && k < 6*iters + 2;
      col_exp = (t % SC == 0) && k >= 2 && (k - 2) / 6 < iters;
      chk(row_issue == row_exp, $sformatf("row_issue at clock %0d", t));
      chk(col_issue == col_exp, $sformatf("col_issue at clock %0d", t));
      if (row_issue) begin
        nrow++;
        chk(int'(row_slot) == k % 6, "row_slot");
      end
      if (col_issue) begin
        ncol++;
        chk(int'(col_slot) == (k - 2) % 6, "col_slot");
      end
      if (overlap) ovl++;
      @(negedge clk);
      t++;
    end
    chk(t == (6*iters + 2)*SC + 1, $sformatf("done after %0d clocks", t));
    chk(int'(iterations) == iters, "iterations");
    chk(early_stop == exp_early, "early_stop");
    exp_cols = 6*iters;
    exp_rows = 4*iters + ((iters < MAXI) ? 2 : 0);
    chk(ncol == exp_cols, $sformatf("%0d column issues", ncol));
    chk(nrow == exp_rows, $sformatf("%0d row issues", nrow));
    chk(ovl == ((iters < MAXI) ? 4*iters : 4*iters - 2)*SC, $sformatf("%0d overlapped clocks", ovl));
    @(negedge clk);
    chk(!busy && !done, "idle after done");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0, 0, MAXI, 0);   // early stop disabled
    run(1, 0, MAXI, 0);   // parity never passes: iteration limit
    run(1, 1, 1, 1);      // parity passes after the first iteration
    run(0, 1, MAXI, 0);   // parity passes but early stop disabled
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
