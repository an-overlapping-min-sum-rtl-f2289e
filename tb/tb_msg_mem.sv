// tb_msg_mem: checks the storage and the circulant routing of the message
// memory against positions computed here from the base matrix: channel
// values and the initial q words after loading, r words written through the
// CNU side and read back on the VNU side, q words written through the VNU
// side and read back on the CNU side, for every slot of the schedule.
module tb_msg_mem;
  import ldpc_pkg::*;
  logic clk = 0;
  logic llr_we = 0, r_we = 0, q_we = 0;
  logic [4:0] llr_blk = '0;
  logic signed [Z-1:0][W-1:0] llr_in = '0;
  logic [1:0] row_slot = '0;
  logic [2:0] col_slot = '0;
  logic signed [CG-1:0][Z-1:0][DC-1:0][W-1:0] cnu_q, cnu_r = '0;
  logic [CG-1:0][DC-1:0] cnu_mask;
  logic signed [VG-1:0][Z-1:0][DV-1:0][W-1:0] vnu_r, vnu_q = '0;
  logic signed [VG-1:0][Z-1:0][W-1:0] vnu_llr;

  int checks = 0, failures = 0;
  int L [NB][Z];
  int Q [MB][NB][Z];   // reference q words, by bit lane
  int R [MB][NB][Z];   // reference r words, by bit lane

  msg_mem dut (.*);

  always #5 clk = ~clk;

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 8) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // i-th nonzero column of row r, independent of the package helpers
  function automatic int nth_col(int r, int i);
    int n = 0;
    for (int c = 0; c < NB; c++) if (BASE[r][c] >= 0) begin
      if (n == i) return c;
      n++;
    end
    return -1;
  endfunction
  function automatic int nth_row(int c, int j);
    int n = 0;
    for (int r = 0; r < MB; r++) if (BASE[r][c] >= 0) begin
      if (n == j) return r;
      n++;
    end
    return -1;
  endfunction

  task automatic check_rows();
    for (int s = 0; s < ROW_SLOTS; s++) begin
      row_slot = 2'(s);
      #1;
      for (int g = 0; g < CG; g++) begin
        automatic int r = ROW_SCHED[s][g];
        for (int i = 0; i < DC; i++) begin
          automatic int c = nth_col(r, i);
          chk(int'(cnu_mask[g][i]), int'(c >= 0), "mask");
          if (c >= 0)
            for (int z = 0; z < Z; z++)
              chk(int'($signed(cnu_q[g][z][i])), Q[r][c][(z + BASE[r][c]) % Z], "cnu_q");
        end
      end
    end
  endtask

  task automatic check_cols();
    for (int s = 0; s <= COL_SLOTS; s++) begin
      col_slot = 3'(s);
      #1;
      for (int g = 0; g < VG; g++) begin
        int c = (s < COL_SLOTS) ? COL_SCHED[s][g] : -1;
        for (int z = 0; z < Z; z++) begin
          chk(int'($signed(vnu_llr[g][z])), (c >= 0) ? L[c][z] : 0, "vnu_llr");
          for (int j = 0; j < DV; j++) begin
            int r = (c >= 0) ? nth_row(c, j) : -1;
            chk(int'($signed(vnu_r[g][z][j])), (r >= 0) ? R[r][c][z] : 0, $sformatf("vnu_r s%0d g%0d z%0d j%0d", s, g, z, j));
          end
        end
      end
    end
  endtask

  initial begin
    // load channel values, which also initialise q
    for (int b = 0; b < NB; b++) begin
      @(negedge clk);
      llr_we = 1; llr_blk = 5'(b);
      for (int z = 0; z < Z; z++) begin
        L[b][z] = int'($urandom % 64) - 32;
        llr_in[z] = W'(L[b][z]);
        for (int r = 0; r < MB; r++) Q[r][b][z] = L[b][z];
      end
    end
    @(negedge clk);
    llr_we = 0;
    check_rows();
    // r words through the CNU side
    for (int s = 0; s < ROW_SLOTS; s++) begin
      @(negedge clk);
      row_slot = 2'(s);
      for (int g = 0; g < CG; g++) begin
        automatic int r = ROW_SCHED[s][g];
        for (int z = 0; z < Z; z++)
          for (int i = 0; i < DC; i++) begin
            automatic int v = int'($urandom % 63) - 31;
            automatic int c = nth_col(r, i);
            cnu_r[g][z][i] = W'(v);
            if (c >= 0) R[r][c][(z + BASE[r][c]) % Z] = v;
          end
      end
      r_we = 1;
      @(negedge clk);
      r_we = 0;
    end
    for (int r = 0; r < MB; r++)
      for (int c = 0; c < NB; c++)
        if (BASE[r][c] < 0) for (int z = 0; z < Z; z++) R[r][c][z] = 0;
    check_cols();
    // q words through the VNU side
    for (int s = 0; s < COL_SLOTS; s++) begin
      @(negedge clk);
      col_slot = 3'(s);
      for (int g = 0; g < VG; g++) begin
        automatic int c = COL_SCHED[s][g];
        for (int z = 0; z < Z; z++)
          for (int j = 0; j < DV; j++) begin
            automatic int v = int'($urandom % 63) - 31;
            automatic int r = nth_row(c, j);
            vnu_q[g][z][j] = W'(v);
            if (r >= 0) Q[r][c][z] = v;
          end
      end
      q_we = 1;
      @(negedge clk);
      q_we = 0;
    end
    check_rows();
    check_cols();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
