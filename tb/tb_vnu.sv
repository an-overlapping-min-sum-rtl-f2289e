// tb_vnu: streams random variable node inputs (columns of degree 2, 3 and
// 12, unused inputs at 0) into the variable node unit and checks the twelve
// extrinsic outputs (saturated to [-31, 31]), the soft value
// and the hard decision two clocks later.
module tb_vnu;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, hard;
  logic signed [W-1:0] llr;
  logic signed [DV-1:0][W-1:0] in, out;
  logic signed [SW-1:0] lq;
  typedef struct { bit v; int s; int o [DV]; } exp_t;
  exp_t expd;   // expected outputs for the inputs of the previous cycle
  int checks = 0, failures = 0, valids = 0, sats = 0;

  vnu dut (.clk, .rst_n, .in_valid, .llr, .in, .out_valid, .out, .lq, .hard);

  always #5 clk = ~clk;

  initial begin
    in = '0; llr = '0;
    expd.v = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      int deg;
      @(negedge clk);
      in_valid = ($urandom % 5) != 0;
      deg = (n % 3 == 0) ? 12 : (n % 3 == 1) ? 3 : 2;
      llr = W'($urandom);
      for (int j = 0; j < DV; j++) begin
        if (j >= deg) in[j] = '0;
        else if (n % 7 == 0) in[j] = 6'sd31;
        else in[j] = W'($urandom % 63) - 6'sd31;
      end
      @(posedge clk);
      #1;
      checks++;
      if (out_valid !== expd.v) failures++;
      if (expd.v) begin
        valids++;
        checks += 2;
        if (int'(lq) != expd.s) failures++;
        if (hard !== (expd.s < 0)) failures++;
        for (int j = 0; j < DV; j++) begin
          checks++;
          if (int'($signed(out[j])) != expd.o[j]) begin
            failures++;
            if (failures < 5) $display("mismatch n=%0d j=%0d out=%0d exp=%0d", n, j, out[j], expd.o[j]);
          end
        end
      end
      expd.v = in_valid;
      expd.s = int'(llr);
      for (int j = 0; j < DV; j++) expd.s += int'($signed(in[j]));
      for (int j = 0; j < DV; j++) begin
        int d;
        d = expd.s - int'($signed(in[j]));
        if (d > 31 || d < -31) sats++;
        expd.o[j] = (d > 31) ? 31 : (d < -31) ? -31 : d;
      end
    end
    checks++;
    if (valids < 100 || sats == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
