// tb_cnu: streams random check node inputs (7 or 8 edges, including the
// extreme values -32 and +31) into the check node unit and compares every
// output with the min-sum rule computed here, two clocks later.
module tb_cnu;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [DC-1:0] mask;
  logic signed [DC-1:0][W-1:0] in, out;
  typedef struct { bit v; logic [DC-1:0] m; logic signed [DC-1:0][W-1:0] o; } exp_t;
  exp_t expd;   // expected outputs for the inputs of the previous cycle
  int checks = 0, failures = 0, valids = 0;

  cnu dut (.clk, .rst_n, .in_valid, .mask, .in, .out_valid, .out);

  always #5 clk = ~clk;

  function automatic exp_t ref_cnu(bit v, logic [DC-1:0] m, logic signed [DC-1:0][W-1:0] x);
    exp_t e;
    e.v = v; e.m = m;
    for (int i = 0; i < DC; i++) begin
      int mn = 31; bit sg = 0;
      for (int k = 0; k < DC; k++) begin
        int a;
        if (k == i || !m[k]) continue;
        a = ($signed(x[k]) < 0) ? -int'($signed(x[k])) : int'($signed(x[k]));
        if (a > 31) a = 31;
        if (a < mn) mn = a;
        sg ^= x[k][W-1];
      end
      e.o[i] = W'(sg ? -mn : mn);
    end
    return e;
  endfunction

  initial begin
    in = '0; mask = '1;
    expd.v = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      in_valid = ($urandom % 5) != 0;
      mask = (n % 2) ? 8'hFF : ~(8'd1 << ($urandom % 8));
      for (int i = 0; i < DC; i++) begin
        case ($urandom % 6)
          0: in[i] = -6'sd32;
          1: in[i] = 6'sd31;
          2: in[i] = W'($urandom % 5) - 6'sd2;
          default: in[i] = W'($urandom);
        endcase
      end
      @(posedge clk);
      #1;
      // outputs now show the inputs driven in the previous clock cycle
      checks++;
      if (out_valid !== expd.v) failures++;
      if (expd.v) begin
        valids++;
        for (int i = 0; i < DC; i++) if (expd.m[i]) begin
          checks++;
          if (out[i] !== expd.o[i]) begin
            failures++;
            if (failures < 5) $display("mismatch n=%0d i=%0d out=%0d exp=%0d", n, i, $signed(out[i]), $signed(expd.o[i]));
          end
        end
      end
      expd = ref_cnu(in_valid, mask, in);
    end
    checks++;
    if (valids < 100) failures++;
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
