// tb_cnu_min_network: streams random 8-magnitude sets (one per clock, with
// gaps) and checks that one clock later each output is the minimum of the
// other seven inputs and out_valid follows in_valid.
module tb_cnu_min_network;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [7:0][4:0] in, out;
  logic [7:0][4:0] exp_q;
  logic            exp_v;
  int checks = 0, failures = 0, valids = 0;

  cnu_min_network #(.MWID(5)) dut (.clk, .rst_n, .in_valid, .in, .out_valid, .out);

  always #5 clk = ~clk;

  function automatic logic [7:0][4:0] ref_min(logic [7:0][4:0] x);
    logic [7:0][4:0] o;
    for (int i = 0; i < 8; i++) begin
      o[i] = 5'd31;
      for (int k = 0; k < 8; k++) if (k != i && x[k] < o[i]) o[i] = x[k];
    end
    return o;
  endfunction

  initial begin
    in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      for (int i = 0; i < 8; i++)
        in[i] = (n % 5 == 0) ? 5'($urandom % 4) : 5'($urandom);
      exp_q = ref_min(in);
      exp_v = in_valid;
      @(posedge clk);
      #1;
      checks++;
      if (out_valid !== exp_v) failures++;
      if (exp_v) begin
        valids++;
        checks++;
        if (out !== exp_q) begin
          failures++;
          if (failures < 5) $display("mismatch n=%0d in=%h out=%h exp=%h", n, in, out, exp_q);
        end
      end
    end
    checks++;
    if (valids == 0) failures++;
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
