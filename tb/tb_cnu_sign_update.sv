// tb_cnu_sign_update: random signs and masks; each output must be the XOR
// of the signs of the other unmasked inputs.
module tb_cnu_sign_update;
  logic       clk = 0;
  logic [7:0] sign_in, mask, sign_out;
  int checks = 0, failures = 0;

  cnu_sign_update #(.N(8)) dut (.sign_in, .mask, .sign_out);

  always #5 clk = ~clk;

  initial begin
    for (int n = 0; n < 2000; n++) begin
      sign_in = 8'($urandom);
      mask    = (n % 3 == 0) ? 8'hFF : ~(8'd1 << ($urandom % 8));
      @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        bit e;
        e = 0;
        for (int k = 0; k < 8; k++) if (k != i && mask[k]) e ^= sign_in[k];
        checks++;
        if (mask[i] && sign_out[i] !== e) begin
          failures++;
          if (failures < 5) $display("mismatch n=%0d i=%0d", n, i);
        end
      end
    end
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
