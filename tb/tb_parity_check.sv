// tb_parity_check: encodes random code words (must give an all-zero
// syndrome), then flips one to three random bits and compares the whole
// syndrome with the reference.
module tb_parity_check;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;
  logic clk = 0;
  logic [N-1:0] hd;
  logic [M-1:0] syn;
  logic ok;
  int checks = 0, failures = 0;

  parity_check dut (.hd, .syndrome(syn), .ok);

  always #5 clk = ~clk;

  initial begin
    bits_t c;
    bit s [M];
    for (int n = 0; n < 60; n++) begin
      bit any;
      encode(c);
      checks++;
      if (!is_codeword(c)) begin failures++; $display("reference encoder broken"); end
      if (n % 2) for (int k = 0; k <= int'($urandom % 3); k++) begin
        automatic int p = $urandom % N;
        c[p] = ~c[p];
      end
      for (int i = 0; i < N; i++) hd[i] = c[i];
      syndrome(c, s);
      @(posedge clk);
      any = 0;
      for (int i = 0; i < M; i++) begin
        checks++;
        any |= s[i];
        if (syn[i] !== s[i]) failures++;
      end
      checks++;
      if (ok !== !any) failures++;
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
