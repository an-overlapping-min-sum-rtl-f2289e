// tb_ldpc_decoder: end-to-end test of the overlapped decoder at its default
// size (648-bit code, 3x27 CNUs, 4x27 VNUs, 20 iterations).
//
// Each frame is a random code word from the reference encoder, sent through
// a noisy 6-bit channel and loaded block column by block column. The
// decoder's hard decisions, iteration count and stop reason must equal the
// flooding min-sum reference, and start-to-done must take
// (6*I + 2) * SLOT_CLKS + 1 clocks for I iterations. Frames cover: clean
// and lightly noisy words (early stop after few iterations), heavy noise
// (runs to the 20-iteration limit), and early stopping switched off.
// The testbench counts how often each mechanism occurred: overlapped slots
// (row and column work in the same slot), early stops, iteration-limit
// stops and decodes that corrected channel errors; each must occur.
module tb_ldpc_decoder;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int MAX_ITER  = 20;   // decoder default
  localparam int SLOT_CLKS = 3;    // decoder default

  logic clk = 0, rst_n = 0;
  logic llr_we = 0, start = 0, early_stop_en = 0;
  logic [4:0] llr_blk = '0;
  logic signed [Z-1:0][W-1:0] llr_in = '0;
  logic busy, done, early_stop, parity_ok, overlap;
  logic [7:0] iterations;
  logic [N-1:0] hard;

  int checks = 0, failures = 0;
  int n_overlap = 0, n_early = 0, n_limit = 0, n_corrected = 0;
  longint cyc = 0;

  ldpc_decoder dut (
    .clk, .rst_n, .llr_we, .llr_blk, .llr_in, .start, .early_stop_en,
    .busy, .done, .iterations, .early_stop, .parity_ok, .overlap, .hard
  );

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (overlap) n_overlap++;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic run_frame(int amp, int spread, bit early);
    bits_t c, ref_hd;
    llrs_t l;
    int ref_it, errs, lat;
    bit ref_early;
    longint t0;
    encode(c);
    check(is_codeword(c), "reference encoder");
    channel(c, amp, spread, l);
    errs = 0;
    for (int i = 0; i < N; i++) if ((l[i] < 0) != c[i]) errs++;
    decode(l, MAX_ITER, early, ref_hd, ref_it, ref_early);
    // load
    for (int b = 0; b < NB; b++) begin
      @(negedge clk);
      llr_we = 1; llr_blk = 5'(b);
      for (int z = 0; z < Z; z++) llr_in[z] = W'(l[b*Z + z]);
    end
    @(negedge clk);
    llr_we = 0; early_stop_en = early; start = 1;
    @(posedge clk);
    #1;
    t0 = cyc;
    start = 0;
    forever begin
      @(posedge clk);
      #1;
      if (done) break;
    end
    lat = int'(cyc - t0);
    check(int'(iterations) == ref_it, $sformatf("iterations %0d, expected %0d", iterations, ref_it));
    check(early_stop == ref_early, "stop reason");
    check(lat == (6*ref_it + 2)*SLOT_CLKS + 1,
          $sformatf("latency %0d clocks for %0d iterations", lat, ref_it));
    begin
      int mism = 0, werr = 0;
      for (int i = 0; i < N; i++) begin
        if (hard[i] != ref_hd[i]) mism++;
        if (hard[i] != c[i]) werr++;
      end
      check(mism == 0, $sformatf("%0d hard decisions differ from the reference", mism));
      check(parity_ok == is_codeword(ref_hd), "parity_ok");
      if (early_stop) n_early++; else n_limit++;
      if (werr == 0 && errs > 0) n_corrected++;
      $display("frame amp=%0d spread=%0d early=%0d: channel errors %0d, iterations %0d, residual errors %0d, %0d clocks",
               amp, spread, early, errs, iterations, werr, lat);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_frame(12, 0, 1);     // clean
    run_frame(10, 3, 1);     // light noise, corrected
    run_frame(10, 4, 1);     // moderate noise, corrected
    run_frame(4, 9, 1);      // heavy noise, runs into the iteration limit
    run_frame(10, 3, 0);     // early stop disabled: full 20 iterations
    check(n_overlap > 0, "no overlapped slot seen");
    check(n_early > 0, "no early stop seen");
    check(n_limit > 0, "no iteration-limit stop seen");
    check(n_corrected > 0, "no frame with corrected channel errors");
    $display("mechanisms: overlapped clocks %0d, early stops %0d, limit stops %0d, corrected frames %0d",
             n_overlap, n_early, n_limit, n_corrected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
