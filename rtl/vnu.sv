// vnu: variable node unit, the min-sum column update for one
// code bit with up to twelve edges.
//
//   sum     = L(c) + sum_j in[j]                 soft value L(Q)
//   out[j]  = sat( sum - in[j] )                 extrinsic message
//   hard    = (sum < 0)                          hard decision
//
// All twelve inputs are always used (the maximum column degree of the code);
// positions without an edge are fed with 0 and so do not change the sum.
// The full sum is formed once by an adder tree and each output subtracts its
// own input again, as in the variable node block diagram. The sum is kept
// at 10 bits (13 six-bit terms never overflow it); outputs saturate to the
// symmetric 6-bit range [-31, 31].
//
// Timing: stage 1 registers the sum and a delayed copy of the inputs (in');
// stage 2 registers the outputs, soft value and hard decision. Latency 2
// clocks from in_valid to out_valid; a new input set every clock.
module vnu
  import ldpc_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic signed [W-1:0]         llr,    // channel value L(c)
  input  logic signed [DV-1:0][W-1:0] in,     // check-to-variable messages
  output logic                        out_valid,
  output logic signed [DV-1:0][W-1:0] out,    // variable-to-check messages
  output logic signed [SW-1:0]        lq,   // L(Q)
  output logic                        hard    // 1 when L(Q) < 0
);
  logic signed [SW-1:0]        sum, sum_q;
  logic signed [DV-1:0][W-1:0] in_d;
  logic                        v_q;

  always_comb begin
    sum = SW'(llr);
    for (int j = 0; j < DV; j++) sum += SW'($signed(in[j]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q   <= 1'b0;
      sum_q <= '0;
      in_d  <= '0;
    end else begin
      v_q   <= in_valid;
      sum_q <= sum;
      in_d  <= in;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out       <= '0;
      lq      <= '0;
      hard      <= 1'b0;
    end else begin
      out_valid <= v_q;
      for (int j = 0; j < DV; j++)
        out[j] <= sat_msg((SW+1)'(sum_q) - (SW+1)'($signed(in_d[j])));
      lq <= sum_q;
      hard <= sum_q[SW-1];
    end
  end
endmodule
