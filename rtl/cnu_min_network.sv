// cnu_min_network: magnitude part of the check node update.
//
// For each of eight 5-bit magnitudes in[k] the network returns the minimum
// of the other seven, using twenty 2-input comparators in four columns
// (4 + 4 + 4 + 8), as in a compare-select array for 8 inputs:
//   column 1: p[k] = min(in[2k], in[2k+1])               (pair minima)
//   column 2: q[k] = min(p[k], p[k+1])                   (two pairs)
//   column 3: t[k] = min(q[k+1], p[k+3])  = min of all pairs except k
//   column 4: out[2k] = min(t[k], in[2k+1]), out[2k+1] = min(t[k], in[2k])
// (pair indices mod 4). The exact wiring between the columns is this
// design's own; the comparator count, the four columns and the delayed
// copies of the inputs that feed the last column follow the published architecture.
//
// Timing: one register stage between column 3 and column 4. The inputs are
// delayed by the same register (the "Delay" boxes) so that column 4 compares
// t[k] with the partner input of the same operand set. Latency 1 clock:
// out_valid and out follow in_valid and in by one cycle. out is
// combinational from the pipeline register.
module cnu_min_network #(
  parameter int MWID = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [7:0][MWID-1:0] in,
  output logic                out_valid,
  output logic [7:0][MWID-1:0] out
);
  function automatic logic [MWID-1:0] cmin(logic [MWID-1:0] a, logic [MWID-1:0] b);
    return (a < b) ? a : b;
  endfunction

  logic [3:0][MWID-1:0] p, q, t;
  logic [3:0][MWID-1:0] t_q;          // pipeline register after column 3
  logic [7:0][MWID-1:0] in_d;         // delayed inputs (in')
  logic                 v_q;

  always_comb begin
    for (int k = 0; k < 4; k++) p[k] = cmin(in[2*k], in[2*k+1]);
    for (int k = 0; k < 4; k++) q[k] = cmin(p[k], p[(k+1)%4]);
    for (int k = 0; k < 4; k++) t[k] = cmin(q[(k+1)%4], p[(k+3)%4]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q  <= 1'b0;
      t_q  <= '0;
      in_d <= '0;
    end else begin
      v_q  <= in_valid;
      t_q  <= t;
      in_d <= in;
    end
  end

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      out[2*k]   = cmin(t_q[k], in_d[2*k+1]);
      out[2*k+1] = cmin(t_q[k], in_d[2*k]);
    end
  end

  assign out_valid = v_q;
endmodule
