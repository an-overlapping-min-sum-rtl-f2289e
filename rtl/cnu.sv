// cnu: check node unit, the min-sum row update for one check node
// with up to eight edges.
//
//   out[i] = ( prod_{k != i} sign(in[k]) ) * min_{k != i} |in[k]|
//
// Datapath, in the order of the check node block diagram: the two's
// complement inputs are split into a sign bit and a 5-bit magnitude (ABS,
// with -32 saturated to 31 so the magnitude fits); the magnitudes go through
// the 20-comparator minimum network (cnu_min_network) and the signs through
// the XOR network (cnu_sign_update); finally each sign is applied to its
// magnitude again, giving a two's complement output in [-31, 31].
// Rows of degree 7 use seven inputs: the unused input's magnitude is forced
// to the maximum and its sign to positive, so it never wins a minimum or
// flips a sign, and its output is driven to 0 (ignored by the memory).
//
// Interface: in/mask are sampled with in_valid; out/out_valid appear two
// clocks later (one register inside the minimum network, one output
// register). A new set of inputs can be accepted every clock.
module cnu
  import ldpc_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic [DC-1:0]               mask,   // 1 = edge present
  input  logic signed [DC-1:0][W-1:0] in,     // variable-to-check messages
  output logic                        out_valid,
  output logic signed [DC-1:0][W-1:0] out     // check-to-variable messages
);
  logic [DC-1:0][MW-1:0] mag, min_o;
  logic [DC-1:0]         sgn, sgn_o, sgn_q, mask_q;
  logic                  mv;

  // Sign / magnitude split
  always_comb begin
    for (int i = 0; i < DC; i++) begin
      sgn[i] = in[i][W-1];
      if (!mask[i])
        mag[i] = '1;
      else if (in[i] == -(W'(1) <<< (W-1)))
        mag[i] = '1;
      else if (in[i][W-1])
        mag[i] = MW'(-in[i]);
      else
        mag[i] = in[i][MW-1:0];
    end
  end

  cnu_min_network #(.MWID(MW)) u_min (
    .clk, .rst_n, .in_valid, .in(mag), .out_valid(mv), .out(min_o)
  );

  cnu_sign_update #(.N(DC)) u_sign (
    .sign_in(sgn), .mask, .sign_out(sgn_o)
  );

  // Sign delay matching the register inside the minimum network
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sgn_q  <= '0;
      mask_q <= '0;
    end else begin
      sgn_q  <= sgn_o;
      mask_q <= mask;
    end
  end

  // Sign is applied again; output register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      out_valid <= mv;
      for (int i = 0; i < DC; i++) begin
        if (!mask_q[i])
          out[i] <= '0;
        else if (sgn_q[i])
          out[i] <= -$signed({1'b0, min_o[i]});
        else
          out[i] <= $signed({1'b0, min_o[i]});
      end
    end
  end
endmodule
