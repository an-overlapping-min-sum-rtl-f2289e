// parity_check: syndrome of the hard decisions, H * c^T.
//
// Bit (c, lane) of the code word is hd[c*Z + lane]. Check (r, z) is the XOR
// of the bits (c, (z + BASE[r][c]) mod Z) over the nonzero blocks of block
// row r, so the circuit is 324 XOR trees of 7 or 8 inputs, wired at
// elaboration time from the base matrix. ok is 1 when every check is
// satisfied. Purely combinational.
module parity_check
  import ldpc_pkg::*;
(
  input  logic [N-1:0] hd,        // hard decisions, bit c*Z + lane
  output logic [M-1:0] syndrome,  // check r*Z + z, 1 = violated
  output logic         ok         // all checks satisfied
);
  for (genvar r = 0; r < MB; r++) begin : g_row
    for (genvar z = 0; z < Z; z++) begin : g_lane
      always_comb begin
        logic acc;
        acc = 1'b0;
        for (int c = 0; c < NB; c++)
          if (BASE[r][c] >= 0) acc ^= hd[c*Z + (z + BASE[r][c]) % Z];
        syndrome[r*Z + z] = acc;
      end
    end
  end

  assign ok = ~|syndrome;
endmodule
