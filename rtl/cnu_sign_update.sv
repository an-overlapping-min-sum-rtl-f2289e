// cnu_sign_update: sign part of the check node update (the "Sign" and
// "Xor Tree" boxes of the check node unit).
//
// For each of the N inputs it returns the product of the signs of all other
// inputs, i.e. the XOR of their sign bits (1 = negative). The XOR of all N
// signs is formed once by a tree of XOR gates and each input's own sign is
// XORed back out, so the circuit is XOR gates only. An input whose mask bit
// is 0 (an unused position of a degree-7 row) contributes a positive sign.
// Purely combinational.
module cnu_sign_update #(
  parameter int N = 8
) (
  input  logic [N-1:0] sign_in,   // sign bits of the inputs, 1 = negative
  input  logic [N-1:0] mask,      // 1 = input is an edge of this check node
  output logic [N-1:0] sign_out   // XOR of the other inputs' signs
);
  logic [N-1:0] s;
  logic         total;

  always_comb begin
    s        = sign_in & mask;
    total    = ^s;
    sign_out = {N{total}} ^ s;
  end
endmodule
