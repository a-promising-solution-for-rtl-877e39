// xor_bank: bitwise difference of two W-bit words, one reduced-gate XOR (mod_xor) per bit.
//
// In the comparator one bank takes the data part of the retrieved codeword and the incoming
// tag, a second bank takes the retrieved parity bits and the parity bits of the encoded
// incoming tag. A 1 at bit i of diff means the words differ at bit i, so the number of ones
// in diff is their Hamming distance. Purely combinational.
module xor_bank #(
  parameter int unsigned W = 18  // word width (18 = data part of the (24,18) code)
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] diff
);
  for (genvar i = 0; i < W; i++) begin : g_bit
    mod_xor u_xor (.a(x[i]), .b(y[i]), .y(diff[i]));
  end
endmodule
