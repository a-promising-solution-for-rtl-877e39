// bwa: butterfly-formed weight accumulator - counts the ones in a W-bit word with a
// butterfly of half adders whose outputs carry binary weights.
//
// The input is padded with zeros to P = 2**L bits. Stage s (0 .. L-1) pairs every index i
// whose bit s is 0 with partner i | 2**s and feeds the two bits to a half adder (mod_ha):
// the sum goes back to position i with the same weight, the carry to position i | 2**s with
// twice the weight. Both bits of a pair always have the same weight, so after the last stage
// output bit j has weight 2**popcount(j) and
//     number of ones in x = sum over j of w[j] * 2**popcount(j).
// For 8 inputs this is the familiar d = 8I + 4(J+K+M) + 2(L+N+O) + P with
// P = w[0]; L,N,O = w[1],w[2],w[4]; J,K,M = w[3],w[5],w[6]; I = w[7].
//
// When only small distances matter the tree is pruned: a pair whose weight is SAT_WEIGHT or
// more is merged by an OR gate instead of a half adder (its carry position becomes 0). Such
// an output bit then only says "the distance is at least its weight". With the default
// SAT_WEIGHT = 4, as needed for single-error-correcting codes, weights 1 and 2 stay exact.
// The zero padding and the exact pruning threshold are this design's choices.
//
// Purely combinational: the depth is L half-adder (or OR) levels.
module bwa
  import ecc_cmp_pkg::*;
#(
  parameter int unsigned W          = 18,  // number of input bits
  parameter int unsigned SAT_WEIGHT = 4,   // pairs of at least this weight use an OR gate
  localparam int unsigned L         = (W > 1) ? $clog2(W) : 0,
  localparam int unsigned P         = 1 << L
) (
  input  logic [W-1:0] x,
  output logic [P-1:0] w   // weight of w[j] is 2**popcount(j)
);
  logic [P-1:0] v [0:L];

  if (P > W) begin : g_pad
    assign v[0] = {{(P - W){1'b0}}, x};
  end else begin : g_nopad
    assign v[0] = x;
  end

  for (genvar s = 0; s < L; s++) begin : g_stage
    for (genvar i = 0; i < P; i++) begin : g_node
      if (((i >> s) & 1) == 0) begin : g_pair
        localparam int unsigned J      = i | (1 << s);
        localparam int unsigned WEIGHT = 1 << popcount(i & ((1 << s) - 1));
        if (WEIGHT >= SAT_WEIGHT) begin : g_or
          assign v[s+1][i] = v[s][i] | v[s][J];
          assign v[s+1][J] = 1'b0;
        end else begin : g_ha
          mod_ha u_ha (.a(v[s][i]), .b(v[s][J]), .sum(v[s+1][i]), .carry(v[s+1][J]));
        end
      end
    end
  end

  assign w = v[L];
endmodule
