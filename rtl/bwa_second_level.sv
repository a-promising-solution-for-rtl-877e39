// bwa_second_level: merges the weight bits of the tag BWA and of the parity BWA into the six
// signals Q, R, S, T, U, V that the decision unit reads.
//
// Input bit j of either BWA has weight 2**popcount(j) (see bwa). The two weight-1 bits go to
// one half adder: V is its sum (weight 1), U its carry (weight 2). The weight-2 bits of both
// BWAs go to an OR tree, T, and to a "two or more" detector, S, because two weight-2 ones
// already mean a distance of at least 4. Q and R are ORs of the tag and parity bits of weight
// 4 or more. So, whenever Q = R = S = 0, the total distance is exactly
//     d = V + 2*(U + T).
// This is the SEC-DED (single-error-correcting) form of the second level, with six outputs
// as for the (8,4) example; how the bits are grouped is this design's reconstruction.
// Purely combinational.
module bwa_second_level
  import ecc_cmp_pkg::*;
#(
  parameter int unsigned PT = 32,  // width of the tag BWA output  (18 data bits -> 32)
  parameter int unsigned PP = 8    // width of the parity BWA output (6 parity bits -> 8)
) (
  input  logic [PT-1:0] tag_w,
  input  logic [PP-1:0] par_w,
  output logic          q,   // a tag weight bit of weight >= 4 is set
  output logic          r,   // a parity weight bit of weight >= 4 is set
  output logic          s,   // two or more weight-2 bits are set
  output logic          t,   // at least one weight-2 bit is set
  output logic          u,   // carry of the weight-1 half adder (weight 2)
  output logic          v    // sum of the weight-1 half adder (weight 1)
);
  mod_ha u_w1 (.a(tag_w[0]), .b(par_w[0]), .sum(v), .carry(u));

  // Sum and carry of one half adder are never both 1 (the decision table relies on it).
  always_comb begin
    a_uv: assert (!(u && v)) else $error("weight-1 half adder gave sum and carry together");
  end

  always_comb begin
    logic any2, two2;
    q    = 1'b0;
    r    = 1'b0;
    any2 = 1'b0;
    two2 = 1'b0;
    for (int unsigned j = 1; j < PT; j++) begin
      if (popcount(j) == 1) begin
        two2 = two2 | (any2 & tag_w[j]);
        any2 = any2 | tag_w[j];
      end else begin
        q = q | tag_w[j];
      end
    end
    for (int unsigned j = 1; j < PP; j++) begin
      if (popcount(j) == 1) begin
        two2 = two2 | (any2 & par_w[j]);
        any2 = any2 | par_w[j];
      end else begin
        r = r | par_w[j];
      end
    end
    s = two2;
    t = any2;
  end
endmodule
