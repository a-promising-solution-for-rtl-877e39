// bwa_comparator: decides whether a retrieved systematic codeword holds the incoming tag,
// without decoding it.
//
// The codeword is {parity[R-1:0], data[K-1:0]}. One XOR bank compares the stored data part
// with the incoming tag and a tag BWA counts the differing bits; a second XOR bank compares
// the stored parity with the parity of the encoded incoming tag and a parity BWA counts
// those. The data half needs nothing from the encoder, so it runs while the encoder is still
// working; only the short parity half waits for it. The second level merges the two weight
// vectors and the decision unit classifies the total Hamming distance d:
//     d <= 1 -> MATCH, d = 2 -> FAULT, d >= 3 -> MISMATCH.
// The comparator takes the incoming parity as an input so that one encoder can serve all
// ways of a set. Purely combinational.
module bwa_comparator
  import ecc_cmp_pkg::*;
#(
  parameter int unsigned K   = 18,                       // data (tag) bits
  localparam int unsigned R  = secded_parity_bits(K),    // parity bits
  localparam int unsigned N  = K + R,                    // codeword bits
  localparam int unsigned PT = 1 << $clog2(K),           // tag BWA output width
  localparam int unsigned PP = 1 << $clog2(R)            // parity BWA output width
) (
  input  logic [N-1:0] stored,      // retrieved codeword
  input  logic [K-1:0] in_tag,      // incoming tag
  input  logic [R-1:0] in_parity,   // parity bits of the encoded incoming tag
  output cmp_result_e  result,
  output logic         match,
  output logic         fault,
  output logic         mismatch
);
  logic [K-1:0]  tag_diff;
  logic [R-1:0]  par_diff;
  logic [PT-1:0] tag_w;
  logic [PP-1:0] par_w;
  logic          q, r, s, t, u, v;

  xor_bank #(.W(K)) u_tag_xor (.x(stored[K-1:0]), .y(in_tag),    .diff(tag_diff));
  xor_bank #(.W(R)) u_par_xor (.x(stored[N-1:K]), .y(in_parity), .diff(par_diff));

  bwa #(.W(K)) u_tag_bwa (.x(tag_diff), .w(tag_w));
  bwa #(.W(R)) u_par_bwa (.x(par_diff), .w(par_w));

  bwa_second_level #(.PT(PT), .PP(PP)) u_level2 (
    .tag_w(tag_w), .par_w(par_w), .q(q), .r(r), .s(s), .t(t), .u(u), .v(v)
  );

  decision_unit u_decide (
    .q(q), .r(r), .s(s), .t(t), .u(u), .v(v),
    .result(result), .match(match), .fault(fault), .mismatch(mismatch)
  );
endmodule
