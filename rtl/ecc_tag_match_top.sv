// ecc_tag_match_top: tag lookup of a set-associative cache whose tags are stored with a
// systematic SEC-DED code, compared without decoding them.
//
// Lookup: lookup_valid with lookup_index and lookup_tag starts a lookup. On that clock edge
// the tag directory reads the codewords of all ways of the set while the incoming tag is
// registered. In the following cycle the incoming tag is encoded and, at the same time, its
// data bits are compared with the data parts of the retrieved codewords; the parity bits join
// once the encoder is done. Each way has its own BWA comparator, and the results are
// presented combinationally from those registers, with result_valid high, one cycle after
// the request:
//   result_way_match[w] - way w is valid and its codeword is within distance 1 of the
//                         encoded tag (a hit; a single stored bit error is tolerated),
//   result_way_fault[w] - way w is valid and at distance 2 (uncorrectable error),
//   result_way_mismatch[w] - way w is valid and holds another tag (distance >= 3),
//   result_hit / result_hit_way - some way matched / the lowest such way,
//   result_mca          - a machine-check condition: some valid way reported a fault.
// A lookup may start every cycle.
//
// Fill: after a miss, fill_valid with fill_index, fill_way and fill_tag encodes the tag
// with a second encoder ("ECC Gen") and writes the codeword into the directory; the entry
// can be looked up from the next cycle on.
//
// The comparison datapath follows the BWA architecture for systematic codes. The set and
// way counts, the one-cycle pipeline, the valid bits, the lowest-way priority and the
// separate fill encoder are this design's choices.
module ecc_tag_match_top
  import ecc_cmp_pkg::*;
#(
  parameter int unsigned K      = 18,                      // tag bits ((24,18) code)
  parameter int unsigned SETS   = 64,                      // directory sets
  parameter int unsigned WAYS   = 4,                       // directory ways
  localparam int unsigned R     = secded_parity_bits(K),
  localparam int unsigned N     = K + R,
  localparam int unsigned IDX_W = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // lookup request
  input  logic             lookup_valid,
  input  logic [IDX_W-1:0] lookup_index,
  input  logic [K-1:0]     lookup_tag,
  // fill (write an encoded tag)
  input  logic             fill_valid,
  input  logic [IDX_W-1:0] fill_index,
  input  logic [WAY_W-1:0] fill_way,
  input  logic [K-1:0]     fill_tag,
  // lookup result, one cycle after the request
  output logic             result_valid,
  output logic             result_hit,
  output logic [WAY_W-1:0] result_hit_way,
  output logic [WAYS-1:0]  result_way_match,
  output logic [WAYS-1:0]  result_way_fault,
  output logic [WAYS-1:0]  result_way_mismatch,
  output logic             result_mca
);
  // ---------------- fill path: ECC Gen + directory write ----------------
  logic [R-1:0] fill_parity;
  secded_encoder #(.K(K)) u_ecc_gen (.data(fill_tag), .parity(fill_parity));

  // ---------------- directory read, in parallel with tag capture ----------------
  logic [WAYS-1:0][N-1:0] rd_codeword;
  logic [WAYS-1:0]        rd_valid;

  tag_directory #(.N(N), .SETS(SETS), .WAYS(WAYS)) u_dir (
    .clk(clk), .rst_n(rst_n),
    .rd_en(lookup_valid), .rd_index(lookup_index),
    .rd_codeword(rd_codeword), .rd_valid(rd_valid),
    .wr_en(fill_valid), .wr_index(fill_index), .wr_way(fill_way),
    .wr_codeword({fill_parity, fill_tag})
  );

  logic [K-1:0] tag_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result_valid <= 1'b0;
      tag_q        <= '0;
    end else begin
      result_valid <= lookup_valid;
      if (lookup_valid) tag_q <= lookup_tag;
    end
  end

  // ---------------- compare stage ----------------
  logic [R-1:0] tag_parity;
  secded_encoder #(.K(K)) u_enc (.data(tag_q), .parity(tag_parity));

  logic [WAYS-1:0] way_match, way_fault, way_mismatch;
  for (genvar w = 0; w < WAYS; w++) begin : g_way
    bwa_comparator #(.K(K)) u_cmp (
      .stored(rd_codeword[w]), .in_tag(tag_q), .in_parity(tag_parity),
      .result(), .match(way_match[w]), .fault(way_fault[w]), .mismatch(way_mismatch[w])
    );
  end

  assign result_way_match = way_match & rd_valid;
  assign result_way_fault = way_fault & rd_valid;
  assign result_way_mismatch = way_mismatch & rd_valid;
  assign result_hit       = |result_way_match;
  assign result_mca       = |result_way_fault;

  // Each valid way is classified exactly once; an invalid way reports nothing.
  for (genvar w = 0; w < WAYS; w++) begin : g_check
    a_way_class: assert property (@(posedge clk)
      $onehot0({result_way_match[w], result_way_fault[w], result_way_mismatch[w]}) &&
      (rd_valid[w] == (result_way_match[w] | result_way_fault[w] | result_way_mismatch[w])))
      else $error("way %0d: inconsistent classification", w);
  end

  always_comb begin
    result_hit_way = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (result_way_match[w]) result_hit_way = WAY_W'(w);
    end
  end
endmodule
