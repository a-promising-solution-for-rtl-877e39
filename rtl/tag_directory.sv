// tag_directory: the tag array of a set-associative cache, holding ECC-encoded tags.
//
// SETS sets of WAYS entries, each an N-bit codeword plus a valid bit. A read (rd_en) returns
// the codewords and valid bits of all ways of one set on the next clock edge (synchronous
// read, as from an SRAM array). A write (wr_en) stores one codeword into one way and marks it
// valid; on a read and a write to the same set in one cycle the read returns the old
// contents. Valid bits are cleared by the active-low reset; codewords are not reset.
// Set and way counts, the valid bits and the read/write timing are this design's choices.
module tag_directory #(
  parameter int unsigned N      = 24,   // codeword bits
  parameter int unsigned SETS   = 64,   // number of sets
  parameter int unsigned WAYS   = 4,    // entries per set
  localparam int unsigned IDX_W = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    rd_en,
  input  logic [IDX_W-1:0]        rd_index,
  output logic [WAYS-1:0][N-1:0]  rd_codeword,
  output logic [WAYS-1:0]         rd_valid,
  input  logic                    wr_en,
  input  logic [IDX_W-1:0]        wr_index,
  input  logic [WAY_W-1:0]        wr_way,
  input  logic [N-1:0]            wr_codeword
);
  logic [WAYS-1:0][N-1:0] mem   [SETS];
  logic [WAYS-1:0]        valid [SETS];

  always_ff @(posedge clk) begin
    if (rd_en) rd_codeword <= mem[rd_index];
    if (wr_en) mem[wr_index][wr_way] <= wr_codeword;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < SETS; i++) valid[i] <= '0;
      rd_valid <= '0;
    end else begin
      if (rd_en) rd_valid <= valid[rd_index];
      if (wr_en) valid[wr_index][wr_way] <= 1'b1;
    end
  end

  initial begin
    assert (SETS >= 1 && WAYS >= 1) else $error("tag_directory: SETS and WAYS must be >= 1");
  end
endmodule
