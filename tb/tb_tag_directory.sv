// tb_tag_directory: 8 sets x 4 ways of 24-bit codewords. Checks that valid bits are clear
// after reset, that a written entry is read back on the cycle after the read request with its
// valid bit set, that other ways keep their contents, that a read in the same cycle as a write
// to the same set returns the old contents, and that rd_codeword holds when rd_en is low.
module tb_tag_directory;
  localparam int N = 24, SETS = 8, WAYS = 4;
  int checks = 0, failures = 0;

  logic clk = 1'b0;
  logic rst_n;
  logic rd_en, wr_en;
  logic [2:0] rd_index, wr_index;
  logic [1:0] wr_way;
  logic [WAYS-1:0][N-1:0] rd_codeword;
  logic [WAYS-1:0] rd_valid;
  logic [N-1:0] wr_codeword;

  logic [N-1:0] model [SETS][WAYS];
  logic         mvalid [SETS][WAYS];

  tag_directory #(.N(N), .SETS(SETS), .WAYS(WAYS)) dut (
    .clk(clk), .rst_n(rst_n), .rd_en(rd_en), .rd_index(rd_index),
    .rd_codeword(rd_codeword), .rd_valid(rd_valid), .wr_en(wr_en), .wr_index(wr_index),
    .wr_way(wr_way), .wr_codeword(wr_codeword)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read(input int set);
    for (int w = 0; w < WAYS; w++) begin
      checks++;
      if (rd_valid[w] !== mvalid[set][w] ||
          (mvalid[set][w] && rd_codeword[w] !== model[set][w])) begin
        failures++;
        $display("FAIL set %0d way %0d valid %b/%b data %h/%h", set, w, rd_valid[w],
                 mvalid[set][w], rd_codeword[w], model[set][w]);
      end
    end
  endtask

  initial begin
    int set;
    int same_set_rw;
    same_set_rw = 0;
    rst_n = 1'b0; rd_en = 0; wr_en = 0; rd_index = 0; wr_index = 0; wr_way = 0;
    wr_codeword = 0;
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) mvalid[s][w] = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // all invalid after reset
    for (int s = 0; s < SETS; s++) begin
      @(negedge clk); rd_en = 1; rd_index = 3'(s);
      @(negedge clk); rd_en = 0; check_read(s);
    end
    // random writes and reads
    for (int i = 0; i < 600; i++) begin
      logic          we;
      logic [2:0]    widx;
      logic [1:0]    wway;
      logic [N-1:0]  wcw;
      @(negedge clk);
      we   = 1'($urandom);
      widx = 3'($urandom);
      wway = 2'($urandom);
      wcw  = N'($urandom);
      wr_en = we; wr_index = widx; wr_way = wway; wr_codeword = wcw;
      rd_en = 1;
      rd_index = (i % 5 == 0) ? widx : 3'($urandom);
      set = int'(rd_index);
      if (we && rd_index == widx) same_set_rw++;
      @(negedge clk);
      wr_en = 0; rd_en = 0;
      // the read saw the contents from before the write of the same edge
      check_read(set);
      if (i % 7 == 0) begin
        // rd_en low: the output holds
        @(negedge clk);
        check_read(set);
      end
      if (we) begin
        model[widx][wway]  = wcw;
        mvalid[widx][wway] = 1'b1;
      end
    end
    // read every set once more
    for (int s = 0; s < SETS; s++) begin
      @(negedge clk); rd_en = 1; rd_index = 3'(s);
      @(negedge clk); rd_en = 0; check_read(s);
    end
    checks++;
    if (same_set_rw == 0) begin
      failures++;
      $display("FAIL read and write to the same set never happened together");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
