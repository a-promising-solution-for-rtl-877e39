// tb_ecc_tag_match_top: end-to-end test of the ECC tag-match unit at its default size
// (18-bit tags, (24,18) code, 64 sets x 4 ways).
//
// A reference model keeps, per set and way, the stored codeword (reference encoding of the
// filled tag, XOR any bits the test has flipped in the array) and the valid bit. Every cycle
// the test may start a lookup, a fill, or both, and may flip one to three bits of a stored
// codeword directly in the directory array to model storage errors. One cycle after each
// lookup it checks result_valid and, per way, match / fault / mismatch against the class of
// the Hamming distance between the stored codeword and the encoded lookup tag, plus
// result_hit, result_hit_way (lowest matching way) and result_mca.
// Each mechanism is counted and must happen at least once: exact hit, hit on a codeword with
// one flipped bit, fault (machine check), mismatch, lookup of an invalid way, fill, back-to-back
// lookups, and a lookup and a fill of the same set in one cycle.
module tb_ecc_tag_match_top;
  import tb_ecc_ref_pkg::*;
  localparam int K = 18, R = 6, N = 24, SETS = 64, WAYS = 4;

  int checks = 0, failures = 0;

  logic clk = 1'b0;
  logic rst_n;
  logic          lookup_valid;
  logic [5:0]    lookup_index;
  logic [K-1:0]  lookup_tag;
  logic          fill_valid;
  logic [5:0]    fill_index;
  logic [1:0]    fill_way;
  logic [K-1:0]  fill_tag;
  logic          result_valid, result_hit, result_mca;
  logic [1:0]    result_hit_way;
  logic [WAYS-1:0] result_way_match, result_way_fault, result_way_mismatch;

  ecc_tag_match_top dut (
    .clk(clk), .rst_n(rst_n),
    .lookup_valid(lookup_valid), .lookup_index(lookup_index), .lookup_tag(lookup_tag),
    .fill_valid(fill_valid), .fill_index(fill_index), .fill_way(fill_way),
    .fill_tag(fill_tag),
    .result_valid(result_valid), .result_hit(result_hit), .result_hit_way(result_hit_way),
    .result_way_match(result_way_match), .result_way_fault(result_way_fault),
    .result_way_mismatch(result_way_mismatch), .result_mca(result_mca)
  );

  always #5 clk = ~clk;

  // reference state
  logic [N-1:0] m_cw    [SETS][WAYS];
  logic [K-1:0] m_tag   [SETS][WAYS];
  logic         m_valid [SETS][WAYS];

  // expected result of the lookup in flight
  logic            exp_pending;
  logic [WAYS-1:0] exp_match, exp_fault, exp_mis;
  logic            exp_hit, exp_mca;
  logic [1:0]      exp_way;
  // copy of the expectation being checked (the lookup issued one cycle earlier)
  logic            chk_pending;
  logic [WAYS-1:0] chk_match, chk_fault, chk_mis;
  logic            chk_hit, chk_mca;
  logic [1:0]      chk_way;

  // mechanism counters
  int n_exact_hit, n_corrected_hit, n_fault, n_mismatch, n_invalid, n_fill, n_b2b, n_rw_same;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] encode(input logic [K-1:0] t);
    return {R'(ref_parity(K, 64'(t))), t};
  endfunction

  task automatic expect_lookup(input int set, input logic [K-1:0] tag);
    int d;
    logic [N-1:0] enc;
    enc = encode(tag);
    exp_match = '0; exp_fault = '0; exp_mis = '0;
    exp_hit = 1'b0; exp_mca = 1'b0; exp_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (!m_valid[set][w]) begin
        n_invalid++;
        continue;
      end
      d = $countones(m_cw[set][w] ^ enc);
      case (ref_class(d))
        0: begin
          exp_match[w] = 1'b1;
          if (d == 0) n_exact_hit++; else n_corrected_hit++;
        end
        1: begin exp_fault[w] = 1'b1; n_fault++; end
        default: begin exp_mis[w] = 1'b1; n_mismatch++; end
      endcase
    end
    exp_hit = |exp_match;
    exp_mca = |exp_fault;
    for (int w = WAYS - 1; w >= 0; w--) if (exp_match[w]) exp_way = 2'(w);
  endtask

  task automatic check_result();
    checks++;
    if (result_valid !== chk_pending) begin
      failures++;
      $display("FAIL result_valid %b expected %b", result_valid, chk_pending);
    end
    if (chk_pending) begin
      checks++;
      if (result_way_match !== chk_match || result_way_fault !== chk_fault ||
          result_way_mismatch !== chk_mis || result_hit !== chk_hit ||
          result_mca !== chk_mca || (chk_hit && result_hit_way !== chk_way)) begin
        failures++;
        $display("FAIL match %b/%b fault %b/%b mis %b/%b hit %b/%b way %0d/%0d mca %b/%b",
                 result_way_match, chk_match, result_way_fault, chk_fault,
                 result_way_mismatch, chk_mis, result_hit, chk_hit, result_hit_way, chk_way,
                 result_mca, chk_mca);
      end
    end
  endtask

  // flip bits of a stored codeword in the array and in the model
  task automatic inject(input int set, input int way, input int nbits);
    logic [N-1:0] mask;
    mask = '0;
    while ($countones(mask) < nbits) mask[$urandom % N] = 1'b1;
    dut.u_dir.mem[set][way] = dut.u_dir.mem[set][way] ^ mask;
    m_cw[set][way] = m_cw[set][way] ^ mask;
  endtask

  initial begin
    int set, way, prev_lookup;
    logic [K-1:0] tag;
    n_exact_hit = 0; n_corrected_hit = 0; n_fault = 0; n_mismatch = 0; n_invalid = 0;
    n_fill = 0; n_b2b = 0; n_rw_same = 0;
    exp_pending = 1'b0;
    chk_pending = 1'b0;
    prev_lookup = 0;
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) m_valid[s][w] = 1'b0;
    rst_n = 1'b0;
    lookup_valid = 0; lookup_index = 0; lookup_tag = 0;
    fill_valid = 0; fill_index = 0; fill_way = 0; fill_tag = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      // the lookup issued last cycle is checked after the next request is on the inputs,
      // so a result that leaked from the inputs instead of the pipeline register shows
      chk_pending = exp_pending; chk_match = exp_match; chk_fault = exp_fault;
      chk_mis = exp_mis; chk_hit = exp_hit; chk_mca = exp_mca; chk_way = exp_way;
      // storage errors, only in entries the model already holds
      if (cyc > 400 && ($urandom % 6) == 0) begin
        set = $urandom % SETS; way = $urandom % WAYS;
        if (m_valid[set][way]) inject(set, way, 1 + ($urandom % 3));
      end
      // lookup
      lookup_valid = (cyc < 400) ? (cyc % 4 == 0) : (($urandom % 4) != 0);
      lookup_index = 6'($urandom);
      set = int'(lookup_index);
      way = $urandom % WAYS;
      case ($urandom % 4)
        0: tag = K'($urandom);
        1: tag = m_tag[set][way] ^ (K'(1) << ($urandom % K));
        default: tag = m_tag[set][way];
      endcase
      lookup_tag = tag;
      exp_pending = lookup_valid;
      if (lookup_valid) begin
        expect_lookup(set, tag);
        if (prev_lookup != 0) n_b2b++;
      end
      prev_lookup = int'(lookup_valid);
      // fill: all entries first, then occasional refills
      if (n_fill < SETS * WAYS) begin
        // initial fill of every entry, one per cycle
        fill_valid = 1'b1;
        fill_index = 6'(n_fill % SETS);
        fill_way   = 2'(n_fill / SETS);
      end else begin
        fill_valid = (($urandom % 8) == 0);
        fill_index = (($urandom % 4) == 0) ? lookup_index : 6'($urandom);
        fill_way   = 2'($urandom);
      end
      fill_tag = K'($urandom);
      if (fill_valid) begin
        n_fill++;
        if (lookup_valid && fill_index == lookup_index) n_rw_same++;
        m_tag[fill_index][fill_way]   = fill_tag;
        m_cw[fill_index][fill_way]    = encode(fill_tag);
        m_valid[fill_index][fill_way] = 1'b1;
      end
      #1 check_result();
    end
    @(negedge clk);
    chk_pending = exp_pending; chk_match = exp_match; chk_fault = exp_fault;
    chk_mis = exp_mis; chk_hit = exp_hit; chk_mca = exp_mca; chk_way = exp_way;
    lookup_valid = 1'b0;
    fill_valid = 1'b0;
    #1 check_result();

    $display("exact hits %0d, hits with one flipped bit %0d, faults %0d, mismatches %0d",
             n_exact_hit, n_corrected_hit, n_fault, n_mismatch);
    $display("invalid ways looked up %0d, fills %0d, back-to-back lookups %0d, same-set lookup+fill %0d",
             n_invalid, n_fill, n_b2b, n_rw_same);
    begin
      int counts[8];
      counts = '{n_exact_hit, n_corrected_hit, n_fault, n_mismatch, n_invalid, n_fill, n_b2b,
                 n_rw_same};
      foreach (counts[i]) begin
        checks++;
        if (counts[i] == 0) begin
          failures++;
          $display("FAIL mechanism %0d never happened", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
