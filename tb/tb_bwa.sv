// tb_bwa: checks the butterfly-formed weight accumulator.
//  - 8 inputs, no pruning: all 256 words; the weighted outputs
//    8I + 4(J+K+M) + 2(L+N+O) + P must equal the number of ones.
//  - 18 inputs, no pruning: random words, weighted sum equals the number of ones.
//  - 18 and 6 inputs with the default pruning (OR gates from weight 4): the weight-1 and
//    weight-2 bits must give the exact count while it is below 4, and the count must read
//    as "4 or more" (a weight >= 4 bit set, or low weights summing to >= 4) otherwise.
module tb_bwa;
  int checks = 0, failures = 0;

  logic [7:0]  x8;
  logic [7:0]  w8;
  logic [17:0] x18;
  logic [31:0] w18x, w18s;
  logic [5:0]  x6;
  logic [7:0]  w6s;

  bwa #(.W(8),  .SAT_WEIGHT(1 << 20)) dut8   (.x(x8),  .w(w8));
  bwa #(.W(18), .SAT_WEIGHT(1 << 20)) dut18x (.x(x18), .w(w18x));
  bwa #(.W(18))                       dut18s (.x(x18), .w(w18s));
  bwa #(.W(6))                        dut6s  (.x(x6),  .w(w6s));

  function automatic int weighted(input logic [31:0] w, input int p);
    int s;
    s = 0;
    for (int j = 0; j < p; j++) if (w[j]) s += 1 << $countones(j);
    return s;
  endfunction

  // Pruned output: exact low part (weights 1 and 2) and "high" flag.
  task automatic check_pruned(input logic [31:0] w, input int p, input int ones,
                              input string what);
    int low;
    logic hi;
    low = 0;
    hi  = 1'b0;
    for (int j = 0; j < p; j++) begin
      if ($countones(j) <= 1) low += w[j] ? (1 << $countones(j)) : 0;
      else hi |= w[j];
    end
    checks++;
    if (ones < 4) begin
      if (hi || low != ones) begin
        failures++;
        $display("FAIL %s ones=%0d low=%0d hi=%b", what, ones, low, hi);
      end
    end else if (!(hi || low >= 4)) begin
      failures++;
      $display("FAIL %s ones=%0d low=%0d hi=%b", what, ones, low, hi);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic I, J, K, M, L, N, O, P;
    for (int i = 0; i < 256; i++) begin
      x8 = 8'(i);
      #1;
      P = w8[0]; L = w8[1]; N = w8[2]; O = w8[4];
      J = w8[3]; K = w8[5]; M = w8[6]; I = w8[7];
      checks++;
      if (8 * int'(I) + 4 * (int'(J) + int'(K) + int'(M)) + 2 * (int'(L) + int'(N) + int'(O))
          + int'(P) != $countones(x8)) begin
        failures++;
        $display("FAIL 8-input x=%b w=%b", x8, w8);
      end
    end
    for (int i = 0; i < 2000; i++) begin
      case (i % 4)
        0: x18 = 18'($urandom);
        1: x18 = 18'(1) << ($urandom % 18);
        2: x18 = (18'(1) << ($urandom % 18)) | (18'(1) << ($urandom % 18))
               | (18'(1) << ($urandom % 18));
        default: x18 = 18'($urandom) & 18'($urandom) & 18'($urandom);
      endcase
      x6 = 6'($urandom) & 6'($urandom);
      #1;
      checks++;
      if (weighted(w18x, 32) != $countones(x18)) begin
        failures++;
        $display("FAIL 18-input exact x=%b w=%b", x18, w18x);
      end
      check_pruned(w18s, 32, $countones(x18), "18-input pruned");
      check_pruned({24'b0, w6s}, 8, $countones(x6), "6-input pruned");
    end
    for (int i = 0; i < 64; i++) begin
      x6 = 6'(i);
      #1;
      check_pruned({24'b0, w6s}, 8, $countones(x6), "6-input pruned");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
