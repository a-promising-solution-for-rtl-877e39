// tb_bwa_comparator: the comparator for the (24,18) code and for the (8,4) code.
// Stored codewords are reference encodings of a tag with 0 to 4 bits flipped (in the data
// part, the parity part or both); the incoming tag is the same tag, a tag one bit away or
// a random tag. The expected result comes from the Hamming distance between the stored
// word and the reference encoding of the incoming tag: <= 1 match, 2 fault, >= 3 mismatch.
// For the (8,4) code all 16 tags are tried against all 256 stored words.
module tb_bwa_comparator;
  import ecc_cmp_pkg::*;
  import tb_ecc_ref_pkg::*;
  int checks = 0, failures = 0;
  int seen [3];

  logic [23:0] st18;
  logic [17:0] tag18;
  logic [5:0]  par18;
  cmp_result_e res18;
  logic m18, f18, x18;

  logic [7:0]  st4;
  logic [3:0]  tag4;
  logic [3:0]  par4;
  cmp_result_e res4;
  logic m4, f4, x4;

  bwa_comparator #(.K(18)) dut18 (.stored(st18), .in_tag(tag18), .in_parity(par18),
                                  .result(res18), .match(m18), .fault(f18), .mismatch(x18));
  bwa_comparator #(.K(4))  dut4  (.stored(st4), .in_tag(tag4), .in_parity(par4),
                                  .result(res4), .match(m4), .fault(f4), .mismatch(x4));

  task automatic check(input int exp, input logic m, input logic f, input logic x,
                       input cmp_result_e res, input string what);
    checks++;
    seen[exp]++;
    if ({x, f, m} !== (3'b1 << exp) || int'(res) != exp) begin
      failures++;
      $display("FAIL %s expected class %0d got m%b f%b x%b %s", what, exp, m, f, x,
               res.name());
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [17:0] a;
    logic [23:0] cw, err;
    int d;
    for (int i = 0; i < 4000; i++) begin
      a   = 18'($urandom);
      cw  = {6'(ref_parity(18, 64'(a))), a};
      err = '0;
      for (int e = 0; e < int'($urandom % 5); e++) err[$urandom % 24] = 1'b1;
      st18 = cw ^ err;
      case ($urandom % 3)
        0: tag18 = a;
        1: tag18 = a ^ (18'(1) << ($urandom % 18));
        default: tag18 = 18'($urandom);
      endcase
      par18 = 6'(ref_parity(18, 64'(tag18)));
      #1;
      d = $countones(st18 ^ {par18, tag18});
      check(ref_class(d), m18, f18, x18, res18, $sformatf("(24,18) d=%0d", d));
    end
    for (int t = 0; t < 16; t++) begin
      for (int s = 0; s < 256; s++) begin
        tag4 = 4'(t);
        par4 = 4'(ref_parity(4, 64'(t)));
        st4  = 8'(s);
        #1;
        d = $countones(st4 ^ {par4, tag4});
        check(ref_class(d), m4, f4, x4, res4, $sformatf("(8,4) d=%0d", d));
      end
    end
    $display("classes seen: match %0d fault %0d mismatch %0d", seen[0], seen[1], seen[2]);
    for (int c = 0; c < 3; c++) begin
      checks++;
      if (seen[c] == 0) begin
        failures++;
        $display("FAIL class %0d never exercised", c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
