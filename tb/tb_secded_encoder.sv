// tb_secded_encoder: checks the (24,18) and (8,4) parity generators against the position
// form of the extended Hamming code (tb_ecc_ref_pkg), and checks the distance property that
// the comparator relies on: two different tags give codewords at least 4 bits apart
// (all pairs for the (8,4) code, random and one-to-three-bit-apart pairs for (24,18)).
module tb_secded_encoder;
  import tb_ecc_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [17:0] d18a, d18b;
  logic [5:0]  p18a, p18b;
  logic [3:0]  d4a, d4b;
  logic [3:0]  p4a, p4b;

  secded_encoder #(.K(18)) dut18a (.data(d18a), .parity(p18a));
  secded_encoder #(.K(18)) dut18b (.data(d18b), .parity(p18b));
  secded_encoder #(.K(4))  dut4a  (.data(d4a),  .parity(p4a));
  secded_encoder #(.K(4))  dut4b  (.data(d4b),  .parity(p4b));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hd;
    // (8,4): every codeword against the reference, every pair at distance >= 4.
    for (int a = 0; a < 16; a++) begin
      for (int b = 0; b < 16; b++) begin
        d4a = 4'(a); d4b = 4'(b);
        #1;
        if (b == 0) begin
          checks++;
          if (p4a !== 4'(ref_parity(4, 64'(a)))) begin
            failures++;
            $display("FAIL (8,4) data=%h parity=%h ref=%h", d4a, p4a, ref_parity(4, 64'(a)));
          end
        end
        if (a != b) begin
          hd = $countones({p4a, d4a} ^ {p4b, d4b});
          checks++;
          if (hd < 4) begin
            failures++;
            $display("FAIL (8,4) distance %0d between %h and %h", hd, d4a, d4b);
          end
        end
      end
    end
    // (24,18)
    for (int i = 0; i < 3000; i++) begin
      d18a = 18'($urandom);
      case (i % 3)
        0: d18b = d18a ^ (18'(1) << ($urandom % 18));
        1: d18b = d18a ^ (18'(1) << ($urandom % 18)) ^ (18'(1) << ($urandom % 18));
        default: d18b = 18'($urandom);
      endcase
      #1;
      checks++;
      if (p18a !== 6'(ref_parity(18, 64'(d18a)))) begin
        failures++;
        $display("FAIL (24,18) data=%h parity=%h ref=%h", d18a, p18a,
                 ref_parity(18, 64'(d18a)));
      end
      if (d18a != d18b) begin
        hd = $countones({p18a, d18a} ^ {p18b, d18b});
        checks++;
        if (hd < 4) begin
          failures++;
          $display("FAIL (24,18) distance %0d between %h and %h", hd, d18a, d18b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
