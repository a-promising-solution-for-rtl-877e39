// tb_decision_unit: all 64 input combinations against the decision truth table.
module tb_decision_unit;
  import ecc_cmp_pkg::*;
  logic q, r, s, t, u, v;
  cmp_result_e result;
  logic match, fault, mismatch;
  int checks = 0, failures = 0;

  decision_unit dut (.q(q), .r(r), .s(s), .t(t), .u(u), .v(v),
                     .result(result), .match(match), .fault(fault), .mismatch(mismatch));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] exp;  // {mismatch, fault, match}
    for (int i = 0; i < 64; i++) begin
      {q, r, s, t, u, v} = 6'(i);
      #1;
      casez ({q | r | s, t, u, v})
        4'b1???: exp = 3'b100;
        4'b000?: exp = 3'b001;
        4'b001?: exp = 3'b010;
        4'b0100: exp = 3'b010;
        4'b0101: exp = 3'b100;
        default: exp = 3'b100;   // 011x
      endcase
      checks++;
      if ({mismatch, fault, match} !== exp ||
          result !== (exp[0] ? CMP_MATCH : exp[1] ? CMP_FAULT : CMP_MISMATCH)) begin
        failures++;
        $display("FAIL qrstuv=%b got %b/%s expected %b", 6'(i), {mismatch, fault, match},
                 result.name(), exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
