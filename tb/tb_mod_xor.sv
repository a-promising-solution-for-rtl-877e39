// tb_mod_xor: exhaustive check of the four-NAND XOR against a ^ b.
module tb_mod_xor;
  logic a, b, y;
  int checks = 0, failures = 0;

  mod_xor dut (.a(a), .b(b), .y(y));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (y !== (a ^ b)) begin
        failures++;
        $display("FAIL a=%b b=%b y=%b", a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
