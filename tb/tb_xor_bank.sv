// tb_xor_bank: random and walking-one words through an 18-bit XOR bank, checked against x ^ y.
module tb_xor_bank;
  localparam int W = 18;
  logic [W-1:0] x, y, diff;
  int checks = 0, failures = 0;

  xor_bank #(.W(W)) dut (.x(x), .y(y), .diff(diff));

  task automatic check();
    #1;
    checks++;
    if (diff !== (x ^ y)) begin
      failures++;
      $display("FAIL x=%h y=%h diff=%h", x, y, diff);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < W; i++) begin
      x = W'(1) << i; y = '0; check();
      x = '1; y = ~(W'(1) << i); check();
    end
    for (int i = 0; i < 500; i++) begin
      x = W'($urandom); y = W'($urandom); check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
