// tb_bwa_second_level: drives the second level with the outputs of real tag (18-bit) and
// parity (6-bit) BWAs and checks, for random difference vectors with few and many ones,
// that Q,R,S,T,U,V describe the total distance d: Q|R|S only when d >= 4, and otherwise
// d == V + 2*(U + T). It also checks each signal against its own definition on random
// weight vectors.
module tb_bwa_second_level;
  int checks = 0, failures = 0;

  logic [17:0] xt;
  logic [5:0]  xp;
  logic [31:0] tw;
  logic [7:0]  pw;
  logic [31:0] tw_in;
  logic [7:0]  pw_in;
  logic        sel_direct;
  logic q, r, s, t, u, v;

  bwa #(.W(18)) u_tb_bwa (.x(xt), .w(tw));
  bwa #(.W(6))  u_pb_bwa (.x(xp), .w(pw));

  logic [31:0] tw_in_d;
  logic [7:0]  pw_in_d;
  assign tw_in = sel_direct ? tw_in_d : tw;
  assign pw_in = sel_direct ? pw_in_d : pw;

  bwa_second_level #(.PT(32), .PP(8)) dut (
    .tag_w(tw_in), .par_w(pw_in), .q(q), .r(r), .s(s), .t(t), .u(u), .v(v)
  );

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] sparse(input int width, input int ones);
    logic [31:0] m;
    m = '0;
    for (int i = 0; i < ones; i++) m[$urandom % width] = 1'b1;
    return m;
  endfunction

  initial begin
    int d, n2;
    logic eq, er, es, et;
    sel_direct = 1'b0;
    tw_in_d = '0;
    pw_in_d = '0;
    for (int i = 0; i < 3000; i++) begin
      xt = 18'(sparse(18, $urandom % 6));
      xp = 6'(sparse(6, $urandom % 4));
      #1;
      d = $countones(xt) + $countones(xp);
      checks++;
      if (d >= 4) begin
        if (!(q | r | s) && (int'(v) + 2 * (int'(u) + int'(t)) < 4)) begin
          failures++;
          $display("FAIL d=%0d q%b r%b s%b t%b u%b v%b", d, q, r, s, t, u, v);
        end
      end else if ((q | r | s) || int'(v) + 2 * (int'(u) + int'(t)) != d) begin
        failures++;
        $display("FAIL d=%0d q%b r%b s%b t%b u%b v%b", d, q, r, s, t, u, v);
      end
    end
    // Definition of each signal on arbitrary weight vectors.
    sel_direct = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      tw_in_d = $urandom & $urandom & $urandom;
      pw_in_d = 8'($urandom & $urandom);
      #1;
      n2 = 0; eq = 0; er = 0;
      for (int j = 1; j < 32; j++)
        if ($countones(j) == 1) n2 += int'(tw_in_d[j]); else eq |= tw_in_d[j];
      for (int j = 1; j < 8; j++)
        if ($countones(j) == 1) n2 += int'(pw_in_d[j]); else er |= pw_in_d[j];
      es = (n2 >= 2);
      et = (n2 >= 1);
      checks++;
      if ({q, r, s, t, u, v} !== {eq, er, es, et, tw_in_d[0] & pw_in_d[0],
                                  tw_in_d[0] ^ pw_in_d[0]}) begin
        failures++;
        $display("FAIL direct tw=%h pw=%h qrstuv=%b%b%b%b%b%b", tw_in_d, pw_in_d,
                 q, r, s, t, u, v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
