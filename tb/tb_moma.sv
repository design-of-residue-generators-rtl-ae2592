// Testbench for moma: the 8-operand adder mod 25 (default, non-cyclic, 8-bit
// network and 256-word table), the 4-operand adder mod 5 (cyclic mode,
// 5-input table), the 4-operand adder mod 7 (EAC adder, no table) and a
// 20-operand adder mod 9 (cyclic, P = 6). Operands are random residues plus
// the all-maximum case; results are compared with the sum mod A. Also
// checks the operand count at which cyclic mode starts for small periods.
module tb_moma;
  int checks = 0, failures = 0;

  logic [7:0][4:0]  o25;
  logic [3:0][2:0]  o5, o7;
  logic [19:0][3:0] o9;
  logic [4:0]       r25;
  logic [2:0]       r5, r7;
  logic [3:0]       r9;

  moma                       u25 (.ops(o25), .r(r25));
  moma #(.A(5), .K(4))       u5  (.ops(o5),  .r(r5));
  moma #(.A(7), .K(4))       u7  (.ops(o7),  .r(r7));
  moma #(.A(9), .K(20))      u9  (.ops(o9),  .r(r9));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit maxed);
    int s25, s5, s7, s9;
    s25 = 0; s5 = 0; s7 = 0; s9 = 0;
    for (int i = 0; i < 8; i++) begin
      o25[i] = maxed ? 5'd24 : 5'($urandom % 25);
      s25 += o25[i];
    end
    for (int i = 0; i < 4; i++) begin
      o5[i] = maxed ? 3'd4 : 3'($urandom % 5);
      o7[i] = maxed ? 3'd6 : 3'($urandom % 7);
      s5 += o5[i];
      s7 += o7[i];
    end
    for (int i = 0; i < 20; i++) begin
      o9[i] = maxed ? 4'd8 : 4'($urandom % 9);
      s9 += o9[i];
    end
    #1;
    check(int'(r25) == s25 % 25, $sformatf("mod25 sum=%0d r=%0d", s25, r25));
    check(int'(r5) == s5 % 5, $sformatf("mod5 sum=%0d r=%0d", s5, r5));
    check(r7 % 7 == 3'(s7 % 7), $sformatf("mod7 sum=%0d r=%0d", s7, r7));
    check(int'(r9) == s9 % 9, $sformatf("mod9 sum=%0d r=%0d", s9, r9));
  endtask

  // Smallest k for which the adder works in cyclic mode, k_c(A), for the
  // moduli with P(A) <= 8: 5 -> 4, 9 -> 8, 17 -> 16, 21 -> 4, 51 -> 6.
  localparam int KA [5] = '{5, 9, 17, 21, 51};
  localparam int KC [5] = '{4, 8, 16, 4, 6};

  initial begin
    for (int i = 0; i < 5; i++) begin
      int k;
      k = 2;
      while (!modres_pkg::moma_cyclic(KA[i], k, KA[i] - 1) && k < 100) k++;
      check(k == KC[i], $sformatf("k_c(%0d) = %0d", KA[i], k));
    end
    run(1'b1);
    for (int t = 0; t < 20000; t++) run(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
