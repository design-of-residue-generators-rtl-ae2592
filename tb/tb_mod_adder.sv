// Testbench for mod_adder: all pairs of residues mod 29 and mod 25.
module tb_mod_adder;
  int checks = 0, failures = 0;

  logic [4:0] u29, v29, s29, u25, v25, s25;

  mod_adder #(.A(29)) u_29 (.u(u29), .v(v29), .s(s29));
  mod_adder #(.A(25)) u_25 (.u(u25), .v(v25), .s(s25));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
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
    for (int i = 0; i < 29; i++)
      for (int j = 0; j < 29; j++) begin
        u29 = 5'(i);
        v29 = 5'(j);
        u25 = 5'(i % 25);
        v25 = 5'(j % 25);
        #1;
        check(int'(s29) == (i + j) % 29, $sformatf("mod29 %0d+%0d", i, j));
        check(int'(s25) == (i % 25 + j % 25) % 25, "mod25");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
