// Testbench for eac_adder: exhaustive 3-bit (mod 7) and random 8-bit
// (mod 255) operands. The result must be congruent to a + b and may be all
// ones only when a + b is 2^W - 1 or 2(2^W - 1).
module tb_eac_adder;
  int checks = 0, failures = 0;

  logic [2:0] a3, b3, s3;
  logic [7:0] a8, b8, s8;

  eac_adder #(.W(3)) u3 (.a(a3), .b(b3), .s(s3));
  eac_adder #(.W(8)) u8 (.a(a8), .b(b8), .s(s8));

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
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        a3 = 3'(i);
        b3 = 3'(j);
        #1;
        check(s3 % 7 == (i + j) % 7, $sformatf("mod7 %0d+%0d -> %0d", i, j, s3));
        check(s3 != 7 || i + j == 7 || i + j == 14, "all-ones only for a+b = 7 or 14");
      end
    for (int t = 0; t < 2000; t++) begin
      a8 = 8'($urandom);
      b8 = 8'($urandom);
      #1;
      check(s8 % 255 == (int'(a8) + int'(b8)) % 255, "mod255");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
