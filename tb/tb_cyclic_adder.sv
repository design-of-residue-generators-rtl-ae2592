// Testbench for cyclic_adder: a 12-bit adder split into two 6-bit groups
// (extra bits in columns 0 and 6) and a 6-bit adder started at column 2
// (extra bit in column 2). The 6-bit case is exhaustive and compared with
// a rotate-add-rotate reference; both are checked for value modulo 2^W - 1.
module tb_cyclic_adder;
  int checks = 0, failures = 0;

  logic [11:0] a12, b12, y12;
  logic [1:0]  x12;
  logic [5:0]  a6, b6, y6;
  logic [0:0]  x6;

  cyclic_adder #(.W(12), .START(0), .GROUPS(2)) u_split (.a(a12), .b(b12), .y(y12), .yx(x12));
  cyclic_adder #(.W(6),  .START(2), .GROUPS(1)) u_one   (.a(a6),  .b(b6),  .y(y6),  .yx(x6));

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
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        logic [5:0] ra, rb, ey;
        logic [6:0] sum;
        a6 = 6'(i);
        b6 = 6'(j);
        ra = {a6[1:0], a6[5:2]};           // column 2 to bit 0
        rb = {b6[1:0], b6[5:2]};
        sum = {1'b0, ra} + {1'b0, rb};
        ey = {sum[3:0], sum[5:4]};         // back to columns
        #1;
        check(y6 == ey && x6[0] == sum[6], $sformatf("start2 %0d+%0d", i, j));
        check((int'(y6) + 4 * int'(x6[0])) % 63 == (i + j) % 63, "start2 value");
      end
    for (int t = 0; t < 4000; t++) begin
      a12 = 12'($urandom);
      b12 = 12'($urandom);
      #1;
      check((int'(y12) + int'(x12[0]) * 64 + int'(x12[1])) % 4095
            == (int'(a12) + int'(b12)) % 4095, "split value");
      check(x12[0] == ((int'(a12[5:0]) + int'(b12[5:0])) >= 64), "low group carry");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
