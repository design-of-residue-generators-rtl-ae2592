// Testbench for csa_eac: random rows through a cyclic (W = 5) and a
// non-cyclic (W = 8) stage. Checks the sum row bit by bit (a ^ b ^ c), and
// that sum + carry rows keep the total: modulo 2^5 - 1 for the cyclic stage,
// exactly (plus the dropped top carry) for the other.
module tb_csa_eac;
  int checks = 0, failures = 0;

  logic [4:0] a5, b5, c5, s5, cy5;
  logic [7:0] a8, b8, c8, s8, cy8;

  csa_eac #(.W(5), .CYCLIC(1'b1)) u_cyc  (.a(a5), .b(b5), .c(c5), .s(s5), .cy(cy5));
  csa_eac #(.W(8), .CYCLIC(1'b0)) u_flat (.a(a8), .b(b8), .c(c8), .s(s8), .cy(cy8));

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
    for (int t = 0; t < 4000; t++) begin
      int unsigned top;
      {a5, b5, c5} = 15'($urandom);
      {a8, b8, c8} = 24'($urandom);
      #1;
      check(s5 == (a5 ^ b5 ^ c5), "cyclic sum row");
      check((int'(s5) + int'(cy5)) % 31 == (int'(a5) + int'(b5) + int'(c5)) % 31,
            $sformatf("cyclic total a=%0d b=%0d c=%0d", a5, b5, c5));
      top = (a8[7] + b8[7] + c8[7]) >= 2 ? 256 : 0;
      check(s8 == (a8 ^ b8 ^ c8), "flat sum row");
      check(int'(s8) + int'(cy8) + int'(top) == int'(a8) + int'(b8) + int'(c8), "flat total");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
