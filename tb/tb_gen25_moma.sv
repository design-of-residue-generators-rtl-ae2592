// Testbench for gen25_moma: random and corner 32-bit inputs compared with
// x mod 25.
module tb_gen25_moma;
  int checks = 0, failures = 0;

  logic [31:0] x;
  logic [4:0]  r;

  gen25_moma u_dut (.x(x), .r(r));

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

  task automatic apply(input logic [31:0] v);
    x = v;
    #1;
    check(r == 5'(v % 25), $sformatf("x=%0d r=%0d", v, r));
  endtask

  initial begin
    apply(32'h0);
    apply(32'hffff_ffff);
    for (int b = 0; b < 32; b++) apply(32'h1 << b);
    for (int t = 0; t < 20000; t++) apply($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
