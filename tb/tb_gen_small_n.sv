// Testbench for gen_small_n at its default (n = 15, A = 29): all 2^15
// inputs, compared with x mod 29. Also counts how often the correction path
// (low five bits >= 29) was taken, which must happen.
module tb_gen_small_n;
  int checks = 0, failures = 0, corrected = 0;

  logic [14:0] x;
  logic [4:0]  r;

  gen_small_n u_dut (.x(x), .r(r));

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

  initial begin
    for (int v = 0; v < 32768; v++) begin
      x = 15'(v);
      #1;
      if (x[4:0] >= 29) corrected++;
      check(int'(r) == v % 29, $sformatf("x=%0d r=%0d", v, r));
    end
    check(corrected > 0, "correction path exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
