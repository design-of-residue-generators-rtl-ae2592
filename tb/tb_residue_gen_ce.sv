// Testbench for residue_gen_ce: the 32-input generator mod 9 (default) and
// a 32-input generator mod 13, run on random and corner inputs. Checks each
// result against x mod A and bounds the latency from start to done by
// rows + 2P cycles; reports the largest latency seen.
module tb_residue_gen_ce;
  int checks = 0, failures = 0;
  int max9 = 0, max13 = 0;

  logic clk = 1'b0;
  logic rst_n, st9, st13, busy9, busy13, done9, done13;
  logic [31:0] x9, x13;
  logic [3:0]  r9, r13;

  always #5 clk = ~clk;

  residue_gen_ce                u9  (.clk(clk), .rst_n(rst_n), .start(st9),  .x(x9),
                                     .busy(busy9),  .done(done9),  .r(r9));
  residue_gen_ce #(.A(13))      u13 (.clk(clk), .rst_n(rst_n), .start(st13), .x(x13),
                                     .busy(busy13), .done(done13), .r(r13));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] v);
    int l9, l13;
    x9  = v;
    x13 = ~v;
    @(negedge clk) st9 = 1'b1;
    @(negedge clk) st9 = 1'b0;
    l9 = 1;
    check(busy9, "busy after start");
    while (!done9 && l9 < 200) begin
      @(negedge clk);
      l9++;
    end
    check(r9 == 4'(x9 % 9), $sformatf("mod9 x=%0d r=%0d", x9, r9));
    @(negedge clk) st13 = 1'b1;
    @(negedge clk) st13 = 1'b0;
    l13 = 1;
    while (!done13 && l13 < 200) begin
      @(negedge clk);
      l13++;
    end
    check(r13 == 4'(x13 % 13), $sformatf("mod13 x=%0d r=%0d", x13, r13));
    if (l9 > max9) max9 = l9;
    if (l13 > max13) max13 = l13;
    check(l9 <= 6 + 12, $sformatf("mod9 latency %0d", l9));
    check(l13 <= 3 + 24, $sformatf("mod13 latency %0d", l13));
  endtask

  initial begin
    rst_n = 1'b0;
    st9 = 1'b0;
    st13 = 1'b0;
    x9 = '0;
    x13 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(32'h0);
    run(32'hffff_ffff);
    for (int t = 0; t < 3000; t++) run($urandom);
    $display("max latency: mod9 %0d, mod13 %0d cycles", max9, max13);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
