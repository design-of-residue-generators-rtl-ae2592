// Testbench for moma_ce: the 8-operand adder mod 25 (default) and a
// 4-operand adder mod 5 (cyclic mode), run back to back on random and
// all-maximum operands. Checks each result and the latency from start to
// done: at most K + q cycles without wrap-around (q = 8 for mod 25) and
// K + 2q in cyclic mode. Also checks busy while working.
module tb_moma_ce;
  int checks = 0, failures = 0;
  int max_lat25 = 0, max_lat5 = 0;

  logic clk = 1'b0;
  logic rst_n;
  logic start25, start5, busy25, busy5, done25, done5;
  logic [7:0][4:0] o25;
  logic [3:0][2:0] o5;
  logic [4:0] r25;
  logic [2:0] r5;

  always #5 clk = ~clk;

  moma_ce                u25 (.clk(clk), .rst_n(rst_n), .start(start25), .ops(o25),
                              .busy(busy25), .done(done25), .r(r25));
  moma_ce #(.A(5), .K(4)) u5 (.clk(clk), .rst_n(rst_n), .start(start5), .ops(o5),
                              .busy(busy5), .done(done5), .r(r5));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run25(input bit maxed);
    int s, lat;
    s = 0;
    for (int i = 0; i < 8; i++) begin
      o25[i] = maxed ? 5'd24 : 5'($urandom % 25);
      s += o25[i];
    end
    @(negedge clk) start25 = 1'b1;
    @(negedge clk) start25 = 1'b0;
    lat = 1;
    check(busy25, "busy after start");
    while (!done25 && lat < 100) begin
      @(negedge clk);
      lat++;
    end
    if (lat > max_lat25) max_lat25 = lat;
    check(lat <= 8 + 8, $sformatf("mod25 latency %0d", lat));
    check(int'(r25) == s % 25, $sformatf("mod25 sum=%0d r=%0d", s, r25));
  endtask

  task automatic run5(input bit maxed);
    int s, lat;
    s = 0;
    for (int i = 0; i < 4; i++) begin
      o5[i] = maxed ? 3'd4 : 3'($urandom % 5);
      s += o5[i];
    end
    @(negedge clk) start5 = 1'b1;
    @(negedge clk) start5 = 1'b0;
    lat = 1;
    while (!done5 && lat < 100) begin
      @(negedge clk);
      lat++;
    end
    if (lat > max_lat5) max_lat5 = lat;
    check(lat <= 4 + 8, $sformatf("mod5 latency %0d", lat));
    check(int'(r5) == s % 5, $sformatf("mod5 sum=%0d r=%0d", s, r5));
  endtask

  initial begin
    rst_n = 1'b0;
    start25 = 1'b0;
    start5 = 1'b0;
    o25 = '0;
    o5 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(!busy25 && !done25, "idle after reset");
    run25(1'b1);
    run5(1'b1);
    for (int t = 0; t < 3000; t++) begin
      run25(1'b0);
      run5(1'b0);
    end
    $display("max latency: mod25 %0d, mod5 %0d cycles", max_lat25, max_lat5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
