// End-to-end testbench for residue_top at its default parameters.
//
// Drives every example circuit with random inputs (and corner cases), checks
// each residue against one computed here, and runs the sequential 8-operand
// adder mod 25 through complete start/done operations, checking result and
// latency. It also counts how often each mechanism of the schemes fired and
// fails if one never did: the end-around carry of a CSA stage, the extra bit
// left by a cyclic adder, the carry between the two groups of the split
// mod-13 adder, the end-around carry of the mod-7 EAC adder, the correction
// multiplexer of the small-n generator, the cyclic mode of the mod-5 adder,
// and the carry-ripple phase of the sequential adder. The sequential
// generator mod 9 is run through complete operations as well.
module tb_residue_top;
  int checks = 0, failures = 0;
  int n_eac = 0, n_cyc_extra = 0, n_split = 0, n_mers = 0, n_corr = 0, n_cyc5 = 0, n_ripple = 0;

  logic clk = 1'b0;
  logic rst_n;
  logic [11:0] gen7_x;
  logic [2:0]  gen7_r;
  logic [31:0] gen13_x, gen9_x, gen25_x;
  logic [3:0]  gen13_r, gen9_r;
  logic [14:0] gen29_x;
  logic [4:0]  gen29_r, gen25_r, moma25_r, ce25_r;
  logic [3:0][2:0] moma5_ops;
  logic [2:0]  moma5_r;
  logic [7:0][4:0] moma25_ops, ce25_ops;
  logic ce25_start, ce25_busy, ce25_done;
  logic ce9_start, ce9_busy, ce9_done;
  logic [31:0] ce9_x;
  logic [3:0]  ce9_r;
  int n_ce9 = 0;

  always #5 clk = ~clk;

  residue_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One round of the combinational circuits.
  task automatic comb_round(input bit corner);
    int s5, s25;
    logic [31:0] v;
    v = corner ? 32'hffff_ffff : $urandom;
    gen7_x  = v[11:0];
    gen13_x = corner ? 32'hffff_ffff : $urandom;
    gen9_x  = corner ? 32'hffff_ffff : $urandom;
    gen29_x = 15'($urandom);
    gen25_x = corner ? 32'hffff_ffff : $urandom;
    s5 = 0;
    s25 = 0;
    for (int i = 0; i < 4; i++) begin
      moma5_ops[i] = corner ? 3'd4 : 3'($urandom % 5);
      s5 += moma5_ops[i];
    end
    for (int i = 0; i < 8; i++) begin
      moma25_ops[i] = corner ? 5'd24 : 5'($urandom % 25);
      s25 += moma25_ops[i];
    end
    #1;
    if (dut.u_gen9.u_tree.g_level[0].g_csa[0].u_csa.g[5]) n_eac++;
    if (dut.u_gen9.g_general.yx[0]) n_cyc_extra++;
    if (dut.u_gen13.g_general.yx[0]) n_split++;
    if (dut.u_gen7.g_mersenne.u_add.t[3]) n_mers++;
    if (dut.u_gen29.carry) n_corr++;
    if (dut.u_moma5.g_cyclic.yx[0]) n_cyc5++;
    check(gen7_r % 7 == 3'(gen7_x % 7), $sformatf("gen7 x=%0d r=%0d", gen7_x, gen7_r));
    check(gen13_r == 4'(gen13_x % 13), $sformatf("gen13 x=%0d r=%0d", gen13_x, gen13_r));
    check(gen9_r == 4'(gen9_x % 9), $sformatf("gen9 x=%0d r=%0d", gen9_x, gen9_r));
    check(gen29_r == 5'(gen29_x % 29), $sformatf("gen29 x=%0d r=%0d", gen29_x, gen29_r));
    check(gen25_r == 5'(gen25_x % 25), $sformatf("gen25 x=%0d r=%0d", gen25_x, gen25_r));
    check(int'(moma5_r) == s5 % 5, "moma5");
    check(int'(moma25_r) == s25 % 25, "moma25");
  endtask

  task automatic ce_run();
    int s, lat;
    s = 0;
    for (int i = 0; i < 8; i++) begin
      ce25_ops[i] = 5'($urandom % 25);
      s += ce25_ops[i];
    end
    @(negedge clk) ce25_start = 1'b1;
    @(negedge clk) ce25_start = 1'b0;
    lat = 1;
    while (!ce25_done && lat < 100) begin
      @(negedge clk);
      lat++;
    end
    // Load, 6 accumulate cycles, the ripple cycles, one cycle to register.
    if (lat > 8) n_ripple++;
    check(lat <= 16, $sformatf("ce25 latency %0d", lat));
    check(int'(ce25_r) == s % 25, $sformatf("ce25 sum=%0d r=%0d", s, ce25_r));
  endtask

  task automatic ce9_run();
    int lat;
    ce9_x = $urandom;
    @(negedge clk) ce9_start = 1'b1;
    @(negedge clk) ce9_start = 1'b0;
    lat = 1;
    while (!ce9_done && lat < 100) begin
      @(negedge clk);
      lat++;
    end
    n_ce9++;
    check(lat <= 18, $sformatf("ce9 latency %0d", lat));
    check(ce9_r == 4'(ce9_x % 9), $sformatf("ce9 x=%0d r=%0d", ce9_x, ce9_r));
  endtask

  initial begin
    rst_n = 1'b0;
    ce9_start = 1'b0;
    ce9_x = '0;
    ce25_start = 1'b0;
    ce25_ops = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    comb_round(1'b1);
    for (int t = 0; t < 20000; t++) comb_round(1'b0);
    for (int t = 0; t < 2000; t++) ce_run();
    for (int t = 0; t < 2000; t++) ce9_run();
    $display("events: eac=%0d cyclic_extra=%0d split_carry=%0d mersenne_eac=%0d correction=%0d mod5_cyclic=%0d ce_ripple=%0d",
             n_eac, n_cyc_extra, n_split, n_mers, n_corr, n_cyc5, n_ripple);
    check(n_eac > 0, "end-around carry in a CSA stage");
    check(n_cyc_extra > 0, "cyclic adder extra bit");
    check(n_split > 0, "carry between split adder groups");
    check(n_mers > 0, "EAC adder end-around carry");
    check(n_corr > 0, "correction multiplexer");
    check(n_cyc5 > 0, "mod-5 adder cyclic mode");
    check(n_ripple > 0, "sequential adder ripple phase");
    check(n_ce9 > 0, "sequential generator run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
