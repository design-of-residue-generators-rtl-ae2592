// Testbench for csa_tree. A cyclic tree of six 6-bit rows (the 32-input
// generator mod 9 layout) must keep the row total modulo 63; a non-cyclic
// tree of five 8-bit rows with small values must keep it exactly. Also
// checks the level count theta(k) against the classic CSA-tree table.
module tb_csa_tree;
  import modres_pkg::*;
  int checks = 0, failures = 0;

  logic [5:0][5:0] rows6;
  logic [5:0]      c0, c1;
  logic [4:0][7:0] rows8;
  logic [7:0]      f0, f1;

  csa_tree #(.K(6), .W(6), .CYCLIC(1'b1)) u_cyc  (.rows(rows6), .r0(c0), .r1(c1));
  csa_tree #(.K(5), .W(8), .CYCLIC(1'b0)) u_flat (.rows(rows8), .r0(f0), .r1(f1));

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

  // theta(k) from the table of minimum CSA-tree levels.
  function automatic int theta(input int k);
    if (k <= 3) return 1;
    if (k == 4) return 2;
    if (k <= 6) return 3;
    if (k <= 9) return 4;
    if (k <= 13) return 5;
    if (k <= 19) return 6;
    return 7;
  endfunction

  initial begin
    for (int k = 3; k <= 28; k++) check(csa_levels(k) == theta(k), $sformatf("levels k=%0d", k));
    for (int t = 0; t < 4000; t++) begin
      int unsigned tot6, tot8;
      tot6 = 0;
      tot8 = 0;
      for (int i = 0; i < 6; i++) begin
        rows6[i] = 6'($urandom);
        tot6 += rows6[i];
      end
      for (int i = 0; i < 5; i++) begin
        rows8[i] = 8'($urandom % 52);
        tot8 += rows8[i];
      end
      #1;
      check((int'(c0) + int'(c1)) % 63 == tot6 % 63, "cyclic total");
      check(int'(f0) + int'(f1) == tot8, "flat total");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
