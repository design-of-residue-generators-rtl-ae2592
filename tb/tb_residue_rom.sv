// Testbench for residue_rom: the 7-input final converter of the 32-input
// generator mod 9 (weights 1, 2, 4, 8, 7, 5 for y0..y5 and 4 for the second
// bit of column 2), exhaustively, and a 5-input table mod 25.
module tb_residue_rom;
  import modres_pkg::*;
  int checks = 0, failures = 0;

  localparam int unsigned W9 [7]  = '{1, 2, 4, 8, 7, 5, 4};
  localparam int unsigned W25 [5] = '{7, 14, 3, 6, 12};   // [2^5..2^9]_25

  logic [6:0] x9;
  logic [3:0] r9;
  logic [4:0] x25, r25;

  residue_rom #(.A(9),  .N(7), .WEIGHT(W9))  u9  (.x(x9),  .r(r9));
  residue_rom #(.A(25), .N(5), .WEIGHT(W25)) u25 (.x(x25), .r(r25));

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
    for (int j = 0; j < 6; j++) check(pow2mod(j, 9) == W9[j], "mod-9 weights are [2^j]_9");
    for (int j = 0; j < 5; j++) check(pow2mod(j + 5, 25) == W25[j], "mod-25 weights");
    for (int v = 0; v < 128; v++) begin
      // y0..y5 read as a number plus the extra column-2 bit, reduced mod 9.
      x9 = 7'(v);
      #1;
      check(int'(r9) == ((v & 63) + 4 * (v >> 6)) % 9, $sformatf("mod9 addr %0d", v));
    end
    for (int v = 0; v < 32; v++) begin
      x25 = 5'(v);
      #1;
      check(int'(r25) == (v * 32) % 25, $sformatf("mod25 addr %0d", v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
