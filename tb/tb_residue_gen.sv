// Testbench for residue_gen: the 32-input generator mod 9 (default
// parameters), the 12-input generator mod 7, the 32-input generator mod 13
// with two 6-bit adders, and a 20-input generator mod 5. Random and corner
// inputs; each result is compared with x mod A computed here. For mod 7 the
// value 7 is accepted as the residue 0. Also checks the period function
// against the table of periods of odd moduli up to 65.
module tb_residue_gen;
  int checks = 0, failures = 0;

  logic [31:0] x9, x13;
  logic [11:0] x7;
  logic [19:0] x5;
  logic [3:0]  r9, r13;
  logic [2:0]  r7, r5;

  residue_gen                                          u9  (.x(x9),  .r(r9));
  residue_gen #(.A(7),  .N(12), .START(0))             u7  (.x(x7),  .r(r7));
  residue_gen #(.A(13), .N(32), .START(0), .GROUPS(2)) u13 (.x(x13), .r(r13));
  residue_gen #(.A(5),  .N(20), .START(1))             u5  (.x(x5),  .r(r5));

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
    x9  = v;
    x13 = ~v ^ 32'h5a5a_0f0f;
    x7  = v[11:0];
    x5  = v[31:12];
    #1;
    check(r9 == 4'(x9 % 9), $sformatf("mod9 x=%0d r=%0d", x9, r9));
    check(r13 == 4'(x13 % 13), $sformatf("mod13 x=%0d r=%0d", x13, r13));
    check(r7 <= 7 && r7 % 7 == 3'(x7 % 7), $sformatf("mod7 x=%0d r=%0d", x7, r7));
    check(r5 == 3'(x5 % 5), $sformatf("mod5 x=%0d r=%0d", x5, r5));
  endtask

  // Periods P(A) of the odd moduli 3..65. For 49 the period is 21
  // (2^21 = 1 mod 49, while 2^3 and 2^7 are not), not 42 as sometimes listed.
  localparam int PER [32] = '{2, 4, 3, 6, 10, 12, 4, 8, 18, 6, 11, 20, 18, 28, 5, 10,
                              12, 36, 12, 20, 14, 12, 23, 21, 8, 52, 20, 18, 58, 60, 6, 12};

  initial begin
    for (int i = 0; i < 32; i++)
      check(modres_pkg::period(3 + 2 * i) == PER[i], $sformatf("P(%0d)", 3 + 2 * i));
    apply(32'h0);
    apply(32'hffff_ffff);
    for (int b = 0; b < 32; b++) apply(32'h1 << b);
    for (int t = 0; t < 20000; t++) apply($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
