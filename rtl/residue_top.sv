// The worked residue generators and multi-operand adders mod A, side by side.
//
// Each instance is one of the published example circuits, built from the
// parameterised library; they share nothing but the clock and reset of the
// two sequential units and have their own ports:
//   gen7    12-input generator mod 7 (= 4-operand adder mod 7): P = 3,
//           four 3-bit rows, two CSA levels with EAC and a 3-bit EAC adder.
//   gen13   32-input generator mod 13: P = 12, one 12-bit CSA with EAC
//           (half adders in G8..G11), two 6-bit adders, 14-input table.
//   gen9    32-input generator mod 9: P = 6, CSA tree with EAC, 6-bit cyclic
//           adder ending with two bits in G2, 128x4 table.
//   gen29   15-input generator mod 29 for n <= P(A) (table for the upper
//           bits, correction circuit and multiplexer, adder mod 29).
//   gen25   32-input generator mod 25 using four small tables and a
//           6-operand adder mod 25.
//   moma5   4-operand adder mod 5, cyclic mode, 5-input table.
//   moma25  8-operand adder mod 25, high-speed version, 256x5 table.
//   ce25    8-operand adder mod 25, cost-effective version (one 8-bit CSA
//           with a carry-save register), start/busy/done handshake.
//   ce9     32-input generator mod 9, sequential version (one 6-bit CSA with
//           EAC and a 12-bit carry-save register), same handshake.
// All but ce25 and ce9 are combinational. gen7 (A = 2^3 - 1, no final table)
// may return 7 for the residue 0 (one's-complement style zero).
// The mod-29 size and the use of the mod-9 example for the sequential
// generator are choices of this design; all other sizes are the published
// examples. Timing: see moma_ce for the start/busy/done handshake.
module residue_top (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [11:0]         gen7_x,
  output logic [2:0]          gen7_r,
  input  logic [31:0]         gen13_x,
  output logic [3:0]          gen13_r,
  input  logic [31:0]         gen9_x,
  output logic [3:0]          gen9_r,
  input  logic [14:0]         gen29_x,
  output logic [4:0]          gen29_r,
  input  logic [31:0]         gen25_x,
  output logic [4:0]          gen25_r,
  input  logic [3:0][2:0]     moma5_ops,
  output logic [2:0]          moma5_r,
  input  logic [7:0][4:0]     moma25_ops,
  output logic [4:0]          moma25_r,
  input  logic                ce25_start,
  input  logic [7:0][4:0]     ce25_ops,
  output logic                ce25_busy,
  output logic                ce25_done,
  output logic [4:0]          ce25_r,
  input  logic                ce9_start,
  input  logic [31:0]         ce9_x,
  output logic                ce9_busy,
  output logic                ce9_done,
  output logic [3:0]          ce9_r
);
  residue_gen #(.A(7),  .N(12), .START(0), .GROUPS(1)) u_gen7  (.x(gen7_x),  .r(gen7_r));
  residue_gen #(.A(13), .N(32), .START(0), .GROUPS(2)) u_gen13 (.x(gen13_x), .r(gen13_r));
  residue_gen #(.A(9),  .N(32), .START(2), .GROUPS(1)) u_gen9  (.x(gen9_x),  .r(gen9_r));
  gen_small_n #(.A(29), .N(15))                        u_gen29 (.x(gen29_x), .r(gen29_r));
  gen25_moma                                           u_gen25 (.x(gen25_x), .r(gen25_r));
  moma        #(.A(5),  .K(4))                         u_moma5 (.ops(moma5_ops),  .r(moma5_r));
  moma        #(.A(25), .K(8))                         u_moma25(.ops(moma25_ops), .r(moma25_r));
  moma_ce     #(.A(25), .K(8))                         u_ce25  (
    .clk(clk), .rst_n(rst_n), .start(ce25_start), .ops(ce25_ops),
    .busy(ce25_busy), .done(ce25_done), .r(ce25_r)
  );
  residue_gen_ce #(.A(9),  .N(32))                     u_ce9   (
    .clk(clk), .rst_n(rst_n), .start(ce9_start), .x(ce9_x),
    .busy(ce9_busy), .done(ce9_done), .r(ce9_r)
  );
endmodule
