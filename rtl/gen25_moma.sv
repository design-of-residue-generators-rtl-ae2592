// 32-input residue generator mod 25 built around a 6-operand adder mod 25.
//
// P(25) = 20, so bit x[q] has weight [2^(q mod 20)]_25. The bits of columns
// G0..G4 ({x0..x4} and {x20..x24}) are used directly as two 5-bit operands
// (they may exceed 24, which the adder allows). The other 22 bits, of columns
// G5..G19, go to four small lookup tables (32x5, 32x5, 64x5, 64x5) that each
// turn their bits into a residue mod 25. The six 5-bit values are added by
// the 6-operand adder mod 25 (sum below 2^8, so an 8-bit carry-save network
// and a 256x5 table). Which of the 22 bits feed which table is this design's
// choice: x5..x9, x10..x14, x15..x19 with x25, and x26..x31.
// Interface: x[31:0] in, r = [x]_25 out. Combinational.
module gen25_moma
  import modres_pkg::*;
(
  input  logic [31:0] x,
  output logic [4:0]  r
);
  localparam int unsigned A = 25;

  typedef int unsigned w5_t [5];
  typedef int unsigned w6_t [6];

  function automatic w5_t w5(input int unsigned first);
    w5_t w;
    for (int unsigned i = 0; i < 5; i++) w[i] = pow2mod(first + i, A);
    return w;
  endfunction

  function automatic w6_t w6(input int unsigned first, input int unsigned last_bit);
    w6_t w;
    for (int unsigned i = 0; i < 5; i++) w[i] = pow2mod(first + i, A);
    w[5] = pow2mod(last_bit, A);
    return w;
  endfunction

  localparam w5_t WT0 = w5(5);
  localparam w5_t WT1 = w5(10);
  localparam w6_t WT2 = w6(15, 25);
  localparam w6_t WT3 = w6(26, 31);

  logic [5:0][4:0] ops;

  assign ops[0] = x[4:0];
  assign ops[1] = x[24:20];

  residue_rom #(.A(A), .N(5), .WEIGHT(WT0), .AW(5)) u_rom0 (.x(x[9:5]),             .r(ops[2]));
  residue_rom #(.A(A), .N(5), .WEIGHT(WT1), .AW(5)) u_rom1 (.x(x[14:10]),           .r(ops[3]));
  residue_rom #(.A(A), .N(6), .WEIGHT(WT2), .AW(5)) u_rom2 (.x({x[25], x[19:15]}),  .r(ops[4]));
  residue_rom #(.A(A), .N(6), .WEIGHT(WT3), .AW(5)) u_rom3 (.x({x[31], x[30:26]}),  .r(ops[5]));

  moma #(.A(A), .K(6), .OPW(5), .OPMAX(31), .AW(5)) u_add (.ops(ops), .r(r));
endmodule
