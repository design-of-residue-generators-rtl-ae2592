// One W-bit carry-save adder (CSA) with end-around carry (EAC).
//
// A row of W full adders reduces three W-bit rows to a sum row and a carry
// row. Column j holds bits of weight [2^j]_A. The carry of column j has weight
// 2^(j+1) and moves to column j+1; the carry of the top column has weight 2^W,
// and when W = P(A) that weight is 1 modulo A, so it is sent around to column 0
// (CYCLIC = 1). With CYCLIC = 0 the top carry is dropped, which is exact when
// the caller knows the total never reaches 2^W. Where one input row holds a
// constant zero the full adder reduces to a half adder after synthesis, which
// is how the half adders of the published networks appear here.
// Purely combinational; s + rotl(cy) = a + b + c modulo 2^W - 1 (CYCLIC = 1)
// or exactly (CYCLIC = 0, no overflow).
module csa_eac #(
  parameter int unsigned W      = 3,
  parameter bit          CYCLIC = 1'b1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,   // sum bits, column j
  output logic [W-1:0] cy   // carry bits, already moved to their column
);
  logic [W-1:0] g;

  always_comb begin
    s  = a ^ b ^ c;
    g  = (a & b) | (a & c) | (b & c);
    cy = {g[W-2:0], CYCLIC ? g[W-1] : 1'b0};
  end

  initial assert (W >= 2) else $error("csa_eac needs W >= 2");
endmodule
