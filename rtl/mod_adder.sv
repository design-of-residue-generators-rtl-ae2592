// Two-operand adder mod A (the "adder mod A" of the small-n generator).
//
// Both operands are residues (0..A-1). Their binary sum is compared with A
// and A is subtracted when the sum reaches it, giving the residue of the sum.
// Combinational, a-bit operands with a = ceil(log2 A).
module mod_adder #(
  parameter int unsigned A  = 29,
  parameter int unsigned AW = $clog2(A)
) (
  input  logic [AW-1:0] u,
  input  logic [AW-1:0] v,
  output logic [AW-1:0] s
);
  logic [AW:0] t;

  always_comb begin
    t = {1'b0, u} + {1'b0, v};
    s = (t >= (AW+1)'(A)) ? AW'(t - (AW+1)'(A)) : t[AW-1:0];
  end
endmodule
