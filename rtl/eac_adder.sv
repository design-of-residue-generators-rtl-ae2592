// a-bit adder with end-around carry, the last stage for A = 2^a - 1.
//
// For A = 2^a - 1 the period is a, so the final converter is not needed: the
// two rows left by the CSA network are added modulo 2^a - 1 directly. A ring
// of full adders whose top carry feeds the bottom column would form a
// combinational loop; it is written here in the equivalent loop-free form
// s = (a + b + cout) mod 2^a, where cout is the carry out of a + b.
// As in any one's-complement style adder, the residue 0 may come out as all
// ones (2^a - 1 is congruent to 0); it does so only when a + b is 2^a - 1
// or, for two all-ones inputs, 2(2^a - 1).
// Combinational.
module eac_adder #(
  parameter int unsigned W = 3
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);
  logic [W:0] t;

  always_comb begin
    t = {1'b0, a} + {1'b0, b};
    s = t[W-1:0] + W'(t[W]);
  end
endmodule
