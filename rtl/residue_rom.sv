// Final converter: lookup table that maps N weighted bits to their residue.
//
// Output = [ sum_i x[i] * WEIGHT[i] ]_A, with WEIGHT[i] normally [2^e]_A for
// the column e the bit stands in. It stands for the 2^N-word ROM or PLA of
// ceil(log2 A)-bit words in the published schemes (e.g. 128x4 for the
// 32-input generator mod 9, 256x5 for the 8-operand adder mod 25). The table
// is written as the formula for its words, evaluated on the address; being a
// fixed function of N inputs it maps to a ROM, a PLA or logic alike.
// Combinational read.
module residue_rom #(
  parameter int unsigned A           = 9,
  parameter int unsigned N           = 7,
  parameter int unsigned WEIGHT [N]  = '{1, 2, 4, 8, 7, 5, 4},
  parameter int unsigned AW          = $clog2(A)
) (
  input  logic [N-1:0]  x,
  output logic [AW-1:0] r
);
  // Word at address addr: sum of the weights of its set bits, reduced mod A.
  function automatic logic [AW-1:0] word(input logic [N-1:0] addr);
    int unsigned acc;
    acc = 0;
    for (int unsigned i = 0; i < N; i++)
      if (addr[i]) acc = (acc + WEIGHT[i]) % A;
    return AW'(acc);
  endfunction

  always_comb r = word(x);
endmodule
