// p-bit cyclic adder: the final two-row addition of a CSA network with EAC.
//
// The two W-bit rows are added modulo 2^W - 1 without closing the carry loop
// of a true end-around-carry adder. The W columns, taken cyclically from
// column START, are split into GROUPS near-equal groups; each group is an
// ordinary ripple adder with carry-in 0. The carry leaving a group is not fed
// back but kept as an extra output bit standing in the first column of the
// next group (the group after the last is the first). With GROUPS = 1 the
// adder runs once around the cycle from START and its last carry lands back
// in column START, so W + 1 bits leave it; with GROUPS = w, W + w bits leave
// it, and the longest carry path is ceil(W / w) columns.
// Interface: y[j] has column j; yx[g] is the carry of group g and has column
// carry_col(W, START, g, GROUPS) of modres_pkg. Combinational.
// y + sum_g yx[g] * 2^col(g) = a + b modulo 2^W - 1.
module cyclic_adder
  import modres_pkg::*;
#(
  parameter int unsigned W      = 6,
  parameter int unsigned START  = 0,
  parameter int unsigned GROUPS = 1
) (
  input  logic [W-1:0]      a,
  input  logic [W-1:0]      b,
  output logic [W-1:0]      y,
  output logic [GROUPS-1:0] yx
);
  // Rotate so that column START sits at bit 0.
  logic [W-1:0] ar, br, yr;

  always_comb begin
    for (int unsigned j = 0; j < W; j++) begin
      ar[j] = a[(j + START) % W];
      br[j] = b[(j + START) % W];
    end
  end

  for (genvar g = 0; g < GROUPS; g++) begin : g_grp
    localparam int unsigned LO  = group_lo(W, g, GROUPS);
    localparam int unsigned LEN = group_lo(W, g + 1, GROUPS) - LO;
    logic [LEN:0] sum;
    assign sum = {1'b0, ar[LO +: LEN]} + {1'b0, br[LO +: LEN]};
    assign yr[LO +: LEN] = sum[LEN-1:0];
    assign yx[g]         = sum[LEN];
  end

  always_comb begin
    for (int unsigned j = 0; j < W; j++) y[(j + START) % W] = yr[j];
  end

  initial assert (START < W && GROUPS >= 1 && GROUPS <= W)
    else $error("cyclic_adder: bad START or GROUPS");
endmodule
