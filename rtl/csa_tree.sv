// CSA network with end-around carry: reduces K rows of W bits to two rows.
//
// Rows are grouped three at a time into csa_eac stages, level after level,
// until two rows remain (a Wallace-style tree on whole rows). Rows left over
// at a level pass straight to the next. The number of levels is theta(K) of
// the classic CSA-tree table (3 rows: 1 level, 4: 2, 5-6: 3, 7-9: 4, ...).
// With CYCLIC = 1 every stage wraps its top carry to column 0, so the pair of
// output rows equals the sum of the input rows modulo 2^W - 1.
// Combinational. K = 1 gives the row and a zero row; K = 2 passes both rows.
module csa_tree
  import modres_pkg::*;
#(
  parameter int unsigned K      = 4,
  parameter int unsigned W      = 3,
  parameter bit          CYCLIC = 1'b1
) (
  input  logic [K-1:0][W-1:0] rows,
  output logic [W-1:0]        r0,
  output logic [W-1:0]        r1
);
  localparam int unsigned L = csa_levels(K);

  // lvl[l] holds the rows_at(K, l) rows present at level l; the rest are zero.
  logic [K-1:0][W-1:0] lvl [L+1];

  assign lvl[0] = rows;

  for (genvar l = 0; l < L; l++) begin : g_level
    localparam int unsigned R  = rows_at(K, l);
    localparam int unsigned NG = R / 3;
    localparam int unsigned RN = rows_next(R);
    for (genvar i = 0; i < NG; i++) begin : g_csa
      csa_eac #(.W(W), .CYCLIC(CYCLIC)) u_csa (
        .a (lvl[l][3*i]),
        .b (lvl[l][3*i+1]),
        .c (lvl[l][3*i+2]),
        .s (lvl[l+1][2*i]),
        .cy(lvl[l+1][2*i+1])
      );
    end
    for (genvar i = 0; i < R % 3; i++) begin : g_pass
      assign lvl[l+1][2*NG+i] = lvl[l][3*NG+i];
    end
    for (genvar i = RN; i < K; i++) begin : g_zero
      assign lvl[l+1][i] = '0;
    end
  end

  assign r0 = lvl[L][0];
  if (K >= 2) begin : g_two
    assign r1 = lvl[L][1];
  end else begin : g_one
    assign r1 = '0;
  end
endmodule
