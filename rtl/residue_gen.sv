// n-input residue generator mod A built from a CSA network with end-around
// carry (general structure: CSA tree, p-bit cyclic adder, final converter).
//
// Input bit x[q] has weight [2^q]_A = [2^(q mod P)]_A, P = P(A), so the N
// input bits are laid out as ceil(N/P) rows of P bits (row t holds
// x[tP .. tP+P-1]; missing bits of the last row are constant 0). The CSA tree
// with EAC adds the rows modulo 2^P - 1 down to two rows, which keeps the
// residue mod A because 2^P = 1 (mod A). A cyclic adder then adds the two
// rows once around the cycle starting at column START (split into GROUPS
// shorter adders if wanted), leaving P + GROUPS bits. The final converter, a
// 2^(P+GROUPS)-word table, maps those bits to [X]_A.
// For A = 2^a - 1 (P = a) the converter is omitted and the two rows go to an
// a-bit adder with EAC; the residue 0 may then appear as all ones.
// Interface: x[N-1:0] in, r = [x]_A out (ceil(log2 A) bits). Combinational.
// The row layout and the level-by-level tree are this design's way of
// building the network; the published examples allocate full and half adders
// column by column, which gives the same bit counts per column between stages
// but not always the same number of adders or levels.
module residue_gen
  import modres_pkg::*;
#(
  parameter int unsigned A      = 9,
  parameter int unsigned N      = 32,
  parameter int unsigned START  = 2,
  parameter int unsigned GROUPS = 1,
  parameter int unsigned AW     = $clog2(A)
) (
  input  logic [N-1:0]  x,
  output logic [AW-1:0] r
);
  localparam int unsigned P    = period(A);
  localparam int unsigned K    = (N + P - 1) / P;
  localparam bit          MERS = (P == AW) && (A == (1 << AW) - 1);

  logic [K-1:0][P-1:0] rows;
  logic [P-1:0]        r0, r1;

  always_comb begin
    rows = '0;
    for (int unsigned i = 0; i < N; i++) rows[i / P][i % P] = x[i];
  end

  csa_tree #(.K(K), .W(P), .CYCLIC(1'b1)) u_tree (.rows(rows), .r0(r0), .r1(r1));

  // Weights of the converter inputs: y[j] stands in column j, the carry of
  // group g in column carry_col(P, START, g, GROUPS).
  localparam int unsigned NI = P + GROUPS;
  typedef int unsigned wt_t [NI];

  function automatic wt_t weights();
    wt_t w;
    for (int unsigned j = 0; j < P; j++) w[j] = pow2mod(j, A);
    for (int unsigned g = 0; g < GROUPS; g++)
      w[P + g] = pow2mod(carry_col(P, START, g, GROUPS), A);
    return w;
  endfunction

  localparam wt_t WT = weights();

  if (MERS) begin : g_mersenne
    eac_adder #(.W(P)) u_add (.a(r0), .b(r1), .s(r));
  end else begin : g_general
    logic [P-1:0]      y;
    logic [GROUPS-1:0] yx;

    cyclic_adder #(.W(P), .START(START), .GROUPS(GROUPS)) u_cadd (
      .a(r0), .b(r1), .y(y), .yx(yx)
    );
    residue_rom #(.A(A), .N(NI), .WEIGHT(WT), .AW(AW)) u_conv (.x({yx, y}), .r(r));
  end

  initial assert (A >= 3 && A % 2 == 1) else $error("residue_gen: A must be odd and >= 3");
endmodule
