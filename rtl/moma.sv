// k-operand adder mod A (multi-operand modular adder, high-speed version).
//
// The K operands, OPW bits each, are added in carry-save form and reduced to
// a residue only at the end. Let m be the number of bits of the largest
// possible sum K*OPMAX and q = min(P(A), m). If m <= P(A) the sum never
// reaches 2^q, so the operands are added as plain q-bit rows (no wrap-around
// is ever needed) and a q-input table maps the sum to its residue. If
// m > P(A) the CSA network runs in cyclic mode: rows are P bits, the top
// carries wrap around (2^P = 1 mod A), a P-bit cyclic adder leaves P + 1 bits
// and a (P+1)-input table finishes. For A = 2^a - 1 an a-bit adder with EAC
// replaces the cyclic adder and table (zero may then appear as all ones).
// Operands wider than P bits (cyclic mode only) are folded onto several rows.
// Interface: ops[i] is operand i; r = [sum ops]_A. Combinational.
// m is counted as the bits of K*OPMAX + 1 values, which is one more than
// ceil(log2 K*OPMAX) when that product is a power of two.
module moma
  import modres_pkg::*;
#(
  parameter int unsigned A     = 25,
  parameter int unsigned K     = 8,
  parameter int unsigned OPW   = $clog2(A),
  parameter int unsigned OPMAX = A - 1,
  parameter int unsigned AW    = $clog2(A)
) (
  input  logic [K-1:0][OPW-1:0] ops,
  output logic [AW-1:0]         r
);
  localparam int unsigned P    = period(A);
  localparam int unsigned M    = sum_bits(K, OPMAX);
  localparam int unsigned Q    = min_u(P, M);
  localparam bit          CYC  = moma_cyclic(A, K, OPMAX);
  localparam bit          MERS = CYC && (P == AW) && (A == (1 << AW) - 1);
  localparam int unsigned RPO  = (OPW + Q - 1) / Q;   // rows per operand
  localparam int unsigned KR   = K * RPO;

  logic [KR-1:0][Q-1:0] rows;
  logic [Q-1:0]         r0, r1;

  always_comb begin
    rows = '0;
    for (int unsigned i = 0; i < K; i++)
      for (int unsigned b = 0; b < OPW; b++)
        rows[i * RPO + b / Q][b % Q] = ops[i][b];
  end

  csa_tree #(.K(KR), .W(Q), .CYCLIC(CYC)) u_tree (.rows(rows), .r0(r0), .r1(r1));

  // Converter inputs: q sum bits in columns 0..q-1, plus in cyclic mode the
  // last carry of the cyclic adder, which lands back in column 0.
  localparam int unsigned NI = CYC ? P + 1 : Q;
  typedef int unsigned wt_t [NI];

  function automatic wt_t weights();
    wt_t w;
    for (int unsigned j = 0; j < NI; j++) w[j] = pow2mod(j % P, A);
    return w;
  endfunction

  localparam wt_t WT = weights();

  if (MERS) begin : g_mersenne
    eac_adder #(.W(Q)) u_add (.a(r0), .b(r1), .s(r));
  end else if (CYC) begin : g_cyclic
    logic [P-1:0] y;
    logic [0:0]   yx;
    cyclic_adder #(.W(P), .START(0), .GROUPS(1)) u_cadd (.a(r0), .b(r1), .y(y), .yx(yx));
    residue_rom #(.A(A), .N(NI), .WEIGHT(WT), .AW(AW)) u_conv (.x({yx, y}), .r(r));
  end else begin : g_plain
    logic [Q-1:0] y;
    assign y = r0 + r1;   // q-bit adder; the sum is below 2^q by construction
    residue_rom #(.A(A), .N(NI), .WEIGHT(WT), .AW(AW)) u_conv (.x(y), .r(r));
  end

  initial assert (CYC || OPW <= Q) else $error("moma: operand wider than the sum");
endmodule
