// Sequential n-input residue generator mod A (carry-save register version).
//
// The CSA tree of residue_gen is replaced by a single bank of P(A) full
// adders with end-around carry and a 2P-bit carry-save register: the input
// bits are folded onto ceil(N/P) rows of P bits exactly as in residue_gen,
// and the rows are fed to the bank one per cycle. The same bank then lets
// the carries ripple around the ring (third input zero) until the carry row
// is empty, which takes the place of the p-bit cyclic adder, and a P-input
// table gives [x]_A. This trades the tree for a register and extra cycles.
// The sequencing, handshake and reset are those of moma_ce, which does the
// work with P-bit operands (the rows); see that module for the timing.
// Interface: pulse start with x valid and keep x stable while busy; done is
// high for one cycle with r = [x]_A.
module residue_gen_ce
  import modres_pkg::*;
#(
  parameter int unsigned A  = 9,
  parameter int unsigned N  = 32,
  parameter int unsigned AW = $clog2(A)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [N-1:0]  x,
  output logic          busy,
  output logic          done,
  output logic [AW-1:0] r
);
  localparam int unsigned P = period(A);
  localparam int unsigned K = (N + P - 1) / P;

  logic [K-1:0][P-1:0] rows;

  always_comb begin
    rows = '0;
    for (int unsigned i = 0; i < N; i++) rows[i / P][i % P] = x[i];
  end

  // Rows can hold any P-bit value, so the sum exceeds 2^P and the bank
  // works in cyclic mode.
  moma_ce #(.A(A), .K(K), .OPW(P), .OPMAX((1 << P) - 1), .AW(AW)) u_seq (
    .clk(clk), .rst_n(rst_n), .start(start), .ops(rows),
    .busy(busy), .done(done), .r(r)
  );

  initial assert (K >= 2) else $error("residue_gen_ce: needs N > P(A)");
endmodule
