// Residue generator mod A for n <= P(A) (no carry-save reduction possible).
//
// When n <= P(A) every input bit has a different weight [2^i]_A, so the bits
// are split in two. The upper n - a bits go to a (n-a)-input generator, a
// 2^(n-a)-word lookup table giving [sum x_i 2^i]_A. The lower a bits form an
// integer M in 0..2^a-1 < 2A; a correction circuit adds the a-bit two's
// complement of A (computes M - A) and its carry out, set exactly when
// M >= A, drives a multiplexer that picks M - A or M. A two-operand adder
// mod A adds the two residues. Interface: x[N-1:0] in, r = [x]_A out.
// Combinational. The default A = 29, n = 15 is an assumed instance inside the
// range 10 < n <= 10 + a where the scheme is said to be of use.
module gen_small_n
  import modres_pkg::*;
#(
  parameter int unsigned A  = 29,
  parameter int unsigned N  = 15,
  parameter int unsigned AW = $clog2(A)
) (
  input  logic [N-1:0]  x,
  output logic [AW-1:0] r
);
  localparam int unsigned NH = N - AW;
  typedef int unsigned wt_t [NH];

  function automatic wt_t weights();
    wt_t w;
    for (int unsigned i = 0; i < NH; i++) w[i] = pow2mod(AW + i, A);
    return w;
  endfunction

  localparam wt_t              WT    = weights();
  localparam logic [AW-1:0]    NEG_A = AW'((1 << AW) - A);

  logic [AW-1:0] r_hi, m, m_corr;
  logic [AW:0]   diff;
  logic          carry;

  residue_rom #(.A(A), .N(NH), .WEIGHT(WT), .AW(AW)) u_hi (.x(x[N-1:AW]), .r(r_hi));

  // Correction circuit and multiplexer.
  always_comb begin
    m      = x[AW-1:0];
    diff   = {1'b0, m} + {1'b0, NEG_A};
    carry  = diff[AW];
    m_corr = carry ? diff[AW-1:0] : m;
  end

  mod_adder #(.A(A), .AW(AW)) u_add (.u(r_hi), .v(m_corr), .s(r));

  initial assert (N > AW && N <= period(A))
    else $error("gen_small_n: needs a < N <= P(A)");
endmodule
