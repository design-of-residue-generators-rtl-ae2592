// k-operand adder mod A, cost-effective (sequential) version.
//
// A single bank of q full adders (one csa_eac stage, q = min(P(A), m) as in
// the high-speed version) works with a 2q-bit carry-save register (sum row S
// and carry row C). On start, S and C are loaded with operands 0 and 1. In
// each of the next K-2 cycles one more operand is added: (S, C) <- CSA(S, C,
// op[i]). The same adders then run with a zero third input, so each column
// acts as a half adder and the carries ripple one column per cycle, until C
// is all zero. S then holds the sum (modulo 2^P - 1 in cyclic mode) and a
// q-input table gives the residue, which is registered with done.
// Interface: pulse start for one cycle with ops valid; ops must stay stable
// while busy. done is high for one cycle with r valid; r holds until the
// next result. Latency from start to done: K - 1 + (ripple cycles) + 1,
// at most K + q for q < P(A). Synchronous active-low reset.
// The ripple phase stopping when C is zero (rather than after a fixed count)
// and the start/done handshake are this design's choices.
module moma_ce
  import modres_pkg::*;
#(
  parameter int unsigned A     = 25,
  parameter int unsigned K     = 8,
  parameter int unsigned OPW   = $clog2(A),
  parameter int unsigned OPMAX = A - 1,
  parameter int unsigned AW    = $clog2(A)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [K-1:0][OPW-1:0] ops,
  output logic                  busy,
  output logic                  done,
  output logic [AW-1:0]         r
);
  localparam int unsigned P   = period(A);
  localparam int unsigned M   = sum_bits(K, OPMAX);
  localparam int unsigned Q   = min_u(P, M);
  localparam bit          CYC = moma_cyclic(A, K, OPMAX);
  localparam int unsigned IW  = $clog2(K + 1);

  typedef enum logic [1:0] {S_IDLE, S_ACC, S_RIPPLE} state_t;

  typedef int unsigned wt_t [Q];
  function automatic wt_t weights();
    wt_t w;
    for (int unsigned j = 0; j < Q; j++) w[j] = pow2mod(j, A);
    return w;
  endfunction
  localparam wt_t WT = weights();

  state_t        state;
  logic [Q-1:0]  s_q, c_q;       // carry-save register
  logic [IW-1:0] idx;            // next operand to add
  logic [Q-1:0]  third, s_n, c_n;
  logic [AW-1:0] r_rom;

  always_comb begin
    third = '0;
    if (state == S_ACC) third = Q'(ops[idx]);
  end

  csa_eac #(.W(Q), .CYCLIC(CYC)) u_csa (.a(s_q), .b(c_q), .c(third), .s(s_n), .cy(c_n));

  residue_rom #(.A(A), .N(Q), .WEIGHT(WT), .AW(AW)) u_conv (.x(s_q), .r(r_rom));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      s_q   <= '0;
      c_q   <= '0;
      idx   <= '0;
      done  <= 1'b0;
      r     <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          s_q   <= Q'(ops[0]);
          c_q   <= Q'(ops[1]);
          idx   <= IW'(2);
          state <= (K > 2) ? S_ACC : S_RIPPLE;
        end
        S_ACC: begin
          s_q <= s_n;
          c_q <= c_n;
          idx <= idx + 1'b1;
          if (idx == IW'(K - 1)) state <= S_RIPPLE;
        end
        S_RIPPLE: begin
          if (c_q == '0) begin
            r     <= r_rom;
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            s_q <= s_n;
            c_q <= c_n;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  initial assert (K >= 2 && OPW <= Q) else $error("moma_ce: needs K >= 2 and OPW <= q");
endmodule
