// Shared constant functions for the residue generators and multi-operand
// modular adders (MOMAs).
//
// Everything in this library rests on the period P(A) of an odd modulus A:
// the smallest j > 0 with 2^j mod A = 1. Because 2^P = 1 (mod A), a bit of
// weight 2^(tP+j) carries the same residue as a bit of weight 2^j, so input
// bits can be folded onto P cyclically ordered columns G_0..G_(P-1) and added
// modulo 2^P - 1 with end-around carries without changing the residue mod A.
// The functions below are evaluated at elaboration time only; they size the
// networks and fill the lookup tables (no hardware is made from them).
package modres_pkg;

  // [2^j]_A : residue of 2^j modulo A, by the recurrence [2^i] = [2*[2^(i-1)]].
  function automatic int unsigned pow2mod(input int unsigned j, input int unsigned a_mod);
    int unsigned r;
    r = 1 % a_mod;
    for (int unsigned i = 0; i < j; i++) r = (2 * r) % a_mod;
    return r;
  endfunction

  // P(A): period of the powers of 2 modulo an odd A >= 3.
  function automatic int unsigned period(input int unsigned a_mod);
    int unsigned r;
    int unsigned j;
    r = 2 % a_mod;
    j = 1;
    while (r != 1 && j < 4096) begin
      r = (2 * r) % a_mod;
      j++;
    end
    return j;
  endfunction

  // Number of rows left after one level of 3:2 carry-save reduction.
  function automatic int unsigned rows_next(input int unsigned rows);
    return (rows <= 2) ? rows : 2 * (rows / 3) + rows % 3;
  endfunction

  // theta(k): number of carry-save levels that reduce k rows to two.
  function automatic int unsigned csa_levels(input int unsigned k);
    int unsigned r;
    int unsigned l;
    r = k;
    l = 0;
    while (r > 2) begin
      r = rows_next(r);
      l++;
    end
    return l;
  endfunction

  // Rows present at level lvl of a tree that starts with k rows.
  function automatic int unsigned rows_at(input int unsigned k, input int unsigned lvl);
    int unsigned r;
    r = k;
    for (int unsigned i = 0; i < lvl; i++) r = rows_next(r);
    return r;
  endfunction

  // First column of group g when W columns are split into G near-equal groups.
  function automatic int unsigned group_lo(input int unsigned w, input int unsigned g,
                                           input int unsigned groups);
    return (g * w) / groups;
  endfunction

  // Column that receives the carry leaving group g of a cyclic adder whose
  // first group begins at column start: the first column of the next group.
  function automatic int unsigned carry_col(input int unsigned w, input int unsigned start,
                                            input int unsigned g, input int unsigned groups);
    return (start + group_lo(w, (g + 1) % groups, groups)) % w;
  endfunction

  function automatic int unsigned min_u(input int unsigned x, input int unsigned y);
    return (x < y) ? x : y;
  endfunction

  // Bits of the largest sum of k operands no larger than opmax.
  function automatic int unsigned sum_bits(input int unsigned k, input int unsigned opmax);
    return $clog2(k * opmax + 1);
  endfunction

  // A k-operand adder mod A runs in cyclic mode (end-around carries needed)
  // only when its sum can reach 2^P(A), i.e. for k >= ceil(2^P / OPMAX).
  function automatic bit moma_cyclic(input int unsigned a_mod, input int unsigned k,
                                     input int unsigned opmax);
    return sum_bits(k, opmax) > period(a_mod);
  endfunction

endpackage
