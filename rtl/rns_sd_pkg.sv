// rns_sd_pkg: types and functions shared by the prefix trees of the RNS sign
// detector for the moduli set {2^n-1, 2^n, 2^n+1}.
//
// A prefix node carries a generate bit g and a propagate bit p. Two adjacent
// groups, hi (more significant) and lo, merge into one group as
//   g = g_hi | (p_hi & g_lo),   p = p_hi & p_lo.
// The bit-level terms are g_i = a_i & b_i and p_i = a_i | b_i. An inclusive-OR
// propagate gives the same carries as an XOR propagate, and it also makes the
// group term P an "every bit position holds at least one 1" flag, which the
// carry generator uses to spot the all-ones sum 2^n-1 (see sd_carry_gen).
package rns_sd_pkg;

  typedef struct packed {
    logic g;  // group generates a carry
    logic p;  // group passes an incoming carry on
  } pg_t;

  // Bit-level generate/propagate of one bit position of a + b.
  function automatic pg_t pg_bit(input logic a, input logic b);
    pg_t r;
    r.g = a & b;
    r.p = a | b;
    return r;
  endfunction

  // Merge a more significant group (hi) with the group just below it (lo).
  function automatic pg_t pg_merge(input pg_t hi, input pg_t lo);
    pg_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

endpackage
