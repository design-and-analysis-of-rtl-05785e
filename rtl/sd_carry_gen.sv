// sd_carry_gen: carry generator of the sign detector. It delivers the
// end-around carry Co of the modulo 2^n-1 subtraction that yields the mixed
// radix digit z2 = | x1_hat - x3_hat' |_(2^n-1):
//   Co = 1  when  x1_hat + ~x3_hat' >= 2^n - 1,  else 0.
//
// How it works: bit-level generate g_i = a_i & b_i and propagate
// p_i = a_i | b_i feed a binary prefix tree (sd_pg_tree) that returns the
// group pair (G,P) of all n bits. G is the carry out of a + b, i.e. the sum is
// at least 2^n. If G is 0 and P is 1, no position holds two ones while every
// position holds one, so the sum is exactly 2^n - 1. Hence Co = G | P.
// Only the group pair of the whole field is built, not the carries of the
// inner positions, which keeps the tree to n-1 merge nodes.
//
// Interface: a = x1_hat, b = ~x3_hat' (already complemented), co = Co.
// Purely combinational; ceil(log2 n) merge levels plus one OR.
module sd_carry_gen
  import rns_sd_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         co
);

  pg_t [N-1:0] pg_bits;
  pg_t         grp;

  always_comb begin
    for (int unsigned i = 0; i < N; i++) pg_bits[i] = pg_bit(a[i], b[i]);
  end

  sd_pg_tree #(.WIDTH(N)) u_tree (
    .pg_in(pg_bits),
    .grp  (grp)
  );

  assign co = grp.g | grp.p;

endmodule
