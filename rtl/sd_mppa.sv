// sd_mppa: modified parallel prefix adder of the sign detector. Of the sum
//   z3 = | S + C' + Co |_(2^n)
// it produces only the most significant bit, which is the sign of the RNS
// number.
//
// How it works: positions 0 .. n-2 of S and C' form bit-level generate and
// propagate terms that a binary prefix tree (sd_pg_tree) reduces to the group
// pair (g_{n-2:0}, p_{n-2:0}). Co enters as the carry into position 0, so the
// carry into position n-1 is g_{n-2:0} | (p_{n-2:0} & Co), and the MSB is
// s_{n-1} ^ c'_{n-1} ^ that carry. No other sum bit is formed.
//
// Interface: s is the CSA sum vector, c is C' = {c_{n-1:1}, x3,0} (bit i has
// weight 2^i), co is the carry generator output, msb = bit n-1 of z3.
// Purely combinational; needs n >= 2.
module sd_mppa
  import rns_sd_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] s,
  input  logic [N-1:0] c,
  input  logic         co,
  output logic         msb
);

  pg_t [N-2:0] pg_bits;
  pg_t         grp;
  logic        carry_msb;

  always_comb begin
    for (int unsigned i = 0; i < N - 1; i++) pg_bits[i] = pg_bit(s[i], c[i]);
  end

  sd_pg_tree #(.WIDTH(N - 1)) u_tree (
    .pg_in(pg_bits),
    .grp  (grp)
  );

  assign carry_msb = grp.g | (grp.p & co);
  assign msb       = s[N-1] ^ c[N-1] ^ carry_msb;

endmodule
