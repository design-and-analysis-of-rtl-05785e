// rns_sign_detector: sign detection for a residue number system with the
// moduli set {m1, m2, m3} = {2^n-1, 2^n, 2^n+1}.
//
// Idea: write X by mixed radix conversion as X = z3*m3*m1 + z2*m3 + z1 with
// 0 <= z3 < 2^n. Half the dynamic range, M/2, equals 2^(n-1)*m3*m1, so X is in
// the upper (negative) half exactly when the MSB of z3 is 1. Working the digit
// equations modulo m3, m1 and m2 gives
//   z3 = | x1_hat + ~x2 + x3_hat' + x3,0 + Co |_(2^n)
// with the operands formed by wiring alone:
//   x1_hat  = x1 rotated right by one bit        (2^(n-1)*x1 mod 2^n-1)
//   x3_hat' = {x3,0 | x3,n , x3[n-1:1]}          (2^(n-1)*x3 mod 2^n-1)
//   ~x2     = bitwise complement of x2
//   Co      = 1 when x1_hat + ~x3_hat' >= 2^n-1 (end-around carry of z2)
//
// Datapath: an n-bit carry-save adder (sd_csa) compresses x1_hat, ~x2 and
// x3_hat' into S and C; x3,0 takes the empty weight-1 slot of C to give C';
// in parallel the carry generator (sd_carry_gen) computes Co from x1_hat and
// ~x3_hat'; the modified parallel prefix adder (sd_mppa) returns only the MSB
// of S + C' + Co, which is the sign output x_msb. The arrangement of these
// blocks and their prefix trees follows the published structure; the
// parameterisation for any n, the tree shape for sizes other than 8 and the
// port names are this design's own.
//
// Interface: x1 < 2^n-1, x2 < 2^n, x3 <= 2^n are the residues of X (other
// input codes are outside the number system and give no defined result);
// x_msb = 1 when X >= M/2 with M = (2^n-1)*2^n*(2^n+1), i.e. X is negative.
// Purely combinational, no clock: delay is one full adder, ceil(log2(n-1))
// prefix levels and two gate levels.
module rns_sign_detector #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] x1,
  input  logic [N-1:0] x2,
  input  logic [N:0]   x3,
  output logic         x_msb
);

  logic [N-1:0] x1_hat;     // |2^(n-1) x1|_(2^n-1)
  logic [N-1:0] x3_hat;     // |2^(n-1) x3|_(2^n-1)
  logic [N-1:0] x2_n;       // ~x2
  logic [N-1:0] csa_s;      // CSA sum S
  logic [N-1:1] csa_c;      // CSA carry C without its zero bit 0
  logic [N-1:0] c_prime;    // C' = {c_{n-1:1}, x3,0}
  logic         co;         // end-around carry of z2

  assign x1_hat  = {x1[0], x1[N-1:1]};
  assign x3_hat  = {x3[0] | x3[N], x3[N-1:1]};
  assign x2_n    = ~x2;
  assign c_prime = {csa_c, x3[0]};

  sd_csa #(.N(N)) u_csa (
    .a    (x1_hat),
    .b    (x2_n),
    .c    (x3_hat),
    .s    (csa_s),
    .carry(csa_c)
  );

  sd_carry_gen #(.N(N)) u_cgen (
    .a (x1_hat),
    .b (~x3_hat),
    .co(co)
  );

  sd_mppa #(.N(N)) u_mppa (
    .s  (csa_s),
    .c  (c_prime),
    .co (co),
    .msb(x_msb)
  );

endmodule
