// sd_csa: n-bit carry-save adder of the sign detector. It compresses the
// three n-bit operands x1_hat, ~x2 and x3_hat' of the sign equation
//   z3 = | x1_hat + ~x2 + x3_hat' + x3,0 + Co |_(2^n)
// into a sum vector S and a carry vector C, with S + 2*C' = a + b + c
// modulo 2^n.
//
// Each bit position is a full adder: s_i = a_i ^ b_i ^ c_i, and its majority
// carry lands one position higher as carry[i+1]. Because the result is only
// needed modulo 2^n, the carry out of the top position has no weight and is
// not formed, so bit n-1 has no majority gate. The carry vector's bit 0 has
// weight 2^0 and is always zero here; it is not an output, which leaves that
// position free for x3,0 in the adder that follows.
//
// Interface: a, b, c are the operands; s is the sum vector; carry[n-1:1] is
// the carry vector (bit i has weight 2^i). Purely combinational.
module sd_csa #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N-1:0] s,
  output logic [N-1:1] carry
);

  always_comb begin
    s = a ^ b ^ c;
    for (int unsigned i = 1; i < N; i++) begin
      carry[i] = (a[i-1] & b[i-1]) | (a[i-1] & c[i-1]) | (b[i-1] & c[i-1]);
    end
  end

endmodule
