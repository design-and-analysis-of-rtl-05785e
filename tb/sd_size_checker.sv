// sd_size_checker: test driver for one instance of the sign detector at
// width N. It applies the boundary values X = 0, 1, M/2-1, M/2, M-2, M-1
// and then either every X in [0, M) (when EXHAUSTIVE is set) or RANDOM
// random X drawn uniformly from [0, M). The residues are computed with the %
// operator on 128-bit integers and the expected sign is (X >= M/2), so the
// reference never uses the mixed radix digits. It counts both values of Co
// and both output values, reports its totals on checks/failures and raises
// done when finished. Up to n = 42 fits the 128-bit arithmetic.
module sd_size_checker #(
  parameter int unsigned N          = 8,
  parameter bit          EXHAUSTIVE = 1'b0,
  parameter int unsigned RANDOM     = 10000
) (
  output int   checks,
  output int   failures,
  output logic done
);

  typedef logic [127:0] u128_t;

  localparam u128_t M1 = (u128_t'(1) << N) - 1;
  localparam u128_t M2 = (u128_t'(1) << N);
  localparam u128_t M3 = (u128_t'(1) << N) + 1;
  localparam u128_t M  = M1 * M2 * M3;

  logic [N-1:0] x1, x2;
  logic [N:0]   x3;
  logic         x_msb;

  int n_co0 = 0, n_co1 = 0, n_pos = 0, n_neg = 0;

  rns_sign_detector #(.N(N)) dut (.x1(x1), .x2(x2), .x3(x3), .x_msb(x_msb));

  task automatic apply(input u128_t x);
    x1 = N'(x % M1);
    x2 = N'(x % M2);
    x3 = (N+1)'(x % M3);
    #1;
    checks++;
    if (x_msb !== (x >= M / 2)) begin
      failures++;
      if (failures < 10) $display("FAIL n=%0d X=%0d {%0d,%0d,%0d}: sign %b", N, x, x1, x2, x3, x_msb);
    end
    if (dut.co) n_co1++; else n_co0++;
    if (x_msb) n_neg++; else n_pos++;
  endtask

  function automatic u128_t random_below(input u128_t limit);
    u128_t r = {$urandom, $urandom, $urandom, $urandom};
    return r % limit;
  endfunction

  u128_t x;

  initial begin
    checks = 0;
    failures = 0;
    done = 1'b0;
    apply(0); apply(1); apply(M / 2 - 1); apply(M / 2); apply(M - 2); apply(M - 1);
    if (EXHAUSTIVE) begin
      for (x = 0; x < M; x++) apply(x);
    end else begin
      for (int i = 0; i < RANDOM; i++) apply(random_below(M));
    end
    $display("n=%0d: %0d values, Co=0 %0d, Co=1 %0d, positive %0d, negative %0d",
             N, checks, n_co0, n_co1, n_pos, n_neg);
    checks++;
    if (n_co0 == 0 || n_co1 == 0 || n_pos == 0 || n_neg == 0) begin
      failures++;
      $display("FAIL n=%0d: a value of Co or of the sign never occurred", N);
    end
    done = 1'b1;
  end

endmodule
