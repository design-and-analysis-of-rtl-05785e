// tb_rns_sign_detector_sizes: runs the sign detector at the other word
// lengths for which the design is evaluated, n = 4, 12, 16, 24 and 32
// (n = 8 is covered exhaustively by tb_rns_sign_detector). n = 4 is swept
// over its whole range of 4080 values; the larger sizes get their range
// boundaries plus 20000 uniformly random values each. Each size runs in its
// own sd_size_checker instance; this module adds up their results.
module tb_rns_sign_detector_sizes;

  localparam int K = 5;

  int   c [K];
  int   f [K];
  logic d [K];

  sd_size_checker #(.N(4),  .EXHAUSTIVE(1'b1))  u_n4  (.checks(c[0]), .failures(f[0]), .done(d[0]));
  sd_size_checker #(.N(12), .RANDOM(20000))     u_n12 (.checks(c[1]), .failures(f[1]), .done(d[1]));
  sd_size_checker #(.N(16), .RANDOM(20000))     u_n16 (.checks(c[2]), .failures(f[2]), .done(d[2]));
  sd_size_checker #(.N(24), .RANDOM(20000))     u_n24 (.checks(c[3]), .failures(f[3]), .done(d[3]));
  sd_size_checker #(.N(32), .RANDOM(20000))     u_n32 (.checks(c[4]), .failures(f[4]), .done(d[4]));

  int checks = 0;
  int failures = 0;

  initial begin
    #1;  // let every checker clear its done flag first
    wait (d[0] && d[1] && d[2] && d[3] && d[4]);
    for (int i = 0; i < K; i++) begin
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
