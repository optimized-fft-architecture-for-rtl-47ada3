// Test of the shared radix-2^2 SDF pipeline at reduced sizes: 32 points
// with four streams (odd stage count, ending in a lone BF2I like the
// 2048-point reference) and 64 points with two streams (even stage count,
// last BF2I/BF2II pair without multiplier). Each configuration is run by
// r22sdf_core_check against a direct DFT, with random input gaps.
module tb_r22sdf_core;
  logic done_a, done_b;
  int   checks_a, failures_a, stalls_a, checks_b, failures_b, stalls_b;
  int   checks, failures;

  r22sdf_core_check #(.N(32), .M(4), .NSYM(3)) u_a (
    .done(done_a), .checks(checks_a), .failures(failures_a), .stalls(stalls_a));
  r22sdf_core_check #(.N(64), .M(2), .NSYM(3)) u_b (
    .done(done_b), .checks(checks_b), .failures(failures_b), .stalls(stalls_b));

  initial begin
    fork
      begin
        #10;   // let the harnesses clear their flags first
        wait (done_a && done_b);
        checks   = checks_a + checks_b + 1;
        failures = failures_a + failures_b;
        if (stalls_a == 0 || stalls_b == 0) failures++;
        $display("stalls: %0d and %0d", stalls_a, stalls_b);
      end
      begin
        #200000;
        checks   = checks_a + checks_b;
        failures = failures_a + failures_b + 1;
        $display("watchdog: pipeline outputs missing");
      end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
