// tb_sm2d_workloads: runs the evaluated configurations that the other tests
// do not reach at full size: one 256 x 256 frame with the 3 x 3 window (L=1,
// five clocks per point), and one 64 x 64 frame with a 5 x 5 window run as the
// S-method with L=2 (13 clocks per point).  A third run uses the 5 x 5 build
// (32 x 32 frame) with distribution code 1, the L=1 S-method on a larger
// window.  Each is checked point by point and for its throughput by
// sm2d_stream_check.
module tb_sm2d_workloads;
  logic done_a, done_b, done_c;
  int checks_a, failures_a, checks_b, failures_b, checks_c, failures_c;
  int checks = 0, failures = 0;

  sm2d_stream_check #(.N(256), .L(1), .TFD(1), .NFRAMES(1)) u_256 (
    .done(done_a), .checks(checks_a), .failures(failures_a));
  sm2d_stream_check #(.N(64), .L(2), .TFD(2), .NFRAMES(1)) u_l2 (
    .done(done_b), .checks(checks_b), .failures(failures_b));
  sm2d_stream_check #(.N(32), .L(2), .TFD(1), .NFRAMES(2)) u_l2c1 (
    .done(done_c), .checks(checks_c), .failures(failures_c));

  initial begin
    #50ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b + checks_c,
             failures_a + failures_b + failures_c + 1);
    $finish;
  end

  initial begin
    wait (done_a === 1'b1 && done_b === 1'b1 && done_c === 1'b1);
    checks   = checks_a + checks_b + checks_c;
    failures = failures_a + failures_b + failures_c;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
