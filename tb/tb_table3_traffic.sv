// tb_table3_traffic: workload test under the evaluated per-host traffic mix
// (see table3_run), run on both switch variants of the evaluation at once: the
// default 16-port switch with 16 KB of input and 16 KB of output buffer per
// port, and an 8-port switch with 32 KB + 32 KB per port. Each run checks
// delivery, data, per-flow order and that QoS classes see lower mean and worst
// latency than best effort; the watchdog fails the test if either run hangs.
module tb_table3_traffic;
  logic clk = 0;
  logic done_p, done_b;
  int   checks_p, failures_p, checks_b, failures_b;
  int   checks, failures;

  always #5 clk = ~clk;

  table3_run #(.N(16), .BUF_BYTES(16384), .NAME("16 ports, 16 KB")) u_p (
    .clk, .done(done_p), .checks(checks_p), .failures(failures_p));
  table3_run #(.N(8), .BUF_BYTES(32768), .NAME("8 ports, 32 KB")) u_b (
    .clk, .done(done_b), .checks(checks_b), .failures(failures_b));

  initial begin
    wait (done_p === 1'b1 && done_b === 1'b1);
    checks = checks_p + checks_b;
    failures = failures_p + failures_b;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    checks = checks_p + checks_b;
    failures = failures_p + failures_b + 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
