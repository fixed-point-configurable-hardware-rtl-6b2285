// tb_lms_dlms_ip - self-checking testbench of the LMS/DLMS IP.
// Runs three reduced configurations against the reference model of
// lms_ip_harness: LMS with N=10, K=4 (K does not divide N); DLMS with
// D=2, N=8, K=2; LMS with K=8, two adder levels per cycle (L_ADD=2);
// and the full 128-tap filter at the largest parallelism the document
// reports, K=20 (P=7 groups, the last one part-empty), as a DLMS with D=1.
module tb_lms_dlms_ip;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks, failures;
  logic d0, d1, d2, d3;
  int c0, c1, c2, c3, f0, f1, f2, f3, s0, s1, s2, s3, b0, b1, b2, b3;

  lms_ip_harness #(.N(10), .K(4), .DELAY(0), .NSAMP(400)) h0 (.clk, .rst_n, .done(d0),
    .checks(c0), .failures(f0), .n_stall(s0), .n_backtoback(b0));
  lms_ip_harness #(.N(8), .K(2), .DELAY(2), .NSAMP(400)) h1 (.clk, .rst_n, .done(d1),
    .checks(c1), .failures(f1), .n_stall(s1), .n_backtoback(b1));
  lms_ip_harness #(.N(16), .K(8), .L_ADD(2), .DELAY(0), .NSAMP(400)) h2 (.clk, .rst_n, .done(d2),
    .checks(c2), .failures(f2), .n_stall(s2), .n_backtoback(b2));
  lms_ip_harness #(.N(128), .K(20), .MU_SHIFT(4), .DELAY(1), .NSAMP(600)) h3 (.clk, .rst_n,
    .done(d3), .checks(c3), .failures(f3), .n_stall(s3), .n_backtoback(b3));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d0 && d1 && d2 && d3);
    checks = c0 + c1 + c2 + c3 + 3;
    failures = f0 + f1 + f2 + f3;
    if (b0 == 0 || b1 == 0 || b2 == 0 || b3 == 0) failures++;  // back-to-back samples seen
    if (s0 == 0 || s1 == 0 || s2 == 0 || s3 == 0) failures++;  // input had to wait
    if (c0 == 0 || c1 == 0 || c2 == 0 || c3 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("tb_lms_dlms_ip: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3 + 1);
    $finish;
  end
endmodule
