// tb_nn_workloads: runs the example architectures of the single-convolution
// family that fit the nn_top topology, each at its own data-period factor C:
//   A3: 7 x 7 input, 2 x 2 x 3 conv, 2 x 2 pool, 16 + 10 dense, C = 14
//   A6: 14 x 14 input, 3 x 3 x 4 conv, 2 x 2 pool, 50 + 10 dense, C = 11
// (A1 is the default configuration and is run by tb_nn_top.) Each is driven
// by nn_top_check with random parameters and compared with the reference.
module tb_nn_workloads;
  logic done_a3, done_a6;
  int   checks_a3, failures_a3, checks_a6, failures_a6;
  int   cyc = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  nn_top_check #(.H(7), .W(7), .CIN(1), .K(2), .F(3), .C(14), .D1(16), .D2(10), .Z(4), .NEV(12))
    u_a3 (.done(done_a3), .checks(checks_a3), .failures(failures_a3));
  nn_top_check #(.H(14), .W(14), .CIN(1), .K(3), .F(4), .C(11), .D1(50), .D2(10), .Z(6), .NEV(8))
    u_a6 (.done(done_a6), .checks(checks_a6), .failures(failures_a6));

  initial begin
    int checks, failures;
    while (!(done_a3 && done_a6) && cyc < 100000) @(posedge clk);
    checks = checks_a3 + checks_a6 + 1;
    failures = failures_a3 + failures_a6 + ((done_a3 && done_a6) ? 0 : 1);
    if (!(done_a3 && done_a6)) $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
