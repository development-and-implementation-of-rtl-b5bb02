// tb_nn_top_multi: end-to-end test of a configuration in which every layer
// must split its work and the optional second convolution is present:
// 10 x 10 x 2 input, 3 x 3 x 3 convolution with C = 4 (three chains per row
// unit), 2 x 2 pooling to 4 x 4 x 3, a 2 x 2 x 2 second convolution fed by a
// whole-map write (3 x 3 x 2 = 18 values), then dense layers of 9 neurons
// (three neuron units, six pipelines of Z = 3) and 5 neurons. nn_top_check
// streams events as fast as the row-by-row input allows or with gaps,
// compares outputs and latency with the reference and counts overlap,
// full-rate starts, gaps, ReLU clamps and saturation.
module tb_nn_top_multi;
  logic done;
  int   checks, failures;
  int   cyc = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  nn_top_check #(.H(10), .W(10), .CIN(2), .K(3), .F(3), .C(4), .D1(9), .D2(5), .Z(3), .NEV(30),
                 .CONV2(1'b1), .K2(2), .F2(2))
    u_chk (.done, .checks, .failures);

  initial begin
    while (!done && cyc < 50000) @(posedge clk);
    if (!done) $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + (done ? 0 : 1));
    $finish;
  end
endmodule
