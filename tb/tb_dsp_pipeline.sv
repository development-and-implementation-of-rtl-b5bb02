// tb_dsp_pipeline: a new random dot product enters every cycle; each sum
// must appear exactly Z cycles after its operands.
module tb_dsp_pipeline;
  import nn_pkg::*;
  localparam int Z = 5;
  logic clk = 0, rst_n = 1;
  data_t a [Z], w [Z];
  acc_t cin, sum;
  int checks = 0, failures = 0;
  longint exp_q[$];
  dsp_pipeline #(.Z(Z)) dut (.clk, .rst_n, .a, .w, .cin, .sum);
  always #5 clk = ~clk;
  initial begin #1 rst_n = 0; end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    foreach (a[i]) begin a[i] = '0; w[i] = '0; end
    cin = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      longint e;
      @(negedge clk);
      if (i >= Z) begin
        checks++;
        if (longint'(sum) != exp_q[i - Z]) begin
          failures++; $display("FAIL %0d: sum=%0d exp=%0d", i - Z, sum, exp_q[i - Z]);
        end
      end
      cin = acc_t'($signed($urandom_range(200000))) - 100000;
      e = longint'(cin);
      for (int d = 0; d < Z; d++) begin
        a[d] = data_t'($urandom); w[d] = data_t'($urandom);
        e += longint'(a[d]) * longint'(w[d]);
      end
      exp_q.push_back(e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
