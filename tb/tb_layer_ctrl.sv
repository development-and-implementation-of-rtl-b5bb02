// tb_layer_ctrl: after each start the steps 0..STEPS-1 must follow on
// consecutive cycles, beginning the cycle after start, with last on the
// final one; starts come every C cycles or with gaps.
module tb_layer_ctrl;
  localparam int C = 8, STEPS = 6, SW = 3;
  logic clk = 0, rst_n = 1, start, step_valid, last;
  logic [SW-1:0] step;
  int checks = 0, failures = 0;
  layer_ctrl #(.C(C), .STEPS(STEPS)) dut (.clk, .rst_n, .start, .step_valid, .step, .last);
  always #5 clk = ~clk;
  initial begin #1 rst_n = 0; end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    start = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int ev = 0; ev < 50; ev++) begin
      int gap;
      gap = (ev % 3 == 0) ? $urandom_range(5) : 0;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      for (int k = 0; k < C + gap - 1; k++) begin
        checks++;
        if (k < STEPS) begin
          if (!step_valid || step != SW'(k) || last != (k == STEPS - 1)) begin
            failures++; $display("FAIL ev %0d k %0d: v=%0b step=%0d last=%0b", ev, k, step_valid, step, last);
          end
        end else if (step_valid || last) begin
          failures++; $display("FAIL ev %0d k %0d: step after the end", ev, k);
        end
        if (k < C + gap - 2) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
