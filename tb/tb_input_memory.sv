// tb_input_memory: captured vector must appear one cycle after we, hold
// without we, and the padding words must read zero.
module tb_input_memory;
  import nn_pkg::*;
  localparam int N = 9, NPAD = 12;
  logic clk = 0, rst_n = 1, we;
  data_t din [N], x [NPAD], held [N];
  int checks = 0, failures = 0;
  input_memory #(.N(N), .NPAD(NPAD)) dut (.clk, .rst_n, .we, .din, .x);
  always #5 clk = ~clk;
  initial begin #1 rst_n = 0; end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    we = 0; foreach (din[i]) din[i] = '0; foreach (held[i]) held[i] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      @(negedge clk);
      we = ($urandom_range(2) == 0);
      foreach (din[i]) din[i] = data_t'($urandom);
      @(negedge clk);
      if (we) foreach (held[i]) held[i] = din[i];
      we = 0;
      for (int i = 0; i < NPAD; i++) begin
        checks++;
        if (x[i] != ((i < N) ? held[i] : data_t'(0))) begin failures++; $display("FAIL it %0d word %0d", it, i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
