// tb_slice_memory: slices load one cycle after load and hold, unchanged by
// new input, until the next load.
module tb_slice_memory;
  import nn_pkg::*;
  localparam int NSL = 3, SW = 5;
  logic clk = 0, rst_n = 1, load;
  data_t din [NSL][SW], dout [NSL][SW], held [NSL][SW];
  int checks = 0, failures = 0;
  slice_memory #(.NSL(NSL), .SW(SW)) dut (.clk, .rst_n, .load, .din, .dout);
  always #5 clk = ~clk;
  initial begin #1 rst_n = 0; end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    load = 0;
    foreach (din[s, i]) begin din[s][i] = '0; held[s][i] = '0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      load = ($urandom_range(3) == 0);
      foreach (din[s, i]) din[s][i] = data_t'($urandom);
      if (load) foreach (din[s, i]) held[s][i] = din[s][i];
      @(negedge clk);
      foreach (held[s, i]) begin
        checks++;
        if (dout[s][i] != held[s][i]) begin failures++; $display("FAIL it %0d slice %0d word %0d", it, s, i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
