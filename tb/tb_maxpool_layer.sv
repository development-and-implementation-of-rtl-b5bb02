// tb_maxpool_layer: 6 x 5 x 2 map (odd width: the last column is dropped),
// 2 x 2 pooling; outputs compared with the reference one cycle after
// in_valid, and held when in_valid is low.
module tb_maxpool_layer;
  import nn_pkg::*;
  import nn_ref_pkg::*;
  localparam int H = 6, W = 5, F = 2, NO = (H/2)*(W/2)*F;
  logic clk = 0, rst_n = 1, in_valid, out_valid;
  data_t in_x [H*W*F], out_y [NO];
  int checks = 0, failures = 0;
  maxpool_layer #(.H(H), .W(W), .F(F), .P(2)) dut (.clk, .rst_n, .in_valid, .in_x, .out_valid, .out_y);
  always #5 clk = ~clk;
  initial begin #1 rst_n = 0; end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int x[], y[], last_y[];
    in_valid = 0; foreach (in_x[i]) in_x[i] = '0;
    last_y = new[NO]; foreach (last_y[i]) last_y[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      x = new[H*W*F];
      foreach (x[i]) x[i] = rnd(-32768, 32767);
      foreach (in_x[i]) in_x[i] = data_t'(x[i]);
      in_valid = ($urandom_range(3) != 0);
      pool(x, H, W, F, 2, y);
      @(negedge clk);
      if (in_valid) last_y = y;
      checks++;
      if (out_valid != in_valid) begin failures++; $display("FAIL out_valid"); end
      for (int i = 0; i < NO; i++) begin
        checks++;
        if (int'(out_y[i]) != last_y[i]) begin failures++; $display("FAIL it %0d out %0d: %0d exp %0d", it, i, out_y[i], last_y[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
