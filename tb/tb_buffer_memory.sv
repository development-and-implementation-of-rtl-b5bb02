// tb_buffer_memory: H = 4, W = 3, CIN = 2. Random row writes (single and
// multiple rows at once) and whole-map writes; the slice view must show pixel (h, w, c) at
// element w*CIN + c of slice h.
module tb_buffer_memory;
  import nn_pkg::*;
  localparam int H = 4, W = 3, CIN = 2;
  logic clk = 0, rst_n = 1;
  logic [H*CIN-1:0] row_we;
  data_t row_data [W];
  logic  map_we;
  data_t map_data [H*W*CIN];
  data_t slices [H][W*CIN];
  int img [H][W][CIN];
  int checks = 0, failures = 0;
  buffer_memory #(.H(H), .W(W), .CIN(CIN)) dut (.clk, .rst_n, .row_we, .row_data, .map_we, .map_data, .slices);
  always #5 clk = ~clk;
  initial begin #1 rst_n = 0; end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    row_we = '0; map_we = 0; foreach (row_data[i]) row_data[i] = '0; foreach (map_data[i]) map_data[i] = '0;
    foreach (img[h, w, c]) img[h][w][c] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      row_we = (it % 10 == 0) ? (H*CIN)'($urandom) : (H*CIN)'(1) << $urandom_range(H*CIN - 1);
      foreach (row_data[i]) row_data[i] = data_t'($urandom);
      map_we = (it % 7 == 3);
      foreach (map_data[i]) map_data[i] = data_t'($urandom);
      if (map_we) begin
        foreach (img[h, w, c]) img[h][w][c] = int'(map_data[(h*W + w)*CIN + c]);
      end else begin
        for (int r = 0; r < H*CIN; r++)
          if (row_we[r]) for (int w = 0; w < W; w++) img[r / CIN][w][r % CIN] = int'(row_data[w]);
      end
      @(negedge clk);
      row_we = '0; map_we = 0;
      foreach (img[h, w, c]) begin
        checks++;
        if (int'(slices[h][w*CIN + c]) != img[h][w][c]) begin failures++; $display("FAIL it %0d (%0d,%0d,%0d)", it, h, w, c); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
