// tb_conv_layer: 5 x 5 x 2 input, 3 x 3 kernels, F = 2 filters, C = 4:
// three row units, each with two chains (6 outputs per row over 4 steps),
// long memory of 3 slices and short memory of 2. Images are written row by
// row (every third image as one whole-map write instead) and started as
// soon as the writes are done, or later; the
// output maps are compared with the reference and the latency
// min(C, WO*F) + K*K*CIN + 2 is checked.
module tb_conv_layer;
  import nn_pkg::*;
  import nn_ref_pkg::*;
  localparam int H = 5, W = 5, CIN = 2, K = 3, F = 2, C = 4;
  localparam int HO = H-K+1, WO = W-K+1, T = K*K*CIN, NMAP = HO*WO*F, LAT = C + T + 2, NV = 25;
  logic clk = 0, rst_n = 1, start, cfg_we, out_valid;
  logic [H*CIN-1:0] row_we;
  data_t row_data [W], cfg_wdata, out_y [NMAP];
  logic  map_we;
  data_t map_data [H*W*CIN];
  logic [15:0] cfg_row, cfg_col;
  int wt[], b[];
  int exp_q[$][];
  int st_q[$];
  int checks = 0, failures = 0, cyc = 0, n_out = 0;
  conv_layer #(.H(H), .W(W), .CIN(CIN), .K(K), .F(F), .C(C), .RELU(1'b1)) dut (
    .clk, .rst_n, .row_we, .row_data, .map_we, .map_data, .start, .cfg_we, .cfg_row, .cfg_col, .cfg_wdata, .out_valid, .out_y);
  always #5 clk = ~clk;
  initial begin #1 rst_n = 0; end
  initial begin repeat (8000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) begin
    if (rst_n && start) st_q.push_back(cyc);
    if (rst_n && out_valid) begin
      int e[];
      int s;
      n_out++;
      e = exp_q.pop_front(); s = st_q.pop_front();
      checks++;
      if (cyc - s != LAT) begin failures++; $display("FAIL latency %0d", cyc - s); end
      for (int i = 0; i < NMAP; i++) begin
        checks++;
        if (int'(out_y[i]) != e[i]) begin failures++; $display("FAIL map %0d: %0d exp %0d", i, out_y[i], e[i]); end
      end
    end
    cyc++;
  end

  initial begin
    int img[], y[];
    start = 0; row_we = '0; map_we = 0; foreach (map_data[i]) map_data[i] = '0; cfg_we = 0; cfg_row = '0; cfg_col = '0; cfg_wdata = '0;
    foreach (row_data[i]) row_data[i] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    wt = new[F*T]; b = new[F];
    for (int f = 0; f < F; f++)
      for (int t = 0; t <= T; t++) begin
        @(negedge clk);
        cfg_we = 1; cfg_row = 16'(f); cfg_col = 16'(t);
        if (t < T) begin wt[f*T + t] = rnd(-300, 300); cfg_wdata = data_t'(wt[f*T + t]); end
        else       begin b[f] = rnd(-200, 200);         cfg_wdata = data_t'(b[f]); end
      end
    @(negedge clk); cfg_we = 0;
    for (int v = 0; v < NV; v++) begin
      img = new[H*W*CIN];
      foreach (img[i]) img[i] = (v % 6 == 2) ? rnd(-32768, 32767) : rnd(-1000, 1000);
      conv(img, wt, b, H, W, CIN, K, F, 1'b1, y);
      exp_q.push_back(y);
      if (v % 3 == 2) begin
        map_we = 1;
        foreach (map_data[i]) map_data[i] = data_t'(img[i]);
        @(negedge clk);
        map_we = 0;
        repeat (C - 2) @(negedge clk);
      end else begin
        for (int h = 0; h < H; h++)
          for (int c = 0; c < CIN; c++) begin
            row_we = '0; row_we[h*CIN + c] = 1'b1;
            for (int w = 0; w < W; w++) row_data[w] = data_t'(img[(h*W + w)*CIN + c]);
            @(negedge clk);
          end
        row_we = '0;
      end
      start = 1;
      @(negedge clk);
      start = 0;
      repeat ((v % 4 == 1) ? rnd(1, 5) : 0) @(negedge clk);
    end
    repeat (LAT + 3) @(negedge clk);
    checks++; if (n_out != NV) begin failures++; $display("FAIL %0d outputs", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
