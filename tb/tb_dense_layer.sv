// tb_dense_layer: NI = 9, NN = 10 with C = 4, so three neuron units share
// the work (4 + 4 + 2 neurons). Random parameters; input vectors arrive
// every C cycles or with gaps; each output vector is compared with the
// reference and the latency min(C,NN) + Z + 3 is checked.
module tb_dense_layer;
  import nn_pkg::*;
  import nn_ref_pkg::*;
  localparam int NI = 9, NN = 10, C = 4, Z = 4, LAT = C + Z + 3, NV = 40;
  logic clk = 0, rst_n = 1, in_valid, cfg_we, out_valid;
  data_t in_x [NI], cfg_wdata, out_y [NN];
  logic [15:0] cfg_row, cfg_col;
  int wt[], b[];
  int exp_q[$][];
  int st_q[$];
  int checks = 0, failures = 0, cyc = 0, n_out = 0;
  dense_layer #(.NI(NI), .NN(NN), .C(C), .Z(Z), .RELU(1'b1)) dut (
    .clk, .rst_n, .in_valid, .in_x, .cfg_we, .cfg_row, .cfg_col, .cfg_wdata, .out_valid, .out_y);
  always #5 clk = ~clk;
  initial begin #1 rst_n = 0; end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) begin
    if (rst_n && in_valid) st_q.push_back(cyc);
    if (rst_n && out_valid) begin
      int e[];
      int s;
      n_out++;
      e = exp_q.pop_front(); s = st_q.pop_front();
      checks++;
      if (cyc - s != LAT) begin failures++; $display("FAIL latency %0d", cyc - s); end
      for (int n = 0; n < NN; n++) begin
        checks++;
        if (int'(out_y[n]) != e[n]) begin failures++; $display("FAIL neuron %0d: %0d exp %0d", n, out_y[n], e[n]); end
      end
    end
    cyc++;
  end

  initial begin
    int x[], y[];
    in_valid = 0; cfg_we = 0; cfg_row = '0; cfg_col = '0; cfg_wdata = '0;
    foreach (in_x[i]) in_x[i] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    wt = new[NN*NI]; b = new[NN];
    for (int n = 0; n < NN; n++)
      for (int i = 0; i <= NI; i++) begin
        @(negedge clk);
        cfg_we = 1; cfg_row = 16'(n); cfg_col = 16'(i);
        if (i < NI) begin wt[n*NI + i] = rnd(-300, 300); cfg_wdata = data_t'(wt[n*NI + i]); end
        else        begin b[n] = rnd(-200, 200);          cfg_wdata = data_t'(b[n]); end
      end
    @(negedge clk); cfg_we = 0;
    for (int v = 0; v < NV; v++) begin
      x = new[NI];
      foreach (x[i]) x[i] = (v % 9 == 5) ? rnd(-32768, 32767) : rnd(-1000, 1000);
      dense(x, wt, b, NI, NN, 1'b1, y);
      exp_q.push_back(y);
      foreach (in_x[i]) in_x[i] = data_t'(x[i]);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      repeat (C - 1 + ((v % 4 == 3) ? rnd(1, 6) : 0)) @(negedge clk);
    end
    repeat (LAT + 3) @(negedge clk);
    checks++; if (n_out != NV) begin failures++; $display("FAIL %0d outputs", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
