// nn_top_check: self-checking harness for one configuration of nn_top,
// shared by the workload testbench. It loads random parameters, streams NEV
// events (full rate, with gaps, some saturating), compares every output and
// its latency with the integer reference model and checks that overlap,
// full-rate starts, gaps, ReLU clamps and saturation all occurred. done
// rises when it has finished; checks and failures count its comparisons.
module nn_top_check #(
  parameter int H = 7, W = 7, CIN = 1, K = 2, F = 1, C = 16, D1 = 10, D2 = 10, Z = 4,
  parameter bit CONV2 = 1'b0,
  parameter int K2 = 2, F2 = 1,
  parameter int NEV = 12
) (
  output logic done,
  output int   checks,
  output int   failures
);
  import nn_pkg::*;
  import nn_ref_pkg::*;

  localparam int HO = H - K + 1, WO = W - K + 1, T = K*K*CIN;
  localparam int HP = HO/2, WP = WO/2, HO2 = HP - K2 + 1, WO2 = WP - K2 + 1, T2 = K2*K2*F;
  localparam int NP = CONV2 ? HO2*WO2*F2 : HP*WP*F;
  localparam int LAT = (((WO*F) < C ? WO*F : C) + T + 2) + 1
                     + ((D1 < C ? D1 : C) + Z + 3) + ((D2 < C ? D2 : C) + Z + 3)
                     + (CONV2 ? 1 + (((WO2*F2) < C ? WO2*F2 : C) + T2 + 2) : 0);
  // Shortest start-to-start spacing: C cycles, or the row writes if longer.
  localparam int PMIN = (C > H*CIN + 1) ? C : H*CIN + 1;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  logic [H*CIN-1:0] row_we;
  data_t row_data [W];
  logic  start;
  cfg_t  cfg;
  logic  out_valid;
  data_t out_y [D2];

  nn_top #(.H(H), .W(W), .CIN(CIN), .K(K), .F(F), .C(C), .D1(D1), .D2(D2), .Z(Z),
          .CONV2(CONV2), .K2(K2), .F2(F2)) dut (.clk, .rst_n, .row_we, .row_data, .start, .cfg, .out_valid, .out_y);

  always #5 clk = ~clk;

  initial begin checks = 0; failures = 0; done = 0; end
  int cwt[], cb[], w1[], b1[], w2[], b2[], c2w[], c2b[];
  int exp_q[$][];
  int start_cyc[$];
  int cyc = 0, outstanding = 0;
  int n_overlap = 0, n_fullrate = 0, n_gap = 0, n_out = 0;

  always @(posedge clk) begin
    if (rst_n && start) begin
      start_cyc.push_back(cyc);
      if (outstanding > 0) n_overlap++;
      outstanding++;
    end
    if (rst_n && out_valid) begin
      int e[];
      int s;
      n_out++;
      outstanding--;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL: unexpected output at cycle %0d", cyc);
      end else begin
        e = exp_q.pop_front();
        s = start_cyc.pop_front();
        if (cyc - s != LAT) begin
          failures++; $display("FAIL: latency %0d, expected %0d", cyc - s, LAT);
        end
        for (int n = 0; n < D2; n++) begin
          checks++;
          if (int'(out_y[n]) != e[n]) begin
            failures++;
            $display("FAIL: event out %0d neuron %0d got %0d exp %0d", n_out, n, out_y[n], e[n]);
          end
        end
      end
    end
    cyc++;
  end

  task automatic load(input logic [1:0] layer, input int row, input int col, input int val);
    @(negedge clk);
    cfg.we = 1; cfg.layer = layer; cfg.row = 16'(row); cfg.col = 16'(col); cfg.data = data_t'(val);
    @(negedge clk);
    cfg.we = 0;
  endtask


  initial begin
    int img[];
    int cy[], py[], y1[], y2[], c2y[];
    cfg = '0; row_we = '0; start = 0;
    foreach (row_data[i]) row_data[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    cwt = new[F*T]; cb = new[F]; w1 = new[D1*NP]; b1 = new[D1]; w2 = new[D2*D1]; b2 = new[D2];
    foreach (cwt[i]) begin cwt[i] = rnd(-256, 256); load(0, i / T, i % T, cwt[i]); end
    foreach (cb[i])  begin cb[i]  = rnd(-128, 128); load(0, i, T, cb[i]); end
    foreach (w1[i])  begin w1[i]  = rnd(-200, 200); load(1, i / NP, i % NP, w1[i]); end
    foreach (b1[i])  begin b1[i]  = rnd(-128, 128); load(1, i, NP, b1[i]); end
    foreach (w2[i])  begin w2[i]  = rnd(-200, 200); load(2, i / D1, i % D1, w2[i]); end
    foreach (b2[i])  begin b2[i]  = rnd(-128, 128); load(2, i, D1, b2[i]); end
    if (CONV2) begin
      c2w = new[F2*T2]; c2b = new[F2];
      foreach (c2w[i]) begin c2w[i] = rnd(-128, 128); load(3, i / T2, i % T2, c2w[i]); end
      foreach (c2b[i]) begin c2b[i] = rnd(-128, 128); load(3, i, T2, c2b[i]); end
    end

    n_relu_clamps = 0; n_saturations = 0;
    for (int ev = 0; ev < NEV; ev++) begin
      int period;
      bit hot;
      hot = (ev % 7 == 3);
      img = new[H*W*CIN];
      foreach (img[i]) img[i] = hot ? rnd(-32768, 32767) : rnd(-64, 1023);
      conv(img, cwt, cb, H, W, CIN, K, F, 1'b1, cy);
      pool(cy, HO, WO, F, 2, py);
      if (CONV2) begin
        conv(py, c2w, c2b, HP, WP, F, K2, F2, 1'b1, c2y);
        py = c2y;
      end
      dense(py, w1, b1, NP, D1, 1'b1, y1);
      dense(y1, w2, b2, D1, D2, 1'b0, y2);
      exp_q.push_back(y2);
      // rows of this event
      for (int h = 0; h < H; h++)
        for (int c = 0; c < CIN; c++) begin
          @(negedge clk);
          row_we = '0; row_we[h*CIN + c] = 1'b1;
          for (int w = 0; w < W; w++) row_data[w] = data_t'(img[(h*W + w)*CIN + c]);
        end
      @(negedge clk);
      row_we = '0;
      // wait for the period of the previous start to elapse
      period = (ev % 5 == 4) ? PMIN + rnd(1, 30) : PMIN;
      if (ev > 0) begin
        while (cyc - start_cyc_last < period) @(negedge clk);
        if (period == PMIN) n_fullrate++; else n_gap++;
      end
      start = 1;
      start_cyc_last = cyc;
      @(negedge clk);
      start = 0;
    end
    while (outstanding > 0 || exp_q.size() > 0) begin
      @(negedge clk);
      if (cyc > 60000) break;
    end
    repeat (5) @(negedge clk);

    checks++; if (n_out != NEV) begin failures++; $display("FAIL: %0d outputs for %0d events", n_out, NEV); end
    checks++; if (n_overlap == 0)     begin failures++; $display("FAIL: no overlapping events"); end
    checks++; if (n_fullrate == 0)    begin failures++; $display("FAIL: no full-rate start"); end
    checks++; if (n_gap == 0)         begin failures++; $display("FAIL: no idle gap"); end
    checks++; if (n_relu_clamps == 0) begin failures++; $display("FAIL: no ReLU clamp"); end
    checks++; if (n_saturations == 0) begin failures++; $display("FAIL: no saturation"); end
    $display("%m mechanisms: overlap=%0d fullrate=%0d gap=%0d relu=%0d sat=%0d",
             n_overlap, n_fullrate, n_gap, n_relu_clamps, n_saturations);
    done = 1;
  end

  int start_cyc_last = 0;
endmodule
