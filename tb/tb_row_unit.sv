// tb_row_unit: W = 5, CIN = 2, K = 2, F = 3, C = 4, so the 4 x 3 = 12
// outputs of the row are spread over three chains of 8 DSPs each. Random
// weights, biases and input slices; every chain output is compared with a
// direct convolution sum, including its position tag and the latency
// K*K*CIN + 1.
module tb_row_unit;
  import nn_pkg::*;
  localparam int W = 5, CIN = 2, K = 2, F = 3, C = 4, ROW = 1, IW = 8;
  localparam int WO = W - K + 1, T = K*K*CIN, NOUT = WO*F, Q = 3, SW = 2, LAT = T + 1;
  logic clk = 0, rst_n = 1;
  data_t sl [K][W*CIN];
  logic step_valid, step_last, cfg_we;
  logic [SW-1:0] step;
  logic [15:0] cfg_row, cfg_col;
  data_t cfg_wdata;
  logic out_valid [Q], out_last [Q];
  logic [IW-1:0] out_idx [Q];
  acc_t out_acc [Q];
  int wt [F][T+1];
  int checks = 0, failures = 0, cyc = 0, n_res = 0;
  typedef struct { longint v; int tag; int cyc; } exp_t;
  exp_t exp_q [Q][$];

  row_unit #(.W(W), .CIN(CIN), .K(K), .F(F), .C(C), .ROW(ROW), .IDX_W(IW)) dut (
    .clk, .rst_n, .sl, .step_valid, .step_last, .step,
    .cfg_we, .cfg_row, .cfg_col, .cfg_wdata, .out_valid, .out_last, .out_idx, .out_acc);
  always #5 clk = ~clk;
  initial begin #1 rst_n = 0; end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) begin
    for (int q = 0; q < Q; q++)
      if (rst_n && out_valid[q]) begin
        exp_t e;
        checks++; n_res++;
        if (exp_q[q].size() == 0) begin failures++; $display("FAIL chain %0d unexpected", q); end
        else begin
          e = exp_q[q].pop_front();
          if (longint'(out_acc[q]) != e.v || int'(out_idx[q]) != e.tag || cyc - e.cyc != LAT) begin
            failures++; $display("FAIL chain %0d tag %0d/%0d acc %0d exp %0d", q, out_idx[q], e.tag, out_acc[q], e.v);
          end
        end
      end
    cyc++;
  end

  initial begin
    step_valid = 0; step_last = 0; step = '0; cfg_we = 0; cfg_row = '0; cfg_col = '0; cfg_wdata = '0;
    foreach (sl[k, i]) sl[k][i] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int f = 0; f < F; f++)
      for (int t = 0; t <= T; t++) begin
        @(negedge clk);
        wt[f][t] = $urandom_range(600) - 300;
        cfg_we = 1; cfg_row = 16'(f); cfg_col = 16'(t); cfg_wdata = data_t'(wt[f][t]);
      end
    @(negedge clk); cfg_we = 0;
    for (int v = 0; v < 20; v++) begin
      foreach (sl[k, i]) sl[k][i] = data_t'($urandom_range(4000) - 2000);
      for (int s = 0; s < C; s++) begin
        for (int q = 0; q < Q; q++) begin
          int o, x, f;
          o = q*C + s; x = o / F; f = o % F;
          if (o < NOUT) begin
            exp_t e;
            e.v = longint'(wt[f][T]) * 256;
            for (int ky = 0; ky < K; ky++)
              for (int kx = 0; kx < K; kx++)
                for (int c = 0; c < CIN; c++)
                  e.v += longint'(sl[ky][(x+kx)*CIN + c]) * wt[f][(ky*K+kx)*CIN + c];
            e.tag = ROW*NOUT + o; e.cyc = cyc;
            exp_q[q].push_back(e);
          end
        end
        step_valid = 1; step = SW'(s); step_last = (s == C - 1);
        @(negedge clk);
      end
      step_valid = 0; step_last = 0;
      repeat ($urandom_range(1)) @(negedge clk);
    end
    repeat (LAT + 3) @(negedge clk);
    checks++; if (n_res != 20*NOUT) begin failures++; $display("FAIL %0d results", n_res); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
