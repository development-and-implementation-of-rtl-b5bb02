// tb_neuron_unit: NI = 10 inputs over Z = 4 (three pipelines, the last
// padded), DEPTH = 6 neurons. Random weights and biases are loaded; for
// several input vectors the unit is stepped through all neurons on
// consecutive cycles and every accumulator, tag and the latency Z + 2 are
// compared with a direct dot product.
module tb_neuron_unit;
  import nn_pkg::*;
  localparam int NI = 10, Z = 4, DEPTH = 6, P = 3, AW = 3, TW = 8, LAT = Z + 2;
  logic clk = 0, rst_n = 1;
  data_t x [P*Z];
  logic in_valid, in_last, cfg_we, out_valid, out_last;
  logic [AW-1:0] raddr, cfg_waddr;
  logic [TW-1:0] in_tag, out_tag;
  logic [15:0] cfg_col;
  data_t cfg_wdata;
  acc_t acc;
  int wt [DEPTH][NI+1];
  int checks = 0, failures = 0, cyc = 0;
  typedef struct { longint v; int tag; bit last; int cyc; } exp_t;
  exp_t exp_q[$];

  neuron_unit #(.NI(NI), .Z(Z), .DEPTH(DEPTH), .TAG_W(TW)) dut (
    .clk, .rst_n, .x, .in_valid, .in_last, .raddr, .in_tag,
    .cfg_we, .cfg_col, .cfg_waddr, .cfg_wdata,
    .out_valid, .out_last, .out_tag, .acc);
  always #5 clk = ~clk;
  initial begin #1 rst_n = 0; end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        e = exp_q.pop_front();
        if (longint'(acc) != e.v || int'(out_tag) != e.tag || out_last != e.last || cyc - e.cyc != LAT) begin
          failures++; $display("FAIL tag %0d: acc=%0d exp=%0d lat=%0d", e.tag, acc, e.v, cyc - e.cyc);
        end
      end
    end
    cyc++;
  end

  initial begin
    in_valid = 0; in_last = 0; raddr = '0; in_tag = '0; cfg_we = 0; cfg_col = '0; cfg_waddr = '0; cfg_wdata = '0;
    foreach (x[i]) x[i] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < DEPTH; n++)
      for (int i = 0; i <= NI; i++) begin
        @(negedge clk);
        wt[n][i] = $urandom_range(600) - 300;
        cfg_we = 1; cfg_col = 16'(i); cfg_waddr = AW'(n); cfg_wdata = data_t'(wt[n][i]);
      end
    @(negedge clk); cfg_we = 0;
    for (int v = 0; v < 20; v++) begin
      for (int i = 0; i < P*Z; i++) x[i] = (i < NI) ? data_t'($urandom_range(4000) - 2000) : data_t'($urandom);
      for (int n = 0; n < DEPTH; n++) begin
        exp_t e;
        e.v = longint'(wt[n][NI]) * 256;
        for (int i = 0; i < NI; i++) e.v += longint'(x[i]) * wt[n][i];
        e.tag = 40 + n; e.last = (n == DEPTH - 1); e.cyc = cyc;
        exp_q.push_back(e);
        in_valid = 1; in_last = e.last; raddr = AW'(n); in_tag = TW'(e.tag);
        @(negedge clk);
      end
      in_valid = 0;
      repeat ($urandom_range(2)) @(negedge clk);
    end
    repeat (LAT + 3) @(negedge clk);
    checks++; if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
