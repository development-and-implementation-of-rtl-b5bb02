// tb_result_multicast: two sources deliver accumulators with positions;
// stored values must be truncated, saturated and ReLU-clipped, and
// out_valid must rise in the cycle after the flagged last result.
module tb_result_multicast;
  import nn_pkg::*;
  localparam int NS = 2, NO = 8, IW = 4;
  logic clk = 0, rst_n = 1, out_valid;
  logic src_valid [NS], src_last [NS];
  logic [IW-1:0] src_idx [NS];
  acc_t src_acc [NS];
  data_t y [NO];
  int expv [NO];
  int checks = 0, failures = 0, n_sat = 0, n_clip = 0;
  result_multicast #(.N_SRC(NS), .N_OUT(NO), .IDX_W(IW), .RELU(1'b1)) dut (
    .clk, .rst_n, .src_valid, .src_last, .src_idx, .src_acc, .y, .out_valid);
  always #5 clk = ~clk;
  initial begin #1 rst_n = 0; end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic int ref_q(longint a);
    longint s;
    s = a >>> 8;
    if (s > 32767) begin s = 32767; n_sat++; end
    if (s < -32768) s = -32768;
    if (s < 0) begin s = 0; n_clip++; end
    return int'(s);
  endfunction

  initial begin
    foreach (src_valid[s]) begin src_valid[s] = 0; src_last[s] = 0; src_idx[s] = '0; src_acc[s] = '0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int v = 0; v < 30; v++) begin
      // source s writes positions s*4 .. s*4+3, one per cycle
      for (int k = 0; k < NO/NS; k++) begin
        for (int s = 0; s < NS; s++) begin
          longint a;
          a = (k == 3 && s == 0) ? longint'($urandom) * 64 : longint'($signed($urandom_range(20000000))) - 10000000;
          src_valid[s] = 1; src_last[s] = (k == NO/NS - 1); src_idx[s] = IW'(s*4 + k); src_acc[s] = acc_t'(a);
          expv[s*4 + k] = ref_q(a);
        end
        @(negedge clk);
        checks++;
        if (out_valid != (k == NO/NS - 1)) begin failures++; $display("FAIL out_valid at k=%0d", k); end
      end
      foreach (src_valid[s]) src_valid[s] = 0;
      for (int i = 0; i < NO; i++) begin
        checks++;
        if (int'(y[i]) != expv[i]) begin failures++; $display("FAIL v %0d y[%0d]=%0d exp %0d", v, i, y[i], expv[i]); end
      end
      @(negedge clk);
      checks++; if (out_valid) begin failures++; $display("FAIL out_valid longer than one cycle"); end
    end
    checks++; if (n_sat == 0 || n_clip == 0) begin failures++; $display("FAIL saturation/ReLU not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
