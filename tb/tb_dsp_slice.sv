// tb_dsp_slice: random operands; p must equal a*w + pcin one cycle later,
// and hold while en is low.
module tb_dsp_slice;
  import nn_pkg::*;
  logic clk = 0, rst_n = 1, en;
  data_t a, w;
  acc_t pcin, p;
  int checks = 0, failures = 0;
  dsp_slice dut (.clk, .rst_n, .en, .a, .w, .pcin, .p);
  always #5 clk = ~clk;
  initial begin #1 rst_n = 0; end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    longint exp_v;
    en = 0; a = '0; w = '0; pcin = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      en = ($urandom_range(3) != 0);
      a = data_t'($urandom); w = data_t'($urandom);
      pcin = acc_t'({$urandom, $urandom}) >>> 20;
      exp_v = en ? longint'(a) * longint'(w) + longint'(pcin) : longint'(p);
      @(negedge clk);
      checks++;
      if (longint'(p) != exp_v) begin failures++; $display("FAIL %0d: p=%0d exp=%0d", i, p, exp_v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
