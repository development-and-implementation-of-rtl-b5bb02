// tb_weight_mem: fill with random words, read back in random order; data
// must follow the address by exactly one cycle, and reads must see writes.
module tb_weight_mem;
  import nn_pkg::*;
  localparam int DEPTH = 12, AW = 4;
  logic clk = 0, we;
  logic [AW-1:0] waddr, raddr;
  data_t wdata, rdata;
  data_t model [DEPTH];
  int checks = 0, failures = 0;
  weight_mem #(.DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  always #5 clk = ~clk;
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    we = 0; waddr = '0; raddr = '0; wdata = '0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; waddr = AW'(i); wdata = data_t'($urandom); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 300; i++) begin
      int ra;
      ra = $urandom_range(DEPTH - 1);
      @(negedge clk);
      raddr = AW'(ra);
      // random concurrent write to another word
      we = $urandom_range(1);
      waddr = AW'($urandom_range(DEPTH - 1));
      wdata = data_t'($urandom);
      @(posedge clk); #1;
      checks++;
      if (rdata != model[ra]) begin failures++; $display("FAIL addr %0d: %0d exp %0d", ra, rdata, model[ra]); end
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
