// weight_mem: the weight store of one DSP, a small RAM with one write port
// for loading trained parameters and one synchronous read port.
//
// During operation the read address steps through the DEPTH words that the
// DSP needs within one data period (one per neuron or filter it serves).
// The read is registered, as in a block or distributed RAM with output
// register: rdata follows raddr by one cycle. Contents are undefined until
// they are written.
module weight_mem
  import nn_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  data_t         wdata,
  input  logic [AW-1:0] raddr,
  output data_t         rdata
);
  data_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
