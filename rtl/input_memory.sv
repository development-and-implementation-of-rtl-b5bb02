// input_memory: holds the input vector of a dense layer for one data period.
//
// On we the N input values are captured; they stay unchanged until the next
// write, which the schedule allows at most once per data period. The output
// is padded with zeros to NPAD words so that the last DSP pipeline of a
// neuron unit, which may have more slices than inputs are left, multiplies
// its spare slices by zero. All neuron units read the same vector (inputs
// are reused by every neuron).
//
// Timing: x follows a write by one cycle.
module input_memory
  import nn_pkg::*;
#(
  parameter int unsigned N    = 9,
  parameter int unsigned NPAD = 12
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  we,
  input  data_t din [N],
  output data_t x   [NPAD]
);
  data_t mem [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) mem[i] <= '0;
    end else if (we) begin
      for (int i = 0; i < N; i++) mem[i] <= din[i];
    end
  end

  always_comb begin
    for (int i = 0; i < NPAD; i++) x[i] = (i < N) ? mem[i] : '0;
  end
endmodule
