// result_multicast: gathers the results of all processing units of a layer
// into the layer's output vector and hands the complete vector on.
//
// Each of N_SRC sources (neuron units or row-unit chains) delivers at most
// one accumulator per cycle, tagged with its position in the output vector.
// The accumulator is requantised to the data format (truncate, saturate)
// and passed through ReLU when RELU is set, then stored. A source flags its
// final result of the data period with last; one cycle later the whole
// vector is valid for a single cycle and is broadcast to every consumer of
// the next layer. Positions no source writes keep their old value.
//
// Timing: y and out_valid update on the same clock edge that stores the
// last result.
module result_multicast
  import nn_pkg::*;
#(
  parameter int unsigned N_SRC = 1,
  parameter int unsigned N_OUT = 10,
  parameter int unsigned IDX_W = 8,
  parameter bit          RELU  = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             src_valid [N_SRC],
  input  logic             src_last  [N_SRC],
  input  logic [IDX_W-1:0] src_idx   [N_SRC],
  input  acc_t             src_acc   [N_SRC],
  output data_t            y         [N_OUT],
  output logic             out_valid
);
  localparam int unsigned OW = (N_OUT > 1) ? $clog2(N_OUT) : 1;
  logic any_last;

  always_comb begin
    any_last = 1'b0;
    for (int s = 0; s < N_SRC; s++) any_last |= src_valid[s] & src_last[s];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_OUT; i++) y[i] <= '0;
      out_valid <= 1'b0;
    end else begin
      for (int s = 0; s < N_SRC; s++) begin
        if (src_valid[s] && src_idx[s] < IDX_W'(N_OUT))
          y[OW'(src_idx[s])] <= requantise(src_acc[s], RELU);
      end
      out_valid <= any_last;
    end
  end
endmodule
