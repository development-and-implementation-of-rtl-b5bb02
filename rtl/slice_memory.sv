// slice_memory: holds NSL image slices for the row units during one data
// period (the regular 'long' and 'short' memories of the convolution layer).
//
// On load the slices are copied from the buffer memory and then stay
// unchanged while the row units work through their output positions, so
// the buffer can already take the rows of the next image. The long memory
// holds the slices that start an output row (one per row unit); the short
// memory holds the K-1 slices below the last of them, which only the lower
// row units need.
//
// Timing: the copy is visible one cycle after load.
module slice_memory
  import nn_pkg::*;
#(
  parameter int unsigned NSL = 6,   // slices held
  parameter int unsigned SW  = 7    // words per slice (W*CIN)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  data_t din  [NSL][SW],
  output data_t dout [NSL][SW]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NSL; s++)
        for (int i = 0; i < SW; i++) dout[s][i] <= '0;
    end else if (load) begin
      for (int s = 0; s < NSL; s++)
        for (int i = 0; i < SW; i++) dout[s][i] <= din[s][i];
    end
  end
endmodule
