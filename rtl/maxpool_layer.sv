// maxpool_layer: 2D maximum pooling of an H x W x F map with a PxP window
// and stride P (valid padding: a remainder row or column is dropped).
//
// Each output value is the largest of the P*P inputs in its window, per
// channel, found by a comparator tree. Maps are stored in height, width,
// channel order. Pooling needs no multiplier and no time multiplexing: the
// whole map is pooled in the cycle it arrives.
//
// Timing: out_y and out_valid are registered, one cycle after in_valid.
module maxpool_layer
  import nn_pkg::*;
#(
  parameter int unsigned H = 6,
  parameter int unsigned W = 6,
  parameter int unsigned F = 1,
  parameter int unsigned P = 2,
  localparam int unsigned HP = H / P,
  localparam int unsigned WP = W / P
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  data_t in_x  [H*W*F],
  output logic  out_valid,
  output data_t out_y [HP*WP*F]
);
  data_t pooled [HP*WP*F];

  always_comb begin
    for (int y = 0; y < HP; y++)
      for (int x = 0; x < WP; x++)
        for (int f = 0; f < F; f++) begin
          pooled[(y*WP + x)*F + f] = in_x[((y*P)*W + x*P)*F + f];
          for (int dy = 0; dy < P; dy++)
            for (int dx = 0; dx < P; dx++)
              if (in_x[((y*P + dy)*W + x*P + dx)*F + f] > pooled[(y*WP + x)*F + f])
                pooled[(y*WP + x)*F + f] = in_x[((y*P + dy)*W + x*P + dx)*F + f];
        end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < HP*WP*F; i++) out_y[i] <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int i = 0; i < HP*WP*F; i++) out_y[i] <= pooled[i];
    end
  end
endmodule
