// buffer_memory: assembles an input image of a convolution layer from rows.
//
// The image of H x W pixels with CIN channels is organised in rows: a row
// is the W values at one height and one channel. Row (h, c) is written when
// row_we[h*CIN + c] is set; several rows may be written at once with the
// same data. A layer that follows another layer receives the whole map at
// once instead: map_we writes all rows from map_data (height, width,
// channel order) and takes precedence over row writes. The stored image is read out as slices, a slice being all
// channels and widths at one height, with the channel index running
// fastest (element w*CIN + c of slice h is pixel (h, w, c)).
//
// Timing: a row write is visible at the output one cycle later.
module buffer_memory
  import nn_pkg::*;
#(
  parameter int unsigned H   = 7,
  parameter int unsigned W   = 7,
  parameter int unsigned CIN = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  [H*CIN-1:0] row_we,
  input  data_t row_data [W],
  input  logic  map_we,
  input  data_t map_data [H*W*CIN],
  output data_t slices [H][W*CIN]
);
  data_t rows [H*CIN][W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < H*CIN; r++)
        for (int w = 0; w < W; w++) rows[r][w] <= '0;
    end else if (map_we) begin
      for (int h = 0; h < H; h++)
        for (int w = 0; w < W; w++)
          for (int c = 0; c < CIN; c++) rows[h*CIN + c][w] <= map_data[(h*W + w)*CIN + c];
    end else begin
      for (int r = 0; r < H*CIN; r++)
        if (row_we[r])
          for (int w = 0; w < W; w++) rows[r][w] <= row_data[w];
    end
  end

  always_comb begin
    for (int h = 0; h < H; h++)
      for (int w = 0; w < W; w++)
        for (int c = 0; c < CIN; c++)
          slices[h][w*CIN + c] = rows[h*CIN + c][w];
  end
endmodule
