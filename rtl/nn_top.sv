// nn_top: a complete trigger network of the form
//   input H x W x CIN -> conv K x K x F (ReLU) -> maxpool 2 x 2
//   [-> conv K2 x K2 x F2 (ReLU), when CONV2 is set]
//   -> dense D1 (ReLU) -> dense D2 (linear output)
// with every layer processing one new event per data period of C clock
// cycles (C = f_FPGA / f_Data, e.g. C = 16 for 640 MHz at the 40 MHz LHC
// bunch-crossing rate). The defaults are the smallest example architecture
// (7 x 7 input, 2 x 2 x 1 convolution, 2 x 2 pooling, 10 neurons, C = 16)
// followed by a 10-neuron output layer. CONV2 builds the second family of
// example architectures, which adds a convolution after the pooling.
//
// The layers are chained through their result multicasts: a layer's
// out_valid is the next layer's start, so consecutive events overlap in
// the pipeline and the whole network accepts one event every C cycles. The
// second convolution takes the pooled map in one write into its buffer
// memory and starts one cycle later.
//
// Interface: rows of an event are written with row_we/row_data, then
// start. Parameters (weights and biases, signed fixed point, see nn_pkg)
// are loaded through cfg before use; cfg.layer picks the layer (0 first
// conv, 1 hidden dense, 2 output dense, 3 second conv). out_valid pulses
// with the D2 outputs in out_y
// (min(C,WO*F) + K*K*CIN + 2) + 1 + (min(C,D1) + Z + 3) + (min(C,D2) + Z + 3)
// cycles after start (conv, pool, dense, dense); 47 cycles at the defaults.
// CONV2 adds 1 + min(C,WO2*F2) + K2*K2*F + 2 cycles.
module nn_top
  import nn_pkg::*;
#(
  parameter int unsigned H     = 7,
  parameter int unsigned W     = 7,
  parameter int unsigned CIN   = 1,
  parameter int unsigned K     = 2,
  parameter int unsigned F     = 1,
  parameter int unsigned C     = 16,
  parameter int unsigned D1    = 10,
  parameter int unsigned D2    = 10,
  parameter int unsigned Z     = 4,
  parameter bit          CONV2 = 1'b0,
  parameter int unsigned K2    = 2,
  parameter int unsigned F2    = 1,
  localparam int unsigned HO   = H - K + 1,
  localparam int unsigned WO   = W - K + 1,
  localparam int unsigned NMAP = HO * WO * F,
  localparam int unsigned HP   = HO / 2,
  localparam int unsigned WP   = WO / 2,
  localparam int unsigned NPOOL = HP * WP * F,
  localparam int unsigned HO2  = HP - K2 + 1,
  localparam int unsigned WO2  = WP - K2 + 1,
  localparam int unsigned NP   = CONV2 ? HO2 * WO2 * F2 : NPOOL
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [H*CIN-1:0] row_we,
  input  data_t            row_data [W],
  input  logic             start,
  input  cfg_t             cfg,
  output logic             out_valid,
  output data_t            out_y [D2]
);
  logic  conv_valid, pool_valid, feat_valid, d1_valid;
  data_t conv_y [NMAP];
  data_t pool_y [NPOOL];
  data_t feat_y [NP];
  data_t d1_y   [D1];
  data_t no_map [H*W*CIN];

  always_comb for (int i = 0; i < H*W*CIN; i++) no_map[i] = '0;

  conv_layer #(.H(H), .W(W), .CIN(CIN), .K(K), .F(F), .C(C), .RELU(1'b1)) u_conv (
    .clk, .rst_n, .row_we, .row_data, .map_we(1'b0), .map_data(no_map), .start,
    .cfg_we(cfg.we && cfg.layer == 2'd0), .cfg_row(cfg.row), .cfg_col(cfg.col),
    .cfg_wdata(cfg.data), .out_valid(conv_valid), .out_y(conv_y)
  );

  maxpool_layer #(.H(HO), .W(WO), .F(F), .P(2)) u_pool (
    .clk, .rst_n, .in_valid(conv_valid), .in_x(conv_y),
    .out_valid(pool_valid), .out_y(pool_y)
  );

  if (CONV2) begin : g_conv2
    logic  start2;
    data_t no_row [WP];
    always_comb for (int i = 0; i < WP; i++) no_row[i] = '0;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) start2 <= 1'b0;
      else        start2 <= pool_valid;
    end
    conv_layer #(.H(HP), .W(WP), .CIN(F), .K(K2), .F(F2), .C(C), .RELU(1'b1)) u_conv2 (
      .clk, .rst_n, .row_we('0), .row_data(no_row), .map_we(pool_valid), .map_data(pool_y),
      .start(start2),
      .cfg_we(cfg.we && cfg.layer == 2'd3), .cfg_row(cfg.row), .cfg_col(cfg.col),
      .cfg_wdata(cfg.data), .out_valid(feat_valid), .out_y(feat_y)
    );
  end else begin : g_noconv2
    assign feat_valid = pool_valid;
    always_comb for (int i = 0; i < NP; i++) feat_y[i] = pool_y[i];
  end

  dense_layer #(.NI(NP), .NN(D1), .C(C), .Z(Z), .RELU(1'b1)) u_d1 (
    .clk, .rst_n, .in_valid(feat_valid), .in_x(feat_y),
    .cfg_we(cfg.we && cfg.layer == 2'd1), .cfg_row(cfg.row), .cfg_col(cfg.col),
    .cfg_wdata(cfg.data), .out_valid(d1_valid), .out_y(d1_y)
  );

  dense_layer #(.NI(D1), .NN(D2), .C(C), .Z(Z), .RELU(1'b0)) u_d2 (
    .clk, .rst_n, .in_valid(d1_valid), .in_x(d1_y),
    .cfg_we(cfg.we && cfg.layer == 2'd2), .cfg_row(cfg.row), .cfg_col(cfg.col),
    .cfg_wdata(cfg.data), .out_valid, .out_y
  );
endmodule
