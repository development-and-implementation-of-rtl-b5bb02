// conv_layer: 2D convolution (valid padding, stride 1) of an H x W x CIN
// image with F filters of K x K taps, regular case: one row unit per
// output height.
//
// The input arrives row by row into the buffer memory. A start pulse copies
// the buffered image into the regular 'long' memory (slices 0 .. HO-1, the
// first slice of each row unit's window) and the regular 'short' memory
// (slices HO .. H-1), where it stays for the data period of C cycles. Row
// unit r reads slices r .. r+K-1 of the concatenation and computes output
// row r; the sequencer steps all row units in lockstep. The result
// multicast requantises, applies ReLU (if RELU) and presents the HO x WO x F
// output map in height, width, filter order. DSP use is HO * Q * K*K*CIN,
// about V_out * A_kernel * N_chan,inp / C.
//
// Interface: row_we/row_data write input rows (row index h*CIN + c), or
// map_we/map_data write a whole map from a preceding layer; start
// (at most one per C cycles, after the rows of the image are written)
// begins the period. out_valid pulses when out_y holds the map,
// LATENCY = min(C, WO*F) + K*K*CIN + 2 cycles after start. cfg loads
// weights (row = filter, col = tap) and biases (col = K*K*CIN).
module conv_layer
  import nn_pkg::*;
#(
  parameter int unsigned H    = 7,
  parameter int unsigned W    = 7,
  parameter int unsigned CIN  = 1,
  parameter int unsigned K    = 2,
  parameter int unsigned F    = 1,
  parameter int unsigned C    = 16,
  parameter bit          RELU = 1'b1,
  localparam int unsigned HO    = H - K + 1,
  localparam int unsigned WO    = W - K + 1,
  localparam int unsigned NOUT  = WO * F,
  localparam int unsigned Q     = (NOUT + C - 1) / C,
  localparam int unsigned STEPS = (NOUT < C) ? NOUT : C,
  localparam int unsigned SW    = (STEPS > 1) ? $clog2(STEPS) : 1,
  localparam int unsigned NMAP  = HO * WO * F,
  localparam int unsigned IDX_W = $clog2(NMAP + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [H*CIN-1:0] row_we,
  input  data_t            row_data [W],
  input  logic             map_we,
  input  data_t            map_data [H*W*CIN],
  input  logic             start,
  input  logic             cfg_we,
  input  logic [15:0]      cfg_row,
  input  logic [15:0]      cfg_col,
  input  data_t            cfg_wdata,
  output logic             out_valid,
  output data_t            out_y [NMAP]
);
  data_t buf_sl   [H][W*CIN];
  data_t long_in  [HO][W*CIN];
  data_t short_in [K-1][W*CIN];
  data_t long_sl  [HO][W*CIN];
  data_t short_sl [K-1][W*CIN];
  data_t all_sl   [H][W*CIN];

  buffer_memory #(.H(H), .W(W), .CIN(CIN)) u_buf (
    .clk, .rst_n, .row_we, .row_data, .map_we, .map_data, .slices(buf_sl)
  );

  always_comb begin
    for (int h = 0; h < HO; h++)  long_in[h]  = buf_sl[h];
    for (int h = 0; h < K-1; h++) short_in[h] = buf_sl[HO + h];
  end

  slice_memory #(.NSL(HO), .SW(W*CIN)) u_long (
    .clk, .rst_n, .load(start), .din(long_in), .dout(long_sl)
  );
  slice_memory #(.NSL(K-1), .SW(W*CIN)) u_short (
    .clk, .rst_n, .load(start), .din(short_in), .dout(short_sl)
  );

  always_comb begin
    for (int h = 0; h < HO; h++)  all_sl[h]      = long_sl[h];
    for (int h = 0; h < K-1; h++) all_sl[HO + h] = short_sl[h];
  end

  logic          step_valid, step_last;
  logic [SW-1:0] step;
  layer_ctrl #(.C(C), .STEPS(STEPS)) u_ctrl (
    .clk, .rst_n, .start, .step_valid, .step, .last(step_last)
  );

  logic             s_valid [HO*Q];
  logic             s_last  [HO*Q];
  logic [IDX_W-1:0] s_idx   [HO*Q];
  acc_t             s_acc   [HO*Q];

  for (genvar r = 0; r < HO; r++) begin : g_ru
    data_t            win [K][W*CIN];
    logic             ov [Q];
    logic             ol [Q];
    logic [IDX_W-1:0] oi [Q];
    acc_t             oa [Q];
    for (genvar ky = 0; ky < K; ky++) begin : g_win
      assign win[ky] = all_sl[r + ky];
    end
    row_unit #(.W(W), .CIN(CIN), .K(K), .F(F), .C(C), .ROW(r), .IDX_W(IDX_W)) u_ru (
      .clk, .rst_n, .sl(win), .step_valid, .step_last, .step,
      .cfg_we, .cfg_row, .cfg_col, .cfg_wdata,
      .out_valid(ov), .out_last(ol), .out_idx(oi), .out_acc(oa)
    );
    for (genvar q = 0; q < Q; q++) begin : g_q
      assign s_valid[r*Q + q] = ov[q];
      assign s_last[r*Q + q]  = ol[q];
      assign s_idx[r*Q + q]   = oi[q];
      assign s_acc[r*Q + q]   = oa[q];
    end
  end

  result_multicast #(.N_SRC(HO*Q), .N_OUT(NMAP), .IDX_W(IDX_W), .RELU(RELU)) u_rm (
    .clk, .rst_n, .src_valid(s_valid), .src_last(s_last), .src_idx(s_idx),
    .src_acc(s_acc), .y(out_y), .out_valid
  );
endmodule
