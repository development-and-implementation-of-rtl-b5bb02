// dense_layer: fully connected layer of NN neurons over NI inputs, built
// from DSP pipelines that reuse every input for all neurons.
//
// Every neuron needs every input, so the input vector is stored once (input
// memory) and shared by U = ceil(NN/C) neuron units. Within one data period
// of C cycles each unit computes up to C neurons, one per cycle, by
// changing only the weights fed to its DSPs (time multiplexing); unit u
// serves neurons u*C .. u*C+C-1. The result multicast requantises the
// accumulators, applies ReLU (if RELU) and presents the complete output
// vector. The layer uses U * ceil(NI/Z) * Z DSP slices, about
// NI * NN / C as the resource estimate N_DSP = N_I * N_N * f_Data/f_FPGA says.
//
// Interface: in_valid captures in_x and starts the period; at most one
// in_valid per C cycles. out_valid pulses when out_y holds the result,
// LATENCY = min(C,NN) + Z + 3 cycles after in_valid. Parameters are loaded
// through cfg (row = neuron, col = input, col == NI = bias).
module dense_layer
  import nn_pkg::*;
#(
  parameter int unsigned NI   = 9,
  parameter int unsigned NN   = 10,
  parameter int unsigned C    = 16,
  parameter int unsigned Z    = 4,
  parameter bit          RELU = 1'b1,
  localparam int unsigned U     = (NN + C - 1) / C,
  localparam int unsigned STEPS = (NN < C) ? NN : C,
  localparam int unsigned P     = (NI + Z - 1) / Z,
  localparam int unsigned AW    = (STEPS > 1) ? $clog2(STEPS) : 1,
  localparam int unsigned IDX_W = $clog2(NN + 1)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  data_t in_x [NI],
  input  logic  cfg_we,
  input  logic [15:0] cfg_row,
  input  logic [15:0] cfg_col,
  input  data_t cfg_wdata,
  output logic  out_valid,
  output data_t out_y [NN]
);
  data_t         x [P*Z];
  logic          step_valid, step_last;
  logic [AW-1:0] step;

  input_memory #(.N(NI), .NPAD(P*Z)) u_inmem (
    .clk, .rst_n, .we(in_valid), .din(in_x), .x(x)
  );

  layer_ctrl #(.C(C), .STEPS(STEPS)) u_ctrl (
    .clk, .rst_n, .start(in_valid), .step_valid, .step, .last(step_last)
  );

  logic             nu_valid [U];
  logic             nu_last  [U];
  logic [IDX_W-1:0] nu_idx   [U];
  acc_t             nu_acc   [U];

  for (genvar u = 0; u < U; u++) begin : g_unit
    localparam int unsigned BASE = u * C;
    localparam int unsigned NUM  = (NN - BASE < C) ? NN - BASE : C;
    logic          sel;
    logic [15:0]   rel;
    logic [AW-1:0] waddr;
    logic [IDX_W-1:0] tag;
    logic          ov, ol;
    logic [IDX_W-1:0] ot;
    assign rel = cfg_row - 16'(BASE);
    // Rows below BASE wrap to large values and fail the range check.
    assign sel = cfg_we && rel < 16'(NUM);
    assign waddr = AW'(rel);
    assign tag = IDX_W'(BASE) + IDX_W'(step);

    neuron_unit #(.NI(NI), .Z(Z), .DEPTH(STEPS), .TAG_W(IDX_W)) u_nu (
      .clk, .rst_n, .x(x),
      .in_valid(step_valid && 32'(step) < NUM), .in_last(step_last),
      .raddr(step), .in_tag(tag),
      .cfg_we(sel), .cfg_col, .cfg_waddr(waddr), .cfg_wdata,
      .out_valid(ov), .out_last(ol), .out_tag(ot), .acc(nu_acc[u])
    );
    assign nu_valid[u] = ov;
    assign nu_last[u]  = ol;
    assign nu_idx[u]   = ot;
  end

  result_multicast #(.N_SRC(U), .N_OUT(NN), .IDX_W(IDX_W), .RELU(RELU)) u_rm (
    .clk, .rst_n, .src_valid(nu_valid), .src_last(nu_last), .src_idx(nu_idx),
    .src_acc(nu_acc), .y(out_y), .out_valid
  );
endmodule
