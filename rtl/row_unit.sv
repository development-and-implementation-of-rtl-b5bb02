// row_unit: computes one output row of a 2D convolution (all output widths
// and all filters at one output height) from the K input slices that the
// kernel covers at that height.
//
// The WO*F outputs of the row are worked through in time: in a data period
// of C cycles each chain of DSPs produces up to C outputs, one per cycle,
// and Q = ceil(WO*F/C) chains run in parallel. Output o of the row (o =
// x*F + f) is handled by chain o / C in step o mod C. A chain is one DSP
// pipeline with one slice per kernel tap (T = K*K*CIN taps); in each step
// every slice gets the input pixel its tap sees at output column x, picked
// from the held slices by a multiplexer, and the weight of filter f from its
// own weight memory. The bias of filter f enters the cascade input. The
// input slices are reused for all filters and the weights for all widths.
//
// Interface: step/step_valid/step_last come from the layer sequencer; the
// slices must stay fixed while steps are issued. Chain q returns its
// accumulator LAT = T + 1 cycles after the step, tagged with the position
// ROW*WO*F + o in the layer's output map (height, width, filter order).
// Parameters load through cfg (row = filter, col = tap (ky*K+kx)*CIN+c,
// col == T = bias).
module row_unit
  import nn_pkg::*;
#(
  parameter int unsigned W     = 7,
  parameter int unsigned CIN   = 1,
  parameter int unsigned K     = 2,
  parameter int unsigned F     = 1,
  parameter int unsigned C     = 16,
  parameter int unsigned ROW   = 0,
  parameter int unsigned IDX_W = 8,
  localparam int unsigned WO    = W - K + 1,
  localparam int unsigned T     = K * K * CIN,
  localparam int unsigned NOUT  = WO * F,
  localparam int unsigned Q     = (NOUT + C - 1) / C,
  localparam int unsigned STEPS = (NOUT < C) ? NOUT : C,
  localparam int unsigned SW    = (STEPS > 1) ? $clog2(STEPS) : 1,
  localparam int unsigned FW    = (F > 1) ? $clog2(F) : 1,
  localparam int unsigned LAT   = T + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  data_t            sl [K][W*CIN],
  input  logic             step_valid,
  input  logic             step_last,
  input  logic [SW-1:0]    step,
  input  logic             cfg_we,
  input  logic [15:0]      cfg_row,
  input  logic [15:0]      cfg_col,
  input  data_t            cfg_wdata,
  output logic             out_valid [Q],
  output logic             out_last  [Q],
  output logic [IDX_W-1:0] out_idx   [Q],
  output acc_t             out_acc   [Q]
);
  for (genvar q = 0; q < Q; q++) begin : g_chain
    localparam int unsigned BASE = q * C;
    logic [15:0]   o;
    logic [15:0]   xcol;
    logic [FW-1:0] f;
    data_t         a_reg [T];
    data_t         w_rd  [T];
    data_t         b_rd;
    acc_t          cin;

    assign o    = 16'(BASE) + 16'(step);
    assign xcol = o / 16'(F);
    assign f    = FW'(o % 16'(F));

    // Input pixel for each tap at output column xcol (multiplexer), then
    // the operand register.
    data_t a_sel [T];
    always_comb begin
      for (int ky = 0; ky < K; ky++)
        for (int kx = 0; kx < K; kx++)
          for (int c = 0; c < CIN; c++) begin
            a_sel[(ky*K + kx)*CIN + c] = '0;
            for (int x = 0; x < WO; x++)
              if (xcol == 16'(x)) a_sel[(ky*K + kx)*CIN + c] = sl[ky][(x + kx)*CIN + c];
          end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) for (int t = 0; t < T; t++) a_reg[t] <= '0;
      else        for (int t = 0; t < T; t++) a_reg[t] <= a_sel[t];
    end

    for (genvar t = 0; t < T; t++) begin : g_wmem
      weight_mem #(.DEPTH(F)) u_wmem (
        .clk, .we(cfg_we && cfg_row < 16'(F) && cfg_col == 16'(t)), .waddr(FW'(cfg_row)),
        .wdata(cfg_wdata), .raddr(f), .rdata(w_rd[t])
      );
    end
    weight_mem #(.DEPTH(F)) u_bmem (
      .clk, .we(cfg_we && cfg_row < 16'(F) && cfg_col == 16'(T)), .waddr(FW'(cfg_row)),
      .wdata(cfg_wdata), .raddr(f), .rdata(b_rd)
    );
    assign cin = acc_t'(b_rd) <<< FRAC_W;

    dsp_pipeline #(.Z(T)) u_pipe (
      .clk, .rst_n, .a(a_reg), .w(w_rd), .cin(cin), .sum(out_acc[q])
    );

    // Valid, last and position tag follow the data.
    logic             v_dl [LAT];
    logic             l_dl [LAT];
    logic [IDX_W-1:0] t_dl [LAT];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int k = 0; k < LAT; k++) begin
          v_dl[k] <= 1'b0; l_dl[k] <= 1'b0; t_dl[k] <= '0;
        end
      end else begin
        v_dl[0] <= step_valid && (o < 16'(NOUT));
        l_dl[0] <= step_last;
        t_dl[0] <= IDX_W'(ROW * NOUT) + IDX_W'(o);
        for (int k = 1; k < LAT; k++) begin
          v_dl[k] <= v_dl[k-1]; l_dl[k] <= l_dl[k-1]; t_dl[k] <= t_dl[k-1];
        end
      end
    end
    assign out_valid[q] = v_dl[LAT-1];
    assign out_last[q]  = l_dl[LAT-1];
    assign out_idx[q]   = t_dl[LAT-1];
  end
endmodule
