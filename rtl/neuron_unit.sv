// neuron_unit: computes up to DEPTH neurons of a dense layer, one per cycle,
// from NI inputs that stay fixed during the data period.
//
// The NI inputs are split over P = ceil(NI/Z) shorter DSP pipelines of Z
// slices each, which run in parallel; a final adder sums the P partial dot
// products. Splitting one long pipeline into several short ones cuts the
// latency from about NI to about Z cycles at the cost of the adder. Every
// DSP has its own weight memory of DEPTH words (one per neuron served);
// neuron j of this unit uses word j in all of them. The bias of neuron j is
// fed into the cascade input of the first slice of pipeline 0.
//
// Interface: in step j (raddr) with valid/last/tag, the unit returns the
// accumulator of neuron j with the same valid/last/tag LAT = Z + 2 cycles
// later (one cycle weight read and operand register, Z slices, one cycle
// adder). The parameter load port writes weight (col < NI) or bias
// (col == NI) of local neuron waddr.
module neuron_unit
  import nn_pkg::*;
#(
  parameter int unsigned NI    = 9,   // inputs
  parameter int unsigned Z     = 4,   // DSP slices per pipeline
  parameter int unsigned DEPTH = 16,  // neurons served (<= C)
  parameter int unsigned TAG_W = 8,
  localparam int unsigned P  = (NI + Z - 1) / Z,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned LAT = Z + 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  data_t            x [P*Z],       // inputs, zero padded
  input  logic             in_valid,
  input  logic             in_last,
  input  logic [AW-1:0]    raddr,         // local neuron index
  input  logic [TAG_W-1:0] in_tag,
  // parameter load
  input  logic             cfg_we,
  input  logic [15:0]      cfg_col,
  input  logic [AW-1:0]    cfg_waddr,
  input  data_t            cfg_wdata,
  // result
  output logic             out_valid,
  output logic             out_last,
  output logic [TAG_W-1:0] out_tag,
  output acc_t             acc
);
  data_t w_rd   [P*Z];
  data_t a_reg  [P*Z];
  data_t b_rd;
  acc_t  psum   [P];

  // Weight memories, one per DSP.
  for (genvar i = 0; i < P*Z; i++) begin : g_wmem
    if (i < NI) begin : g_used
      weight_mem #(.DEPTH(DEPTH)) u_wmem (
        .clk, .we(cfg_we && cfg_col == 16'(i)), .waddr(cfg_waddr),
        .wdata(cfg_wdata), .raddr(raddr), .rdata(w_rd[i])
      );
    end else begin : g_pad
      assign w_rd[i] = '0;
    end
  end

  // Bias memory.
  weight_mem #(.DEPTH(DEPTH)) u_bmem (
    .clk, .we(cfg_we && cfg_col == 16'(NI)), .waddr(cfg_waddr),
    .wdata(cfg_wdata), .raddr(raddr), .rdata(b_rd)
  );

  // Operand register, aligned with the registered weight read.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int i = 0; i < P*Z; i++) a_reg[i] <= '0;
    else        for (int i = 0; i < P*Z; i++) a_reg[i] <= x[i];
  end

  // Parallel shorter pipelines.
  for (genvar p = 0; p < P; p++) begin : g_pipe
    data_t pa [Z];
    data_t pw [Z];
    acc_t  pc;
    for (genvar d = 0; d < Z; d++) begin : g_op
      assign pa[d] = a_reg[p*Z + d];
      assign pw[d] = w_rd[p*Z + d];
    end
    if (p == 0) begin : g_bias
      assign pc = acc_t'(b_rd) <<< FRAC_W;   // bias in product scale
    end else begin : g_nobias
      assign pc = '0;
    end
    dsp_pipeline #(.Z(Z)) u_pipe (
      .clk, .rst_n, .a(pa), .w(pw), .cin(pc), .sum(psum[p])
    );
  end

  // Final adder of the neuron unit.
  acc_t psum_total;
  always_comb begin
    psum_total = '0;
    for (int p = 0; p < P; p++) psum_total += psum[p];
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc <= '0;
    else        acc <= psum_total;
  end

  // Valid, last and tag follow the data through the LAT stages.
  logic             v_dl [LAT];
  logic             l_dl [LAT];
  logic [TAG_W-1:0] t_dl [LAT];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < LAT; k++) begin
        v_dl[k] <= 1'b0; l_dl[k] <= 1'b0; t_dl[k] <= '0;
      end
    end else begin
      v_dl[0] <= in_valid; l_dl[0] <= in_last; t_dl[0] <= in_tag;
      for (int k = 1; k < LAT; k++) begin
        v_dl[k] <= v_dl[k-1]; l_dl[k] <= l_dl[k-1]; t_dl[k] <= t_dl[k-1];
      end
    end
  end
  assign out_valid = v_dl[LAT-1];
  assign out_last  = l_dl[LAT-1];
  assign out_tag   = t_dl[LAT-1];
endmodule
