// dsp_pipeline: a chain of Z DSP slices that computes one dot product of
// length Z per cycle, with the partial sum travelling down the chain.
//
// Slice d multiplies operand d with weight d and adds the registered result
// of slice d-1 (slice 0 adds cin). Because the partial sum reaches slice d
// d cycles after it left slice 0, the operands of slice d are delayed by d
// cycles inside this module (input skew), so the caller presents all Z
// operands, Z weights and cin of one dot product in the same cycle. A new
// dot product can enter every cycle; with a time-multiplexed weight per
// cycle the pipeline works through one neuron after the other while the
// activations stay fixed, which is the schedule of the dense layer.
//
// Timing: sum = cin + sum_d a[d]*w[d] appears Z cycles after its operands.
// The pipeline runs every cycle; validity is tracked by the caller.
module dsp_pipeline
  import nn_pkg::*;
#(
  parameter int unsigned Z = 4   // number of DSP slices in the chain
) (
  input  logic  clk,
  input  logic  rst_n,
  input  data_t a   [Z],
  input  data_t w   [Z],
  input  acc_t  cin,
  output acc_t  sum
);
  acc_t casc [Z+1];
  assign casc[0] = cin;

  for (genvar d = 0; d < Z; d++) begin : g_dsp
    data_t a_sk, w_sk;
    if (d == 0) begin : g_nodelay
      assign a_sk = a[0];
      assign w_sk = w[0];
    end else begin : g_delay
      data_t a_dl [d];
      data_t w_dl [d];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int k = 0; k < d; k++) begin
            a_dl[k] <= '0;
            w_dl[k] <= '0;
          end
        end else begin
          a_dl[0] <= a[d];
          w_dl[0] <= w[d];
          for (int k = 1; k < d; k++) begin
            a_dl[k] <= a_dl[k-1];
            w_dl[k] <= w_dl[k-1];
          end
        end
      end
      assign a_sk = a_dl[d-1];
      assign w_sk = w_dl[d-1];
    end
    dsp_slice u_dsp (
      .clk, .rst_n, .en(1'b1),
      .a(a_sk), .w(w_sk), .pcin(casc[d]), .p(casc[d+1])
    );
  end

  assign sum = casc[Z];
endmodule
