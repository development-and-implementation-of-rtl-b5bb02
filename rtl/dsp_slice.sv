// dsp_slice: one multiply-add stage, the unit that fills an FPGA DSP slice.
//
// Every cycle it registers p = a * w + pcin. pcin is the partial sum of the
// preceding slice in a pipeline (the cascade input), so a chain of slices
// adds one product per stage. One register stage per slice matches the
// one-cycle step between neighbouring DSPs in the pipeline schedule; the
// additional internal multiplier registers of a real DSP slice are not
// modelled. With en low the output holds.
//
// Timing: p is valid one cycle after a, w and pcin.
module dsp_slice
  import nn_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  data_t a,     // activation operand
  input  data_t w,     // weight operand
  input  acc_t  pcin,  // cascade input (partial sum)
  output acc_t  p      // registered a*w + pcin
);
  acc_t prod;
  assign prod = acc_t'(a) * acc_t'(w);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  p <= '0;
    else if (en) p <= prod + pcin;
  end
endmodule
