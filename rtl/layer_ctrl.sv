// layer_ctrl: time-multiplexing sequencer of a layer.
//
// A layer receives one new input set per data period of C clock cycles
// (C = f_FPGA / f_Data). Each DSP serves up to C neurons (or output
// positions) in that period, one per cycle. On start the sequencer issues
// steps 0 .. STEPS-1 on consecutive cycles; step is the local index that
// addresses the weight memories. last marks the final step. A start that
// arrives while steps are still being issued restarts the sequence; the
// assertion (which also holds in reset, where the counter sits at C) flags a start earlier than C cycles after the previous one,
// which the schedule does not allow.
//
// Timing: step 0 is issued in the cycle after the start pulse.
module layer_ctrl #(
  parameter int unsigned C     = 16,  // clock cycles per data period
  parameter int unsigned STEPS = 16,  // steps used per period, 1..C
  localparam int unsigned SW = (STEPS > 1) ? $clog2(STEPS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          step_valid,
  output logic [SW-1:0] step,
  output logic          last
);
  localparam int unsigned CW = $clog2(C + 1);
  logic [CW-1:0] since_start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step_valid <= 1'b0;
      step       <= '0;
    end else if (start) begin
      step_valid <= 1'b1;
      step       <= '0;
    end else if (step_valid) begin
      if (step == SW'(STEPS - 1)) step_valid <= 1'b0;
      else                        step <= step + 1'b1;
    end
  end

  assign last = step_valid && (step == SW'(STEPS - 1));

  // Cycles since the last start, saturating at C (for the period check).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   since_start <= CW'(C);
    else if (start)               since_start <= CW'(1);
    else if (since_start < CW'(C)) since_start <= since_start + 1'b1;
  end

  a_period : assert property (@(posedge clk)
    start |-> since_start >= CW'(C))
    else $error("layer_ctrl: new input set earlier than C cycles after the previous one");
endmodule
