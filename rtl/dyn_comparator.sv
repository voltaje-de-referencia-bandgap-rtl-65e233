// Behavioural model (not synthesizable logic) of the clocked StrongArm-type
// dynamic comparator of the SAR ADC.
//
// It compares the two capacitor-array top plates, vinp (+) and vinn (-).
// In this model the comparator resets while clk is high, pulling both outputs
// low, and decides at the falling edge of clk: Vcomp = 1, Vcomn = 0 when
// vinp > vinn + OFFSET, otherwise Vcomp = 0, Vcomn = 1. The decision is held
// until the next rising edge. The SR latch that follows keeps it through the
// reset phase. The SAR logic switches the DAC on rising edges, so the DAC has
// the first half of each clock to settle before the decision. Only the
// comparator's function is specified; the clock phase, the output polarity in
// reset and the OFFSET parameter (input-referred offset, default 0 V) are
// this model's choices.
module dyn_comparator #(
  parameter real OFFSET = 0.0
) (
  input  logic clk,
  input  real  vinp,
  input  real  vinn,
  output logic Vcomp,
  output logic Vcomn
);

  initial begin
    Vcomp = 1'b0;
    Vcomn = 1'b0;
  end

  // One process for both phases: reset while clk is high, decide at the
  // falling edge.
  always @(clk) begin
    if (clk) begin
      Vcomp <= 1'b0;
      Vcomn <= 1'b0;
    end else begin
      Vcomp <= (vinp > vinn + OFFSET);
      Vcomn <= !(vinp > vinn + OFFSET);
    end
  end

endmodule
