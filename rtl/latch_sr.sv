// SR latch between the dynamic comparator and the SAR logic.
//
// The comparator produces a complementary pair (Vcomp, Vcomn) while it
// evaluates and pulls both outputs low while it resets. This latch turns the
// pair into the single wire SAR_vin and keeps the last decision through the
// reset phase: (1,0) sets it, (0,1) clears it, (0,0) holds. The state (1,1)
// never occurs with the comparator used here and also holds. The
// transparent-latch behaviour is intended and is why synthesis reports a
// latch for this module. That the block converts the pair to one wire is
// specified; the set/reset polarity is this design's choice, matched to the
// comparator model.
module latch_sr (
  input  logic Vcomp,
  input  logic Vcomn,
  output logic SAR_vin
);

  always_latch begin
    if (Vcomp != Vcomn) SAR_vin = Vcomp;
  end

endmodule
