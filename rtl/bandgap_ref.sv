// Behavioural model (not synthesizable logic) of the CMOS-BJT bandgap
// voltage reference.
//
// The reference provides VREF = 900 mV from a 1.8 V supply, flat across
// -40 C to 85 C in the typical process corner. Its output feeds the
// common-mode input Vcm of the capacitor array and the Vref_out pin. The
// transistor-level circuit (current mirrors, three bipolar transistors and
// twelve resistors) is not modelled. The model keeps the output at VREF while
// the supply is at or above VDD_MIN and, below that, lets it fall in
// proportion to the supply, as a reference that has lost its headroom does.
// VREF and the 1.8 V supply are specified; VDD_MIN (90 % of the supply) and
// the shape below it are this model's choices.
module bandgap_ref #(
  parameter real VREF    = 0.9,
  parameter real VDD_MIN = 1.62
) (
  input  real vdd,
  output real vref
);

  always_comb begin
    if (vdd >= VDD_MIN) vref = VREF;
    else if (vdd <= 0.0) vref = 0.0;
    else                 vref = VREF * vdd / VDD_MIN;
  end

endmodule
