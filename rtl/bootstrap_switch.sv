// Behavioural model (not synthesizable logic) of one bootstrapped sampling
// switch of the SAR ADC front end; the converter uses two, one for Vinp and
// one for Vinn.
//
// While sw_on is high the switch is closed and vout follows vin (track);
// when sw_on falls, vout keeps the last value of vin (hold). The bootstrapped
// gate drive that keeps the on-resistance constant is not modelled: the
// switch is ideal, with zero resistance and no charge injection. That the
// switch samples the input for the capacitor array and comparator is
// specified; the control signal sw_on comes from the SAR logic in this
// design. The hold is written as an intentional level-sensitive latch.
module bootstrap_switch (
  input  real  vin,
  input  logic sw_on,
  output real  vout
);

  real held;

  initial held = 0.0;

  always_latch begin
    if (sw_on) held = vin;
  end

  assign vout = held;

endmodule
