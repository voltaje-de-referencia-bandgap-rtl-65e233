// Low-power 10-bit SAR ADC with bandgap reference and SPI output.
//
// Signal path: the two bootstrap switches sample the differential input
// (vinp, vinn) onto the top plates of the positive and negative split
// capacitor arrays. The dynamic comparator compares the two top plates, the SR
// latch turns its output pair into the single bit SAR_vin, and the SAR logic
// runs the binary search, one bit per SPI_sck clock, by switching the
// capacitor bottom plates between Vcm, VDD and GND. The bandgap reference
// supplies Vcm (900 mV) to the arrays and is brought out on Vref_out. Each
// finished word appears on SAR_data_out[9:0] and is sent MSB first on SPI_SDO
// by the SPI module.
//
// Clocking and control: SPI_sck is the only clock. The SAR logic and the
// comparator run on it directly; the SPI module gates it with SPI_cs_n.
// Pulling SPI_cs_n low starts continuous conversions (the SAR's `start` is the
// inverted chip select); one conversion and one SPI frame both take 10 clocks.
// The word of a conversion leaves on SPI_SDO in the frame after it; the first
// frame after SPI_cs_n falls carries the reset value 0. The MSB of a frame
// appears on SPI_SDO at the third rising SPI_sck edge after SPI_cs_n falls.
// rst_n is an asynchronous, active-low reset of the digital blocks.
//
// The block set and the connections follow the specified block diagram.
// This design's own choices: driving the SAR's start from the inverted chip
// select, the SAR_sw_on control of the bootstrap switches, and the analog
// ports vinp, vinn and vdd as `real` nets for the behavioural models. The
// comparator reads the capacitor arrays' top-plate outputs, which in the
// circuit are the same nodes as the switch outputs.
module sar_adc_top #(
  parameter int unsigned N_BITS = sar_adc_pkg::N_BITS,
  parameter int unsigned CNT_W  = sar_adc_pkg::CNT_W
) (
  input  logic              rst_n,
  input  logic              SPI_sck,
  input  logic              SPI_cs_n,
  input  real               vinp,
  input  real               vinn,
  input  real               vdd,
  output logic              SPI_SDO,
  output logic [N_BITS-1:0] SAR_data_out,
  output real               Vref_out
);

  real vref, vsp, vsn, vpos, vneg;
  logic vcomp, vcomn, sar_vin;
  logic sar_samp, sar_sw_on;
  sar_adc_pkg::sw_sel_t [N_BITS-1:0] con_p, con_n;

  bandgap_ref u_bandgap (
    .vdd  (vdd),
    .vref (vref)
  );
  assign Vref_out = vref;

  bootstrap_switch u_sw_p (.vin(vinp), .sw_on(sar_sw_on), .vout(vsp));
  bootstrap_switch u_sw_n (.vin(vinn), .sw_on(sar_sw_on), .vout(vsn));

  cap_array_dac #(.N_BITS(N_BITS)) u_dac (
    .vsp   (vsp),
    .vsn   (vsn),
    .vcm   (vref),
    .con_p (con_p),
    .con_n (con_n),
    .vpos  (vpos),
    .vneg  (vneg)
  );

  dyn_comparator u_comp (
    .clk   (SPI_sck),
    .vinp  (vpos),
    .vinn  (vneg),
    .Vcomp (vcomp),
    .Vcomn (vcomn)
  );

  latch_sr u_latch (
    .Vcomp   (vcomp),
    .Vcomn   (vcomn),
    .SAR_vin (sar_vin)
  );

  sar_logic #(.N_BITS(N_BITS)) u_sar (
    .clk          (SPI_sck),
    .rst_n        (rst_n),
    .start        (!SPI_cs_n),
    .SAR_vin      (sar_vin),
    .SAR_Samp     (sar_samp),
    .SAR_sw_on    (sar_sw_on),
    .SAR_data_out (SAR_data_out),
    .SAR_con_p    (con_p),
    .SAR_con_n    (con_n)
  );

  spi_module #(.N_BITS(N_BITS), .CNT_W(CNT_W)) u_spi (
    .SAR_DOUT (SAR_data_out),
    .SPI_cs_n (SPI_cs_n),
    .SPI_sck  (SPI_sck),
    .rst_n    (rst_n),
    .sampling (sar_samp),
    .SPI_SDO  (SPI_SDO)
  );

endmodule
