// Shared constants and types of the 10-bit SAR ADC.
//
// The converter resolves N_BITS = 10 bits, one per serial-clock cycle, and the
// SPI bit counter is CNT_W = 4 bits wide. Each capacitor of the two
// (positive and negative) DAC arrays has a two-bit bottom-plate switch
// control; sw_sel_t gives its three positions. The resolution and the counter
// width come from the design; the switch encoding is this design's own choice.
package sar_adc_pkg;

  localparam int unsigned N_BITS = 10;
  localparam int unsigned CNT_W  = 4;

  // Bottom-plate switch position of one capacitor.
  typedef enum logic [1:0] {
    SW_VCM = 2'b00,  // common-mode reference (bandgap output), used while sampling
    SW_VDD = 2'b01,  // supply rail
    SW_GND = 2'b10   // ground rail
  } sw_sel_t;

endpackage
