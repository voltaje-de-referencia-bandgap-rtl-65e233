// SPI module: serial output port of the SAR ADC.
//
// Sends each 10-bit conversion result MSB first on SPI_SDO. The external
// serial clock reaches the two inner blocks only while the active-low chip
// select is asserted: int_sck = SPI_cs_n ? 0 : SPI_sck. Inside, spi_counter
// counts the bit slots 1..N_BITS while the SAR reports `sampling`, and
// piso_master registers bit SAR_DOUT[N_BITS-slot] onto SPI_SDO, one clock
// behind the counter.
//
// Timing (rising edges of SPI_sck with SPI_cs_n low): the counter reaches 1
// on the first edge that sees `sampling` high, and the MSB appears on SPI_SDO
// one edge later; after that one bit leaves per clock and frames repeat every
// N_BITS clocks. The chip-select clock gate, the counter/PISO split and
// the port names are as specified; the use of rising edges is this
// design's choice. The gated clock is a deliberate part of the design (it is
// how the chip select disables the block); it is built from a multiplexer,
// so SPI_cs_n should only change while SPI_sck is low.
module spi_module #(
  parameter int unsigned N_BITS = sar_adc_pkg::N_BITS,
  parameter int unsigned CNT_W  = sar_adc_pkg::CNT_W
) (
  input  logic [N_BITS-1:0] SAR_DOUT,
  input  logic              SPI_cs_n,
  input  logic              SPI_sck,
  input  logic              rst_n,
  input  logic              sampling,
  output logic              SPI_SDO
);

  logic             int_sck;
  logic [CNT_W-1:0] cntr;

  assign int_sck = SPI_cs_n ? 1'b0 : SPI_sck;

  spi_counter #(.N_BITS(N_BITS), .CNT_W(CNT_W)) iCounter (
    .clk      (int_sck),
    .rst      (rst_n),
    .sampling (sampling),
    .CNTR     (cntr)
  );

  piso_master #(.N_BITS(N_BITS), .CNT_W(CNT_W)) iMultiplexor (
    .clock      (int_sck),
    .rst_n      (rst_n),
    .sel        (cntr),
    .DIN        (SAR_DOUT),
    .serial_out (SPI_SDO)
  );

endmodule
