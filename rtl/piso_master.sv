// PISO master: parallel-in, serial-out stage of the SPI transmitter.
//
// The bit counter `sel` names the bit slot of the frame: slot 1 carries the
// MSB DIN[N_BITS-1], slot N_BITS carries the LSB DIN[0]. On every rising
// clock edge the bit chosen by the current slot is registered onto
// `serial_out`; slot 0 (counter idle) drives 0. The output therefore lags the
// counter by one clock, and DIN is read bit by bit, so it must stay stable
// for the length of a frame. MSB-first order and the 10-bit word are the
// specified behaviour; the registered output and the 0 driven while idle are
// this design's choices.
module piso_master #(
  parameter int unsigned N_BITS = sar_adc_pkg::N_BITS,
  parameter int unsigned CNT_W  = sar_adc_pkg::CNT_W
) (
  input  logic              clock,
  input  logic              rst_n,
  input  logic [CNT_W-1:0]  sel,
  input  logic [N_BITS-1:0] DIN,
  output logic              serial_out
);

  logic next_bit;

  always_comb begin
    next_bit = 1'b0;
    if (sel >= CNT_W'(1) && sel <= CNT_W'(N_BITS))
      next_bit = DIN[N_BITS - int'(sel)];
  end

  always_ff @(posedge clock or negedge rst_n) begin
    if (!rst_n) serial_out <= 1'b0;
    else        serial_out <= next_bit;
  end

endmodule
