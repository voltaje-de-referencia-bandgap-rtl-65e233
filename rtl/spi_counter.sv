// SPI bit counter.
//
// Counts the bit slots of a serial frame for the PISO stage. While `sampling`
// is low the count is held at 0. Once `sampling` is high the counter steps to
// 1 on the next rising clock edge and then counts 1, 2, ..., N_BITS, 1, 2, ...
// for as long as `sampling` stays high, so back-to-back frames follow each
// other without a gap. Clearing the count to 0 when `sampling` falls, and the
// asynchronous active-low reset on `rst` (wired to the module's rst_n), are
// this design's choices; the 1..10 wrap-around sequence and the 4-bit
// output are the specified behaviour.
//
// Timing: one count per rising edge of `clk` (the gated SPI clock).
module spi_counter #(
  parameter int unsigned N_BITS = sar_adc_pkg::N_BITS,
  parameter int unsigned CNT_W  = sar_adc_pkg::CNT_W
) (
  input  logic             clk,
  input  logic             rst,       // active low
  input  logic             sampling,
  output logic [CNT_W-1:0] CNTR
);

  localparam logic [CNT_W-1:0] LAST = CNT_W'(N_BITS);

  always_ff @(posedge clk or negedge rst) begin
    if (!rst)                            CNTR <= '0;
    else if (!sampling)                  CNTR <= '0;
    else if (CNTR >= LAST || CNTR == '0) CNTR <= CNT_W'(1);
    else                                 CNTR <= CNTR + CNT_W'(1);
  end

  // The count never leaves 0..N_BITS.
  a_cntr_range: assert property (@(posedge clk) disable iff (!rst) CNTR <= LAST);

endmodule
