// SAR logic: successive-approximation register of the 10-bit ADC.
//
// Clocked by the serial clock SPI_sck, the block resolves one bit per clock,
// MSB first, by binary search. It uses common-mode (Vcm-based) switching of
// the two capacitor arrays: every bottom plate rests at Vcm while the input is
// sampled, so the first comparison (the MSB) needs no DAC step. After bit i is
// decided, capacitor i of the positive array moves to GND and that of the
// negative array to VDD when the bit is 1 (the reverse when it is 0), which
// halves the remaining differential search range. Undecided capacitors stay
// at Vcm.
//
// Sequence while `start` is high (rising edges of clk):
//   edge 0      SAR_Samp rises (conversions running)
//   edge 1      conversion phase 0: bootstrap switches on, all plates at Vcm
//   edge 2..11  SAR_vin is latched as bit 9..0; after edge 11 the word goes
//               to SAR_data_out and phase 0 of the next conversion starts.
// One conversion therefore takes exactly N_BITS clocks, the same period as an
// SPI frame, and SAR_data_out changes on the edge where the SPI bit counter
// returns to 1, so every frame carries one whole word. The comparator
// decides while clk is low, so the value of SAR_vin latched on an edge is the
// decision taken in the cycle before it; the MSB decision is made while the
// switches are still tracking and the input is held at the next edge.
// When `start` falls, the conversion in flight is dropped and SAR_data_out
// keeps the last word. rst_n is asynchronous, active low.
//
// Specified: 10-bit result SAR_data_out[9:0], one bit per cycle, MSB first,
// two-bit switch controls per capacitor of each array, SAR_Samp high while
// conversions run. This design's choices: the Vcm-based switching order, the
// switch encoding (sar_adc_pkg::sw_sel_t), the extra SAR_sw_on output for the
// bootstrap switches, and the timing above.
module sar_logic #(
  parameter int unsigned N_BITS = sar_adc_pkg::N_BITS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 SAR_vin,
  output logic                 SAR_Samp,
  output logic                 SAR_sw_on,
  output logic [N_BITS-1:0]    SAR_data_out,
  output sar_adc_pkg::sw_sel_t [N_BITS-1:0] SAR_con_p,
  output sar_adc_pkg::sw_sel_t [N_BITS-1:0] SAR_con_n
);

  localparam int unsigned PH_W = $clog2(N_BITS);

  logic              run;     // a conversion is in progress
  logic [PH_W-1:0]   phase;   // 0 = sampling, k = bits 9..10-k decided
  logic [N_BITS-1:0] code;    // bits decided so far

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      SAR_Samp     <= 1'b0;
      run          <= 1'b0;
      phase        <= '0;
      code         <= '0;
      SAR_data_out <= '0;
    end else if (!start) begin
      SAR_Samp <= 1'b0;
      run      <= 1'b0;
      phase    <= '0;
      code     <= '0;
    end else if (!SAR_Samp) begin
      SAR_Samp <= 1'b1;
    end else if (!run) begin
      run   <= 1'b1;
      phase <= '0;
      code  <= '0;
    end else begin
      if (int'(phase) == N_BITS - 1) begin
        SAR_data_out <= {code[N_BITS-1:1], SAR_vin};
        code         <= '0;
        phase        <= '0;
      end else begin
        code[N_BITS-1-int'(phase)] <= SAR_vin;
        phase                      <= phase + PH_W'(1);
      end
    end
  end

  // Track the input while idle and during phase 0 of each conversion.
  assign SAR_sw_on = !run || phase == '0;

  // Bit i is decided once phase has passed it: i >= N_BITS - phase.
  always_comb begin
    for (int i = 0; i < N_BITS; i++) begin
      if (run && i >= N_BITS - int'(phase)) begin
        SAR_con_p[i] = code[i] ? sar_adc_pkg::SW_GND : sar_adc_pkg::SW_VDD;
        SAR_con_n[i] = code[i] ? sar_adc_pkg::SW_VDD : sar_adc_pkg::SW_GND;
      end else begin
        SAR_con_p[i] = sar_adc_pkg::SW_VCM;
        SAR_con_n[i] = sar_adc_pkg::SW_VCM;
      end
    end
  end

  // The switches never track while a plate is off Vcm, and the phase stays
  // in 0..N_BITS-1.
  a_track_at_vcm: assert property (@(posedge clk) disable iff (!rst_n)
    SAR_sw_on |-> (SAR_con_p == '0 && SAR_con_n == '0));
  a_phase_range: assert property (@(posedge clk) disable iff (!rst_n)
    int'(phase) < N_BITS);

endmodule
