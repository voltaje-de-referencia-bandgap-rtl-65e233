// End-to-end testbench of the SAR ADC at its default size (10 bits).
//
// A differential input is applied, chip select is pulled low and the
// converter runs back-to-back conversions. For each conversion the testbench
// computes the ideal code from the input alone: with Vcm = 0.9 V and
// VDD = 1.8 V the code boundaries lie at vinp - vinn = 1.8 V * (2c - 1024) / 1024
// for c = 1..1023, and the code is the number of boundaries below the input.
// Inputs are placed at least 0.1 LSB away from a boundary. Every SPI_SDO bit
// is checked against the word the frame carries (the word of the previous
// conversion, MSB first). Also checked: the MSB of the first frame on the
// third SCK edge after chip select falls, one word every 10 clocks, a pause
// of the chip select (clock gated off, conversions stopped, the last word kept
// and sent again first after the restart), the reset word 0 in the first
// frame, and the bandgap output on Vref_out. The testbench counts how often
// each of these happened and fails if one never did.
module tb_sar_adc_top;
  logic rst_n = 1'b1, sck = 1'b0, cs_n = 1'b1;
  real vinp = 0.9, vinn = 0.9, vdd = 1.8, vref_out;
  logic sdo;
  logic [9:0] dout, frame_word;
  int checks = 0, failures = 0;
  int conversions = 0, frames = 0, pauses = 0, zero_frames = 0, resent = 0;
  int code_min = 1024, code_max = -1;
  int exp_code, prev_code;

  sar_adc_top dut (.rst_n(rst_n), .SPI_sck(sck), .SPI_cs_n(cs_n), .vinp(vinp), .vinn(vinn),
                   .vdd(vdd), .SPI_SDO(sdo), .SAR_data_out(dout), .Vref_out(vref_out));

  always #5 sck = ~sck;

  function automatic int ideal(input real vd);
    int n = 0;
    for (int c = 1; c < 1024; c++) if (vd > 1.8 * real'(2 * c - 1024) / 1024.0) n++;
    return n;
  endfunction

  // Pick an input: unit u of 1.8 V / 1024, odd, plus up to +-0.4 unit.
  task automatic set_input(input int k);
    int u;
    real vd;
    if (k == 0) u = 1023;
    else if (k == 1) u = -1023;
    else if (k == 2) u = 1;
    else u = 2 * $urandom_range(1023) - 1023;
    vd = 1.8 / 1024.0 * (real'(u) + (real'($urandom_range(80)) - 40.0) / 100.0);
    if (k == 3) vd = 2.5;          // over range: clips to full scale
    vinp = 0.9 + vd / 2.0;
    vinn = 0.9 - vd / 2.0;
    exp_code = ideal(vd);
  endtask

  // One chip-select session: n_conv conversions. Edge numbers count rising
  // SCK edges after chip select falls.
  task automatic session(input int n_conv, input int first_k, input logic [9:0] first_word);
    @(negedge sck) cs_n = 1'b0;
    @(posedge sck);                  // edge 1: SAR_Samp rises
    @(posedge sck); #1;              // edge 2: phase 0 of conversion 0, slot 1
    frame_word = dout;
    checks++;
    if (dout !== first_word) begin failures++; $display("FAIL first frame word %b", dout); end
    if (first_word == 10'd0) zero_frames++; else resent++;
    for (int k = 0; k < n_conv; k++) begin
      set_input(first_k + k);
      // edges 3..12 of this conversion: frame bits MSB first
      for (int m = 9; m >= 0; m--) begin
        @(posedge sck); #1;
        checks++;
        if (sdo !== frame_word[m]) begin
          failures++;
          $display("FAIL SDO bit %0d of %b: got %b (conversion %0d)", m, frame_word, sdo, k);
        end
      end
      frames++;
      // last edge also finished this conversion
      checks++;
      if (int'(dout) != exp_code) begin
        failures++;
        $display("FAIL vd=%f code=%0d expected %0d", vinp - vinn, dout, exp_code);
      end
      conversions++;
      if (int'(dout) < code_min) code_min = int'(dout);
      if (int'(dout) > code_max) code_max = int'(dout);
      frame_word = dout;
    end
    @(negedge sck) cs_n = 1'b1;
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    checks++;
    if (vref_out < 0.8995 || vref_out > 0.9005) begin failures++; $display("FAIL Vref_out=%f", vref_out); end
    repeat (3) @(posedge sck);
    session(60, 0, 10'd0);
    prev_code = int'(dout);
    // pause: SCK keeps running, chip select high, nothing moves
    repeat (15) begin
      @(posedge sck); #1;
      checks++;
      if (int'(dout) != prev_code) begin failures++; $display("FAIL word changed during pause"); end
    end
    pauses++;
    session(60, 4, 10'(prev_code));
    // reset, then a new session starts from word 0
    #3 rst_n = 1'b0;
    #1 checks++;
    if (dout !== 10'd0 || sdo !== 1'b0) begin failures++; $display("FAIL reset"); end
    #3 rst_n = 1'b1;
    session(30, 4, 10'd0);
    checks++;
    if (conversions != 150 || frames != 150 || pauses == 0 || zero_frames != 2 || resent != 1
        || code_min != 0 || code_max != 1023) begin
      failures++;
      $display("FAIL coverage conv=%0d frames=%0d pauses=%0d zero=%0d resent=%0d min=%0d max=%0d",
               conversions, frames, pauses, zero_frames, resent, code_min, code_max);
    end
    $display("conversions=%0d frames=%0d pauses=%0d zero_frames=%0d resent_frames=%0d codes %0d..%0d",
             conversions, frames, pauses, zero_frames, resent, code_min, code_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
