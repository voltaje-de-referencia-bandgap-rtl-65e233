// Self-checking testbench of sar_logic. The testbench stands in for the
// capacitor arrays, comparator and SR latch: after every falling clock edge
// it sets SAR_vin = (X > T), where X is the differential input in units of
// 1/1024 of the positive full scale and T the DAC level set by the switch
// controls (+2^i for a decided 1, -2^i for a decided 0, 0 for Vcm).
// For an odd X the ideal result is the number of code boundaries
// 2c - 1024 (c = 1..1023) that X lies above. Also checked: SAR_Samp one edge
// after start, the word every 10 clocks, switches tracking only in phase 0,
// all plates at Vcm while tracking, and stopping when start falls.
module tb_sar_logic;
  import sar_adc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0, vin = 1'b0;
  logic samp, sw_on;
  logic [9:0] dout;
  sw_sel_t [9:0] con_p, con_n;
  int checks = 0, failures = 0, conversions = 0;
  int x, t, exp_code, last_update = -1, edge_no = 0;

  sar_logic dut (.clk(clk), .rst_n(rst_n), .start(start), .SAR_vin(vin), .SAR_Samp(samp),
                 .SAR_sw_on(sw_on), .SAR_data_out(dout), .SAR_con_p(con_p), .SAR_con_n(con_n));

  always #5 clk = ~clk;

  function automatic int ideal(input int xv);
    int n = 0;
    for (int c = 1; c < 1024; c++) if (xv > 2 * c - 1024) n++;
    return n;
  endfunction

  // ideal comparator + latch, deciding at the falling edge
  always @(negedge clk) begin
    t = 0;
    for (int i = 0; i < 10; i++) begin
      if (con_p[i] == SW_GND && con_n[i] == SW_VDD) t += (1 << i);
      else if (con_p[i] == SW_VDD && con_n[i] == SW_GND) t -= (1 << i);
      else if (con_p[i] != SW_VCM || con_n[i] != SW_VCM) begin
        failures++;
        $display("FAIL inconsistent switch pair on bit %0d", i);
      end
    end
    if (sw_on) begin
      checks++;
      if (t != 0) begin failures++; $display("FAIL plates not at Vcm while tracking"); end
    end
    vin <= x > t;
  end

  always @(posedge clk) edge_no++;

  initial begin
    #1 rst_n = 1'b0;   // asynchronous reset pulse
    x = 1;
    #2 checks++;
    if (samp || dout != 0) begin failures++; $display("FAIL reset"); end
    @(negedge clk) rst_n = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk) start = 1'b1;
    @(posedge clk); #1 checks++;
    if (!samp) begin failures++; $display("FAIL SAR_Samp one edge after start"); end
    // phase 0 begins on the next edge; the word is ready 10 edges later
    @(posedge clk); #1;
    for (int k = 0; k < 300; k++) begin
      if (k < 4) x = (k == 0) ? 1023 : (k == 1) ? -1023 : (k == 2) ? 1 : -1;
      else x = 2 * $urandom_range(1023) - 1023;
      exp_code = ideal(x);
      checks++;
      if (!sw_on) begin failures++; $display("FAIL switches not tracking in phase 0"); end
      repeat (9) begin
        @(posedge clk); #1;
        checks++;
        if (sw_on) begin failures++; $display("FAIL switches on during conversion"); end
      end
      @(posedge clk); #1;
      conversions++;
      checks++;
      if (int'(dout) != exp_code) begin
        failures++;
        $display("FAIL x=%0d code=%0d expected %0d", x, dout, exp_code);
      end
      if (last_update >= 0) begin
        checks++;
        if (edge_no - last_update != 10) begin failures++; $display("FAIL period %0d", edge_no - last_update); end
      end
      last_update = edge_no;
    end
    // stop: SAR_Samp falls, the word is kept
    @(negedge clk) start = 1'b0;
    repeat (3) @(posedge clk);
    #1 checks++;
    if (samp || int'(dout) != exp_code || !sw_on) begin failures++; $display("FAIL stop"); end
    checks++;
    if (conversions != 300) begin failures++; $display("FAIL conversion count"); end
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
