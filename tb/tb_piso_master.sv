// Self-checking testbench of piso_master: for every counter value 0..15 and
// random parallel words, the bit registered on serial_out must be
// DIN[10 - sel] for sel in 1..10 and 0 otherwise, one clock after sel is set.
module tb_piso_master;
  logic clock = 1'b0, rst_n = 1'b1;
  logic [3:0] sel = '0;
  logic [9:0] din = '0;
  logic serial_out;
  int checks = 0, failures = 0;
  logic exp;

  piso_master dut (.clock(clock), .rst_n(rst_n), .sel(sel), .DIN(din), .serial_out(serial_out));

  always #5 clock = ~clock;

  initial begin
    #1 rst_n = 1'b0;   // asynchronous reset pulse
    #2;
    checks++;
    if (serial_out !== 1'b0) begin failures++; $display("FAIL reset"); end
    @(negedge clock) rst_n = 1'b1;
    for (int w = 0; w < 40; w++) begin
      din = 10'($urandom);
      for (int s = 0; s < 16; s++) begin
        @(negedge clock) sel = 4'(s);
        exp = (s >= 1 && s <= 10) ? din[10 - s] : 1'b0;
        @(posedge clock); #1;
        checks++;
        if (serial_out !== exp) begin
          failures++;
          $display("FAIL din=%b sel=%0d out=%b exp=%b", din, s, serial_out, exp);
        end
      end
    end
    // output is registered: changing sel without a clock edge changes nothing
    @(negedge clock) begin din = 10'b10_0000_0000; sel = 4'd1; end
    @(posedge clock); #1;
    @(negedge clock) sel = 4'd2;
    #1; checks++;
    if (serial_out !== 1'b1) begin failures++; $display("FAIL output not registered"); end
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
