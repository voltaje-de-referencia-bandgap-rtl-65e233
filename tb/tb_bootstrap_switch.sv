// Self-checking testbench of the bootstrap switch model: vout follows vin
// while sw_on is high and holds the value vin had when sw_on fell.
module tb_bootstrap_switch;
  real vin = 0.0, vout, held;
  logic sw_on = 1'b1;
  int checks = 0, failures = 0;

  bootstrap_switch dut (.vin(vin), .sw_on(sw_on), .vout(vout));

  initial begin
    for (int k = 0; k < 100; k++) begin
      sw_on = 1'b1;
      repeat (3) begin
        vin = real'($urandom_range(1800)) * 1.0e-3;
        #1 checks++;
        if (vout != vin) begin failures++; $display("FAIL track vin=%f vout=%f", vin, vout); end
      end
      held = vin;
      sw_on = 1'b0;
      repeat (3) begin
        vin = real'($urandom_range(1800)) * 1.0e-3;
        #1 checks++;
        if (vout != held) begin failures++; $display("FAIL hold %f vout=%f", held, vout); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
