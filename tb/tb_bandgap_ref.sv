// Self-checking testbench of the bandgap model: 900 mV within +-500 uV for
// supplies from 1.62 V to 1.98 V, and an output that falls with the supply
// below 1.62 V.
module tb_bandgap_ref;
  real vdd = 0.0, vref;
  int checks = 0, failures = 0;

  bandgap_ref dut (.vdd(vdd), .vref(vref));

  initial begin
    for (int k = 0; k <= 36; k++) begin
      vdd = 1.62 + 0.01 * real'(k);
      #1 checks++;
      if (vref < 0.8995 || vref > 0.9005) begin
        failures++;
        $display("FAIL vdd=%f vref=%f", vdd, vref);
      end
    end
    vdd = 0.81;
    #1 checks++;
    if (vref < 0.4499 || vref > 0.4501) begin failures++; $display("FAIL low supply vref=%f", vref); end
    vdd = 0.0;
    #1 checks++;
    if (vref != 0.0) begin failures++; $display("FAIL no supply vref=%f", vref); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
