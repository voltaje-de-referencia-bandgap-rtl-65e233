// Self-checking testbench of latch_sr: (1,0) sets SAR_vin, (0,1) clears it,
// (0,0) and (1,1) hold the last value. The expected value is tracked by the
// testbench over a random sequence of input pairs.
module tb_latch_sr;
  logic vcomp = 1'b0, vcomn = 1'b1, q;
  logic exp;
  int checks = 0, failures = 0, sets = 0, holds = 0;

  latch_sr dut (.Vcomp(vcomp), .Vcomn(vcomn), .SAR_vin(q));

  initial begin
    #1 exp = 1'b0;
    for (int k = 0; k < 400; k++) begin
      {vcomp, vcomn} = 2'($urandom);
      #1;
      if (vcomp != vcomn) begin exp = vcomp; sets++; end
      else holds++;
      checks++;
      if (q !== exp) begin
        failures++;
        $display("FAIL in=%b%b q=%b exp=%b", vcomp, vcomn, q, exp);
      end
    end
    checks++;
    if (sets == 0 || holds == 0) begin failures++; $display("FAIL coverage"); end
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
