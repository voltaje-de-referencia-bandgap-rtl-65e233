// Self-checking testbench of the dynamic comparator model: outputs are both 0
// while the clock is high and carry the complementary decision vinp > vinn
// after each falling edge, held until the next rising edge.
module tb_dyn_comparator;
  logic clk = 1'b1;
  real vinp = 0.0, vinn = 0.0;
  logic vcomp, vcomn;
  logic exp;
  int checks = 0, failures = 0;

  dyn_comparator dut (.clk(clk), .vinp(vinp), .vinn(vinn), .Vcomp(vcomp), .Vcomn(vcomn));

  always #5 clk = ~clk;

  initial begin
    for (int k = 0; k < 200; k++) begin
      @(posedge clk);
      vinp = 0.9 + (real'($urandom_range(2000)) - 1000.0) * 1.0e-4;
      vinn = 0.9 + (real'($urandom_range(2000)) - 1000.0) * 1.0e-4;
      if (k % 17 == 0) vinn = vinp + 1.0e-6;   // small differences
      if (k % 19 == 0) vinn = vinp - 1.0e-6;
      exp = vinp > vinn;
      #1 checks++;
      if ({vcomp, vcomn} !== 2'b00) begin failures++; $display("FAIL reset phase"); end
      @(negedge clk); #1;
      checks++;
      if ({vcomp, vcomn} !== {exp, !exp}) begin
        failures++;
        $display("FAIL vinp=%f vinn=%f out=%b%b", vinp, vinn, vcomp, vcomn);
      end
      // inputs moving after the decision must not change it
      vinp = 0.0; vinn = 1.8;
      #1 checks++;
      if ({vcomp, vcomn} !== {exp, !exp}) begin failures++; $display("FAIL not held"); end
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
