// Self-checking testbench of spi_counter: the count stays 0 while reset or
// while `sampling` is low, then runs 1..10 and wraps to 1; dropping
// `sampling` clears it. The expected count is kept by the testbench from the
// number of edges seen with `sampling` high.
module tb_spi_counter;
  logic clk = 1'b0, rst = 1'b1, sampling = 1'b0;
  logic [3:0] cntr;
  int checks = 0, failures = 0, n_high = 0, wraps = 0;

  spi_counter dut (.clk(clk), .rst(rst), .sampling(sampling), .CNTR(cntr));

  always #5 clk = ~clk;

  task automatic check(input int exp, input string what);
    checks++;
    if (int'(cntr) != exp) begin
      failures++;
      $display("FAIL %s: CNTR=%0d expected %0d at %0t", what, cntr, exp, $time);
    end
  endtask

  initial begin
    #1 rst = 1'b0;   // asynchronous reset pulse
    #2 check(0, "reset");
    @(negedge clk) rst = 1'b1;
    repeat (3) begin @(posedge clk); #1 check(0, "idle"); end
    for (int run = 0; run < 3; run++) begin
      @(negedge clk) sampling = 1'b1;
      n_high = 0;
      repeat (7 + 11 * run) begin
        @(posedge clk); #1;
        n_high++;
        check(((n_high - 1) % 10) + 1, "counting");
        if (n_high > 10 && ((n_high - 1) % 10) == 0) wraps++;
      end
      @(negedge clk) sampling = 1'b0;
      @(posedge clk); #1 check(0, "sampling low");
    end
    // asynchronous reset in mid-count
    @(negedge clk) sampling = 1'b1;
    repeat (4) @(posedge clk);
    #2 rst = 1'b0;
    #1 check(0, "async reset");
    checks++;
    if (wraps < 2) begin failures++; $display("FAIL wrap not seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
