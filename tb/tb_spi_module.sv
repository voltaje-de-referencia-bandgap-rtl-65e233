// Self-checking testbench of spi_module. It sends the ten test words of the
// specification sequence (one bit moving or cleared across the word) in
// back-to-back frames and checks every SPI_SDO bit against the word that
// was on SAR_DOUT, MSB first. It also checks:
//  - the latency: with `sampling` raised on the first edge after the chip
//    select falls, the MSB is on SPI_SDO after the third rising edge;
//  - the idle value 0 before `sampling` rises;
//  - the chip-select clock gate: with SPI_cs_n high the clock edges do
//    nothing and the output and the frame position are frozen;
//  - the asynchronous reset.
module tb_spi_module;
  logic sck = 1'b0, cs_n = 1'b1, rst_n = 1'b1, sampling = 1'b0;
  logic [9:0] dout = '0;
  logic sdo;
  int checks = 0, failures = 0, frames = 0, gated = 0;

  localparam logic [9:0] WORDS [10] = '{
    10'b10_0000_0000, 10'b01_0000_0000, 10'b11_0111_1111, 10'b00_0100_0000,
    10'b11_1101_1111, 10'b11_1110_1111, 10'b00_0000_1000, 10'b00_0000_0100,
    10'b11_1111_1101, 10'b00_0000_0001
  };

  spi_module dut (.SAR_DOUT(dout), .SPI_cs_n(cs_n), .SPI_sck(sck), .rst_n(rst_n),
                  .sampling(sampling), .SPI_SDO(sdo));

  always #5 sck = ~sck;

  task automatic expect_sdo(input logic exp, input string what);
    checks++;
    if (sdo !== exp) begin
      failures++;
      $display("FAIL %s: SDO=%b expected %b at %0t", what, sdo, exp, $time);
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;   // asynchronous reset pulse
    #2 expect_sdo(1'b0, "reset");
    @(negedge sck) rst_n = 1'b1;
    repeat (2) @(posedge sck);
    // chip select low, SAR starts one edge later (as the SAR logic does)
    @(negedge sck) begin cs_n = 1'b0; dout = WORDS[0]; end
    @(posedge sck); #1 expect_sdo(1'b0, "edge 1");
    @(negedge sck) sampling = 1'b1;
    @(posedge sck); #1 expect_sdo(1'b0, "edge 2");
    @(posedge sck); #1 expect_sdo(WORDS[0][9], "MSB at edge 3");
    for (int b = 8; b >= 0; b--) begin
      @(posedge sck); #1 expect_sdo(WORDS[0][b], "frame 0");
    end
    frames++;
    // The word changes on the edge that starts the next frame's slot 1.
    for (int w = 1; w < 10; w++) begin
      for (int b = 9; b >= 0; b--) begin
        if (b == 9) begin
          // slot 1 was set on the edge that ended the previous frame; a
          // new word may be placed before the next edge
          dout = WORDS[w];
        end
        @(posedge sck); #1 expect_sdo(WORDS[w][b], "frame");
        // pause the clock gate in the middle of frame 4
        if (w == 4 && b == 5) begin
          @(negedge sck) cs_n = 1'b1;
          repeat (6) begin
            @(posedge sck); #1 expect_sdo(WORDS[w][b], "gated");
            gated++;
          end
          @(negedge sck) cs_n = 1'b0;
        end
      end
      frames++;
    end
    checks++;
    if (frames != 10 || gated == 0) begin failures++; $display("FAIL coverage"); end
    // sampling low: output returns to 0 after the counter idles
    @(negedge sck) sampling = 1'b0;
    repeat (2) @(posedge sck);
    #1 expect_sdo(1'b0, "idle after sampling");
    // asynchronous reset
    @(negedge sck) begin sampling = 1'b1; dout = 10'h3FF; end
    repeat (3) @(posedge sck);
    #1 expect_sdo(1'b1, "ones");
    #1 rst_n = 1'b0;
    #1 expect_sdo(1'b0, "async reset");
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
