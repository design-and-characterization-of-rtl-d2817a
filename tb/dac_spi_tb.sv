`timescale 1ps / 1fs
// dac_spi_tb: an SPI mode-0 receiver captures mosi on rising sclk while
// cs_n is low.  Each write must arrive as {3'b011, ch, code}, exactly 16
// clocks, with sclk low whenever cs_n changes, and take 33*CLK_DIV+1 cycles
// of busy.
module dac_spi_tb;
  logic clk = 1'b0, rst_n = 1'b0, wr = 1'b0, ch = 1'b0;
  logic [11:0] code = '0;
  logic sclk, mosi, cs_n, busy;
  logic [31:0] rx;
  int nbits = 0;
  int checks = 0, failures = 0;

  always #2500 clk = ~clk;

  dac_spi dut (.*);

  always @(posedge sclk) if (!cs_n) begin rx = {rx[30:0], mosi}; nbits++; end
  always @(negedge cs_n) begin rx = '0; nbits = 0; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(cs_n) if (rst_n) check(!sclk, "sclk low at cs_n edge");

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 10; n++) begin
      int cyc;
      logic c;
      logic [11:0] v;
      c = 1'(n); v = 12'($urandom);
      @(negedge clk); wr = 1'b1; ch = c; code = v;
      @(negedge clk); wr = 1'b0; ch = ~c; code = ~v;
      cyc = 1;
      while (busy) begin @(negedge clk); cyc++; end
      check(nbits == 16, $sformatf("%0d bits", nbits));
      check(rx[15:0] == {3'b011, c, v}, $sformatf("word %h expected %h", rx[15:0], {3'b011, c, v}));
      check(cs_n, "cs_n high after write");
      check(cyc == 33 * 4 + 1, $sformatf("busy %0d cycles", cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
