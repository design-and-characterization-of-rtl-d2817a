`timescale 1ps / 1fs
// dac_spi: writes one channel of the board DAC that sets the control
// voltages of the fast and slow delay cells.  A `wr` pulse sends a 16-bit
// word {3'b011 (write and update), ch, code[11:0]} MSB first: cs_n low, mosi
// changes while sclk is low and is sampled by the DAC on the rising edge
// (SPI mode 0).  sclk runs at clk/(2*CLK_DIV); a word takes 33*CLK_DIV+1
// cycles, with busy high meanwhile.  The original design only says the readout sets
// a DAC; the serial format is a generic one chosen here.
module dac_spi #(
  parameter int CLK_DIV = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr,
  input  logic        ch,
  input  logic [11:0] code,
  output logic        sclk,
  output logic        mosi,
  output logic        cs_n,
  output logic        busy
);
  logic [15:0] sh;
  logic [4:0]  nbit;
  logic [$clog2(CLK_DIV)-1:0] div;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh   <= '0;
      nbit <= '0;
      div  <= '0;
      sclk <= 1'b0;
      cs_n <= 1'b1;
      busy <= 1'b0;
    end else if (!busy) begin
      if (wr) begin
        sh   <= {3'b011, ch, code};
        nbit <= 5'd16;
        div  <= '0;
        busy <= 1'b1;
        cs_n <= 1'b0;
      end
    end else if (int'(div) == CLK_DIV - 1) begin
      div <= '0;
      if (!sclk) begin
        if (nbit == '0) begin
          busy <= 1'b0;
          cs_n <= 1'b1;
        end else begin
          sclk <= 1'b1;
        end
      end else begin
        sclk <= 1'b0;
        sh   <= {sh[14:0], 1'b0};
        nbit <= nbit - 1'b1;
      end
    end else begin
      div <= div + 1'b1;
    end
  end

  assign mosi = sh[15];
endmodule
