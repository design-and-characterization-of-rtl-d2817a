`timescale 1ps / 1fs
// board_model: behavioural model of the test-board parts around the TDC
// ASIC and the FPGA, for testbenches only.
//  * PLL: the FPGA clock (CLK_PS period) and START.  The START image for the
//    FPGA rises START_PHASE_PS after a clk rising edge every START_PERIOD_PS
//    (a whole number of clk periods: fixed phase).  The ASIC's START is the
//    same edge D_START_PS later (board routing).
//  * Delay chip: STOP1 and STOP2 are the FPGA's stop pulse delayed by
//    D_STOP_PS + fine_code * FINE_STEP_PS; STOP2 of channel i has an extra
//    i * SKEW_PS.
//  * DAC: SPI mode-0 receiver of {3'b011, ch, code}; channel 0 drives the
//    fast-cell control code, channel 1 the slow one (both 2048 at power-up).
// The odd fractions of the delays keep edges off the 6.25 ps and 50 ps grids.
module board_model #(
  parameter int  N_CH            = 4,
  parameter real CLK_PS          = 5000.0,
  parameter real START_PERIOD_PS = 100000.0,
  parameter real START_PHASE_PS  = 1000.0,
  parameter real D_START_PS      = 17301.7,
  parameter real D_STOP_PS       = 1000.3,
  parameter real FINE_STEP_PS    = 5.0,
  parameter real SKEW_PS         = 40.3
) (
  output logic              clk,
  output logic              start_img,
  output logic              start,
  input  logic              stop_out,
  input  logic [9:0]        fine_code,
  output logic              stop1,
  output logic [N_CH-1:0]   stop2,
  input  logic              dac_sclk,
  input  logic              dac_mosi,
  input  logic              dac_cs_n,
  output logic [11:0]       vctrl_fast,
  output logic [11:0]       vctrl_slow,
  output int                dac_writes
);
  logic [15:0] sh;
  int nb;

  initial begin
    clk = 1'b0; start_img = 1'b0; start = 1'b0; stop1 = 1'b0; stop2 = '0;
    vctrl_fast = 12'd2048; vctrl_slow = 12'd2048; dac_writes = 0;
  end

  always #(CLK_PS / 2.0) clk = ~clk;

  initial begin
    forever begin
      #(START_PERIOD_PS - 3.0 * CLK_PS);
      @(posedge clk);
      #(START_PHASE_PS) start_img = 1'b1;
      #(2.0 * CLK_PS) start_img = 1'b0;
    end
  end

  // START pulses are shorter than the routing delay: model each edge
  always @(posedge start_img) fork
    begin #(D_START_PS) start = 1'b1; #(2.0 * CLK_PS) start = 1'b0; end
  join_none
  always @(stop_out) stop1 <= #(D_STOP_PS + FINE_STEP_PS * real'(fine_code)) stop_out;
  for (genvar i = 0; i < N_CH; i++) begin : g_s2
    always @(stop_out) stop2[i] <= #(D_STOP_PS + FINE_STEP_PS * real'(fine_code) + SKEW_PS * i) stop_out;
  end

  always @(negedge dac_cs_n) nb = 0;
  always @(posedge dac_sclk) if (!dac_cs_n) begin sh = {sh[14:0], dac_mosi}; nb++; end
  always @(posedge dac_cs_n) if (nb == 16 && sh[15:13] == 3'b011) begin
    if (sh[12]) vctrl_slow = sh[11:0];
    else        vctrl_fast = sh[11:0];
    dac_writes++;
  end
endmodule
