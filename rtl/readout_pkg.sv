`timescale 1ps / 1fs
// readout_pkg: constants and register types of the FPGA readout of the TDC
// ASIC.  The register map (byte addresses on the AXI-Lite bus):
//   0x00 CTRL   W: bit0 finder go, bit1 scan go, bit2 frequency go (pulses);
//               R/W: [5:4] channel select, bit8 sliding scale on,
//               bit9 reference oscillators on
//   0x04 TRIM   [3:0] fast-cell trim, [7:4] slow-cell trim
//   0x08 DAC    W: [11:0] code, bit16 channel (0 fast, 1 slow) -> DAC write
//   0x0C KMAX   [7:0] largest coarse shift the finder tries
//   0x10 SCAN   [15:0] number of points, [25:16] step in fine-delay codes
//   0x14 GATE   [23:0] frequency gate in clk cycles
//   0x18 STATUS R: finder busy, found, fail, scan busy, freq busy, DAC busy,
//               measurement timeout (since the last finder or scan go)
//   0x1C ZERO   R: [7:0] coarse shift, [25:16] fine-delay code of position 0
//   0x20 FFAST  R: edges of the divided fast oscillator in the last gate
//   0x24 FSLOW  R: same for the slow oscillator
//   0x28 LAST   R: last result of the selected channel (tdc_result_t)
// The map, widths and reset values are this design's own choices.
package readout_pkg;

  localparam int K_W          = 8;     // coarse shift, in clk periods
  localparam int F_W          = 10;    // fine delay code, 5 ps per step
  localparam int FINE_PER_CLK = 1000;  // fine codes per clk period (5 ns / 5 ps)
  localparam int GATE_W       = 24;
  localparam int AXIL_AW      = 8;

  localparam logic [AXIL_AW-1:0] A_CTRL   = 8'h00;
  localparam logic [AXIL_AW-1:0] A_TRIM   = 8'h04;
  localparam logic [AXIL_AW-1:0] A_DAC    = 8'h08;
  localparam logic [AXIL_AW-1:0] A_KMAX   = 8'h0C;
  localparam logic [AXIL_AW-1:0] A_SCAN   = 8'h10;
  localparam logic [AXIL_AW-1:0] A_GATE   = 8'h14;
  localparam logic [AXIL_AW-1:0] A_STATUS = 8'h18;
  localparam logic [AXIL_AW-1:0] A_ZERO   = 8'h1C;
  localparam logic [AXIL_AW-1:0] A_FFAST  = 8'h20;
  localparam logic [AXIL_AW-1:0] A_FSLOW  = 8'h24;
  localparam logic [AXIL_AW-1:0] A_LAST   = 8'h28;

  // settings held by the register file
  typedef struct packed {
    logic [1:0]        ch_sel;
    logic              ss_en;
    logic              osc_en;
    logic [3:0]        trim_fast;
    logic [3:0]        trim_slow;
    logic [K_W-1:0]    k_max;
    logic [15:0]       n_points;
    logic [F_W-1:0]    step;
    logic [GATE_W-1:0] gate;
  } settings_t;

  // status reported by the FSMs
  typedef struct packed {
    logic              finder_busy;
    logic              found;
    logic              fail;
    logic              scan_busy;
    logic              freq_busy;
    logic              dac_busy;
    logic              meas_timeout;
    logic [K_W-1:0]    zero_k;
    logic [F_W-1:0]    zero_fine;
    logic [GATE_W-1:0] f_fast;
    logic [GATE_W-1:0] f_slow;
    logic [31:0]       last;
  } status_t;

endpackage
