`timescale 1ps / 1fs
// tdc_pkg: constants, types and helper functions shared by the 2D Vernier
// ring-oscillator TDC and its FPGA readout.
//
// A ring of N_CELLS differential delay cells with one inversion in the loop
// runs through 2*N_CELLS states per revolution, one state per cell delay.
// The states form a Johnson code: state p (p <= N) has cells 0..p-1 set,
// state p (p > N) has cells 0..p-N-1 cleared and the rest set.  The functions
// below convert between phase numbers and cell patterns; the set/reset
// inputs of the cells use the same patterns to preset a starting phase.
//
// Result widths follow from the 25 ns measurement window.  A random starting
// phase (up to 15 cells) shortens the range of a ring by up to 15 cells, so
// the 56.25 ps ring needs a 5-bit revolution counter (at least 27.9 ns) and
// the 50 ps ring a 6-bit one (5 bits would give only 24.85 ns).
package tdc_pkg;

  localparam int N_CELLS    = 8;                 // cells per ring (own choice)
  localparam int N_PHASES   = 2 * N_CELLS;       // states per revolution
  localparam int PH_W       = $clog2(N_PHASES);  // 4
  localparam int REV_BITS   = 5;                 // revolution counter, 6.25 ps section
  localparam int TOT_REV_BITS = 6;               // revolution counter, 50 ps section
  localparam int FINE_STEPS = 9;                 // 56.25 ps / 6.25 ps
  localparam int TOT_W      = TOT_REV_BITS + PH_W; // 50 ps code width (10)
  localparam int TOA_W      = REV_BITS + PH_W + 4; // 6.25 ps code width (13)
  localparam int N_CH       = 4;                 // TDC channels on the ASIC
  localparam int VCTRL_W    = 12;                // DAC code width of a control voltage
  localparam int TRIM_W     = 4;                 // per-ring trim code width

  // Static configuration of the ASIC.
  typedef struct packed {
    logic              osc_en;     // run the reference oscillators
    logic              ss_en;      // sliding scale on
    logic [TRIM_W-1:0] trim_fast;  // trim of all 50 ps cells
    logic [TRIM_W-1:0] trim_slow;  // trim of all 56.25 ps cells
  } tdc_cfg_t;

  // Result of one channel for one measurement cycle.
  typedef struct packed {
    logic             toa_ovf;  // START-STOP2 interval out of range
    logic [TOA_W-1:0] toa;      // START-STOP2 in 6.25 ps steps
    logic             tot_ovf;  // START-STOP1 interval out of range
    logic [TOT_W-1:0] tot;      // START-STOP1 in 50 ps steps
  } tdc_result_t;

  // Johnson pattern of a ring preset to phase ph.
  function automatic logic [N_CELLS-1:0] johnson_encode(input logic [PH_W-1:0] ph);
    logic [N_CELLS-1:0] s;
    for (int k = 0; k < N_CELLS; k++) begin
      if (int'(ph) <= N_CELLS) s[k] = (k < int'(ph));
      else                     s[k] = (k >= int'(ph) - N_CELLS);
    end
    return s;
  endfunction

  // Phase of a Johnson pattern (number of set cells, mirrored once the last
  // cell is set).
  function automatic logic [PH_W-1:0] johnson_phase(input logic [N_CELLS-1:0] s);
    int ones;
    ones = 0;
    for (int k = 0; k < N_CELLS; k++) ones += int'(s[k]);
    if (s[N_CELLS-1]) return PH_W'(N_PHASES - ones);
    else              return PH_W'(ones);
  endfunction

endpackage
