`timescale 1ps / 1fs
// ring_osc: behavioural model of a ring oscillator made of N_CELLS delay
// cells (vcdc) with one inversion in the loop, so it steps through
// 2*N_CELLS Johnson states per revolution, one per cell delay.
//
// While `preset` is high every cell is forced to preset_state (a Johnson
// pattern, see tdc_pkg) through its set/reset inputs.  With preset low the
// ring advances while `en` is high and freezes when it drops; the first
// transition comes one cell delay after `en` rises.  `state` is the true
// output of every cell, the bus the state-sampling registers read.
//
// MISMATCH_PS adds a fixed offset of -1, 0 or +1 times its value to cell k
// (k mod 3), a simple static mismatch pattern for studying the sliding
// scale; it is this model's choice, not a figure from the design.
module ring_osc #(
  parameter int  N_CELLS     = tdc_pkg::N_CELLS,
  parameter real T_NOM_PS    = 50.0,
  parameter real MISMATCH_PS = 0.0
) (
  input  logic                          en,
  input  logic                          preset,
  input  logic [N_CELLS-1:0]            preset_state,
  input  logic [tdc_pkg::VCTRL_W-1:0]   vctrl,
  input  logic [tdc_pkg::TRIM_W-1:0]    trim,
  output logic [N_CELLS-1:0]            state
);
  logic [N_CELLS-1:0] out_n;

  for (genvar k = 0; k < N_CELLS; k++) begin : g_cell
    vcdc #(
      .T_NOM_PS   (T_NOM_PS),
      .MISMATCH_PS(MISMATCH_PS * real'((k % 3) - 1))
    ) u_cell (
      .in_p (k == 0 ? out_n[N_CELLS-1] : state[(k+N_CELLS-1)%N_CELLS]),
      .en   (en),
      .set  (preset &  preset_state[k]),
      .rst  (preset & ~preset_state[k]),
      .vctrl(vctrl),
      .trim (trim),
      .out_p(state[k]),
      .out_n(out_n[k])
    );
  end
endmodule
