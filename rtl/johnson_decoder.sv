`timescale 1ps / 1fs
// johnson_decoder: turns the sampled state of a ring oscillator into its
// phase, 0 .. 2*N_CELLS-1 (one step per cell delay).  The state is a Johnson
// pattern; the phase is the number of set cells, mirrored once the last cell
// is set.  `legal` is low for a pattern that is not a Johnson code (a bubble
// from a sample taken during a transition).  Purely combinational.
module johnson_decoder #(
  parameter int N_CELLS = tdc_pkg::N_CELLS,
  localparam int PH_W   = $clog2(2 * N_CELLS)
) (
  input  logic [N_CELLS-1:0] state,
  output logic [PH_W-1:0]    phase,
  output logic               legal
);
  int ones;
  logic [N_CELLS-1:0] expect_state;

  always_comb begin
    ones = 0;
    for (int k = 0; k < N_CELLS; k++) ones += int'(state[k]);
    phase = state[N_CELLS-1] ? PH_W'(2 * N_CELLS - ones) : PH_W'(ones);
    for (int k = 0; k < N_CELLS; k++) begin
      if (int'(phase) <= N_CELLS) expect_state[k] = (k < int'(phase));
      else                        expect_state[k] = (k >= int'(phase) - N_CELLS);
    end
    legal = (expect_state == state);
  end
endmodule
