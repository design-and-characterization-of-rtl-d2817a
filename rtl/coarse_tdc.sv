`timescale 1ps / 1fs
// coarse_tdc: the 50 ps section of a channel (START to STOP1, used for the
// time over threshold).  Digital part only; the ring is a separate block.
//
// While `clr` is high the section is cleared and the ring is preset.  The
// first START edge afterwards enables the ring; a revolution counter clocked
// by the falling edge of the last cell counts its wraps.  The first STOP1
// edge after START samples the ring state and the counter and stops the
// ring.  Interval = 16*revolutions + phase - starting phase, in cell delays
// (50 ps).  If the counter would pass its maximum before STOP1 arrives the
// ring stops and `ovf` is set; a STOP1 before START is ignored, so it ends
// as an overflow too.  `done` rises when either has happened; code/ovf are
// stable from then until the next `clr`.  `state_err` flags a sampled
// state that is not a legal ring state.
//
// The ring started by START and read by STOP1 at 50 ps resolution follows
// the design; the counter width and the overflow rule are own choices.
module coarse_tdc #(
  parameter int N_CELLS  = tdc_pkg::N_CELLS,
  parameter int REV_BITS = tdc_pkg::TOT_REV_BITS,
  localparam int PH_W    = $clog2(2 * N_CELLS),
  localparam int CODE_W  = REV_BITS + PH_W
) (
  input  logic                clr,
  input  logic                start,
  input  logic                stop,
  input  logic [N_CELLS-1:0]  ring_state,
  input  logic [PH_W-1:0]     ph0,
  output logic                ring_en,
  output logic                done,
  output logic                ovf,
  output logic                state_err,
  output logic [CODE_W-1:0]   code
);
  logic                start_seen;
  logic                ovf_raw;
  logic                cap_valid;
  logic [REV_BITS-1:0] rev;
  logic [REV_BITS-1:0] cap_rev;
  logic [N_CELLS-1:0]  cap_state;
  logic [PH_W-1:0]     cap_phase;
  logic                cap_legal;

  always_ff @(posedge start or posedge clr) begin
    if (clr) start_seen <= 1'b0;
    else     start_seen <= 1'b1;
  end

  // revolution counter, one count per ring wrap (phase 2N-1 -> 0)
  always_ff @(negedge ring_state[N_CELLS-1] or posedge clr) begin
    if (clr) begin
      rev     <= '0;
      ovf_raw <= 1'b0;
    end else if (rev == '1) begin
      ovf_raw <= 1'b1;
    end else begin
      rev <= rev + 1'b1;
    end
  end

  always_ff @(posedge stop or posedge clr) begin
    if (clr) begin
      cap_valid <= 1'b0;
      cap_rev   <= '0;
      cap_state <= '0;
    end else if (start_seen && !cap_valid && !ovf) begin
      cap_valid <= 1'b1;
      cap_rev   <= rev;
      cap_state <= ring_state;
    end
  end

  johnson_decoder #(.N_CELLS(N_CELLS)) u_dec (
    .state(cap_state), .phase(cap_phase), .legal(cap_legal)
  );

  // a transition already under way when STOP1 stopped the ring may still
  // wrap the counter: that is not an overflow
  assign ovf     = ovf_raw && !cap_valid;
  assign ring_en = start_seen && !cap_valid && !ovf;
  assign done    = cap_valid || ovf;
  assign state_err = cap_valid && !cap_legal;
  assign code    = {cap_rev, cap_phase} - CODE_W'(ph0);
endmodule
