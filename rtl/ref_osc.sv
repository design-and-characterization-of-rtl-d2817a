`timescale 1ps / 1fs
// ref_osc: one of the free-running reference oscillators of the ASIC (a
// fast one with 50 ps cells and a slow one with 56.25 ps cells).  They use
// the same delay cells and the same control voltage as the TDC rings, so
// measuring their frequency tells how the control voltage sets the cell
// delay.  Behavioural model: the ring inside is ring_osc.
//
// With `en` low the ring is held in phase 0; with `en` high it runs, with a
// period of 2*N_CELLS cell delays (800 ps fast, 900 ps slow at nominal).  A
// DIV_BITS counter clocked once per revolution divides it down so that
// `div_out` can be counted by the readout: f_div = 1 / (2^DIV_BITS *
// 2*N_CELLS * cell delay).  The divider and its ratio are own choices.
module ref_osc #(
  parameter real T_NOM_PS = 50.0,
  parameter int  DIV_BITS = 6
) (
  input  logic                        en,
  input  logic [tdc_pkg::VCTRL_W-1:0] vctrl,
  input  logic [tdc_pkg::TRIM_W-1:0]  trim,
  output logic                        div_out
);
  import tdc_pkg::*;

  logic [N_CELLS-1:0]  st;
  logic [DIV_BITS-1:0] cnt;

  ring_osc #(.T_NOM_PS(T_NOM_PS)) u_ring (
    .en(en), .preset(!en), .preset_state('0),
    .vctrl(vctrl), .trim(trim), .state(st)
  );

  always_ff @(negedge st[N_CELLS-1] or negedge en) begin
    if (!en) cnt <= '0;
    else     cnt <= cnt + 1'b1;
  end

  assign div_out = cnt[DIV_BITS-1];
endmodule
