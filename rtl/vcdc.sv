`timescale 1ps / 1fs
// vcdc: behavioural model of the voltage-controlled delay cell.  It is not
// synthesizable: the real cell is a current-starved differential cascode
// voltage switch logic (DCVSL) stage, drawn at transistor level.
//
// The output follows the input after one propagation delay while `en` is
// high; with `en` low the cell holds.  `set` and `rst` force the output at
// once and take priority; the ring uses them to preset its starting state.
// out_p/out_n are the two buffered outputs that drive the state-sampling
// registers.
//
// Delay = T_NOM_PS + MISMATCH_PS - KV_PS_PER_LSB*(vctrl-2048)
//                                - TRIM_PS_PER_LSB*(trim-8)
// The nominal delays (50 ps fast, 56.25 ps slow) follow the design; the
// control-voltage and trim slopes are this model's own choice, with the
// control voltage represented by the code of the board DAC driving it.
module vcdc #(
  parameter real T_NOM_PS        = 50.0,
  parameter real MISMATCH_PS     = 0.0,
  parameter real KV_PS_PER_LSB   = 0.005,
  parameter real TRIM_PS_PER_LSB = 0.5
) (
  input  logic                      in_p,
  input  logic                      en,
  input  logic                      set,
  input  logic                      rst,
  input  logic [tdc_pkg::VCTRL_W-1:0] vctrl,
  input  logic [tdc_pkg::TRIM_W-1:0]  trim,
  output logic                      out_p,
  output logic                      out_n
);
  real d_ps;

  always_comb
    d_ps = T_NOM_PS + MISMATCH_PS
         - KV_PS_PER_LSB   * (real'(vctrl) - 2048.0)
         - TRIM_PS_PER_LSB * (real'(trim)  - 8.0);

  initial out_p = 1'b0;

  always @(in_p or en or set or rst) begin
    if (set)                       out_p = 1'b1;
    else if (rst)                  out_p = 1'b0;
    else if (en && in_p != out_p)  out_p <= #(d_ps) in_p;
  end

  assign out_n = ~out_p;
endmodule
