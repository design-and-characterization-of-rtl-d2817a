`timescale 1ps / 1fs
// tdc_asic: the 28 nm TDC prototype: N_CH channels sharing a common START
// and a common STOP1, each with its own STOP2, plus the fast and slow
// reference oscillators used to set the cell delays.
//
// Every channel measures START-STOP1 with 50 ps steps (time over threshold)
// and START-STOP2 with 6.25 ps steps (time of arrival); see tdc_channel.
// `arm` starts a measurement cycle in all channels at once; `armed` is high
// when all of them wait for START, `valid[i]` when channel i has a result.
// Control voltages arrive as the codes of the board DAC that drives them.
// The channel count and the shared/separate inputs follow the design.  The
// synchronous readout interface (clk, arm, armed, valid, result) and the
// static configuration word are own choices.  Each channel gets its own LFSR
// seed so their sliding scales are independent.
module tdc_asic #(
  parameter int  N_CH        = tdc_pkg::N_CH,
  parameter real MISMATCH_PS = 0.0
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  tdc_pkg::tdc_cfg_t             cfg,
  input  logic [tdc_pkg::VCTRL_W-1:0]   vctrl_fast,
  input  logic [tdc_pkg::VCTRL_W-1:0]   vctrl_slow,
  input  logic                          arm,
  input  logic                          start,
  input  logic                          stop1,
  input  logic [N_CH-1:0]               stop2,
  output logic                          armed,
  output logic [N_CH-1:0]               valid,
  output logic [N_CH-1:0]               state_err,
  output tdc_pkg::tdc_result_t          result [N_CH],
  output logic                          osc_fast_div,
  output logic                          osc_slow_div
);
  import tdc_pkg::*;

  logic [N_CH-1:0] ch_armed;

  for (genvar i = 0; i < N_CH; i++) begin : g_ch
    tdc_channel #(
      .SEED(32'h1D87_2B41 ^ (32'h9E37_79B9 * (i + 1))),
      .MISMATCH_PS(MISMATCH_PS)
    ) u_ch (
      .clk(clk), .rst_n(rst_n), .arm(arm), .cfg(cfg),
      .vctrl_fast(vctrl_fast), .vctrl_slow(vctrl_slow),
      .start(start), .stop1(stop1), .stop2(stop2[i]),
      .armed(ch_armed[i]), .valid(valid[i]), .state_err(state_err[i]),
      .result(result[i])
    );
  end

  assign armed = &ch_armed;

  ref_osc #(.T_NOM_PS(50.0)) u_osc_fast (
    .en(cfg.osc_en), .vctrl(vctrl_fast), .trim(cfg.trim_fast), .div_out(osc_fast_div)
  );
  ref_osc #(.T_NOM_PS(56.25)) u_osc_slow (
    .en(cfg.osc_en), .vctrl(vctrl_slow), .trim(cfg.trim_slow), .div_out(osc_slow_div)
  );
endmodule
