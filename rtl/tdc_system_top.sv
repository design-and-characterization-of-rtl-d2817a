`timescale 1ps / 1fs
// tdc_system_top: the TDC ASIC and its FPGA readout as on the test board.
// The parts between them that are bought, not designed - the PLL that makes
// START and its image for the FPGA, the programmable delay chip that turns
// the FPGA's STOP and fine-delay code into STOP1/STOP2, and the DAC that
// makes the control voltages - are outside; their pins are ports here:
//   start       PLL output to the ASIC START input
//   start_img   PLL output to the FPGA (fixed phase to clk)
//   stop_out, fine_code   FPGA to delay chip
//   stop1, stop2          delay chip to the ASIC
//   dac_*                 FPGA to DAC;  vctrl_fast/slow  DAC to the ASIC
// The ASIC's synchronous interface runs on the FPGA clock `clk`.
module tdc_system_top #(
  parameter int N_CH = tdc_pkg::N_CH
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [readout_pkg::AXIL_AW-1:0] s_awaddr,
  input  logic                        s_awvalid,
  output logic                        s_awready,
  input  logic [31:0]                 s_wdata,
  input  logic [3:0]                  s_wstrb,
  input  logic                        s_wvalid,
  output logic                        s_wready,
  output logic [1:0]                  s_bresp,
  output logic                        s_bvalid,
  input  logic                        s_bready,
  input  logic [readout_pkg::AXIL_AW-1:0] s_araddr,
  input  logic                        s_arvalid,
  output logic                        s_arready,
  output logic [31:0]                 s_rdata,
  output logic [1:0]                  s_rresp,
  output logic                        s_rvalid,
  input  logic                        s_rready,
  output logic [31:0]                 m_axis_tdata,
  output logic                        m_axis_tvalid,
  input  logic                        m_axis_tready,
  output logic                        m_axis_tlast,
  input  logic                        start,
  input  logic                        start_img,
  output logic                        stop_out,
  output logic [readout_pkg::F_W-1:0] fine_code,
  input  logic                        stop1,
  input  logic [N_CH-1:0]             stop2,
  output logic                        dac_sclk,
  output logic                        dac_mosi,
  output logic                        dac_cs_n,
  input  logic [tdc_pkg::VCTRL_W-1:0] vctrl_fast,
  input  logic [tdc_pkg::VCTRL_W-1:0] vctrl_slow,
  output logic [N_CH-1:0]             tdc_state_err
);
  import tdc_pkg::*;

  tdc_cfg_t    cfg;
  logic        arm, armed;
  logic [N_CH-1:0] valid;
  tdc_result_t result [N_CH];
  logic        osc_fast_div, osc_slow_div;

  tdc_asic #(.N_CH(N_CH)) u_asic (
    .clk(clk), .rst_n(rst_n), .cfg(cfg),
    .vctrl_fast(vctrl_fast), .vctrl_slow(vctrl_slow),
    .arm(arm), .start(start), .stop1(stop1), .stop2(stop2),
    .armed(armed), .valid(valid), .state_err(tdc_state_err), .result(result),
    .osc_fast_div(osc_fast_div), .osc_slow_div(osc_slow_div)
  );

  readout_fpga #(.N_CH(N_CH)) u_fpga (
    .clk(clk), .rst_n(rst_n),
    .s_awaddr(s_awaddr), .s_awvalid(s_awvalid), .s_awready(s_awready),
    .s_wdata(s_wdata), .s_wstrb(s_wstrb), .s_wvalid(s_wvalid), .s_wready(s_wready),
    .s_bresp(s_bresp), .s_bvalid(s_bvalid), .s_bready(s_bready),
    .s_araddr(s_araddr), .s_arvalid(s_arvalid), .s_arready(s_arready),
    .s_rdata(s_rdata), .s_rresp(s_rresp), .s_rvalid(s_rvalid), .s_rready(s_rready),
    .m_axis_tdata(m_axis_tdata), .m_axis_tvalid(m_axis_tvalid),
    .m_axis_tready(m_axis_tready), .m_axis_tlast(m_axis_tlast),
    .start_img(start_img), .stop(stop_out), .fine_code(fine_code),
    .dac_sclk(dac_sclk), .dac_mosi(dac_mosi), .dac_cs_n(dac_cs_n),
    .tdc_cfg(cfg), .tdc_arm(arm), .tdc_armed(armed), .tdc_valid(valid),
    .tdc_result(result), .osc_fast_div(osc_fast_div), .osc_slow_div(osc_slow_div)
  );
endmodule
