`timescale 1ps / 1fs
// readout_fpga: FPGA firmware that tests the TDC ASIC.  An AXI-Lite register
// file (axil_regs) configures the ASIC, sets the DAC (dac_spi) and starts
// three FSMs:
//   * start position finder (start_finder): finds the coarse clock shift and
//     5 ps fine-delay code at which the stop just follows START;
//   * scan and readout (scan_readout): steps the fine delay from there and
//     sends one AXI-Stream frame with position and TDC output per step;
//   * oscillator frequency (freq_counter, one per reference oscillator).
// Finder and scan share one measurement sequencer (meas_seq) and one stop
// pulse generator (stop_pulse_gen); whichever FSM is busy drives them (the
// finder wins if both are started together).  `stop` goes to the board delay
// chip, which adds `fine_code` * 5 ps and feeds STOP1 and STOP2 of the ASIC.
// All logic is in the clk domain; ASIC status pins are synchronized.
module readout_fpga #(
  parameter int N_CH = tdc_pkg::N_CH,
  parameter int AW   = readout_pkg::AXIL_AW
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // AXI-Lite slave
  input  logic [AW-1:0]             s_awaddr,
  input  logic                      s_awvalid,
  output logic                      s_awready,
  input  logic [31:0]               s_wdata,
  input  logic [3:0]                s_wstrb,
  input  logic                      s_wvalid,
  output logic                      s_wready,
  output logic [1:0]                s_bresp,
  output logic                      s_bvalid,
  input  logic                      s_bready,
  input  logic [AW-1:0]             s_araddr,
  input  logic                      s_arvalid,
  output logic                      s_arready,
  output logic [31:0]               s_rdata,
  output logic [1:0]                s_rresp,
  output logic                      s_rvalid,
  input  logic                      s_rready,
  // AXI-Stream master (scan frames)
  output logic [31:0]               m_axis_tdata,
  output logic                      m_axis_tvalid,
  input  logic                      m_axis_tready,
  output logic                      m_axis_tlast,
  // board: START image, STOP and fine delay code
  input  logic                      start_img,
  output logic                      stop,
  output logic [readout_pkg::F_W-1:0] fine_code,
  // DAC
  output logic                      dac_sclk,
  output logic                      dac_mosi,
  output logic                      dac_cs_n,
  // TDC ASIC
  output tdc_pkg::tdc_cfg_t         tdc_cfg,
  output logic                      tdc_arm,
  input  logic                      tdc_armed,
  input  logic [N_CH-1:0]           tdc_valid,
  input  tdc_pkg::tdc_result_t      tdc_result [N_CH],
  input  logic                      osc_fast_div,
  input  logic                      osc_slow_div
);
  import readout_pkg::*;
  import tdc_pkg::*;

  settings_t set_r;
  status_t   status;
  logic finder_go, scan_go, freq_go, dac_wr, dac_ch;
  logic [11:0] dac_code;
  logic start_rise, fire, stop_busy;
  logic ms_go, ms_busy, ms_done, ms_timeout;
  tdc_result_t ms_result [N_CH];
  logic f_go, f_busy, f_found, f_fail;
  logic [K_W-1:0] f_shift, s_shift, zero_k;
  logic [F_W-1:0] f_fine, s_fine, zero_fine;
  logic s_go, s_busy;
  logic ff_busy, fs_busy, ff_done, fs_done;
  logic [GATE_W-1:0] f_fast, f_slow;
  logic dac_busy;
  logic to_seen;
  tdc_result_t last;

  axil_regs #(.AW(AW)) u_regs (
    .clk(clk), .rst_n(rst_n),
    .s_awaddr(s_awaddr), .s_awvalid(s_awvalid), .s_awready(s_awready),
    .s_wdata(s_wdata), .s_wstrb(s_wstrb), .s_wvalid(s_wvalid), .s_wready(s_wready),
    .s_bresp(s_bresp), .s_bvalid(s_bvalid), .s_bready(s_bready),
    .s_araddr(s_araddr), .s_arvalid(s_arvalid), .s_arready(s_arready),
    .s_rdata(s_rdata), .s_rresp(s_rresp), .s_rvalid(s_rvalid), .s_rready(s_rready),
    .set_o(set_r), .status(status),
    .finder_go(finder_go), .scan_go(scan_go), .freq_go(freq_go),
    .dac_wr(dac_wr), .dac_ch(dac_ch), .dac_code(dac_code)
  );

  assign tdc_cfg = '{osc_en: set_r.osc_en, ss_en: set_r.ss_en,
                     trim_fast: set_r.trim_fast, trim_slow: set_r.trim_slow};

  stop_pulse_gen u_stop (
    .clk(clk), .rst_n(rst_n), .start_img(start_img), .fire(fire),
    .shift(f_busy ? f_shift : s_shift),
    .start_rise(start_rise), .stop(stop), .busy(stop_busy)
  );

  assign ms_go     = f_busy ? f_go : s_go;
  assign fine_code = f_busy ? f_fine : s_fine;

  meas_seq #(.N_CH(N_CH)) u_seq (
    .clk(clk), .rst_n(rst_n), .go(ms_go), .start_rise(start_rise),
    .stop_busy(stop_busy), .fire(fire), .tdc_arm(tdc_arm),
    .tdc_armed(tdc_armed), .tdc_valid(tdc_valid), .tdc_result(tdc_result),
    .busy(ms_busy), .done(ms_done), .timeout(ms_timeout), .result(ms_result)
  );

  start_finder #(.N_CH(N_CH)) u_finder (
    .clk(clk), .rst_n(rst_n), .go(finder_go), .ch_sel(set_r.ch_sel),
    .k_max(set_r.k_max), .meas_go(f_go), .meas_shift(f_shift), .fine_code(f_fine),
    .meas_done(ms_done), .meas_result(ms_result), .busy(f_busy),
    .found(f_found), .fail(f_fail), .zero_k(zero_k), .zero_fine(zero_fine)
  );

  scan_readout #(.N_CH(N_CH)) u_scan (
    .clk(clk), .rst_n(rst_n), .go(scan_go && !f_busy && !finder_go),
    .zero_k(zero_k), .zero_fine(zero_fine),
    .n_points(set_r.n_points), .step(set_r.step),
    .meas_go(s_go), .meas_shift(s_shift), .fine_code(s_fine),
    .meas_done(ms_done && !f_busy), .meas_result(ms_result),
    .m_axis_tdata(m_axis_tdata), .m_axis_tvalid(m_axis_tvalid),
    .m_axis_tready(m_axis_tready), .m_axis_tlast(m_axis_tlast), .busy(s_busy)
  );

  freq_counter u_ffast (
    .clk(clk), .rst_n(rst_n), .go(freq_go), .gate(set_r.gate), .osc(osc_fast_div),
    .count(f_fast), .busy(ff_busy), .done(ff_done)
  );
  freq_counter u_fslow (
    .clk(clk), .rst_n(rst_n), .go(freq_go), .gate(set_r.gate), .osc(osc_slow_div),
    .count(f_slow), .busy(fs_busy), .done(fs_done)
  );

  dac_spi u_dac (
    .clk(clk), .rst_n(rst_n), .wr(dac_wr), .ch(dac_ch), .code(dac_code),
    .sclk(dac_sclk), .mosi(dac_mosi), .cs_n(dac_cs_n), .busy(dac_busy)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       last <= '0;
    else if (ms_done) last <= ms_result[set_r.ch_sel];
  end

  // a measurement that timed out is reported until the next finder or scan go
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    to_seen <= 1'b0;
    else if (finder_go || scan_go) to_seen <= 1'b0;
    else if (ms_timeout)           to_seen <= 1'b1;
  end

  assign status = '{finder_busy: f_busy, found: f_found, fail: f_fail,
                    scan_busy: s_busy, freq_busy: ff_busy || fs_busy, dac_busy: dac_busy,
                    meas_timeout: to_seen,
                    zero_k: zero_k, zero_fine: zero_fine, f_fast: f_fast, f_slow: f_slow,
                    last: 32'(last)};
endmodule
