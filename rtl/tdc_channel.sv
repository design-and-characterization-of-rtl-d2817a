`timescale 1ps / 1fs
// tdc_channel: one channel of the TDC ASIC.  It holds the three rings, the
// 50 ps section (START-STOP1, time over threshold) and the 6.25 ps 2D
// Vernier section (START-STOP2, time of arrival), the sliding-scale
// generator and a small controller in the clk domain.
//
// Measurement cycle: an `arm` pulse advances the sliding-scale LFSR and
// enters PRESET, where both sections are cleared and every ring is forced to
// its new random starting phase for PRESET_CYC cycles.  Then `armed` is high
// and the channel waits for START and the two stops, which are asynchronous.
// When both sections are done (their done flags pass a two-flop
// synchronizer) the results are registered and `valid` rises; it stays high
// until the next `arm`.  Latency: PRESET_CYC+1 cycles from `arm` to `armed`,
// and 3 to 4 cycles from the later of the two conversions ending to `valid`.
// An `arm` during a cycle aborts it.  An asynchronous reset presets all rings.
//
// The two sections, the ring delays, the shared START and the starting
// phases subtracted from the results follow the design.  The controller, its
// cycle counts and the result format are own choices.  The rings are
// behavioural models (ring_osc); everything else here is synthesizable.
module tdc_channel #(
  parameter logic [31:0] SEED        = 32'h1D87_2B41,
  parameter real         T_FAST_PS   = 50.0,
  parameter real         T_SLOW_PS   = 56.25,
  parameter real         MISMATCH_PS = 0.0,
  parameter int          PRESET_CYC  = 2
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          arm,
  input  tdc_pkg::tdc_cfg_t             cfg,
  input  logic [tdc_pkg::VCTRL_W-1:0]   vctrl_fast,
  input  logic [tdc_pkg::VCTRL_W-1:0]   vctrl_slow,
  input  logic                          start,
  input  logic                          stop1,
  input  logic                          stop2,
  output logic                          armed,
  output logic                          valid,
  output logic                          state_err,
  output tdc_pkg::tdc_result_t          result
);
  import tdc_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_PRESET, S_RUN} state_e;
  state_e state;

  logic [$clog2(PRESET_CYC+1)-1:0] pcnt;
  logic clr;
  logic [PH_W-1:0]    ph_c, ph_s, ph_f;
  logic [N_CELLS-1:0] pat_c, pat_s, pat_f;
  logic [N_CELLS-1:0] st_c, st_s, st_f;
  logic en_c, en_s, en_f;
  logic done_c, done_f, ovf_c, ovf_f, err_c, err_f;
  logic [TOT_W-1:0] code_c;
  logic [TOA_W-1:0] code_f;
  logic [1:0] done_sync;

  assign clr = (state == S_PRESET) || !rst_n;

  sliding_scale_gen #(.LFSR_SEED(SEED)) u_ss (
    .clk(clk), .rst_n(rst_n), .next(arm), .en(cfg.ss_en),
    .ph_coarse(ph_c), .ph_slow(ph_s), .ph_fast(ph_f),
    .pat_coarse(pat_c), .pat_slow(pat_s), .pat_fast(pat_f)
  );

  ring_osc #(.T_NOM_PS(T_FAST_PS), .MISMATCH_PS(MISMATCH_PS)) u_ring_c (
    .en(en_c), .preset(clr), .preset_state(pat_c),
    .vctrl(vctrl_fast), .trim(cfg.trim_fast), .state(st_c)
  );
  ring_osc #(.T_NOM_PS(T_SLOW_PS), .MISMATCH_PS(MISMATCH_PS)) u_ring_s (
    .en(en_s), .preset(clr), .preset_state(pat_s),
    .vctrl(vctrl_slow), .trim(cfg.trim_slow), .state(st_s)
  );
  ring_osc #(.T_NOM_PS(T_FAST_PS), .MISMATCH_PS(-MISMATCH_PS)) u_ring_f (
    .en(en_f), .preset(clr), .preset_state(pat_f),
    .vctrl(vctrl_fast), .trim(cfg.trim_fast), .state(st_f)
  );

  coarse_tdc u_coarse (
    .clr(clr), .start(start), .stop(stop1), .ring_state(st_c), .ph0(ph_c),
    .ring_en(en_c), .done(done_c), .ovf(ovf_c), .state_err(err_c), .code(code_c)
  );

  vernier_fine_tdc u_fine (
    .clr(clr), .start(start), .stop(stop2), .slow_state(st_s), .fast_state(st_f),
    .ph0_slow(ph_s), .ph0_fast(ph_f), .slow_en(en_s), .fast_en(en_f),
    .done(done_f), .ovf(ovf_f), .state_err(err_f), .code(code_f)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) done_sync <= '0;
    else        done_sync <= {done_sync[0], done_c && done_f && state == S_RUN};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      pcnt      <= '0;
      armed     <= 1'b0;
      valid     <= 1'b0;
      state_err <= 1'b0;
      result    <= '0;
    end else if (arm) begin
      state <= S_PRESET;
      pcnt  <= '0;
      armed <= 1'b0;
      valid <= 1'b0;
    end else begin
      case (state)
        S_PRESET: begin
          pcnt <= pcnt + 1'b1;
          if (int'(pcnt) == PRESET_CYC - 1) begin
            state <= S_RUN;
            armed <= 1'b1;
          end
        end
        S_RUN: if (done_sync[1]) begin
          state          <= S_IDLE;
          armed          <= 1'b0;
          valid          <= 1'b1;
          state_err      <= err_c || err_f;
          result.tot     <= ovf_c ? '0 : code_c;
          result.tot_ovf <= ovf_c;
          result.toa     <= ovf_f ? '0 : code_f;
          result.toa_ovf <= ovf_f;
        end
        default: ;
      endcase
    end
  end
endmodule
