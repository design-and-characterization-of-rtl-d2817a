`timescale 1ps / 1fs
// meas_seq: runs one test measurement cycle of the TDC ASIC for the FPGA
// FSMs (start position finder, scan).  Sequence after `go`:
//   1. wait for a START edge (start_rise) and pulse `tdc_arm`, so the ASIC
//      is preset while that START passes and waits for the next one;
//   2. wait until the synchronized `tdc_armed` is high;
//   3. `fire` the stop pulse generator, which puts STOP `shift` clk periods
//      after the next START edge;
//   4. wait until every channel reports valid, capture all results and pulse
//      `done`.  If that takes more than TIMEOUT cycles, `done` comes with
//      `timeout` high and the results marked as overflow.
// It requires the START period to exceed the arming latency (about 8 clk).
// ASIC status inputs pass two-flop synchronizers; the results are captured
// only once valid, when they are stable.  The sequence is own design: the
// original design only names the finder and scan FSMs and the stop pulse.
module meas_seq #(
  parameter int N_CH    = tdc_pkg::N_CH,
  parameter int K_W     = readout_pkg::K_W,
  parameter int TIMEOUT = 4096
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  go,
  input  logic                  start_rise,
  input  logic                  stop_busy,
  output logic                  fire,
  output logic                  tdc_arm,
  input  logic                  tdc_armed,
  input  logic [N_CH-1:0]       tdc_valid,
  input  tdc_pkg::tdc_result_t  tdc_result [N_CH],
  output logic                  busy,
  output logic                  done,
  output logic                  timeout,
  output tdc_pkg::tdc_result_t  result [N_CH]
);
  import tdc_pkg::*;

  typedef enum logic [2:0] {S_IDLE, S_E0, S_ARMWAIT, S_FIRE, S_VALID, S_GAP} state_e;
  state_e state;

  logic armed_s;
  logic [N_CH-1:0] valid_s;
  logic [$clog2(TIMEOUT+1)-1:0] tcnt;
  logic [1:0] guard;

  sync2 u_sa (.clk(clk), .rst_n(rst_n), .d(tdc_armed), .q(armed_s));
  for (genvar i = 0; i < N_CH; i++) begin : g_sv
    sync2 u_sv (.clk(clk), .rst_n(rst_n), .d(tdc_valid[i]), .q(valid_s[i]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      fire    <= 1'b0;
      tdc_arm <= 1'b0;
      done    <= 1'b0;
      timeout <= 1'b0;
      tcnt    <= '0;
      guard   <= '0;
      for (int i = 0; i < N_CH; i++) result[i] <= '0;
    end else begin
      fire    <= 1'b0;
      tdc_arm <= 1'b0;
      done    <= 1'b0;
      case (state)
        S_IDLE: if (go) begin
          state   <= S_E0;
          timeout <= 1'b0;
          tcnt    <= '0;
        end
        S_E0: if (start_rise) begin
          tdc_arm <= 1'b1;
          guard   <= '1;
          state   <= S_ARMWAIT;
        end
        S_ARMWAIT: begin
          // the synchronized armed flag lags the arm pulse: ignore it briefly
          if (guard != '0)  guard <= guard - 1'b1;
          else if (armed_s) state <= S_FIRE;
        end
        S_FIRE: begin
          fire  <= 1'b1;
          state <= S_VALID;
        end
        S_VALID: begin
          tcnt <= tcnt + 1'b1;
          if (&valid_s && !stop_busy) begin
            for (int i = 0; i < N_CH; i++) result[i] <= tdc_result[i];
            done  <= 1'b1;
            state <= S_GAP;
          end else if (int'(tcnt) == TIMEOUT) begin
            for (int i = 0; i < N_CH; i++) result[i] <= '{toa_ovf: 1'b1, toa: '0, tot_ovf: 1'b1, tot: '0};
            timeout <= 1'b1;
            done    <= 1'b1;
            state   <= S_GAP;
          end
        end
        S_GAP: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // a measurement is started only when idle
  property p_go_idle;
    @(posedge clk) disable iff (!rst_n) go |-> state == S_IDLE;
  endproperty
  a_go_idle: assert property (p_go_idle) else $error("meas_seq: go while busy");
endmodule
