`timescale 1ps / 1fs
// stop_pulse_gen: makes the STOP pulse of a test measurement in step with
// START.  The START image from the board PLL has a fixed phase to clk; it
// passes a two-flop synchronizer and an edge detector (`start_rise`, also
// used by the measurement sequencer).  After `fire`, the next START edge
// starts a count of `shift` clk periods, then `stop` is high for WIDTH_CYC
// cycles.  Timing: stop rises 3 + shift clk edges after the START image
// rises (2 synchronizer flops, 1 output flop), so each `shift` step moves the
// stop by one clk period; finer steps come from the external delay chip.
// Shifting the stop by clock periods follows the design; the pulse width and
// the register stages are own choices.
module stop_pulse_gen #(
  parameter int K_W       = readout_pkg::K_W,
  parameter int WIDTH_CYC = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start_img,
  input  logic           fire,
  input  logic [K_W-1:0] shift,
  output logic           start_rise,
  output logic           stop,
  output logic           busy
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_SHIFT, S_PULSE} state_e;
  state_e state;
  logic s_img, s_img_d;
  logic [K_W-1:0] cnt;

  sync2 u_sync (.clk(clk), .rst_n(rst_n), .d(start_img), .q(s_img));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s_img_d <= 1'b0;
    else        s_img_d <= s_img;
  end
  assign start_rise = s_img && !s_img_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      stop  <= 1'b0;
    end else begin
      case (state)
        S_IDLE:  if (fire) state <= S_WAIT;
        S_WAIT:  if (start_rise) begin
                   if (shift == '0) begin
                     stop  <= 1'b1;
                     cnt   <= K_W'(WIDTH_CYC - 1);
                     state <= S_PULSE;
                   end else begin
                     cnt   <= shift - 1'b1;
                     state <= S_SHIFT;
                   end
                 end
        S_SHIFT: if (cnt == '0) begin
                   stop  <= 1'b1;
                   cnt   <= K_W'(WIDTH_CYC - 1);
                   state <= S_PULSE;
                 end else begin
                   cnt <= cnt - 1'b1;
                 end
        S_PULSE: if (cnt == '0) begin
                   stop  <= 1'b0;
                   state <= S_IDLE;
                 end else begin
                   cnt <= cnt - 1'b1;
                 end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule
