`timescale 1ps / 1fs
// start_finder: finds the stop delay at which STOP2 of the selected channel
// just follows START, the zero of the scan.  Coarse pass: the stop is shifted
// by k = 0, 1, ... clk periods until a measurement gives a time of arrival
// that is not an overflow (a STOP before START overflows).  Fine pass: with
// the shift one period back (k0-1), the external delay chip's code (5 ps
// steps) is raised until the result is not an overflow again.  That
// (shift, code) pair is the zero position, 5 ps accurate.  If no k up to
// k_max gives a result, `fail` is set.  If k0 is 0 the zero is (0, 0).
// The search for the first non-overflow value and the clock-period and 5 ps
// steps follow the design; the two-pass order is own choice.  Each step
// runs one meas_seq cycle through the meas_* handshake.
module start_finder #(
  parameter int N_CH         = tdc_pkg::N_CH,
  parameter int K_W          = readout_pkg::K_W,
  parameter int F_W          = readout_pkg::F_W,
  parameter int FINE_PER_CLK = readout_pkg::FINE_PER_CLK
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  go,
  input  logic [1:0]            ch_sel,
  input  logic [K_W-1:0]        k_max,
  output logic                  meas_go,
  output logic [K_W-1:0]        meas_shift,
  output logic [F_W-1:0]        fine_code,
  input  logic                  meas_done,
  input  tdc_pkg::tdc_result_t  meas_result [N_CH],
  output logic                  busy,
  output logic                  found,
  output logic                  fail,
  output logic [K_W-1:0]        zero_k,
  output logic [F_W-1:0]        zero_fine
);
  typedef enum logic [2:0] {S_IDLE, S_CMEAS, S_CWAIT, S_FMEAS, S_FWAIT} state_e;
  state_e state;
  logic ovf;

  assign ovf = meas_result[ch_sel].toa_ovf;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      meas_go    <= 1'b0;
      meas_shift <= '0;
      fine_code  <= '0;
      found      <= 1'b0;
      fail       <= 1'b0;
      zero_k     <= '0;
      zero_fine  <= '0;
    end else begin
      meas_go <= 1'b0;
      case (state)
        S_IDLE: if (go) begin
          found      <= 1'b0;
          fail       <= 1'b0;
          meas_shift <= '0;
          fine_code  <= '0;
          state      <= S_CMEAS;
        end
        S_CMEAS: begin
          meas_go <= 1'b1;
          state   <= S_CWAIT;
        end
        S_CWAIT: if (meas_done) begin
          if (!ovf) begin
            if (meas_shift == '0) begin
              zero_k    <= '0;
              zero_fine <= '0;
              found     <= 1'b1;
              state     <= S_IDLE;
            end else begin
              meas_shift <= meas_shift - 1'b1;
              fine_code  <= '0;
              state      <= S_FMEAS;
            end
          end else if (meas_shift == k_max) begin
            fail  <= 1'b1;
            state <= S_IDLE;
          end else begin
            meas_shift <= meas_shift + 1'b1;
            state      <= S_CMEAS;
          end
        end
        S_FMEAS: begin
          meas_go <= 1'b1;
          state   <= S_FWAIT;
        end
        S_FWAIT: if (meas_done) begin
          if (!ovf) begin
            zero_k    <= meas_shift;
            zero_fine <= fine_code;
            found     <= 1'b1;
            fine_code <= '0;
            state     <= S_IDLE;
          end else if (int'(fine_code) == FINE_PER_CLK - 1) begin
            // the whole period overflowed: the coarse point is the zero
            zero_k    <= meas_shift + 1'b1;
            zero_fine <= '0;
            found     <= 1'b1;
            fine_code <= '0;
            state     <= S_IDLE;
          end else begin
            fine_code <= fine_code + 1'b1;
            state     <= S_FMEAS;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule
