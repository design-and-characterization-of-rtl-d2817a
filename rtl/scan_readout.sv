`timescale 1ps / 1fs
// scan_readout: sweeps the stop delay from the zero position found by
// start_finder and streams the results.  Point p puts the stop at
// zero + p*step fine-delay codes (5 ps each); the code wraps into the coarse
// clk-period shift every FINE_PER_CLK codes.  For each point one meas_seq
// cycle runs, then an AXI-Stream frame of 1+N_CH 32-bit beats is sent:
//   beat 0     : position p*step, in 5 ps steps
//   beat 1+i   : {channel i in [31:30], 5'b0, tdc_result_t of channel i}
// with tlast on the last beat.  tvalid holds until tready (AXI-Stream rules).
// Stepping the fine delay and a frame with position and TDC output follow the
// design; the frame layout is own choice.  `step` must be below FINE_PER_CLK.
module scan_readout #(
  parameter int N_CH         = tdc_pkg::N_CH,
  parameter int K_W          = readout_pkg::K_W,
  parameter int F_W          = readout_pkg::F_W,
  parameter int FINE_PER_CLK = readout_pkg::FINE_PER_CLK
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  go,
  input  logic [K_W-1:0]        zero_k,
  input  logic [F_W-1:0]        zero_fine,
  input  logic [15:0]           n_points,
  input  logic [F_W-1:0]        step,
  output logic                  meas_go,
  output logic [K_W-1:0]        meas_shift,
  output logic [F_W-1:0]        fine_code,
  input  logic                  meas_done,
  input  tdc_pkg::tdc_result_t  meas_result [N_CH],
  output logic [31:0]           m_axis_tdata,
  output logic                  m_axis_tvalid,
  input  logic                  m_axis_tready,
  output logic                  m_axis_tlast,
  output logic                  busy
);
  typedef enum logic [1:0] {S_IDLE, S_MEAS, S_WAIT, S_SEND} state_e;
  state_e state;

  logic [15:0] p;
  logic [31:0] pos;
  logic [$clog2(N_CH+1)-1:0] beat;
  tdc_pkg::tdc_result_t res [N_CH];
  logic [F_W:0] fsum;

  assign fsum = {1'b0, fine_code} + {1'b0, step};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      meas_go       <= 1'b0;
      meas_shift    <= '0;
      fine_code     <= '0;
      p             <= '0;
      pos           <= '0;
      beat          <= '0;
      m_axis_tvalid <= 1'b0;
      m_axis_tlast  <= 1'b0;
      m_axis_tdata  <= '0;
      for (int i = 0; i < N_CH; i++) res[i] <= '0;
    end else begin
      meas_go <= 1'b0;
      case (state)
        S_IDLE: if (go && n_points != '0) begin
          p          <= '0;
          pos        <= '0;
          meas_shift <= zero_k;
          fine_code  <= zero_fine;
          state      <= S_MEAS;
        end
        S_MEAS: begin
          meas_go <= 1'b1;
          state   <= S_WAIT;
        end
        S_WAIT: if (meas_done) begin
          for (int i = 0; i < N_CH; i++) res[i] <= meas_result[i];
          m_axis_tdata  <= pos;
          m_axis_tvalid <= 1'b1;
          m_axis_tlast  <= 1'b0;
          beat          <= '0;
          state         <= S_SEND;
        end
        S_SEND: if (m_axis_tready) begin
          if (int'(beat) == N_CH) begin
            m_axis_tvalid <= 1'b0;
            m_axis_tlast  <= 1'b0;
            p   <= p + 1'b1;
            pos <= pos + 32'(step);
            if (int'(fsum) >= FINE_PER_CLK) begin
              fine_code  <= F_W'(int'(fsum) - FINE_PER_CLK);
              meas_shift <= meas_shift + 1'b1;
            end else begin
              fine_code  <= F_W'(fsum);
            end
            state <= (p + 1'b1 == n_points) ? S_IDLE : S_MEAS;
          end else begin
            m_axis_tdata <= {2'(beat), (30 - $bits(tdc_pkg::tdc_result_t))'(0), res[$clog2(N_CH)'(beat)]};
            m_axis_tlast <= (int'(beat) == N_CH - 1);
            beat         <= beat + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // AXI-Stream: data held stable while valid and not ready
  property p_axis_hold;
    @(posedge clk) disable iff (!rst_n)
      m_axis_tvalid && !m_axis_tready |=> m_axis_tvalid && $stable(m_axis_tdata) && $stable(m_axis_tlast);
  endproperty
  a_axis_hold: assert property (p_axis_hold) else $error("scan_readout: AXI-Stream beat changed before tready");
endmodule
