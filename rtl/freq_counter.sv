`timescale 1ps / 1fs
// freq_counter: measures the frequency of a divided reference-oscillator
// output of the ASIC.  After `go` it counts the rising edges of `osc`
// (through a two-flop synchronizer) during `gate` clk cycles, then holds the
// count in `count` and pulses `done`.  f_osc_div = count / (gate * T_clk).
// The input must be slower than clk/2.  Reading the oscillator frequency
// follows the design; the gated counter is own choice.
module freq_counter #(
  parameter int GATE_W = readout_pkg::GATE_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              go,
  input  logic [GATE_W-1:0] gate,
  input  logic              osc,
  output logic [GATE_W-1:0] count,
  output logic              busy,
  output logic              done
);
  logic s_osc, s_osc_d;
  logic [GATE_W-1:0] gcnt, ecnt;

  sync2 u_sync (.clk(clk), .rst_n(rst_n), .d(osc), .q(s_osc));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_osc_d <= 1'b0;
      busy    <= 1'b0;
      done    <= 1'b0;
      gcnt    <= '0;
      ecnt    <= '0;
      count   <= '0;
    end else begin
      s_osc_d <= s_osc;
      done    <= 1'b0;
      if (!busy) begin
        if (go && gate != '0) begin
          busy <= 1'b1;
          gcnt <= gate;
          ecnt <= '0;
        end
      end else begin
        if (s_osc && !s_osc_d) ecnt <= ecnt + 1'b1;
        gcnt <= gcnt - 1'b1;
        if (gcnt == GATE_W'(1)) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          count <= ecnt + GATE_W'(s_osc && !s_osc_d);
        end
      end
    end
  end
endmodule
