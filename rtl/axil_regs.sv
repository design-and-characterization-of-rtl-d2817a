`timescale 1ps / 1fs
// axil_regs: AXI-Lite slave holding the readout's memory-mapped registers
// (map in readout_pkg).  It configures the TDC (sliding scale, trims,
// oscillator enable), sets the DAC, starts the finder, scan and frequency
// FSMs, and reads their status, the zero position, the oscillator counts and
// the last result.  One write and one read are handled at a time: a write
// is taken when AWVALID and WVALID are both high and answered with BRESP
// OKAY one cycle later; a read answers one cycle after ARVALID.  WSTRB is
// ignored (full-word writes).  Unmapped addresses read 0.  The AXI-Lite bus
// and what it controls follow the design; the map is own choice.
module axil_regs #(
  parameter int AW = readout_pkg::AXIL_AW
) (
  input  logic                      clk,
  input  logic                      rst_n,
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
  output readout_pkg::settings_t    set_o,
  input  readout_pkg::status_t      status,
  output logic                      finder_go,
  output logic                      scan_go,
  output logic                      freq_go,
  output logic                      dac_wr,
  output logic                      dac_ch,
  output logic [11:0]               dac_code
);
  import readout_pkg::*;

  logic wr_fire, rd_fire;

  assign wr_fire   = s_awvalid && s_wvalid && !s_bvalid;
  assign s_awready = wr_fire;
  assign s_wready  = wr_fire;
  assign rd_fire   = s_arvalid && !s_rvalid;
  assign s_arready = rd_fire;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      set_o     <= '{ch_sel: 2'd0, ss_en: 1'b1, osc_en: 1'b0, trim_fast: 4'd8, trim_slow: 4'd8,
                     k_max: K_W'(40), n_points: 16'd16, step: F_W'(1), gate: GATE_W'(1000)};
      s_bvalid  <= 1'b0;
      finder_go <= 1'b0;
      scan_go   <= 1'b0;
      freq_go   <= 1'b0;
      dac_wr    <= 1'b0;
      dac_ch    <= 1'b0;
      dac_code  <= 12'd2048;
    end else begin
      finder_go <= 1'b0;
      scan_go   <= 1'b0;
      freq_go   <= 1'b0;
      dac_wr    <= 1'b0;
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (wr_fire) begin
        s_bvalid <= 1'b1;
        case (s_awaddr)
          A_CTRL: begin
            finder_go    <= s_wdata[0];
            scan_go      <= s_wdata[1];
            freq_go      <= s_wdata[2];
            set_o.ch_sel <= s_wdata[5:4];
            set_o.ss_en  <= s_wdata[8];
            set_o.osc_en <= s_wdata[9];
          end
          A_TRIM: begin
            set_o.trim_fast <= s_wdata[3:0];
            set_o.trim_slow <= s_wdata[7:4];
          end
          A_DAC: begin
            dac_code <= s_wdata[11:0];
            dac_ch   <= s_wdata[16];
            dac_wr   <= 1'b1;
          end
          A_KMAX: set_o.k_max <= s_wdata[K_W-1:0];
          A_SCAN: begin
            set_o.n_points <= s_wdata[15:0];
            set_o.step     <= s_wdata[16+F_W-1:16];
          end
          A_GATE: set_o.gate <= s_wdata[GATE_W-1:0];
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
    end else begin
      if (s_rvalid && s_rready) s_rvalid <= 1'b0;
      if (rd_fire) begin
        s_rvalid <= 1'b1;
        case (s_araddr)
          A_CTRL:   s_rdata <= {22'd0, set_o.osc_en, set_o.ss_en, 2'd0, set_o.ch_sel, 4'd0};
          A_TRIM:   s_rdata <= {24'd0, set_o.trim_slow, set_o.trim_fast};
          A_DAC:    s_rdata <= {15'd0, dac_ch, 4'd0, dac_code};
          A_KMAX:   s_rdata <= 32'(set_o.k_max);
          A_SCAN:   s_rdata <= {6'd0, set_o.step, set_o.n_points};
          A_GATE:   s_rdata <= 32'(set_o.gate);
          A_STATUS: s_rdata <= {25'd0, status.meas_timeout, status.dac_busy, status.freq_busy, status.scan_busy,
                                status.fail, status.found, status.finder_busy};
          A_ZERO:   s_rdata <= {6'd0, status.zero_fine, 8'd0, status.zero_k};
          A_FFAST:  s_rdata <= 32'(status.f_fast);
          A_FSLOW:  s_rdata <= 32'(status.f_slow);
          A_LAST:   s_rdata <= status.last;
          default:  s_rdata <= '0;
        endcase
      end
    end
  end

  // AXI-Lite: a response stays valid until it is accepted
  a_bhold: assert property (@(posedge clk) disable iff (!rst_n) s_bvalid && !s_bready |=> s_bvalid)
    else $error("axil_regs: BVALID dropped");
  a_rhold: assert property (@(posedge clk) disable iff (!rst_n) s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata))
    else $error("axil_regs: read data changed before RREADY");
endmodule
