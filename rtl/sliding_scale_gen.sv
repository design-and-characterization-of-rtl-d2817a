`timescale 1ps / 1fs
// sliding_scale_gen: chooses the starting phases of the three rings of one
// TDC channel for each measurement cycle (sliding-scale linearisation).
//
// A 32-bit Galois LFSR (polynomial x^32+x^22+x^2+x+1) advances once per
// `next` pulse; three 4-bit fields of it are the starting phases of the
// 50 ps ring, the slow ring and the fast ring of the 6.25 ps section.  The
// phases are also given as Johnson cell patterns for the set/reset inputs of
// the cells.  The channel subtracts the same phases from the conversion
// result, so every interval is converted by a different, random part of the
// rings.  With `en` low all phases are 0 (sliding scale off).
//
// Random starting conditions selected each cycle and subtracted from the
// result follow the design; the LFSR as random source and its seed are this
// design's own choice.  Timing: phases change one clk after `next`.
module sliding_scale_gen #(
  parameter logic [31:0] LFSR_SEED = 32'h1D87_2B41
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           next,
  input  logic                           en,
  output logic [tdc_pkg::PH_W-1:0]       ph_coarse,
  output logic [tdc_pkg::PH_W-1:0]       ph_slow,
  output logic [tdc_pkg::PH_W-1:0]       ph_fast,
  output logic [tdc_pkg::N_CELLS-1:0]    pat_coarse,
  output logic [tdc_pkg::N_CELLS-1:0]    pat_slow,
  output logic [tdc_pkg::N_CELLS-1:0]    pat_fast
);
  import tdc_pkg::*;

  logic [31:0] lfsr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    lfsr <= (LFSR_SEED == 32'd0) ? 32'd1 : LFSR_SEED;
    else if (next) lfsr <= {1'b0, lfsr[31:1]} ^ (lfsr[0] ? 32'h8020_0003 : 32'd0);
  end

  assign ph_coarse  = en ? lfsr[3:0]   : '0;
  assign ph_slow    = en ? lfsr[11:8]  : '0;
  assign ph_fast    = en ? lfsr[19:16] : '0;
  assign pat_coarse = johnson_encode(ph_coarse);
  assign pat_slow   = johnson_encode(ph_slow);
  assign pat_fast   = johnson_encode(ph_fast);
endmodule
