`timescale 1ps / 1fs
// sync2: two-flop synchronizer for a single-bit level from another clock
// domain (or an asynchronous pin).  Output lags by two clk edges.
module sync2 (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic meta;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {q, meta} <= 2'b00;
    else        {q, meta} <= {meta, d};
  end
endmodule
