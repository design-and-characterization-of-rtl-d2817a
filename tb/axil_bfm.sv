`timescale 1ps / 1fs
// axil_bfm: AXI-Lite master for testbenches.  write() and read() run one
// transfer each, with address and data presented together and the response
// accepted on the cycle it appears.
module axil_bfm #(
  parameter int AW = 8
) (
  input  logic          clk,
  output logic [AW-1:0] awaddr,
  output logic          awvalid,
  input  logic          awready,
  output logic [31:0]   wdata,
  output logic [3:0]    wstrb,
  output logic          wvalid,
  input  logic          wready,
  input  logic [1:0]    bresp,
  input  logic          bvalid,
  output logic          bready,
  output logic [AW-1:0] araddr,
  output logic          arvalid,
  input  logic          arready,
  input  logic [31:0]   rdata,
  input  logic [1:0]    rresp,
  input  logic          rvalid,
  output logic          rready
);
  initial begin
    awaddr = '0; awvalid = 1'b0; wdata = '0; wstrb = 4'hF; wvalid = 1'b0; bready = 1'b0;
    araddr = '0; arvalid = 1'b0; rready = 1'b0;
  end

  task automatic write(input logic [AW-1:0] a, input logic [31:0] d);
    @(negedge clk);
    awaddr = a; wdata = d; awvalid = 1'b1; wvalid = 1'b1; bready = 1'b1;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk) awvalid = 1'b0; wvalid = 1'b0;
    while (!bvalid) @(negedge clk);
    @(negedge clk) bready = 1'b0;
  endtask

  task automatic read(input logic [AW-1:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1'b1; rready = 1'b1;
    do @(posedge clk); while (!arready);
    @(negedge clk) arvalid = 1'b0;
    while (!rvalid) @(negedge clk);
    d = rdata;
    @(negedge clk) rready = 1'b0;
  endtask
endmodule
