`timescale 1ps / 1fs
// axil_regs_tb: AXI-Lite master tasks write and read every register; the
// checks cover reset values, write/read-back of the settings, the one-cycle
// go pulses and DAC write strobe, status fields read from the inputs, reads
// of unmapped addresses, and responses held under a slow master.
module axil_regs_tb;
  import readout_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] s_awaddr = '0, s_araddr = '0;
  logic s_awvalid = 1'b0, s_wvalid = 1'b0, s_bready = 1'b0, s_arvalid = 1'b0, s_rready = 1'b0;
  logic [31:0] s_wdata = '0, s_rdata;
  logic [3:0] s_wstrb = 4'hF;
  logic s_awready, s_wready, s_bvalid, s_arready, s_rvalid;
  logic [1:0] s_bresp, s_rresp;
  settings_t set_o;
  status_t status;
  logic finder_go, scan_go, freq_go, dac_wr, dac_ch;
  logic [11:0] dac_code;
  int checks = 0, failures = 0;
  int n_fgo = 0, n_sgo = 0, n_qgo = 0, n_dac = 0;

  always #2500 clk = ~clk;

  axil_regs dut (.*);

  always @(posedge clk) begin
    n_fgo += int'(finder_go); n_sgo += int'(scan_go); n_qgo += int'(freq_go); n_dac += int'(dac_wr);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    s_awaddr = a; s_wdata = d; s_awvalid = 1'b1; s_wvalid = 1'b1;
    do @(posedge clk); while (!(s_awready && s_wready));
    @(negedge clk) s_awvalid = 1'b0; s_wvalid = 1'b0;
    repeat (2) @(negedge clk);   // slow master: response must wait
    check(s_bvalid && s_bresp == 2'b00, "write response held");
    s_bready = 1'b1;
    @(negedge clk) s_bready = 1'b0;
    check(!s_bvalid, "write response accepted");
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    s_araddr = a; s_arvalid = 1'b1;
    do @(posedge clk); while (!s_arready);
    @(negedge clk) s_arvalid = 1'b0;
    repeat (2) @(negedge clk);
    check(s_rvalid && s_rresp == 2'b00, "read data held");
    d = s_rdata;
    s_rready = 1'b1;
    @(negedge clk) s_rready = 1'b0;
  endtask

  initial begin
    logic [31:0] d;
    status = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    rd(A_CTRL, d);  check(d == 32'h0000_0100, $sformatf("CTRL reset %h", d));
    rd(A_TRIM, d);  check(d == 32'h0000_0088, $sformatf("TRIM reset %h", d));
    rd(A_SCAN, d);  check(d == 32'h0001_0010, $sformatf("SCAN reset %h", d));
    rd(A_GATE, d);  check(d == 32'd1000, "GATE reset");
    rd(A_KMAX, d);  check(d == 32'd40, "KMAX reset");
    wr(A_CTRL, 32'h0000_0231);
    check(set_o.ch_sel == 2'd3 && set_o.osc_en && !set_o.ss_en, "CTRL fields");
    check(n_fgo == 1 && n_sgo == 0 && n_qgo == 0, "finder go pulse only");
    rd(A_CTRL, d);  check(d == 32'h0000_0230, $sformatf("CTRL read back %h", d));
    wr(A_CTRL, 32'h0000_0106);
    check(n_fgo == 1 && n_sgo == 1 && n_qgo == 1, "scan and freq go pulses");
    wr(A_TRIM, 32'h0000_00A5);
    check(set_o.trim_fast == 4'h5 && set_o.trim_slow == 4'hA, "trims");
    wr(A_DAC, 32'h0001_0ABC);
    check(n_dac == 1 && dac_ch && dac_code == 12'hABC, "DAC write");
    rd(A_DAC, d);   check(d == 32'h0001_0ABC, "DAC read back");
    wr(A_KMAX, 32'd77);            check(set_o.k_max == 8'd77, "KMAX");
    wr(A_SCAN, 32'h0005_0100);     check(set_o.n_points == 16'h100 && set_o.step == 10'd5, "SCAN");
    wr(A_GATE, 32'h0012_3456);     check(set_o.gate == 24'h12_3456, "GATE");
    status.finder_busy = 1'b1; status.fail = 1'b1; status.dac_busy = 1'b1; status.meas_timeout = 1'b1;
    status.zero_k = 8'd9; status.zero_fine = 10'd517;
    status.f_fast = 24'd4321; status.f_slow = 24'd1234; status.last = 32'hCAFE_F00D;
    rd(A_STATUS, d); check(d == 32'h0000_0065, $sformatf("STATUS %h", d));
    rd(A_ZERO, d);   check(d == {6'd0, 10'd517, 8'd0, 8'd9}, $sformatf("ZERO %h", d));
    rd(A_FFAST, d);  check(d == 32'd4321, "FFAST");
    rd(A_FSLOW, d);  check(d == 32'd1234, "FSLOW");
    rd(A_LAST, d);   check(d == 32'hCAFE_F00D, "LAST");
    rd(8'h3C, d);    check(d == 32'd0, "unmapped reads 0");
    wr(8'h3C, 32'hFFFF_FFFF);
    check(n_dac == 1 && set_o.k_max == 8'd77, "unmapped write has no effect");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
