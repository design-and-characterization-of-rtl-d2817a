`timescale 1ps / 1fs
// start_finder_tb: a model of a measurement answers each request a few
// cycles later; the selected channel's time of arrival overflows while the
// stop position k*FINE_PER_CLK + fine is below a hidden zero Z.  The finder
// must report the first position at or above Z: (Z div P, Z mod P) found
// through the coarse pass and the fine pass.  Also: Z = 0, Z in a
// coarse-only point, and `fail` when k_max is too small.  FINE_PER_CLK is
// reduced to 50 to keep the search short.
module start_finder_tb;
  import tdc_pkg::*;
  localparam int P = 50;
  logic clk = 1'b0, rst_n = 1'b0, go = 1'b0;
  logic [1:0] ch_sel = 2'd2;
  logic [7:0] k_max = 8'd20;
  logic meas_go, meas_done = 1'b0;
  logic [7:0] meas_shift, zero_k;
  logic [9:0] fine_code, zero_fine;
  tdc_result_t meas_result [4];
  logic busy, found, fail;
  int z = 0, nmeas = 0;
  int checks = 0, failures = 0;

  always #2500 clk = ~clk;

  start_finder #(.FINE_PER_CLK(P)) dut (.*);

  // measurement model: 3 cycles of latency
  initial begin
    for (int i = 0; i < 4; i++) meas_result[i] = '0;
    forever begin
      @(posedge clk);
      if (rst_n && meas_go) begin
        int pos;
        pos = int'(meas_shift) * P + int'(fine_code);
        nmeas++;
        repeat (3) @(posedge clk);
        for (int i = 0; i < 4; i++) meas_result[i] <= '{toa_ovf: (i == 2) ? (pos < z) : 1'b1, toa: 13'(pos), tot_ovf: 1'b0, tot: '0};
        meas_done <= 1'b1;
        @(posedge clk) meas_done <= 1'b0;
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic find(input int zz, input bit expect_fail);
    z = zz; nmeas = 0;
    @(negedge clk) go = 1'b1;
    @(negedge clk) go = 1'b0;
    while (busy) @(negedge clk);
    if (expect_fail) begin
      check(fail && !found, $sformatf("Z=%0d: fail expected", zz));
    end else begin
      check(found && !fail, $sformatf("Z=%0d found", zz));
      check(int'(zero_k) == zz / P && int'(zero_fine) == zz % P,
            $sformatf("Z=%0d: zero (%0d,%0d)", zz, zero_k, zero_fine));
      check(nmeas == ((zz % P == 0) ? zz / P + 1 + (zz == 0 ? 0 : P) : zz / P + 3 + zz % P),
            $sformatf("Z=%0d: %0d measurements", zz, nmeas));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    find(0, 1'b0);
    find(37, 1'b0);
    find(3 * P + 11, 1'b0);
    find(7 * P + 49, 1'b0);
    find(5 * P, 1'b0);
    for (int n = 0; n < 5; n++) find(int'($urandom_range(1, 15 * P)), 1'b0);
    k_max = 8'd4;
    find(9 * P + 3, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
