`timescale 1ps / 1fs
// tdc_channel_tb: drives one TDC channel with random START-STOP1 and
// START-STOP2 intervals and compares the codes with floor(T/50 ps) and
// floor(T/6.25 ps).  Intervals sit half a fine step off every grid so that
// no edge coincides with a cell transition.  It also checks a STOP before
// START and a missing STOP2 (both overflow), the arm-to-armed latency, and
// that the sliding scale really changes the starting phases.
module tdc_channel_tb;
  import tdc_pkg::*;

  localparam int NMEAS = 60;

  logic clk = 1'b0, rst_n = 1'b0, arm = 1'b0;
  logic start = 1'b0, stop1 = 1'b0, stop2 = 1'b0;
  tdc_cfg_t cfg;
  logic armed, valid, state_err;
  tdc_result_t result;
  int checks = 0, failures = 0;

  always #2500 clk = ~clk;

  tdc_channel dut (
    .clk(clk), .rst_n(rst_n), .arm(arm), .cfg(cfg),
    .vctrl_fast(12'd2048), .vctrl_slow(12'd2048),
    .start(start), .stop1(stop1), .stop2(stop2),
    .armed(armed), .valid(valid), .state_err(state_err), .result(result)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // one measurement; a negative interval means that stop is not sent
  task automatic measure(input real t_tot, input real t_toa, input real t_pre);
    int lat;
    @(negedge clk) arm = 1'b1;
    @(negedge clk) arm = 1'b0;
    lat = 1;
    while (!armed) begin @(negedge clk); lat++; end
    check(lat == 3, $sformatf("arm-to-armed latency %0d", lat));
    #1234;
    fork
      begin if (t_pre > 0.0) begin #(t_pre); end start = 1'b1; #3000 start = 1'b0; end
      begin if (t_tot >= 0.0) begin #(t_tot); stop1 = 1'b1; #3000 stop1 = 1'b0; end end
      begin if (t_toa >= 0.0) begin #(t_toa); stop2 = 1'b1; #3000 stop2 = 1'b0; end end
    join
    while (!valid) @(negedge clk);
  endtask

  initial begin
    real t1, t2;
    int  e1, e2;
    logic [PH_W-1:0] ph_seen [NMEAS];
    int  distinct;
    cfg = '{osc_en: 1'b0, ss_en: 1'b1, trim_fast: 4'd8, trim_slow: 4'd8};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NMEAS; n++) begin
      e1 = int'($urandom_range(0, 498));
      e2 = int'($urandom_range(0, 3990));
      t1 = 50.0 * e1 + 25.0 + 3.125 * (n % 3);
      t2 = 6.25 * e2 + 3.125;
      measure(t1, t2, 0.0);
      ph_seen[n] = dut.ph_s;
      check(!result.tot_ovf && result.tot == TOT_W'(e1),
            $sformatf("tot T=%0.3f got %0d exp %0d ovf %0b", t1, result.tot, e1, result.tot_ovf));
      check(!result.toa_ovf && result.toa == TOA_W'(e2),
            $sformatf("toa T=%0.3f got %0d exp %0d ovf %0b", t2, result.toa, e2, result.toa_ovf));
      check(!state_err, "state_err");
    end
    // sliding scale: starting phases must vary
    distinct = 0;
    for (int n = 1; n < NMEAS; n++) if (ph_seen[n] != ph_seen[n-1]) distinct++;
    check(distinct > NMEAS / 2, $sformatf("sliding scale changed phase %0d times", distinct));
    // stops before start: both sections overflow
    measure(0.0, 0.0, 5000.0);
    check(result.tot_ovf && result.toa_ovf, "stop before start gives overflow");
    // STOP2 missing: only the fine section overflows
    measure(1025.0, -1.0, 0.0);
    check(!result.tot_ovf && result.tot == 20 && result.toa_ovf, "missing STOP2");
    // sliding scale off: same result, phases zero
    cfg.ss_en = 1'b0;
    measure(1025.0, 1003.125, 0.0);
    check(dut.ph_s == 0 && dut.ph_f == 0 && dut.ph_c == 0, "phases zero with sliding scale off");
    check(result.tot == 20 && result.toa == 160, "codes with sliding scale off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(NMEAS * 200_000 + 2_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
