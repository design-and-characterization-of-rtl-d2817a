`timescale 1ps / 1fs
// tdc_asic_tb: the 4-channel ASIC with a common START, a common STOP1 and a
// separate STOP2 per channel.  Each cycle uses one random STOP1 interval and
// four different random STOP2 intervals; every channel must report
// floor(T1 / 50 ps) and floor(T2_i / 6.25 ps).  It also checks the common
// `armed` flag, a channel whose STOP2 is missing (only that channel
// overflows) and that both reference oscillators run when enabled.
module tdc_asic_tb;
  import tdc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, arm = 1'b0;
  logic start = 1'b0, stop1 = 1'b0;
  logic [3:0] stop2 = '0;
  tdc_cfg_t cfg;
  logic armed, osc_f, osc_s;
  logic [3:0] valid, serr;
  tdc_result_t result [4];
  int checks = 0, failures = 0;

  always #2500 clk = ~clk;

  tdc_asic dut (.clk(clk), .rst_n(rst_n), .cfg(cfg), .vctrl_fast(12'd2048), .vctrl_slow(12'd2048),
                .arm(arm), .start(start), .stop1(stop1), .stop2(stop2),
                .armed(armed), .valid(valid), .state_err(serr), .result(result),
                .osc_fast_div(osc_f), .osc_slow_div(osc_s));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int e1, e2 [4];
    int nf, ns;
    cfg = '{osc_en: 1'b0, ss_en: 1'b1, trim_fast: 4'd8, trim_slow: 4'd8};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 25; n++) begin
      e1 = int'($urandom_range(0, 490));
      for (int i = 0; i < 4; i++) e2[i] = int'($urandom_range(0, 3900));
      @(negedge clk) arm = 1'b1;
      @(negedge clk) arm = 1'b0;
      while (!armed) @(negedge clk);
      #777;
      fork
        begin start = 1'b1; #3000 start = 1'b0; end
        begin #(50.0 * e1 + 25.0); stop1 = 1'b1; #3000 stop1 = 1'b0; end
        begin
          for (int i = 0; i < 4; i++) begin
            automatic int ii = i;
            fork
              begin
                if (!(n == 24 && ii == 2)) begin
                  #(6.25 * e2[ii] + 3.125); stop2[ii] = 1'b1; #3000 stop2[ii] = 1'b0;
                end
              end
            join_none
          end
          wait fork;
        end
      join
      while (valid != 4'hF) @(negedge clk);
      check(!armed, "armed cleared after the cycle");
      for (int i = 0; i < 4; i++) begin
        check(!result[i].tot_ovf && result[i].tot == TOT_W'(e1), $sformatf("ch%0d tot %0d exp %0d", i, result[i].tot, e1));
        if (n == 24 && i == 2)
          check(result[i].toa_ovf, "missing STOP2 overflows");
        else
          check(!result[i].toa_ovf && result[i].toa == TOA_W'(e2[i]),
                $sformatf("ch%0d toa %0d exp %0d", i, result[i].toa, e2[i]));
        check(!serr[i], "no state error");
      end
      if (n == 24) check(!result[1].toa_ovf, "other channels unaffected");
    end
    // reference oscillators
    cfg.osc_en = 1'b1;
    nf = 0; ns = 0;
    fork
      begin : cnt_f forever begin @(posedge osc_f); nf++; end end
      begin : cnt_s forever begin @(posedge osc_s); ns++; end end
      #1_000_000;
    join_any
    disable cnt_f; disable cnt_s;
    // 1 us / 51.2 ns = 19.5, 1 us / 57.6 ns = 17.4
    check(nf >= 18 && nf <= 20, $sformatf("fast oscillator edges %0d", nf));
    check(ns >= 16 && ns <= 18, $sformatf("slow oscillator edges %0d", ns));
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
