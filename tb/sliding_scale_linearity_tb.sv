`timescale 1ps / 1fs
// sliding_scale_linearity_tb: code-density test of the 6.25 ps section of one
// channel whose delay cells are mismatched (MISMATCH_PS gives cell k an offset
// of MISMATCH_PS*((k mod 3)-1) in every ring), first with the sliding scale
// off and then on.
//
// START-STOP2 is swept in N_HITS equal steps over the first N_CODES codes
// (a deterministic sweep, so with the sliding scale off the histogram is the
// exact bin widths).  The differential non-linearity of code k is
// hits(k)/(N_HITS/N_CODES) - 1; the test reports the RMS and peak DNL of both
// runs and checks that the mismatch makes the fixed-phase converter clearly
// non-linear, that the sliding scale cuts the RMS DNL to under 60 % and lowers
// the peak DNL, and that the mean error of the codes stays under one LSB.  A
// matched channel is swept as well and must give DNL 0.  With MM_PS = 2.5 ps
// the mismatched channel gives DNL rms 0.52 / peak 1.20 LSB with the sliding
// scale off and 0.25 / 0.78 LSB with it on.  What remains is partly
// systematic: this mismatch pattern does not sum to zero around a ring, so
// the mean cell delays are no longer exactly 9:1 and every ninth bin is
// short, which no choice of starting phase can average out.  32000 hits per
// run, about 20 s of simulation.
// The mismatch pattern and the thresholds are this test's own choices; that
// random starting phases trade a fixed non-linearity for noise is the point
// of the sliding scale in the design.
module sliding_scale_linearity_tb;
  import tdc_pkg::*;

  localparam int  N_CODES  = 80;
  localparam int  PER_CODE = 400;
  localparam int  N_HITS   = N_CODES * PER_CODE;
  localparam real MM_PS    = 2.5;

  logic clk = 1'b0, rst_n = 1'b0, arm = 1'b0;
  logic start = 1'b0, stop1 = 1'b0, stop2 = 1'b0;
  tdc_cfg_t cfg;
  logic [1:0]  armed, valid, state_err;
  tdc_result_t result [2];
  int checks = 0, failures = 0;

  always #2500 clk = ~clk;

  // channel 0 mismatched, channel 1 matched; both see the same hits
  tdc_channel #(.MISMATCH_PS(MM_PS)) u_mm (
    .clk(clk), .rst_n(rst_n), .arm(arm), .cfg(cfg),
    .vctrl_fast(12'd2048), .vctrl_slow(12'd2048),
    .start(start), .stop1(stop1), .stop2(stop2),
    .armed(armed[0]), .valid(valid[0]), .state_err(state_err[0]), .result(result[0])
  );
  tdc_channel #(.SEED(32'h5EED_0001)) u_ok (
    .clk(clk), .rst_n(rst_n), .arm(arm), .cfg(cfg),
    .vctrl_fast(12'd2048), .vctrl_slow(12'd2048),
    .start(start), .stop1(stop1), .stop2(stop2),
    .armed(armed[1]), .valid(valid[1]), .state_err(state_err[1]), .result(result[1])
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic measure(input real t_toa);
    @(negedge clk) arm = 1'b1;
    @(negedge clk) arm = 1'b0;
    while (armed != 2'b11) @(negedge clk);
    #1234;
    fork
      begin start = 1'b1; #3000 start = 1'b0; end
      begin #(1025.0); stop1 = 1'b1; #3000 stop1 = 1'b0; end
      begin #(t_toa); stop2 = 1'b1; #3000 stop2 = 1'b0; end
    join
    while (valid != 2'b11) @(negedge clk);
  endtask

  // sweep, then RMS and peak DNL and mean code error of each channel
  task automatic sweep(output real rms [2], output real peak [2], output real bias [2]);
    int  hist [2][N_CODES];
    real t, d, err [2];
    for (int c = 0; c < 2; c++) begin
      err[c] = 0.0;
      for (int k = 0; k < N_CODES; k++) hist[c][k] = 0;
    end
    for (int n = 0; n < N_HITS; n++) begin
      t = 6.25 * N_CODES * (real'(n) + 0.5) / real'(N_HITS);
      measure(t);
      for (int c = 0; c < 2; c++) begin
        check(!result[c].toa_ovf && !state_err[c], $sformatf("ch %0d: T=%0.3f overflow or illegal state", c, t));
        if (int'(result[c].toa) < N_CODES) hist[c][int'(result[c].toa)]++;
        err[c] += real'(result[c].toa) + 0.5 - t / 6.25;
      end
    end
    for (int c = 0; c < 2; c++) begin
      rms[c] = 0.0;
      peak[c] = 0.0;
      for (int k = 0; k < N_CODES; k++) begin
        d = real'(hist[c][k]) / real'(PER_CODE) - 1.0;
        rms[c] += d * d;
        if (d > peak[c] || -d > peak[c]) peak[c] = (d < 0.0) ? -d : d;
      end
      rms[c] = $sqrt(rms[c] / N_CODES);
      bias[c] = err[c] / N_HITS;
    end
  endtask

  initial begin
    real rms_off [2], peak_off [2], bias_off [2];
    real rms_on [2], peak_on [2], bias_on [2];
    cfg = '{osc_en: 1'b0, ss_en: 1'b0, trim_fast: 4'd8, trim_slow: 4'd8};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    sweep(rms_off, peak_off, bias_off);
    cfg.ss_en = 1'b1;
    sweep(rms_on, peak_on, bias_on);
    $display("mismatched channel: sliding scale off DNL rms %0.3f peak %0.3f mean error %0.3f LSB",
             rms_off[0], peak_off[0], bias_off[0]);
    $display("mismatched channel: sliding scale on  DNL rms %0.3f peak %0.3f mean error %0.3f LSB",
             rms_on[0], peak_on[0], bias_on[0]);
    $display("matched channel:    DNL rms %0.3f / %0.3f (off / on)", rms_off[1], rms_on[1]);
    check(rms_off[1] < 0.05 && peak_off[1] < 0.1, "matched channel is linear with the sliding scale off");
    check(rms_off[0] > 0.2, "mismatch makes the fixed-phase converter non-linear");
    check(rms_on[0] < 0.6 * rms_off[0], "sliding scale cuts the RMS DNL to under 60 %");
    check(peak_on[0] < peak_off[0], "sliding scale lowers the peak DNL");
    check(bias_off[0] < 1.0 && bias_off[0] > -1.0 && bias_on[0] < 1.0 && bias_on[0] > -1.0, "mean code error under one LSB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(longint'(N_HITS) * 2 * 100_000 + 2_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
