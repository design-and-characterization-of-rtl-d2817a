`timescale 1ps / 1fs
// meas_seq_tb: a cycle-level model of the ASIC and the stop generator
// around the sequencer.  START edges come every 20 cycles.  The model
// raises `armed` 3 cycles after `tdc_arm` and `valid` 12 cycles after
// `fire`, with random results.  Checks: arm follows a START edge by one
// cycle, fire only after armed, the results captured are the model's, done
// is a single pulse, and with no valid the sequencer times out after
// TIMEOUT cycles with overflow results.
module meas_seq_tb;
  import tdc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, go = 1'b0;
  logic start_rise = 1'b0, stop_busy = 1'b0, fire, tdc_arm;
  logic tdc_armed = 1'b0;
  logic [3:0] tdc_valid = '0;
  tdc_result_t tdc_result [4];
  tdc_result_t result [4];
  logic busy, done, timeout;
  int checks = 0, failures = 0;
  int cyc = 0, last_rise = -100, arm_cyc = -1, fire_cyc = -1, armed_cyc = -1;
  bit asic_dead = 1'b0;

  always #2500 clk = ~clk;

  meas_seq #(.TIMEOUT(200)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // START edges and the model of the ASIC
  always @(posedge clk) begin
    cyc <= cyc + 1;
    start_rise <= ((cyc + 1) % 20 == 7);
    if (start_rise) last_rise = cyc;
    if (rst_n && tdc_arm) begin
      check(cyc == last_rise + 1, $sformatf("arm one cycle after a START edge: %0d %0d", cyc, last_rise));
      arm_cyc   = cyc;
      tdc_armed <= 1'b0;
      tdc_valid <= '0;
    end
    if (arm_cyc >= 0 && cyc == arm_cyc + 3) begin tdc_armed <= 1'b1; armed_cyc = cyc; end
    if (rst_n && fire) begin
      check(tdc_armed && cyc >= armed_cyc + 2, $sformatf("fire after armed is seen %0d %0d %0b", cyc, armed_cyc, tdc_armed));
      fire_cyc  = cyc;
      stop_busy <= 1'b1;
    end
    if (fire_cyc >= 0 && cyc == fire_cyc + 8) stop_busy <= 1'b0;
    if (fire_cyc >= 0 && cyc == fire_cyc + 12 && !asic_dead) begin
      tdc_valid <= '1;
      tdc_armed <= 1'b0;
    end
  end

  initial begin
    int ndone;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 12; n++) begin
      for (int i = 0; i < 4; i++) tdc_result[i] = tdc_result_t'($urandom);
      asic_dead = (n == 7);
      @(negedge clk) go = 1'b1;
      @(negedge clk) go = 1'b0;
      ndone = 0;
      while (busy) begin
        @(negedge clk);
        if (done) ndone++;
      end
      if (done) ndone++;
      check(ndone == 1, $sformatf("one done pulse, got %0d", ndone));
      if (n == 7) begin
        check(timeout, "timeout when the ASIC never answers");
        for (int i = 0; i < 4; i++) check(result[i].toa_ovf && result[i].tot_ovf, "timeout gives overflow");
      end else begin
        check(!timeout, "no timeout");
        for (int i = 0; i < 4; i++) check(result[i] == tdc_result[i], $sformatf("result %0d captured", i));
      end
      repeat (int'($urandom_range(0, 25))) @(negedge clk);
    end
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
