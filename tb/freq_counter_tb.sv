`timescale 1ps / 1fs
// freq_counter_tb: feeds square waves of known period and checks the count
// over the gate: gate*T_clk/T_osc, within one edge.  Also checks busy/done
// timing (done pulses gate+1 cycles after go) and that go is ignored while
// busy.
module freq_counter_tb;
  logic clk = 1'b0, rst_n = 1'b0, go = 1'b0, osc = 1'b0;
  logic [23:0] gate = 24'd1000, count;
  logic busy, done;
  real t_osc = 51_200.0;
  int checks = 0, failures = 0;

  always #2500 clk = ~clk;
  always #(t_osc / 2.0) osc = ~osc;

  freq_counter dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic measure(input int g, input real tosc);
    int cyc;
    real expect_n;
    gate = 24'(g); t_osc = tosc;
    repeat (5) @(negedge clk);
    go = 1'b1; @(negedge clk); go = 1'b0;
    cyc = 1;
    while (!done) begin
      if (cyc == 3) begin go = 1'b1; end else go = 1'b0;
      @(negedge clk); cyc++;
    end
    go = 1'b0;
    check(cyc == g + 1, $sformatf("done after %0d cycles, gate %0d", cyc, g));
    expect_n = real'(g) * 5000.0 / tosc;
    check(real'(count) >= expect_n - 1.0 && real'(count) <= expect_n + 1.0,
          $sformatf("count %0d expected %0.2f", count, expect_n));
    @(negedge clk);
    check(!busy, "not busy after done");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    measure(1000, 51_200.0);
    measure(2000, 57_600.0);
    measure(500, 12_345.0);
    measure(3000, 46_080.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
