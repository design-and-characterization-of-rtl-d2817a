`timescale 1ps / 1fs
// ref_osc_tb: measures the period of the divided output of the fast and
// slow reference oscillators: 2^6 * 16 cell delays, i.e. 51.2 ns and 57.6 ns
// at nominal control, and 46.08 ns for the fast one with its control code
// raised by 1000 (cells 5 ps faster).  A disabled oscillator must not
// toggle.
module ref_osc_tb;
  logic en = 1'b0;
  logic [11:0] vc = 12'd2048;
  logic div_f, div_s;
  int checks = 0, failures = 0;

  ref_osc #(.T_NOM_PS(50.0))  u_f (.en(en), .vctrl(vc),      .trim(4'd8), .div_out(div_f));
  ref_osc #(.T_NOM_PS(56.25)) u_s (.en(en), .vctrl(12'd2048), .trim(4'd8), .div_out(div_s));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic period_f(input real expect_ps);
    realtime t0, t1;
    @(posedge div_f); t0 = $realtime;
    @(posedge div_f); t1 = $realtime;
    check(t1 - t0 > expect_ps - 1.0 && t1 - t0 < expect_ps + 1.0,
          $sformatf("fast period %0.2f exp %0.2f", t1 - t0, expect_ps));
  endtask

  task automatic period_s(input real expect_ps);
    realtime t0, t1;
    @(posedge div_s); t0 = $realtime;
    @(posedge div_s); t1 = $realtime;
    check(t1 - t0 > expect_ps - 1.0 && t1 - t0 < expect_ps + 1.0,
          $sformatf("slow period %0.2f exp %0.2f", t1 - t0, expect_ps));
  endtask

  initial begin
    #10000;
    check(div_f == 1'b0 && div_s == 1'b0, "disabled outputs low");
    en = 1'b1;
    period_f(51200.0);
    period_f(51200.0);
    period_s(57600.0);
    vc = 12'd3048;
    @(posedge div_f);
    period_f(64.0 * 16.0 * 45.0);
    en = 1'b0;
    #200000;
    check(div_f == 1'b0 && div_s == 1'b0, "held when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
