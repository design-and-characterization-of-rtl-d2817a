`timescale 1ps / 1fs
// coarse_tdc_tb: the 50 ps section with a behavioural 50 ps ring.  For
// random intervals T (25 ps off the 50 ps grid) and random starting phases
// the code must be floor(T / 50 ps).  Also: STOP before START and a missing
// STOP end as overflow, and the range ends at 64 revolutions and covers 25 ns from any starting phase.
module coarse_tdc_tb;
  import tdc_pkg::*;
  logic clr = 1'b0, start = 1'b0, stop = 1'b0;
  logic [7:0] st, pat;
  logic [3:0] ph0;
  logic ring_en, done, ovf, state_err;
  logic [9:0] code;
  int checks = 0, failures = 0;

  ring_osc #(.T_NOM_PS(50.0)) u_ring (.en(ring_en), .preset(clr), .preset_state(pat),
                                      .vctrl(12'd2048), .trim(4'd8), .state(st));
  coarse_tdc dut (.clr(clr), .start(start), .stop(stop), .ring_state(st), .ph0(ph0),
                  .ring_en(ring_en), .done(done), .ovf(ovf), .state_err(state_err), .code(code));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [7:0] pattern(input logic [3:0] p);
    logic [7:0] s;
    s = '0;
    for (int i = 0; i < int'(p); i++) s = {s[6:0], ~s[7]};
    return s;
  endfunction

  // t_stop < 0: no stop
  task automatic run(input int p, input real t_start, input real t_stop);
    clr = 1'b0; #10; clr = 1'b1; ph0 = 4'(p); pat = pattern(4'(p));
    #1000; clr = 1'b0; #1000;
    fork
      begin #(t_start); start = 1'b1; #2000 start = 1'b0; end
      begin if (t_stop >= 0.0) begin #(t_stop); stop = 1'b1; #2000 stop = 1'b0; end end
    join
    #60000;
  endtask

  initial begin
    for (int n = 0; n < 80; n++) begin
      int e, p;
      e = int'($urandom_range(0, 490));
      p = int'($urandom_range(0, 15));
      run(p, 100.0, 100.0 + 50.0 * e + 25.0);
      check(done && !ovf && !state_err && code == 10'(e), $sformatf("T=%0d*50+25 ph0=%0d: code %0d ovf %0b", e, p, code, ovf));
      check(!ring_en, "ring stopped after STOP");
    end
    run(3, 5000.0, 100.0);
    check(done && ovf, "stop before start overflows");
    run(0, 100.0, -1.0);
    check(done && ovf, "missing stop overflows");
    // last code before overflow with phase 0: 64*16 - 1 = 1023 steps
    run(0, 100.0, 100.0 + 50.0 * 1023 + 25.0);
    check(done && !ovf && code == 10'd1023, $sformatf("end of range code %0d ovf %0b", code, ovf));
    // phase 15: 25 ns is still in range
    run(15, 100.0, 100.0 + 50.0 * 500 + 25.0);
    check(done && !ovf && code == 10'd500, $sformatf("25 ns with phase 15: code %0d ovf %0b", code, ovf));
    run(0, 100.0, 100.0 + 50.0 * 1024 + 25.0);
    check(done && ovf, "beyond range overflows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #40_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
