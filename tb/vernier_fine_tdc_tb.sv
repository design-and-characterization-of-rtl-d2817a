`timescale 1ps / 1fs
// vernier_fine_tdc_tb: the 6.25 ps section with behavioural 56.25 ps and
// 50 ps rings.  For random intervals T (half a step off the 6.25 ps grid)
// and random starting phases of both rings the code must be
// floor(T / 6.25 ps).  It checks that the conversion ends, and the rings
// stop, no later than 9 fast steps (450 ps) after STOP2, and that a missing
// STOP2 or a STOP2 before START overflows.
module vernier_fine_tdc_tb;
  import tdc_pkg::*;
  logic clr = 1'b0, start = 1'b0, stop = 1'b0;
  logic [7:0] st_s, st_f, pat_s, pat_f;
  logic [3:0] ph_s, ph_f;
  logic slow_en, fast_en, done, ovf, state_err;
  logic [12:0] code;
  realtime t_stop_edge, t_done;
  int checks = 0, failures = 0;

  ring_osc #(.T_NOM_PS(56.25)) u_s (.en(slow_en), .preset(clr), .preset_state(pat_s),
                                    .vctrl(12'd2048), .trim(4'd8), .state(st_s));
  ring_osc #(.T_NOM_PS(50.0))  u_f (.en(fast_en), .preset(clr), .preset_state(pat_f),
                                    .vctrl(12'd2048), .trim(4'd8), .state(st_f));
  vernier_fine_tdc dut (.clr(clr), .start(start), .stop(stop), .slow_state(st_s), .fast_state(st_f),
                        .ph0_slow(ph_s), .ph0_fast(ph_f), .slow_en(slow_en), .fast_en(fast_en),
                        .done(done), .ovf(ovf), .state_err(state_err), .code(code));

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

  always @(posedge stop) t_stop_edge = $realtime;
  always @(posedge done) t_done = $realtime;

  task automatic run(input int ps, input int pf, input real t_start, input real t_stop);
    clr = 1'b0; #10; clr = 1'b1; ph_s = 4'(ps); ph_f = 4'(pf); pat_s = pattern(4'(ps)); pat_f = pattern(4'(pf));
    #1000; clr = 1'b0; #1000;
    fork
      begin #(t_start); start = 1'b1; #2000 start = 1'b0; end
      begin if (t_stop >= 0.0) begin #(t_stop); stop = 1'b1; #2000 stop = 1'b0; end end
    join
    #32000;
  endtask

  initial begin
    for (int n = 0; n < 120; n++) begin
      int e, ps, pf;
      e  = (n < 20) ? n : int'($urandom_range(0, 4000));
      ps = int'($urandom_range(0, 15));
      pf = int'($urandom_range(0, 15));
      run(ps, pf, 100.0, 100.0 + 6.25 * e + 3.125);
      check(done && !ovf && !state_err && code == 13'(e),
            $sformatf("T=%0d*6.25+3.125 ph %0d/%0d: code %0d ovf %0b", e, ps, pf, code, ovf));
      check(t_done - t_stop_edge <= 9 * 50.0 + 1.0, $sformatf("conversion time %0.2f ps", t_done - t_stop_edge));
      check(!slow_en && !fast_en, "rings stopped");
    end
    run(0, 0, 100.0, -1.0);
    check(done && ovf, "missing STOP2 overflows");
    run(5, 9, 3000.0, 100.0);
    check(done && ovf, "STOP2 before START overflows");
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
