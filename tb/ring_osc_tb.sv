`timescale 1ps / 1fs
// ring_osc_tb: presets a 50 ps ring and a 56.25 ps ring to random phases,
// releases them and samples their state in the middle of each cell delay.
// The expected state is built by stepping a Johnson counter written here
// ({s[N-2:0], ~s[N-1]}), so the check is independent of the package
// functions.  Also checks that a disabled ring freezes.
module ring_osc_tb;
  localparam int N = 8;
  logic en = 1'b0, preset = 1'b1;
  logic [N-1:0] pst;
  logic [N-1:0] st_f, st_s;
  int checks = 0, failures = 0;

  ring_osc #(.T_NOM_PS(50.0))  u_f (.en(en), .preset(preset), .preset_state(pst),
                                    .vctrl(12'd2048), .trim(4'd8), .state(st_f));
  ring_osc #(.T_NOM_PS(56.25)) u_s (.en(en), .preset(preset), .preset_state(pst),
                                    .vctrl(12'd2048), .trim(4'd8), .state(st_s));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [N-1:0] step(input logic [N-1:0] s);
    return {s[N-2:0], ~s[N-1]};
  endfunction

  function automatic logic [N-1:0] pattern(input int p);
    logic [N-1:0] s;
    s = '0;
    for (int i = 0; i < p; i++) s = step(s);
    return s;
  endfunction

  initial begin
    for (int trial = 0; trial < 6; trial++) begin
      int p;
      logic [N-1:0] ef, es;
      real t0;
      p = int'($urandom_range(0, 15));
      en = 1'b0; preset = 1'b1; pst = pattern(p);
      #1000;
      check(st_f == pst && st_s == pst, $sformatf("preset to phase %0d", p));
      preset = 1'b0; #100;
      en = 1'b1; t0 = $realtime;
      ef = pst; es = pst;
      // fast ring: 40 steps
      for (int k = 0; k < 40; k++) begin
        #((t0 + 50.0 * k + 25.0) - $realtime);
        check(st_f == ef, $sformatf("fast ring step %0d", k));
        ef = step(ef);
      end
      en = 1'b0;
      #500;
      check(st_f == ef || st_f == step(step(ef)) || st_f == step(ef), "fast ring frozen near stop point");
      preset = 1'b1; #100; preset = 1'b0; #100;
      en = 1'b1; t0 = $realtime;
      for (int k = 0; k < 40; k++) begin
        #((t0 + 56.25 * k + 28.0) - $realtime);
        check(st_s == es, $sformatf("slow ring step %0d", k));
        es = step(es);
      end
      en = 1'b0;
      #1000;
      begin
        logic [N-1:0] held;
        held = st_s;
        #1000;
        check(st_s == held, "disabled ring holds");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
