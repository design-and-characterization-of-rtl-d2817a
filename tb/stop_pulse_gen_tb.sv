`timescale 1ps / 1fs
// stop_pulse_gen_tb: the START image rises 1 ns after a clk edge every
// 100 ns.  After `fire` with shift k, STOP must rise on the (3+k)-th clk edge
// after the START image edge and stay high for 4 cycles; `start_rise` must
// pulse once per START edge; STOP must not appear without `fire`.
module stop_pulse_gen_tb;
  logic clk = 1'b0, rst_n = 1'b0, start_img = 1'b0, fire = 1'b0;
  logic [7:0] shift = '0;
  logic start_rise, stop, busy;
  int checks = 0, failures = 0;
  int n_rise = 0, n_stop = 0;
  realtime t_img, t_stop, t_stop_fall;

  always #2500 clk = ~clk;

  stop_pulse_gen dut (.*);

  always begin
    #(100_000 - 4000);
    @(posedge clk); #1000 start_img = 1'b1; t_img = $realtime;
    #20_000 start_img = 1'b0;
  end

  always @(posedge clk) if (start_rise) n_rise++;
  always @(posedge stop) begin t_stop = $realtime; n_stop++; end
  always @(negedge stop) t_stop_fall = $realtime;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 12; k++) begin
      int ns;
      shift = 8'(k);
      @(negedge clk) fire = 1'b1;
      @(negedge clk) fire = 1'b0;
      ns = n_stop;
      while (n_stop == ns) @(negedge clk);
      // edges after the image edge: image at edge+1 ns, stop at edge number 3+k
      check(t_stop - t_img > (3 + k) * 5000.0 - 1500.0 && t_stop - t_img < (3 + k) * 5000.0 - 500.0,
            $sformatf("shift %0d: stop %0.0f ps after start image", k, t_stop - t_img));
      while (stop) @(negedge clk);
      check(t_stop_fall - t_stop > 19_999.0 && t_stop_fall - t_stop < 20_001.0, "stop width 4 cycles");
      @(negedge clk);
      check(!busy, "idle after pulse");
    end
    begin
      int ns, nr;
      ns = n_stop; nr = n_rise;
      #300_000;
      check(n_stop == ns, "no stop without fire");
      check(n_rise - nr == 3, $sformatf("start_rise pulses %0d", n_rise - nr));
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
