`timescale 1ps / 1fs
// scan_readout_tb: a measurement model returns, for each request, results
// that encode the stop position (shift*FINE_PER_CLK + fine code) and the
// channel.  The sink applies random back-pressure on tready.  For every
// point the frame must hold 1+4 beats: the position p*step, then each
// channel's result tagged with its number, tlast only on the last beat; the
// fine code must carry into the clock shift at FINE_PER_CLK (reduced to 40).
module scan_readout_tb;
  import tdc_pkg::*;
  localparam int P = 40;
  logic clk = 1'b0, rst_n = 1'b0, go = 1'b0;
  logic [7:0] zero_k = 8'd3, meas_shift;
  logic [9:0] zero_fine = 10'd31, step = 10'd7, fine_code;
  logic [15:0] n_points = 16'd23;
  logic meas_go, meas_done = 1'b0;
  tdc_result_t meas_result [4];
  logic [31:0] m_axis_tdata;
  logic m_axis_tvalid, m_axis_tready = 1'b0, m_axis_tlast, busy;
  int checks = 0, failures = 0;
  int beats [$];
  int lasts [$];

  always #2500 clk = ~clk;

  scan_readout #(.FINE_PER_CLK(P)) dut (.*);

  function automatic tdc_result_t model(input int pos, input int ch);
    return '{toa_ovf: 1'b0, toa: 13'(pos * 4 + ch), tot_ovf: 1'b0, tot: 10'(ch)};
  endfunction

  initial begin
    for (int i = 0; i < 4; i++) meas_result[i] = '0;
    forever begin
      @(posedge clk);
      if (rst_n && meas_go) begin
        int pos;
        pos = int'(meas_shift) * P + int'(fine_code);
        check(int'(fine_code) < P, $sformatf("fine code %0d below FINE_PER_CLK", fine_code));
        repeat (5) @(posedge clk);
        for (int i = 0; i < 4; i++) meas_result[i] <= model(pos, i);
        meas_done <= 1'b1;
        @(posedge clk) meas_done <= 1'b0;
        for (int i = 0; i < 4; i++) meas_result[i] <= '1;
      end
    end
  end

  always @(posedge clk) begin
    if (m_axis_tvalid && m_axis_tready) begin
      beats.push_back(int'(m_axis_tdata));
      lasts.push_back(int'(m_axis_tlast));
    end
    m_axis_tready <= ($urandom_range(0, 2) != 0);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      beats.delete(); lasts.delete();
      @(negedge clk) go = 1'b1;
      @(negedge clk) go = 1'b0;
      while (busy) @(negedge clk);
      repeat (3) @(negedge clk);
      check(beats.size() == int'(n_points) * 5, $sformatf("%0d beats", beats.size()));
      for (int p = 0; p < int'(n_points) && beats.size() >= 5 * (p + 1); p++) begin
        int pos;
        pos = int'(zero_k) * P + int'(zero_fine) + p * int'(step);
        check(beats[5*p] == p * int'(step) && lasts[5*p] == 0, $sformatf("point %0d header %0d", p, beats[5*p]));
        for (int i = 0; i < 4; i++) begin
          check(beats[5*p+1+i] == int'({2'(i), 5'b0, model(pos, i)}),
                $sformatf("point %0d ch %0d data %h", p, i, beats[5*p+1+i]));
          check(lasts[5*p+1+i] == (i == 3), "tlast on the last beat only");
        end
      end
      zero_k = 8'd0; zero_fine = 10'd0; step = 10'd13; n_points = 16'd9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
