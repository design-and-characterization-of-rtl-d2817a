`timescale 1ps / 1fs
// tdc_system_top_tb: end-to-end test of the TDC ASIC with its FPGA readout,
// at the design's default parameters, as on the test bench:
//  1. set the DAC for both control voltages and measure both reference
//     oscillator frequencies, before and after raising the fast-cell control
//     code (the cells get faster, the count rises);
//  2. run the start position finder: the coarse pass meets STOP-before-START
//     overflows, the fine pass walks the 5 ps delay; the zero it reports must
//     equal the one computed from the board delays;
//  3. scan SCAN_N points from the zero with a step of SCAN_STEP fine codes,
//     covering most of the 25 ns window, with random AXI-Stream back-pressure;
//     every frame is compared with floor(T/6.25 ps) (TOA, per channel) and
//     floor(T/50 ps) (TOT), T computed from the board delays;
//  4. a short scan with the sliding scale off.
// Each mechanism (overflow, coarse and fine search steps, fine-to-coarse
// carry, sliding-scale phase changes, back-pressure, DAC writes, frequency
// measurement, sliding scale off) is counted and must occur.
module tdc_system_top_tb;
  import tdc_pkg::*;
  import readout_pkg::*;

  localparam int  SCAN_N    = 58;
  localparam int  SCAN_STEP = 83;
  localparam real CLK_PS = 5000.0, PHASE_PS = 1000.0, D_START = 17301.7, D_STOP = 1000.3, SKEW = 40.3;

  logic clk, rst_n = 1'b0;
  logic start, start_img, stop_out, stop1;
  logic [3:0] stop2, serr;
  logic [9:0] fine_code;
  logic dac_sclk, dac_mosi, dac_cs_n;
  logic [11:0] vctrl_fast, vctrl_slow;
  int dac_writes;
  logic [7:0] awaddr, araddr;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0] wstrb;
  logic [1:0] bresp, rresp;
  logic [31:0] tdata;
  logic tvalid, tready = 1'b0, tlast;
  int checks = 0, failures = 0;
  int frames [$];
  int n_ovf = 0, n_coarse_step = 0, n_fine_step = 0, n_carry = 0, n_phase_change = 0;
  int n_stall = 0, n_meas = 0;
  logic [3:0] last_ph;
  bit backpressure = 1'b1;

  board_model #(.CLK_PS(CLK_PS), .START_PHASE_PS(PHASE_PS), .D_START_PS(D_START),
                .D_STOP_PS(D_STOP), .SKEW_PS(SKEW)) u_board (
    .clk(clk), .start_img(start_img), .start(start), .stop_out(stop_out), .fine_code(fine_code),
    .stop1(stop1), .stop2(stop2), .dac_sclk(dac_sclk), .dac_mosi(dac_mosi), .dac_cs_n(dac_cs_n),
    .vctrl_fast(vctrl_fast), .vctrl_slow(vctrl_slow), .dac_writes(dac_writes)
  );

  axil_bfm u_bfm (
    .clk(clk), .awaddr(awaddr), .awvalid(awvalid), .awready(awready), .wdata(wdata), .wstrb(wstrb),
    .wvalid(wvalid), .wready(wready), .bresp(bresp), .bvalid(bvalid), .bready(bready),
    .araddr(araddr), .arvalid(arvalid), .arready(arready), .rdata(rdata), .rresp(rresp),
    .rvalid(rvalid), .rready(rready)
  );

  tdc_system_top dut (
    .clk(clk), .rst_n(rst_n),
    .s_awaddr(awaddr), .s_awvalid(awvalid), .s_awready(awready), .s_wdata(wdata), .s_wstrb(wstrb),
    .s_wvalid(wvalid), .s_wready(wready), .s_bresp(bresp), .s_bvalid(bvalid), .s_bready(bready),
    .s_araddr(araddr), .s_arvalid(arvalid), .s_arready(arready), .s_rdata(rdata), .s_rresp(rresp),
    .s_rvalid(rvalid), .s_rready(rready),
    .m_axis_tdata(tdata), .m_axis_tvalid(tvalid), .m_axis_tready(tready), .m_axis_tlast(tlast),
    .start(start), .start_img(start_img), .stop_out(stop_out), .fine_code(fine_code),
    .stop1(stop1), .stop2(stop2), .dac_sclk(dac_sclk), .dac_mosi(dac_mosi), .dac_cs_n(dac_cs_n),
    .vctrl_fast(vctrl_fast), .vctrl_slow(vctrl_slow), .tdc_state_err(serr)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // START-to-STOP2 interval of channel ch at stop position pos (5 ps codes)
  function automatic real interval(input int pos, input int ch);
    return 3.0 * CLK_PS - PHASE_PS + 5.0 * real'(pos) + D_STOP + SKEW * real'(ch) - D_START;
  endfunction

  // stream sink with random back-pressure
  always @(posedge clk) begin
    if (tvalid && tready) frames.push_back(int'(tdata));
    if (tvalid && !tready) n_stall++;
    tready <= backpressure ? ($urandom_range(0, 3) != 0) : 1'b1;
  end

  // mechanism counters, observed at the measurement sequencer
  always @(posedge clk) if (rst_n) begin
    if (dut.u_fpga.ms_done) begin
      n_meas++;
      if (dut.u_fpga.ms_result[0].toa_ovf) n_ovf++;
      if (dut.u_asic.g_ch[0].u_ch.ph_s != last_ph) n_phase_change++;
      last_ph = dut.u_asic.g_ch[0].u_ch.ph_s;
    end
    if (dut.u_fpga.f_go && dut.u_fpga.f_shift != 0 && dut.u_fpga.f_fine == 0) n_coarse_step++;
    if (dut.u_fpga.f_go && dut.u_fpga.f_fine != 0) n_fine_step++;
    if (dut.u_fpga.s_go && dut.u_fpga.s_shift != dut.u_fpga.zero_k) n_carry++;
  end

  task automatic wait_idle(input int bit_idx);
    logic [31:0] st;
    do begin
      repeat (50) @(negedge clk);
      u_bfm.read(A_STATUS, st);
    end while (st[bit_idx]);
  endtask

  task automatic check_scan(input int n, input int step, input int zero_pos, input bit ss);
    frames.delete();
    u_bfm.write(A_SCAN, {6'd0, 10'(step), 16'(n)});
    u_bfm.write(A_CTRL, {22'd0, 1'b0, ss, 6'b000010});
    wait_idle(3);
    repeat (10) @(negedge clk);
    check(frames.size() == 5 * n, $sformatf("%0d stream beats, expected %0d", frames.size(), 5 * n));
    for (int p = 0; p < n && frames.size() >= 5 * (p + 1); p++) begin
      int pos;
      tdc_result_t r;
      pos = zero_pos + p * step;
      check(frames[5*p] == p * step, $sformatf("frame %0d position %0d", p, frames[5*p]));
      for (int i = 0; i < 4; i++) begin
        int e_toa, e_tot;
        r = tdc_result_t'(frames[5*p+1+i][24:0]);
        e_toa = int'($floor(interval(pos, i) / 6.25));
        e_tot = int'($floor(interval(pos, 0) / 50.0));
        check(frames[5*p+1+i][31:30] == 2'(i), "channel tag");
        check(!r.toa_ovf && int'(r.toa) == e_toa,
              $sformatf("point %0d ch %0d: TOA %0d (ovf %0b), expected %0d", p, i, r.toa, r.toa_ovf, e_toa));
        check(!r.tot_ovf && int'(r.tot) == e_tot,
              $sformatf("point %0d ch %0d: TOT %0d (ovf %0b), expected %0d", p, i, r.tot, r.tot_ovf, e_tot));
      end
    end
  endtask

  initial begin
    logic [31:0] d, ff0, fs0, ff1;
    int zero_pos, zk, zf;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);

    // 1. DAC and oscillator frequencies (gate 4000 cycles = 20 us)
    u_bfm.write(A_DAC, 32'h0000_0800);          // fast cells: 2048
    wait_idle(5);
    u_bfm.write(A_DAC, 32'h0001_0800);          // slow cells: 2048
    wait_idle(5);
    u_bfm.write(A_GATE, 32'd4000);
    u_bfm.write(A_CTRL, 32'h0000_0304);         // oscillators on, sliding scale on, freq go
    wait_idle(4);
    u_bfm.read(A_FFAST, ff0);
    u_bfm.read(A_FSLOW, fs0);
    // 20 us / (64*16*50 ps) = 390.6 and 20 us / (64*16*56.25 ps) = 347.2
    check(ff0 >= 388 && ff0 <= 392, $sformatf("fast oscillator count %0d", ff0));
    check(fs0 >= 345 && fs0 <= 349, $sformatf("slow oscillator count %0d", fs0));
    u_bfm.write(A_DAC, 32'h0000_0990);          // fast cells: 2448, 2 ps faster
    wait_idle(5);
    check(vctrl_fast == 12'h990 && vctrl_slow == 12'h800, "DAC codes reached the board");
    u_bfm.write(A_CTRL, 32'h0000_0304);
    wait_idle(4);
    u_bfm.read(A_FFAST, ff1);
    // 20 us / (64*16*48 ps) = 406.9
    check(ff1 >= 405 && ff1 <= 409, $sformatf("fast oscillator count at 2448: %0d", ff1));
    u_bfm.write(A_DAC, 32'h0000_0800);          // back to nominal
    wait_idle(5);
    u_bfm.write(A_CTRL, 32'h0000_0100);         // oscillators off

    // 2. start position finder on channel 0
    zero_pos = 0;
    while (interval(zero_pos, 0) <= 0.0) zero_pos++;
    u_bfm.write(A_CTRL, 32'h0000_0101);
    wait_idle(0);
    u_bfm.read(A_STATUS, d);
    check(d[1] && !d[2] && !d[6], "finder found the zero without a measurement timeout");
    u_bfm.read(A_ZERO, d);
    zk = int'(d[7:0]); zf = int'(d[25:16]);
    check(zk * FINE_PER_CLK + zf == zero_pos, $sformatf("zero (%0d,%0d), expected position %0d", zk, zf, zero_pos));
    u_bfm.read(A_LAST, d);
    check(!d[24], "last finder measurement is in range");

    // 3. scan across the window
    check_scan(SCAN_N, SCAN_STEP, zero_pos, 1'b1);

    // 4. sliding scale off
    backpressure = 1'b0;
    check_scan(4, 211, zero_pos, 1'b0);
    check(dut.u_asic.g_ch[0].u_ch.ph_s == 0 && dut.u_asic.g_ch[0].u_ch.ph_f == 0, "phases zero with sliding scale off");
    check(serr == '0, "no ring state errors");

    $display("mechanisms: measurements %0d, overflows %0d, coarse steps %0d, fine steps %0d, carries %0d, phase changes %0d, stalls %0d, DAC writes %0d",
             n_meas, n_ovf, n_coarse_step, n_fine_step, n_carry, n_phase_change, n_stall, dac_writes);
    check(n_ovf > 0, "overflow seen");
    check(n_coarse_step > 0, "coarse finder steps seen");
    check(n_fine_step > 0, "fine finder steps seen");
    check(n_carry > 0, "fine-to-coarse carry seen");
    check(n_phase_change > n_meas / 2, "sliding-scale phase changes seen");
    check(n_stall > 0, "stream back-pressure seen");
    check(dac_writes == 4, "DAC writes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
