`timescale 1ps / 1fs
// sliding_scale_gen_tb: runs a reference LFSR next to the block and checks
// the three starting phases and their cell patterns after every `next`, that
// the phases hold without `next`, that they are zero when the sliding scale
// is off, and that all 16 phases occur.
module sliding_scale_gen_tb;
  localparam logic [31:0] SEED = 32'hACE1_2345;
  logic clk = 1'b0, rst_n = 1'b0, next = 1'b0, en = 1'b1;
  logic [3:0] ph_c, ph_s, ph_f;
  logic [7:0] pat_c, pat_s, pat_f;
  logic [31:0] ref_lfsr;
  logic [15:0] seen;
  int checks = 0, failures = 0;

  always #2500 clk = ~clk;

  sliding_scale_gen #(.LFSR_SEED(SEED)) dut (
    .clk(clk), .rst_n(rst_n), .next(next), .en(en),
    .ph_coarse(ph_c), .ph_slow(ph_s), .ph_fast(ph_f),
    .pat_coarse(pat_c), .pat_slow(pat_s), .pat_fast(pat_f)
  );

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

  task automatic compare(input string tag);
    logic [3:0] ec, es, ef;
    ec = en ? ref_lfsr[3:0] : 4'd0;
    es = en ? ref_lfsr[11:8] : 4'd0;
    ef = en ? ref_lfsr[19:16] : 4'd0;
    check(ph_c == ec && ph_s == es && ph_f == ef, $sformatf("%s phases %0d %0d %0d exp %0d %0d %0d", tag, ph_c, ph_s, ph_f, ec, es, ef));
    check(pat_c == pattern(ec) && pat_s == pattern(es) && pat_f == pattern(ef), {tag, " patterns"});
  endtask

  initial begin
    ref_lfsr = SEED;
    seen = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    compare("reset");
    for (int n = 0; n < 200; n++) begin
      next = 1'b1;
      @(negedge clk);
      next = 1'b0;
      // x^32 + x^22 + x^2 + x + 1, Galois form shifting right
      ref_lfsr = {1'b0, ref_lfsr[31:1]} ^ (ref_lfsr[0] ? 32'h8020_0003 : 32'd0);
      compare($sformatf("step %0d", n));
      seen[ph_s] = 1'b1;
      if (n % 7 == 0) begin
        repeat (3) @(negedge clk);
        compare("hold");
      end
    end
    check(seen == 16'hFFFF, "all 16 slow phases occur");
    en = 1'b0;
    #1;
    compare("disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
