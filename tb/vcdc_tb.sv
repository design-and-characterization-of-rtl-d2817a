`timescale 1ps / 1fs
// vcdc_tb: checks the delay cell model: set/reset force the output at once,
// an enabled cell follows its input after the nominal delay, the control
// code and trim change the delay by their slopes, a disabled cell holds, and
// out_n is the complement.
module vcdc_tb;
  logic in_p = 1'b0, en = 1'b0, set = 1'b0, rst = 1'b0;
  logic [11:0] vctrl = 12'd2048;
  logic [3:0]  trim = 4'd8;
  logic out_p, out_n;
  int checks = 0, failures = 0;

  vcdc #(.T_NOM_PS(50.0)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // toggle the input and check the output changes between d-0.3 and d+0.3 ps
  task automatic edge_delay(input real d);
    logic v;
    v = ~out_p;
    in_p = v;
    #(d - 0.3);
    check(out_p != v, $sformatf("no change before %0.2f ps", d));
    #0.6;
    check(out_p == v, $sformatf("change by %0.2f ps", d));
    check(out_n == ~out_p, "out_n complement");
    #100;
  endtask

  initial begin
    rst = 1'b1; #10; check(out_p == 1'b0, "reset");
    rst = 1'b0; set = 1'b1; #1; check(out_p == 1'b1, "set acts at once");
    set = 1'b0; rst = 1'b1; #1; check(out_p == 1'b0, "reset acts at once");
    rst = 1'b0; #10;
    en = 1'b1;
    edge_delay(50.0);
    edge_delay(50.0);
    vctrl = 12'd3048; edge_delay(45.0);   // 1000 LSB * 0.005 ps faster
    vctrl = 12'd1048; edge_delay(55.0);
    vctrl = 12'd2048; trim = 4'd12; edge_delay(48.0);  // 4 * 0.5 ps faster
    trim = 4'd8;
    // disabled cell holds its value
    en = 1'b0; in_p = ~out_p; #200;
    check(out_p != in_p, "disabled cell holds");
    en = 1'b1; #49.7; check(out_p != in_p, "released cell waits one delay");
    #0.6; check(out_p == in_p, "released cell follows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
