`timescale 1ps / 1fs
// johnson_decoder_tb: exhaustive check over all 2^8 ring states.  The 16
// legal states are generated by stepping a Johnson counter from all-zero;
// they must decode to their step number and be legal, every other state
// must be flagged illegal.
module johnson_decoder_tb;
  localparam int N = 8;
  logic [N-1:0] state;
  logic [3:0] phase;
  logic legal;
  int checks = 0, failures = 0;
  int expect_ph [256];

  johnson_decoder #(.N_CELLS(N)) dut (.state(state), .phase(phase), .legal(legal));

  initial begin
    logic [N-1:0] s;
    for (int i = 0; i < 256; i++) expect_ph[i] = -1;
    s = '0;
    for (int p = 0; p < 2 * N; p++) begin
      expect_ph[s] = p;
      s = {s[N-2:0], ~s[N-1]};
    end
    for (int i = 0; i < 256; i++) begin
      state = N'(i);
      #1;
      checks++;
      if (expect_ph[i] >= 0) begin
        if (!legal || int'(phase) != expect_ph[i]) begin
          failures++;
          $display("FAIL state %b: phase %0d legal %0b, expected %0d", state, phase, legal, expect_ph[i]);
        end
      end else if (legal) begin
        failures++;
        $display("FAIL state %b flagged legal", state);
      end
    end
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
