// debouncer_tb: with a sample tick every 10 cycles and a threshold of 4
// samples, checks that short glitches never reach the output, that a steady
// press is reported within the expected window (4 to 5 sample periods after
// it starts), that the output stays high while held, and that it drops in the
// cycle after release.
module debouncer_tb;
  localparam int unsigned S = 10, P = 4;
  logic       clk = 1'b0;
  logic [1:0] glitchy_signal = '0, debounced_signal;
  int         checks = 0, failures = 0;

  debouncer #(.WIDTH(2), .SAMPLE_CNT_MAX(S), .PULSE_CNT_MAX(P)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    int t_high;
    repeat (5) @(posedge clk);
    // glitches: high for fewer than P*S-S cycles, low in between
    for (int g = 0; g < 40; g++) begin
      automatic int len = 1 + ($urandom % (S * (P - 1) - 1));
      @(negedge clk) glitchy_signal[0] = 1'b1;
      repeat (len) begin
        @(negedge clk);
        check(debounced_signal[0] == 1'b0, "glitch must not pass");
      end
      glitchy_signal[0] = 1'b0;
      repeat (2) @(negedge clk);
    end
    // steady press on bit 1
    @(negedge clk) glitchy_signal[1] = 1'b1;
    t_high = 0;
    while (!debounced_signal[1] && t_high < 10 * S * P) begin
      @(negedge clk);
      t_high++;
    end
    check(t_high >= S * (P - 1) && t_high <= S * (P + 1),
          $sformatf("press seen after %0d cycles", t_high));
    repeat (5 * S) begin
      @(negedge clk);
      check(debounced_signal[1] == 1'b1, "held press stays high");
    end
    check(debounced_signal[0] == 1'b0, "other bit unaffected");
    glitchy_signal[1] = 1'b0;
    @(negedge clk);
    check(debounced_signal[1] == 1'b0, "release drops the output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
