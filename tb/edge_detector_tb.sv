// edge_detector_tb: drives random 4-bit levels and checks that each output bit
// pulses exactly in the cycles where its input is 1 and was 0 the cycle before.
module edge_detector_tb;
  logic       clk = 1'b0;
  logic [3:0] signal_in = '0, edge_detect_pulse;
  logic [3:0] prev = '0;
  int         checks = 0, failures = 0, rises = 0;

  edge_detector #(.WIDTH(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    for (int i = 0; i < 1000; i++) begin
      #1 signal_in = 4'($urandom);
      #1;
      checks++;
      if (edge_detect_pulse !== (signal_in & ~prev)) begin
        failures++;
        $display("FAIL %0t: in=%b prev=%b pulse=%b", $time, signal_in, prev, edge_detect_pulse);
      end
      if (|(signal_in & ~prev)) rises++;
      @(posedge clk);
      prev = signal_in;
    end
    checks++;
    if (rises == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
