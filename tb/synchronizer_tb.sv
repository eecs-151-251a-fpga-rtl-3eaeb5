// synchronizer_tb: checks that every bit of the output equals the input as it
// was two rising edges earlier, for random 4-bit input changes.
module synchronizer_tb;
  logic       clk = 1'b0;
  logic [3:0] async_signal = '0, sync_signal;
  logic [3:0] hist [2] = '{default: '0};
  int         checks = 0, failures = 0;

  synchronizer #(.WIDTH(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    for (int i = 0; i < 500; i++) begin
      #1 async_signal = 4'($urandom);
      @(posedge clk);
      hist[1] = hist[0];
      hist[0] = async_signal;
      #1;
      if (i >= 2) begin
        checks++;
        if (sync_signal !== hist[1]) begin
          failures++;
          $display("FAIL %0t: sync=%h expected %h", $time, sync_signal, hist[1]);
        end
      end
    end
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
