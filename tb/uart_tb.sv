// uart_tb: loops the UART's serial output back to its serial input (at 10
// cycles per bit) and streams random bytes through the transmitter while a
// consumer with random ready takes bytes from the receiver. Every byte must
// come back in order; the consumer drains each byte before the next frame
// ends, so none is overwritten. Also checks the idle line after reset.
module uart_tb;
  localparam int unsigned CLK = 1000, BAUD = 100;
  logic       clk = 1'b0, reset = 1'b1;
  logic [7:0] data_in = '0, data_out;
  logic       data_in_valid = 1'b0, data_in_ready;
  logic       data_out_valid, data_out_ready = 1'b0;
  logic       serial_in, serial_out;
  int         checks = 0, failures = 0, received = 0;
  logic [7:0] sent [$];

  uart #(.CLOCK_FREQ(CLK), .BAUD_RATE(BAUD)) dut (.*);

  assign serial_in = serial_out;
  always #5 clk = ~clk;

  always @(negedge clk) data_out_ready <= 1'($urandom % 3 == 0);
  always @(posedge clk) if (!reset && data_out_valid && data_out_ready) begin
    checks++;
    received++;
    if (sent.size() == 0 || data_out != sent[0]) begin
      failures++;
      $display("FAIL %0t: got %h", $time, data_out);
    end
    if (sent.size() > 0) void'(sent.pop_front());
  end

  initial begin
    repeat (3) @(negedge clk);
    reset = 1'b0;
    repeat (2) @(negedge clk);
    checks++;
    if (serial_out !== 1'b1) begin failures++; $display("FAIL: line not idle high"); end
    for (int n = 0; n < 50; n++) begin
      data_in = 8'($urandom);
      data_in_valid = 1'b1;
      @(posedge clk);
      while (!data_in_ready) @(posedge clk);
      sent.push_back(data_in);
      @(negedge clk);
      data_in_valid = 1'b0;
      if ($urandom % 2) repeat ($urandom % 30) @(negedge clk);
    end
    repeat (300) @(negedge clk);
    checks++;
    if (received != 50) begin failures++; $display("FAIL: received %0d of 50", received); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
