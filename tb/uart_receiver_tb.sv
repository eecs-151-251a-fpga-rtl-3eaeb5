// uart_receiver_tb: at 16 clock cycles per bit, drives random 8N1 frames onto
// serial_in (with a +-2 cycle skew on some bit times), checks each received
// byte and that data_out_valid rises within one bit time after the stop bit's
// middle. The consumer holds data_out_ready low for random stretches: the byte
// must stay offered until taken. A short low glitch on the idle line must not
// produce a byte.
module uart_receiver_tb;
  localparam int unsigned CLK = 1600, BAUD = 100, T = CLK / BAUD;
  logic       clk = 1'b0, reset = 1'b1, serial_in = 1'b1;
  logic [7:0] data_out;
  logic       data_out_valid, data_out_ready = 1'b0;
  int         checks = 0, failures = 0;
  logic [7:0] sent [$];

  uart_receiver #(.CLOCK_FREQ(CLK), .BAUD_RATE(BAUD)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  task automatic send(input logic [7:0] b, input int skew);
    logic [9:0] frame = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      @(negedge clk) serial_in = frame[i];
      repeat (T - 1 + ((i == 4) ? skew : 0)) @(negedge clk);
    end
  endtask

  // consumer
  always @(negedge clk) data_out_ready <= 1'($urandom % 4 == 0);
  always @(posedge clk) if (!reset && data_out_valid && data_out_ready) begin
    check(sent.size() > 0, "byte received that was not sent");
    if (sent.size() > 0) begin
      automatic logic [7:0] e = sent.pop_front();
      check(data_out == e, $sformatf("received %h expected %h", data_out, e));
    end
  end

  // valid holds until the handshake
  logic valid_d = 1'b0, ready_d = 1'b0;
  logic [7:0] data_d = '0;
  always @(posedge clk) begin
    if (!reset && valid_d && !ready_d) begin
      check(data_out_valid && data_out == data_d, "offered byte withdrawn or changed");
    end
    valid_d <= data_out_valid; ready_d <= data_out_ready; data_d <= data_out;
  end

  initial begin
    repeat (3) @(negedge clk);
    reset = 1'b0;
    // glitch shorter than half a bit
    @(negedge clk) serial_in = 1'b0;
    repeat (T / 4) @(negedge clk);
    serial_in = 1'b1;
    repeat (2 * T) @(negedge clk);
    check(!data_out_valid, "glitch ignored");
    for (int n = 0; n < 40; n++) begin
      automatic logic [7:0] b = 8'($urandom);
      int wait_c;
      sent.push_back(b);
      send(b, int'($urandom % 5) - 2);
      // line now high (stop bit); valid must appear within one bit time
      wait_c = 0;
      while (sent.size() != 0 && !data_out_valid && wait_c < T) begin
        @(negedge clk); wait_c++;
      end
      check(sent.size() == 0 || data_out_valid, "data_out_valid after the stop bit");
      // let the consumer take it before the next frame
      while (sent.size() != 0) @(negedge clk);
      repeat ($urandom % 8) @(negedge clk);
    end
    check(sent.size() == 0, "all bytes received");
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
