// uart_transmitter_tb: at 8 clock cycles per bit, sends random bytes (some
// back to back, some with idle gaps) and samples serial_out in the middle of
// every bit time to rebuild each 8N1 frame. Checks start bit, data bits
// (LSB first), stop bit, the idle-high line, that ready is low for exactly
// ten bit times per byte, and that bits last exactly 8 cycles.
module uart_transmitter_tb;
  localparam int unsigned CLK = 800, BAUD = 100, T = CLK / BAUD;
  logic       clk = 1'b0, reset = 1'b1;
  logic [7:0] data_in = '0;
  logic       data_in_valid = 1'b0, data_in_ready, serial_out;
  int         checks = 0, failures = 0;

  uart_transmitter #(.CLOCK_FREQ(CLK), .BAUD_RATE(BAUD)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    reset = 1'b0;
    @(negedge clk);
    check(serial_out == 1'b1 && data_in_ready, "idle: line high, ready");
    for (int n = 0; n < 30; n++) begin
      automatic logic [7:0] b = 8'($urandom);
      int busy;
      data_in = b;
      data_in_valid = 1'b1;
      @(negedge clk);          // handshake happened at the last edge
      data_in_valid = 1'b0;
      data_in = 8'($urandom);  // must not matter any more
      // now at start of start bit; sample in the middle of each bit
      busy = 0;
      for (int bit_i = 0; bit_i < 10; bit_i++) begin
        logic expected;
        expected = (bit_i == 0) ? 1'b0 : (bit_i == 9) ? 1'b1 : b[bit_i - 1];
        for (int c = 0; c < T; c++) begin
          if (c == 0 || c == T - 1 || c == T / 2)
            check(serial_out == expected, $sformatf("byte %h bit %0d cycle %0d", b, bit_i, c));
          if (!data_in_ready) busy++;
          @(negedge clk);
        end
      end
      check(busy == 10 * T, $sformatf("busy for %0d cycles", busy));
      check(data_in_ready && serial_out, "ready and idle after stop bit");
      if (n % 3 == 0) repeat ($urandom % 20) begin
        @(negedge clk);
        check(serial_out == 1'b1, "idle line high");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
