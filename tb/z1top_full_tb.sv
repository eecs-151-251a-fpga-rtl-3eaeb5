// z1top_full_tb: one complete piano operation on the top level with every
// parameter at its default (125 MHz clock, 115200 baud, 16-deep FIFOs,
// 1/5 s notes, 30 ms debounce).
//
// Registers start at random values, so whatever the top does before the
// reset press is ignored. The host presses the reset button (BUTTONS[3]) for 35 ms, sends the
// character 'q' as a serial frame at 115200 baud (1085 cycles per bit), and
// then checks that 'q' is echoed on FPGA_SERIAL_TX, that the note lasts
// exactly 25,000,000 cycles (LEDS[0]), and that aud_pwm toggles every
// 238,891 cycles (C4 = 261.626 Hz at 125 MHz), within one cycle. About 30
// million clock cycles are simulated.
module z1top_full_tb;
  localparam int unsigned CLK  = 125_000_000;
  localparam int unsigned TBIT = CLK / 115_200;
  localparam int unsigned NOTE = CLK / 5;
  localparam int unsigned HALF = 238_891;

  logic       clk = 1'b0;
  logic [3:0] buttons = '0;
  logic [5:0] leds;
  logic       aud, rx_line = 1'b1, tx_line;
  int         checks = 0, failures = 0;
  bit         armed = 1'b0;  // set once the first reset has settled

  z1top dut (
    .CLK_125MHZ_FPGA(clk), .BUTTONS(buttons), .SWITCHES(2'b00), .LEDS(leds),
    .aud_pwm(aud), .FPGA_SERIAL_RX(rx_line), .FPGA_SERIAL_TX(tx_line));

  always #4 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // host receiver
  logic [7:0] echo = '0;
  int         n_echo = 0;
  initial begin
    forever begin
      @(negedge tx_line);
      repeat (TBIT / 2) @(posedge clk);
      if (tx_line == 1'b0) begin
        for (int i = 0; i < 8; i++) begin
          repeat (TBIT) @(posedge clk);
          echo[i] = tx_line;
        end
        repeat (TBIT) @(posedge clk);
        if (armed) check(tx_line == 1'b1, "echo stop bit");
        n_echo++;
      end
    end
  end

  // note monitor
  int   len = 0, half = 0, half_run = -1, n_notes = 0, last_len = 0, last_half = 0;
  logic aud_d = 1'b0, playing_d = 1'b0;
  always @(posedge clk) begin
    if (leds[0]) begin
      len++;
      if (aud != aud_d) begin
        if (half_run > 0 && half == 0) half = half_run;
        half_run = 0;
      end
      if (half_run >= 0) half_run++;
    end else if (playing_d) begin
      last_len = len; last_half = half; n_notes++;
      len = 0; half = 0; half_run = -1;
    end
    aud_d <= aud;
    playing_d <= leds[0];
  end

  initial begin
    logic [9:0] frame;
    int         base_notes;
    repeat (10) @(negedge clk);
    buttons[3] = 1'b1;
    repeat (CLK / 1000 * 35) @(negedge clk);
    buttons[3] = 1'b0;
    repeat (1000) @(negedge clk);
    check(leds[5] && !leds[0], "default note length after reset");
    // registers start random in simulation: ignore anything before the reset
    repeat (12 * TBIT) @(negedge clk);
    base_notes = n_notes;
    n_echo = 0;
    armed = 1'b1;
    frame = {1'b1, 8'("q"), 1'b0};
    for (int i = 0; i < 10; i++) begin
      @(negedge clk) rx_line = frame[i];
      repeat (TBIT - 1) @(negedge clk);
    end
    while (n_notes == base_notes) @(negedge clk);
    check(n_echo == 1 && echo == "q", $sformatf("echo %0d bytes, last %h", n_echo, echo));
    check(last_len == NOTE, $sformatf("note lasted %0d cycles, expected %0d", last_len, NOTE));
    check(last_half >= HALF - 1 && last_half <= HALF + 1,
          $sformatf("half period %0d, expected %0d", last_half, HALF));
    repeat (100) @(negedge clk);
    check(aud == 1'b0 && !leds[0], "silent after the note");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
