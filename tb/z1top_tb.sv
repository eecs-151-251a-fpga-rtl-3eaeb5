// z1top_tb: end-to-end test of the UART piano at reduced sizes.
//
// The clock parameter is set to 1.152 MHz so that 115200 baud is exactly 10
// cycles per bit, the default note is 20000 cycles with a 5000-cycle step, and
// the debouncer samples every 4 cycles with a threshold of 3. The testbench
// acts as the host: it sends characters as serial frames on FPGA_SERIAL_RX,
// decodes the echo on FPGA_SERIAL_TX and watches aud_pwm and LEDS. Two tops
// are simulated: the default fixed-note-length build and the variable-note-
// length build.
// Registers start at random values, so everything the tops do before the
// first reset press is discarded.
// Mechanisms that must each occur (counted, a failure if never seen):
//   reset from the button, echo of every character in order, a note of the
//   right length and pitch, the RX FIFO filling up while a long note plays
//   (18 characters typed during one note, none lost), lengthening and
//   shortening of the note with BUTTONS[0]/SWITCHES[0], saturation at the
//   shortest length, reset during a note, and in the variable build a note
//   held from key press to key release with other packets discarded.
// The TX FIFO never fills in this system (echoes leave at the rate characters
// arrive); the piano's wait on a full TX FIFO is exercised in piano_tb.
module z1top_tb;
  localparam int unsigned CLK   = 1_152_000;
  localparam int unsigned BAUD  = 115_200;
  localparam int unsigned TBIT  = CLK / BAUD;
  localparam int unsigned NOTE  = 20_000;
  localparam int unsigned STEP  = 5_000;
  localparam int unsigned S = 4, P = 3;

  logic       clk = 1'b0;
  logic [3:0] buttons = '0, buttons_v = '0;
  logic [1:0] switches = '0;
  logic [5:0] leds, leds_v;
  logic       aud, aud_v;
  logic       rx_line = 1'b1, tx_line, rx_line_v = 1'b1, tx_line_v;
  int         checks = 0, failures = 0;
  bit         armed = 1'b0;  // set once the first reset has settled

  z1top #(.CLOCK_FREQ(CLK), .BAUD_RATE(BAUD), .NOTE_LENGTH_DEFAULT(NOTE),
          .NOTE_LENGTH_STEP(STEP), .B_SAMPLE_CNT_MAX(S), .B_PULSE_CNT_MAX(P)) dut (
    .CLK_125MHZ_FPGA(clk), .BUTTONS(buttons), .SWITCHES(switches), .LEDS(leds),
    .aud_pwm(aud), .FPGA_SERIAL_RX(rx_line), .FPGA_SERIAL_TX(tx_line));

  z1top #(.CLOCK_FREQ(CLK), .BAUD_RATE(BAUD), .VARIABLE_NOTE_LENGTH(1'b1),
          .B_SAMPLE_CNT_MAX(S), .B_PULSE_CNT_MAX(P)) dut_v (
    .CLK_125MHZ_FPGA(clk), .BUTTONS(buttons_v), .SWITCHES(2'b00), .LEDS(leds_v),
    .aud_pwm(aud_v), .FPGA_SERIAL_RX(rx_line_v), .FPGA_SERIAL_TX(tx_line_v));

  always #5 clk = ~clk;

  // mechanism counters
  int n_reset = 0, n_echo = 0, n_notes = 0, n_rx_full = 0, n_longer = 0, n_shorter = 0;
  int n_min = 0, n_reset_mid_note = 0, n_var_hold = 0, n_var_discard = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // equal-tempered half period of a key at this clock (reference for aud_pwm)
  function automatic int expected_period(input logic [7:0] c);
    string lower = "zsxdcvgbhnjm", upper = "q2w3er5t6y7ui";
    int n = -1;
    for (int k = 0; k < 12; k++) if (lower[k] == c) n = 48 + k;
    for (int k = 0; k < 13; k++) if (upper[k] == c) n = 60 + k;
    if (c == "," || c == "<") n = 60;
    if (n < 0) return 0;
    return $rtoi(real'(CLK) / (2.0 * 440.0 * $pow(2.0, (n - 69) / 12.0)) + 0.5);
  endfunction

  // host transmitter
  task automatic host_send(ref logic line, input logic [7:0] b);
    logic [9:0] frame;
    frame = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      @(negedge clk) line = frame[i];
      repeat (TBIT - 1) @(negedge clk);
    end
  endtask

  // host receiver on the echo line
  logic [7:0] echo_q [$];
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge tx_line);
      repeat (TBIT / 2) @(posedge clk);
      if (tx_line == 1'b0) begin
        for (int i = 0; i < 8; i++) begin
          repeat (TBIT) @(posedge clk);
          b[i] = tx_line;
        end
        repeat (TBIT) @(posedge clk);
        if (armed) check(tx_line == 1'b1, "echo stop bit");
        echo_q.push_back(b);
      end
    end
  end

  // note monitor on the fixed build: length from LEDS[0], pitch from aud_pwm
  int      note_len [$];
  int      note_half [$];
  int      run = 0, half = 0, half_run = 0;
  logic    aud_d = 1'b0, playing_d = 1'b0;
  always @(posedge clk) begin
    if (leds[0]) begin
      run++;
      if (aud != aud_d) begin
        if (half_run > 0 && half == 0) half = half_run;  // first full half period
        half_run = 0;
      end
      half_run++;
    end else if (playing_d) begin
      note_len.push_back(run);
      note_half.push_back(half);
      run = 0; half = 0; half_run = -1;
      n_notes++;
    end else begin
      half_run = -1;
    end
    if (dut.rx_fifo_full) n_rx_full++;
    aud_d <= aud;
    playing_d <= leds[0];
  end

  task automatic press(ref logic [3:0] btn, input int b);
    @(negedge clk) btn[b] = 1'b1;
    repeat (S * (P + 2)) @(negedge clk);
    btn[b] = 1'b0;
    repeat (S * 2) @(negedge clk);
  endtask

  task automatic wait_notes(input int n);
    int guard = 0;
    while (note_len.size() < n && guard < 2_000_000) begin @(negedge clk); guard++; end
    check(note_len.size() >= n, $sformatf("%0d notes finished, expected %0d", note_len.size(), n));
  endtask

  task automatic check_note(input logic [7:0] c, input int len);
    int l, h;
    wait_notes(1);
    l = note_len.pop_front();
    h = note_half.pop_front();
    check(l == len, $sformatf("note '%s' lasted %0d cycles, expected %0d", c, l, len));
    check(h >= expected_period(c) - 1 && h <= expected_period(c) + 1,
          $sformatf("note '%s' half period %0d, expected %0d", c, h, expected_period(c)));
  endtask

  task automatic check_echo(input logic [7:0] c);
    int guard = 0;
    while (echo_q.size() == 0 && guard < 100_000) begin @(negedge clk); guard++; end
    check(echo_q.size() > 0 && echo_q[0] == c,
          $sformatf("echo of '%s' (got %0d bytes)", c, echo_q.size()));
    if (echo_q.size() > 0) begin void'(echo_q.pop_front()); n_echo++; end
  endtask

  initial begin
    string burst;
    repeat (5) @(negedge clk);
    // reset both tops from BUTTONS[3]
    press(buttons, 3);
    press(buttons_v, 3);
    n_reset++;
    check(leds[5] && !leds[0], "default note length after reset");
    // registers start random in simulation: forget whatever the tops did
    // before their first reset (an echo frame may still be in decoding)
    repeat (12 * TBIT) @(negedge clk);
    echo_q.delete();
    note_len.delete();
    note_half.delete();
    n_rx_full = 0;
    armed = 1'b1;
    // one character: echo, note length and pitch
    host_send(rx_line, "q");
    check_echo("q");
    check_note("q", NOTE);
    // 18 characters typed during one note: the RX FIFO fills and drains
    burst = "zxcvbnm,qwertyuiop";
    for (int i = 0; i < burst.len(); i++) host_send(rx_line, burst[i]);
    for (int i = 0; i < burst.len(); i++) check_echo(burst[i]);
    for (int i = 0; i < burst.len(); i++) check_note(burst[i], NOTE);
    check(n_rx_full > 0, "RX FIFO became full");
    check(echo_q.size() == 0, "no extra echoes");
    // longer note
    switches[0] = 1'b1;
    press(buttons, 0);
    host_send(rx_line, "w");
    check_echo("w");
    check_note("w", NOTE + STEP);
    n_longer++;
    // shorter notes down to the minimum
    switches[0] = 1'b0;
    press(buttons, 0);
    host_send(rx_line, "e");
    check_echo("e");
    check_note("e", NOTE);
    n_shorter++;
    repeat (6) press(buttons, 0);
    check(leds[3], "note length saturated at its minimum");
    host_send(rx_line, "y");
    check_echo("y");
    check_note("y", STEP);
    n_min++;
    // reset during a note
    switches[0] = 1'b1;
    press(buttons, 0);
    host_send(rx_line, "u");
    check_echo("u");
    while (!leds[0]) @(negedge clk);
    repeat (100) @(negedge clk);
    press(buttons, 3);
    check(!leds[0] && leds[5], "reset stops the note and restores the length");
    n_reset_mid_note++;
    void'(note_len.pop_front()); void'(note_half.pop_front());
    host_send(rx_line, "i");
    check_echo("i");
    check_note("i", NOTE);

    // variable-note-length build
    host_send(rx_line_v, 8'h80); host_send(rx_line_v, "t");
    repeat (20) @(negedge clk);
    check(leds_v[0], "variable: key press starts the note");
    host_send(rx_line_v, 8'h80); host_send(rx_line_v, "r");
    host_send(rx_line_v, 8'h81); host_send(rx_line_v, "r");
    repeat (20) @(negedge clk);
    check(leds_v[0] && dut_v.tone_switch_period == dut_v.g_variable.u_piano.u_rom.rom["t"],
          "variable: other press and release discarded");
    n_var_discard++;
    begin
      automatic int t0 = 0, toggles = 0;
      automatic logic a = aud_v;
      while (t0 < 20 * expected_period("t")) begin
        @(negedge clk); t0++;
        if (aud_v != a) toggles++;
        a = aud_v;
      end
      check(toggles >= 19 && toggles <= 21, $sformatf("variable: %0d toggles of aud_pwm", toggles));
    end
    host_send(rx_line_v, 8'h81); host_send(rx_line_v, "t");
    repeat (20) @(negedge clk);
    check(!leds_v[0], "variable: matching release stops the note");
    n_var_hold++;
    check(tx_line_v == 1'b1, "variable: no echo");

    // every mechanism seen
    check(n_reset > 0 && n_echo > 0 && n_notes > 0 && n_rx_full > 0 && n_longer > 0 &&
          n_shorter > 0 && n_min > 0 && n_reset_mid_note > 0 && n_var_hold > 0 &&
          n_var_discard > 0, "all mechanisms exercised");
    $display("mechanisms: reset=%0d echo=%0d notes=%0d rx_fifo_full_cycles=%0d longer=%0d shorter=%0d min=%0d reset_mid_note=%0d var_hold=%0d var_discard=%0d",
             n_reset, n_echo, n_notes, n_rx_full, n_longer, n_shorter, n_min, n_reset_mid_note,
             n_var_hold, n_var_discard);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
