// piano_tb: drives the fixed-note-length piano through models of its two
// FIFOs (the RX model has a registered dout valid the cycle after rd_en; the
// TX model's full flag is driven by the testbench). A note length of 40
// cycles, a step of 10 and an 8-bit length register keep it short.
// Checked:
//   - every character is echoed unchanged, in order, and never into a full
//     TX FIFO; the echo waits while full is held high (stall counted);
//   - each note sounds for exactly note_length cycles with the period of its
//     key (computed here from equal temperament, +-1), and the next character
//     is not fetched before the note ends;
//   - buttons[0] with switches[0]=1/0 lengthens/shortens the note by the step,
//     saturating at the step (bottom) and at 255 (top of the register).
module piano_tb;
  localparam int unsigned CLK = 125_000_000;
  localparam int unsigned DEF = 40, STEP = 10;

  logic        clk = 1'b0, rst = 1'b1;
  logic [7:0]  rx_fifo_dout = '0, tx_fifo_din;
  logic        rx_fifo_empty, rx_fifo_rd_en, tx_fifo_wr_en, tx_fifo_full = 1'b0;
  logic [23:0] tone_switch_period;
  logic        tone_enable;
  logic [2:0]  buttons = '0;
  logic [1:0]  switches = '0;
  logic [5:0]  leds;
  int          checks = 0, failures = 0;
  int          stall_cycles = 0, notes = 0;
  logic [7:0]  rxq [$];
  logic [7:0]  echo_expect [$];
  int          last_len = 0, run = 0;
  logic [23:0] run_period = '0;

  piano #(.CLOCK_FREQ(CLK), .NOTE_LENGTH_WIDTH(8), .NOTE_LENGTH_DEFAULT(DEF),
          .NOTE_LENGTH_STEP(STEP)) dut (.*);

  always #5 clk = ~clk;
  assign rx_fifo_empty = (rxq.size() == 0);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  function automatic int expected_period(input logic [7:0] c);
    string lower = "zsxdcvgbhnjm", upper = "q2w3er5t6y7ui";
    int n = -1;
    for (int k = 0; k < 12; k++) if (lower[k] == c) n = 48 + k;
    for (int k = 0; k < 13; k++) if (upper[k] == c) n = 60 + k;
    if (c == "," || c == "<") n = 60;
    if (n < 0) return 0;
    return $rtoi(real'(CLK) / (2.0 * 440.0 * $pow(2.0, (n - 69) / 12.0)) + 0.5);
  endfunction

  always @(posedge clk) if (!rst) begin
    // FIFO models
    if (rx_fifo_rd_en) begin
      check(rxq.size() > 0, "read from empty RX FIFO");
      check(!tone_enable, "character fetched while a note plays");
      if (rxq.size() > 0) rx_fifo_dout <= rxq.pop_front();
    end
    if (tx_fifo_wr_en) begin
      check(!tx_fifo_full, "echo into full TX FIFO");
      check(echo_expect.size() > 0 && tx_fifo_din == echo_expect[0],
            $sformatf("echo %h", tx_fifo_din));
      if (echo_expect.size() > 0) void'(echo_expect.pop_front());
    end
    if (leds[1]) stall_cycles++;
    // note duration
    if (tone_enable) begin
      if (run > 0) check(tone_switch_period == run_period, "period changed within a note");
      run_period = tone_switch_period;
      run++;
    end else if (run > 0) begin
      last_len = run;
      notes++;
      run = 0;
    end
  end

  task automatic play(input logic [7:0] c, input int len);
    int target;
    rxq.push_back(c);
    echo_expect.push_back(c);
    target = notes + rxq.size() + (run > 0 ? 1 : 0);
    while (notes < target) @(negedge clk);
    check(last_len == len, $sformatf("note '%s' lasted %0d, expected %0d", c, last_len, len));
    check(int'(run_period) >= expected_period(c) - 1 && int'(run_period) <= expected_period(c) + 1,
          $sformatf("note '%s' period %0d expected %0d", c, run_period, expected_period(c)));
  endtask

  task automatic press(input bit up, input int times);
    switches[0] = up;
    repeat (times) begin
      @(negedge clk) buttons[0] = 1'b1;
      @(negedge clk) buttons[0] = 1'b0;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    check(leds[5] && !leds[0], "default note length after reset");
    play("q", DEF);
    play("z", DEF);
    play("y", DEF);
    // several characters queued at once
    rxq.push_back("w"); echo_expect.push_back("w");
    rxq.push_back("e"); echo_expect.push_back("e");
    play("r", DEF);
    check(notes == 6, "queued characters all played");
    // longer and shorter notes
    press(1, 2);
    play("t", DEF + 2 * STEP);
    press(0, 3);
    play("u", DEF - STEP);
    // bottom saturation
    press(0, 10);
    check(leds[3], "note length at its minimum");
    play("i", STEP);
    // top saturation: 8-bit register tops out at 255
    press(1, 40);
    check(leds[4], "note length at its maximum");
    play("x", 255);
    press(0, 1);
    play("c", 255 - STEP);
    // TX FIFO full: the echo and the note wait
    press(1, 30);
    press(0, 20);
    tx_fifo_full = 1'b1;
    rxq.push_back("v"); echo_expect.push_back("v");
    repeat (50) begin
      @(negedge clk);
      check(!tone_enable, "no note while the echo is blocked");
    end
    check(stall_cycles >= 45, $sformatf("stall seen for %0d cycles", stall_cycles));
    tx_fifo_full = 1'b0;
    begin
      automatic int n0 = notes;
      while (notes == n0) @(negedge clk);
      check(last_len == 255 - 20 * STEP, $sformatf("note after stall lasted %0d", last_len));
    end
    // a character outside the map is echoed and plays silence
    play("A", 255 - 20 * STEP);
    check(echo_expect.size() == 0, "all echoes seen");
    // reset restores the default length
    @(negedge clk) rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    check(leds[5], "reset restores the default note length");
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
