// piano_variable_tb: feeds key press (0x80, key) and key release (0x81, key)
// packets through a model of the RX FIFO (registered dout) and checks the
// note state after each packet: a press starts the key's note when none is
// playing; a press while playing and a release of another key are discarded;
// the matching release stops the note; stray bytes where a header is
// expected are dropped. Includes several keys pressed before any release.
// The note's period is compared with an equal-tempered reference (+-1).
module piano_variable_tb;
  localparam int unsigned CLK = 125_000_000;
  logic        clk = 1'b0, rst = 1'b1;
  logic [7:0]  rx_fifo_dout = '0;
  logic        rx_fifo_empty, rx_fifo_rd_en;
  logic [23:0] tone_switch_period;
  logic        tone_enable;
  logic [5:0]  leds;
  int          checks = 0, failures = 0;
  int          starts = 0, stops = 0, discarded_press = 0;
  logic [7:0]  rxq [$];

  piano_variable #(.CLOCK_FREQ(CLK)) dut (.*);

  always #5 clk = ~clk;
  assign rx_fifo_empty = (rxq.size() == 0);

  always @(posedge clk) if (!rst && rx_fifo_rd_en) begin
    checks++;
    if (rxq.size() == 0) begin failures++; $display("FAIL: read from empty FIFO"); end
    else rx_fifo_dout <= rxq.pop_front();
  end

  logic en_d = 1'b0;
  always @(posedge clk) begin
    if (!rst && tone_enable && !en_d) starts++;
    if (!rst && !tone_enable && en_d) stops++;
    en_d <= tone_enable;
  end

  function automatic int expected_period(input logic [7:0] c);
    string lower = "zsxdcvgbhnjm", upper = "q2w3er5t6y7ui";
    int n = -1;
    for (int k = 0; k < 12; k++) if (lower[k] == c) n = 48 + k;
    for (int k = 0; k < 13; k++) if (upper[k] == c) n = 60 + k;
    if (c == "," || c == "<") n = 60;
    if (n < 0) return 0;
    return $rtoi(real'(CLK) / (2.0 * 440.0 * $pow(2.0, (n - 69) / 12.0)) + 0.5);
  endfunction

  task automatic send(input logic [7:0] a, input logic [7:0] b);
    rxq.push_back(a);
    rxq.push_back(b);
    while (rxq.size() != 0) @(negedge clk);
    repeat (3) @(negedge clk);
  endtask

  task automatic expect_note(input bit on, input logic [7:0] key, input string what);
    checks++;
    if (tone_enable !== on || leds[0] !== on) begin
      failures++;
      $display("FAIL %0t: %s: playing=%b expected %b", $time, what, tone_enable, on);
    end
    if (on) begin
      checks++;
      if (int'(tone_switch_period) < expected_period(key) - 1 ||
          int'(tone_switch_period) > expected_period(key) + 1) begin
        failures++;
        $display("FAIL %0t: %s: period %0d expected %0d", $time, what, tone_switch_period,
                 expected_period(key));
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    expect_note(0, 0, "idle after reset");
    send(8'h80, "q");  expect_note(1, "q", "press q");
    send(8'h81, "q");  expect_note(0, 0, "release q");
    send(8'h81, "w");  expect_note(0, 0, "release while idle");
    send(8'h80, "z");  expect_note(1, "z", "press z");
    send(8'h80, "w");  expect_note(1, "z", "second press discarded");
    discarded_press++;
    send(8'h81, "w");  expect_note(1, "z", "release of other key discarded");
    send(8'h81, "z");  expect_note(0, 0, "release z");
    // stray byte, then a packet: parser must resynchronise
    rxq.push_back("k");
    send(8'h80, "y");  expect_note(1, "y", "press after stray byte");
    // several keys down before any release
    send(8'h80, "e");  expect_note(1, "y", "press e while y plays");
    send(8'h80, "r");  expect_note(1, "y", "press r while y plays");
    send(8'h81, "y");  expect_note(0, 0, "release y");
    send(8'h81, "e");  expect_note(0, 0, "release e after y");
    send(8'h80, "r");  expect_note(1, "r", "press r again");
    // back-to-back packets in the FIFO at once
    rxq.push_back(8'h81); rxq.push_back("r"); rxq.push_back(8'h80);
    send("u", 8'h81);
    expect_note(1, "u", "burst: release r, press u, release header pending");
    send("u", 8'h00);  // key of the pending release, then a stray byte
    expect_note(0, 0, "release u completed across bursts");
    checks++;
    if (starts != 5 || stops != 5) begin
      failures++;
      $display("FAIL: %0d note starts, %0d stops", starts, stops);
    end
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
