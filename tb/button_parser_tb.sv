// button_parser_tb: presses each of four buttons with contact bounce at both
// ends and checks that each press yields exactly one single-cycle pulse on its
// own output bit, no pulse on release, and none for short glitches.
module button_parser_tb;
  localparam int unsigned S = 8, P = 4;
  logic       clk = 1'b0;
  logic [3:0] in = '0, out;
  int         checks = 0, failures = 0;
  int         pulses [4] = '{default: 0};

  button_parser #(.WIDTH(4), .SAMPLE_CNT_MAX(S), .PULSE_CNT_MAX(P)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) for (int b = 0; b < 4; b++) if (out[b]) pulses[b]++;

  task automatic bounce(input int b, input bit level);
    for (int k = 0; k < 6; k++) begin
      @(negedge clk) in[b] = 1'($urandom);
    end
    @(negedge clk) in[b] = level;
  endtask

  initial begin
    repeat (5) @(posedge clk);
    for (int b = 0; b < 4; b++) begin
      for (int n = 0; n < 2; n++) begin
        bounce(b, 1'b1);
        repeat (S * (P + 3)) @(negedge clk);
        bounce(b, 1'b0);
        repeat (S * 3) @(negedge clk);
      end
      // short glitch
      @(negedge clk) in[b] = 1'b1;
      repeat (S) @(negedge clk);
      in[b] = 1'b0;
      repeat (S * 2) @(negedge clk);
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (pulses[c] != ((c <= b) ? 2 : 0)) begin
          failures++;
          $display("FAIL: after button %0d, bit %0d pulsed %0d times", b, c, pulses[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // a pulse lasts one cycle
  logic [3:0] out_d = '0;
  always @(posedge clk) begin
    if (|(out & out_d)) begin failures++; $display("FAIL: pulse longer than a cycle"); end
    out_d <= out;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
