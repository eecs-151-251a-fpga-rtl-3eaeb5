// tone_generator_tb: for several half periods, checks that the output toggles
// exactly every tone_switch_period cycles once enabled, and that it stays low
// while output_enable is low or the period is zero.
module tone_generator_tb;
  logic        clk = 1'b0, rst = 1'b1, output_enable = 1'b0;
  logic [23:0] tone_switch_period = '0;
  logic        square_wave_out;
  int          checks = 0, failures = 0;

  tone_generator dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    int periods [5] = '{1, 2, 3, 7, 50};
    repeat (2) @(negedge clk);
    rst = 1'b0;
    foreach (periods[k]) begin
      automatic int p = periods[k];
      logic last;
      int run;
      tone_switch_period = 24'(p);
      output_enable = 1'b1;
      @(negedge clk);
      last = square_wave_out;
      run  = 1;
      // measure eight half periods
      for (int h = 0; h < 8; ) begin
        @(negedge clk);
        if (square_wave_out != last) begin
          if (h > 0) check(run == p, $sformatf("half period %0d, expected %0d", run, p));
          h++;
          run  = 1;
          last = square_wave_out;
        end else run++;
        if (run > 4 * p + 4) begin check(0, "no toggle"); break; end
      end
      output_enable = 1'b0;
      repeat (3) begin @(negedge clk); check(square_wave_out == 1'b0, "silent when disabled"); end
    end
    output_enable = 1'b1;
    tone_switch_period = '0;
    repeat (20) begin @(negedge clk); check(square_wave_out == 1'b0, "silent at period 0"); end
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
