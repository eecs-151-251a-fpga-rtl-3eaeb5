// fifo_to_rv_tb: a model of the FIFO read port (registered dout, valid the
// cycle after rd_en) feeds the bridge, and a sink with random ready takes its
// output. Checks that words arrive in order with none lost or repeated, that
// rd_en is never raised on an empty FIFO, and that rv_valid/rv_data stay
// stable until the handshake.
module fifo_to_rv_tb;
  logic       clk = 1'b0, rst = 1'b1;
  logic [7:0] fifo_dout = '0, rv_data;
  logic       fifo_empty, fifo_rd_en, rv_valid, rv_ready = 1'b0;
  int         checks = 0, failures = 0, got = 0;
  logic [7:0] q [$];
  logic [7:0] expected [$];

  fifo_to_rv #(.DATA_WIDTH(8)) dut (.*);

  always #5 clk = ~clk;
  assign fifo_empty = (q.size() == 0);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  logic       valid_d = 1'b0, ready_d = 1'b0;
  logic [7:0] data_d = '0;
  always @(posedge clk) begin
    if (!rst) begin
      if (fifo_rd_en) check(q.size() > 0, "rd_en on empty FIFO");
      if (rv_valid && rv_ready) begin
        check(expected.size() > 0 && rv_data == expected[0], $sformatf("got %h", rv_data));
        if (expected.size() > 0) void'(expected.pop_front());
        got++;
      end
      if (valid_d && !ready_d) check(rv_valid && rv_data == data_d, "word withdrawn before handshake");
      if (fifo_rd_en && q.size() > 0) fifo_dout <= q.pop_front();
    end
    valid_d <= rv_valid; ready_d <= rv_ready; data_d <= rv_data;
  end

  always @(negedge clk) rv_ready <= 1'($urandom % 3 == 0);

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 200; n++) begin
      automatic logic [7:0] b = 8'($urandom);
      @(negedge clk);
      q.push_back(b);
      expected.push_back(b);
      if ($urandom % 4 == 0) repeat ($urandom % 10) @(negedge clk);
    end
    repeat (2000) @(negedge clk);
    check(got == 200 && expected.size() == 0, $sformatf("delivered %0d of 200", got));
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
