// fifo_tb: self-checking testbench for the synchronous FIFO.
//
// A queue in the testbench is the reference model. The sequence: flags after
// reset; fill with random data checking empty/full at each step; attempted
// overflow (writes while full must change nothing); drain checking the data
// and flags; attempted underflow; back-to-back write-then-read bursts; and a
// long random run with reads and writes in the same cycles. dout is checked
// one cycle after each accepted read, as the FIFO registers its output.
module fifo_tb;
  localparam int unsigned W = 8;
  localparam int unsigned D = 16;

  logic         clk = 1'b0, rst = 1'b1;
  logic         wr_en = 1'b0, rd_en = 1'b0;
  logic [W-1:0] din = '0, dout;
  logic         full, empty;
  int           checks = 0, failures = 0;
  logic [W-1:0] model [$];
  logic [W-1:0] expect_q;
  bit           expect_valid = 1'b0;

  fifo #(.DATA_WIDTH(W), .FIFO_DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // Reference model, updated on each rising edge from the values driven.
  always @(posedge clk) begin
    if (expect_valid) check(dout == expect_q, $sformatf("dout %h expected %h", dout, expect_q));
    expect_valid = 1'b0;
    if (rst) model.delete();
    else begin
      bit do_rd, do_wr;
      do_rd = rd_en && model.size() > 0;
      do_wr = wr_en && model.size() < D;
      if (do_rd) begin
        expect_q     = model.pop_front();
        expect_valid = 1'b1;
      end
      if (do_wr) model.push_back(din);
    end
  end

  // Flags are checked just before every rising edge.
  always @(negedge clk) if (!rst) begin
    check(empty == (model.size() == 0), $sformatf("empty=%0b with %0d entries", empty, model.size()));
    check(full == (model.size() == D), $sformatf("full=%0b with %0d entries", full, model.size()));
  end

  task automatic cyc(input bit w, input bit r, input logic [W-1:0] d);
    wr_en <= w; rd_en <= r; din <= d;
    @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    check(empty && !full, "after reset: empty and not full");
    // fill
    for (int i = 0; i < D; i++) begin
      cyc(1, 0, W'($urandom));
      check(!empty, "not empty while filling");
    end
    check(full && !empty, "full after DEPTH writes");
    // overflow attempts
    for (int i = 0; i < 5; i++) cyc(1, 0, W'($urandom));
    check(full, "still full after overflow attempts");
    // drain
    for (int i = 0; i < D; i++) begin
      cyc(0, 1, '0);
      check(!full, "not full while draining");
    end
    cyc(0, 0, '0);
    check(empty && !full, "empty after DEPTH reads");
    // underflow attempts
    for (int i = 0; i < 5; i++) cyc(0, 1, '0);
    check(empty && !full, "still empty after underflow attempts");
    // write then read, back to back
    for (int i = 0; i < 20; i++) begin
      cyc(1, 0, W'($urandom));
      cyc(0, 1, '0);
    end
    // simultaneous reads and writes, random
    for (int i = 0; i < 3000; i++) cyc(1'($urandom), 1'($urandom), W'($urandom));
    // simultaneous read and write on a full FIFO
    while (!full) cyc(1, 0, W'($urandom));
    cyc(1, 1, 8'hA5);
    check(!full, "read+write while full: write refused, read done");
    while (!empty) cyc(0, 1, '0);
    cyc(1, 1, 8'h5A);
    check(!empty, "read+write while empty: write done, read refused");
    cyc(0, 1, '0);
    cyc(0, 0, '0);
    // reset empties it
    cyc(1, 0, 8'h11);
    rst = 1'b1; cyc(0, 0, '0); rst = 1'b0;
    check(empty && !full, "reset empties the FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
