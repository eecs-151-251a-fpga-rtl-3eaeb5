// rv_to_fifo_tb: exhaustive check of the receiver-to-FIFO bridge over
// valid/full combinations with random data: ready is !full, wr_en is
// valid && !full, and din is the source data.
module rv_to_fifo_tb;
  logic [7:0] rv_data, fifo_din;
  logic       rv_valid, rv_ready, fifo_wr_en, fifo_full;
  int         checks = 0, failures = 0;

  rv_to_fifo #(.DATA_WIDTH(8)) dut (.*);

  initial begin
    for (int i = 0; i < 400; i++) begin
      rv_data   = 8'($urandom);
      rv_valid  = i[0];
      fifo_full = i[1];
      #1;
      checks++;
      if (rv_ready !== !fifo_full || fifo_wr_en !== (rv_valid && !fifo_full) ||
          (fifo_wr_en && fifo_din !== rv_data)) begin
        failures++;
        $display("FAIL: valid=%b full=%b -> ready=%b wr_en=%b din=%h data=%h",
                 rv_valid, fifo_full, rv_ready, fifo_wr_en, fifo_din, rv_data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
