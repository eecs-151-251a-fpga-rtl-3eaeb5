// fifo_to_rv: bridge from a FIFO read port to a ready/valid sink.
//
// Connects the TX FIFO (whose dout is registered and valid the cycle after
// rd_en) to the UART transmitter's data_in/data_in_valid/data_in_ready.
// When nothing is held or in flight and the FIFO is not empty, the bridge
// pulses fifo_rd_en; one cycle later the word is on fifo_dout and rv_valid
// rises. rv_data is fifo_dout itself, which stays stable because no further
// read is issued until the sink has taken the word (rv_valid && rv_ready).
// This gives one word per three cycles at most, ample for a UART. rv_valid
// never drops before the handshake.
module fifo_to_rv #(
  parameter int unsigned DATA_WIDTH = 8
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [DATA_WIDTH-1:0] fifo_dout,
  input  logic                  fifo_empty,
  output logic                  fifo_rd_en,
  output logic [DATA_WIDTH-1:0] rv_data,
  output logic                  rv_valid,
  input  logic                  rv_ready
);
  logic in_flight, valid_q;

  assign fifo_rd_en = !fifo_empty && !in_flight && !valid_q;
  assign rv_valid   = valid_q;
  assign rv_data    = fifo_dout;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_flight <= 1'b0;
      valid_q   <= 1'b0;
    end else begin
      in_flight <= fifo_rd_en;
      if (in_flight)                  valid_q <= 1'b1;
      else if (valid_q && rv_ready)   valid_q <= 1'b0;
    end
  end
endmodule
