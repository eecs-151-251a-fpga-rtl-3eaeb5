// rv_to_fifo: bridge from a ready/valid source to a FIFO write port.
//
// Connects the UART receiver's data_out/data_out_valid/data_out_ready to the
// RX FIFO's din/wr_en/full. The source is ready whenever the FIFO has room,
// and a byte is written in the cycle its valid meets that room, so the
// handshake and the FIFO write are the same clock edge. A byte offered while
// the FIFO is full stays with the source until room appears. Purely
// combinational.
module rv_to_fifo #(
  parameter int unsigned DATA_WIDTH = 8
) (
  input  logic [DATA_WIDTH-1:0] rv_data,
  input  logic                  rv_valid,
  output logic                  rv_ready,
  output logic [DATA_WIDTH-1:0] fifo_din,
  output logic                  fifo_wr_en,
  input  logic                  fifo_full
);
  assign rv_ready   = !fifo_full;
  assign fifo_wr_en = rv_valid && !fifo_full;
  assign fifo_din   = rv_data;
endmodule
