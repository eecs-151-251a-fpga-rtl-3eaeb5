// uart: full-duplex UART with ready/valid byte interfaces.
//
// Wraps one uart_transmitter and one uart_receiver sharing CLOCK_FREQ and
// BAUD_RATE. The incoming serial line is registered once more before the
// receiver, and the outgoing line is registered after the transmitter, so
// that both pads connect to flip-flops; both registers reset to the idle level
// (high). Bytes to send enter on data_in/data_in_valid/data_in_ready; received
// bytes leave on data_out/data_out_valid/data_out_ready. Each handshake
// completes in a cycle where valid and ready are both high.
module uart #(
  parameter int unsigned CLOCK_FREQ = 125_000_000,
  parameter int unsigned BAUD_RATE  = 115_200
) (
  input  logic       clk,
  input  logic       reset,
  input  logic [7:0] data_in,
  input  logic       data_in_valid,
  output logic       data_in_ready,
  output logic [7:0] data_out,
  output logic       data_out_valid,
  input  logic       data_out_ready,
  input  logic       serial_in,
  output logic       serial_out
);
  logic serial_in_q, serial_out_d, serial_out_q;

  always_ff @(posedge clk) begin
    if (reset) begin
      serial_in_q  <= 1'b1;
      serial_out_q <= 1'b1;
    end else begin
      serial_in_q  <= serial_in;
      serial_out_q <= serial_out_d;
    end
  end
  assign serial_out = serial_out_q;

  uart_transmitter #(.CLOCK_FREQ(CLOCK_FREQ), .BAUD_RATE(BAUD_RATE)) u_tx (
    .clk(clk), .reset(reset),
    .data_in(data_in), .data_in_valid(data_in_valid), .data_in_ready(data_in_ready),
    .serial_out(serial_out_d));

  uart_receiver #(.CLOCK_FREQ(CLOCK_FREQ), .BAUD_RATE(BAUD_RATE)) u_rx (
    .clk(clk), .reset(reset), .serial_in(serial_in_q),
    .data_out(data_out), .data_out_valid(data_out_valid), .data_out_ready(data_out_ready));
endmodule
