// uart_receiver: receives 8N1 serial frames and offers each byte with
// ready/valid.
//
// While idle the receiver waits for the line to go low (start bit). It then
// samples the line in the middle of every bit time: first half a bit time
// (SYMBOL_EDGE_TIME / 2) after the falling edge, to confirm the start bit,
// then every SYMBOL_EDGE_TIME cycles for the eight data bits (LSB first) and
// the stop bit. A start bit that is high again at its middle is treated as a
// glitch and ignored. In the cycle after the stop bit has been sampled,
// data_out_valid rises with the byte on data_out; both hold until a cycle with
// data_out_ready high. A byte that arrives before the previous one was taken
// replaces it (the FIFO behind the receiver is expected to keep up).
// serial_in must already be synchronous to clk.
module uart_receiver #(
  parameter int unsigned CLOCK_FREQ = 125_000_000,
  parameter int unsigned BAUD_RATE  = 115_200
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       serial_in,
  output logic [7:0] data_out,
  output logic       data_out_valid,
  input  logic       data_out_ready
);
  localparam int unsigned SYMBOL_EDGE_TIME = CLOCK_FREQ / BAUD_RATE;
  localparam int unsigned SAMPLE_TIME      = SYMBOL_EDGE_TIME / 2;
  localparam int unsigned CW = $clog2(SYMBOL_EDGE_TIME + 1);

  logic [8:0]    shift;      // data bits then stop bit, filled from the top
  logic [3:0]    bits_left;  // samples still to take, 10 = start bit next
  logic [CW-1:0] clk_cnt;
  logic          valid_q;

  assign data_out       = shift[7:0];
  assign data_out_valid = valid_q;

  always_ff @(posedge clk) begin
    if (reset) begin
      shift     <= '0;
      bits_left <= '0;
      clk_cnt   <= '0;
      valid_q   <= 1'b0;
    end else begin
      if (valid_q && data_out_ready) valid_q <= 1'b0;

      if (bits_left == '0) begin
        if (!serial_in) begin
          bits_left <= 4'd10;
          clk_cnt   <= CW'(SYMBOL_EDGE_TIME - SAMPLE_TIME);
        end
      end else if (clk_cnt == CW'(SYMBOL_EDGE_TIME - 1)) begin
        clk_cnt <= '0;
        if (bits_left == 4'd10) begin
          // middle of the start bit
          bits_left <= serial_in ? 4'd0 : 4'd9;
        end else begin
          shift     <= {serial_in, shift[8:1]};
          bits_left <= bits_left - 1'b1;
          if (bits_left == 4'd1) valid_q <= 1'b1;
        end
      end else begin
        clk_cnt <= clk_cnt + 1'b1;
      end
    end
  end
endmodule
