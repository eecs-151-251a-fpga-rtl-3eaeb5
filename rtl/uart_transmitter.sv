// uart_transmitter: sends bytes as 8N1 serial frames.
//
// A byte is accepted with a ready/valid handshake: data_in_ready is high while
// the transmitter is idle, and a cycle with data_in_valid && data_in_ready
// loads the frame {stop=1, data[7:0], start=0} into a shift register. The frame
// is shifted out LSB first, one bit every SYMBOL_EDGE_TIME = CLOCK_FREQ /
// BAUD_RATE cycles, so a byte occupies the line for 10 * SYMBOL_EDGE_TIME
// cycles, and data_in_ready returns in the cycle after the stop bit ends.
// The idle line is high. Frame format and the handshake follow the standard
// UART the system is built around; the shift-register structure is this
// design's choice.
module uart_transmitter #(
  parameter int unsigned CLOCK_FREQ = 125_000_000,
  parameter int unsigned BAUD_RATE  = 115_200
) (
  input  logic       clk,
  input  logic       reset,
  input  logic [7:0] data_in,
  input  logic       data_in_valid,
  output logic       data_in_ready,
  output logic       serial_out
);
  localparam int unsigned SYMBOL_EDGE_TIME = CLOCK_FREQ / BAUD_RATE;
  localparam int unsigned CW = $clog2(SYMBOL_EDGE_TIME + 1);

  logic [9:0]    shift;
  logic [3:0]    bits_left;
  logic [CW-1:0] clk_cnt;
  logic          busy;

  assign busy          = (bits_left != '0);
  assign data_in_ready = !busy;
  assign serial_out    = busy ? shift[0] : 1'b1;

  always_ff @(posedge clk) begin
    if (reset) begin
      shift     <= '1;
      bits_left <= '0;
      clk_cnt   <= '0;
    end else if (!busy) begin
      if (data_in_valid) begin
        shift     <= {1'b1, data_in, 1'b0};
        bits_left <= 4'd10;
        clk_cnt   <= '0;
      end
    end else if (clk_cnt == CW'(SYMBOL_EDGE_TIME - 1)) begin
      clk_cnt   <= '0;
      shift     <= {1'b1, shift[9:1]};
      bits_left <= bits_left - 1'b1;
    end else begin
      clk_cnt <= clk_cnt + 1'b1;
    end
  end
endmodule
