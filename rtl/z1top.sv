// z1top: UART piano top level.
//
// Characters typed on a host terminal arrive on FPGA_SERIAL_RX. The UART
// receiver assembles each byte and hands it, through the rv_to_fifo bridge, to
// the RX FIFO. The piano controller pops characters from the RX FIFO, echoes
// them into the TX FIFO and plays each one's note on the tone generator, whose
// square wave is aud_pwm. The fifo_to_rv bridge drains the TX FIFO into the
// UART transmitter, which sends the echo on FPGA_SERIAL_TX. The two FIFOs let
// key presses queue up while a long note plays, and let echoes wait for the
// serial line.
//
// Buttons pass through the button parser (synchronizer, debouncer, edge
// detector). BUTTONS[3] is the reset: its press pulse resets the UART, both
// FIFOs, the bridges, the piano and the tone generator for one cycle.
// BUTTONS[2:0] go to the piano (BUTTONS[0] with SWITCHES[0] changes the note
// length). The button assignment is this design's choice. There is no other
// power-on reset: the design relies on FPGA configuration clearing every
// register, and in simulation it is undefined until the first reset press.
//
// VARIABLE_NOTE_LENGTH = 0 (default) builds the fixed-note-length piano;
// 1 builds the variable-note-length controller instead, which plays a note
// from a key-press packet to the matching key-release packet and echoes
// nothing (the TX path is then idle). CLOCK_FREQ must match the board clock
// for the baud rate, debounce time, note length and pitches to be right.
module z1top
  import piano_pkg::*;
#(
  parameter int unsigned CLOCK_FREQ           = 125_000_000,
  parameter int unsigned BAUD_RATE            = 115_200,
  parameter int unsigned FIFO_DEPTH           = 16,
  parameter bit          VARIABLE_NOTE_LENGTH = 1'b0,
  parameter int unsigned NOTE_LENGTH_DEFAULT  = CLOCK_FREQ / 5,
  parameter int unsigned NOTE_LENGTH_STEP     = CLOCK_FREQ / 50,
  parameter int unsigned B_SAMPLE_CNT_MAX     = 25_000,
  parameter int unsigned B_PULSE_CNT_MAX      = 150
) (
  input  logic       CLK_125MHZ_FPGA,
  input  logic [3:0] BUTTONS,
  input  logic [1:0] SWITCHES,
  output logic [5:0] LEDS,
  output logic       aud_pwm,
  input  logic       FPGA_SERIAL_RX,
  output logic       FPGA_SERIAL_TX
);
  logic clk;
  assign clk = CLK_125MHZ_FPGA;

  // Buttons: reset and note-length control
  logic [3:0] buttons_pressed;
  logic       rst;

  button_parser #(
    .WIDTH(4), .SAMPLE_CNT_MAX(B_SAMPLE_CNT_MAX), .PULSE_CNT_MAX(B_PULSE_CNT_MAX)
  ) u_buttons (
    .clk(clk), .in(BUTTONS), .out(buttons_pressed));

  assign rst = buttons_pressed[3];

  // UART
  char_t uart_tx_data, uart_rx_data;
  logic  uart_tx_valid, uart_tx_ready, uart_rx_valid, uart_rx_ready;

  uart #(.CLOCK_FREQ(CLOCK_FREQ), .BAUD_RATE(BAUD_RATE)) u_uart (
    .clk(clk), .reset(rst),
    .data_in(uart_tx_data), .data_in_valid(uart_tx_valid), .data_in_ready(uart_tx_ready),
    .data_out(uart_rx_data), .data_out_valid(uart_rx_valid), .data_out_ready(uart_rx_ready),
    .serial_in(FPGA_SERIAL_RX), .serial_out(FPGA_SERIAL_TX));

  // Receive path: UART receiver -> RX FIFO
  char_t rx_fifo_din, rx_fifo_dout;
  logic  rx_fifo_wr_en, rx_fifo_full, rx_fifo_rd_en, rx_fifo_empty;

  rv_to_fifo #(.DATA_WIDTH(8)) u_rx_bridge (
    .rv_data(uart_rx_data), .rv_valid(uart_rx_valid), .rv_ready(uart_rx_ready),
    .fifo_din(rx_fifo_din), .fifo_wr_en(rx_fifo_wr_en), .fifo_full(rx_fifo_full));

  fifo #(.DATA_WIDTH(8), .FIFO_DEPTH(FIFO_DEPTH)) u_rx_fifo (
    .clk(clk), .rst(rst),
    .wr_en(rx_fifo_wr_en), .din(rx_fifo_din), .full(rx_fifo_full),
    .rd_en(rx_fifo_rd_en), .dout(rx_fifo_dout), .empty(rx_fifo_empty));

  // Transmit path: TX FIFO -> UART transmitter
  char_t tx_fifo_din, tx_fifo_dout;
  logic  tx_fifo_wr_en, tx_fifo_full, tx_fifo_rd_en, tx_fifo_empty;

  fifo #(.DATA_WIDTH(8), .FIFO_DEPTH(FIFO_DEPTH)) u_tx_fifo (
    .clk(clk), .rst(rst),
    .wr_en(tx_fifo_wr_en), .din(tx_fifo_din), .full(tx_fifo_full),
    .rd_en(tx_fifo_rd_en), .dout(tx_fifo_dout), .empty(tx_fifo_empty));

  fifo_to_rv #(.DATA_WIDTH(8)) u_tx_bridge (
    .clk(clk), .rst(rst),
    .fifo_dout(tx_fifo_dout), .fifo_empty(tx_fifo_empty), .fifo_rd_en(tx_fifo_rd_en),
    .rv_data(uart_tx_data), .rv_valid(uart_tx_valid), .rv_ready(uart_tx_ready));

  // Piano controller
  period_t tone_switch_period;
  logic    tone_enable;

  if (VARIABLE_NOTE_LENGTH) begin : g_variable
    piano_variable #(.CLOCK_FREQ(CLOCK_FREQ)) u_piano (
      .clk(clk), .rst(rst),
      .rx_fifo_dout(rx_fifo_dout), .rx_fifo_empty(rx_fifo_empty), .rx_fifo_rd_en(rx_fifo_rd_en),
      .tone_switch_period(tone_switch_period), .tone_enable(tone_enable),
      .leds(LEDS));
    assign tx_fifo_wr_en = 1'b0;
    assign tx_fifo_din   = '0;
  end else begin : g_fixed
    piano #(
      .CLOCK_FREQ(CLOCK_FREQ),
      .NOTE_LENGTH_DEFAULT(NOTE_LENGTH_DEFAULT),
      .NOTE_LENGTH_STEP(NOTE_LENGTH_STEP)
    ) u_piano (
      .clk(clk), .rst(rst),
      .rx_fifo_dout(rx_fifo_dout), .rx_fifo_empty(rx_fifo_empty), .rx_fifo_rd_en(rx_fifo_rd_en),
      .tx_fifo_din(tx_fifo_din), .tx_fifo_wr_en(tx_fifo_wr_en), .tx_fifo_full(tx_fifo_full),
      .tone_switch_period(tone_switch_period), .tone_enable(tone_enable),
      .buttons(buttons_pressed[2:0]), .switches(SWITCHES), .leds(LEDS));
  end

  // Tone generator
  tone_generator #(.PERIOD_WIDTH(TONE_PERIOD_WIDTH)) u_tone (
    .clk(clk), .rst(rst),
    .output_enable(tone_enable), .tone_switch_period(tone_switch_period),
    .square_wave_out(aud_pwm));
endmodule
