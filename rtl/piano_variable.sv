// piano_variable: variable-note-length piano controller.
//
// The host sends a two-byte packet per key event: KEY_PRESS (0x80) followed by
// the key's character when a key goes down, KEY_RELEASE (0x81) followed by the
// character when it comes up. This controller pops bytes from the UART RX FIFO
// and decodes them with a small parser:
//   - a press packet while no note is playing starts playing that key's note
//     (tone from piano_scale_rom) and remembers the key;
//   - a press packet while a note is playing is discarded;
//   - a release packet for the key being played stops the note;
//   - a release packet for any other key is discarded.
// A byte other than 0x80/0x81 where a packet header is expected is discarded
// (this design's choice), so the parser resynchronises on the next header.
//
// Timing: a byte is popped with rx_fifo_rd_en when the FIFO is not empty and
// no earlier pop is outstanding; it is examined in the next cycle, when the
// FIFO's registered dout holds it. So a note starts (tone_enable high) two
// cycles after the character byte becomes available and stops two cycles
// after the matching release character does. Nothing is echoed to the UART.
// leds[0] is high while a note is playing; leds[2:1] show the parser state
// (01 after a press header, 10 after a release header); leds[5:3] are low.
module piano_variable
  import piano_pkg::*;
#(
  parameter int unsigned CLOCK_FREQ = 125_000_000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] rx_fifo_dout,
  input  logic       rx_fifo_empty,
  output logic       rx_fifo_rd_en,
  output period_t    tone_switch_period,
  output logic       tone_enable,
  output logic [5:0] leds
);
  typedef enum logic [1:0] {WAIT_HEADER, WAIT_PRESS_KEY, WAIT_RELEASE_KEY} parse_t;

  parse_t  parse;
  logic    pending;   // a pop was issued last cycle; rx_fifo_dout holds the byte
  logic    playing;
  char_t   note_key;
  period_t rom_period;

  piano_scale_rom #(.CLOCK_FREQ(CLOCK_FREQ)) u_rom (
    .address(note_key), .data(rom_period));

  assign rx_fifo_rd_en      = !rx_fifo_empty && !pending;
  assign tone_enable        = playing;
  assign tone_switch_period = playing ? rom_period : '0;
  assign leds               = {3'b000, parse == WAIT_RELEASE_KEY, parse == WAIT_PRESS_KEY, playing};

  always_ff @(posedge clk) begin
    if (rst) begin
      parse    <= WAIT_HEADER;
      pending  <= 1'b0;
      playing  <= 1'b0;
      note_key <= '0;
    end else begin
      pending <= rx_fifo_rd_en;
      if (pending) begin
        unique case (parse)
          WAIT_HEADER:
            if (rx_fifo_dout == KEY_PRESS)        parse <= WAIT_PRESS_KEY;
            else if (rx_fifo_dout == KEY_RELEASE) parse <= WAIT_RELEASE_KEY;
          WAIT_PRESS_KEY: begin
            parse <= WAIT_HEADER;
            if (!playing) begin
              playing  <= 1'b1;
              note_key <= rx_fifo_dout;
            end
          end
          WAIT_RELEASE_KEY: begin
            parse <= WAIT_HEADER;
            if (playing && rx_fifo_dout == note_key) playing <= 1'b0;
          end
          default: parse <= WAIT_HEADER;
        endcase
      end
    end
  end
endmodule
