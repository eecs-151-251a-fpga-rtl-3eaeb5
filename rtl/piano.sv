// piano: fixed-note-length piano controller between the UART FIFOs and the
// tone generator.
//
// A four-state machine handles one character at a time:
//   IDLE  - waits until the RX FIFO is not empty, then pulses rx_fifo_rd_en.
//   FETCH - the FIFO's registered dout now holds the character; latch it.
//   ECHO  - waits while the TX FIFO is full, then writes the unchanged
//           character into it (tx_fifo_wr_en for one cycle).
//   PLAY  - drives the character's tone_switch_period from piano_scale_rom
//           with tone_enable high for exactly note_length cycles, then
//           returns to IDLE.
// So a character is echoed before its note starts, the next character is
// fetched only after the note has ended (the RX FIFO absorbs keys typed
// faster than notes are played), and consecutive notes are separated by
// three silent cycles. A character outside the keyboard map is echoed and
// "played" as silence for note_length, like any other.
//
// note_length starts at NOTE_LENGTH_DEFAULT (1/5 s) after reset. A pulse on
// buttons[0] adds NOTE_LENGTH_STEP when switches[0] is 1 and subtracts it
// when switches[0] is 0. Both directions saturate: the length never drops
// below NOTE_LENGTH_STEP and never wraps past the top of its register. A
// change during a note applies to that note at once. buttons[2:1] and
// switches[1] are unused. The step size, the saturation limits and the LED
// assignment are this design's choices:
//   leds[0] note playing, leds[1] waiting on a full TX FIFO,
//   leds[2] RX FIFO holds characters, leds[3] note_length at its minimum,
//   leds[4] note_length at its maximum, leds[5] note_length at its default.
module piano
  import piano_pkg::*;
#(
  parameter int unsigned CLOCK_FREQ          = 125_000_000,
  parameter int unsigned NOTE_LENGTH_WIDTH   = 32,
  parameter int unsigned NOTE_LENGTH_DEFAULT = CLOCK_FREQ / 5,
  parameter int unsigned NOTE_LENGTH_STEP    = CLOCK_FREQ / 50
) (
  input  logic        clk,
  input  logic        rst,
  // UART receiver FIFO (read side)
  input  logic [7:0]  rx_fifo_dout,
  input  logic        rx_fifo_empty,
  output logic        rx_fifo_rd_en,
  // UART transmitter FIFO (write side)
  output logic [7:0]  tx_fifo_din,
  output logic        tx_fifo_wr_en,
  input  logic        tx_fifo_full,
  // tone generator
  output period_t     tone_switch_period,
  output logic        tone_enable,
  // user I/O
  input  logic [2:0]  buttons,
  input  logic [1:0]  switches,
  output logic [5:0]  leds
);
  typedef logic [NOTE_LENGTH_WIDTH-1:0] len_t;
  localparam len_t LEN_MAX  = '1;
  localparam len_t LEN_STEP = len_t'(NOTE_LENGTH_STEP);
  localparam len_t LEN_DEF  = len_t'(NOTE_LENGTH_DEFAULT);

  typedef enum logic [1:0] {IDLE, FETCH, ECHO, PLAY} state_t;

  state_t  state;
  char_t   char_q;
  len_t    note_length, note_cnt;
  period_t rom_period;

  piano_scale_rom #(.CLOCK_FREQ(CLOCK_FREQ)) u_rom (
    .address(char_q), .data(rom_period));

  assign rx_fifo_rd_en      = (state == IDLE) && !rx_fifo_empty;
  assign tx_fifo_din        = char_q;
  assign tx_fifo_wr_en      = (state == ECHO) && !tx_fifo_full;
  assign tone_enable        = (state == PLAY);
  assign tone_switch_period = (state == PLAY) ? rom_period : '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= IDLE;
      char_q   <= '0;
      note_cnt <= '0;
    end else begin
      unique case (state)
        IDLE:  if (!rx_fifo_empty) state <= FETCH;
        FETCH: begin
          char_q <= rx_fifo_dout;
          state  <= ECHO;
        end
        ECHO:  if (!tx_fifo_full) begin
          note_cnt <= '0;
          state    <= PLAY;
        end
        PLAY:  if (note_cnt >= note_length - 1'b1) state <= IDLE;
               else note_cnt <= note_cnt + 1'b1;
        default: state <= IDLE;
      endcase
    end
  end

  // Note-length adjustment with saturation at both ends.
  always_ff @(posedge clk) begin
    if (rst) begin
      note_length <= LEN_DEF;
    end else if (buttons[0]) begin
      if (switches[0]) begin
        if (note_length <= LEN_MAX - LEN_STEP) note_length <= note_length + LEN_STEP;
        else                                   note_length <= LEN_MAX;
      end else begin
        if (note_length >= LEN_STEP + LEN_STEP) note_length <= note_length - LEN_STEP;
        else                                    note_length <= LEN_STEP;
      end
    end
  end

  assign leds = {note_length == LEN_DEF,
                 note_length == LEN_MAX,
                 note_length == LEN_STEP,
                 !rx_fifo_empty,
                 (state == ECHO) && tx_fifo_full,
                 state == PLAY};

  // A character is pulled only when the RX FIFO has one, and echoed only
  // when the TX FIFO has room.
  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (!(rx_fifo_rd_en && rx_fifo_empty)) else $error("piano: read from empty RX FIFO");
      assert (!(tx_fifo_wr_en && tx_fifo_full))  else $error("piano: write to full TX FIFO");
    end
  end
endmodule
