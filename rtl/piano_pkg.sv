// piano_pkg: constants shared by the UART piano modules.
//
// Holds the width of a tone period word (24 bits, the width of the scale
// ROM), the byte and period types, and the two packet header bytes of
// the variable-note-length protocol: 0x80 announces a key press and 0x81 a
// key release, each followed by the key's ASCII character.
package piano_pkg;
  localparam int unsigned TONE_PERIOD_WIDTH = 24;

  typedef logic [7:0]              char_t;
  typedef logic [TONE_PERIOD_WIDTH-1:0] period_t;

  localparam char_t KEY_PRESS   = 8'h80;
  localparam char_t KEY_RELEASE = 8'h81;
endpackage
