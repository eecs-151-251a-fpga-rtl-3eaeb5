// piano_scale_rom: maps an ASCII key code to the tone_switch_period of its note.
//
// 256 words of 24 bits, read combinationally (data follows address in the
// same cycle). The keyboard is laid out as two piano rows:
//   lower row  z s x d c v g b h n j m ,   -> C3 .. C4 (chromatic)
//   upper row  q 2 w 3 e r 5 t 6 y 7 u i   -> C4 .. C5 (chromatic)
// With shift held, the lower row (Z S X D C V G B H N J M) sounds one octave
// lower and the upper row (Q @ W # E R % T ^ Y & U I) one octave higher. '<'
// plays C4 like ','. Every other code maps to 0, which the tone generator
// treats as silence.
//
// The table is computed at elaboration from equal-tempered frequencies
// (A4 = 440 Hz): tone_switch_period = round(CLOCK_FREQ / (2 * f)), i.e. the
// number of clock cycles per half period of the note, so the same source
// serves any clock. The octave-4 frequencies are held in millihertz and the
// other octaves are derived by powers of two. The exact key assignment within
// the rows (a tracker-style layout with sharps on the row above) and the
// half-period encoding are this design's choices.
module piano_scale_rom
  import piano_pkg::*;
#(
  parameter int unsigned CLOCK_FREQ = 125_000_000,
  parameter int unsigned DEPTH      = 256,
  parameter int unsigned WIDTH      = piano_pkg::TONE_PERIOD_WIDTH
) (
  input  logic [$clog2(DEPTH)-1:0] address,
  output logic [WIDTH-1:0]         data
);
  // Octave-4 frequencies C4..B4 in millihertz.
  localparam longint unsigned F4_MHZ [12] = '{
    261_626, 277_183, 293_665, 311_127, 329_628, 349_228,
    369_994, 391_995, 415_305, 440_000, 466_164, 493_883};

  // MIDI-style note number of a key (C4 = 60), or -1 for no note.
  function automatic int note_of(input int unsigned c);
    case (c)
      // lower row, C3..C4
      "z": return 48;  "s": return 49;  "x": return 50;  "d": return 51;
      "c": return 52;  "v": return 53;  "g": return 54;  "b": return 55;
      "h": return 56;  "n": return 57;  "j": return 58;  "m": return 59;
      ",": return 60;  "<": return 60;
      // lower row shifted, C2..B2
      "Z": return 36;  "S": return 37;  "X": return 38;  "D": return 39;
      "C": return 40;  "V": return 41;  "G": return 42;  "B": return 43;
      "H": return 44;  "N": return 45;  "J": return 46;  "M": return 47;
      // upper row, C4..C5
      "q": return 60;  "2": return 61;  "w": return 62;  "3": return 63;
      "e": return 64;  "r": return 65;  "5": return 66;  "t": return 67;
      "6": return 68;  "y": return 69;  "7": return 70;  "u": return 71;
      "i": return 72;
      // upper row shifted, C5..C6
      "Q": return 72;  "@": return 73;  "W": return 74;  "#": return 75;
      "E": return 76;  "R": return 77;  "%": return 78;  "T": return 79;
      "^": return 80;  "Y": return 81;  "&": return 82;  "U": return 83;
      "I": return 84;
      default: return -1;
    endcase
  endfunction

  // Half period in clock cycles, rounded to nearest, saturated to WIDTH bits.
  function automatic logic [WIDTH-1:0] period_of(input int unsigned c);
    int              n, octave;
    logic [3:0]      semi;
    longint unsigned num, den, p;
    n = note_of(c);
    if (n < 0) return '0;
    octave = n / 12 - 1;
    semi   = 4'(n % 12);
    num = longint'(CLOCK_FREQ) * 1000;
    den = 2 * F4_MHZ[semi];
    if (octave < 4) num = num << (4 - octave);
    else            den = den << (octave - 4);
    p = (num + den / 2) / den;
    if (p >= (longint'(1) << WIDTH)) p = (longint'(1) << WIDTH) - 1;
    return WIDTH'(p);
  endfunction

  logic [WIDTH-1:0] rom [DEPTH];

  for (genvar a = 0; a < DEPTH; a++) begin : g_rom
    assign rom[a] = period_of(a);
  end

  assign data = rom[address];
endmodule
