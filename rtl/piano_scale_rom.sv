// piano_scale_rom: 256-entry, 24-bit ROM from an ASCII code to the
// tone_switch_period (half period in clock cycles) of the note that key plays.
//
// Keys are laid out like two octaves of a piano keyboard on a QWERTY
// keyboard. The bottom letter row plays C3 up to C4:
//     z s x d c v g b h n j m ,   ->  semitones 0 .. 12 above C3
// and the top rows play C4 up to C5:
//     q 2 w 3 e r 5 t 6 y 7 u i   ->  semitones 12 .. 24 above C3
// (white keys on the letter row, black keys on the row above it). Every other
// code reads as 0, which the tone generator treats as silence.
//
// The entries are computed at elaboration, not stored as numbers: for
// semitone n above C3 (130.8128 Hz, equal temperament with A4 = 440 Hz)
//     f(n) = 130.8128 * 2^(n/12),  period(n) = round(CLOCK_FREQ / (2 f(n))).
// The ROM's size (256 x 24) and its meaning follow the lab; the key layout,
// the octave range and the formula are this design's own.
// Interface: address[8] in, data[24] out, combinational.
module piano_scale_rom #(
  parameter int unsigned CLOCK_FREQ = 125_000_000
) (
  input  piano_pkg::char_t   address,
  output piano_pkg::period_t data
);

  import piano_pkg::*;

  localparam int unsigned NOTES = 25;
  localparam real         C3_HZ = 130.81278265029931;

  period_t note_period [NOTES];

  for (genvar n = 0; n < NOTES; n++) begin : g_note
    localparam real         FREQ = C3_HZ * (2.0 ** (real'(n) / 12.0));
    localparam int unsigned P    = int'($floor(real'(CLOCK_FREQ) / (2.0 * FREQ) + 0.5));
    assign note_period[n] = PERIOD_W'(P);
  end

  // Key -> semitone above C3, -1 for keys that play nothing.
  function automatic int key_to_semitone(char_t c);
    case (c)
      "z": return 0;   "s": return 1;   "x": return 2;   "d": return 3;
      "c": return 4;   "v": return 5;   "g": return 6;   "b": return 7;
      "h": return 8;   "n": return 9;   "j": return 10;  "m": return 11;
      ",": return 12;
      "q": return 12;  "2": return 13;  "w": return 14;  "3": return 15;
      "e": return 16;  "r": return 17;  "5": return 18;  "t": return 19;
      "6": return 20;  "y": return 21;  "7": return 22;  "u": return 23;
      "i": return 24;
      default: return -1;
    endcase
  endfunction

  always_comb begin
    int s;
    s = key_to_semitone(address);
    data = (s < 0) ? '0 : note_period[s];
  end

endmodule
