// piano_pkg: widths and constants shared by the UART piano.
//
// The piano takes ASCII characters over a UART, looks each one up in a
// 256-entry scale ROM that gives the half period of its note in clock cycles
// (tone_switch_period, 24 bits wide), and plays that note as a square wave.
// The square wave reaches the audio codec as two's-complement PCM over I2S:
// the high half of the wave is the largest PCM value of the sample width, the
// low half the smallest. The 8-bit characters, the 24-bit period and the
// 20-bit sample width with its extreme values 0x7FFFF / 0x80000 follow the
// lab text; everything else about the sample path is this design's choice.
package piano_pkg;

  localparam int unsigned CHAR_W   = 8;   // ASCII character width
  localparam int unsigned PERIOD_W = 24;  // tone_switch_period width
  localparam int unsigned PCM_W    = 20;  // I2S sample width (bit depth)

  typedef logic [CHAR_W-1:0]   char_t;
  typedef logic [PERIOD_W-1:0] period_t;

  // Largest and smallest two's-complement value of a W-bit sample.
  function automatic logic [31:0] pcm_max(int unsigned w);
    return (32'd1 << (w - 1)) - 32'd1;
  endfunction

  function automatic logic [31:0] pcm_min(int unsigned w);
    return 32'd1 << (w - 1);
  endfunction

endpackage
