// secure_scan_pkg: constants shared by the blocks of the secure scan lock.
//
// DEFAULT_KEY_W is the key length of the main configuration (8 bits, the width
// shown in the reference waveforms; 4, 16, 32 and 64 are the other supported
// sizes). DEFAULT_GOLDEN_KEY is the golden key 8'h84 used in the valid-key
// waveform. ROM_WORD_W is the width of one golden-key ROM word and
// lfsr_width() derives the LFSR length from the key length (KEY_W/4, at least
// 2), which gives the 2-bit LFSR of the 8-bit configuration; both are choices
// of this implementation.
package secure_scan_pkg;

  localparam int DEFAULT_KEY_W = 8;
  localparam logic [63:0] DEFAULT_GOLDEN_KEY = 64'h84;
  localparam int ROM_WORD_W = 4;

  // LFSR length that goes with a key length.
  function automatic int lfsr_width(input int key_w);
    return (key_w / 4 < 2) ? 2 : key_w / 4;
  endfunction

endpackage
