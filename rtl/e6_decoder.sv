// e6_decoder -- six-input, six-output look-up unit (40 words x 6 bits).
//
// It replaces three E4 steps of one decade. Input i[5:3] (I6..I4) is the
// decade's running remainder r (0..4, "modulo 5"); i[2:0] (I3..I1) are the
// next three bits shifted into the decade, most significant first. With
// v = 8*r + b the unit returns o[5:3] = v / 5, the three carries the decade
// sends to the next decade (first carry in o[5]), and o[2:0] = v mod 5, the new
// remainder. Because r < 5 only 40 of the 64 addresses are lines of the table;
// the line number is the input code itself.
//
// The table is the document's: line n has input code (n/8 in base 5, n mod 8)
// and output code (n/5 in base 8, n mod 5). Unused addresses 40..63 read as 0,
// which is this design's choice. Timing: combinational, one access time.
module e6_decoder
  import bcd_pkg::*;
(
  input  logic [5:0] i,
  output logic [5:0] o
);
  typedef logic [5:0] rom_t [E6_WORDS];

  function automatic rom_t build_rom();
    rom_t r;
    for (int unsigned line = 0; line < E6_WORDS; line++) r[line] = e6_word(line);
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  always_comb o = (i < 6'(E6_WORDS)) ? ROM[i] : '0;
endmodule
