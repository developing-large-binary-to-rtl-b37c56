// e9_decoder -- nine-input, nine-output look-up unit (320 words x 9 bits).
//
// Two E6 units of the same decade merged into one memory: six steps of one
// decade. Input i[8:6] is the decade remainder r (0..4), i[5:3] and i[2:0] the
// next six bits shifted into the decade (first bit in i[5]). With
// v = 64*r + 8*b1 + b0 the output is o[8:6] = v / 40 and o[5:3] = (v/5) mod 8,
// together the six carries to the next decade (first carry in o[8]), and
// o[2:0] = v mod 5, the new remainder.
//
// Contents follow the document's programming rule: line n has input code
// (base 5, base 8, base 8) and output code (base 8, base 8, base 5). The input
// code equals the line number. Grounding i[8:6] makes the unit act as an E6
// on its six low pins, which is how truncated units of a lattice use it.
// Addresses 320..511 read as 0 (this design's choice). Combinational.
module e9_decoder
  import bcd_pkg::*;
(
  input  logic [8:0] i,
  output logic [8:0] o
);
  typedef logic [8:0] rom_t [E9_WORDS];

  function automatic rom_t build_rom();
    rom_t r;
    for (int unsigned line = 0; line < E9_WORDS; line++) r[line] = e9_word(line);
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  always_comb o = (i < 9'(E9_WORDS)) ? ROM[i] : '0;
endmodule
