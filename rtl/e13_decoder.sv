// e13_decoder -- thirteen-input, thirteen-output look-up unit
// (3200 words x 13 bits).
//
// Four E6 units merged over two neighbouring decades: six steps of a lower
// decade and the six matching steps of the decade above it. Inputs:
//   i[12:9] d  the upper decade's value (0..9) ready for its next correction
//   i[8:6]  r  the lower decade's remainder (0..4)
//   i[5:0]  b  six bits entering the lower decade, first bit in i[5]
// Outputs:
//   o[12:7]    six carries leaving the upper decade, first carry in o[12]
//   o[6:3]     the upper decade's new value (0..9), its last bit still pending
//   o[2:0]     the lower decade's new remainder (0..4)
// With line = ((d*5 + r)*8 + b1)*8 + b0 the output code is the same line number
// written in the radices (8, 8, 10, 5), as the document prescribes. The memory
// is organised as ten banks of 320 words selected by d, so a line number is
// d*320 plus the nine low input bits. Codes outside the 3200 lines read as 0
// (this design's choice). Combinational, one access time.
module e13_decoder
  import bcd_pkg::*;
(
  input  logic [12:0] i,
  output logic [12:0] o
);
  typedef logic [12:0] rom_t [E13_WORDS];

  function automatic rom_t build_rom();
    rom_t r;
    for (int unsigned line = 0; line < E13_WORDS; line++) r[line] = e13_word(line);
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  logic [11:0] line;
  always_comb begin
    line = 12'(i[12:9]) * 12'd320 + 12'(i[8:0]);
    o = (i[12:9] < 4'd10 && i[8:0] < 9'(E9_WORDS)) ? ROM[line] : '0;
  end
endmodule
