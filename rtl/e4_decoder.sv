// e4_decoder -- the basic "correct" unit of the shift-and-add-3 method.
//
// Input x is the four-bit value of one decade just before a shift: the three
// bits kept from the previous step on top and the newly shifted-in bit at the
// bottom, so only 0..9 occur. The unit returns x unchanged when x < 5 and x + 3
// otherwise; after the external one-bit shift (done purely by wiring) output
// bit 3 becomes the lowest bit of the next decade and bits 2..0 stay in this
// decade. It is a 10-word by 4-bit read-only memory addressed by x, built from
// the document's table (y = x for x < 5, x + 3 for x >= 5).
//
// Interface: x[3:0] in (x[3] = X1, most significant), y[3:0] out (y[3] = Y1).
// Codes 10..15 never occur in a lattice; this design returns 0 for them (the
// document does not define them). Timing: purely combinational, one unit
// access time.
module e4_decoder
  import bcd_pkg::*;
(
  input  logic [3:0] x,
  output logic [3:0] y
);
  typedef logic [3:0] rom_t [E4_WORDS];

  function automatic rom_t build_rom();
    rom_t r;
    for (int unsigned line = 0; line < E4_WORDS; line++) r[line] = e4_word(line);
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  always_comb y = (x < 4'(E4_WORDS)) ? ROM[x] : '0;
endmodule
