// bcd_pkg -- shared constants and constant functions for the binary/BCD
// conversion structures.
//
// The look-up units (E4, E6, E9, E13) are read-only memories whose words are
// produced by a mixed-radix renumbering of the line (address) number: the
// input code writes the line number with the "decoded" digit (modulo 5 or 10)
// on top and plain binary octal digits below, the output code writes the same
// line number with the octal carry digits on top and the modulo-5 remainder at
// the bottom. The functions below compute one ROM word from its line number,
// exactly as that renumbering prescribes, so the tables are built at
// elaboration time instead of being stored as data.
//
// Also here: the unit-count helpers of the static lattices and the comparator
// result type of the successive-approximation converter. The formulas follow
// the document; the function and type names are this design's own.
package bcd_pkg;

  // Line counts of the look-up units (memory words actually stored).
  localparam int unsigned E4_WORDS  = 10;
  localparam int unsigned E6_WORDS  = 40;
  localparam int unsigned E9_WORDS  = 320;
  localparam int unsigned E13_WORDS = 3200;

  // Result of comparing the decoded binary register with the BCD register.
  typedef enum logic [1:0] {
    CMP_LOW  = 2'd0,   // BIN < BCD
    CMP_EVEN = 2'd1,   // BIN = BCD
    CMP_HIGH = 2'd2    // BIN > BCD
  } cmp_t;

  // E4: four-bit decade value x (0..9) -> x, or x+3 when x >= 5.
  // Output bit 3 is the carry to the next decade, bits 2..0 the remainder
  // (x mod 5).
  function automatic logic [3:0] e4_word(input int unsigned line);
    return {1'(line / 5), 3'(line % 5)};
  endfunction

  // E6: line = 8*r + b (r < 5, b < 8) -> {line / 5 (octal), line mod 5}.
  function automatic logic [5:0] e6_word(input int unsigned line);
    return {3'(line / 5), 3'(line % 5)};
  endfunction

  // E9: line = 64*r + 8*b1 + b0 -> {line / 40, (line / 5) mod 8, line mod 5}.
  function automatic logic [8:0] e9_word(input int unsigned line);
    return {3'(line / 40), 3'((line / 5) % 8), 3'(line % 5)};
  endfunction

  // E13: line = ((d*5 + r)*8 + b1)*8 + b0 with d < 10
  //      -> {line / 400, (line / 50) mod 8, (line / 5) mod 10, line mod 5}.
  function automatic logic [12:0] e13_word(input int unsigned line);
    return {3'(line / 400), 3'((line / 50) % 8), 4'((line / 5) % 10), 3'(line % 5)};
  endfunction

  // Binary width rounded up to whole three-bit groups.
  function automatic int unsigned pad3(input int unsigned n);
    return ((n + 2) / 3) * 3;
  endfunction

  // Number of decoded decades of an n-bit static lattice (the top decade,
  // which only collects carries, is not counted). BCD digits = this + 1.
  function automatic int unsigned lattice_decades(input int unsigned n);
    return pad3(n) / 3 - 1;
  endfunction

endpackage
