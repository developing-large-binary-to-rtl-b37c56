// bcd_comparator -- magnitude comparator of two packed BCD words.
//
// Compares the decoded binary register (bin_bcd) with the BCD number being
// converted (ref_bcd) and reports exactly one of LOW (bin_bcd < ref_bcd), EVEN
// (equal) or HIGH (bin_bcd > ref_bcd). For valid BCD words the digit-by-digit
// order equals the order of the packed bit vectors, so a plain unsigned
// comparison of the two vectors is enough; that is this design's choice, as
// the document gives only the comparator's three outputs.
//
// Interface: W-bit inputs, three one-hot flags and the same result as cmp_t.
// Timing: combinational.
module bcd_comparator
  import bcd_pkg::*;
#(
  parameter int unsigned W = 12
) (
  input  logic [W-1:0] bin_bcd,
  input  logic [W-1:0] ref_bcd,
  output logic         low,
  output logic         even,
  output logic         high,
  output cmp_t         cmp
);
  always_comb begin
    low  = bin_bcd < ref_bcd;
    high = bin_bcd > ref_bcd;
    even = !low && !high;
    cmp  = low ? CMP_LOW : (high ? CMP_HIGH : CMP_EVEN);
  end
endmodule
