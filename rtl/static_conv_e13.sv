// static_conv_e13 -- combinational binary-to-BCD converter built from E13
// look-up units (four E6 groups over two decades) plus one E6 at the head of
// every second decade.
//
// How it works: the E6 lattice (see static_conv_e6) is cut into decade pairs
// (0,1), (2,3), ... . In a pair (a, a+1) the first group of decade a is an
// E6; its remainder starts the lower chain and its three carries, with a 0 on
// top, form the first value of decade a+1. Then each E13 takes groups g and
// g+1 of decade a together with groups g-1 and g of decade a+1
// (g = 1, 3, 5, ...): it receives the upper decade's pending value (0..9), the
// lower remainder and six binary bits, and passes on the upper value, the
// lower remainder and six carries for the next pair. The carries between the
// two decades stay inside the memory. For 30 bits this gives 10 E13 and 5 E6
// units.
//
// Interface: bin[N-1:0] in, bcd out as packed BCD digits, units digit in
// bcd[3:0], DIGITS = ceil(N/6)*2. Timing: combinational.
//
// From the document: the E13 code, the grouping, the 30-bit size of its
// wiring diagram, and the option of E6 units at the single positions, which
// this design takes. This design's choice: N is padded with leading zeros to a
// multiple of six so that the decades pair up (the document tabulates this
// structure only at multiples of six); the extra top digit is then 0.
module static_conv_e13
  import bcd_pkg::*;
#(
  parameter int unsigned N = 30,
  localparam int unsigned DIGITS = ((N + 5) / 6) * 2
) (
  input  logic [N-1:0]        bin,
  output logic [4*DIGITS-1:0] bcd
);
  localparam int unsigned NP = DIGITS * 3;    // padded width, multiple of 6
  localparam int unsigned K  = NP / 3 - 1;    // decoded decades, odd
  localparam int unsigned NPAIR = (K + 1) / 2;

  initial assert (N >= 4) else $error("static_conv_e13: N must be at least 4");

  logic [NP-1:0] binp;
  assign binp = NP'(bin);

  // stream[p]: bits entering the lower decade of pair p, first bit in
  // element 0; only the first 3*(K-2p)+3 are used, the rest are tied to 0.
  logic [0:NP-1] stream [0:NPAIR-1];
  assign stream[0] = binp;

  for (genvar p = 0; p < NPAIR; p++) begin : pr
    localparam int unsigned A  = 2 * p;       // lower decade of the pair
    localparam int unsigned GA = K - A;       // its E6 groups (odd)
    localparam int unsigned NE = (GA - 1) / 2;// E13 units of the pair

    logic [0:3*GA+2] sa;                      // stream into decade A
    assign sa = stream[p][0:3*GA+2];

    // Head of decade A: a single E6.
    logic [5:0] head;
    e6_decoder u_head (.i({1'b0, sa[0], sa[1], sa[2 +: 3]}), .o(head));

    if (NE > 0) begin : up
      logic [3:0]      d  [0:NE];             // pending value of decade A+1
      logic [2:0]      ra [0:NE];             // remainder of decade A
      logic [0:6*NE-1] cqb;                   // carries out of decade A+1
      assign d[0]  = {1'b0, head[5:3]};
      assign ra[0] = head[2:0];
      for (genvar e = 0; e < NE; e++) begin : unit
        localparam int unsigned G = 2 * e + 1;
        logic [12:0] o;
        e13_decoder u_e13 (.i({d[e], ra[e], sa[3*G+2 +: 6]}), .o(o));
        assign cqb[6*e +: 6] = o[12:7];
        assign d[e+1]        = o[6:3];
        assign ra[e+1]       = o[2:0];
      end
      assign stream[p+1]       = {cqb, (NP-6*NE)'(0)};
      assign bcd[4*A +: 4]     = {ra[NE], sa[3*GA+2]};
      assign bcd[4*(A+1) +: 4] = d[NE];
    end else begin : up
      // Last decoded decade: one group only; the top digit collects its carries.
      assign bcd[4*A +: 4]     = {head[2:0], sa[5]};
      assign bcd[4*(A+1) +: 4] = {1'b0, head[5:3]};
    end
  end
endmodule
