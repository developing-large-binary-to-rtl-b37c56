// static_conv_e6 -- combinational binary-to-BCD converter built as a lattice
// of E6 look-up units.
//
// How it works: each E6 performs three successive shift-and-add-3 steps of one
// decade. Decade 0 takes the binary number most significant bit first: its
// first unit receives 0 and the two top bits as the "remainder" and the next
// three bits as data; every later unit of the decade receives the previous
// unit's remainder and the next three bits. The three carries of every unit
// are appended, in order, to the bit stream of the next decade, which is cut
// into groups of three the same way. Because the first unit of a decade needs
// five stream bits, a unit of decade k+1 draws one carry from one unit of
// decade k and two from the next one; this is the skewed lattice of the
// interconnect map. The last bit of each stream is not decoded and becomes the
// lowest bit of that decade's BCD digit.
//
// With K = ceil(N/3) - 1, decade k has K-k units and the lattice has
// K(K+1)/2 units (28 for 24 bits, 45 for 30 bits).
//
// Interface: bin[N-1:0] in, bcd[4*DIGITS-1:0] out, units digit in bcd[3:0],
// DIGITS = K+1. Timing: combinational. Units are numbered here by
// (decade, group); the longest path runs through about 2K-1 units.
//
// From the document: the unit, the map and its numbering rule, the 24-bit
// default. This design's choice: N is padded with leading zeros to a multiple
// of three.
module static_conv_e6
  import bcd_pkg::*;
#(
  parameter int unsigned N = 24,
  localparam int unsigned DIGITS = lattice_decades(N) + 1
) (
  input  logic [N-1:0]        bin,
  output logic [4*DIGITS-1:0] bcd
);
  localparam int unsigned NP = pad3(N);
  localparam int unsigned K  = NP / 3 - 1;

  initial assert (N >= 4) else $error("static_conv_e6: N must be at least 4");

  logic [NP-1:0] binp;
  assign binp = NP'(bin);

  // stream[k]: bits entering decade k, first bit in element 0; only the
  // first 3*(K-k)+3 bits are used, the rest are tied to 0.
  logic [0:NP-1] stream [0:K];
  assign stream[0] = binp;

  for (genvar k = 0; k <= K; k++) begin : dec
    localparam int unsigned G = K - k;    // E6 units in decade k
    logic [0:3*G+2] s;                    // incoming stream, first bit in s[0]
    assign s = stream[k][0:3*G+2];

    if (G > 0) begin : act
      logic [0:3*G-1] cq;                 // carries to decade k+1
      logic [2:0]     r [0:G];            // remainder between units
      assign r[0] = {1'b0, s[0], s[1]};
      for (genvar g = 0; g < G; g++) begin : unit
        logic [5:0] o;
        e6_decoder u_e6 (.i({r[g], s[3*g+2 +: 3]}), .o(o));
        assign cq[3*g +: 3] = o[5:3];
        assign r[g+1]       = o[2:0];
      end
      assign stream[k+1] = {cq, (NP-3*G)'(0)};
      assign bcd[4*k +: 4] = {r[G], s[3*G+2]};
    end else begin : act
      assign bcd[4*k +: 4] = {1'b0, s[0], s[1], s[2]};
    end
  end
endmodule
