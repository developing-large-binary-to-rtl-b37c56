// static_conv_e4 -- combinational binary-to-BCD converter built as a tree of
// E4 "add 3 if >= 5" units.
//
// How it works: the shift-and-add-3 algorithm is unrolled in space. Decade 0
// receives the binary number most significant bit first; its first unit looks
// at the three top bits (with a 0 above them), every further unit takes the
// three remainder bits of the previous unit plus the next binary bit. The
// carry (output bit 3) of every unit goes, in order, into the stream of the
// next decade, which is decoded the same way. The last bit of each stream is
// not decoded and becomes the lowest bit of that decade's BCD digit. Decade k
// has 3*(K-k) units, where K = ceil(N/3) - 1; the top decade only collects
// three carries.
//
// Interface: bin[N-1:0] in, bcd out as packed BCD digits, units digit in
// bcd[3:0]. DIGITS = ceil(N/3). Timing: combinational; the longest path passes
// about N-3 units (one per decoded bit of decade 0).
//
// From the document: the unit, its table and the tree wiring. This design's
// choice: N is padded with leading zeros to a multiple of three so every
// decade is a whole number of unit groups; the default N = 15 is the largest
// tree the document draws.
module static_conv_e4
  import bcd_pkg::*;
#(
  parameter int unsigned N = 15,
  localparam int unsigned DIGITS = lattice_decades(N) + 1
) (
  input  logic [N-1:0]        bin,
  output logic [4*DIGITS-1:0] bcd
);
  localparam int unsigned NP = pad3(N);
  localparam int unsigned K  = NP / 3 - 1;

  initial assert (N >= 4) else $error("static_conv_e4: N must be at least 4");

  logic [NP-1:0] binp;
  assign binp = NP'(bin);

  // stream[k]: bits entering decade k, first bit in element 0; only the
  // first 3*(K-k)+3 bits are used, the rest are tied to 0.
  logic [0:NP-1] stream [0:K];
  assign stream[0] = binp;

  for (genvar k = 0; k <= K; k++) begin : dec
    localparam int unsigned G = K - k;    // groups of three units in decade k
    logic [0:3*G+2] s;                    // incoming stream, first bit in s[0]
    assign s = stream[k][0:3*G+2];

    if (G > 0) begin : act
      logic [0:3*G-1] cq;                 // carries to decade k+1
      logic [2:0]     r [0:3*G];          // remainder between units
      assign r[0] = {1'b0, s[0], s[1]};
      for (genvar i = 0; i < 3 * G; i++) begin : step
        logic [3:0] y;
        e4_decoder u_e4 (.x({r[i], s[i+2]}), .y(y));
        assign cq[i]   = y[3];
        assign r[i+1]  = y[2:0];
      end
      assign stream[k+1] = {cq, (NP-3*G)'(0)};
      assign bcd[4*k +: 4] = {r[3*G], s[3*G+2]};
    end else begin : act
      assign bcd[4*k +: 4] = {1'b0, s[0], s[1], s[2]};
    end
  end
endmodule
