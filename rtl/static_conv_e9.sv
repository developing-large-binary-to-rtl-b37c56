// static_conv_e9 -- combinational binary-to-BCD converter built from E9
// look-up units, each of which is two neighbouring E6 units of one decade.
//
// How it works: the lattice is the E6 lattice (see static_conv_e6): decade k
// consists of K-k E6 groups in a chain. Here consecutive groups of a decade
// are merged pairwise into one E9, so that no merged unit needs a signal that
// it produces itself. Two pairings are provided:
//   GROUPING = 1  "1, 2/4, 3/5 ...": in even decades the first group stays
//                 alone, the rest are paired from the second group on; odd
//                 decades are paired from their first group. This is the
//                 faster pairing and the default.
//   GROUPING = 0  "1/2, 3/5, 4/7 ...": every decade is paired from its first
//                 group.
// A group left alone is an E9 with its three top inputs grounded, so it acts
// as an E6 on its six low pins and its three top outputs stay 0.
//
// Interface: bin[N-1:0] in, bcd out as packed BCD digits, units digit in
// bcd[3:0], DIGITS = ceil(N/3). Timing: combinational.
//
// From the document: the unit, both pairings, the rule of grounding unused
// inputs of truncated units, the 24-bit size of the wiring diagrams. This
// design's choice: N padded to a multiple of three; the trailing single group
// of a decade with an odd count is also a grounded E9.
module static_conv_e9
  import bcd_pkg::*;
#(
  parameter int unsigned N        = 24,
  parameter bit          GROUPING = 1'b1,
  localparam int unsigned DIGITS = lattice_decades(N) + 1
) (
  input  logic [N-1:0]        bin,
  output logic [4*DIGITS-1:0] bcd
);
  localparam int unsigned NP = pad3(N);
  localparam int unsigned K  = NP / 3 - 1;

  initial assert (N >= 4) else $error("static_conv_e9: N must be at least 4");

  // Number of E9 units in a decade with g groups.
  function automatic int unsigned n_units(input int unsigned g, input bit single_first);
    if (single_first) return 1 + g / 2;
    return (g + 1) / 2;
  endfunction

  // First group handled by unit u.
  function automatic int unsigned first_group(input int unsigned u, input bit single_first);
    if (single_first) return (u == 0) ? 0 : 2 * u - 1;
    return 2 * u;
  endfunction

  logic [NP-1:0] binp;
  assign binp = NP'(bin);

  // stream[k]: bits entering decade k, first bit in element 0; only the
  // first 3*(K-k)+3 bits are used, the rest are tied to 0.
  logic [0:NP-1] stream [0:K];
  assign stream[0] = binp;

  for (genvar k = 0; k <= K; k++) begin : dec
    localparam int unsigned G  = K - k;
    localparam bit          SF = GROUPING && (k % 2 == 0);
    logic [0:3*G+2] s;
    assign s = stream[k][0:3*G+2];

    if (G > 0) begin : act
      localparam int unsigned NU = n_units(G, SF);
      logic [0:3*G-1] cq;
      logic [2:0]     r [0:NU];
      assign r[0] = {1'b0, s[0], s[1]};
      for (genvar u = 0; u < NU; u++) begin : unit
        localparam int unsigned G0 = first_group(u, SF);
        localparam int unsigned SZ = (SF && u == 0) ? 1 : ((G - G0 >= 2) ? 2 : 1);
        logic [8:0] o;
        if (SZ == 2) begin : full
          e9_decoder u_e9 (.i({r[u], s[3*G0+2 +: 6]}), .o(o));
          assign cq[3*G0 +: 6] = o[8:3];
        end else begin : trunc
          e9_decoder u_e9 (.i({3'b000, r[u], s[3*G0+2 +: 3]}), .o(o));
          assign cq[3*G0 +: 3] = o[5:3];
        end
        assign r[u+1] = o[2:0];
      end
      assign stream[k+1] = {cq, (NP-3*G)'(0)};
      assign bcd[4*k +: 4] = {r[NU], s[3*G+2]};
    end else begin : act
      assign bcd[4*k +: 4] = {1'b0, s[0], s[1], s[2]};
    end
  end
endmodule
