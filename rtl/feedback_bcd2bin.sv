// feedback_bcd2bin -- BCD-to-binary converter that reuses a static
// binary-to-BCD decoder in a feed-back loop (successive approximation).
//
// How it works: R1 holds the binary guess, Rx (a static_conv_e6 lattice)
// decodes R1 to BCD, a comparator checks it against R0, the BCD number to be
// converted. R1 starts as all ones. A K+1 stage ring counter with a single one
// rippling through selects the bit under test: at stage n (1..K) bit B_n
// (B_1 = most significant) is cleared, and at stage n+1 it is set again if the
// comparator then says LOW (guess below the target). Every bit is thus an
// R/S flip-flop, reset by its own stage and set by the following stage and
// LOW. The run ends as soon as the comparator says EVEN, or after stage K+1.
//
// Interface: start (one cycle, while not busy) loads bcd_in into R0 and all
// ones into R1; busy is high during the run; done pulses for one cycle with
// bin valid. ovf is set with done when the target is above 2^K - 1 (the first
// compare, all ones, is already LOW); R1 then stays all ones.
// Timing: one decode-and-compare per clock, at most K+1 clocks from the start
// edge to the edge that raises done; fewer when EVEN comes earlier (75 with
// K = 8 ends after 7 clocks). Reset is asynchronous, active low.
//
// From the document: registers R0 and R1, the static decoder, the three-way
// comparator, the ring counter of K+1 stages, the set/reset rule and the 8-bit
// size. This design's choices: the handshake, the reset, the ovf flag and
// the use of the E6 lattice as Rx.
module feedback_bcd2bin
  import bcd_pkg::*;
#(
  parameter int unsigned K = 8,
  localparam int unsigned DIGITS = lattice_decades(K) + 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [4*DIGITS-1:0] bcd_in,
  output logic                busy,
  output logic                done,
  output logic                ovf,
  output logic [K-1:0]        bin
);
  logic [4*DIGITS-1:0] r0;            // BCD to be converted
  logic [K-1:0]        r1;            // binary approximation, r1[K-1] = B_1
  logic [0:K]          ring;          // ring[m] = stage Q_(m+1)
  logic [4*DIGITS-1:0] rx;            // R1 decoded to BCD
  logic                low, even, high;
  cmp_t                cmp;

  static_conv_e6 #(.N(K)) u_rx (.bin(r1), .bcd(rx));

  bcd_comparator #(.W(4 * DIGITS)) u_cmp (
    .bin_bcd(rx), .ref_bcd(r0), .low(low), .even(even), .high(high), .cmp(cmp)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r0   <= '0;
      r1   <= '0;
      ring <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      ovf  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          r0   <= bcd_in;
          r1   <= '1;
          ring <= (K + 1)'(1) << K;   // one in stage Q_1
          busy <= 1'b1;
          ovf  <= 1'b0;
        end
      end else if (even) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else if (ring[0] && low) begin
        busy <= 1'b0;                 // target above all ones
        done <= 1'b1;
        ovf  <= 1'b1;
      end else begin
        for (int n = 1; n <= int'(K); n++) begin
          if (ring[n] && low)  r1[K-n]   <= 1'b1;   // set B_n at Q_(n+1)
          if (ring[n-1])       r1[K-n]   <= 1'b0;   // reset B_n at Q_n
        end
        ring <= ring >> 1;
        if (ring[K]) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign bin = r1;

  assert property (@(posedge clk) disable iff (!rst_n) busy |-> $onehot(ring));
  assert property (@(posedge clk) disable iff (!rst_n) $onehot({low, even, high}));
endmodule
