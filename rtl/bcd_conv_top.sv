// bcd_conv_top -- the family of ROM-based binary/BCD converters side by side.
//
// Four static (purely combinational) binary-to-BCD converters, which differ
// only in the size of the look-up unit they are built from, a sequential
// ("hybrid") converter that runs the E6 lattice on one E6 unit and a shifting
// register, the same with two E6 units (the double form), two more hybrid
// converters that run the E9 and E13 lattices on one E9 or E13 unit, and a
// BCD-to-binary converter that reuses a static converter in a
// successive-approximation loop. They share no signals; each has its own
// ports, prefixed s4_, s6_, s9_, s13_, hy_, hd_, h9_, h13_ and fb_. Clock
// and reset are shared by the five sequential converters.
//
// Sizes default to the ones the structures are drawn at: 15 bits for the E4
// tree, 24 bits for the E6 and E9 lattices, 30 bits for the E13 lattice,
// 12 bits for the single and double E6 hybrid converters, 24 bits for the E9 one and 30 bits
// for the E13 one (sizes this design chose) and 8 bits for the feed-back converter.
// BCD ports carry packed digits, units digit in bits [3:0].
module bcd_conv_top
  import bcd_pkg::*;
#(
  parameter int unsigned N_E4     = 15,
  parameter int unsigned N_E6     = 24,
  parameter int unsigned N_E9     = 24,
  parameter bit          E9_GROUP = 1'b1,
  parameter int unsigned N_E13    = 30,
  parameter int unsigned N_HYB    = 12,
  parameter int unsigned N_HYD    = 12,
  parameter int unsigned N_HY9    = 24,
  parameter int unsigned N_HY13   = 30,
  parameter int unsigned K_FB     = 8,
  localparam int unsigned D_E4  = lattice_decades(N_E4) + 1,
  localparam int unsigned D_E6  = lattice_decades(N_E6) + 1,
  localparam int unsigned D_E9  = lattice_decades(N_E9) + 1,
  localparam int unsigned D_E13 = ((N_E13 + 5) / 6) * 2,
  localparam int unsigned D_HYB = N_HYB / 3,
  localparam int unsigned D_HYD = N_HYD / 3,
  localparam int unsigned D_HY9 = N_HY9 / 3,
  localparam int unsigned D_HY13 = N_HY13 / 3,
  localparam int unsigned D_FB  = lattice_decades(K_FB) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // static converters
  input  logic [N_E4-1:0]      s4_bin,
  output logic [4*D_E4-1:0]    s4_bcd,
  input  logic [N_E6-1:0]      s6_bin,
  output logic [4*D_E6-1:0]    s6_bcd,
  input  logic [N_E9-1:0]      s9_bin,
  output logic [4*D_E9-1:0]    s9_bcd,
  input  logic [N_E13-1:0]     s13_bin,
  output logic [4*D_E13-1:0]   s13_bcd,
  // hybrid converter
  input  logic                 hy_start,
  input  logic [N_HYB-1:0]     hy_bin,
  output logic                 hy_busy,
  output logic                 hy_done,
  output logic [4*D_HYB-1:0]   hy_bcd,
  // hybrid converter with two E6 (double form)
  input  logic                 hd_start,
  input  logic [N_HYD-1:0]     hd_bin,
  output logic                 hd_busy,
  output logic                 hd_done,
  output logic [4*D_HYD-1:0]   hd_bcd,
  // hybrid converter with a single E9
  input  logic                 h9_start,
  input  logic [N_HY9-1:0]     h9_bin,
  output logic                 h9_busy,
  output logic                 h9_done,
  output logic [4*D_HY9-1:0]   h9_bcd,
  // hybrid converter with a single E13
  input  logic                 h13_start,
  input  logic [N_HY13-1:0]    h13_bin,
  output logic                 h13_busy,
  output logic                 h13_done,
  output logic [4*D_HY13-1:0]  h13_bcd,
  // feed-back BCD-to-binary converter
  input  logic                 fb_start,
  input  logic [4*D_FB-1:0]    fb_bcd,
  output logic                 fb_busy,
  output logic                 fb_done,
  output logic                 fb_ovf,
  output logic [K_FB-1:0]      fb_bin
);
  static_conv_e4  #(.N(N_E4))  u_s4  (.bin(s4_bin),  .bcd(s4_bcd));
  static_conv_e6  #(.N(N_E6))  u_s6  (.bin(s6_bin),  .bcd(s6_bcd));
  static_conv_e9  #(.N(N_E9), .GROUPING(E9_GROUP)) u_s9 (.bin(s9_bin), .bcd(s9_bcd));
  static_conv_e13 #(.N(N_E13)) u_s13 (.bin(s13_bin), .bcd(s13_bcd));

  hybrid_conv #(.N(N_HYB)) u_hy (
    .clk, .rst_n, .start(hy_start), .bin(hy_bin),
    .busy(hy_busy), .done(hy_done), .bcd(hy_bcd)
  );

  hybrid_conv #(.N(N_HYD), .NDEC(2)) u_hd (
    .clk, .rst_n, .start(hd_start), .bin(hd_bin),
    .busy(hd_busy), .done(hd_done), .bcd(hd_bcd)
  );

  hybrid_conv #(.N(N_HY9), .DEC(9)) u_h9 (
    .clk, .rst_n, .start(h9_start), .bin(h9_bin),
    .busy(h9_busy), .done(h9_done), .bcd(h9_bcd)
  );

  hybrid_conv #(.N(N_HY13), .DEC(13)) u_h13 (
    .clk, .rst_n, .start(h13_start), .bin(h13_bin),
    .busy(h13_busy), .done(h13_done), .bcd(h13_bcd)
  );

  feedback_bcd2bin #(.K(K_FB)) u_fb (
    .clk, .rst_n, .start(fb_start), .bcd_in(fb_bcd),
    .busy(fb_busy), .done(fb_done), .ovf(fb_ovf), .bin(fb_bin)
  );
endmodule
