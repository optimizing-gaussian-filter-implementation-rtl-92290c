// canny_top: streaming Canny edge detector with a multiplierless Gaussian filter.
//
// Four stages in a chain, one pixel per clock at full rate:
//   gauss_smooth   3x3 Gaussian (1/256)[21 31 21; 31 48 31; 21 31 21] built from a
//                  graph-based shift/add tree (ARCH: exact or approximate graph)
//   sobel_gradient |Gx|+|Gy| and a four-sector direction
//   nms            non-maximum suppression along the direction
//   hysteresis     double threshold, weak pixels kept next to strong ones
// The chain and the Gaussian adder graphs follow the document; the other
// stages' internals, the widths and the streaming protocol are this design's.
//
// Interface: in_valid/in_pix carry a W x H 8-bit grey image in raster order, no
// back-pressure; in_valid may drop at any time inside a frame. Between frames
// the input must stay idle for at least 4*(W+1) + 32 cycles, so every stage can
// empty its line buffers; overrun reports a violation. th_low/th_high (on the
// |Gx|+|Gy| scale, 0..2040) must be stable during a frame. Output: out_valid with
// one edge bit per pixel, in raster order, with first/last-of-frame flags.
// At full input rate, edge bit (r,c) appears 4*(W+1) + LAT + 8 cycles after
// input pixel (r,c) (LAT = 7 exact, 5 approximate): each of the four windows
// lags by W+1 pixels plus one register, and the stages add LAT, 2, 1 and 1.
module canny_top
  import canny_pkg::*;
#(
  parameter int unsigned W    = 512,
  parameter int unsigned H    = 512,
  parameter gb_arch_e    ARCH = GB_EXACT,
  localparam int unsigned DW  = 8,
  localparam int unsigned MW  = DW + 3,
  localparam int unsigned CW  = (W > 1) ? $clog2(W) : 1,
  localparam int unsigned RW  = $clog2(H + 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [MW-1:0] th_low,
  input  logic [MW-1:0] th_high,
  input  logic          in_valid,
  input  logic [DW-1:0] in_pix,
  output logic          out_valid,
  output logic          out_edge,
  output logic [RW-1:0] out_row,
  output logic [CW-1:0] out_col,
  output logic          out_first,
  output logic          out_last,
  output logic          overrun
);

  // Each stage keeps its own position counters, so only the data, the valid
  // strobe and the overrun flag pass between stages.
  logic          g_valid, g_ovr;
  logic [DW-1:0] g_pix;

  logic          s_valid, s_ovr;
  logic [MW-1:0] s_mag;
  grad_dir_e     s_dir;

  logic          n_valid, n_ovr;
  logic [MW-1:0] n_mag;

  logic          h_ovr;

  gauss_smooth #(.DW(DW), .W(W), .H(H), .ARCH(ARCH)) u_gauss (
    .clk, .rst_n, .in_valid, .in_pix,
    .out_valid(g_valid), .out_pix(g_pix), .out_row(), .out_col(),
    .out_first(), .out_last(), .overrun(g_ovr)
  );

  sobel_gradient #(.DW(DW), .W(W), .H(H)) u_sobel (
    .clk, .rst_n, .in_valid(g_valid), .in_pix(g_pix),
    .out_valid(s_valid), .out_mag(s_mag), .out_dir(s_dir), .out_row(),
    .out_col(), .out_first(), .out_last(), .overrun(s_ovr)
  );

  nms #(.MW(MW), .W(W), .H(H)) u_nms (
    .clk, .rst_n, .in_valid(s_valid), .in_mag(s_mag), .in_dir(s_dir),
    .out_valid(n_valid), .out_mag(n_mag), .out_row(), .out_col(),
    .out_first(), .out_last(), .overrun(n_ovr)
  );

  hysteresis #(.MW(MW), .W(W), .H(H)) u_hyst (
    .clk, .rst_n, .th_low, .th_high, .in_valid(n_valid), .in_mag(n_mag),
    .out_valid, .out_edge, .out_row, .out_col, .out_first, .out_last,
    .overrun(h_ovr)
  );

  assign overrun = g_ovr | s_ovr | n_ovr | h_ovr;

endmodule
