// sobel_gradient: gradient calculation stage of the Canny chain.
//
// A 3x3 window of the smoothed image is convolved with the two Sobel operators
//   Gx = (A3 + 2*A6 + A9) - (A1 + 2*A4 + A7)   (x grows to the right)
//   Gy = (A7 + 2*A8 + A9) - (A1 + 2*A2 + A3)   (y grows downwards)
// The edge strength is |Gx| + |Gy| and the direction is quantised to four
// sectors with integer tests against tan(22.5 deg) ~ 53/128 and
// tan(67.5 deg) ~ 309/128:
//   128|Gy| <= 53|Gx|  -> DIR_0,   128|Gy| >= 309|Gx| -> DIR_90,
//   otherwise DIR_45 when Gx and Gy have equal signs, else DIR_135.
// The document names Sobel operators for this stage; the |Gx|+|Gy| magnitude,
// the direction quantisation and the two-register pipeline are this design's.
//
// Interface: streaming as gauss_smooth. Output = {magnitude, direction} per
// pixel in raster order; latency 1 (window) + 2 cycles.
module sobel_gradient
  import canny_pkg::*;
#(
  parameter int unsigned DW  = 8,
  parameter int unsigned W   = 512,
  parameter int unsigned H   = 512,
  localparam int unsigned MW = DW + 3,
  localparam int unsigned CW = (W > 1) ? $clog2(W) : 1,
  localparam int unsigned RW = $clog2(H + 2),
  localparam int unsigned GW = DW + 4          // signed gradient width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [DW-1:0] in_pix,
  output logic          out_valid,
  output logic [MW-1:0] out_mag,
  output grad_dir_e     out_dir,
  output logic [RW-1:0] out_row,
  output logic [CW-1:0] out_col,
  output logic          out_first,
  output logic          out_last,
  output logic          overrun
);

  logic          win_valid;
  logic [DW-1:0] w [3][3];
  logic [RW-1:0] win_row;
  logic [CW-1:0] win_col;
  logic          win_first, win_last;

  window_3x3 #(.DW(DW), .W(W), .H(H)) u_win (
    .clk, .rst_n, .in_valid, .in_pix,
    .out_valid(win_valid), .out_win(w), .out_row(win_row), .out_col(win_col),
    .out_first(win_first), .out_last(win_last), .overrun
  );

  // Stage 1: the two gradients.
  logic signed [GW-1:0] gx_c, gy_c, gx_q, gy_q;

  always_comb begin
    gx_c = $signed({4'b0, w[0][2]}) + $signed({3'b0, w[1][2], 1'b0}) + $signed({4'b0, w[2][2]})
         - $signed({4'b0, w[0][0]}) - $signed({3'b0, w[1][0], 1'b0}) - $signed({4'b0, w[2][0]});
    gy_c = $signed({4'b0, w[2][0]}) + $signed({3'b0, w[2][1], 1'b0}) + $signed({4'b0, w[2][2]})
         - $signed({4'b0, w[0][0]}) - $signed({3'b0, w[0][1], 1'b0}) - $signed({4'b0, w[0][2]});
  end

  always_ff @(posedge clk) begin
    gx_q <= gx_c;
    gy_q <= gy_c;
  end

  // Stage 2: magnitude and direction sector.
  logic [GW-2:0]   ax, ay;
  logic [GW+7:0]   ay128, ax53, ax309;
  grad_dir_e       dir_c;

  always_comb begin
    ax    = gx_q[GW-1] ? (GW-1)'(-gx_q) : gx_q[GW-2:0];
    ay    = gy_q[GW-1] ? (GW-1)'(-gy_q) : gy_q[GW-2:0];
    ay128 = (GW+8)'(ay) << 7;
    ax53  = (GW+8)'(ax) * (GW+8)'(53);
    ax309 = (GW+8)'(ax) * (GW+8)'(309);
    if (ay128 <= ax53)                dir_c = DIR_0;
    else if (ay128 >= ax309)          dir_c = DIR_90;
    else if (gx_q[GW-1] == gy_q[GW-1]) dir_c = DIR_45;
    else                              dir_c = DIR_135;
  end

  always_ff @(posedge clk) begin
    out_mag <= MW'(ax) + MW'(ay);
    out_dir <= dir_c;
  end

  pipe_delay #(.WIDTH(1 + RW + CW + 2), .DEPTH(2)) u_side (
    .clk, .rst_n,
    .d({win_valid, win_row, win_col, win_first, win_last}),
    .q({out_valid, out_row, out_col, out_first, out_last})
  );

endmodule
