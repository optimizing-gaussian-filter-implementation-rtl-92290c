// hysteresis: hysteresis thresholding stage of the Canny chain.
//
// Each thinned magnitude is classed with two thresholds: STRONG when
// mag >= th_high, WEAK when th_low <= mag < th_high, NONE otherwise. A 3x3 window
// of classes is formed and the output edge bit is set for a STRONG pixel, and for
// a WEAK pixel that has at least one STRONG pixel among its eight neighbours.
// This is a single-pass, local form of hysteresis: a weak pixel connected to a
// strong edge only through other weak pixels is not kept. The document gives the
// stage's purpose only; the one-pass local rule and run-time thresholds are this
// design's choice (full edge tracking needs a frame store or repeated passes).
//
// Interface: streaming as gauss_smooth; th_low/th_high must be stable during a
// frame and th_low <= th_high. Output: one edge bit per pixel in raster order.
// Latency 1 (window) + 1 cycles.
module hysteresis
  import canny_pkg::*;
#(
  parameter int unsigned MW  = 11,
  parameter int unsigned W   = 512,
  parameter int unsigned H   = 512,
  localparam int unsigned CW = (W > 1) ? $clog2(W) : 1,
  localparam int unsigned RW = $clog2(H + 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [MW-1:0] th_low,
  input  logic [MW-1:0] th_high,
  input  logic          in_valid,
  input  logic [MW-1:0] in_mag,
  output logic          out_valid,
  output logic          out_edge,
  output logic [RW-1:0] out_row,
  output logic [CW-1:0] out_col,
  output logic          out_first,
  output logic          out_last,
  output logic          overrun
);

  edge_class_e   cls_in;
  logic          win_valid;
  logic [1:0]    w [3][3];
  logic [RW-1:0] win_row;
  logic [CW-1:0] win_col;
  logic          win_first, win_last;

  always_comb begin
    if (in_mag >= th_high)     cls_in = EDGE_STRONG;
    else if (in_mag >= th_low) cls_in = EDGE_WEAK;
    else                       cls_in = EDGE_NONE;
  end

  window_3x3 #(.DW(2), .W(W), .H(H)) u_win (
    .clk, .rst_n, .in_valid, .in_pix(cls_in),
    .out_valid(win_valid), .out_win(w), .out_row(win_row), .out_col(win_col),
    .out_first(win_first), .out_last(win_last), .overrun
  );

  logic strong_nb, edge_c;

  always_comb begin
    strong_nb = 1'b0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        if (!(r == 1 && c == 1) && w[r][c] == EDGE_STRONG) strong_nb = 1'b1;
    edge_c = (w[1][1] == EDGE_STRONG) || ((w[1][1] == EDGE_WEAK) && strong_nb);
  end

  always_ff @(posedge clk) begin
    out_edge <= edge_c;
  end

  pipe_delay #(.WIDTH(1 + RW + CW + 2), .DEPTH(1)) u_side (
    .clk, .rst_n,
    .d({win_valid, win_row, win_col, win_first, win_last}),
    .q({out_valid, out_row, out_col, out_first, out_last})
  );

endmodule
