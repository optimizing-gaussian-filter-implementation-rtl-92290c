// gauss_smooth: image smoothing stage of the Canny chain.
//
// A raster pixel stream enters a 3x3 window generator; each window goes through
// a multiplierless graph-based Gaussian adder tree computing 21a + 31b + 48c
// (a = corner sum, b = edge sum, c = centre), and the sum is divided by the
// kernel total 256 by dropping its eight low bits (truncation). ARCH selects the
// exact graph (GB_EXACT, latency 7, the document's best overall trade-off) or the
// approximate graph (GB_APPROX, latency 5, the document's fastest).
//
// Interface: in_valid/in_pix with no back-pressure, frames in raster order with
// at least W+1 idle cycles after each frame. Output: one smoothed pixel per
// window, with its position and first/last-of-frame flags. Latency from the
// pixel that completes a window to its output: 1 + LAT cycles.
// Border pixels use a clamp-to-edge window and the truncating division are this
// design's choices.
module gauss_smooth
  import canny_pkg::*;
#(
  parameter int unsigned DW   = 8,
  parameter int unsigned W    = 512,
  parameter int unsigned H    = 512,
  parameter gb_arch_e    ARCH = GB_EXACT,
  localparam int unsigned CW  = (W > 1) ? $clog2(W) : 1,
  localparam int unsigned RW  = $clog2(H + 2),
  localparam int unsigned YW  = DW + K_SHIFT,
  localparam int unsigned LAT = (ARCH == GB_EXACT) ? 7 : 5
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [DW-1:0] in_pix,
  output logic          out_valid,
  output logic [DW-1:0] out_pix,
  output logic [RW-1:0] out_row,
  output logic [CW-1:0] out_col,
  output logic          out_first,
  output logic          out_last,
  output logic          overrun
);

  logic          win_valid;
  logic [DW-1:0] win [3][3];
  logic [DW-1:0] win_flat [9];
  logic [RW-1:0] win_row;
  logic [CW-1:0] win_col;
  logic          win_first, win_last;
  logic          f_valid;
  logic [YW-1:0] f_y;

  window_3x3 #(.DW(DW), .W(W), .H(H)) u_win (
    .clk, .rst_n, .in_valid, .in_pix,
    .out_valid(win_valid), .out_win(win), .out_row(win_row), .out_col(win_col),
    .out_first(win_first), .out_last(win_last), .overrun
  );

  always_comb begin
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        win_flat[3*r + c] = win[r][c];
  end

  if (ARCH == GB_EXACT) begin : g_exact
    gauss_gb_exact #(.DW(DW)) u_gb (
      .clk, .rst_n, .in_valid(win_valid), .in_a(win_flat),
      .out_valid(f_valid), .out_y(f_y)
    );
  end else begin : g_approx
    gauss_gb_approx #(.DW(DW)) u_gb (
      .clk, .rst_n, .in_valid(win_valid), .in_a(win_flat),
      .out_valid(f_valid), .out_y(f_y)
    );
  end

  pipe_delay #(.WIDTH(RW + CW + 2), .DEPTH(LAT)) u_side (
    .clk, .rst_n,
    .d({win_row, win_col, win_first, win_last}),
    .q({out_row, out_col, out_first, out_last})
  );

  assign out_valid = f_valid;
  assign out_pix   = f_y[YW-1:K_SHIFT];

endmodule
