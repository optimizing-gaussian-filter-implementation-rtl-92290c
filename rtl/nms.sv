// nms: non-maximum suppression stage of the Canny chain.
//
// Thins edges to one pixel. A 3x3 window of {magnitude, direction} words is
// formed; the centre magnitude is kept only if it is a local maximum across the
// edge, i.e. along its quantised gradient direction:
//   DIR_0: left/right,  DIR_90: up/down,
//   DIR_45: up-left/down-right,  DIR_135: up-right/down-left.
// Ties are broken so that a flat ridge keeps one pixel: the centre must be
// >= the neighbour that comes earlier in raster order and > the later one.
// Pixels on the image border are always suppressed (output 0).
// The document gives only the stage's purpose; the neighbour selection, the tie
// rule and the border rule are this design's.
//
// Interface: streaming as gauss_smooth, input {mag, dir} per pixel, output the
// surviving magnitude (0 when suppressed). Latency 1 (window) + 1 cycles.
module nms
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
  input  logic          in_valid,
  input  logic [MW-1:0] in_mag,
  input  grad_dir_e     in_dir,
  output logic          out_valid,
  output logic [MW-1:0] out_mag,
  output logic [RW-1:0] out_row,
  output logic [CW-1:0] out_col,
  output logic          out_first,
  output logic          out_last,
  output logic          overrun
);

  logic            win_valid;
  logic [MW+1:0]   w [3][3];
  logic [RW-1:0]   win_row;
  logic [CW-1:0]   win_col;
  logic            win_first, win_last;

  window_3x3 #(.DW(MW + 2), .W(W), .H(H)) u_win (
    .clk, .rst_n, .in_valid, .in_pix({in_dir, in_mag}),
    .out_valid(win_valid), .out_win(w), .out_row(win_row), .out_col(win_col),
    .out_first(win_first), .out_last(win_last), .overrun
  );

  logic [MW-1:0] m, n_before, n_after;
  grad_dir_e     d;
  logic          border, keep;

  always_comb begin
    m = w[1][1][MW-1:0];
    d = grad_dir_e'(w[1][1][MW+1:MW]);
    unique case (d)
      DIR_0:   begin n_before = w[1][0][MW-1:0]; n_after = w[1][2][MW-1:0]; end
      DIR_45:  begin n_before = w[0][0][MW-1:0]; n_after = w[2][2][MW-1:0]; end
      DIR_90:  begin n_before = w[0][1][MW-1:0]; n_after = w[2][1][MW-1:0]; end
      default: begin n_before = w[0][2][MW-1:0]; n_after = w[2][0][MW-1:0]; end
    endcase
    border = (win_row == '0) || (win_row == RW'(H - 1)) ||
             (win_col == '0) || (win_col == CW'(W - 1));
    keep   = !border && (m >= n_before) && (m > n_after);
  end

  always_ff @(posedge clk) begin
    out_mag <= keep ? m : '0;
  end

  pipe_delay #(.WIDTH(1 + RW + CW + 2), .DEPTH(1)) u_side (
    .clk, .rst_n,
    .d({win_valid, win_row, win_col, win_first, win_last}),
    .q({out_valid, out_row, out_col, out_first, out_last})
  );

endmodule
