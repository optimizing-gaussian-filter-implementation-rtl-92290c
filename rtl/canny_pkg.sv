// canny_pkg: types and constants shared by the streaming Canny edge detector.
//
// The Gaussian kernel is the 3x3 integer kernel (1/256) * [21 31 21; 31 48 31; 21 31 21].
// Its nine weights reduce to three distinct constants, so a window is folded into
//   a = corners (A1+A3+A7+A9), b = edges (A2+A4+A6+A8), c = centre (A5)
// and the filter output is Y = 21a + 31b + 48c, later divided by 256 (the kernel sum).
// Window element w[r][c] holds row r (0 = top) and column c (0 = left), so
// A1..A9 are w[0][0], w[0][1], w[0][2], w[1][0], ... w[2][2] in raster order.
//
// The pixel width, the gradient direction encoding and the edge classes are this
// design's own choices; the document does not give them.
package canny_pkg;

  // Normalisation shift of the Gaussian filter: the kernel weights sum to 256.
  localparam int unsigned K_SHIFT  = 8;

  // Which graph-based adder tree the smoothing stage uses.
  typedef enum logic [0:0] {
    GB_EXACT  = 1'b0,  // 12 add/sub nodes, logic depth 7
    GB_APPROX = 1'b1   // 12 add/sub nodes, logic depth 5
  } gb_arch_e;

  // Gradient direction, quantised to four sectors. Image x grows to the right
  // and y grows downwards.
  typedef enum logic [1:0] {
    DIR_0   = 2'd0,  // gradient mostly horizontal: compare left/right neighbours
    DIR_45  = 2'd1,  // Gx and Gy of equal sign: compare up-left/down-right
    DIR_90  = 2'd2,  // gradient mostly vertical: compare up/down neighbours
    DIR_135 = 2'd3   // Gx and Gy of opposite sign: compare up-right/down-left
  } grad_dir_e;

  // Edge class produced by the double threshold.
  typedef enum logic [1:0] {
    EDGE_NONE   = 2'd0,
    EDGE_WEAK   = 2'd1,
    EDGE_STRONG = 2'd2
  } edge_class_e;

endpackage
