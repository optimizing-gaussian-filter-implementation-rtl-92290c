// gauss_gb_exact: multiplierless 3x3 Gaussian kernel, exact graph-based adder graph.
//
// Computes Y = 21*a + 31*b + 48*c, where a = A1+A3+A7+A9 (corners),
// b = A2+A4+A6+A8 (edges) and c = A5 (centre) of a 3x3 window. The kernel
// weights are not multiplied: they are built from shifts (wires) and twelve
// add/sub nodes, named after the figure of the exact graph-based architecture:
//   Add1..Add4  pairwise sums of the corner and edge pixels
//   Add5        48c = (c<<4) + (c<<5)
//   Add6, Add7  a and b
//   Add8        5a  = (a<<2) + a
//   Add9        5a + 32b = Add8 + (b<<5)
//   sub         5a + 31b = Add9 - b
//   Add10       21a + 31b = (a<<4) + sub
//   Add11       Y = Add10 + Add5
// The adder graph and its shift amounts follow the document. The node chain is
// seven adders long (logic depth 7). Here every adder level ends in a register
// and operands that skip levels are delayed to match; that register placement
// is this design's choice. Result: one window per cycle, latency LAT = 7 cycles.
//
// Interface: in_valid with the nine pixels in_a[0..8] = A1..A9 (raster order);
// out_valid with the unnormalised sum out_y (divide by 256 for the smoothed pixel).
// Intermediate values wrap modulo 2^(DW+8); the final sum is always in range.
module gauss_gb_exact #(
  parameter int unsigned DW = 8,
  localparam int unsigned YW = DW + 8,
  localparam int unsigned LAT = 7
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [DW-1:0] in_a [9],
  output logic          out_valid,
  output logic [YW-1:0] out_y
);

  // Level 1
  logic [YW-1:0] add1, add2, add3, add4, add5;
  // Level 2
  logic [YW-1:0] add6, add7, add5_d2;
  // Level 3
  logic [YW-1:0] add8, a_d3, b_d3, add5_d3;
  // Level 4
  logic [YW-1:0] add9, a_d4, b_d4, add5_d4;
  // Level 5
  logic [YW-1:0] sub5, a_d5, add5_d5;
  // Level 6
  logic [YW-1:0] add10, add5_d6;
  // Level 7
  logic [YW-1:0] add11;

  logic [LAT-1:0] vld;

  always_ff @(posedge clk) begin
    // Level 1: pairwise sums and the centre term.
    add1    <= YW'(in_a[0]) + YW'(in_a[2]);                  // A1 + A3
    add2    <= YW'(in_a[6]) + YW'(in_a[8]);                  // A7 + A9
    add3    <= YW'(in_a[1]) + YW'(in_a[3]);                  // A2 + A4
    add4    <= YW'(in_a[5]) + YW'(in_a[7]);                  // A6 + A8
    add5    <= (YW'(in_a[4]) << 4) + (YW'(in_a[4]) << 5);    // 48c
    // Level 2: a and b.
    add6    <= add1 + add2;
    add7    <= add3 + add4;
    add5_d2 <= add5;
    // Level 3: 5a.
    add8    <= (add6 << 2) + add6;
    a_d3    <= add6;
    b_d3    <= add7;
    add5_d3 <= add5_d2;
    // Level 4: 5a + 32b.
    add9    <= add8 + (b_d3 << 5);
    a_d4    <= a_d3;
    b_d4    <= b_d3;
    add5_d4 <= add5_d3;
    // Level 5: 5a + 31b.
    sub5    <= add9 - b_d4;
    a_d5    <= a_d4;
    add5_d5 <= add5_d4;
    // Level 6: 21a + 31b.
    add10   <= (a_d5 << 4) + sub5;
    add5_d6 <= add5_d5;
    // Level 7: + 48c.
    add11   <= add10 + add5_d6;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LAT-2:0], in_valid};
  end

  assign out_valid = vld[LAT-1];
  assign out_y     = add11;

endmodule
