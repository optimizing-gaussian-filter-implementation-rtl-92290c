// gauss_gb_approx: multiplierless 3x3 Gaussian kernel, approximate graph-based
// adder graph with the smallest logic depth.
//
// Computes Y = 21*a + 31*b + 48*c, where a = A1+A3+A7+A9 (corners),
// b = A2+A4+A6+A8 (edges) and c = A5 (centre). Twelve add/sub nodes, named after
// the figure of the approximate graph-based architecture:
//   AddSub, AddSub1   A1+A3, A7+A9          AddSub2, AddSub3  A2+A4, A6+A8
//   AddSub4           48c = (c<<6) - (c<<4)
//   AddSub5, AddSub6  a and b
//   AddSub7           20a = (a<<4) + (a<<2)
//   AddSub8           a - b
//   AddSub9           32b + 48c = (b<<5) + AddSub4
//   AddSub10          21a - b  = AddSub7 + AddSub8
//   AddSub11          Y = AddSub10 + AddSub9
// The graph (which node feeds which, and which node subtracts) follows the
// document; the shift amounts are derived from the kernel constants. The
// longest chain is five adders (logic depth 5). Every adder level ends in a
// register and the centre term is delayed to match, so one window is accepted
// per cycle with latency LAT = 5 cycles (register placement is this design's).
//
// Interface as gauss_gb_exact: in_a[0..8] = A1..A9, out_y is the unnormalised
// sum. AddSub8 and AddSub10 can be negative; all values wrap modulo 2^(DW+8)
// and the final sum is always in range.
module gauss_gb_approx #(
  parameter int unsigned DW = 8,
  localparam int unsigned YW = DW + 8,
  localparam int unsigned LAT = 5
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [DW-1:0] in_a [9],
  output logic          out_valid,
  output logic [YW-1:0] out_y
);

  // Level 1
  logic [YW-1:0] addsub, addsub1, addsub2, addsub3, addsub4;
  // Level 2
  logic [YW-1:0] addsub5, addsub6, addsub4_d2;
  // Level 3
  logic [YW-1:0] addsub7, addsub8, addsub9;
  // Level 4
  logic [YW-1:0] addsub10, addsub9_d4;
  // Level 5
  logic [YW-1:0] addsub11;

  logic [LAT-1:0] vld;

  always_ff @(posedge clk) begin
    // Level 1
    addsub     <= YW'(in_a[0]) + YW'(in_a[2]);                // A1 + A3
    addsub1    <= YW'(in_a[6]) + YW'(in_a[8]);                // A7 + A9
    addsub2    <= YW'(in_a[1]) + YW'(in_a[3]);                // A2 + A4
    addsub3    <= YW'(in_a[5]) + YW'(in_a[7]);                // A6 + A8
    addsub4    <= (YW'(in_a[4]) << 6) - (YW'(in_a[4]) << 4);  // 48c
    // Level 2
    addsub5    <= addsub + addsub1;                           // a
    addsub6    <= addsub2 + addsub3;                          // b
    addsub4_d2 <= addsub4;
    // Level 3
    addsub7    <= (addsub5 << 4) + (addsub5 << 2);            // 20a
    addsub8    <= addsub5 - addsub6;                          // a - b
    addsub9    <= (addsub6 << 5) + addsub4_d2;                // 32b + 48c
    // Level 4
    addsub10   <= addsub7 + addsub8;                          // 21a - b
    addsub9_d4 <= addsub9;
    // Level 5
    addsub11   <= addsub10 + addsub9_d4;                      // 21a + 31b + 48c
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LAT-2:0], in_valid};
  end

  assign out_valid = vld[LAT-1];
  assign out_y     = addsub11;

endmodule
