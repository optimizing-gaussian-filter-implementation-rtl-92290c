// tb_canny_full: the Canny edge detector at its full 512x512 size.
//
// Runs one complete 512x512 frame of a noisy synthetic scene through canny_top
// with all parameters at their defaults (exact Gaussian adder graph), followed
// by the blanking needed to empty every stage, and compares all 262144 edge bits,
// positions and frame flags with the whole-image reference of the four stages.
// Pixels are fed at the full rate of one per clock, with no idle cycle in the frame.
module tb_canny_full;
  import canny_pkg::*;
  import canny_ref_pkg::*;

  localparam int W = 512;
  localparam int H = 512;
  localparam int BLANK = 4 * (W + 1) + 32;
  localparam int LO = 80;
  localparam int HI = 200;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [10:0] th_low = 11'(LO), th_high = 11'(HI);
  logic        in_valid = 1'b0;
  logic [7:0]  in_pix = '0;
  logic        out_valid, out_edge, out_first, out_last, overrun;
  logic [9:0]  out_row;
  logic [8:0]  out_col;

  int checks = 0, failures = 0;
  img_t img, gs, mg, dr, nm, cls, ref_edges;
  int   oidx = 0, frames_out = 0, edges = 0;

  canny_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (W*H + BLANK + 10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && overrun) failures++;
    if (rst_n && out_valid) begin
      checks++;
      if (frames_out > 0 || int'(out_edge) != ref_edges[oidx] ||
          int'(out_row) != oidx / W || int'(out_col) != oidx % W ||
          out_first != (oidx == 0) || out_last != (oidx == W*H-1)) begin
        failures++;
        if (failures < 10) $display("mismatch at (%0d,%0d): got %0d", oidx / W, oidx % W, out_edge);
      end
      if (out_edge) edges++;
      oidx++;
      if (oidx == W*H) begin
        oidx = 0;
        frames_out++;
      end
    end
  end

  initial begin
    img = scene(W, H, 6);
    gs  = gauss_ref(img, W, H);
    sobel_ref(gs, W, H, mg, dr);
    nm  = nms_ref(mg, dr, W, H);
    ref_edges = hyst_ref(nm, W, H, LO, HI, cls);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < W*H; i++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_pix   = 8'(img[i]);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (BLANK) @(negedge clk);
    checks++;
    if (frames_out != 1 || oidx != 0 || edges == 0) begin
      failures++;
      $display("frames out %0d, edge pixels %0d", frames_out, edges);
    end
    $display("edge pixels: %0d of %0d", edges, W*H);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
