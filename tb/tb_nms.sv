// tb_nms: self-checking test of the non-maximum suppression stage.
//
// Streams random 9x8 frames of {magnitude, direction} words. Magnitudes are
// drawn from a small range so that equal neighbours (ties) are frequent. Every
// output is compared with a reference that keeps the centre only when it is
// >= its earlier and > its later neighbour along the direction, and zeroes the
// image border. Kept and suppressed interior pixels must both occur.
module tb_nms;
  import canny_pkg::*;
  import canny_ref_pkg::*;

  localparam int W = 9;
  localparam int H = 8;
  localparam int FRAMES = 3;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid = 1'b0;
  logic [10:0] in_mag = '0;
  grad_dir_e   in_dir = DIR_0;
  logic        out_valid;
  logic [10:0] out_mag;
  logic [3:0]  out_row;
  logic [3:0]  out_col;
  logic        out_first, out_last, overrun;

  int checks = 0, failures = 0;
  img_t mags[FRAMES], dirs[FRAMES], refs[FRAMES];
  int   ofr = 0, oidx = 0;
  int   kept = 0, suppressed = 0;

  nms #(.MW(11), .W(W), .H(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && overrun) failures++;
    if (rst_n && out_valid) begin
      int r, c;
      r = oidx / W;
      c = oidx % W;
      checks++;
      if (ofr >= FRAMES || int'(out_mag) != refs[ofr][oidx] ||
          int'(out_row) != r || int'(out_col) != c ||
          out_first != (oidx == 0) || out_last != (oidx == W*H-1)) begin
        failures++;
        if (failures < 10) $display("mismatch at (%0d,%0d): got %0d exp %0d", r, c,
                                    out_mag, refs[ofr][oidx]);
      end
      if (ofr < FRAMES && r > 0 && r < H-1 && c > 0 && c < W-1 && mags[ofr][oidx] != 0) begin
        if (out_mag != 0) kept++;
        else              suppressed++;
      end
      oidx++;
      if (oidx == W*H) begin
        oidx = 0;
        ofr++;
      end
    end
  end

  initial begin
    for (int f = 0; f < FRAMES; f++) begin
      mags[f] = new[W*H];
      dirs[f] = new[W*H];
      foreach (mags[f][i]) begin
        mags[f][i] = (f == 2) ? $urandom_range(0, 2047) : $urandom_range(0, 6);
        dirs[f][i] = $urandom_range(0, 3);
      end
      refs[f] = nms_ref(mags[f], dirs[f], W, H);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < FRAMES; f++) begin
      for (int i = 0; i < W*H; i++) begin
        while ($urandom_range(0, 3) == 0) begin
          @(negedge clk);
          in_valid = 1'b0;
        end
        @(negedge clk);
        in_valid = 1'b1;
        in_mag   = 11'(mags[f][i]);
        in_dir   = grad_dir_e'(dirs[f][i]);
      end
      @(negedge clk);
      in_valid = 1'b0;
      repeat (W + 1 + $urandom_range(0, 4)) @(negedge clk);
    end
    repeat (20) @(posedge clk);
    checks++;
    if (ofr != FRAMES || oidx != 0 || kept == 0 || suppressed == 0) begin
      failures++;
      $display("frames %0d kept %0d suppressed %0d", ofr, kept, suppressed);
    end
    $display("kept %0d, suppressed %0d", kept, suppressed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
