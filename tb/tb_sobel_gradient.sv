// tb_sobel_gradient: self-checking test of the Sobel gradient stage.
//
// Sends random 10x7 frames (one of them a set of ramps, so that every direction
// sector and the flat case occur) and compares magnitude |Gx|+|Gy|, direction
// sector, position and frame flags of every output with a reference computed
// from the Sobel sums over the clamp-to-edge neighbourhood. Each of the four
// direction sectors must be seen at least once.
module tb_sobel_gradient;
  import canny_pkg::*;
  import canny_ref_pkg::*;

  localparam int W = 10;
  localparam int H = 7;
  localparam int FRAMES = 3;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid = 1'b0;
  logic [7:0]  in_pix = '0;
  logic        out_valid;
  logic [10:0] out_mag;
  grad_dir_e   out_dir;
  logic [3:0]  out_row;
  logic [3:0]  out_col;
  logic        out_first, out_last, overrun;

  int checks = 0, failures = 0;
  img_t imgs[FRAMES], mags[FRAMES], dirs[FRAMES];
  int   ofr = 0, oidx = 0;
  int   dir_seen[4] = '{0, 0, 0, 0};

  sobel_gradient #(.W(W), .H(H)) dut (.*);

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
      if (ofr >= FRAMES || int'(out_mag) != mags[ofr][oidx] || int'(out_dir) != dirs[ofr][oidx] ||
          int'(out_row) != r || int'(out_col) != c ||
          out_first != (oidx == 0) || out_last != (oidx == W*H-1)) begin
        failures++;
        if (failures < 10) $display("mismatch at (%0d,%0d): got %0d/%0d exp %0d/%0d", r, c,
                                    out_mag, out_dir, mags[ofr][oidx], dirs[ofr][oidx]);
      end
      if (out_mag != 0) dir_seen[out_dir]++;
      oidx++;
      if (oidx == W*H) begin
        oidx = 0;
        ofr++;
      end
    end
  end

  initial begin
    for (int f = 0; f < FRAMES; f++) begin
      imgs[f] = new[W*H];
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++)
          imgs[f][r*W + c] = (f == 0) ? ((r < 3) ? 20*c : (r < 5) ? 30*r + 10*c : 180 - 15*c + 10*r)
                                      : $urandom_range(0, 255);
      sobel_ref(imgs[f], W, H, mags[f], dirs[f]);
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
        in_pix   = 8'(imgs[f][i]);
      end
      @(negedge clk);
      in_valid = 1'b0;
      repeat (W + 1 + $urandom_range(0, 4)) @(negedge clk);
    end
    repeat (20) @(posedge clk);
    checks++;
    if (ofr != FRAMES || oidx != 0) begin
      failures++;
      $display("%0d frames out, expected %0d", ofr, FRAMES);
    end
    for (int d = 0; d < 4; d++) begin
      checks++;
      if (dir_seen[d] == 0) begin
        failures++;
        $display("direction sector %0d never seen", d);
      end
    end
    $display("direction sectors seen: %0d %0d %0d %0d", dir_seen[0], dir_seen[1], dir_seen[2], dir_seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
