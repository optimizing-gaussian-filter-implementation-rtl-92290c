// tb_window_3x3: self-checking test of the 3x3 window generator.
//
// Sends three random 7x5 frames with random idle cycles inside each frame and a
// blanking gap of at least W+1 cycles after each, and checks every emitted window
// (all nine clamp-to-edge pixels), its centre position, the first/last flags and
// that exactly W*H windows come out per frame in raster order. The last window of
// a frame is produced during the blanking (end-of-frame flush), which is checked
// by the window count; overrun must never be raised.
module tb_window_3x3;
  import canny_ref_pkg::*;

  localparam int W = 7;
  localparam int H = 5;
  localparam int FRAMES = 3;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       in_valid = 1'b0;
  logic [7:0] in_pix = '0;
  logic       out_valid;
  logic [7:0] out_win [3][3];
  logic [2:0] out_row;
  logic [2:0] out_col;
  logic       out_first, out_last, overrun;

  int checks = 0, failures = 0;
  img_t imgs[FRAMES];
  int   ofr = 0, oidx = 0;

  window_3x3 #(.DW(8), .W(W), .H(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && overrun) begin
      failures++;
      $display("unexpected overrun");
    end
    if (rst_n && out_valid) begin
      int r, c;
      bit bad;
      r = oidx / W;
      c = oidx % W;
      bad = (ofr >= FRAMES) || (int'(out_row) != r) || (int'(out_col) != c) ||
            (out_first != (oidx == 0)) || (out_last != (oidx == W*H-1));
      if (ofr < FRAMES)
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++)
            if (int'(out_win[dr+1][dc+1]) != px(imgs[ofr], W, H, r+dr, c+dc)) bad = 1;
      checks++;
      if (bad) begin
        failures++;
        if (failures < 10) $display("window mismatch frame %0d at (%0d,%0d), got pos (%0d,%0d)",
                                    ofr, r, c, out_row, out_col);
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
      imgs[f] = new[W*H];
      foreach (imgs[f][i]) imgs[f][i] = $urandom_range(0, 255);
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
    repeat (10) @(posedge clk);
    checks++;
    if (ofr != FRAMES || oidx != 0) begin
      failures++;
      $display("frames out %0d (+%0d windows), expected %0d", ofr, oidx, FRAMES);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
