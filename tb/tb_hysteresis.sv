// tb_hysteresis: self-checking test of the hysteresis thresholding stage.
//
// Streams random 11x7 magnitude frames, mostly zero with some weak and strong
// values, with thresholds that change between frames. Each edge bit is compared
// with the reference: strong pixels are kept, weak pixels only when one of the
// eight neighbours is strong. Strong pixels, promoted weak pixels and rejected
// weak pixels must all occur.
module tb_hysteresis;
  import canny_pkg::*;
  import canny_ref_pkg::*;

  localparam int W = 11;
  localparam int H = 7;
  localparam int FRAMES = 3;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [10:0] th_low = '0, th_high = '0;
  logic        in_valid = 1'b0;
  logic [10:0] in_mag = '0;
  logic        out_valid, out_edge;
  logic [3:0]  out_row;
  logic [3:0]  out_col;
  logic        out_first, out_last, overrun;

  int checks = 0, failures = 0;
  img_t mags[FRAMES], refs[FRAMES], cls[FRAMES];
  int   lo[FRAMES], hi[FRAMES];
  int   ofr = 0, oidx = 0;
  int   n_strong = 0, n_promoted = 0, n_rejected = 0;

  hysteresis #(.MW(11), .W(W), .H(H)) dut (.*);

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
      if (ofr >= FRAMES || int'(out_edge) != refs[ofr][oidx] ||
          int'(out_row) != r || int'(out_col) != c ||
          out_first != (oidx == 0) || out_last != (oidx == W*H-1)) begin
        failures++;
        if (failures < 10) $display("mismatch at (%0d,%0d): got %0d exp %0d", r, c,
                                    out_edge, refs[ofr][oidx]);
      end
      if (ofr < FRAMES) begin
        if (cls[ofr][oidx] == 2) n_strong++;
        if (cls[ofr][oidx] == 1 && out_edge) n_promoted++;
        if (cls[ofr][oidx] == 1 && !out_edge) n_rejected++;
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
      lo[f] = 50 + 40*f;
      hi[f] = 200 + 100*f;
      mags[f] = new[W*H];
      foreach (mags[f][i])
        case ($urandom_range(0, 5))
          0: mags[f][i] = $urandom_range(lo[f], hi[f] - 1);
          1: mags[f][i] = $urandom_range(hi[f], 2040);
          2: mags[f][i] = $urandom_range(0, lo[f] - 1);
          default: mags[f][i] = 0;
        endcase
      refs[f] = hyst_ref(mags[f], W, H, lo[f], hi[f], cls[f]);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < FRAMES; f++) begin
      @(negedge clk);
      th_low  = 11'(lo[f]);
      th_high = 11'(hi[f]);
      for (int i = 0; i < W*H; i++) begin
        while ($urandom_range(0, 3) == 0) begin
          @(negedge clk);
          in_valid = 1'b0;
        end
        @(negedge clk);
        in_valid = 1'b1;
        in_mag   = 11'(mags[f][i]);
      end
      @(negedge clk);
      in_valid = 1'b0;
      // thresholds apply when a pixel enters; keep them until the flush is over
      repeat (W + 1 + $urandom_range(0, 4)) @(negedge clk);
    end
    repeat (20) @(posedge clk);
    checks++;
    if (ofr != FRAMES || oidx != 0 || n_strong == 0 || n_promoted == 0 || n_rejected == 0) begin
      failures++;
      $display("frames %0d strong %0d promoted %0d rejected %0d", ofr, n_strong, n_promoted, n_rejected);
    end
    $display("strong %0d, weak promoted %0d, weak rejected %0d", n_strong, n_promoted, n_rejected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
