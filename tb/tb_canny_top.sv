// tb_canny_top: end-to-end test of the streaming Canny edge detector.
//
// Two detectors, one per Gaussian adder graph (exact and approximate), process
// the same three 24x16 frames (a synthetic scene with and without noise, then a
// random image) with random idle cycles inside frames and the minimum blanking
// between them. Every edge bit is compared with a whole-image reference of the
// four stages. The test also counts the mechanisms of the design and fails if one
// never happens: idle cycles inside a frame, end-of-frame flushes, clamped border
// windows, smoothing actually changing pixels, each gradient direction sector,
// non-maximum suppression of a non-zero magnitude, strong edges, weak pixels
// promoted next to a strong one and weak pixels rejected.
module tb_canny_top;
  import canny_pkg::*;
  import canny_ref_pkg::*;

  localparam int W = 24;
  localparam int H = 16;
  localparam int FRAMES = 3;
  localparam int BLANK = 4 * (W + 1) + 32;
  localparam int LO = 80;
  localparam int HI = 200;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [10:0] th_low = 11'(LO), th_high = 11'(HI);
  logic        in_valid = 1'b0;
  logic [7:0]  in_pix = '0;

  logic        ov [2], oe [2], of [2], ol [2], oovr [2];
  logic [4:0]  orow [2];
  logic [4:0]  ocol [2];

  int checks = 0, failures = 0;
  img_t imgs[FRAMES], refs[FRAMES];
  img_t g[FRAMES], m[FRAMES], d[FRAMES], n[FRAMES], cls[FRAMES];
  int   ofr [2] = '{0, 0};
  int   oidx [2] = '{0, 0};

  // mechanism counters
  int idle_in_frame = 0, flushes = 0, border_px = 0, smoothed_changed = 0;
  int dir_seen[4] = '{0, 0, 0, 0};
  int nms_suppressed = 0, n_strong = 0, promoted = 0, rejected = 0, edges = 0;

  canny_top #(.W(W), .H(H), .ARCH(GB_EXACT)) dut_exact (
    .clk, .rst_n, .th_low, .th_high, .in_valid, .in_pix,
    .out_valid(ov[0]), .out_edge(oe[0]), .out_row(orow[0]), .out_col(ocol[0]),
    .out_first(of[0]), .out_last(ol[0]), .overrun(oovr[0]));
  canny_top #(.W(W), .H(H), .ARCH(GB_APPROX)) dut_approx (
    .clk, .rst_n, .th_low, .th_high, .in_valid, .in_pix,
    .out_valid(ov[1]), .out_edge(oe[1]), .out_row(orow[1]), .out_col(ocol[1]),
    .out_first(of[1]), .out_last(ol[1]), .overrun(oovr[1]));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    for (int k = 0; k < 2; k++) begin
      if (rst_n && oovr[k]) begin
        failures++;
        $display("overrun in detector %0d", k);
      end
      if (rst_n && ov[k]) begin
        int r, c;
        r = oidx[k] / W;
        c = oidx[k] % W;
        checks++;
        if (ofr[k] >= FRAMES || int'(oe[k]) != refs[ofr[k]][oidx[k]] ||
            int'(orow[k]) != r || int'(ocol[k]) != c ||
            of[k] != (oidx[k] == 0) || ol[k] != (oidx[k] == W*H-1)) begin
          failures++;
          if (failures < 10) $display("detector %0d frame %0d mismatch at (%0d,%0d): got %0d",
                                      k, ofr[k], r, c, oe[k]);
        end
        if (k == 0 && ofr[k] < FRAMES) begin
          int i;
          i = oidx[k];
          if (r == 0 || c == 0 || r == H-1 || c == W-1) border_px++;
          if (oe[k]) edges++;
          if (cls[ofr[k]][i] == 2) n_strong++;
          if (cls[ofr[k]][i] == 1 && oe[k]) promoted++;
          if (cls[ofr[k]][i] == 1 && !oe[k]) rejected++;
        end
        oidx[k]++;
        if (oidx[k] == W*H) begin
          oidx[k] = 0;
          ofr[k]++;
        end
      end
    end
  end

  // The flush of the first stage: its window generator running without input.
  always @(posedge clk)
    if (rst_n && dut_exact.u_gauss.u_win.flushing && dut_exact.u_gauss.u_win.last_step) flushes++;

  task automatic check_count(input string what, input int cnt);
    checks++;
    $display("  %-28s %0d", what, cnt);
    if (cnt == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    for (int f = 0; f < FRAMES; f++) begin
      if (f == 2) begin
        imgs[f] = new[W*H];
        foreach (imgs[f][i]) imgs[f][i] = $urandom_range(0, 255);
      end else begin
        imgs[f] = scene(W, H, 6 * f);
      end
      g[f] = gauss_ref(imgs[f], W, H);
      sobel_ref(g[f], W, H, m[f], d[f]);
      n[f] = nms_ref(m[f], d[f], W, H);
      refs[f] = hyst_ref(n[f], W, H, LO, HI, cls[f]);
      foreach (imgs[f][i]) begin
        if (g[f][i] != imgs[f][i]) smoothed_changed++;
        if (m[f][i] != 0) dir_seen[d[f][i]]++;
        if (m[f][i] != 0 && n[f][i] == 0) nms_suppressed++;
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < FRAMES; f++) begin
      for (int i = 0; i < W*H; i++) begin
        while (i > 0 && $urandom_range(0, 4) == 0) begin
          @(negedge clk);
          in_valid = 1'b0;
          idle_in_frame++;
        end
        @(negedge clk);
        in_valid = 1'b1;
        in_pix   = 8'(imgs[f][i]);
      end
      @(negedge clk);
      in_valid = 1'b0;
      repeat (BLANK) @(negedge clk);
    end
    repeat (50) @(posedge clk);
    for (int k = 0; k < 2; k++) begin
      checks++;
      if (ofr[k] != FRAMES || oidx[k] != 0) begin
        failures++;
        $display("detector %0d: %0d frames out, expected %0d", k, ofr[k], FRAMES);
      end
    end
    $display("mechanisms:");
    check_count("idle cycles inside a frame", idle_in_frame);
    check_count("end-of-frame flushes", flushes);
    check_count("border (clamped) pixels", border_px);
    check_count("pixels changed by smoothing", smoothed_changed);
    check_count("gradient sector 0 deg", dir_seen[0]);
    check_count("gradient sector 45 deg", dir_seen[1]);
    check_count("gradient sector 90 deg", dir_seen[2]);
    check_count("gradient sector 135 deg", dir_seen[3]);
    check_count("NMS suppressions", nms_suppressed);
    check_count("strong edge pixels", n_strong);
    check_count("weak pixels promoted", promoted);
    check_count("weak pixels rejected", rejected);
    check_count("edge pixels output", edges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
