// tb_gauss_smooth: self-checking test of the smoothing stage, both adder graphs.
//
// Two instances (exact and approximate graph) receive the same random 9x6
// frames, with random idle cycles inside a frame and blanking between frames.
// Every output pixel is compared with floor(sum(k * pixel) / 256) of the
// clamp-to-edge 3x3 neighbourhood, along with its position and frame flags.
module tb_gauss_smooth;
  import canny_pkg::*;
  import canny_ref_pkg::*;

  localparam int W = 9;
  localparam int H = 6;
  localparam int FRAMES = 2;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       in_valid = 1'b0;
  logic [7:0] in_pix = '0;

  logic       ov [2];
  logic [7:0] op [2];
  logic [2:0] orow [2];
  logic [3:0] ocol [2];
  logic       ofirst [2], olast [2], oovr [2];

  int checks = 0, failures = 0;
  img_t imgs[FRAMES];
  img_t refs[FRAMES];
  int   ofr [2] = '{0, 0};
  int   oidx [2] = '{0, 0};

  gauss_smooth #(.W(W), .H(H), .ARCH(GB_EXACT)) dut_exact (
    .clk, .rst_n, .in_valid, .in_pix, .out_valid(ov[0]), .out_pix(op[0]),
    .out_row(orow[0]), .out_col(ocol[0]), .out_first(ofirst[0]), .out_last(olast[0]),
    .overrun(oovr[0]));
  gauss_smooth #(.W(W), .H(H), .ARCH(GB_APPROX)) dut_approx (
    .clk, .rst_n, .in_valid, .in_pix, .out_valid(ov[1]), .out_pix(op[1]),
    .out_row(orow[1]), .out_col(ocol[1]), .out_first(ofirst[1]), .out_last(olast[1]),
    .overrun(oovr[1]));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    for (int k = 0; k < 2; k++) begin
      if (rst_n && oovr[k]) failures++;
      if (rst_n && ov[k]) begin
        int r, c;
        r = oidx[k] / W;
        c = oidx[k] % W;
        checks++;
        if (ofr[k] >= FRAMES || int'(op[k]) != refs[ofr[k]][oidx[k]] ||
            int'(orow[k]) != r || int'(ocol[k]) != c ||
            ofirst[k] != (oidx[k] == 0) || olast[k] != (oidx[k] == W*H-1)) begin
          failures++;
          if (failures < 10) $display("arch %0d mismatch at (%0d,%0d): got %0d", k, r, c, op[k]);
        end
        oidx[k]++;
        if (oidx[k] == W*H) begin
          oidx[k] = 0;
          ofr[k]++;
        end
      end
    end
  end

  initial begin
    for (int f = 0; f < FRAMES; f++) begin
      imgs[f] = new[W*H];
      foreach (imgs[f][i]) imgs[f][i] = (f == 0 && i < W) ? 255 : $urandom_range(0, 255);
      refs[f] = gauss_ref(imgs[f], W, H);
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
    for (int k = 0; k < 2; k++) begin
      checks++;
      if (ofr[k] != FRAMES || oidx[k] != 0) begin
        failures++;
        $display("arch %0d: %0d frames out, expected %0d", k, ofr[k], FRAMES);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
