// canny_ref_pkg: behavioural reference of the streaming Canny chain, for testbenches.
//
// Works on whole images held as int arrays indexed [row*W + col]. Each function
// mirrors one stage's specification written directly from its formula (kernel
// weights times pixels, Sobel sums, neighbour comparisons), with clamp-to-edge
// borders, and is independent of the RTL's adder graphs and line buffers.
package canny_ref_pkg;

  typedef int img_t[];

  function automatic int px(const ref img_t img, input int W, input int H, input int r, input int c);
    int rr, cc;
    rr = (r < 0) ? 0 : (r >= H) ? H - 1 : r;
    cc = (c < 0) ? 0 : (c >= W) ? W - 1 : c;
    return img[rr*W + cc];
  endfunction

  // Gaussian kernel weight at window position (dr, dc), dr/dc in -1..1.
  function automatic int gk(input int dr, input int dc);
    if (dr == 0 && dc == 0) return 48;
    if (dr == 0 || dc == 0) return 31;
    return 21;
  endfunction

  // Unnormalised kernel sum over the nine window pixels w[0..8] (raster order).
  function automatic int gauss_sum9(input int w[9]);
    int s;
    s = 0;
    for (int i = 0; i < 9; i++) s += gk(i/3 - 1, i%3 - 1) * w[i];
    return s;
  endfunction

  function automatic img_t gauss_ref(const ref img_t img, input int W, input int H);
    img_t o;
    o = new[W*H];
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int s;
        s = 0;
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++)
            s += gk(dr, dc) * px(img, W, H, r+dr, c+dc);
        o[r*W + c] = s / 256;
      end
    return o;
  endfunction

  // Sobel: returns magnitude |Gx|+|Gy| in mag and the sector 0..3 in dir.
  function automatic void sobel_ref(const ref img_t img, input int W, input int H,
                                    ref img_t mag, ref img_t dir);
    mag = new[W*H];
    dir = new[W*H];
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int gx, gy, ax, ay;
        gx = px(img,W,H,r-1,c+1) + 2*px(img,W,H,r,c+1) + px(img,W,H,r+1,c+1)
           - px(img,W,H,r-1,c-1) - 2*px(img,W,H,r,c-1) - px(img,W,H,r+1,c-1);
        gy = px(img,W,H,r+1,c-1) + 2*px(img,W,H,r+1,c) + px(img,W,H,r+1,c+1)
           - px(img,W,H,r-1,c-1) - 2*px(img,W,H,r-1,c) - px(img,W,H,r-1,c+1);
        ax = (gx < 0) ? -gx : gx;
        ay = (gy < 0) ? -gy : gy;
        mag[r*W + c] = ax + ay;
        if (128*ay <= 53*ax)                dir[r*W + c] = 0;
        else if (128*ay >= 309*ax)          dir[r*W + c] = 2;
        else if ((gx < 0) == (gy < 0))      dir[r*W + c] = 1;
        else                                dir[r*W + c] = 3;
      end
  endfunction

  function automatic img_t nms_ref(const ref img_t mag, const ref img_t dir,
                                   input int W, input int H);
    img_t o;
    o = new[W*H];
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int m, nb, na;
        m = mag[r*W + c];
        case (dir[r*W + c])
          0: begin nb = px(mag,W,H,r,c-1);   na = px(mag,W,H,r,c+1);   end
          1: begin nb = px(mag,W,H,r-1,c-1); na = px(mag,W,H,r+1,c+1); end
          2: begin nb = px(mag,W,H,r-1,c);   na = px(mag,W,H,r+1,c);   end
          default: begin nb = px(mag,W,H,r-1,c+1); na = px(mag,W,H,r+1,c-1); end
        endcase
        if (r == 0 || c == 0 || r == H-1 || c == W-1) o[r*W + c] = 0;
        else o[r*W + c] = (m >= nb && m > na) ? m : 0;
      end
    return o;
  endfunction

  // Returns the edge bit; cls (0 none, 1 weak, 2 strong) is also handed back.
  function automatic img_t hyst_ref(const ref img_t mag, input int W, input int H,
                                    input int lo, input int hi, ref img_t cls);
    img_t o;
    o   = new[W*H];
    cls = new[W*H];
    foreach (mag[i]) cls[i] = (mag[i] >= hi) ? 2 : (mag[i] >= lo) ? 1 : 0;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        bit nb_strong;
        nb_strong = 0;
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++)
            if (!(dr == 0 && dc == 0) && px(cls,W,H,r+dr,c+dc) == 2) nb_strong = 1;
        o[r*W + c] = (cls[r*W + c] == 2 || (cls[r*W + c] == 1 && nb_strong)) ? 1 : 0;
      end
    return o;
  endfunction

  // Synthetic test scene: a shallow background ramp, a bright rectangle, a dark
  // disc, a faint diagonal step and mild random noise, all scaled to W x H.
  function automatic img_t scene(input int W, input int H, input int noise);
    img_t o;
    o = new[W*H];
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int v, dx, dy;
        v  = 60 + (40 * c) / W;
        if (r >= H/5 && r < H/2 && c >= W/8 && c < W/2) v = 210;
        dx = c - (3*W)/4;
        dy = r - (2*H)/3;
        if (4*(dx*dx + dy*dy) < (W/5)*(W/5) + (H/5)*(H/5)) v = 20;
        if (r > H/2 && c < W/2 && (r - H/2) > c) v += 25;
        if (noise > 0) v += $urandom_range(0, 2*noise) - noise;
        o[r*W + c] = (v < 0) ? 0 : (v > 255) ? 255 : v;
      end
    return o;
  endfunction

endpackage
