// window_3x3: turns a raster-order pixel stream into 3x3 neighbourhoods.
//
// Every 3x3 stage of the Canny chain (smoothing, Sobel, non-maximum suppression,
// hysteresis) needs the pixel and its eight neighbours. Two line buffers of W
// words hold the two previous rows; at each accepted pixel the column
// {row r-2, row r-1, row r} at the current column is read from them, pushed into a
// 3-column shift register, and the line buffers are rotated (lb1 <= lb0 <= pixel).
// The window centred on pixel (r-1, c-1) is therefore complete when pixel (r, c)
// arrives: output lags input by W+1 pixels.
//
// Borders are handled by replicating the nearest row/column of the image (clamp
// to edge), so each stage emits exactly W*H results per frame, in raster order.
// After the last pixel of a frame the block needs W+1 more steps to empty; it
// takes them by itself on cycles where in_valid is low (the frame blanking). A
// pixel offered while it is still emptying is dropped and flagged on overrun.
//
// Interface: in_valid/in_pix, no back-pressure. out_valid is a one-cycle strobe,
// registered, with the clamped window out_win[row][col] (row 0 = top), the
// position of its centre (out_row, out_col) and first/last-of-frame flags.
// Frames start at position (0,0) after reset.
//
// The document does not describe line buffers or border handling; all of this
// block is this design's own choice, sized for the document's 512x512 image.
module window_3x3 #(
  parameter int unsigned DW = 8,
  parameter int unsigned W  = 512,
  parameter int unsigned H  = 512,
  localparam int unsigned CW = (W > 1) ? $clog2(W) : 1,
  localparam int unsigned RW = $clog2(H + 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [DW-1:0] in_pix,
  output logic          out_valid,
  output logic [DW-1:0] out_win [3][3],
  output logic [RW-1:0] out_row,
  output logic [CW-1:0] out_col,
  output logic          out_first,
  output logic          out_last,
  output logic          overrun
);

  // Line buffers: lb0 holds row r-1, lb1 holds row r-2 (indexed by column).
  logic [DW-1:0] lb0 [W];
  logic [DW-1:0] lb1 [W];

  // Column shift register: sr[0] oldest column, sr[2] newest; sr[c][r] row r of it.
  logic [DW-1:0] sr [3][3];

  logic [RW-1:0] in_row;   // 0..H+1; rows H and H+1 are the flush steps
  logic [CW-1:0] in_col;
  logic [RW-1:0] o_row;    // centre position of the next window to emit
  logic [CW-1:0] o_col;

  logic          flushing;
  logic          advance;
  logic          emit;
  logic          last_step;
  logic [DW-1:0] step_pix;
  logic [DW-1:0] col_v [3];
  logic [DW-1:0] nsr [3][3];
  logic [DW-1:0] rw [3][3];   // row-clamped window
  logic [DW-1:0] cw [3][3];   // row- and column-clamped window

  assign flushing  = (in_row >= RW'(H));
  assign advance   = in_valid || flushing;
  assign step_pix  = flushing ? '0 : in_pix;
  assign last_step = (in_row == RW'(H + 1));
  // Output starts once W+1 steps of the frame have been taken.
  assign emit      = advance && ((in_row >= RW'(2)) || (in_row == RW'(1) && in_col != '0));

  always_comb begin
    col_v[0] = lb1[in_col];
    col_v[1] = lb0[in_col];
    col_v[2] = step_pix;
    for (int r = 0; r < 3; r++) begin
      nsr[0][r] = sr[1][r];
      nsr[1][r] = sr[2][r];
      nsr[2][r] = col_v[r];
    end
    // Raw window (row-major) with rows replicated at the top/bottom border.
    for (int c = 0; c < 3; c++) begin
      rw[0][c] = (o_row == '0)          ? nsr[c][1] : nsr[c][0];
      rw[1][c] = nsr[c][1];
      rw[2][c] = (o_row == RW'(H - 1))  ? nsr[c][1] : nsr[c][2];
    end
    // Columns replicated at the left/right border.
    for (int r = 0; r < 3; r++) begin
      cw[r][0] = (o_col == '0)          ? rw[r][1] : rw[r][0];
      cw[r][1] = rw[r][1];
      cw[r][2] = (o_col == CW'(W - 1))  ? rw[r][1] : rw[r][2];
    end
  end

  // Line buffer memories (no reset: stale contents are never used, see clamping).
  always_ff @(posedge clk) begin
    if (advance) begin
      lb0[in_col] <= step_pix;
      lb1[in_col] <= col_v[1];
    end
  end

  always_ff @(posedge clk) begin
    if (advance) sr <= nsr;
    if (emit)    out_win <= cw;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_row    <= '0;
      in_col    <= '0;
      o_row     <= '0;
      o_col     <= '0;
      out_valid <= 1'b0;
      out_row   <= '0;
      out_col   <= '0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
      overrun   <= 1'b0;
    end else begin
      out_valid <= emit;
      overrun   <= in_valid && flushing;
      if (advance) begin
        if (last_step) begin
          in_row <= '0;
          in_col <= '0;
        end else if (in_col == CW'(W - 1)) begin
          in_col <= '0;
          in_row <= in_row + 1'b1;
        end else begin
          in_col <= in_col + 1'b1;
        end
      end
      if (emit) begin
        out_row   <= o_row;
        out_col   <= o_col;
        out_first <= (o_row == '0) && (o_col == '0);
        out_last  <= (o_row == RW'(H - 1)) && (o_col == CW'(W - 1));
        if (o_col == CW'(W - 1)) begin
          o_col <= '0;
          o_row <= (o_row == RW'(H - 1)) ? '0 : o_row + 1'b1;
        end else begin
          o_col <= o_col + 1'b1;
        end
      end
    end
  end

  // A pixel may not arrive while the previous frame is still being emptied.
  assert property (@(posedge clk) disable iff (!rst_n) !(in_valid && flushing))
    else $error("window_3x3: pixel arrived during end-of-frame flush (blanking too short)");

endmodule
