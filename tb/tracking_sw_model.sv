// tracking_sw_model: behavioural model of the object tracking software.
//
// Used only by testbenches, in place of the program on the processor. It holds
// one 640x480 background frame and one current frame, both RGB332, and offers:
//   make_background()         a fixed low-intensity texture;
//   make_frame(cx, cy, seed)  the background with a white 21x21 object centred
//                             on column cx, row cy, isolated white noise pixels
//                             (kept at least 2 pixels clear of the object)
//                             and faint flicker (one red level) on a sparse grid;
//   track(x, y)               grey conversion (77/150/29 weights), delta frame
//                             against the background, threshold (difference
//                             above THRESH is object), 3x3 median filter on the
//                             binary image (pixels outside the frame count as 0)
//                             and centre of gravity: x = mean column, y = mean
//                             row, truncated.
// n_rejected counts non-zero differences that the threshold rejected and
// n_median_removed counts object pixels the median filter removed.
module tracking_sw_model #(
  parameter int W      = 640,
  parameter int H      = 480,
  parameter int THRESH = 40
);
  byte unsigned bg   [H][W];
  byte unsigned cur  [H][W];
  bit           mask [H][W];
  int n_rejected = 0;
  int n_median_removed = 0;
  int n_object = 0;

  function automatic int grey(input byte unsigned p);
    int r = int'(p[7:5]), g = int'(p[4:2]), b = int'(p[1:0]);
    return (77 * (r * 255 / 7) + 150 * (g * 255 / 7) + 29 * (b * 255 / 3)) >> 8;
  endfunction

  task automatic make_background();
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++)
        bg[r][c] = byte'((((c + r) % 3) << 5) | (((3 * c + r) % 3) << 2) | (r % 2));
  endtask

  task automatic make_frame(input int cx, input int cy, input int seed);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        cur[r][c] = bg[r][c];
        if (((r * 7 + c * 13 + seed) % 29) == 0) cur[r][c] = bg[r][c] + 8'h20;
        if ((r % 4) == 1 && (c % 4) == 2 && ((r * 31 + c * 17 + seed) % 53) == 0 &&
            !(r >= cy - 12 && r <= cy + 12 && c >= cx - 12 && c <= cx + 12))
          cur[r][c] = 8'hFF;
        if (r >= cy - 10 && r <= cy + 10 && c >= cx - 10 && c <= cx + 10) cur[r][c] = 8'hFF;
      end
  endtask

  task automatic track(output int x, output int y);
    longint sr, sc, n;
    int d, ones;
    bit keep;
    sr = 0;
    sc = 0;
    n  = 0;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        d = grey(cur[r][c]) - grey(bg[r][c]);
        if (d < 0) d = -d;
        mask[r][c] = (d > THRESH);
        if (d != 0 && d <= THRESH) n_rejected++;
      end
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        ones = 0;
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++)
            if (r + dr >= 0 && r + dr < H && c + dc >= 0 && c + dc < W)
              ones += int'(mask[r + dr][c + dc]);
        keep = (ones >= 5);
        if (mask[r][c] && !keep) n_median_removed++;
        if (keep) begin
          sr += longint'(r);
          sc += longint'(c);
          n++;
        end
      end
    n_object += int'(n);
    x = (n != 0) ? int'(sc / n) : 0;
    y = (n != 0) ? int'(sr / n) : 0;
  endtask
endmodule
