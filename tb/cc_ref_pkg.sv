// cc_ref_pkg: software model of the chain-code pre-processing, used by the
// testbenches as the reference, plus helpers that draw test images.
//
// Image: img[y][x], 64 x 64, 1 = white. Model:
//  - region: rows with at least one white pixel, from the first to the last;
//  - origin: left-most white pixel of the first region row;
//  - contour: walk the pixel cracks from the origin's top-left corner,
//    heading right, object on the right; at each corner test the pixel ahead
//    on the right (background -> turn right), then the one ahead on the left
//    (white -> turn left), else straight; stop back at the start corner;
//  - slopes: 16 pieces [floor(k*L/16), floor((k+1)*L/16)), displacement
//    angle from atan2 (y upwards) quantised to floor(angle / 22.5 deg).
package cc_ref_pkg;

  localparam int W = 64, H = 64;

  typedef bit image_t [H][W];

  function automatic void clear(ref image_t img);
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = 0;
  endfunction

  function automatic void rect(ref image_t img, input int x0, int y0, int w, int h);
    for (int y = y0; y < y0 + h; y++) for (int x = x0; x < x0 + w; x++)
      if (x >= 0 && x < W && y >= 0 && y < H) img[y][x] = 1;
  endfunction

  function automatic void disc(ref image_t img, input int cx, int cy, int r);
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
      if ((x - cx) * (x - cx) + (y - cy) * (y - cy) <= r * r) img[y][x] = 1;
  endfunction

  // triangle with apex at (ax, y0) and a horizontal base of half-width hw at y0+h
  function automatic void triangle(ref image_t img, input int ax, int y0, int hw, int h);
    for (int y = y0; y <= y0 + h; y++) begin
      int half = (hw * (y - y0)) / h;
      for (int x = ax - half; x <= ax + half; x++)
        if (x >= 0 && x < W && y >= 0 && y < H) img[y][x] = 1;
    end
  endfunction

  function automatic bit px(const ref image_t img, input int x, int y, int top, int bot);
    if (x < 0 || x >= W || y < 0 || y >= H || y < top || y > bot) return 0;
    return img[y][x];
  endfunction

  // returns 0 if there is no object
  function automatic bit trace(const ref image_t img, input int maxlen,
                               output int codes [$], output int ox, output int oy,
                               output bit ovf);
    int top = -1, bot = -1, cx, cy, d, nd;
    // pixels ahead (left, right) of a corner for each heading, as (dx, dy)
    // offsets from the corner to the pixel's own corner
    int lx [4] = '{0, -1, -1, 0};
    int ly [4] = '{-1, -1, 0, 0};
    int rx [4] = '{0, 0, -1, -1};
    int ry [4] = '{0, -1, -1, 0};
    int mx [4] = '{1, 0, -1, 0};
    int my [4] = '{0, -1, 0, 1};
    codes = {};
    ovf = 0;
    for (int y = 0; y < H; y++) begin
      bit any = 0;
      for (int x = 0; x < W; x++) any |= img[y][x];
      if (any) begin
        if (top < 0) top = y;
        bot = y;
      end
    end
    if (top < 0) return 0;
    oy = top;
    for (int x = W - 1; x >= 0; x--) if (img[top][x]) ox = x;
    cx = ox; cy = oy; d = 0;
    do begin
      bit l = px(img, cx + lx[d], cy + ly[d], top, bot);
      bit r = px(img, cx + rx[d], cy + ry[d], top, bot);
      if (!r) nd = (d + 3) % 4;
      else if (l) nd = (d + 1) % 4;
      else nd = d;
      d = nd;
      cx += mx[d]; cy += my[d];
      codes.push_back(d);
      if (codes.size() >= maxlen && !(cx == ox && cy == oy)) begin
        ovf = 1;
        break;
      end
    end while (!(cx == ox && cy == oy));
    return 1;
  endfunction

  function automatic int sector(int dx, int dy);
    real a;
    if (dx == 0 && dy == 0) return 0;
    a = $atan2(real'(dy), real'(dx)) * 180.0 / 3.14159265358979;
    if (a < 0) a += 360.0;
    return int'($floor(a / 22.5 + 1.0e-9)) % 16;  // exact 45-degree multiples land in the upper sector
  endfunction

  function automatic void slopes(const ref int codes [$], output int s [16]);
    int l = codes.size();
    for (int k = 0; k < 16; k++) begin
      int dx = 0, dy = 0;
      for (int i = (k * l) / 16; i < ((k + 1) * l) / 16; i++) begin
        case (codes[i])
          0: dx++;
          1: dy++;
          2: dx--;
          default: dy--;
        endcase
      end
      s[k] = sector(dx, dy);
    end
  endfunction

endpackage
