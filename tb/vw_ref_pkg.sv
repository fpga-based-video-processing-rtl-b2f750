// Reference models for the testbenches, written independently of the RTL.
//
// Images are held as int arrays of up to IMG_MAX_W x IMG_MAX_H pixels, indexed
// [y][x]. expected() gives the output pixel of any detector at (x, y):
// 0 on the border (window not fully inside), otherwise the Sobel magnitude
// sum |Gx|+|Gy| clipped to 255, the SUSAN edge response 8*(n-G) clipped, or
// the SUSAN corner mark, where n counts the mask pixels differing from the
// centre by more than the brightness threshold.
package vw_ref_pkg;

  localparam int IMG_MAX_W = 640;
  localparam int IMG_MAX_H = 480;
  typedef int img_t [IMG_MAX_H][IMG_MAX_W];

  // Cells of the circular 7x7 mask in each row, centred.
  localparam int MASK_ROW [7] = '{3, 5, 7, 7, 7, 5, 3};

  function automatic int clip255(input int v);
    return (v > 255) ? 255 : v;
  endfunction

  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic int sobel_at(const ref img_t img, input int x, input int y);
    int gx, gy;
    gx = img[y-1][x+1] + 2*img[y][x+1] + img[y+1][x+1]
       - img[y-1][x-1] - 2*img[y][x-1] - img[y+1][x-1];
    gy = img[y-1][x-1] + 2*img[y-1][x] + img[y-1][x+1]
       - img[y+1][x-1] - 2*img[y+1][x] - img[y+1][x+1];
    return clip255(iabs(gx) + iabs(gy));
  endfunction

  function automatic int susan_count_at(const ref img_t img, input int x, input int y,
                                        input int bt);
    int n = 0;
    for (int dy = -3; dy <= 3; dy++) begin
      int half = MASK_ROW[dy+3] / 2;
      for (int dx = -half; dx <= half; dx++) begin
        if (dx == 0 && dy == 0) continue;
        if (iabs(img[y+dy][x+dx] - img[y][x]) > bt) n++;
      end
    end
    return n;
  endfunction

  // algo: 0 Sobel, 1 SUSAN edge, 2 SUSAN corner
  function automatic int expected(input int algo, const ref img_t img, input int w,
                                  input int h, input int x, input int y, input int bt,
                                  input int g_edge, input int g_corner);
    int r, n;
    r = (algo == 0) ? 1 : 3;
    if (x < r || y < r || x + r >= w || y + r >= h) return 0;
    if (algo == 0) return sobel_at(img, x, y);
    n = susan_count_at(img, x, y, bt);
    if (algo == 1) return (n > g_edge) ? clip255((n - g_edge) * 8) : 0;
    return (n > g_corner) ? 255 : 0;
  endfunction

  // Test image: a bright rectangle and a bright diagonal wedge on a dark,
  // slightly noisy background, so edges, corners and flat areas all occur.
  function automatic void make_image(ref img_t img, input int w, input int h,
                                     input int seed);
    int s = seed;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        int v;
        s = s * 1103515245 + 12345;
        v = 40 + ((s >>> 16) & 7);
        if (x >= w / 4 && x < w / 2 && y >= h / 4 && y < (3 * h) / 4) v = 200 + ((s >>> 20) & 15);
        if (x > (w / 2) + 2 && y > h / 2 && (x - w / 2) > (h - y)) v = 150;
        img[y][x] = v;
      end
  endfunction

endpackage
