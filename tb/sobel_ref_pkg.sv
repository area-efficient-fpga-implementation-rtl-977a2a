// sobel_ref_pkg: reference model of the edge detector for the testbenches.
// Works on an image held as a flat int array in raster order and computes
// the Sobel gradients with the two masks written out as integers, the
// magnitude |Gx| + |Gy|, and the expected output frame (0 on the border,
// 255 where the magnitude is greater than the threshold, else 0).
package sobel_ref_pkg;

  typedef int img_t [];

  function automatic void grads(const ref img_t img, input int w, input int x,
                                input int y, output int gx, output int gy);
    int mx [3][3] = '{'{-1, -2, -1}, '{0, 0, 0}, '{1, 2, 1}};
    int my [3][3] = '{'{-1, 0, 1}, '{-2, 0, 2}, '{-1, 0, 1}};
    gx = 0;
    gy = 0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        int p;
        p = img[(y - 1 + r) * w + (x - 1 + c)];
        gx += mx[r][c] * p;
        gy += my[r][c] * p;
      end
  endfunction

  function automatic int absi(int v);
    return v < 0 ? -v : v;
  endfunction

  function automatic bit is_border(int w, int h, int x, int y);
    return x == 0 || y == 0 || x == w - 1 || y == h - 1;
  endfunction

  // expected output pixel at (x, y)
  function automatic int expected(const ref img_t img, input int w, input int h,
                                  input int x, input int y, input int thr);
    int gx, gy;
    if (is_border(w, h, x, y)) return 0;
    grads(img, w, x, y, gx, gy);
    return (absi(gx) + absi(gy) > thr) ? 255 : 0;
  endfunction

endpackage
