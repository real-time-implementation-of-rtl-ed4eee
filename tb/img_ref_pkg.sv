// img_ref_pkg: reference models used by the stream-level testbenches.
//
// Every function works on a 3x3 window of plain integers, w[r][c] with r=0 the top
// row and c=0 the left column, and returns the expected result of one operation.
// They are written independently of the RTL, with integer arithmetic, sorting and
// counting, so that the testbenches can compare against them.
package img_ref_pkg;

  typedef int win_t [3][3];

  function automatic int ref_box(win_t w);
    int s = 0;
    foreach (w[r, c]) s += w[r][c];
    return s / 9;
  endfunction

  function automatic int ref_gauss(win_t w);
    int s;
    s = w[0][0] + w[0][2] + w[2][0] + w[2][2]
      + 2 * (w[0][1] + w[1][0] + w[1][2] + w[2][1]) + 4 * w[1][1];
    return (s + 8) / 16;
  endfunction

  function automatic int ref_gx(win_t w);
    return (w[0][2] + 2 * w[1][2] + w[2][2]) - (w[0][0] + 2 * w[1][0] + w[2][0]);
  endfunction

  function automatic int ref_gy(win_t w);
    return (w[2][0] + 2 * w[2][1] + w[2][2]) - (w[0][0] + 2 * w[0][1] + w[0][2]);
  endfunction

  function automatic int iabs(int x);
    return x < 0 ? -x : x;
  endfunction

  function automatic int ref_sobel(win_t w);
    int m;
    m = iabs(ref_gx(w)) + iabs(ref_gy(w));
    return m > 255 ? 255 : m;
  endfunction

  function automatic int ref_median(win_t w);
    int a [9];
    foreach (w[r, c]) a[r * 3 + c] = w[r][c];
    a.sort();
    return a[4];
  endfunction

  function automatic int ref_erode(win_t w);
    foreach (w[r, c]) if (w[r][c] == 0) return 0;
    return 1;
  endfunction

  function automatic int ref_dilate(win_t w);
    foreach (w[r, c]) if (w[r][c] != 0) return 1;
    return 0;
  endfunction

  function automatic int ref_bmedian(win_t w);
    int n = 0;
    foreach (w[r, c]) n += (w[r][c] != 0) ? 1 : 0;
    return n >= 5 ? 1 : 0;
  endfunction

  // Canny gradient: returns dir * 2048 + magnitude. The direction sector uses the
  // angle of the gradient: below 22.5 degrees from the x axis is 0, above 67.5 is
  // 2, otherwise 1 when Gx and Gy share a sign and 3 when they do not.
  function automatic int ref_cgrad(win_t w);
    int gx, gy, ax, ay, dir;
    gx = ref_gx(w);
    gy = ref_gy(w);
    ax = iabs(gx);
    ay = iabs(gy);
    // integer form of tan(22.5) ~ 106/256 and tan(67.5) ~ 618/256
    if (ay * 256 <= ax * 106)      dir = 0;
    else if (ay * 256 >= ax * 618) dir = 2;
    else if ((gx < 0) == (gy < 0)) dir = 1;
    else                           dir = 3;
    return dir * 2048 + ax + ay;
  endfunction

  // Non-maximum suppression and double threshold on {dir, mag} values.
  function automatic int ref_nms(win_t w, int lo, int hi);
    int m, d, n1, n2;
    m = w[1][1] % 2048;
    d = w[1][1] / 2048;
    case (d)
      0:       begin n1 = w[1][0]; n2 = w[1][2]; end
      2:       begin n1 = w[0][1]; n2 = w[2][1]; end
      1:       begin n1 = w[0][0]; n2 = w[2][2]; end
      default: begin n1 = w[0][2]; n2 = w[2][0]; end
    endcase
    n1 = n1 % 2048;
    n2 = n2 % 2048;
    if (m < n1 || m < n2) return 0;
    if (m >= hi) return 2;
    if (m >= lo) return 1;
    return 0;
  endfunction

  // Single-pass hysteresis on classes (2 strong, 1 weak).
  function automatic int ref_hyst(win_t w);
    int strong_nb = 0;
    foreach (w[r, c]) if (!(r == 1 && c == 1) && w[r][c] == 2) strong_nb = 1;
    if (w[1][1] == 2) return 1;
    if (w[1][1] == 1 && strong_nb != 0) return 1;
    return 0;
  endfunction

  // RGB888 to grey.
  function automatic int ref_gray(int r, int g, int b);
    return (77 * r + 150 * g + 29 * b + 128) / 256;
  endfunction

endpackage
