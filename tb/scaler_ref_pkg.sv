// scaler_ref_pkg - golden model of the image scaling arithmetic, used by
// the testbenches. It is written from the formulas, not from the RTL
// structure: the combined filter is evaluated with its full kernel
// coefficients and the interpolation with the four-weight form
//   (1-dx)(1-dy)a + dx(1-dy)b + (1-dx)dy c + dx dy d.
// The source image lives in the package (img, img_w, img_h) so that the
// camera model and the checkers see the same picture.
package scaler_ref_pkg;

  localparam int F = 8;   // fractional bits of dx, dy and the steps

  int img[];
  int img_w;
  int img_h;
  byte unsigned rx_q[$];  // bytes seen on the serial output

  function automatic void new_image(int w, int h, int kind);
    img_w = w;
    img_h = h;
    img   = new[w*h];
    foreach (img[i]) begin
      case (kind)
        0:       img[i] = $urandom_range(0, 255);
        1:       img[i] = ((i % w) * 255) / (w - 1);                 // ramp
        2:       img[i] = ((((i % w) / 2 + (i / w) / 2) % 2) != 0) ? 255 : 0; // checkers
        default: img[i] = ($urandom_range(0, 1) != 0) ? 240 : 10;
      endcase
    end
  endfunction

  function automatic int pix(int r, int c);
    if (r < 0) r = 0;
    if (r > img_h - 1) r = img_h - 1;
    if (c < 0) c = 0;
    if (c > img_w - 1) c = img_w - 1;
    return img[r*img_w + c];
  endfunction

  function automatic int sval(int sel);
    int t[4] = '{7, 11, 19, 19};
    return t[sel];
  endfunction

  function automatic int cval(int sel);
    int t[4] = '{5, 13, 29, 29};
    return t[sel];
  endfunction

  // Combined filter on an explicit window: main row columns -2..2, side row
  // columns -1..1.
  function automatic int filt_win(int m[5], int sd[3], int s_sel, int c_sel);
    int S = sval(s_sel);
    int C = cval(c_sel);
    int div = (S - 3) * (C + 3);
    int acc;
    int q;
    acc = -m[0] + (S - C) * m[1] + (S*C - 2) * m[2] + (S - C) * m[3] - m[4]
          - 2 * sd[0] + (S - C - 1) * sd[1] - 2 * sd[2];
    // floor((acc + div/2) / div) for either sign
    q = acc + div / 2;
    q = (q >= 0) ? q / div : -((-q + div - 1) / div);
    if (q < 0) q = 0;
    if (q > 255) q = 255;
    return q;
  endfunction

  // Filtered value at column c taking row rm as the 5-wide row and rs as the
  // 3-wide row.
  function automatic int filt(int rm, int rs, int c, int s_sel, int c_sel);
    int m[5];
    int sd[3];
    for (int i = 0; i < 5; i++) m[i] = pix(rm, c - 2 + i);
    for (int i = 0; i < 3; i++) sd[i] = pix(rs, c - 1 + i);
    return filt_win(m, sd, s_sel, c_sel);
  endfunction

  function automatic int bilin(int a, int b, int c, int d, int dx, int dy);
    longint one = 1 << F;
    longint lx = longint'(dx), ly = longint'(dy);
    longint acc;
    acc = (one - lx) * (one - ly) * a + lx * (one - ly) * b
        + (one - lx) * ly * c + lx * ly * d;
    return int'((acc + (longint'(1) << (2*F - 1))) >> (2*F));
  endfunction

  // Output pixel (k, l) of the scaled image.
  function automatic int scaled(int k, int l, int step_x, int step_y, int s_sel, int c_sel);
    longint x = longint'(k) * step_x;
    longint y = longint'(l) * step_y;
    int m  = int'(x >> F);
    int dx = int'(x % (1 << F));
    int n  = int'(y >> F);
    int dy = int'(y % (1 << F));
    int n1, m1;
    if (n >= img_h - 1) n = img_h - 1;
    n1 = (n == img_h - 1) ? n : n + 1;
    if (m >= img_w - 1) m = img_w - 1;
    m1 = (m == img_w - 1) ? m : m + 1;
    return bilin(filt(n, n1, m, s_sel, c_sel), filt(n, n1, m1, s_sel, c_sel),
                 filt(n1, n, m, s_sel, c_sel), filt(n1, n, m1, s_sel, c_sel), dx, dy);
  endfunction

endpackage
