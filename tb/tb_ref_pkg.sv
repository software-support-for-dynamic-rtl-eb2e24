// tb_ref_pkg: reference models used by the testbenches to compute expected
// results independently of the RTL.
//   conv5_ref  : causal 5x5 convolution (blur box or sharpen kernel),
//                divided by the kernel sum and clamped to 0..255
//   sobel_ref  : luma conversion, 3x3 Sobel, |Gx|+|Gy|, inversion, thresholds
//   mat_ref    : C = A * B with 32-bit wrap-around, B column-major
// Images are arrays of 32-bit words {8'h00, R, G, B}, row-major.
package tb_ref_pkg;

  typedef logic [31:0] word_q_t[$];

  function automatic int ch(logic [31:0] w, int c);
    return int'((w >> (8 * c)) & 32'hFF);
  endfunction

  function automatic int sharp_k(int i, int j);
    if (i == 2 && j == 2) return 8;
    if (i >= 1 && i <= 3 && j >= 1 && j <= 3) return 2;
    return -1;
  endfunction

  // sharp = 0 : blur box, sharp = 1 : sharpen kernel
  function automatic word_q_t conv5_ref(word_q_t img, int w, int h, bit sharp);
    word_q_t out;
    int ksum;
    ksum = sharp ? 8 : 25;
    for (int y = 0; y < h; y++) begin
      for (int x = 0; x < w; x++) begin
        logic [31:0] o;
        o = '0;
        for (int c = 0; c < 3; c++) begin
          int s, v;
          s = 0;
          for (int i = 0; i < 5; i++)
            for (int j = 0; j < 5; j++)
              if (x - i >= 0 && y - j >= 0)
                s += (sharp ? sharp_k(i, j) : 1) * ch(img[(y - j) * w + (x - i)], c);
          v = (s <= 0) ? 0 : s / ksum;
          if (v > 255) v = 255;
          o |= 32'(v) << (8 * c);
        end
        out.push_back(o);
      end
    end
    return out;
  endfunction

  function automatic int luma(logic [31:0] p);
    return (66 * ch(p, 2) + 129 * ch(p, 1) + 25 * ch(p, 0) + 128) >> 8;
  endfunction

  function automatic word_q_t sobel_ref(word_q_t img, int w, int h, int hi, int lo);
    word_q_t out;
    // standard orientation: row 0 = top (line y-2), column 0 = left (x-2)
    int gx[3][3] = '{'{-1, 0, 1}, '{-2, 0, 2}, '{-1, 0, 1}};
    int gy[3][3] = '{'{1, 2, 1}, '{0, 0, 0}, '{-1, -2, -1}};
    for (int y = 0; y < h; y++) begin
      for (int x = 0; x < w; x++) begin
        int dx, dy, v;
        dx = 0;
        dy = 0;
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++) begin
            int yy, xx, l;
            yy = y - 2 + r;
            xx = x - 2 + c;
            l = (yy >= 0 && xx >= 0) ? luma(img[yy * w + xx]) : 0;
            dx += gx[r][c] * l;
            dy += gy[r][c] * l;
          end
        v = 255 - ((dx < 0 ? -dx : dx) + (dy < 0 ? -dy : dy));
        if (v > hi) v = 255;
        else if (v < lo) v = 0;
        out.push_back({8'h00, 8'(v), 8'(v), 8'(v)});
      end
    end
    return out;
  endfunction

  function automatic word_q_t mat_ref(word_q_t a, word_q_t b_colmajor, int n);
    word_q_t c;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        logic [31:0] s;
        s = '0;
        for (int k = 0; k < n; k++) s += a[i * n + k] * b_colmajor[j * n + k];
        c.push_back(s);
      end
    return c;
  endfunction

endpackage
