// tb_ref_pkg: reference models used by the testbenches to compute expected results
// independently of the RTL: FIR filter, 3x3 Gaussian blur, multiply-accumulate with shift,
// ReLU and saturation, and the Sobel / non-maximum-suppression / double-threshold / hysteresis
// edge detector.
// Images are flat arrays in raster order (index r*W + c); outputs cover the valid region only.
package tb_ref_pkg;

  function automatic int sx16(input int v);
    return int'(signed'(v[15:0]));
  endfunction

  // y[n] = (sum_{k<ntaps} h[k] * x[n-k]) >>> shift, truncated to 32 bits
  function automatic void fir(input int h[], input int ntaps, input int x[], input int shift,
                              ref int y[]);
    y = new[x.size()];
    for (int n = 0; n < x.size(); n++) begin
      longint acc = 0;
      for (int k = 0; k < ntaps; k++)
        if (n - k >= 0) acc += longint'(sx16(h[k])) * longint'(sx16(x[n-k]));
      y[n] = int'(acc >>> shift);
    end
  endfunction

  function automatic void gauss(input int img[], input int w, input int hgt, ref int y[]);
    int wt[3][3] = '{'{1, 2, 1}, '{2, 4, 2}, '{1, 2, 1}};
    y = new[(w - 2) * (hgt - 2)];
    for (int r = 1; r < hgt - 1; r++)
      for (int c = 1; c < w - 1; c++) begin
        int s = 8;
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++)
            s += wt[dr+1][dc+1] * (img[(r + dr) * w + c + dc] & 255);
        y[(r - 1) * (w - 2) + (c - 1)] = s / 16;
      end
  endfunction

  function automatic int mac(input int a[], input int b[], input int base, input int n,
                             input int shift, input bit relu);
    longint acc = 0;
    for (int i = 0; i < n; i++) acc += longint'(sx16(a[base + i])) * longint'(sx16(b[base + i]));
    acc = acc >>> shift;
    if (relu && acc < 0) acc = 0;
    if (acc > 64'sd2147483647) acc = 64'sd2147483647;
    if (acc < -64'sd2147483648) acc = -64'sd2147483648;
    return int'(acc);
  endfunction

  // Sobel, non-maximum suppression and double threshold: (w-4) x (h-4) map of 2 (strong),
  // 1 (weak) or 0
  function automatic void canny_nms(input int img[], input int w, input int hgt, input int lo,
                                    input int hi, ref int y[]);
    int mag[], dir[];
    int px[3][3];
    mag = new[w * hgt];
    dir = new[w * hgt];
    for (int r = 1; r < hgt - 1; r++)
      for (int c = 1; c < w - 1; c++) begin
        int gx, gy, ax, ay;
        for (int dr = 0; dr < 3; dr++)
          for (int dc = 0; dc < 3; dc++) px[dr][dc] = img[(r + dr - 1) * w + c + dc - 1] & 255;
        gx = (px[0][2] + 2 * px[1][2] + px[2][2]) - (px[0][0] + 2 * px[1][0] + px[2][0]);
        gy = (px[2][0] + 2 * px[2][1] + px[2][2]) - (px[0][0] + 2 * px[0][1] + px[0][2]);
        ax = gx < 0 ? -gx : gx;
        ay = gy < 0 ? -gy : gy;
        mag[r * w + c] = ax + ay;
        if (ay * 256 <= ax * 106)      dir[r * w + c] = 0;
        else if (ax * 256 <= ay * 106) dir[r * w + c] = 2;
        else if ((gx < 0) == (gy < 0)) dir[r * w + c] = 1;
        else                           dir[r * w + c] = 3;
      end
    y = new[(w - 4) * (hgt - 4)];
    for (int r = 2; r < hgt - 2; r++)
      for (int c = 2; c < w - 2; c++) begin
        int m, n1, n2, o;
        m = mag[r * w + c];
        case (dir[r * w + c])
          0: begin n1 = mag[r * w + c - 1];       n2 = mag[r * w + c + 1];       end
          1: begin n1 = mag[(r - 1) * w + c - 1]; n2 = mag[(r + 1) * w + c + 1]; end
          2: begin n1 = mag[(r - 1) * w + c];     n2 = mag[(r + 1) * w + c];     end
          default: begin n1 = mag[(r - 1) * w + c + 1]; n2 = mag[(r + 1) * w + c - 1]; end
        endcase
        if (m < n1 || m < n2) o = 0;
        else if (m >= hi)     o = 2;
        else if (m >= lo)     o = 1;
        else                  o = 0;
        y[(r - 2) * (w - 4) + (c - 2)] = o;
      end
  endfunction

  // full edge detector: the class map followed by one hysteresis pass over the 8 neighbours,
  // (w-6) x (h-6) map of 255 (edge) or 0
  function automatic void canny(input int img[], input int w, input int hgt, input int lo,
                                input int hi, ref int y[]);
    int cl[];
    int cw;
    canny_nms(img, w, hgt, lo, hi, cl);
    cw = w - 4;
    y = new[(w - 6) * (hgt - 6)];
    for (int r = 1; r < hgt - 5; r++)
      for (int c = 1; c < cw - 1; c++) begin
        bit nb = 0;
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++)
            if ((dr != 0 || dc != 0) && cl[(r + dr) * cw + c + dc] == 2) nb = 1;
        y[(r - 1) * (w - 6) + (c - 1)] =
          (cl[r * cw + c] == 2 || (cl[r * cw + c] == 1 && nb)) ? 255 : 0;
      end
  endfunction

  // test image: smooth gradient plus a bright square and noise, so edges exist
  function automatic void make_image(input int w, input int hgt, input int seed, ref int img[]);
    img = new[w * hgt];
    for (int r = 0; r < hgt; r++)
      for (int c = 0; c < w; c++) begin
        int v = (r * 7 + c * 3 + seed) % 64;
        if (r > hgt / 4 && r < 3 * hgt / 4 && c > w / 4 && c < 3 * w / 4) v += 150;
        v += ((r * 131 + c * 71 + seed * 17) % 23);
        img[r * w + c] = v & 255;
      end
  endfunction
endpackage
