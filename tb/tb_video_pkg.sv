// tb_video_pkg: reference models of the pipeline stages, on whole frames.
//
// Images are flat int arrays, index r*w + c, in stream coordinates. Each 3x3
// stage follows the streaming convention of the RTL: the result at stream
// position (r, c) is computed from the input window rows r-2..r, columns
// c-2..c, with zero for positions above or left of the frame.
package tb_video_pkg;
  typedef int     img_t[];
  typedef longint limg_t[];


  function automatic int gray_ref(input int r, input int g, input int b);
    return (77 * r + 150 * g + 29 * b + 128) >> 8;
  endfunction

  // Index of window tap (i, j), i = 0 top row, j = 0 left column, of stream
  // position (r, c); -1 when the tap lies above or left of the frame.
  function automatic int tap_idx(input int w, input int r, input int c, input int i, input int j);
    if (r - 2 + i < 0 || c - 2 + j < 0) return -1;
    return (r - 2 + i) * w + c - 2 + j;
  endfunction

  function automatic void sobel_ref(input img_t y, input int w, input int h,
                                    output img_t gx, output img_t gy, output img_t cen);
    int t [3][3];
    gx = new[w * h]; gy = new[w * h]; cen = new[w * h];
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        for (int i = 0; i < 3; i++)
          for (int j = 0; j < 3; j++)
            t[i][j] = (r - 2 + i < 0 || c - 2 + j < 0) ? 0 : y[(r - 2 + i) * w + c - 2 + j];
        gx[r * w + c]  = (t[0][2] + 2 * t[1][2] + t[2][2]) - (t[0][0] + 2 * t[1][0] + t[2][0]);
        gy[r * w + c]  = (t[2][0] + 2 * t[2][1] + t[2][2]) - (t[0][0] + 2 * t[0][1] + t[0][2]);
        cen[r * w + c] = t[1][1];
      end
  endfunction

  function automatic int edge_ref(input int gx, input int gy, input int cen,
                                  input int thr, input bit en);
    int m;
    m = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
    if (!en) return cen;
    return (m > thr) ? 255 : 0;
  endfunction

  function automatic void harris_ref(input img_t gx, input img_t gy, input int w, input int h,
                                     input int gshift, input longint knum, input int kshift,
                                     output limg_t resp);
    int xx[], yy[], xy[];
    xx = new[w * h]; yy = new[w * h]; xy = new[w * h];
    resp = new[w * h];
    for (int k = 0; k < w * h; k++) begin
      int ix, iy;
      ix = gx[k] >>> gshift;
      iy = gy[k] >>> gshift;
      xx[k] = ix * ix; yy[k] = iy * iy; xy[k] = ix * iy;
    end
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        longint a, b, cc, tr, det;
        a = 0; b = 0; cc = 0;
        for (int i = 0; i < 3; i++)
          for (int j = 0; j < 3; j++) begin
            int wt, rr, c2;
            wt = (i == 1 ? 2 : 1) * (j == 1 ? 2 : 1);
            rr = r - 2 + i; c2 = c - 2 + j;
            if (rr >= 0 && c2 >= 0) begin
              a  += wt * xx[rr * w + c2];
              b  += wt * yy[rr * w + c2];
              cc += wt * xy[rr * w + c2];
            end
          end
        a = a >>> 4; b = b >>> 4; cc = cc >>> 4;
        tr  = a + b;
        det = a * b - cc * cc;
        resp[r * w + c] = det - ((tr * tr * knum) >>> kshift);
      end
  endfunction

  function automatic void median_ref(input img_t y, input int w, input int h, input bit en,
                                     output img_t o);
    int v [9];
    o = new[w * h];
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        for (int k = 0; k < 9; k++) begin
          int ix;
          ix = tap_idx(w, r, c, k / 3, k % 3);
          v[k] = (ix < 0) ? 0 : y[ix];
        end
        if (!en) o[r * w + c] = v[4];
        else begin
          v.sort();
          o[r * w + c] = v[4];
        end
      end
  endfunction

  function automatic void sharpen_ref(input img_t y, input int w, input int h, input bit en,
                                      output img_t o, inout int nsat);
    o = new[w * h];
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        int s, t [3][3];
        for (int i = 0; i < 3; i++)
          for (int j = 0; j < 3; j++) begin
            int ix;
            ix = tap_idx(w, r, c, i, j);
            t[i][j] = (ix < 0) ? 0 : y[ix];
          end
        s = 5 * t[1][1] - t[0][1] - t[2][1] - t[1][0] - t[1][2];
        if (!en) o[r * w + c] = t[1][1];
        else begin
          if (s < 0 || s > 255) nsat++;
          o[r * w + c] = s < 0 ? 0 : (s > 255 ? 255 : s);
        end
      end
  endfunction

  // Spatial shift by (lines, pixels), zero-filled.
  function automatic void shift_ref(input img_t a, input int w, input int h,
                                    input int lines, input int pixels, output img_t o);
    o = new[w * h];
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++)
        o[r * w + c] = (r >= lines && c >= pixels) ? a[(r - lines) * w + c - pixels] : 0;
  endfunction

  // Test picture: bright rectangles on a ramp with noise, giving edges and
  // corners. Returns packed 24-bit RGB values.
  function automatic void make_picture(input int w, input int h, input int seed_mix,
                                       output img_t rgb);
    rgb = new[w * h];
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        int base, rr, gg, bb;
        base = (c * 3 + r * 2 + seed_mix) % 64;
        if ((r % 16) >= 4 && (r % 16) < 12 && (c % 16) >= 4 && (c % 16) < 12) base = 200;
        rr = base + int'($urandom_range(20));
        gg = base + int'($urandom_range(20));
        bb = (base / 2) + int'($urandom_range(20));
        if (int'($urandom_range(99)) < 2) begin rr = 255; gg = 255; bb = 255; end
        rgb[r * w + c] = (rr << 16) | (gg << 8) | bb;
      end
  endfunction
endpackage
