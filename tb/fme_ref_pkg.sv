// fme_ref_pkg: reference model of H.264 luma half- and quarter-pel interpolation.
//
// Used by the testbenches to compute expected samples independently of the RTL.
// Frames are flat int arrays in raster order (index y * w + x); coordinates outside
// the frame are clamped to the edge. Half-pel samples follow the standard's
// definitions with explicit multiplications; quarter-pel samples are looked up in the
// standard's table of named positions (a, c, d, n, f, i, k, q, e, g, p, r).
package fme_ref_pkg;

  function automatic int clip(input int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  function automatic int px(input int img[], input int w, input int h, input int x, input int y);
    int cx, cy;
    cx = (x < 0) ? 0 : (x >= w) ? w - 1 : x;
    cy = (y < 0) ? 0 : (y >= h) ? h - 1 : y;
    return img[cy * w + cx];
  endfunction

  localparam int TAPS[6] = '{1, -5, 20, 20, -5, 1};

  // unscaled horizontal half pel between (x,y) and (x+1,y)
  function automatic int b1(input int img[], input int w, input int h, input int x, input int y);
    int s = 0;
    for (int k = 0; k < 6; k++) s += TAPS[k] * px(img, w, h, x + k - 2, y);
    return s;
  endfunction

  // unscaled vertical half pel between (x,y) and (x,y+1)
  function automatic int h1(input int img[], input int w, input int h, input int x, input int y);
    int s = 0;
    for (int k = 0; k < 6; k++) s += TAPS[k] * px(img, w, h, x, y + k - 2);
    return s;
  endfunction

  function automatic int j1(input int img[], input int w, input int h, input int x, input int y);
    int s = 0;
    int yy;
    for (int k = 0; k < 6; k++) begin
      yy = y + k - 2;
      yy = (yy < 0) ? 0 : (yy >= h) ? h - 1 : yy;
      s += TAPS[k] * b1(img, w, h, x, yy);
    end
    return s;
  endfunction

  // division rounding towards minus infinity (an arithmetic right shift)
  function automatic int fdiv(input int v, input int d);
    return (v >= 0) ? v / d : -((-v + d - 1) / d);
  endfunction

  function automatic int G (input int img[], input int w, input int h, input int x, input int y);
    return px(img, w, h, x, y);
  endfunction
  function automatic int Bh(input int img[], input int w, input int h, input int x, input int y);
    return clip(fdiv(b1(img, w, h, x, y) + 16, 32));
  endfunction
  function automatic int Hv(input int img[], input int w, input int h, input int x, input int y);
    return clip(fdiv(h1(img, w, h, x, y) + 16, 32));
  endfunction
  function automatic int Jc(input int img[], input int w, input int h, input int x, input int y);
    return clip(fdiv(j1(img, w, h, x, y) + 512, 1024));
  endfunction

  // half-pel grid sample at grid row gy, column gx (grid = 2w x 2h)
  function automatic int half_grid(input int img[], input int w, input int h, input int gx, input int gy);
    int x = gx / 2, y = gy / 2;
    case ((gy % 2) * 2 + gx % 2)
      0: return G (img, w, h, x, y);
      1: return Bh(img, w, h, x, y);
      2: return Hv(img, w, h, x, y);
      default: return Jc(img, w, h, x, y);
    endcase
  endfunction

  function automatic int av(input int a, input int b);
    return (a + b + 1) / 2;
  endfunction

  // quarter-pel sample at quarter position (qx, qy) of the block whose top-left
  // integer pixel is (bx, by)
  function automatic int quarter(input int img[], input int w, input int h,
                                 input int bx, input int by, input int qx, input int qy);
    int x = bx + qx / 4, y = by + qy / 4;
    int xf = qx % 4, yf = qy % 4;
    int Gs = G (img, w, h, x, y);
    int bs = Bh(img, w, h, x, y);
    int hs = Hv(img, w, h, x, y);
    int js = Jc(img, w, h, x, y);
    int Hs = G (img, w, h, x + 1, y);      // integer right
    int Ms = G (img, w, h, x, y + 1);      // integer below
    int ss = Bh(img, w, h, x, y + 1);      // b below
    int ms = Hv(img, w, h, x + 1, y);      // h right
    case (yf * 4 + xf)
      0:  return Gs;
      1:  return av(Gs, bs);   // a
      2:  return bs;           // b
      3:  return av(bs, Hs);   // c
      4:  return av(Gs, hs);   // d
      5:  return av(bs, hs);   // e
      6:  return av(bs, js);   // f
      7:  return av(bs, ms);   // g
      8:  return hs;           // h
      9:  return av(hs, js);   // i
      10: return js;           // j
      11: return av(js, ms);   // k
      12: return av(Ms, hs);   // n
      13: return av(hs, ss);   // p
      14: return av(js, ss);   // q
      default: return av(ms, ss); // r
    endcase
  endfunction

endpackage
