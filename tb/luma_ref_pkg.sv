// luma_ref_pkg: reference model of H.264/AVC luma sub-sample interpolation
// for the testbenches.
//
// Works straight from the standard's definitions with integer arithmetic
// and real multiplications, on a 13x13 window w[row][col] whose element
// [y+2][x+2] is integer pixel (x, y) of the 8x8 block. The centre sample j
// is formed from the vertical intermediates h1 (filter across h1 along a
// row), the other of the two equivalent routes, so that it does not repeat
// the hardware's b1-based route.
package luma_ref_pkg;

  typedef int win_t [13][13];

  function automatic int tap6(int a, int b, int c, int d, int e, int f);
    return a - 5 * b + 20 * c + 20 * d - 5 * e + f;
  endfunction

  function automatic int clip255(int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  // Arithmetic shift right of a possibly negative value.
  function automatic int asr(int v, int n);
    return v >>> n;
  endfunction

  function automatic int g_pix(input win_t w, int x, int y);
    return w[y + 2][x + 2];
  endfunction

  // Unrounded horizontal half sample between (x,y) and (x+1,y).
  function automatic int b1(input win_t w, int x, int y);
    return tap6(w[y+2][x], w[y+2][x+1], w[y+2][x+2], w[y+2][x+3], w[y+2][x+4], w[y+2][x+5]);
  endfunction

  // Unrounded vertical half sample between (x,y) and (x,y+1).
  function automatic int h1(input win_t w, int x, int y);
    return tap6(w[y][x+2], w[y+1][x+2], w[y+2][x+2], w[y+3][x+2], w[y+4][x+2], w[y+5][x+2]);
  endfunction

  function automatic int b_pix(input win_t w, int x, int y);
    return clip255(asr(b1(w, x, y) + 16, 5));
  endfunction

  function automatic int h_pix(input win_t w, int x, int y);
    return clip255(asr(h1(w, x, y) + 16, 5));
  endfunction

  // Unrounded centre sample, filtered across h1 along the row.
  function automatic int j1(input win_t w, int x, int y);
    return tap6(h1(w, x-2, y), h1(w, x-1, y), h1(w, x, y),
                h1(w, x+1, y), h1(w, x+2, y), h1(w, x+3, y));
  endfunction

  function automatic int j_pix(input win_t w, int x, int y);
    return clip255(asr(j1(w, x, y) + 512, 10));
  endfunction

  function automatic int avg2(int a, int b);
    return (a + b + 1) >> 1;
  endfunction

  // Prediction sample of block pixel (x,y) at fractional position (fx,fy).
  function automatic int pred(input win_t w, int fx, int fy, int x, int y);
    int G, H, M, b, s, h, m, j;
    G = g_pix(w, x, y);     H = g_pix(w, x + 1, y);  M = g_pix(w, x, y + 1);
    b = b_pix(w, x, y);     s = b_pix(w, x, y + 1);
    h = h_pix(w, x, y);     m = h_pix(w, x + 1, y);
    j = j_pix(w, x, y);
    case ({fx[1:0], fy[1:0]})
      4'b00_00: return G;
      4'b01_00: return avg2(G, b);   // a
      4'b10_00: return b;
      4'b11_00: return avg2(b, H);   // c
      4'b00_01: return avg2(G, h);   // d
      4'b00_10: return h;
      4'b00_11: return avg2(M, h);   // n
      4'b01_01: return avg2(b, h);   // e
      4'b11_01: return avg2(b, m);   // g
      4'b01_11: return avg2(h, s);   // p
      4'b11_11: return avg2(m, s);   // r
      4'b10_01: return avg2(b, j);   // f
      4'b10_11: return avg2(j, s);   // q
      4'b01_10: return avg2(h, j);   // i
      4'b11_10: return avg2(j, m);   // k
      default:  return j;            // (2,2)
    endcase
  endfunction

  typedef int blk_pred_t [4][4][8][8];

  // All 16 positions of the 8x8 block at once: the half samples are
  // formed once and the positions taken from them, as in pred().
  function automatic void all_pred(input win_t w, output blk_pred_t p);
    int bb [10][9], hh [9][10], jj [8][8];
    for (int y = 0; y < 9; y++)
      for (int x = 0; x < 9; x++) begin
        bb[y][x] = b_pix(w, x, y);
        hh[y][x] = h_pix(w, x, y);
      end
    for (int y = 0; y < 8; y++)
      for (int x = 0; x < 8; x++)
        jj[y][x] = j_pix(w, x, y);
    for (int y = 0; y < 8; y++)
      for (int x = 0; x < 8; x++) begin
        int G, H, M, b, s, h, m, j;
        G = g_pix(w, x, y);  H = g_pix(w, x + 1, y);  M = g_pix(w, x, y + 1);
        b = bb[y][x];  s = bb[y + 1][x];  h = hh[y][x];  m = hh[y][x + 1];
        j = jj[y][x];
        p[0][0][y][x] = G;            p[1][0][y][x] = avg2(G, b);
        p[2][0][y][x] = b;            p[3][0][y][x] = avg2(b, H);
        p[0][1][y][x] = avg2(G, h);   p[0][2][y][x] = h;
        p[0][3][y][x] = avg2(M, h);   p[1][1][y][x] = avg2(b, h);
        p[3][1][y][x] = avg2(b, m);   p[1][3][y][x] = avg2(h, s);
        p[3][3][y][x] = avg2(m, s);   p[2][1][y][x] = avg2(b, j);
        p[2][3][y][x] = avg2(j, s);   p[1][2][y][x] = avg2(h, j);
        p[3][2][y][x] = avg2(j, m);   p[2][2][y][x] = j;
      end
  endfunction

endpackage
