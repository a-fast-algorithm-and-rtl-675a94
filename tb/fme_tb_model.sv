// fme_tb_model: reference model used by the FME testbenches.
//
// Written from the H.264 definitions, not from the RTL: quarter-pel samples
// come from the standard's per-position equations (G, a..s), the SATD from
// the matrix form H*D*H' of the 4x4 Hadamard transform, and the two-step
// search from its geometric description (neighbouring / opposite half-pel
// points).  The reference window is (MAX+6) x (MAX+6) pixels, window (0,0)
// being 3 rows above and 3 columns left of the partition.
package fme_tb_model;

  localparam int WN = 22;
  typedef int win_t [WN][WN];
  typedef int blk_t [16][16];

  function automatic int clip1(input int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  function automatic int px(input win_t w, input int y, input int x);
    // partition coordinates -> window
    return w[y + 3][x + 3];
  endfunction

  function automatic int tap6(input int e0, input int e1, input int e2, input int e3,
                              input int e4, input int e5);
    return e0 - 5*e1 + 20*e2 + 20*e3 - 5*e4 + e5;
  endfunction

  function automatic int b1(input win_t w, input int y, input int x);
    return tap6(px(w,y,x-2), px(w,y,x-1), px(w,y,x), px(w,y,x+1), px(w,y,x+2), px(w,y,x+3));
  endfunction
  function automatic int h1(input win_t w, input int y, input int x);
    return tap6(px(w,y-2,x), px(w,y-1,x), px(w,y,x), px(w,y+1,x), px(w,y+2,x), px(w,y+3,x));
  endfunction
  function automatic int bb(input win_t w, input int y, input int x);
    return clip1((b1(w,y,x) + 16) >>> 5);
  endfunction
  function automatic int hh(input win_t w, input int y, input int x);
    return clip1((h1(w,y,x) + 16) >>> 5);
  endfunction
  function automatic int jj(input win_t w, input int y, input int x);
    int j1;
    j1 = tap6(b1(w,y-2,x), b1(w,y-1,x), b1(w,y,x), b1(w,y+1,x), b1(w,y+2,x), b1(w,y+3,x));
    return clip1((j1 + 512) >>> 10);
  endfunction
  function automatic int av(input int a, input int b);
    return (a + b + 1) >>> 1;
  endfunction

  // luma sample at quarter-pel position (yq, xq), partition coordinates x4
  function automatic int sample(input win_t w, input int yq, input int xq);
    int y, x, fy, fx;
    int G, Hp, M, b, h, j, m, s;
    y = yq >>> 2; x = xq >>> 2; fy = yq & 3; fx = xq & 3;
    G = px(w,y,x); Hp = px(w,y,x+1); M = px(w,y+1,x);
    b = bb(w,y,x); h = hh(w,y,x); j = jj(w,y,x);
    m = hh(w,y,x+1); s = bb(w,y+1,x);
    case ({fy[1:0], fx[1:0]})
      4'b00_00: return G;
      4'b00_01: return av(G, b);
      4'b00_10: return b;
      4'b00_11: return av(Hp, b);
      4'b01_00: return av(G, h);
      4'b01_01: return av(b, h);
      4'b01_10: return av(b, j);
      4'b01_11: return av(b, m);
      4'b10_00: return h;
      4'b10_01: return av(h, j);
      4'b10_10: return j;
      4'b10_11: return av(j, m);
      4'b11_00: return av(M, h);
      4'b11_01: return av(h, s);
      4'b11_10: return av(j, s);
      default:  return av(m, s);
    endcase
  endfunction

  function automatic int hmat(input int i, input int k);
    int H [4][4];
    H = '{'{1,1,1,1}, '{1,1,-1,-1}, '{1,-1,-1,1}, '{1,-1,1,-1}};
    return H[i][k];
  endfunction

  // SATD of one 4x4 difference block: (sum |H D H'| + 1) >> 1
  function automatic int satd4(input int d [4][4]);
    int t [4][4];
    int s, v;
    for (int i = 0; i < 4; i++)
      for (int k = 0; k < 4; k++) begin
        t[i][k] = 0;
        for (int l = 0; l < 4; l++) t[i][k] += hmat(i,l) * d[l][k];
      end
    s = 0;
    for (int i = 0; i < 4; i++)
      for (int k = 0; k < 4; k++) begin
        v = 0;
        for (int l = 0; l < 4; l++) v += t[i][l] * hmat(k,l);
        s += (v < 0) ? -v : v;
      end
    return (s + 1) >>> 1;
  endfunction

  // partition cost at quarter-pel offset (dy, dx)
  function automatic int cost_at(input win_t w, input blk_t cur, input int wp, input int hp,
                                 input int dy, input int dx);
    int d [4][4];
    int c;
    c = 0;
    for (int by = 0; by < hp; by += 4)
      for (int bx = 0; bx < wp; bx += 4) begin
        for (int i = 0; i < 4; i++)
          for (int k = 0; k < 4; k++)
            d[i][k] = cur[by+i][bx+k] - sample(w, 4*(by+i) + dy, 4*(bx+k) + dx);
        c += satd4(d);
      end
    return c;
  endfunction

  function automatic int threshold(input int sad, input int qp);
    int t;
    if (sad > 1000)     t = sad - sad / 4 + 375 + 36;
    else if (sad > 500) t = sad + 125 + 36;
    else                t = sad + sad / 4 + 36;
    return t + (qp - 28) * 16;
  endfunction

  // step-2 case and candidates from the indices of the best three step-1
  // points (0 centre, 1 up, 2 left, 3 right, 4 down)
  function automatic void pattern(input int b1i, input int b2i, input int b3i,
                                  output int ncase, output int cy [4], output int cx [4],
                                  output int n);
    int py [5], pxx [5];
    int oy1, ox1, oy2, ox2;
    py  = '{0, -2, 0, 0, 2};
    pxx = '{0, 0, -2, 2, 0};
    n = 3;
    if (b1i == 0) begin
      // unit steps towards 2nd and 3rd
      oy1 = py[b2i] / 2; ox1 = pxx[b2i] / 2;
      oy2 = py[b3i] / 2; ox2 = pxx[b3i] / 2;
      if (oy1 == -oy2 && ox1 == -ox2) begin
        ncase = 1;   // column of three quarter-pels towards the 2nd best
        cy = '{oy1 - ox1, oy1, oy1 + ox1, 0};
        cx = '{ox1 - oy1, ox1, ox1 + oy1, 0};
      end else begin
        ncase = 2;   // L shape
        cy = '{oy1, oy2, oy1 + oy2, 0};
        cx = '{ox1, ox2, ox1 + ox2, 0};
      end
    end else begin
      oy1 = py[b1i] / 2; ox1 = pxx[b1i] / 2;
      oy2 = py[b2i] / 2; ox2 = pxx[b2i] / 2;
      if (b2i != 0 && !(oy1 == -oy2 && ox1 == -ox2)) begin
        ncase = 3;   // L between the two best half-pels, corner towards the centre
        cy = '{py[b1i] + oy2, oy1 + oy2, py[b2i] + oy1, 0};
        cx = '{pxx[b1i] + ox2, ox1 + ox2, pxx[b2i] + ox1, 0};
      end else begin
        ncase = 4;   // diamond around the best half-pel
        n = 4;
        cy = '{py[b1i] + oy1, py[b1i] - oy1, py[b1i] + ox1, py[b1i] - ox1};
        cx = '{pxx[b1i] + ox1, pxx[b1i] - ox1, pxx[b1i] + oy1, pxx[b1i] - oy1};
      end
    end
  endfunction

  typedef struct {
    int dy, dx, cost, ncase;   // ncase 0: terminated early
    int c1_cost [5];
  } result_t;

  // the two-step search with step-level early termination
  function automatic result_t search(input win_t w, input blk_t cur, input int wp, input int hp,
                                     input int sad, input int qp);
    result_t res;
    int py [5], pxx [5], c [5], ord [5];
    int b1i, b2i, b3i, t;
    int cy [4], cx [4], n;
    py  = '{0, -2, 0, 0, 2};
    pxx = '{0, 0, -2, 2, 0};
    for (int i = 0; i < 5; i++) begin
      c[i] = cost_at(w, cur, wp, hp, py[i], pxx[i]);
      res.c1_cost[i] = c[i];
      ord[i] = i;
    end
    // stable selection sort by cost
    for (int i = 0; i < 5; i++)
      for (int k = i + 1; k < 5; k++)
        if (c[ord[k]] < c[ord[i]] || (c[ord[k]] == c[ord[i]] && ord[k] < ord[i])) begin
          t = ord[i]; ord[i] = ord[k]; ord[k] = t;
        end
    b1i = ord[0]; b2i = ord[1]; b3i = ord[2];
    res.dy = py[b1i]; res.dx = pxx[b1i]; res.cost = c[b1i];
    t = threshold(sad, qp);
    if (t > 0 && c[b1i] < t) begin
      res.ncase = 0;
      return res;
    end
    pattern(b1i, b2i, b3i, res.ncase, cy, cx, n);
    for (int i = 0; i < n; i++) begin
      t = cost_at(w, cur, wp, hp, cy[i], cx[i]);
      if (t < res.cost) begin
        res.cost = t; res.dy = cy[i]; res.dx = cx[i];
      end
    end
    return res;
  endfunction
endpackage
