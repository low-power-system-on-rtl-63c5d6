// Reference models used by the testbenches. They are written from the
// definitions of the operations (Sobel kernels, neighbour-difference energy, HEVC
// 4x4 intra prediction, hierarchical block matching), independently of the RTL,
// and work on unpacked pixel arrays rather than packed vectors.
package tb_models_pkg;

  typedef int unsigned blk_t [4][4];   // [y][x]
  typedef int unsigned win_t [8][8];   // [y][x]

  function automatic blk_t unpack_blk(input logic [127:0] v);
    blk_t b;
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++)
        b[y][x] = v[8*(4*y+x) +: 8];
    return b;
  endfunction

  function automatic logic [127:0] pack_blk(input blk_t b);
    logic [127:0] v;
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++)
        v[8*(4*y+x) +: 8] = 8'(b[y][x]);
    return v;
  endfunction

  function automatic logic [511:0] pack_win(input win_t w);
    logic [511:0] v;
    for (int y = 0; y < 8; y++)
      for (int x = 0; x < 8; x++)
        v[8*(8*y+x) +: 8] = 8'(w[y][x]);
    return v;
  endfunction

  // Sobel: returns {horizontal_edge, vertical_edge}
  function automatic logic [1:0] m_edges(input logic [127:0] v, input int th);
    int kx [3][3] = '{'{-1, 0, 1}, '{-2, 0, 2}, '{-1, 0, 1}};
    int ky [3][3] = '{'{-1, -2, -1}, '{0, 0, 0}, '{1, 2, 1}};
    blk_t b = unpack_blk(v);
    logic h = 0, vv = 0;
    for (int y = 1; y <= 2; y++)
      for (int x = 1; x <= 2; x++) begin
        int gx = 0, gy = 0;
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++) begin
            gx += kx[dy+1][dx+1] * int'(b[y+dy][x+dx]);
            gy += ky[dy+1][dx+1] * int'(b[y+dy][x+dx]);
          end
        if ((gx < 0 ? -gx : gx) > th) h = 1;
        if ((gy < 0 ? -gy : gy) > th) vv = 1;
      end
    return {h, vv};
  endfunction

  function automatic int m_variance(input logic [127:0] v);
    blk_t b = unpack_blk(v);
    int acc = 0;
    for (int y = 0; y < 3; y++)
      for (int x = 0; x < 3; x++) begin
        int dr = int'(b[y][x]) - int'(b[y][x+1]);
        int db = int'(b[y][x]) - int'(b[y+1][x]);
        acc += dr*dr + db*db;
      end
    return acc;
  endfunction

  function automatic int m_sad(input logic [127:0] a, input logic [127:0] c);
    int s = 0;
    for (int i = 0; i < 16; i++) begin
      int d = int'(a[8*i +: 8]) - int'(c[8*i +: 8]);
      s += (d < 0) ? -d : d;
    end
    return s;
  endfunction

  // Mode family: 0 smooth, 1 horizontal (2..17), 2 vertical (18..34), 3 all
  function automatic int m_group(input logic [127:0] cur);
    logic [1:0] e = m_edges(cur, 128);
    int var_ = m_variance(cur);
    if (var_ < 1000)        return 0;
    if (e == 2'b10)         return 1;
    if (e == 2'b01)         return 2;
    return 3;
  endfunction

  function automatic bit m_mode_in_group(input int mode, input int grp);
    case (grp)
      0: return mode <= 1;
      1: return mode >= 2 && mode <= 17;
      2: return mode >= 18;
      default: return 1;
    endcase
  endfunction

  // HEVC 4x4 intra prediction, written after the standard's text.
  // refv: bytes 0..7 = p[0..7][-1] (top), bytes 8..15 = p[-1][0..7] (left);
  // p[-1][-1] = (top0 + left0 + 1) >> 1.
  function automatic logic [127:0] m_intra(input int mode, input logic [127:0] refv);
    int angTable [35] = '{0, 0, 32, 26, 21, 17, 13, 9, 5, 2, 0, -2, -5, -9, -13, -17, -21, -26,
                          -32, -26, -21, -17, -13, -9, -5, -2, 0, 2, 5, 9, 13, 17, 21, 26, 32};
    int top [8], left [8], c;
    int refa [-8:16];
    int pred [4][4];  // [y][x]
    blk_t out;
    for (int i = 0; i < 8; i++) begin
      top[i]  = refv[8*i +: 8];
      left[i] = refv[64 + 8*i +: 8];
    end
    c = (top[0] + left[0] + 1) / 2;
    if (mode == 0) begin
      for (int y = 0; y < 4; y++)
        for (int x = 0; x < 4; x++)
          pred[y][x] = ((3-x)*left[y] + (x+1)*top[4] + (3-y)*top[x] + (y+1)*left[4] + 4) / 8;
    end else if (mode == 1) begin
      int s = 0;
      for (int i = 0; i < 4; i++) s += top[i] + left[i];
      for (int y = 0; y < 4; y++)
        for (int x = 0; x < 4; x++)
          pred[y][x] = (s + 4) / 8;
    end else begin
      int ang = angTable[mode];
      int invAng;
      // invAngle of the standard: 256*32/ang, rounded
      case (ang)
        -2: invAng = -4096;  -5: invAng = -1638;  -9: invAng = -910;  -13: invAng = -630;
        -17: invAng = -482;  -21: invAng = -390;  -26: invAng = -315; -32: invAng = -256;
        default: invAng = 0;
      endcase
      for (int i = -8; i <= 16; i++) refa[i] = 0;
      if (mode >= 18) begin
        refa[0] = c;
        for (int x = 1; x <= 8; x++) refa[x] = top[x-1];
        if (ang < 0 && ((4*ang) >>> 5) < -1)
          for (int x = ((4*ang) >>> 5); x <= -1; x++)
            refa[x] = (((x*invAng + 128) >>> 8) == 0) ? c : left[((x*invAng + 128) >>> 8) - 1];
        for (int y = 0; y < 4; y++) begin
          int iIdx = ((y+1)*ang) >>> 5;
          int iFact = ((y+1)*ang) & 31;
          for (int x = 0; x < 4; x++)
            pred[y][x] = (iFact != 0) ? (((32-iFact)*refa[x+iIdx+1] + iFact*refa[x+iIdx+2] + 16) >>> 5)
                                      : refa[x+iIdx+1];
        end
      end else begin
        refa[0] = c;
        for (int x = 1; x <= 8; x++) refa[x] = left[x-1];
        if (ang < 0 && ((4*ang) >>> 5) < -1)
          for (int x = ((4*ang) >>> 5); x <= -1; x++)
            refa[x] = (((x*invAng + 128) >>> 8) == 0) ? c : top[((x*invAng + 128) >>> 8) - 1];
        for (int x = 0; x < 4; x++) begin
          int iIdx = ((x+1)*ang) >>> 5;
          int iFact = ((x+1)*ang) & 31;
          for (int y = 0; y < 4; y++)
            pred[y][x] = (iFact != 0) ? (((32-iFact)*refa[y+iIdx+1] + iFact*refa[y+iIdx+2] + 16) >>> 5)
                                      : refa[y+iIdx+1];
        end
      end
    end
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++)
        out[y][x] = pred[y][x];
    return pack_blk(out);
  endfunction

  // Hierarchical ME model. Returns best x, y, the full-resolution SAD,
  // the half- and quarter-resolution SADs and the final running minimum.
  function automatic void m_me(input logic [127:0] cur, input logic [511:0] win,
                               output int bx, output int by, output int sfull,
                               output int shalf, output int squart, output int smin);
    int best = 4095;
    int ch [2][2], rh [2][2], cq, rq;
    bx = 0; by = 0;
    for (int y = 0; y <= 4; y++)
      for (int x = 0; x <= 4; x++) begin
        int s = 0;
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++) begin
            int d = int'(cur[8*(4*i+j) +: 8]) - int'(win[8*(8*(y+i)+x+j) +: 8]);
            s += (d < 0) ? -d : d;
          end
        if (s < best) begin best = s; bx = x; by = y; end
      end
    sfull = best;
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        int sc = 0, sr = 0;
        for (int u = 0; u < 2; u++)
          for (int v = 0; v < 2; v++) begin
            sc += int'(cur[8*(4*(2*i+u)+2*j+v) +: 8]);
            sr += int'(win[8*(8*(by+2*i+u)+bx+2*j+v) +: 8]);
          end
        ch[i][j] = sc / 4;
        rh[i][j] = sr / 4;
      end
    shalf = 0;
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++)
        shalf += (ch[i][j] > rh[i][j]) ? ch[i][j] - rh[i][j] : rh[i][j] - ch[i][j];
    cq = (ch[0][0] + ch[0][1] + ch[1][0] + ch[1][1]) / 4;
    rq = (rh[0][0] + rh[0][1] + rh[1][0] + rh[1][1]) / 4;
    squart = (cq > rq) ? cq - rq : rq - cq;
    smin = best;
    if (shalf < smin) smin = shalf;
    if (squart < smin) smin = squart;
  endfunction

endpackage
