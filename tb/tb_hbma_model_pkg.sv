// tb_hbma_model_pkg: reference model of the three-layer hierarchical block
// matching, written independently of the RTL for the testbenches.
//
// Frames: the previous frame is a pseudo-random texture; the current frame is
// the previous one moved by a known global displacement. Blocks that cross the
// frame edge read the nearest border pixel. One layer: for every grid point
// (every S-th pixel) an exhaustive search over +-P of an N x N block centred on
// the point (top-left at point - N/2), first minimum kept in (v, u) scan order;
// the update is added to the incoming vector; the field is then doubled in
// density by averaging neighbours (floor division), replicating the last row
// and column.
package tb_hbma_model_pkg;

  typedef struct { int x; int y; } ivec_t;

  int unsigned g_fw = 288, g_fh = 352;
  int g_mx = 3, g_my = -2;   // global motion of the current frame
  int unsigned g_seed = 1;

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic byte unsigned prev_pix(int x, int y);
    int unsigned h;
    x = clampi(x, 0, int'(g_fw) - 1);
    y = clampi(y, 0, int'(g_fh) - 1);
    h = (x * 32'd2654435761) ^ (y * 32'd40503) ^ (g_seed * 32'd97);
    h = h ^ (h >> 13);
    h = h * 32'd1274126177;
    h = h ^ (h >> 16);
    return byte'(h[7:0]);
  endfunction

  function automatic byte unsigned cur_pix(int x, int y);
    x = clampi(x, 0, int'(g_fw) - 1);
    y = clampi(y, 0, int'(g_fh) - 1);
    return prev_pix(x + g_mx, y + g_my);
  endfunction

  function automatic int wrap8(int v);
    return int'($signed(v[7:0]));
  endfunction

  // One layer of block matching over a GW x GH grid; vin/vout are row-major.
  function automatic void bma_layer(int N, int P, int S, int GW, int GH,
                                    const ref ivec_t vin[], ref ivec_t vout[]);
    int K;
    byte unsigned refb[], sa[];
    K = N + 2 * P;
    refb = new[N * N];
    sa   = new[K * K];
    vout = new[GW * GH];
    for (int gy = 0; gy < GH; gy++) begin
      for (int gx = 0; gx < GW; gx++) begin
        int rx, ry, sx, sy, best, bu, bv;
        ivec_t vi;
        vi = vin[gy * GW + gx];
        rx = gx * S - N / 2;
        ry = gy * S - N / 2;
        sx = rx - P + vi.x;
        sy = ry - P + vi.y;
        for (int r = 0; r < N; r++)
          for (int c = 0; c < N; c++) refb[r * N + c] = cur_pix(rx + c, ry + r);
        for (int r = 0; r < K; r++)
          for (int c = 0; c < K; c++) sa[r * K + c] = prev_pix(sx + c, sy + r);
        best = -1; bu = 0; bv = 0;
        for (int v = 0; v <= 2 * P; v++) begin
          for (int u = 0; u <= 2 * P; u++) begin
            int sad;
            sad = 0;
            for (int r = 0; r < N; r++)
              for (int c = 0; c < N; c++) begin
                int d;
                d = int'(refb[r * N + c]) - int'(sa[(r + v) * K + c + u]);
                sad += (d < 0) ? -d : d;
              end
            if (best < 0 || sad < best) begin
              best = sad; bu = u; bv = v;
            end
          end
        end
        vout[gy * GW + gx].x = wrap8(vi.x + bu - P);
        vout[gy * GW + gx].y = wrap8(vi.y + bv - P);
      end
    end
  endfunction

  // Doubling of the field density by bilinear averaging.
  function automatic void interp2(int GW, int GH, const ref ivec_t d[], ref ivec_t o[]);
    o = new[4 * GW * GH];
    for (int y = 0; y < GH; y++) begin
      for (int x = 0; x < GW; x++) begin
        ivec_t a, b, c, e;
        int x1, y1;
        x1 = (x + 1 < GW) ? x + 1 : x;
        y1 = (y + 1 < GH) ? y + 1 : y;
        a = d[y * GW + x];  b = d[y * GW + x1];
        c = d[y1 * GW + x]; e = d[y1 * GW + x1];
        o[(2*y) * 2*GW + 2*x]       = a;
        o[(2*y) * 2*GW + 2*x+1].x   = (a.x + b.x) >>> 1;
        o[(2*y) * 2*GW + 2*x+1].y   = (a.y + b.y) >>> 1;
        o[(2*y+1) * 2*GW + 2*x].x   = (a.x + c.x) >>> 1;
        o[(2*y+1) * 2*GW + 2*x].y   = (a.y + c.y) >>> 1;
        o[(2*y+1) * 2*GW + 2*x+1].x = (a.x + b.x + c.x + e.x) >>> 2;
        o[(2*y+1) * 2*GW + 2*x+1].y = (a.y + b.y + c.y + e.y) >>> 2;
      end
    end
  endfunction

endpackage
