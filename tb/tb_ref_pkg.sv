// tb_ref_pkg: reference models used by the testbenches, written in plain
// software style and independent of the RTL structure:
//   * floor division and a 2-D reversible 5/3 DWT of a whole tile;
//   * an MQ arithmetic encoder with a byte buffer (JPEG2000 Annex C style);
//   * the word-level context model of the encoder (significance from higher
//     bit-planes, vertically causal stripes, 2-sample windows, skipping of
//     all-zero windows) producing the expected code bytes of every
//     (code-block, bit-plane) stream.
package tb_ref_pkg;
  import jp2k_pkg::*;

  function automatic int fdiv(int a, int b);
    return int'($floor(real'(a) / real'(b)));
  endfunction

  // 1-D 5/3 forward on n samples (n even), symmetric extension
  function automatic void lift53(input int x[], output int lo[], output int hi[]);
    int n, m;
    n = x.size(); m = n / 2;
    lo = new[m]; hi = new[m];
    for (int i = 0; i < m; i++) begin
      int xr;
      xr = (2*i+2 < n) ? x[2*i+2] : x[n-2];
      hi[i] = x[2*i+1] - fdiv(x[2*i] + xr, 2);
    end
    for (int i = 0; i < m; i++) begin
      int dl;
      dl = (i == 0) ? hi[0] : hi[i-1];
      lo[i] = x[2*i] + fdiv(dl + hi[i] + 2, 4);
    end
  endfunction

  // ---------------- MQ encoder model ----------------
  class mq_ref;
    int a, c, ct, bp;
    byte unsigned buff[$];
    int idx[3][19];
    bit mps[3][19];
    bit used;
    function new();
      reset();
    endfunction
    function void reset();
      a = 'h8000; c = 0; ct = 12; buff = {8'd0}; bp = 0; used = 0;
      foreach (idx[p, x]) begin
        idx[p][x] = (x == 0) ? 4 : (x == 17) ? 3 : (x == 18) ? 46 : 0;
        mps[p][x] = 0;
      end
    endfunction
    function void put(int v);
      buff.push_back(byte'(v)); bp++;
    endfunction
    function void byteout();
      if (buff[bp] == 8'hFF) begin
        put(c >> 20); c = c & 'hFFFFF; ct = 7;
      end else if (c < 'h8000000) begin
        put(c >> 19); c = c & 'h7FFFF; ct = 8;
      end else begin
        buff[bp] = buff[bp] + 1;
        if (buff[bp] == 8'hFF) begin
          c = c & 'h7FFFFFF; put(c >> 20); c = c & 'hFFFFF; ct = 7;
        end else begin
          put(c >> 19); c = c & 'h7FFFF; ct = 8;
        end
      end
    endfunction
    function void renorm();
      do begin
        a = a << 1; c = c << 1; ct--;
        if (ct == 0) byteout();
      end while ((a & 'h8000) == 0);
    endfunction
    function void encode(int pass, int cx, bit d);
      mq_row_t r;
      int qe;
      used = 1;
      r  = mq_table(6'(idx[pass][cx]));
      qe = int'(r.qe);
      if (d == mps[pass][cx]) begin
        a = a - qe;
        if ((a & 'h8000) == 0) begin
          if (a < qe) a = qe; else c = c + qe;
          idx[pass][cx] = int'(r.nmps);
          renorm();
        end else c = c + qe;
      end else begin
        a = a - qe;
        if (a < qe) c = c + qe; else a = qe;
        if (r.sw) mps[pass][cx] = !mps[pass][cx];
        idx[pass][cx] = int'(r.nlps);
        renorm();
      end
    endfunction
    // terminate; return the code bytes (dummy first byte removed)
    function void flush(output byte unsigned out[$]);
      int t;
      t = c + a;
      c = c | 'hFFFF;
      if (c >= t) c = c - 'h8000;
      c = c << ct; byteout();
      c = c << ct; byteout();
      out = buff[1:$];
      if (out.size() > 0 && out[$] == 8'hFF) void'(out.pop_back());
    endfunction
  endclass

  // ---------------- context model reference ----------------
  typedef struct {
    int pass;
    int cx;
    bit d;
  } pair_s;

  // coefficient store: cf[b][y][x] (two's complement, |v| < 1024)
  class ebc_ref;
    int W, H;
    int cf[4][][];
    bit kill[4][10];
    int skipped[4][10];
    pair_s pairs[4][10][$];
    function new(int w, int h);
      W = w; H = h;
      foreach (cf[b]) begin
        cf[b] = new[h];
        foreach (cf[b][y]) cf[b][y] = new[w];
      end
    endfunction
    function int mag(int b, int y, int x);
      int v;
      v = cf[b][y][x];
      v = (v < 0) ? -v : v;
      return (v > 1023) ? 1023 : v;
    endfunction
    // significance before plane k of the neighbour (y,x) seen from row yc
    function bit nsig(int b, int yc, int y, int x, int k);
      if (x < 0 || x >= W || y < 0 || y >= H) return 0;
      if (y / 4 > yc / 4) return 0;   // next stripe not yet seen
      return (mag(b, y, x) >> (k + 1)) != 0;
    endfunction
    function int ncontr(int b, int yc, int y, int x, int k);
      if (!nsig(b, yc, y, x, k)) return 0;
      return (cf[b][y][x] < 0) ? -1 : 1;
    endfunction
    function int zc(int sb, int h, int v, int d);
      int t;
      if (sb == 1) begin t = h; h = v; v = t; end
      if (sb == 3) begin
        if (d >= 3) return 8;
        if (d == 2) return (h + v >= 1) ? 7 : 6;
        if (d == 1) return (h + v >= 2) ? 5 : (h + v == 1) ? 4 : 3;
        return (h + v >= 2) ? 2 : (h + v == 1) ? 1 : 0;
      end
      if (h == 2) return 8;
      if (h == 1) return (v >= 1) ? 7 : (d >= 1) ? 6 : 5;
      if (v == 2) return 4;
      if (v == 1) return 3;
      return (d >= 2) ? 2 : d;
    endfunction
    // all pairs of one sample; returns 1 if the sample is "zero content"
    function bit sample_pairs(int b, int y, int x, int k, ref pair_s q[$]);
      int h, v, d, hc, vc, m;
      bit sg, vp, ref_;
      pair_s p;
      m  = mag(b, y, x);
      sg = (m >> (k + 1)) != 0;
      ref_ = (m >> (k + 2)) != 0;
      vp = (m >> k) & 1;
      h  = nsig(b, y, y, x-1, k) + nsig(b, y, y, x+1, k);
      v  = nsig(b, y, y-1, x, k) + nsig(b, y, y+1, x, k);
      d  = nsig(b, y, y-1, x-1, k) + nsig(b, y, y-1, x+1, k) + nsig(b, y, y+1, x-1, k) + nsig(b, y, y+1, x+1, k);
      hc = ncontr(b, y, y, x-1, k) + ncontr(b, y, y, x+1, k);
      vc = ncontr(b, y, y-1, x, k) + ncontr(b, y, y+1, x, k);
      hc = (hc > 0) ? 1 : (hc < 0) ? -1 : 0;
      vc = (vc > 0) ? 1 : (vc < 0) ? -1 : 0;
      p.d = vp;
      if (sg) begin
        p.pass = 1;
        p.cx = ref_ ? 16 : (h + v + d > 0) ? 15 : 14;
        q.push_back(p);
      end else begin
        int scx, xb;
        p.pass = (h + v + d > 0) ? 0 : 2;
        p.cx = zc(b, h, v, d);
        q.push_back(p);
        if (vp) begin
          // sign context table, indexed by hc and vc
          scx = (hc == 0) ? ((vc == 0) ? 9 : 10) : (vc == 0) ? 12 : (hc == vc) ? 13 : 11;
          xb  = (hc < 0 || (hc == 0 && vc < 0)) ? 1 : 0;
          p.cx = scx;
          p.d  = (cf[b][y][x] < 0) ^ xb;
          q.push_back(p);
        end
      end
      return !sg && !vp && (h + v + d == 0);
    endfunction
    // walk the code-blocks in encoder order and collect the pairs per stream
    function void run();
      foreach (pairs[b, k]) begin pairs[b][k] = {}; skipped[b][k] = 0; end
      for (int s = 0; s < H / 4; s++)
        for (int x = 0; x < W; x++)
          for (int b = 0; b < 4; b++)
            for (int hf = 0; hf < 2; hf++)
              for (int k = 0; k < 10; k++) begin
                pair_s q[$];
                bit z0, z1;
                z0 = sample_pairs(b, 4*s + 2*hf, x, k, q);
                z1 = sample_pairs(b, 4*s + 2*hf + 1, x, k, q);
                if ((z0 && z1) || kill[b][k]) skipped[b][k]++;
                else foreach (q[i]) pairs[b][k].push_back(q[i]);
              end
    endfunction
    function void bytes(int b, int k, output byte unsigned out[$]);
      mq_ref m;
      m = new();
      out = {};
      if (pairs[b][k].size() == 0) return;
      foreach (pairs[b][k][i]) m.encode(pairs[b][k][i].pass, pairs[b][k][i].cx, pairs[b][k][i].d);
      m.flush(out);
    endfunction
  endclass

endpackage
