// demosaic_ref_pkg: behavioural reference model of the colour interpolation
// for the end-to-end testbenches. It works on a whole frame held in memory
// and addresses it with mirrored coordinates (row -1 -> 1, column W -> W-2),
// so it needs no window, line buffers or pipeline. Every equation is
// evaluated in floating point with its original fractional weights, rounded
// down and saturated to 0..255.
package demosaic_ref_pkg;

  class demosaic_ref;
    int unsigned w, h, thr;
    bit          edge_en;
    byte unsigned img [];
    // statistics gathered by the last call of expected()
    int mode_used;        // 0 none, 1 horizontal, 2 vertical (R/B sites)
    bit saturated;

    function new(int unsigned w_, int unsigned h_, int unsigned thr_);
      w = w_; h = h_; thr = thr_; edge_en = 1;
      img = new[w * h];
    endfunction

    function int mr(int r);
      if (r < 0) return -r;
      if (r >= int'(h)) return 2 * (int'(h) - 1) - r;
      return r;
    endfunction

    function int mc(int c);
      if (c < 0) return -c;
      if (c >= int'(w)) return 2 * (int'(w) - 1) - c;
      return c;
    endfunction

    function real p(int r, int c);
      int idx;
      idx = mr(r) * int'(w) + mc(c);
      return real'(img[idx]);
    endfunction

    function int sat(real v);
      int x = int'($floor(v));
      if (x < 0)   begin saturated = 1; return 0;   end
      if (x > 255) begin saturated = 1; return 255; end
      return x;
    endfunction

    function real fabs(real v);
      return (v < 0.0) ? -v : v;
    endfunction

    // 0 none, 1 horizontal, 2 vertical
    function int mode_at(int i, int j);
      real dv, dh;
      dv = fabs(p(i-1,j-1) - p(i+1,j-1)) + fabs(p(i-1,j) - p(i+1,j)) + fabs(p(i-1,j+1) - p(i+1,j+1));
      dh = fabs(p(i+1,j+1) - p(i+1,j-1)) + fabs(p(i,j+1) - p(i,j-1)) + fabs(p(i-1,j+1) - p(i-1,j-1));
      if (!edge_en || (dh + dv) <= real'(thr)) return 0;
      if (dh < dv) return 1;
      if (dh > dv) return 2;
      return 0;
    endfunction

    // interpolated green at an R/B site
    function int g_at(int i, int j);
      real hh, vv, lap;
      i = mr(i); j = mc(j);
      hh  = p(i,j-1) + p(i,j+1);
      vv  = p(i-1,j) + p(i+1,j);
      lap = 2.0 * p(i,j) - p(i,j-2) - p(i,j+2);
      case (mode_at(i, j))
        0: return sat(3.0/8.0 * hh + 1.0/8.0 * vv + 1.0/4.0 * lap);
        1: return sat(1.0/2.0 * hh + 1.0/4.0 * lap);
        default: return sat(1.0/8.0 * hh + 3.0/8.0 * vv + 1.0/8.0 * lap);
      endcase
    endfunction

    // expected {r,g,b} at (i,j); B at (even,even), R at (odd,odd)
    function bit [23:0] expected(int i, int j);
      int rv, gv, bv, m, other;
      bit [23:0] res;
      real d, vv, hh, gc;
      saturated = 0;
      mode_used = -1;
      if ((i % 2) == (j % 2)) begin
        // R or B site
        m  = mode_at(i, j);
        mode_used = m;
        gv = g_at(i, j);
        gc = real'(gv);
        d  = p(i-1,j-1) + p(i-1,j+1) + p(i+1,j-1) + p(i+1,j+1);
        vv = p(i-1,j) + p(i+1,j);
        hh = p(i,j-1) + p(i,j+1);
        case (m)
          0: other = sat(d / 4.0 + gc - (vv + hh) / 4.0);
          1: other = sat(d / 4.0 + gc - (3.0 * vv + hh) / 8.0);
          default: other = sat(d / 4.0 + gc - (vv + 3.0 * hh) / 8.0);
        endcase
        if (i % 2 == 0) begin bv = int'(p(i,j)); rv = other; end
        else            begin rv = int'(p(i,j)); bv = other; end
      end else begin
        int vert, horz, gl, gr;
        gl = g_at(i, j-1);
        gr = g_at(i, j+1);
        vert = sat((p(i-1,j) + p(i+1,j)) / 2.0 + p(i,j) / 2.0
                   - (p(i-1,j-1) + p(i-1,j+1) + p(i+1,j-1) + p(i+1,j+1)) / 8.0);
        horz = sat((p(i,j-1) + p(i,j+1)) / 2.0 + p(i,j)
                   - (real'(gl) + real'(gr)) / 2.0);
        gv = int'(p(i,j));
        // even row: row neighbours blue, column neighbours red
        if (i % 2 == 0) begin bv = horz; rv = vert; end
        else            begin rv = horz; bv = vert; end
      end
      res = 24'((rv << 16) + (gv << 8) + bv);
      return res;
    endfunction
  endclass

endpackage
