// Testbench support: configuration image and router for fpga_fabric.
package fabric_image_pkg;
  // Configuration image and single-net router for fpga_fabric testbenches.
  //
  // Holds the configuration of every frame of an NX x NY array and routes
  // nets on the disjoint routing: a net keeps one track number t, so routing
  // is a breadth-first search over channel segments on track t, moving
  // through switch boxes (all side pairs for the full box; for the half box the straight
  // pairs and one turn whose orientation rotates with the track number). Each segment on the path
  // gets its driver select, each switch box the side it takes, and the sink
  // pin its track. frames() lists every frame for the configuration bus.
  // Net endpoint: kind 0 = I/O pad (a = side 0 bottom/1 top/2 left/3 right,
  // b = position, c = pad index); kind 1 = tile pin (a = x, b = y, c = input
  // pin for a sink, output pin 0..3 = O0..O3, 4 = OCA, 5 = OCB for a source).
  typedef struct {
    int kind;
    int a;
    int b;
    int c;
  } ep_t;

  function automatic ep_t pad_ep(int side, int pos, int k);
    ep_t e;
    e.kind = 0; e.a = side; e.b = pos; e.c = k;
    return e;
  endfunction
  function automatic ep_t pin_ep(int x, int y, int p);
    ep_t e;
    e.kind = 1; e.a = x; e.b = y; e.c = p;
    return e;
  endfunction

  class fabric_image;
    localparam int W = fpga_pkg::CHAN_W;
    int nx, ny, iorat;
    bit half;

    fpga_pkg::tile_cfg_t tc [int];
    fpga_pkg::sb_cfg_t   sb [int];
    fpga_pkg::chan_cfg_t cx [int];
    fpga_pkg::chan_cfg_t cy [int];
    fpga_pkg::pad_cfg_t  pad [int];
    int occ [int];          // (segment * 16 + track) -> net
    int n_turns, n_straight, n_routed;
    int seed, mul;          // first-track choice: (net * mul + seed) mod W
    int n_fail;             // nets that found no pad / route
    ep_t io [string];       // pad chosen for each named primary input / output

    function new(int nx_, int ny_, int iorat_, bit half_);
      nx = nx_; ny = ny_; iorat = iorat_; half = half_;
      n_turns = 0; n_straight = 0; n_routed = 0; seed = 0; mul = 1; n_fail = 0;
      for (int x = 1; x <= nx; x++) for (int y = 1; y <= ny; y++) tc[x * 100 + y] = '0;
      for (int x = 0; x <= nx; x++) for (int y = 0; y <= ny; y++) sb[x * 100 + y] = '0;
      for (int x = 1; x <= nx; x++) for (int y = 0; y <= ny; y++) cx[x * 100 + y] = '0;
      for (int x = 0; x <= nx; x++) for (int y = 1; y <= ny; y++) cy[x * 100 + y] = '0;
    endfunction

    // ---- segment ids: kind 0 = horizontal chx(x,y), 1 = vertical chy(x,y)
    static function int seg(int kind, int x, int y);
      return kind * 100000 + x * 100 + y;
    endfunction
    static function int skind(int s); return s / 100000; endfunction
    static function int sx(int s);    return (s % 100000) / 100; endfunction
    static function int sy(int s);    return s % 100; endfunction

    // Segment on side `side` of switch box (x,y), or -1.
    function int sb_seg(int x, int y, int side);
      case (side)
        0: return (x >= 1) ? seg(0, x, y) : -1;
        1: return (y < ny) ? seg(1, x, y + 1) : -1;
        2: return (x < nx) ? seg(0, x + 1, y) : -1;
        default: return (y >= 1) ? seg(1, x, y) : -1;
      endcase
    endfunction

    // End e (1 low, 2 high) of a segment: switch box key and the segment's side there.
    function void seg_end(int s, int e, output int sbx, output int sby, output int side);
      if (skind(s) == 0) begin
        sby = sy(s);
        if (e == 1) begin sbx = sx(s) - 1; side = 2; end
        else        begin sbx = sx(s);     side = 0; end
      end else begin
        sbx = sx(s);
        if (e == 1) begin sby = sy(s) - 1; side = 1; end
        else        begin sby = sy(s);     side = 3; end
      end
    endfunction

    // Switch present between sides a and b on track t (half box: straight
    // pairs plus one turn, rotated by 90 degrees from track to track).
    function bit pair_ok(int a, int b, int t);
      int r, ra, rb;
      if (!half) return 1;
      r = t % 4;
      ra = (a - r + 4) % 4;
      rb = (b - r + 4) % 4;
      return (ra == 0 && rb == 2) || (ra == 2 && rb == 0) || (ra == 1 && rb == 3) ||
             (ra == 3 && rb == 1) || (ra == 2 && rb == 3) || (ra == 3 && rb == 2);
    endfunction

    function int pin_seg(int x, int y, int p);
      case (fpga_pkg::ipin_side(p))
        fpga_pkg::S_TOP:    return seg(0, x, y);
        fpga_pkg::S_BOTTOM: return seg(0, x, y - 1);
        fpga_pkg::S_RIGHT:  return seg(1, x, y);
        default:            return seg(1, x - 1, y);
      endcase
    endfunction

    // Output pin o: 0..3 = O0..O3, 4 = OCA, 5 = OCB. Returns segment and driver index.
    function int opin_seg(int x, int y, int o, output int idx);
      case (o)
        0: begin idx = 0; return seg(0, x, y); end
        2: begin idx = 1; return seg(0, x, y - 1); end
        1: begin idx = 0; return seg(1, x, y); end
        5: begin idx = 1; return seg(1, x, y); end
        3: begin idx = 2; return seg(1, x - 1, y); end
        default: begin idx = 3; return seg(1, x - 1, y); end
      endcase
    endfunction

    // Pad side: 0 bottom, 1 top, 2 left, 3 right.
    function int pad_seg(int side, int pos, int k, output int idx);
      case (side)
        0: begin idx = 2 + k; return seg(0, pos, 0); end
        1: begin idx = 2 + k; return seg(0, pos, ny); end
        2: begin idx = 4 + k; return seg(1, 0, pos); end
        default: begin idx = 4 + k; return seg(1, nx, pos); end
      endcase
    endfunction
    static function int pad_key(int side, int pos, int k);
      return side * 100000 + pos * 100 + k;
    endfunction

    function void set_driver(int s, int t, int code);
      int key;
      key = sx(s) * 100 + sy(s);
      if (skind(s) == 0) cx[key][t] = fpga_pkg::TD_SELW'(code);
      else               cy[key][t] = fpga_pkg::TD_SELW'(code);
    endfunction

    // Route from the segment `src` (already driven, net `net`, track t) to
    // segment `dst` on track t. Returns 0 if no path exists.
    function bit bfs(int net, int t, int dst);
      int q[$];
      int par [int];
      int par_sbx [int], par_sby [int], par_sp [int], par_sc [int], par_end [int];
      foreach (occ[k]) if (occ[k] == net && (k % 16) == t) begin
        q.push_back(k / 16);
        par[k / 16] = -1;
      end
      while (q.size() > 0) begin
        int cur;
        cur = q.pop_front();
        if (cur == dst) break;
        for (int e = 1; e <= 2; e++) begin
          int bx, by, sc;
          seg_end(cur, e, bx, by, sc);
          if (bx < 0 || by < 0 || bx > nx || by > ny) continue;
          for (int s2 = 0; s2 < 4; s2++) begin
            int n;
            if (s2 == sc || !pair_ok(sc, s2, t)) continue;
            n = sb_seg(bx, by, s2);
            if (n < 0 || par.exists(n)) continue;
            if (occ.exists(n * 16 + t)) continue;
            par[n] = cur; par_sbx[n] = bx; par_sby[n] = by; par_sp[n] = sc; par_sc[n] = s2;
            q.push_back(n);
          end
        end
      end
      if (!par.exists(dst)) return 0;
      // trace back, configuring drivers and switch boxes
      for (int c = dst; par[c] != -1; c = par[c]) begin
        int bx, by, sp, scur, key, lo_x, lo_y, lo_side, code;
        bx = par_sbx[c]; by = par_sby[c]; sp = par_sp[c]; scur = par_sc[c];
        key = bx * 100 + by;
        sb[key][scur][t] = 2'((sp - scur + 4) % 4);
        seg_end(c, 1, lo_x, lo_y, lo_side);
        code = (lo_x == bx && lo_y == by) ? 1 : 2;
        set_driver(c, t, code);
        occ[c * 16 + t] = net;
        if (skind(c) == skind(par[c])) n_straight++;
        else n_turns++;
      end
      return 1;
    endfunction

    // Route a net from source segment `src` (driver index `sidx`) to the sink
    // segments; returns the track used, or -1.
    function int route(int net, int src, int sidx, int sinks[$]);
      int save_occ [int];
      fpga_pkg::sb_cfg_t save_sb [int];
      fpga_pkg::chan_cfg_t save_cx [int], save_cy [int];
      int n0;
      save_occ = occ; save_sb = sb; save_cx = cx; save_cy = cy; n0 = n_turns;
      for (int tt = 0; tt < W; tt++) begin
        int t;
        bit ok;
        int ns;
        t = (tt + net * mul + seed) % W;
        if (occ.exists(src * 16 + t)) continue;
        ok = 1;
        occ[src * 16 + t] = net;
        set_driver(src, t, 3 + sidx);
        foreach (sinks[i]) if (!bfs(net, t, sinks[i])) begin ok = 0; break; end
        if (ok) begin n_routed++; return t; end
        occ = save_occ; sb = save_sb; cx = save_cx; cy = save_cy;
        ns = 0;
      end
      return -1;
    endfunction

    // Connect source endpoint to sink endpoints; out_reg registers output pads.
    function int connect(int net, ep_t src, ep_t sinks[$], bit out_reg = 0);
      int s, idx, t;
      int segs[$];
      if (src.kind == 0) begin
        s = pad_seg(src.a, src.b, src.c, idx);
        pad[pad_key(src.a, src.b, src.c)] = '{mode: fpga_pkg::PAD_IN, reg_en: 1'b0, track: '0};
      end else begin
        s = opin_seg(src.a, src.b, src.c, idx);
      end
      foreach (sinks[i]) begin
        int d;
        if (sinks[i].kind == 0) segs.push_back(pad_seg(sinks[i].a, sinks[i].b, sinks[i].c, d));
        else                    segs.push_back(pin_seg(sinks[i].a, sinks[i].b, sinks[i].c));
      end
      t = route(net, s, idx, segs);
      if (t < 0) return t;
      foreach (sinks[i]) begin
        if (sinks[i].kind == 0)
          pad[pad_key(sinks[i].a, sinks[i].b, sinks[i].c)] =
            '{mode: fpga_pkg::PAD_OUT, reg_en: out_reg, track: fpga_pkg::TRK_SELW'(t)};
        else
          tc[sinks[i].a * 100 + sinks[i].b].ipin_sel[sinks[i].c] = fpga_pkg::IPIN_SELW'(2 + t);
      end
      return t;
    endfunction

    // Unused pad number n (sides in the order bottom, top, left, right).
    function bit nth_pad(int n, output ep_t e);
      int per_x, per_y;
      per_x = nx * iorat; per_y = ny * iorat;
      if (n < 2 * per_x) e = pad_ep(n / per_x, 1 + (n % per_x) / iorat, n % iorat);
      else begin
        n -= 2 * per_x;
        e = pad_ep(2 + n / per_y, 1 + (n % per_y) / iorat, n % iorat);
      end
      return !pad.exists(pad_key(e.a, e.b, e.c));
    endfunction

    // Route primary input `name` from the first free pad (searched from a
    // net-dependent start) that reaches all sinks.
    function void auto_in(int net, string name, ep_t sinks[$]);
      int tot;
      tot = 2 * (nx + ny) * iorat;
      for (int i = 0; i < tot; i++) begin
        ep_t e;
        if (!nth_pad((i + net * 7 + seed) % tot, e)) continue;
        if (connect(net, e, sinks) >= 0) begin io[name] = e; return; end
        pad.delete(pad_key(e.a, e.b, e.c));
      end
      n_fail++;
    endfunction

    // Route output pin `src` to the first free pad it reaches.
    function void auto_out(int net, string name, ep_t src, bit out_reg = 0);
      int tot;
      tot = 2 * (nx + ny) * iorat;
      for (int i = 0; i < tot; i++) begin
        ep_t e;
        ep_t sk[$];
        if (!nth_pad((i + net * 7 + seed) % tot, e)) continue;
        sk = {e};
        if (connect(net, src, sk, out_reg) >= 0) begin io[name] = e; return; end
      end
      n_fail++;
    endfunction

    // Frame contents of the pad position (side, pos).
    function logic [fpga_pkg::CFG_W-1:0] pad_frame(int side, int pos);
      logic [fpga_pkg::CFG_W-1:0] d;
      d = '0;
      for (int k = 0; k < iorat; k++)
        if (pad.exists(pad_key(side, pos, k)))
          d[k * $bits(fpga_pkg::pad_cfg_t) +: $bits(fpga_pkg::pad_cfg_t)] = pad[pad_key(side, pos, k)];
      return d;
    endfunction

    // Every frame of the image as (address, data) pairs.
    function void frames(ref int addrs[$], ref logic [fpga_pkg::CFG_W-1:0] datas[$]);
      addrs.delete(); datas.delete();
      for (int x = 1; x <= nx; x++) for (int y = 1; y <= ny; y++) begin
        addrs.push_back(fpga_pkg::addr_clb(nx, ny, x, y)); datas.push_back(fpga_pkg::CFG_W'(tc[x * 100 + y]));
      end
      for (int x = 0; x <= nx; x++) for (int y = 0; y <= ny; y++) begin
        addrs.push_back(fpga_pkg::addr_sb(nx, ny, x, y)); datas.push_back(fpga_pkg::CFG_W'(sb[x * 100 + y]));
      end
      for (int x = 1; x <= nx; x++) for (int y = 0; y <= ny; y++) begin
        addrs.push_back(fpga_pkg::addr_chx(nx, ny, x, y)); datas.push_back(fpga_pkg::CFG_W'(cx[x * 100 + y]));
      end
      for (int x = 0; x <= nx; x++) for (int y = 1; y <= ny; y++) begin
        addrs.push_back(fpga_pkg::addr_chy(nx, ny, x, y)); datas.push_back(fpga_pkg::CFG_W'(cy[x * 100 + y]));
      end
      for (int side = 0; side < 4; side++)
        for (int pos = 1; pos <= ((side < 2) ? nx : ny); pos++) begin
          addrs.push_back(fpga_pkg::addr_pad(nx, ny, side, pos)); datas.push_back(pad_frame(side, pos));
        end
    endfunction
  endclass
endpackage
