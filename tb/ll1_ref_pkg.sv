// ll1_ref_pkg: reference models used by the board and crate testbenches.
// They recompute, from the fiber data of one crossing, what the trigger
// outputs must be, written directly from the rules (OR across panels, symset
// windows 0,1,1,2,2, deep and shallow criteria, run counting, valid-TDC mean
// time and vertex window) and not from the RTL structure. They also build
// events: MuID tracks placed on logical tube roads in random panels, noise,
// and NTC/ZDC TDC words.
package ll1_ref_pkg;
  localparam int GAPS = 5, NLT = 128, NOR = 3;
  localparam int MU_W = 1920;
  localparam int NZ_W = 320;
  localparam int HW [5] = '{0, 1, 1, 2, 2};

  typedef logic [MU_W-1:0] mu_word_t;
  typedef logic [NZ_W-1:0] nz_word_t;

  typedef struct {
    int dmin, hmin, smax;
  } crit_t;

  typedef struct {
    logic [NLT-1:0] deep, shallow;
    int             nd, ns;
    logic [3:0]     prim;
  } mu_res_t;

  function automatic int phys_bit(int g, int k, int t);
    return g * NOR * NLT + k * NLT + t;
  endfunction

  function automatic bit crit_ok(bit gh [5], crit_t c);
    int depth = 0, hits = 0;
    for (int g = 0; g < GAPS; g++) if (gh[g]) begin depth = g + 1; hits++; end
    return depth >= c.dmin && hits >= c.hmin && depth - hits <= c.smax;
  endfunction

  function automatic mu_res_t mu_eval(mu_word_t d, crit_t cd, crit_t cs);
    mu_res_t r;
    bit lt [5][NLT];
    for (int g = 0; g < GAPS; g++)
      for (int t = 0; t < NLT; t++) begin
        lt[g][t] = 0;
        for (int k = 0; k < NOR; k++) if (d[phys_bit(g, k, t)]) lt[g][t] = 1;
      end
    r.nd = 0; r.ns = 0;
    for (int i = 0; i < NLT; i++) begin
      bit gh [5];
      for (int g = 0; g < GAPS; g++) begin
        gh[g] = 0;
        for (int t = i - HW[g]; t <= i + HW[g]; t++) if (t >= 0 && t < NLT && lt[g][t]) gh[g] = 1;
      end
      r.deep[i]    = crit_ok(gh, cd);
      r.shallow[i] = crit_ok(gh, cs);
      if (r.deep[i] && (i == 0 || !r.deep[i-1])) r.nd++;
      if (r.shallow[i] && (i == 0 || !r.shallow[i-1])) r.ns++;
    end
    r.prim = {2'(r.nd > 3 ? 3 : r.nd), 2'(r.ns > 3 ? 3 : r.ns)};
    return r;
  endfunction

  // a track on the road of symset i reaching gap last_gap (0-based), with a
  // skipped gap (skip < 0: none) and a scattering offset within the windows
  function automatic mu_word_t add_track(mu_word_t d, int i, int last_gap, int skip, bit scatter);
    for (int g = 0; g <= last_gap; g++) begin
      int t = i;
      if (g == skip) continue;
      if (scatter && HW[g] > 0) t = i + (($urandom % (2 * HW[g] + 1)) - HW[g]);
      if (t < 0) t = 0;
      if (t > NLT - 1) t = NLT - 1;
      d[phys_bit(g, $urandom % NOR, t)] = 1'b1;
    end
    return d;
  endfunction

  // kind 0: one straight deep track; 1: deep track with a skipped gap and
  // scattering; 2: shallow track (gaps 1-2); 3: two deep tracks and noise;
  // 4: empty
  function automatic mu_word_t mu_event(int kind);
    mu_word_t d = '0;
    int i = 4 + $urandom % (NLT - 8);
    case (kind)
      0: d = add_track(d, i, 4, -1, 0);
      1: d = add_track(d, i, 4, 1 + $urandom % 3, 1);
      2: d = add_track(d, i, 1, -1, 0);
      3: begin
        d = add_track(d, i, 4, -1, 1);
        d = add_track(d, (i + 40) % (NLT - 8) + 4, 4, -1, 1);
        for (int n = 0; n < 6; n++) d[$urandom % MU_W] = 1'b1;
      end
      default: ;
    endcase
    return d;
  endfunction

  // ---------------- NTC / ZDC ----------------
  typedef struct {
    int tlo, thi, vlo, vhi;
  } win_t;

  function automatic logic [11:0] tdc_of(nz_word_t d, int f, int q);
    return d[(f * 4 + q) * 16 +: 12];
  endfunction

  function automatic logic [3:0] mtv(int s [], int n [], win_t w);
    int ss = 0, cs = 0, sn = 0, cn = 0, ms, mn, v;
    foreach (s[c]) if (s[c] >= w.tlo && s[c] <= w.thi) begin ss += s[c]; cs++; end
    foreach (n[c]) if (n[c] >= w.tlo && n[c] <= w.thi) begin sn += n[c]; cn++; end
    ms = (cs != 0) ? ss / cs : 0;
    mn = (cn != 0) ? sn / cn : 0;
    v  = ms - mn;
    return {cs != 0 && cn != 0 && v >= w.vlo && v <= w.vhi, cs != 0 && cn != 0, cn != 0, cs != 0};
  endfunction

  function automatic logic [7:0] nz_eval(nz_word_t d, win_t wn, win_t wz);
    int s [] = new[4];
    int n [] = new[4];
    int zs [] = new[1];
    int zn [] = new[1];
    for (int q = 0; q < 4; q++) begin
      s[q] = int'(tdc_of(d, q / 2, q % 2));
      n[q] = int'(tdc_of(d, 2 + q / 2, q % 2));
    end
    zs[0] = int'(tdc_of(d, 4, 0));
    zn[0] = int'(tdc_of(d, 4, 1));
    return {mtv(zs, zn, wz), mtv(s, n, wn)};
  endfunction

  // TDC words around t0 with a random vertex shift; some channels empty (0)
  function automatic nz_word_t nz_event(int shift);
    nz_word_t d = '0;
    for (int f = 0; f < 5; f++)
      for (int q = 0; q < 4; q++) begin
        int base = (f == 4) ? 2000 : 1500;
        int side = (f == 4) ? q : (f / 2);
        int v = base + (side == 0 ? shift : -shift) + int'($urandom % 40);
        if ($urandom % 8 == 0) v = 0;
        d[(f * 4 + q) * 16 +: 16] = 16'(v);
      end
    return d;
  endfunction
endpackage
