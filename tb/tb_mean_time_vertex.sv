// tb_mean_time_vertex: NCH = 4 (NTC) with random TDC values, some outside the
// validity window; the mean per side (integer quotient of the valid sum by the
// valid count), the vertex difference, the window test and the prim bits are
// recomputed here and compared 3 clocks after each input (pipelined, one new
// crossing per clock). A second instance with NCH = 1 (ZDC) is checked too.
module tb_mean_time_vertex;
  localparam int TW = 12;
  logic clk = 0, rst_n = 0;
  logic [4*TW-1:0] ts = '0, tn = '0;
  logic [TW-1:0] zs = '0, zn = '0;
  logic [TW-1:0] tdc_lo = 12'd100, tdc_hi = 12'd4000;
  logic signed [TW:0] vtx_lo = -13'sd300, vtx_hi = 13'sd250;
  logic [TW-1:0] ms, mn, zms, zmn;
  logic signed [TW:0] vtx, zvtx;
  logic [3:0] prim, zprim;
  int checks = 0, failures = 0;

  mean_time_vertex #(.NCH(4), .TDC_W(TW)) dut (
    .clk, .rst_n, .tdc_s(ts), .tdc_n(tn), .tdc_lo, .tdc_hi, .vtx_lo, .vtx_hi,
    .mean_s(ms), .mean_n(mn), .vertex(vtx), .prim);
  mean_time_vertex #(.NCH(1), .TDC_W(TW)) dut_zdc (
    .clk, .rst_n, .tdc_s(zs), .tdc_n(zn), .tdc_lo, .tdc_hi, .vtx_lo, .vtx_hi,
    .mean_s(zms), .mean_n(zmn), .vertex(zvtx), .prim(zprim));
  always #5 clk = ~clk;

  typedef struct { int ms, mn, vtx; bit vs, vn, ok; } exp_t;

  function automatic exp_t model(logic [4*TW-1:0] s, logic [4*TW-1:0] n, int nch);
    exp_t e;
    int ss = 0, cs = 0, sn = 0, cn = 0;
    for (int c = 0; c < nch; c++) begin
      int a = int'(s[c*TW +: TW]), b = int'(n[c*TW +: TW]);
      if (a >= tdc_lo && a <= tdc_hi) begin ss += a; cs++; end
      if (b >= tdc_lo && b <= tdc_hi) begin sn += b; cn++; end
    end
    e.ms = cs ? ss / cs : 0;
    e.mn = cn ? sn / cn : 0;
    e.vs = cs != 0; e.vn = cn != 0;
    e.vtx = e.ms - e.mn;
    e.ok = e.vs && e.vn && e.vtx >= vtx_lo && e.vtx <= vtx_hi;
    return e;
  endfunction

  exp_t q [$], qz [$];
  int  seen_vs_only = 0, seen_ok = 0, seen_out = 0;

  function automatic logic [TW-1:0] rnd_tdc();
    int r = $urandom % 10;
    if (r == 0) return 12'd0;           // no hit
    if (r == 1) return 12'hfff;         // overflow
    return TW'(1800 + ($urandom % 600));
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 1002; cyc++) begin
      if (cyc < 1000) begin
        for (int c = 0; c < 4; c++) begin
          ts[c*TW +: TW] = rnd_tdc();
          tn[c*TW +: TW] = rnd_tdc();
        end
        zs = rnd_tdc(); zn = rnd_tdc();
        q.push_back(model(ts, tn, 4));
        qz.push_back(model({36'd0, zs}, {36'd0, zn}, 1));
      end
      @(negedge clk);
      if (cyc >= 2) begin
        exp_t e, ez;
        e = q.pop_front(); ez = qz.pop_front();
        checks += 2;
        if (ms != TW'(e.ms) || mn != TW'(e.mn) || vtx != (TW+1)'(e.vtx) ||
            prim !== {e.ok, e.vs && e.vn, e.vn, e.vs}) begin
          failures++; $display("FAIL ntc cyc %0d: ms %0d/%0d mn %0d/%0d vtx %0d/%0d prim %b", cyc, ms, e.ms, mn, e.mn, vtx, e.vtx, prim);
        end
        if (zms != TW'(ez.ms) || zmn != TW'(ez.mn) || zprim !== {ez.ok, ez.vs && ez.vn, ez.vn, ez.vs}) begin
          failures++; $display("FAIL zdc cyc %0d", cyc);
        end
        if (e.ok) seen_ok++;
        if (e.vs && e.vn && !e.ok) seen_out++;
      end
    end
    checks++; if (seen_ok == 0 || seen_out == 0) begin failures++; $display("FAIL window cases not covered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
