// tb_muid_symset: directed roads (straight track through all gaps, track with a
// skipped gap, track stopping after gap 2, track scattered to the edge of the
// window, track scattered outside it) and random patterns, compared with a
// reference written independently: for every symset, every gap, the window
// i-HALFW..i+HALFW is searched, the deepest hit gap and the hit count are
// formed and the deep and shallow criteria applied.
module tb_muid_symset;
  import ll1_pkg::*;
  localparam int GAPS = 5, NLT = 24;
  localparam int HW [5] = '{0, 1, 1, 2, 2};
  logic clk = 0, rst_n = 0;
  logic [GAPS*NLT-1:0] ltube = '0;
  symset_crit_t crit_deep, crit_shallow;
  logic [NLT-1:0] deep_hit, shallow_hit;
  int checks = 0, failures = 0;

  muid_symset #(.GAPS(GAPS), .NLT(NLT)) dut (.*);
  always #5 clk = ~clk;

  function automatic bit ref_pass(logic [GAPS*NLT-1:0] lt, int i, int dmin, int hmin, int smax);
    int depth = 0, hits = 0;
    for (int g = 0; g < GAPS; g++) begin
      bit h = 0;
      for (int t = i - HW[g]; t <= i + HW[g]; t++)
        if (t >= 0 && t < NLT && lt[g*NLT + t]) h = 1;
      if (h) begin depth = g + 1; hits++; end
    end
    return depth >= dmin && hits >= hmin && (depth - hits) <= smax;
  endfunction

  task automatic apply_and_check(logic [GAPS*NLT-1:0] lt, string what);
    ltube = lt;
    @(negedge clk);
    for (int i = 0; i < NLT; i++) begin
      bit ed, es;
      ed = ref_pass(lt, i, crit_deep.depth_min, crit_deep.hits_min, crit_deep.skip_max);
      es = ref_pass(lt, i, crit_shallow.depth_min, crit_shallow.hits_min, crit_shallow.skip_max);
      checks += 2;
      if (deep_hit[i] !== ed || shallow_hit[i] !== es) begin
        failures++; $display("FAIL %s symset %0d deep %b/%b shallow %b/%b", what, i, deep_hit[i], ed, shallow_hit[i], es);
      end
    end
  endtask

  function automatic logic [GAPS*NLT-1:0] road(int i, int off0, int off1, int off2, int off3, int off4, int skip_gap, int last_gap);
    logic [GAPS*NLT-1:0] lt = '0;
    int off [5];
    off = '{off0, off1, off2, off3, off4};
    for (int g = 0; g < GAPS; g++)
      if (g != skip_gap && g <= last_gap) lt[g*NLT + i + off[g]] = 1'b1;
    return lt;
  endfunction

  initial begin
    crit_deep    = '{depth_min: 4'd4, hits_min: 4'd3, skip_max: 4'd1};
    crit_shallow = '{depth_min: 4'd2, hits_min: 4'd2, skip_max: 4'd1};
    repeat (2) @(negedge clk);
    rst_n = 1;
    apply_and_check(road(10, 0, 0, 0, 0, 0, -1, 4), "straight");
    checks++; if (!deep_hit[10]) begin failures++; $display("FAIL straight track not deep"); end
    apply_and_check(road(10, 0, 1, 0, 0, 0, 2, 4), "skipped gap");
    checks++; if (!deep_hit[10]) begin failures++; $display("FAIL skipped-gap track not deep"); end
    apply_and_check(road(10, 0, 0, 0, 0, 0, -1, 1), "shallow");
    checks++; if (deep_hit[10] || !shallow_hit[10]) begin failures++; $display("FAIL shallow track"); end
    apply_and_check(road(10, 0, -1, 1, 2, -2, -1, 4), "edge of window");
    checks++; if (!deep_hit[10]) begin failures++; $display("FAIL scattered track not deep"); end
    apply_and_check(road(10, 0, 0, 0, 3, 3, -1, 4), "outside window");
    apply_and_check(road(0, 0, 0, 0, 1, 2, -1, 4), "low edge");
    apply_and_check(road(NLT - 1, 0, 0, 0, -2, 0, -1, 4), "high edge");
    repeat (300) begin
      logic [GAPS*NLT-1:0] lt;
      for (int b = 0; b < GAPS*NLT; b++) lt[b] = ($urandom % 12) == 0;
      if ($urandom % 3 == 0) begin
        crit_deep    = '{depth_min: 4'($urandom % 6), hits_min: 4'($urandom % 6), skip_max: 4'($urandom % 3)};
        crit_shallow = '{depth_min: 4'($urandom % 6), hits_min: 4'($urandom % 6), skip_max: 4'($urandom % 3)};
      end
      apply_and_check(lt, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
