// tb_muid_prim: directed and random symset maps; the cluster counts must equal
// the number of runs of adjacent set bits (counted here by scanning the map
// for run starts) and prim must carry both counts saturated at 3.
module tb_muid_prim;
  localparam int NLT = 32;
  logic clk = 0, rst_n = 0;
  logic [NLT-1:0] deep_hit = '0, shallow_hit = '0;
  logic [3:0] prim;
  logic [5:0] deep_clusters, shallow_clusters;
  int checks = 0, failures = 0;

  muid_prim #(.NLT(NLT)) dut (.*);
  always #5 clk = ~clk;

  function automatic int runs(logic [NLT-1:0] h);
    int n = 0;
    bit prev = 0;
    for (int i = 0; i < NLT; i++) begin
      if (h[i] && !prev) n++;
      prev = h[i];
    end
    return n;
  endfunction

  task automatic apply(logic [NLT-1:0] d, logic [NLT-1:0] s);
    int rd, rs;
    deep_hit = d; shallow_hit = s;
    @(negedge clk);
    rd = runs(d); rs = runs(s);
    checks += 3;
    if (deep_clusters != 6'(rd)) begin failures++; $display("FAIL deep %0d exp %0d", deep_clusters, rd); end
    if (shallow_clusters != 6'(rs)) begin failures++; $display("FAIL shallow %0d exp %0d", shallow_clusters, rs); end
    if (prim !== {2'(rd > 3 ? 3 : rd), 2'(rs > 3 ? 3 : rs)}) begin failures++; $display("FAIL prim %b", prim); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    apply('0, '0);
    apply(32'h0000_0007, 32'h0000_0001);        // one cluster of three symsets
    apply(32'h8000_0001, 32'h0000_0000);        // two clusters at the edges
    apply(32'h5555_5555, 32'hffff_ffff);        // 16 clusters (saturates), one wide
    repeat (300) apply($urandom & $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
