// muid_prim: reduces the symset hit maps of a MuID board to the few trigger
// primitive bits sent to the Global Level-1.
//
// Because neighbouring symsets share tubes, one muon usually fires a run of
// adjacent symsets. The module therefore counts clusters (runs of adjacent hit
// symsets) separately for the deep and the shallow map, and sends each count
// saturated at 3: prim = {deep_count[1:0], shallow_count[1:0]}. The unsaturated
// counts are also given for monitoring.
// Timing: registered, one beam clock.
// The source says only that the LL1 boards send reduced-bit data to the GL1;
// the cluster counting and the 4-bit format are this design's choices.
module muid_prim #(
  parameter int unsigned NLT = 128
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NLT-1:0]         deep_hit,
  input  logic [NLT-1:0]         shallow_hit,
  output logic [3:0]             prim,
  output logic [$clog2(NLT):0]   deep_clusters,
  output logic [$clog2(NLT):0]   shallow_clusters
);
  localparam int unsigned CW = $clog2(NLT) + 1;

  function automatic logic [CW-1:0] clusters(logic [NLT-1:0] h);
    logic [CW-1:0] n;
    n = '0;
    for (int i = 0; i < NLT; i++)
      if (h[i] && (i == 0 || !h[i-1])) n = n + 1'b1;
    return n;
  endfunction

  function automatic logic [1:0] sat3(logic [CW-1:0] n);
    return (n > CW'(3)) ? 2'd3 : n[1:0];
  endfunction

  logic [CW-1:0] dn, sn;
  assign dn = clusters(deep_hit);
  assign sn = clusters(shallow_hit);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prim             <= '0;
      deep_clusters    <= '0;
      shallow_clusters <= '0;
    end else begin
      prim             <= {sat3(dn), sat3(sn)};
      deep_clusters    <= dn;
      shallow_clusters <= sn;
    end
  end

endmodule
