// muid_symset: symset (road) hit logic of the MuID Local Level-1 trigger.
//
// Logical tubes are numbered so that tubes on the same projective line from
// the interaction point (same dx/dz or dy/dz) carry the same index in every
// gap. Symset i is the road starting at gap-1 tube i; in gap g it contains the
// tubes i-HALFW[g] .. i+HALFW[g] (clipped at the edges), the window growing
// with depth to allow for multiple scattering in the steel. Neighbouring
// symsets share tubes.
// A gap of a symset is "hit" when any tube of its window is hit. The symset is
// evaluated against two criteria in parallel (ll1_pkg::symset_crit_t), one for
// deep (penetrating) and one for shallow roads: depth = number of the deepest
// hit gap, hits = number of hit gaps, skipped = depth - hits; the symset
// passes when depth >= depth_min, hits >= hits_min and skipped <= skip_max.
// Timing: registered, one beam clock.
// Roads indexed by gap-1 tube, broadening, skipped gaps and parallel deep and
// shallow criteria follow the source description; the window widths and the
// form of the criterion are this design's choices.
module muid_symset
  import ll1_pkg::*;
#(
  parameter int unsigned GAPS = 5,
  parameter int unsigned NLT  = 128,
  parameter int unsigned HALFW [GAPS] = '{0, 1, 1, 2, 2}
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [GAPS*NLT-1:0]  ltube,     // bit g*NLT + t: gap g+1, tube t
  input  symset_crit_t         crit_deep,
  input  symset_crit_t         crit_shallow,
  output logic [NLT-1:0]       deep_hit,
  output logic [NLT-1:0]       shallow_hit
);
  logic [GAPS-1:0] gap_hit [NLT];
  logic [NLT-1:0]  deep_d, shallow_d;

  function automatic logic pass(logic [GAPS-1:0] gh, symset_crit_t c);
    logic [3:0] depth, hits;
    depth = '0;
    hits  = '0;
    for (int g = 0; g < GAPS; g++) begin
      if (gh[g]) begin
        depth = 4'(g + 1);
        hits  = hits + 1'b1;
      end
    end
    return (depth >= c.depth_min) && (hits >= c.hits_min) &&
           ((depth - hits) <= c.skip_max);
  endfunction

  for (genvar i = 0; i < NLT; i++) begin : g_symset
    for (genvar g = 0; g < GAPS; g++) begin : g_gap
      localparam int LO = (i - int'(HALFW[g]) < 0) ? 0 : i - int'(HALFW[g]);
      localparam int HI = (i + int'(HALFW[g]) > int'(NLT) - 1) ? int'(NLT) - 1 : i + int'(HALFW[g]);
      assign gap_hit[i][g] = |ltube[g*NLT + HI : g*NLT + LO];
    end
    assign deep_d[i]    = pass(gap_hit[i], crit_deep);
    assign shallow_d[i] = pass(gap_hit[i], crit_shallow);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      deep_hit    <= '0;
      shallow_hit <= '0;
    end else begin
      deep_hit    <= deep_d;
      shallow_hit <= shallow_d;
    end
  end

endmodule
