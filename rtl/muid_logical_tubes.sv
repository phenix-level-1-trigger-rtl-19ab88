// muid_logical_tubes: fiber-bit to logical-tube mapping of one MuID board.
//
// MuID tubes of the same gap that lie on the same line in different panels are
// ORed into one "logical tube" spanning the whole layer. The real cable map
// comes from a detector database; this module uses a fixed regular map: the
// input holds GAPS gap slices of NOR*NLT bits, slice g has NOR panel blocks of
// NLT bits, and logical tube t of gap g is the OR of bit
// g*NOR*NLT + k*NLT + t over the panel blocks k = 0..NOR-1.
// Output bit g*NLT + t is logical tube t of gap g (gap 1 = g 0).
// Timing: registered, one beam clock.
// The OR across panels follows the source description; the map, NOR and NLT
// are this design's choices.
module muid_logical_tubes #(
  parameter int unsigned GAPS = 5,
  parameter int unsigned NLT  = 128,
  parameter int unsigned NOR  = 3
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [GAPS*NOR*NLT-1:0]   phys,
  output logic [GAPS*NLT-1:0]       ltube
);
  logic [GAPS*NLT-1:0] ltube_d;

  always_comb begin
    ltube_d = '0;
    for (int g = 0; g < GAPS; g++)
      for (int k = 0; k < NOR; k++)
        for (int t = 0; t < NLT; t++)
          ltube_d[g*NLT + t] |= phys[g*NOR*NLT + k*NLT + t];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ltube <= '0;
    else        ltube <= ltube_d;
  end

endmodule
