// mean_time_vertex: NTC/ZDC style mean-time and vertex trigger.
//
// Each side (south, north) of a counter system delivers NCH TDC values per
// beam crossing. A TDC value counts as a hit when tdc_lo <= value <= tdc_hi.
// Per side the mean time of the valid hits is formed, then the difference
// mean_s - mean_n gives a measure of the collision vertex along the beam, which
// is checked against vtx_lo <= vertex <= vtx_hi.
//   stage 1: validity test, per-side sum and hit count
//   stage 2: mean = sum / count, by multiplication with a reciprocal constant
//            (exact: ceil(2^K/n) with 2^K > max_sum * NCH, so the floor of
//            the product equals the integer quotient for every count n)
//   stage 3: vertex difference and window test
// prim = {vtx_ok, both sides valid, north valid, south valid}.
// Timing: 3 beam clocks from TDC input to prim.
// Mean time per side, subtraction and bounds on TDC values and vertex follow
// the source description; the pipeline, the integer mean and the prim format
// are this design's choices.
module mean_time_vertex #(
  parameter int unsigned NCH   = 4,
  parameter int unsigned TDC_W = 12
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NCH*TDC_W-1:0]     tdc_s,
  input  logic [NCH*TDC_W-1:0]     tdc_n,
  input  logic [TDC_W-1:0]         tdc_lo,
  input  logic [TDC_W-1:0]         tdc_hi,
  input  logic signed [TDC_W:0]    vtx_lo,
  input  logic signed [TDC_W:0]    vtx_hi,
  output logic [TDC_W-1:0]         mean_s,
  output logic [TDC_W-1:0]         mean_n,
  output logic signed [TDC_W:0]    vertex,
  output logic [3:0]               prim
);
  localparam int unsigned CNTW = $clog2(NCH + 1);
  localparam int unsigned SUMW = TDC_W + CNTW;
  localparam int unsigned K    = SUMW + CNTW + 1;
  localparam int unsigned RW   = K + 1;

  function automatic logic [RW-1:0] recip(logic [CNTW-1:0] n);
    logic [RW:0] one;
    one = (RW+1)'(1) << K;
    if (n == '0) return '0;
    return RW'((one + (RW+1)'(n) - (RW+1)'(1)) / (RW+1)'(n));
  endfunction

  // stage 1
  logic [SUMW-1:0] sum_s1 [2];
  logic [CNTW-1:0] cnt_s1 [2];

  logic [SUMW-1:0] sum_d [2];
  logic [CNTW-1:0] cnt_d [2];

  always_comb begin
    for (int s = 0; s < 2; s++) begin
      sum_d[s] = '0;
      cnt_d[s] = '0;
      for (int c = 0; c < NCH; c++) begin
        logic [TDC_W-1:0] v;
        v = (s == 0) ? tdc_s[c*TDC_W +: TDC_W] : tdc_n[c*TDC_W +: TDC_W];
        if (v >= tdc_lo && v <= tdc_hi) begin
          sum_d[s] = sum_d[s] + SUMW'(v);
          cnt_d[s] = cnt_d[s] + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < 2; s++) begin
        sum_s1[s] <= '0;
        cnt_s1[s] <= '0;
      end
    end else begin
      sum_s1 <= sum_d;
      cnt_s1 <= cnt_d;
    end
  end

  // stage 2
  logic [TDC_W-1:0] mean_s2 [2];
  logic [1:0]       val_s2;

  logic [SUMW+RW-1:0] prod [2];
  always_comb begin
    for (int s = 0; s < 2; s++)
      prod[s] = (SUMW+RW)'(sum_s1[s]) * (SUMW+RW)'(recip(cnt_s1[s]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mean_s2[0] <= '0;
      mean_s2[1] <= '0;
      val_s2     <= '0;
    end else begin
      for (int s = 0; s < 2; s++) begin
        mean_s2[s] <= TDC_W'(prod[s] >> K);
        val_s2[s]  <= (cnt_s1[s] != '0);
      end
    end
  end

  // stage 3
  logic signed [TDC_W:0] diff;
  assign diff = $signed({1'b0, mean_s2[0]}) - $signed({1'b0, mean_s2[1]});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mean_s <= '0;
      mean_n <= '0;
      vertex <= '0;
      prim   <= '0;
    end else begin
      mean_s  <= mean_s2[0];
      mean_n  <= mean_s2[1];
      vertex  <= diff;
      prim[0] <= val_s2[0];
      prim[1] <= val_s2[1];
      prim[2] <= &val_s2;
      prim[3] <= (&val_s2) && (diff >= vtx_lo) && (diff <= vtx_hi);
    end
  end

endmodule
