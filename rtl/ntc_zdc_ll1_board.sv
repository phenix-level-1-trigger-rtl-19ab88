// ntc_zdc_ll1_board: one GenLL1 board programmed as the NTC/ZDC Local Level-1
// trigger, two independent vertex triggers sharing one board and one FPGA.
//
// Five fibers at 4x the beam clock are used: four carry the Normalization
// Trigger Counter (NTC, four scintillator quadrants per side) and one the Zero
// Degree Calorimeter (ZDC). Each system forms a mean time per side from its TDC
// values, subtracts the two sides to get a vertex measure and applies bounds to
// the TDC values and to the vertex (mean_time_vertex).
// Fiber word layout (bits [11:0] of a frame hold a TDC value):
//   fibers 0,1: south quadrants 0,1 (fiber 0) and 2,3 (fiber 1), frames 0,1
//   fibers 2,3: north quadrants, same layout
//   fiber 4   : ZDC south TDC in frame 0, north TDC in frame 1
//   frames 2,3 of every fiber are not used by the algorithm (they are kept in
//   the monitor FIFO).
// gl1_prim = {ZDC prim, NTC prim}, each {vertex ok, both, north, south}.
// Common services as on every GenLL1 board: VME slave, test pattern injection,
// bit masks, monitor FIFOs (stage 0: masked input, stage 1: algorithm results)
// and an accept FIFO of the algorithm results.
// Algorithm registers: 4 NTC TDC window {hi[27:16], lo[11:0]}, 5 NTC vertex
// window {hi[28:16], lo[12:0]} (two's complement), 6 ZDC TDC window, 7 ZDC
// vertex window; read-only 8 fifo errors, 9 dropped accepts, 10 monitor count.
// Timing: gl1_prim follows the demultiplexed crossing by 5 BCLK ticks.
// The fiber count, frame rate and the algorithm follow the source description;
// the fiber word layout, register map and primitive format are this design's
// choices.
module ntc_zdc_ll1_board
  import ll1_pkg::*;
#(
  parameter int unsigned FIBERS    = NTC_ZDC_FIBERS,  // 5
  parameter int unsigned FRAMES    = NTC_ZDC_FRAMES,  // 4
  parameter int unsigned FW        = FRAME_W,         // 16
  parameter int unsigned TW        = TDC_W,           // 12
  parameter int unsigned MONDEPTH  = MON_DEPTH,       // 1024
  parameter int unsigned PAT_DEPTH = 64,
  parameter int unsigned ACC_DEPTH = 16,
  parameter logic [7:0]  BASE      = 8'h20
) (
  input  logic                        bclk,
  input  logic                        rst_n,
  input  logic [FIBERS-1:0]           fclk,
  input  logic [FIBERS-1:0][FW-1:0]   rx_data,
  input  logic [FIBERS-1:0]           rx_flag,
  input  logic [FIBERS-1:0]           rx_dav,
  input  logic [FIBERS-1:0]           rx_ready,
  input  logic                        l1_accept,
  input  logic                        gtm_test,
  input  logic                        as_n,
  input  logic [1:0]                  ds_n,
  input  logic                        write_n,
  input  logic [5:0]                  am,
  input  logic [31:1]                 vaddr,
  input  logic                        lword_n,
  input  logic [31:0]                 vdata_i,
  output logic [31:0]                 vdata_o,
  output logic                        vdata_oe,
  output logic                        dtack_n,
  output logic [7:0]                  gl1_prim,
  output logic                        gl1_valid,
  input  logic                        acc_rd_en,
  output logic [6*TW+2+8-1:0]         acc_dout,
  output logic                        acc_empty
);
  localparam int unsigned IW    = FIBERS * FRAMES * FW;
  localparam int unsigned RW    = 6 * TW + 2 + 8;   // result word
  localparam int unsigned MAW   = $clog2(MONDEPTH);
  localparam int unsigned PAW   = $clog2(PAT_DEPTH);

  // ---------------- registers ----------------
  lbus_req_t   lreq;
  lbus_rsp_t   lrsp;
  inj_mode_e   inj_mode;
  logic        mon_freeze, err_clear;
  logic [PAW:0] pat_len;
  logic [5:0]  l1_delay;
  logic [TW-1:0]        ntc_tlo, ntc_thi, zdc_tlo, zdc_thi;
  logic signed [TW:0]   ntc_vlo, ntc_vhi, zdc_vlo, zdc_vhi;

  vme_slave #(.BASE(BASE)) u_vme (
    .clk(bclk), .rst_n, .as_n, .ds_n, .write_n, .am, .addr(vaddr), .lword_n,
    .data_i(vdata_i), .data_o(vdata_o), .data_oe(vdata_oe), .dtack_n, .lreq, .lrsp);

  logic in_mask, in_pat, in_mon;
  assign in_mask = (lreq.addr >> 12) == LBUS_AW'(MASK_BASE >> 12);
  assign in_pat  = (lreq.addr >> 16) == LBUS_AW'(PAT_BASE >> 16);
  assign in_mon  = lreq.addr[21];

  always_ff @(posedge bclk or negedge rst_n) begin
    if (!rst_n) begin
      inj_mode   <= INJ_LIVE;
      mon_freeze <= 1'b0;
      err_clear  <= 1'b0;
      pat_len    <= (PAW+1)'(PAT_DEPTH);
      l1_delay   <= 6'd32;
      ntc_tlo    <= TW'(1);
      ntc_thi    <= '1 - 1'b1;
      zdc_tlo    <= TW'(1);
      zdc_thi    <= '1 - 1'b1;
      ntc_vlo    <= -(TW+1)'(200);
      ntc_vhi    <= (TW+1)'(200);
      zdc_vlo    <= -(TW+1)'(200);
      zdc_vhi    <= (TW+1)'(200);
    end else begin
      err_clear <= 1'b0;
      if (lreq.wr) begin
        unique case (lreq.addr)
          REG_CTRL: begin
            inj_mode   <= inj_mode_e'(lreq.wdata[1:0]);
            mon_freeze <= lreq.wdata[2];
            err_clear  <= lreq.wdata[3];
          end
          REG_PAT_LEN:  pat_len  <= lreq.wdata[PAW:0];
          REG_L1_DELAY: l1_delay <= lreq.wdata[5:0];
          REG_ALG0:     {ntc_thi, ntc_tlo} <= {lreq.wdata[16 +: TW], lreq.wdata[0 +: TW]};
          REG_ALG0 + 1: {ntc_vhi, ntc_vlo} <= {lreq.wdata[16 +: TW+1], lreq.wdata[0 +: TW+1]};
          REG_ALG0 + 2: {zdc_thi, zdc_tlo} <= {lreq.wdata[16 +: TW], lreq.wdata[0 +: TW]};
          REG_ALG0 + 3: {zdc_vhi, zdc_vlo} <= {lreq.wdata[16 +: TW+1], lreq.wdata[0 +: TW+1]};
          default: ;
        endcase
      end
    end
  end

  // ---------------- fibers ----------------
  logic [IW-1:0]     fib_data;
  logic [FIBERS-1:0] fib_valid, phase_err, fifo_err;

  for (genvar f = 0; f < FIBERS; f++) begin : g_fiber
    glink_demux #(.FRAME_W(FW), .FRAMES(FRAMES)) u_demux (
      .rst_n, .fclk(fclk[f]), .rx_data(rx_data[f]), .rx_flag(rx_flag[f]),
      .rx_dav(rx_dav[f]), .rx_ready(rx_ready[f]), .bclk, .err_clear,
      .xing_data(fib_data[f*FRAMES*FW +: FRAMES*FW]), .xing_valid(fib_valid[f]),
      .phase_err(phase_err[f]), .fifo_err(fifo_err[f]));
  end

  // ---------------- algorithm ----------------
  logic [IW-1:0] inj_data, msk_data;
  logic          injecting;
  logic [31:0]   mask_rdata;

  test_pattern_inject #(.W(IW), .DEPTH(PAT_DEPTH)) u_inject (
    .clk(bclk), .rst_n, .live_in(fib_data), .mode(inj_mode), .pat_len, .gtm_test,
    .pat_we(lreq.wr && in_pat), .pat_row(lreq.addr[6 +: PAW]), .pat_chunk(lreq.addr[5:0]),
    .pat_wdata(lreq.wdata), .data_out(inj_data), .injecting);

  bit_mask #(.W(IW)) u_mask (
    .clk(bclk), .rst_n, .data_in(inj_data), .data_out(msk_data),
    .mask_we(lreq.wr && in_mask), .mask_chunk(lreq.addr[5:0]), .mask_wdata(lreq.wdata),
    .mask_rdata);

  // frame q of fiber f, TDC bits
  function automatic logic [TW-1:0] tdc(logic [IW-1:0] d, int f, int q);
    return d[(f*FRAMES + q)*FW +: TW];
  endfunction

  logic [4*TW-1:0] ntc_s, ntc_n;
  always_comb begin
    for (int q = 0; q < 4; q++) begin
      ntc_s[q*TW +: TW] = tdc(msk_data, q / 2,     q % 2);
      ntc_n[q*TW +: TW] = tdc(msk_data, 2 + q / 2, q % 2);
    end
  end

  logic [TW-1:0]      ntc_ms, ntc_mn, zdc_ms, zdc_mn;
  logic signed [TW:0] ntc_vtx, zdc_vtx;
  logic [3:0]         ntc_prim, zdc_prim;

  mean_time_vertex #(.NCH(4), .TDC_W(TW)) u_ntc (
    .clk(bclk), .rst_n, .tdc_s(ntc_s), .tdc_n(ntc_n), .tdc_lo(ntc_tlo), .tdc_hi(ntc_thi),
    .vtx_lo(ntc_vlo), .vtx_hi(ntc_vhi), .mean_s(ntc_ms), .mean_n(ntc_mn),
    .vertex(ntc_vtx), .prim(ntc_prim));

  mean_time_vertex #(.NCH(1), .TDC_W(TW)) u_zdc (
    .clk(bclk), .rst_n, .tdc_s(tdc(msk_data, 4, 0)), .tdc_n(tdc(msk_data, 4, 1)),
    .tdc_lo(zdc_tlo), .tdc_hi(zdc_thi), .vtx_lo(zdc_vlo), .vtx_hi(zdc_vhi),
    .mean_s(zdc_ms), .mean_n(zdc_mn), .vertex(zdc_vtx), .prim(zdc_prim));

  assign gl1_prim = {zdc_prim, ntc_prim};

  logic [4:0] valid_pipe;
  always_ff @(posedge bclk or negedge rst_n) begin
    if (!rst_n) valid_pipe <= '0;
    else        valid_pipe <= {valid_pipe[3:0], (&fib_valid) || injecting};
  end
  assign gl1_valid = valid_pipe[4];

  logic [RW-1:0] result;
  assign result = {zdc_ms, zdc_mn, zdc_vtx, ntc_ms, ntc_mn, ntc_vtx, gl1_prim};

  // ---------------- accepted events ----------------
  logic [15:0] acc_dropped;
  logic        acc_full;

  accept_fifo #(.W(RW), .DEPTH(ACC_DEPTH), .DLY_DEPTH(64)) u_accept (
    .clk(bclk), .rst_n, .din(result), .l1_accept, .l1_delay, .rd_en(acc_rd_en),
    .dout(acc_dout), .empty(acc_empty), .full(acc_full), .dropped(acc_dropped));

  // ---------------- monitor FIFOs ----------------
  logic [MAW:0] mon_stored [2];
  logic [31:0]  mon_rdata [2];

  monitor_fifo #(.W(IW), .DEPTH(MONDEPTH)) u_mon_in (
    .clk(bclk), .rst_n, .din(msk_data), .freeze(mon_freeze), .stored(mon_stored[0]),
    .rd_index(lreq.addr[6 +: MAW]), .rd_chunk(lreq.addr[5:0]), .rd_data(mon_rdata[0]));
  monitor_fifo #(.W(RW + 1), .DEPTH(MONDEPTH)) u_mon_out (
    .clk(bclk), .rst_n, .din({gl1_valid, result}), .freeze(mon_freeze),
    .stored(mon_stored[1]), .rd_index(lreq.addr[6 +: MAW]), .rd_chunk(lreq.addr[5:0]),
    .rd_data(mon_rdata[1]));

  // ---------------- register read-back ----------------
  logic        rd_d1, wr_d1;
  logic [31:0] reg_rdata;

  always_comb begin
    reg_rdata = '0;
    if (in_mon)       reg_rdata = mon_rdata[lreq.addr[16]];
    else if (in_mask) reg_rdata = mask_rdata;
    else begin
      unique case (lreq.addr)
        REG_CTRL:     reg_rdata = {29'd0, mon_freeze, inj_mode};
        REG_STATUS:   reg_rdata = 32'(phase_err);
        REG_PAT_LEN:  reg_rdata = 32'(pat_len);
        REG_L1_DELAY: reg_rdata = 32'(l1_delay);
        REG_ALG0:     reg_rdata = {4'd0, ntc_thi, 4'd0, ntc_tlo};
        REG_ALG0 + 1: reg_rdata = {3'd0, ntc_vhi, 3'd0, ntc_vlo};
        REG_ALG0 + 2: reg_rdata = {4'd0, zdc_thi, 4'd0, zdc_tlo};
        REG_ALG0 + 3: reg_rdata = {3'd0, zdc_vhi, 3'd0, zdc_vlo};
        REG_ALG0 + 4: reg_rdata = 32'(fifo_err);
        REG_ALG0 + 5: reg_rdata = {15'd0, acc_full, acc_dropped};
        REG_ALG0 + 6: reg_rdata = 32'(mon_stored[0]);
        default:      reg_rdata = '0;
      endcase
    end
  end

  always_ff @(posedge bclk or negedge rst_n) begin
    if (!rst_n) begin
      rd_d1 <= 1'b0;
      wr_d1 <= 1'b0;
      lrsp  <= '0;
    end else begin
      rd_d1      <= lreq.rd;
      wr_d1      <= lreq.wr;
      lrsp.ack   <= rd_d1 || wr_d1;
      lrsp.rdata <= rd_d1 ? reg_rdata : '0;
    end
  end

endmodule
