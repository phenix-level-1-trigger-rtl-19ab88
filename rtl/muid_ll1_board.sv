// muid_ll1_board: one GenLL1 board programmed as a MuID Local Level-1 trigger.
//
// A board receives one projection (horizontal or vertical) of one MuID arm on
// FIBERS fibers, each carrying FRAMES GLINK frames per beam crossing. Data
// flow, one beam crossing per beam clock (BCLK) tick:
//   glink_demux x FIBERS -> test_pattern_inject -> bit_mask
//     -> muid_logical_tubes -> muid_symset -> muid_prim -> gl1_prim
// Around the algorithm sit the common board services: a VME slave with the
// register map of ll1_pkg, monitor FIFOs recording 1024 crossings of four
// stages (0: masked input, 1: logical tubes, 2: {shallow, deep} symset maps,
// 3: {valid, prim}), and an accept FIFO that keeps {prim, deep map, shallow
// map} of every crossing the timing system accepts (l1_accept, l1_delay ticks
// after the crossing reached the primitive stage).
// The fiber bits are taken in order as the logical-tube input; a board whose
// fiber bits outnumber GAPS*NOR*NLT leaves the rest unused.
// Algorithm registers: 4 deep criterion, 5 shallow criterion (symset_crit_t
// in bits [11:0]); read-only 6 fifo errors, 7 dropped accepts, 8 monitor
// stored count, 9 {deep clusters, shallow clusters} of the last crossing.
// Timing: gl1_prim follows the demultiplexed crossing by 5 BCLK ticks; all
// fibers are expected to deliver their frames in the same BCLK phase.
// Board structure, fiber count, frame rate and the algorithm chain follow the
// source description; register map, primitive format and the single-FPGA
// organisation (the real board spreads the work over five FPGAs) are this
// design's choices.
module muid_ll1_board
  import ll1_pkg::*;
#(
  parameter int unsigned FIBERS    = MUID_FIBERS,    // 20
  parameter int unsigned FRAMES    = MUID_FRAMES,    // 6
  parameter int unsigned FW        = FRAME_W,        // 16
  parameter int unsigned GAPS      = MUID_GAPS,      // 5
  parameter int unsigned NLT       = MUID_LTUBES,    // 128
  parameter int unsigned NOR       = MUID_PANEL_OR,  // 3
  parameter int unsigned MONDEPTH  = MON_DEPTH,      // 1024
  parameter int unsigned PAT_DEPTH = 64,
  parameter int unsigned ACC_DEPTH = 16,
  parameter logic [7:0]  BASE      = 8'h10
) (
  input  logic                        bclk,
  input  logic                        rst_n,
  // fibers
  input  logic [FIBERS-1:0]           fclk,
  input  logic [FIBERS-1:0][FW-1:0]   rx_data,
  input  logic [FIBERS-1:0]           rx_flag,
  input  logic [FIBERS-1:0]           rx_dav,
  input  logic [FIBERS-1:0]           rx_ready,
  // timing system
  input  logic                        l1_accept,
  input  logic                        gtm_test,
  // VME
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
  // to Global Level-1
  output logic [3:0]                  gl1_prim,
  output logic                        gl1_valid,
  // accepted-event data
  input  logic                        acc_rd_en,
  output logic [4+2*NLT-1:0]          acc_dout,
  output logic                        acc_empty
);
  localparam int unsigned IW    = FIBERS * FRAMES * FW;
  localparam int unsigned PW    = GAPS * NOR * NLT;
  localparam int unsigned ACC_W = 4 + 2 * NLT;
  localparam int unsigned MAW   = $clog2(MONDEPTH);
  localparam int unsigned PAW   = $clog2(PAT_DEPTH);

  // ---------------- registers ----------------
  lbus_req_t    lreq;
  lbus_rsp_t    lrsp;
  inj_mode_e    inj_mode;
  logic         mon_freeze, err_clear;
  logic [PAW:0] pat_len;
  logic [5:0]   l1_delay;
  symset_crit_t crit_deep, crit_shallow;

  vme_slave #(.BASE(BASE)) u_vme (
    .clk(bclk), .rst_n, .as_n, .ds_n, .write_n, .am, .addr(vaddr), .lword_n,
    .data_i(vdata_i), .data_o(vdata_o), .data_oe(vdata_oe), .dtack_n, .lreq, .lrsp);

  logic in_mask, in_pat, in_mon;
  assign in_mask = (lreq.addr >> 12) == LBUS_AW'(MASK_BASE >> 12);
  assign in_pat  = (lreq.addr >> 16) == LBUS_AW'(PAT_BASE >> 16);
  assign in_mon  = lreq.addr[21];

  always_ff @(posedge bclk or negedge rst_n) begin
    if (!rst_n) begin
      inj_mode     <= INJ_LIVE;
      mon_freeze   <= 1'b0;
      err_clear    <= 1'b0;
      pat_len      <= (PAW+1)'(PAT_DEPTH);
      l1_delay     <= 6'd32;
      crit_deep    <= '{depth_min: 4'd4, hits_min: 4'd3, skip_max: 4'd1};
      crit_shallow <= '{depth_min: 4'd2, hits_min: 4'd2, skip_max: 4'd1};
    end else begin
      err_clear <= 1'b0;
      if (lreq.wr) begin
        unique case (lreq.addr)
          REG_CTRL: begin
            inj_mode   <= inj_mode_e'(lreq.wdata[1:0]);
            mon_freeze <= lreq.wdata[2];
            err_clear  <= lreq.wdata[3];
          end
          REG_PAT_LEN:  pat_len      <= lreq.wdata[PAW:0];
          REG_L1_DELAY: l1_delay     <= lreq.wdata[5:0];
          REG_ALG0:     crit_deep    <= lreq.wdata[11:0];
          REG_ALG0 + 1: crit_shallow <= lreq.wdata[11:0];
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

  // ---------------- algorithm chain ----------------
  logic [IW-1:0]       inj_data, msk_data;
  logic                injecting;
  logic [31:0]         mask_rdata;
  logic [PW-1:0]       phys;
  logic [GAPS*NLT-1:0] ltube;
  logic [NLT-1:0]      deep_hit, shallow_hit, deep_q, shallow_q;
  logic [$clog2(NLT):0] deep_n, shallow_n;
  logic [4:0]          valid_pipe;

  test_pattern_inject #(.W(IW), .DEPTH(PAT_DEPTH)) u_inject (
    .clk(bclk), .rst_n, .live_in(fib_data), .mode(inj_mode), .pat_len, .gtm_test,
    .pat_we(lreq.wr && in_pat), .pat_row(lreq.addr[6 +: PAW]), .pat_chunk(lreq.addr[5:0]),
    .pat_wdata(lreq.wdata), .data_out(inj_data), .injecting);

  bit_mask #(.W(IW)) u_mask (
    .clk(bclk), .rst_n, .data_in(inj_data), .data_out(msk_data),
    .mask_we(lreq.wr && in_mask), .mask_chunk(lreq.addr[5:0]), .mask_wdata(lreq.wdata),
    .mask_rdata);

  assign phys = PW'(msk_data);

  muid_logical_tubes #(.GAPS(GAPS), .NLT(NLT), .NOR(NOR)) u_ltubes (
    .clk(bclk), .rst_n, .phys, .ltube);

  muid_symset #(.GAPS(GAPS), .NLT(NLT)) u_symset (
    .clk(bclk), .rst_n, .ltube, .crit_deep, .crit_shallow, .deep_hit, .shallow_hit);

  muid_prim #(.NLT(NLT)) u_prim (
    .clk(bclk), .rst_n, .deep_hit, .shallow_hit, .prim(gl1_prim),
    .deep_clusters(deep_n), .shallow_clusters(shallow_n));

  always_ff @(posedge bclk or negedge rst_n) begin
    if (!rst_n) begin
      valid_pipe <= '0;
      deep_q     <= '0;
      shallow_q  <= '0;
    end else begin
      valid_pipe <= {valid_pipe[3:0], (&fib_valid) || injecting};
      deep_q     <= deep_hit;
      shallow_q  <= shallow_hit;
    end
  end
  assign gl1_valid = valid_pipe[4];

  // ---------------- accepted events ----------------
  logic [15:0] acc_dropped;
  logic        acc_full;

  accept_fifo #(.W(ACC_W), .DEPTH(ACC_DEPTH), .DLY_DEPTH(64)) u_accept (
    .clk(bclk), .rst_n, .din({gl1_prim, deep_q, shallow_q}), .l1_accept, .l1_delay,
    .rd_en(acc_rd_en), .dout(acc_dout), .empty(acc_empty), .full(acc_full),
    .dropped(acc_dropped));

  // ---------------- monitor FIFOs ----------------
  logic [MAW:0]  mon_stored [4];
  logic [31:0]   mon_rdata [4];

  monitor_fifo #(.W(IW), .DEPTH(MONDEPTH)) u_mon_in (
    .clk(bclk), .rst_n, .din(msk_data), .freeze(mon_freeze), .stored(mon_stored[0]),
    .rd_index(lreq.addr[6 +: MAW]), .rd_chunk(lreq.addr[5:0]), .rd_data(mon_rdata[0]));
  monitor_fifo #(.W(GAPS*NLT), .DEPTH(MONDEPTH)) u_mon_lt (
    .clk(bclk), .rst_n, .din(ltube), .freeze(mon_freeze), .stored(mon_stored[1]),
    .rd_index(lreq.addr[6 +: MAW]), .rd_chunk(lreq.addr[5:0]), .rd_data(mon_rdata[1]));
  monitor_fifo #(.W(2*NLT), .DEPTH(MONDEPTH)) u_mon_ss (
    .clk(bclk), .rst_n, .din({shallow_hit, deep_hit}), .freeze(mon_freeze),
    .stored(mon_stored[2]), .rd_index(lreq.addr[6 +: MAW]), .rd_chunk(lreq.addr[5:0]),
    .rd_data(mon_rdata[2]));
  monitor_fifo #(.W(5), .DEPTH(MONDEPTH)) u_mon_out (
    .clk(bclk), .rst_n, .din({gl1_valid, gl1_prim}), .freeze(mon_freeze),
    .stored(mon_stored[3]), .rd_index(lreq.addr[6 +: MAW]), .rd_chunk(lreq.addr[5:0]),
    .rd_data(mon_rdata[3]));

  // ---------------- register read-back ----------------
  logic        rd_d1, wr_d1;
  logic [31:0] reg_rdata;

  always_comb begin
    reg_rdata = '0;
    if (in_mon)       reg_rdata = mon_rdata[lreq.addr[17:16]];
    else if (in_mask) reg_rdata = mask_rdata;
    else begin
      unique case (lreq.addr)
        REG_CTRL:     reg_rdata = {29'd0, mon_freeze, inj_mode};
        REG_STATUS:   reg_rdata = 32'(phase_err);
        REG_PAT_LEN:  reg_rdata = 32'(pat_len);
        REG_L1_DELAY: reg_rdata = 32'(l1_delay);
        REG_ALG0:     reg_rdata = 32'(crit_deep);
        REG_ALG0 + 1: reg_rdata = 32'(crit_shallow);
        REG_ALG0 + 2: reg_rdata = 32'(fifo_err);
        REG_ALG0 + 3: reg_rdata = {15'd0, acc_full, acc_dropped};
        REG_ALG0 + 4: reg_rdata = 32'(mon_stored[0]);
        REG_ALG0 + 5: reg_rdata = {16'(deep_n), 16'(shallow_n)};
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
