// phenix_ll1_top: the Local Level-1 crate of the new GenLL1 trigger systems.
//
// One NTC/ZDC board (five fibers at 4x the beam clock) and MUID_BOARDS MuID
// boards (twenty fibers at 6x the beam clock each; one board per projection
// and arm: south-horizontal, south-vertical, north-horizontal,
// north-vertical) run side by side on the common beam clock. They share the
// VME bus (each board answers at its own A32 base: NTC/ZDC 0x20, MuID
// 0x10..0x13), the Level-1 accept and the test strobe of the timing system.
// Their reduced-bit outputs go to the Global Level-1 (GL1), which is outside
// this design: gl1_ntc_zdc = {ZDC prim, NTC prim}, gl1_muid[b] =
// {deep count, shallow count} of MuID board b, each with a valid bit.
// The accepted-event FIFO of every board is brought out for the readout.
// The board set follows the source description; the VME bus sharing (open
// drain DTACK* and data modelled as AND/OR) is this design's choice.
module phenix_ll1_top
  import ll1_pkg::*;
#(
  parameter int unsigned MUID_BOARDS = 4,
  parameter int unsigned MONDEPTH    = MON_DEPTH
) (
  input  logic                                           bclk,
  input  logic                                           rst_n,
  // timing system
  input  logic                                           l1_accept,
  input  logic                                           gtm_test,
  // NTC/ZDC fibers
  input  logic [NTC_ZDC_FIBERS-1:0]                      nz_fclk,
  input  logic [NTC_ZDC_FIBERS-1:0][FRAME_W-1:0]         nz_rx_data,
  input  logic [NTC_ZDC_FIBERS-1:0]                      nz_rx_flag,
  input  logic [NTC_ZDC_FIBERS-1:0]                      nz_rx_dav,
  input  logic [NTC_ZDC_FIBERS-1:0]                      nz_rx_ready,
  // MuID fibers
  input  logic [MUID_BOARDS-1:0][MUID_FIBERS-1:0]        mu_fclk,
  input  logic [MUID_BOARDS-1:0][MUID_FIBERS-1:0][FRAME_W-1:0] mu_rx_data,
  input  logic [MUID_BOARDS-1:0][MUID_FIBERS-1:0]        mu_rx_flag,
  input  logic [MUID_BOARDS-1:0][MUID_FIBERS-1:0]        mu_rx_dav,
  input  logic [MUID_BOARDS-1:0][MUID_FIBERS-1:0]        mu_rx_ready,
  // VME
  input  logic                                           as_n,
  input  logic [1:0]                                     ds_n,
  input  logic                                           write_n,
  input  logic [5:0]                                     am,
  input  logic [31:1]                                    vaddr,
  input  logic                                           lword_n,
  input  logic [31:0]                                    vdata_i,
  output logic [31:0]                                    vdata_o,
  output logic                                           vdata_oe,
  output logic                                           dtack_n,
  // to GL1
  output logic [7:0]                                     gl1_ntc_zdc,
  output logic                                           gl1_ntc_zdc_valid,
  output logic [MUID_BOARDS-1:0][3:0]                    gl1_muid,
  output logic [MUID_BOARDS-1:0]                         gl1_muid_valid,
  // accepted-event readout
  input  logic                                           nz_acc_rd_en,
  output logic [6*TDC_W+2+8-1:0]                         nz_acc_dout,
  output logic                                           nz_acc_empty,
  input  logic [MUID_BOARDS-1:0]                         mu_acc_rd_en,
  output logic [MUID_BOARDS-1:0][4+2*MUID_LTUBES-1:0]    mu_acc_dout,
  output logic [MUID_BOARDS-1:0]                         mu_acc_empty
);
  localparam int unsigned NB = MUID_BOARDS + 1;

  logic [NB-1:0][31:0] b_data;
  logic [NB-1:0]       b_oe, b_dtack_n;

  ntc_zdc_ll1_board #(.MONDEPTH(MONDEPTH), .BASE(8'h20)) u_ntc_zdc (
    .bclk, .rst_n, .fclk(nz_fclk), .rx_data(nz_rx_data), .rx_flag(nz_rx_flag),
    .rx_dav(nz_rx_dav), .rx_ready(nz_rx_ready), .l1_accept, .gtm_test,
    .as_n, .ds_n, .write_n, .am, .vaddr, .lword_n, .vdata_i,
    .vdata_o(b_data[0]), .vdata_oe(b_oe[0]), .dtack_n(b_dtack_n[0]),
    .gl1_prim(gl1_ntc_zdc), .gl1_valid(gl1_ntc_zdc_valid),
    .acc_rd_en(nz_acc_rd_en), .acc_dout(nz_acc_dout), .acc_empty(nz_acc_empty));

  for (genvar b = 0; b < MUID_BOARDS; b++) begin : g_muid
    muid_ll1_board #(.MONDEPTH(MONDEPTH), .BASE(8'h10 + 8'(b))) u_muid (
      .bclk, .rst_n, .fclk(mu_fclk[b]), .rx_data(mu_rx_data[b]), .rx_flag(mu_rx_flag[b]),
      .rx_dav(mu_rx_dav[b]), .rx_ready(mu_rx_ready[b]), .l1_accept, .gtm_test,
      .as_n, .ds_n, .write_n, .am, .vaddr, .lword_n, .vdata_i,
      .vdata_o(b_data[b+1]), .vdata_oe(b_oe[b+1]), .dtack_n(b_dtack_n[b+1]),
      .gl1_prim(gl1_muid[b]), .gl1_valid(gl1_muid_valid[b]),
      .acc_rd_en(mu_acc_rd_en[b]), .acc_dout(mu_acc_dout[b]), .acc_empty(mu_acc_empty[b]));
  end

  always_comb begin
    vdata_o  = '0;
    vdata_oe = 1'b0;
    dtack_n  = 1'b1;
    for (int b = 0; b < NB; b++) begin
      if (b_oe[b]) vdata_o |= b_data[b];
      vdata_oe |= b_oe[b];
      dtack_n  &= b_dtack_n[b];
    end
  end

endmodule
