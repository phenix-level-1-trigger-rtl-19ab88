// ll1_pkg: shared sizes, types and register map constants of the generic
// Local Level-1 (GenLL1) trigger board logic.
//
// Sizes taken from the source description: 20 fiber inputs per board, fiber
// frames arriving at 4x (NTC/ZDC) or 6x (MuID) the beam clock, monitor FIFOs
// of 1024 beam crossings, a Level-1 decision within 40 beam clock ticks, five
// MuID gaps. Sizes chosen here: a 16-bit GLINK frame (it reproduces the quoted
// 18.4 Gbit/s MuID board rate: 20 x 16 bit x 57.6 MHz), 128 logical tubes per
// gap each formed from 3 panel tubes (20 x 6 x 16 = 1920 bits = 5 x 3 x 128),
// 12-bit TDC words and the local register bus used behind the VME slave.
package ll1_pkg;

  localparam int unsigned FRAME_W        = 16;   // GLINK data word per fiber frame
  localparam int unsigned MUID_FIBERS    = 20;
  localparam int unsigned MUID_FRAMES    = 6;    // 6 x BCLK
  localparam int unsigned NTC_ZDC_FIBERS = 5;    // 4 NTC + 1 ZDC
  localparam int unsigned NTC_ZDC_FRAMES = 4;    // 4 x BCLK
  localparam int unsigned MUID_GAPS      = 5;
  localparam int unsigned MUID_LTUBES    = 128;  // logical tubes (= symsets) per gap
  localparam int unsigned MUID_PANEL_OR  = 3;    // physical tubes ORed per logical tube
  localparam int unsigned MON_DEPTH      = 1024; // beam crossings kept by a monitor FIFO
  localparam int unsigned L1_LATENCY     = 40;   // beam clock ticks to the L1 decision
  localparam int unsigned TDC_W          = 12;
  localparam int unsigned LBUS_AW        = 22;   // local bus word address

  // Symset hit criterion: the deepest gap with a hit must be at least
  // depth_min (1..5), at least hits_min gaps must have hits, and at most
  // skip_max gaps in front of the deepest hit gap may be empty.
  typedef struct packed {
    logic [3:0] depth_min;
    logic [3:0] hits_min;
    logic [3:0] skip_max;
  } symset_crit_t;

  // Local register bus between the VME slave and the board registers.
  // A request is a one-cycle strobe; the board answers with a one-cycle ack.
  typedef struct packed {
    logic               wr;
    logic               rd;
    logic [LBUS_AW-1:0] addr;   // 32-bit word address
    logic [31:0]        wdata;
  } lbus_req_t;

  typedef struct packed {
    logic        ack;
    logic [31:0] rdata;
  } lbus_rsp_t;

  // Test pattern injection modes
  typedef enum logic [1:0] {
    INJ_LIVE  = 2'd0,   // fiber data
    INJ_LOOP  = 2'd1,   // pattern memory played continuously (VME control)
    INJ_TIMED = 2'd2    // pattern played once per timing-system test strobe
  } inj_mode_e;

  // Register map, word addresses on the local bus
  localparam logic [LBUS_AW-1:0] REG_CTRL     = 22'h00_0000; // [1:0] inject mode, [2] monitor freeze
  localparam logic [LBUS_AW-1:0] REG_STATUS   = 22'h00_0001; // demux error flags (read only)
  localparam logic [LBUS_AW-1:0] REG_PAT_LEN  = 22'h00_0002; // pattern rows used
  localparam logic [LBUS_AW-1:0] REG_L1_DELAY = 22'h00_0003; // accept latency in BCLK ticks
  localparam logic [LBUS_AW-1:0] REG_ALG0     = 22'h00_0004; // algorithm registers 4..15
  localparam int unsigned        MASK_BASE    = 32'h0000_1000; // + chunk
  localparam int unsigned        PAT_BASE     = 32'h0001_0000; // + row*64 + chunk
  localparam int unsigned        MON_BASE     = 32'h0020_0000; // + stage<<16 + index*64 + chunk

  function automatic int unsigned chunks32(int unsigned w);
    return (w + 31) / 32;
  endfunction

endpackage
