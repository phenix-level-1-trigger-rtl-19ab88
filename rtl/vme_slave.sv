// vme_slave: VME A32/D32 single-cycle slave in front of the board's local
// register bus.
//
// The VME strobes (AS*, DS0*, DS1*) are asynchronous to the board and are
// brought into the beam clock domain with two-flop synchronisers. Address,
// address modifier, WRITE* and data are stable while the data strobes are
// asserted, so they are sampled directly once both synchronised strobes are
// low. A cycle is claimed when A[31:24] equals the board's slot base BASE and
// the address modifier is an A32 data access (0x09 or 0x0D). The slave then
// issues one local bus request (ll1_pkg::lbus_req_t, word address A[23:2]),
// waits for the board's ack, drives the read data (data_oe) and asserts DTACK*
// until the master releases the data strobes.
// Timing: about 3 beam clocks plus the board's ack delay per access.
// The reset is asynchronous in the logic; the assertion at the end is
// disabled while rst_n is low, so lint sees rst_n used both ways. That use
// exists only in the check, not in the circuit.
// The source only names the VME interface; the A32/D32 mode, the address
// split and the handshake sequencing are this design's choices.
module vme_slave
  import ll1_pkg::*;
#(
  parameter logic [7:0] BASE = 8'h10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         as_n,
  input  logic [1:0]   ds_n,
  input  logic         write_n,
  input  logic [5:0]   am,
  input  logic [31:1]  addr,
  input  logic         lword_n,
  input  logic [31:0]  data_i,
  output logic [31:0]  data_o,
  output logic         data_oe,
  output logic         dtack_n,
  output lbus_req_t    lreq,
  input  lbus_rsp_t    lrsp
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_ACK} state_e;

  state_e     state;
  logic [2:0] as_sync, ds0_sync, ds1_sync;
  logic       strobes_on, strobes_off, match;

  assign strobes_on  = !as_sync[2] && !ds0_sync[2] && !ds1_sync[2];
  assign strobes_off = ds0_sync[2] && ds1_sync[2];
  assign match       = (addr[31:24] == BASE) && (am == 6'h09 || am == 6'h0D) && !lword_n && !addr[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_sync  <= '1;
      ds0_sync <= '1;
      ds1_sync <= '1;
      state    <= S_IDLE;
      lreq     <= '0;
      data_o   <= '0;
      data_oe  <= 1'b0;
      dtack_n  <= 1'b1;
    end else begin
      as_sync  <= {as_sync[1:0],  as_n};
      ds0_sync <= {ds0_sync[1:0], ds_n[0]};
      ds1_sync <= {ds1_sync[1:0], ds_n[1]};
      lreq.wr  <= 1'b0;
      lreq.rd  <= 1'b0;
      unique case (state)
        S_IDLE: if (strobes_on && match) begin
          lreq.addr  <= addr[LBUS_AW+1:2];
          lreq.wdata <= data_i;
          lreq.wr    <= !write_n;
          lreq.rd    <= write_n;
          state      <= S_WAIT;
        end
        S_WAIT: if (lrsp.ack) begin
          data_o  <= lrsp.rdata;
          data_oe <= lreq.wr ? 1'b0 : write_n;
          dtack_n <= 1'b0;
          state   <= S_ACK;
        end
        S_ACK: if (strobes_off) begin
          dtack_n <= 1'b1;
          data_oe <= 1'b0;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // DTACK* only while the master holds the data strobes
  a_dtack_in_cycle: assert property (@(posedge clk) disable iff (!rst_n)
    !dtack_n |-> (state == S_ACK)) else $error("vme_slave: DTACK outside a cycle");

endmodule
