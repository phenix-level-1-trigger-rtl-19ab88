// accept_fifo: keeps the trigger data of accepted events for the data stream.
//
// The Level-1 accept for a beam crossing arrives from the timing system a
// fixed number of beam clocks (l1_delay) after that crossing's data were
// presented here. The data of every crossing therefore go into a circular
// delay memory of DLY_DEPTH entries; when l1_accept is high, the entry written
// l1_delay clocks earlier is pushed into an event FIFO of DEPTH entries, from
// which the readout takes it (show-ahead: dout is valid while !empty, rd_en
// pops). An accept while the FIFO is full is counted in dropped and lost.
// l1_delay must lie in 1..DLY_DEPTH-1.
// The reset is asynchronous in the logic; the assertion at the end is
// disabled while rst_n is low, so lint sees rst_n used both ways. That use
// exists only in the check, not in the circuit.
// The source describes this store only by its purpose; the delay memory, the
// depths and the show-ahead readout are this design's choices.
module accept_fifo #(
  parameter int unsigned W         = 64,
  parameter int unsigned DEPTH     = 16,
  parameter int unsigned DLY_DEPTH = 64
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [W-1:0]                 din,
  input  logic                         l1_accept,
  input  logic [$clog2(DLY_DEPTH)-1:0] l1_delay,
  input  logic                         rd_en,
  output logic [W-1:0]                 dout,
  output logic                         empty,
  output logic                         full,
  output logic [15:0]                  dropped
);
  localparam int unsigned DAW = $clog2(DLY_DEPTH);
  localparam int unsigned AW  = $clog2(DEPTH);

  logic [W-1:0]   dly_mem [DLY_DEPTH];
  logic [DAW-1:0] dly_wptr;
  logic [W-1:0]   delayed;
  logic [W-1:0]   fifo_mem [DEPTH];
  logic [AW:0]    wptr, rptr;
  logic           push, pop;

  always_ff @(posedge clk) dly_mem[dly_wptr] <= din;
  assign delayed = dly_mem[dly_wptr - l1_delay];

  assign empty = (wptr == rptr);
  assign full  = (wptr == {~rptr[AW], rptr[AW-1:0]});
  assign push  = l1_accept && !full;
  assign pop   = rd_en && !empty;
  assign dout  = fifo_mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (push) fifo_mem[wptr[AW-1:0]] <= delayed;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dly_wptr <= '0;
      wptr     <= '0;
      rptr     <= '0;
      dropped  <= '0;
    end else begin
      dly_wptr <= dly_wptr + 1'b1;
      if (push) wptr <= wptr + 1'b1;
      if (pop)  rptr <= rptr + 1'b1;
      if (l1_accept && full && dropped != '1) dropped <= dropped + 1'b1;
    end
  end

  // the readout never pops an empty FIFO
  a_no_pop_empty: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !empty)
    else $error("accept_fifo: read while empty");

endmodule
