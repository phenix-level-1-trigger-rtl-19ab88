// monitor_fifo: beam-clock monitor buffer for one algorithm stage.
//
// While running, the stage's W-bit value is written every beam clock into a
// circular memory of DEPTH crossings, so the last DEPTH crossings are always
// available. Raising freeze stops the writing; the buffer can then be read
// over the register bus: rd_index 0 is the oldest stored crossing, rd_chunk
// selects a 32-bit slice. Read data appear one clock after the address.
// Dropping freeze restarts the recording (stored count reset to 0).
// DEPTH = 1024 crossings comes from the source description; the freeze
// control and the read addressing are this design's choices.
module monitor_fifo
  import ll1_pkg::*;
#(
  parameter int unsigned W     = 1920,
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [W-1:0]             din,
  input  logic                     freeze,
  output logic [$clog2(DEPTH):0]   stored,   // crossings held, up to DEPTH
  input  logic [$clog2(DEPTH)-1:0] rd_index,
  input  logic [5:0]               rd_chunk,
  output logic [31:0]              rd_data
);
  localparam int unsigned AW  = $clog2(DEPTH);
  localparam int unsigned NCH = chunks32(W);

  logic [NCH*32-1:0] mem [DEPTH];
  logic [AW-1:0]     wptr;
  logic              frozen_q;
  logic [AW-1:0]     raddr;
  logic [NCH*32-1:0] wword;

  always_comb begin
    wword        = '0;
    wword[W-1:0] = din;
  end

  always_ff @(posedge clk) begin
    if (!freeze) mem[wptr] <= wword;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr     <= '0;
      stored   <= '0;
      frozen_q <= 1'b0;
    end else begin
      frozen_q <= freeze;
      if (!freeze) begin
        wptr <= wptr + 1'b1;
        if (frozen_q)                     stored <= (AW+1)'(1);
        else if (stored != (AW+1)'(DEPTH)) stored <= stored + 1'b1;
      end
    end
  end

  // oldest entry = wptr - stored
  assign raddr = wptr - stored[AW-1:0] + rd_index;

  always_ff @(posedge clk) begin
    rd_data <= (32'(rd_chunk) < NCH) ? mem[raddr][rd_chunk*32 +: 32] : '0;
  end

endmodule
