// bit_mask: per-bit data mask at the input of a GenLL1 algorithm.
//
// A set mask bit forces the matching input bit to 0, so a dead or noisy
// channel can be removed from the trigger without reprogramming the FPGA.
// The mask register is W bits, written and read back 32 bits at a time over
// the register bus; it resets to all zeros (every channel enabled).
// Timing: data_out is registered, one clock after data_in.
// The source names data bit masks as part of the common board logic; polarity,
// reset value and access width are this design's choices.
module bit_mask
  import ll1_pkg::*;
#(
  parameter int unsigned W = 1920
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [W-1:0]  data_in,
  output logic [W-1:0]  data_out,
  input  logic          mask_we,
  input  logic [5:0]    mask_chunk,
  input  logic [31:0]   mask_wdata,
  output logic [31:0]   mask_rdata     // chunk mask_chunk of the mask
);
  localparam int unsigned NCH = chunks32(W);

  logic [NCH*32-1:0] mask_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mask_q   <= '0;
      data_out <= '0;
    end else begin
      if (mask_we && (32'(mask_chunk) < NCH))
        mask_q[mask_chunk*32 +: 32] <= mask_wdata;
      data_out <= data_in & ~mask_q[W-1:0];
    end
  end

  assign mask_rdata = (32'(mask_chunk) < NCH) ? mask_q[mask_chunk*32 +: 32] : '0;

endmodule
