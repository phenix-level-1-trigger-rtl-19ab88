// test_pattern_inject: input-stage test pattern source of a GenLL1 board.
//
// Every board can replace its fiber inputs by test patterns, either under VME
// control or under timing-system control. The pattern memory holds DEPTH rows
// of W bits, written 32 bits at a time over the register bus (row, chunk).
// Modes (ll1_pkg::inj_mode_e):
//   INJ_LIVE  - the live input passes through;
//   INJ_LOOP  - rows 0..pat_len-1 are played one per beam clock, repeating;
//   INJ_TIMED - live data until a timing strobe (gtm_test), then rows
//               0..pat_len-1 are played once, then live data again.
// Output is registered: one beam clock of latency in every mode.
// The two control paths follow the source description; the memory depth,
// the modes' details and the chunked write port are this design's choices.
module test_pattern_inject
  import ll1_pkg::*;
#(
  parameter int unsigned W     = 1920,
  parameter int unsigned DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [W-1:0]             live_in,
  input  inj_mode_e                mode,
  input  logic [$clog2(DEPTH):0]   pat_len,   // rows used, 1..DEPTH
  input  logic                     gtm_test,  // timing-system start strobe
  input  logic                     pat_we,
  input  logic [$clog2(DEPTH)-1:0] pat_row,
  input  logic [5:0]               pat_chunk,
  input  logic [31:0]              pat_wdata,
  output logic [W-1:0]             data_out,
  output logic                     injecting
);
  localparam int unsigned NCH = chunks32(W);
  localparam int unsigned AW  = $clog2(DEPTH);

  logic [NCH*32-1:0] pat_mem [DEPTH];
  logic [AW-1:0]     row;
  logic              playing;
  logic [AW:0]       row_next;

  always_ff @(posedge clk) begin
    if (pat_we && (32'(pat_chunk) < NCH))
      pat_mem[pat_row][pat_chunk*32 +: 32] <= pat_wdata;
  end

  assign row_next = {1'b0, row} + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row       <= '0;
      playing   <= 1'b0;
      data_out  <= '0;
      injecting <= 1'b0;
    end else begin
      unique case (mode)
        INJ_LOOP: begin
          data_out  <= pat_mem[row][W-1:0];
          injecting <= 1'b1;
          row       <= (row_next >= pat_len) ? '0 : row_next[AW-1:0];
          playing   <= 1'b0;
        end
        INJ_TIMED: begin
          if (playing) begin
            data_out  <= pat_mem[row][W-1:0];
            injecting <= 1'b1;
            if (row_next >= pat_len) begin
              row     <= '0;
              playing <= 1'b0;
            end else begin
              row <= row_next[AW-1:0];
            end
          end else begin
            data_out  <= live_in;
            injecting <= 1'b0;
            row       <= '0;
            playing   <= gtm_test;
          end
        end
        default: begin
          data_out  <= live_in;
          injecting <= 1'b0;
          row       <= '0;
          playing   <= 1'b0;
        end
      endcase
    end
  end

endmodule
