// fiber_src: simulation-only GLINK receiver outputs for FIBERS fibers. While
// enabled it sends the crossing word xing_data (taken when frame 0 of crossing
// cur goes out) as FRAMES frames per fiber, frame k of fiber f being bits
// [(f*FRAMES+k)*FW +: FW], with the flag on frame 0. A one-time misframe on
// fiber 0 (a flag on frame 2) is sent after misframe_req is raised.
module fiber_src #(
  parameter int FIBERS = 20,
  parameter int FRAMES = 6,
  parameter int FW     = 16
) (
  input  logic                            fclk,
  input  logic                            enable,
  input  logic [FIBERS*FRAMES*FW-1:0]     xing_data,
  input  logic                            misframe_req,
  output logic [FIBERS-1:0][FW-1:0]       rx_data,
  output logic [FIBERS-1:0]               rx_flag,
  output logic [FIBERS-1:0]               rx_dav,
  output logic [FIBERS-1:0]               rx_ready,
  output int                              cur
);
  int k = 0;
  bit misframe_done = 0;
  logic [FIBERS*FRAMES*FW-1:0] word;

  initial begin
    rx_data = '0; rx_flag = '0; rx_dav = '0; rx_ready = '0; cur = 0;
  end

  always @(negedge fclk) begin
    rx_ready <= {FIBERS{enable}};
    rx_dav   <= {FIBERS{enable}};
    if (enable) begin
      logic [FIBERS*FRAMES*FW-1:0] w;
      w = (k == 0) ? xing_data : word;
      if (k == 0) word <= xing_data;
      for (int f = 0; f < FIBERS; f++) begin
        rx_data[f] <= w[(f*FRAMES + k)*FW +: FW];
        rx_flag[f] <= (k == 0);
      end
      if (misframe_req && !misframe_done && k == 2) begin
        rx_flag[0]    <= 1'b1;
        misframe_done <= 1'b1;
      end
      if (k == FRAMES - 1) begin
        k   <= 0;
        cur <= cur + 1;
      end else begin
        k <= k + 1;
      end
    end
  end
endmodule
