// tb_glink_demux: checks that glink_demux rebuilds every crossing of a 6-frame
// fiber stream in order, delivers one crossing per beam clock with no gaps,
// keeps its latency within 6 beam clocks, and flags a misframed crossing.
// Fiber clock 10 ns, beam clock 60 ns; frames change on the falling fiber
// clock edge. Frame k of crossing n carries a value computed from n and k.
module tb_glink_demux;
  localparam int FW = 16, FR = 6;
  logic rst_n = 0, fclk = 0, bclk = 0, err_clear = 0;
  logic [FW-1:0] rx_data = '0;
  logic rx_flag = 0, rx_dav = 0, rx_ready = 0;
  logic [FR*FW-1:0] xing_data;
  logic xing_valid, phase_err, fifo_err;
  int checks = 0, failures = 0;

  glink_demux #(.FRAME_W(FW), .FRAMES(FR)) dut (.*);

  always #5  fclk = ~fclk;
  initial begin #2; forever #30 bclk = ~bclk; end

  function automatic logic [FW-1:0] frame(int n, int k);
    return FW'((n * 7 + k * 3 + 1) ^ (k << 12));
  endfunction

  int  sent = 0;          // crossings completely sent
  bit  glitch = 0;        // send one misframed crossing
  bit  glitched = 0;      // data checks stop after the misframed crossing
  int  cur = 0, k = 0;
  always @(negedge fclk) begin
    if (rx_ready) begin
      rx_dav  <= 1'b1;
      rx_flag <= (k == 0) || (glitch && k == 3);
      rx_data <= frame(cur, k);
      if (k == FR - 1) begin k <= 0; cur <= cur + 1; sent <= sent + 1; end
      else k <= k + 1;
    end
  end

  int expect_n = -1, got = 0, gaps = 0;
  int last_frame_time, lat_max = 0;
  always @(posedge bclk) if (rst_n) begin
    if (xing_valid) begin
      logic [FR*FW-1:0] exp_w;
      if (expect_n < 0) expect_n = 0;
      // find which crossing this is: must be the next one
      for (int q = 0; q < FR; q++) exp_w[q*FW +: FW] = frame(expect_n, q);
      if (!glitched) begin
        checks++;
        if (xing_data !== exp_w) begin
          failures++;
          $display("FAIL crossing %0d: got %h exp %h", expect_n, xing_data, exp_w);
        end
        // latency: crossing expect_n finished sending at crossing count expect_n+1
        checks++;
        if (sent - (expect_n + 1) > 6 || sent < expect_n + 1) begin
          failures++;
          $display("FAIL latency: sent=%0d delivered=%0d", sent, expect_n);
        end
      end
      expect_n++;
      got++;
    end else if (got > 0 && !glitched) gaps++;
  end

  initial begin
    repeat (3) @(posedge bclk);   // both clock domains see reset
    rst_n = 1;
    repeat (2) @(posedge fclk);
    rx_ready = 1;
    repeat (60) @(posedge bclk);
    checks++; if (got < 50) begin failures++; $display("FAIL only %0d crossings", got); end
    checks++; if (gaps != 0) begin failures++; $display("FAIL %0d gaps", gaps); end
    checks++; if (phase_err || fifo_err) begin failures++; $display("FAIL error flags in clean run"); end
    // one misframed crossing: flag in the middle
    @(negedge fclk); wait (k == 2); glitch = 1; glitched = 1; wait (k == 4); glitch = 0;
    repeat (6) @(posedge bclk);
    checks++; if (!phase_err) begin failures++; $display("FAIL phase error not flagged"); end
    @(posedge bclk); err_clear <= 1; @(posedge bclk); err_clear <= 0;
    repeat (3) @(posedge bclk);
    checks++; if (phase_err) begin failures++; $display("FAIL phase error not cleared"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
