// tb_muid_workload: the MuID board's full data load over a stretch longer than
// its monitor memory. One board at its default size (20 fibers x 6 frames x 16
// bits = 1920 bits per beam crossing) receives 1200 consecutive generated
// events with no idle crossing, which is the 18.4 Gbit/s the MuID boards must
// take at a 57.6 MHz frame clock. Checked against ll1_ref_pkg:
//   - every GL1 primitive and its latency (within the 40-tick Level-1 budget);
//   - the board delivers one primitive per beam clock, with no gap;
//   - after a freeze the monitor holds exactly 1024 crossings, all valid, and
//     its last stage reads back, oldest first, as 1024 consecutive primitives
//     the board sent to GL1.
// Timing: beam clock 60 ns, fiber clock 10 ns (6 x BCLK).
module tb_muid_workload;
  import ll1_pkg::*;
  import ll1_ref_pkg::*;
  localparam int NX = 1200;

  logic bclk = 0, fclk = 0, rst_n = 0;
  logic enable = 0, l1_accept = 0, gtm_test = 0, acc_rd_en = 0;
  logic [19:0][15:0] rx_data;
  logic [19:0] rx_flag, rx_dav, rx_ready;
  logic as_n, write_n, lword_n, vdata_oe, dtack_n;
  logic [1:0] ds_n;
  logic [5:0] am;
  logic [31:1] vaddr;
  logic [31:0] vdata_i, vdata_o;
  logic [3:0] gl1_prim;
  logic gl1_valid, acc_empty;
  logic [259:0] acc_dout;
  int cur;
  int checks = 0, failures = 0;

  mu_word_t xmem [NX];
  crit_t cd = '{4, 3, 1}, cs = '{2, 2, 1};

  muid_ll1_board dut (
    .bclk, .rst_n, .fclk({20{fclk}}), .rx_data, .rx_flag, .rx_dav, .rx_ready,
    .l1_accept, .gtm_test, .as_n, .ds_n, .write_n, .am, .vaddr, .lword_n, .vdata_i,
    .vdata_o, .vdata_oe, .dtack_n, .gl1_prim, .gl1_valid, .acc_rd_en, .acc_dout, .acc_empty);

  fiber_src #(.FIBERS(20), .FRAMES(6), .FW(16)) src (
    .fclk, .enable, .xing_data(xmem[cur % NX]), .misframe_req(1'b0), .rx_data, .rx_flag,
    .rx_dav, .rx_ready, .cur);

  vme_bfm bfm (.as_n, .ds_n, .write_n, .am, .addr(vaddr), .lword_n, .wdata(vdata_i),
               .rdata(vdata_o), .dtack_n);

  always #5 fclk = ~fclk;
  initial begin #2; forever #30 bclk = ~bclk; end

  int tick = 0;
  int start_tick [NX];
  always @(posedge bclk) tick++;
  always @(cur) if (cur < NX) start_tick[cur] = tick;

  int outc = 0, gaps = 0, lat_max = 0;
  logic [3:0] out_prim [NX];
  always @(negedge bclk) begin
    if (rst_n && gl1_valid && outc < NX) begin
      mu_res_t r;
      int lat;
      r = mu_eval(xmem[outc], cd, cs);
      out_prim[outc] = gl1_prim;
      checks++;
      if (gl1_prim !== r.prim) begin
        failures++; $display("FAIL crossing %0d prim %b exp %b", outc, gl1_prim, r.prim);
      end
      lat = tick - start_tick[outc];
      if (lat > lat_max) lat_max = lat;
      checks++;
      if (lat > L1_LATENCY) begin failures++; $display("FAIL latency %0d", lat); end
      outc++;
    end else if (rst_n && outc > 0 && outc < NX) gaps++;
  end

  initial begin
    logic [31:0] q;
    int stored, c0;
    logic [4:0] st [MON_DEPTH];
    for (int n = 0; n < NX; n++) xmem[n] = mu_event(n % 5);
    repeat (3) @(posedge bclk);
    rst_n = 1;
    @(posedge bclk);
    enable = 1;
    wait (outc >= NX - 20);
    // freeze all monitors while the stream is still running
    bfm.write(32'h1000_0000 + (REG_CTRL << 2), 32'h4);
    wait (outc >= NX);
    enable = 0;
    checks++; if (gaps != 0) begin failures++; $display("FAIL %0d idle crossings in the stream", gaps); end
    bfm.read(32'h1000_0000 + ((REG_ALG0 + 4) << 2), q);
    stored = int'(q);
    checks++;
    if (stored != MON_DEPTH) begin failures++; $display("FAIL monitor holds %0d crossings", stored); end
    for (int i = 0; i < MON_DEPTH; i++) begin
      bfm.read(32'h1000_0000 + ((MON_BASE + (3 << 16) + i * 64) << 2), q);
      st[i] = q[4:0];
    end
    // the frozen window is 1024 consecutive outputs; find where it starts
    c0 = -1;
    for (int c = 0; c + MON_DEPTH <= NX && c0 < 0; c++) begin
      automatic bit ok = 1;
      for (int i = 0; i < MON_DEPTH && ok; i++) ok = (st[i] === {1'b1, out_prim[c + i]});
      if (ok) c0 = c;
    end
    checks++;
    if (c0 < 0) begin failures++; $display("FAIL monitor contents are not 1024 consecutive outputs"); end
    checks++;
    if (c0 >= 0 && c0 + MON_DEPTH < NX - 40) begin
      failures++; $display("FAIL monitor window ends at crossing %0d, before the freeze", c0 + MON_DEPTH);
    end
    checks++; if (bfm.timeouts != 0) begin failures++; $display("FAIL VME timeouts %0d", bfm.timeouts); end
    $display("workload: crossings=%0d bits/crossing=%0d idle=%0d latency=%0d monitor=%0d from crossing %0d",
             outc, MUID_FIBERS * MUID_FRAMES * FRAME_W, gaps, lat_max, stored, c0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
