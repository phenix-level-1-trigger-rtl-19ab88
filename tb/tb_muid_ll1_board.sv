// tb_muid_ll1_board: one MuID board at its full size (20 fibers x 6 frames,
// 128 symsets, 1024-crossing monitors) fed with generated muon events.
// Checked against ll1_ref_pkg for every crossing: the GL1 primitive, its
// latency from the first frame on the fiber (must stay within the 40-tick
// Level-1 budget), and, through the VME bus: the monitor FIFO contents after a
// freeze, a bit mask that removes gaps 4 and 5 (deep roads must disappear),
// looping and timing-strobed test patterns, the accepted-event FIFO, and the
// phase-error status after a misframed crossing. Every mechanism is counted
// and one that never happened is a failure.
module tb_muid_ll1_board;
  import ll1_pkg::*;
  import ll1_ref_pkg::*;
  localparam int NX = 512;
  localparam int LAT_MAX = 40;

  logic bclk = 0, fclk = 0, rst_n = 0;
  logic enable = 0, misframe_req = 0, l1_accept = 0, gtm_test = 0, acc_rd_en = 0;
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
  mu_word_t mask_ref = '0;
  crit_t cd = '{4, 3, 1}, cs = '{2, 2, 1};

  muid_ll1_board dut (
    .bclk, .rst_n, .fclk({20{fclk}}), .rx_data, .rx_flag, .rx_dav, .rx_ready,
    .l1_accept, .gtm_test, .as_n, .ds_n, .write_n, .am, .vaddr, .lword_n, .vdata_i,
    .vdata_o, .vdata_oe, .dtack_n, .gl1_prim, .gl1_valid, .acc_rd_en, .acc_dout, .acc_empty);

  fiber_src #(.FIBERS(20), .FRAMES(6), .FW(16)) src (
    .fclk, .enable, .xing_data(xmem[cur % NX]), .misframe_req, .rx_data, .rx_flag,
    .rx_dav, .rx_ready, .cur);

  vme_bfm bfm (.as_n, .ds_n, .write_n, .am, .addr(vaddr), .lword_n, .wdata(vdata_i),
               .rdata(vdata_o), .dtack_n);

  always #5 fclk = ~fclk;
  initial begin #2; forever #30 bclk = ~bclk; end

  // ---------------- bookkeeping ----------------
  int tick = 0;
  int start_tick [NX];
  always @(posedge bclk) tick++;
  always @(cur) start_tick[cur % NX] = tick;

  // mechanism counters
  int n_deep = 0, n_shallow = 0, n_skip = 0, n_masked = 0, n_loop = 0, n_timed = 0;
  int n_accept = 0, n_monitor = 0, n_phase = 0, lat_max = 0;

  bit checking = 1;
  int outc = 0;                     // crossing index of the current output
  int acc_tick [$];
  int acc_xing [$];
  int acc_want [$] = '{60, 61, 100};
  logic [3:0] out_prim [int];       // outputs by crossing, for pattern checks

  always @(negedge bclk) begin
    l1_accept <= (acc_tick.size() > 0 && acc_tick[0] == tick);
    if (acc_tick.size() > 0 && acc_tick[0] == tick) void'(acc_tick.pop_front());
    if (rst_n && gl1_valid) begin
      automatic int c = outc;
      out_prim[c] = gl1_prim;
      if (checking) begin
        mu_res_t r, r0;
        int lat;
        r  = mu_eval(xmem[c % NX] & ~mask_ref, cd, cs);
        r0 = mu_eval(xmem[c % NX], cd, cs);
        checks++;
        if (gl1_prim !== r.prim) begin
          failures++; $display("FAIL crossing %0d prim %b exp %b", c, gl1_prim, r.prim);
        end
        lat = tick - start_tick[c % NX];
        if (lat > lat_max) lat_max = lat;
        checks++;
        if (lat > LAT_MAX) begin failures++; $display("FAIL latency %0d", lat); end
        if (r.nd > 0) n_deep++;
        if (r.nd == 0 && r.ns > 0) n_shallow++;
        if (r.nd > 0 && (c % 5) == 1) n_skip++;
        if (r0.nd > 0 && r.nd == 0 && mask_ref != '0) n_masked++;
        if (acc_want.size() > 0 && acc_want[0] == c) begin
          acc_tick.push_back(tick + 32);
          acc_xing.push_back(c);
          void'(acc_want.pop_front());
        end
      end
      outc++;
    end
  end

  task automatic wait_ticks(int n);
    repeat (n) @(posedge bclk);
  endtask

  // ---------------- test sequence ----------------
  initial begin
    logic [31:0] q;
    for (int n = 0; n < NX; n++) xmem[n] = mu_event(n % 5);
    repeat (3) @(posedge bclk);
    rst_n = 1;
    @(posedge bclk);
    enable = 1;
    wait_ticks(150);
    checks++; if (outc < 120) begin failures++; $display("FAIL only %0d outputs", outc); end

    // status: no phase errors in a clean run
    bfm.read(32'h1000_0000 + (REG_STATUS << 2), q);
    checks++; if (q != 0) begin failures++; $display("FAIL status %h", q); end

    // accepted events
    wait_ticks(20);
    while (!acc_empty) begin
      mu_res_t r;
      automatic int c = acc_xing.pop_front();
      r = mu_eval(xmem[c % NX], cd, cs);
      checks++;
      if (acc_dout !== {r.prim, r.deep, r.shallow}) begin
        failures++; $display("FAIL accept fifo crossing %0d", c);
      end else n_accept++;
      @(negedge bclk); acc_rd_en = 1; @(negedge bclk); acc_rd_en = 0;
    end
    checks++; if (n_accept != 3) begin failures++; $display("FAIL %0d accepted events", n_accept); end

    // monitor: freeze and read back stage 3 ({valid, prim}) and stage 2 maps
    begin
      int stored, first;
      logic [4:0] st [];
      bfm.write(32'h1000_0000 + (REG_CTRL << 2), 32'h4);
      bfm.read(32'h1000_0000 + ((REG_ALG0 + 4) << 2), q);
      stored = int'(q);
      checks++; if (stored < 150 || stored > 1024) begin failures++; $display("FAIL monitor stored %0d", stored); end
      st = new[stored];
      first = -1;
      for (int i = 0; i < stored; i++) begin
        bfm.read(32'h1000_0000 + ((MON_BASE + (3 << 16) + i * 64) << 2), q);
        st[i] = q[4:0];
        if (first < 0 && q[4]) first = i;
      end
      for (int i = first; i < stored && i < first + 120; i++) begin
        automatic mu_res_t r = mu_eval(xmem[(i - first) % NX], cd, cs);
        checks++;
        if (st[i] !== {1'b1, r.prim}) begin
          failures++; $display("FAIL monitor entry %0d: %b exp %b", i, st[i], {1'b1, r.prim});
        end else n_monitor++;
      end
      // symset maps of crossing 7, one stage earlier
      begin
        automatic mu_res_t r = mu_eval(xmem[7], cd, cs);
        automatic logic [255:0] exp_map = {r.shallow, r.deep};
        for (int ch = 0; ch < 8; ch++) begin
          bfm.read(32'h1000_0000 + ((MON_BASE + (2 << 16) + (first + 6) * 64 + ch) << 2), q);
          checks++;
          if (q !== exp_map[ch*32 +: 32]) begin failures++; $display("FAIL monitor map chunk %0d", ch); end
        end
      end
      bfm.write(32'h1000_0000 + (REG_CTRL << 2), 32'h0);
    end

    // bit mask: remove gaps 4 and 5 (physical bits 1152..1919 = chunks 36..59)
    checking = 0;
    for (int ch = 36; ch < 60; ch++) bfm.write(32'h1000_0000 + ((MASK_BASE + ch) << 2), 32'hffff_ffff);
    wait_ticks(20);
    mask_ref = '0;
    mask_ref[1919:1152] = '1;
    checking = 1;
    wait_ticks(120);
    checking = 0;
    for (int ch = 36; ch < 60; ch++) bfm.write(32'h1000_0000 + ((MASK_BASE + ch) << 2), 32'h0);
    wait_ticks(20);
    mask_ref = '0;
    checking = 1;
    wait_ticks(60);

    // test patterns: two rows, a one-track and a two-track event
    begin
      mu_word_t p [2];
      logic [3:0] pp [2];
      int c0, alt;
      p[0] = mu_event(0);
      p[1] = mu_event(3);
      pp[0] = mu_eval(p[0], cd, cs).prim;
      pp[1] = mu_eval(p[1], cd, cs).prim;
      for (int r = 0; r < 2; r++)
        for (int ch = 0; ch < 60; ch++)
          bfm.write(32'h1000_0000 + ((PAT_BASE + r * 64 + ch) << 2), p[r][ch*32 +: 32]);
      bfm.write(32'h1000_0000 + (REG_PAT_LEN << 2), 32'd2);
      checking = 0;
      bfm.write(32'h1000_0000 + (REG_CTRL << 2), 32'(INJ_LOOP));
      wait_ticks(10);
      c0 = outc;
      wait_ticks(40);
      // outputs must alternate between the two pattern primitives
      alt = (out_prim[c0] == pp[0]) ? 0 : 1;
      for (int c = c0; c < c0 + 30; c++) begin
        checks++;
        if (out_prim[c] !== pp[(c - c0 + alt) % 2]) begin
          failures++; $display("FAIL loop pattern at %0d: %b", c, out_prim[c]);
        end else n_loop++;
      end
      // timing-strobed single play-out
      bfm.write(32'h1000_0000 + (REG_CTRL << 2), 32'(INJ_TIMED));
      wait_ticks(10);
      @(negedge bclk); c0 = outc; gtm_test = 1; @(negedge bclk); gtm_test = 0;
      wait_ticks(20);
      begin
        automatic int found = -1;
        for (int c = c0; c < c0 + 12; c++)
          if (out_prim[c] === pp[0] && out_prim[c + 1] === pp[1]) found = c;
        checks++;
        if (found < 0) begin failures++; $display("FAIL timed pattern not seen"); end
        else begin
          n_timed++;
          for (int c = found + 2; c < c0 + 18; c++) begin
            checks++;
            if (out_prim[c] !== mu_eval(xmem[c % NX], cd, cs).prim) begin
              failures++; $display("FAIL live data after timed pattern at %0d", c);
            end
          end
        end
      end
      bfm.write(32'h1000_0000 + (REG_CTRL << 2), 32'(INJ_LIVE));
      wait_ticks(10);
      checking = 1;
      wait_ticks(40);
    end

    // misframed crossing on fiber 0: status bit 0
    checking = 0;
    misframe_req = 1;
    wait_ticks(20);
    bfm.read(32'h1000_0000 + (REG_STATUS << 2), q);
    checks++;
    if (q[0] !== 1'b1) begin failures++; $display("FAIL phase error not reported: %h", q); end
    else n_phase++;

    checks++; if (bfm.timeouts != 0) begin failures++; $display("FAIL VME timeouts %0d", bfm.timeouts); end
    $display("mechanisms: deep=%0d shallow=%0d skipped-gap=%0d masked=%0d loop=%0d timed=%0d accept=%0d monitor=%0d phase=%0d latency=%0d",
             n_deep, n_shallow, n_skip, n_masked, n_loop, n_timed, n_accept, n_monitor, n_phase, lat_max);
    if (n_deep == 0 || n_shallow == 0 || n_skip == 0 || n_masked == 0 || n_loop == 0 ||
        n_timed == 0 || n_accept == 0 || n_monitor == 0 || n_phase == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
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
