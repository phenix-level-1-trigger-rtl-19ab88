// tb_phenix_ll1_top: the whole Local Level-1 crate with its default sizes (one
// NTC/ZDC board, four MuID boards of 20 fibers each, 1024-crossing monitors).
// All five boards receive generated events at once and every GL1 output of
// every board is compared, crossing by crossing, with ll1_ref_pkg, including
// the 40-tick latency budget. Over the shared VME bus the test reads each
// board's control register (only the addressed board may answer), masks gaps 4
// and 5 on MuID board 1, freezes and reads the monitor of MuID board 2, loops a
// test pattern on MuID board 3, issues Level-1 accepts seen by all boards and
// reads every accept FIFO, and misframes a fiber of MuID board 0. Each of
// these mechanisms is counted; one that never happened is a failure.
module tb_phenix_ll1_top;
  import ll1_pkg::*;
  import ll1_ref_pkg::*;
  localparam int NX = 256;
  localparam int NB = 4;

  logic bclk = 0, fclk6 = 0, fclk4 = 0, rst_n = 0;
  logic enable = 0, l1_accept = 0, gtm_test = 0;
  logic [4:0][15:0] nz_rx_data;
  logic [4:0] nz_rx_flag, nz_rx_dav, nz_rx_ready;
  logic [NB-1:0][19:0][15:0] mu_rx_data;
  logic [NB-1:0][19:0] mu_rx_flag, mu_rx_dav, mu_rx_ready;
  logic [NB-1:0] misframe = '0;
  logic as_n, write_n, lword_n, vdata_oe, dtack_n;
  logic [1:0] ds_n;
  logic [5:0] am;
  logic [31:1] vaddr;
  logic [31:0] vdata_i, vdata_o;
  logic [7:0] gl1_ntc_zdc;
  logic gl1_ntc_zdc_valid;
  logic [NB-1:0][3:0] gl1_muid;
  logic [NB-1:0] gl1_muid_valid;
  logic nz_acc_rd_en = 0, nz_acc_empty;
  logic [81:0] nz_acc_dout;
  logic [NB-1:0] mu_acc_rd_en = '0, mu_acc_empty;
  logic [NB-1:0][259:0] mu_acc_dout;
  int checks = 0, failures = 0;

  nz_word_t nz_mem [NX];
  mu_word_t mu_mem [NB][NX];
  mu_word_t mask_ref [NB];
  crit_t cd = '{4, 3, 1}, cs = '{2, 2, 1};
  win_t  wn = '{1, 4094, -200, 200}, wz = '{1, 4094, -200, 200};
  int nz_cur;
  int mu_cur [NB];

  phenix_ll1_top dut (
    .bclk, .rst_n, .l1_accept, .gtm_test,
    .nz_fclk({5{fclk4}}), .nz_rx_data, .nz_rx_flag, .nz_rx_dav, .nz_rx_ready,
    .mu_fclk({(NB*20){fclk6}}), .mu_rx_data, .mu_rx_flag, .mu_rx_dav, .mu_rx_ready,
    .as_n, .ds_n, .write_n, .am, .vaddr, .lword_n, .vdata_i, .vdata_o, .vdata_oe, .dtack_n,
    .gl1_ntc_zdc, .gl1_ntc_zdc_valid, .gl1_muid, .gl1_muid_valid,
    .nz_acc_rd_en, .nz_acc_dout, .nz_acc_empty, .mu_acc_rd_en, .mu_acc_dout, .mu_acc_empty);

  fiber_src #(.FIBERS(5), .FRAMES(4), .FW(16)) nz_src (
    .fclk(fclk4), .enable, .xing_data(nz_mem[nz_cur % NX]), .misframe_req(1'b0),
    .rx_data(nz_rx_data), .rx_flag(nz_rx_flag), .rx_dav(nz_rx_dav), .rx_ready(nz_rx_ready),
    .cur(nz_cur));

  for (genvar b = 0; b < NB; b++) begin : g_src
    fiber_src #(.FIBERS(20), .FRAMES(6), .FW(16)) mu_src (
      .fclk(fclk6), .enable, .xing_data(mu_mem[b][mu_cur[b] % NX]), .misframe_req(misframe[b]),
      .rx_data(mu_rx_data[b]), .rx_flag(mu_rx_flag[b]), .rx_dav(mu_rx_dav[b]),
      .rx_ready(mu_rx_ready[b]), .cur(mu_cur[b]));
  end

  vme_bfm bfm (.as_n, .ds_n, .write_n, .am, .addr(vaddr), .lword_n, .wdata(vdata_i),
               .rdata(vdata_o), .dtack_n);

  always #5   fclk6 = ~fclk6;
  always #7.5 fclk4 = ~fclk4;
  initial begin #2; forever #30 bclk = ~bclk; end

  int tick = 0;
  int nz_start [NX];
  always @(posedge bclk) tick++;
  always @(nz_cur) nz_start[nz_cur % NX] = tick;

  // mechanisms
  int n_deep = 0, n_shallow = 0, n_skip = 0, n_vin = 0, n_vout = 0, n_masked = 0;
  int n_loop = 0, n_accept = 0, n_monitor = 0, n_phase = 0, n_vme_sel = 0, lat_max = 0;

  bit nz_check = 1;
  bit mu_check [NB] = '{1, 1, 1, 1};
  int nz_outc = 0;
  int mu_outc [NB] = '{0, 0, 0, 0};
  logic [3:0] mu_out [NB][int];
  int acc_tick [$];
  int acc_at_xing = 90;
  bit acc_sent = 0;
  int acc_mu_xing [NB];

  always @(negedge bclk) begin
    l1_accept <= (acc_tick.size() > 0 && acc_tick[0] == tick);
    if (acc_tick.size() > 0 && acc_tick[0] == tick) void'(acc_tick.pop_front());
    if (rst_n && gl1_ntc_zdc_valid) begin
      automatic int c = nz_outc;
      if (nz_check) begin
        automatic logic [7:0] e = nz_eval(nz_mem[c % NX], wn, wz);
        automatic int lat = tick - nz_start[c % NX];
        checks += 2;
        if (gl1_ntc_zdc !== e) begin failures++; $display("FAIL ntc/zdc crossing %0d: %b exp %b", c, gl1_ntc_zdc, e); end
        if (lat > 40) begin failures++; $display("FAIL ntc/zdc latency %0d", lat); end
        if (lat > lat_max) lat_max = lat;
        if (e[3]) n_vin++;
        if (e[2] && !e[3]) n_vout++;
        if (c == acc_at_xing && !acc_sent) begin
          acc_tick.push_back(tick + 32);
          acc_sent = 1;
          // the MuID crossings on their outputs at this tick
          for (int b = 0; b < NB; b++) acc_mu_xing[b] = mu_outc[b];
        end
      end
      nz_outc++;
    end
    for (int b = 0; b < NB; b++) if (rst_n && gl1_muid_valid[b]) begin
      automatic int c = mu_outc[b];
      mu_out[b][c] = gl1_muid[b];
      if (mu_check[b]) begin
        automatic mu_res_t r  = mu_eval(mu_mem[b][c % NX] & ~mask_ref[b], cd, cs);
        automatic mu_res_t r0 = mu_eval(mu_mem[b][c % NX], cd, cs);
        checks++;
        if (gl1_muid[b] !== r.prim) begin failures++; $display("FAIL muid board %0d crossing %0d: %b exp %b", b, c, gl1_muid[b], r.prim); end
        if (r.nd > 0) n_deep++;
        if (r.nd == 0 && r.ns > 0) n_shallow++;
        if (r.nd > 0 && (c % 5) == 1) n_skip++;
        if (r0.nd > 0 && r.nd == 0) n_masked++;
      end
      mu_outc[b]++;
    end
  end

  task automatic wait_ticks(int n);
    repeat (n) @(posedge bclk);
  endtask

  function automatic logic [31:0] badr(int b, int word);
    logic [7:0] base = (b < 0) ? 8'h20 : 8'h10 + 8'(b);
    return {base, 24'(word << 2)};
  endfunction

  initial begin
    logic [31:0] q;
    for (int n = 0; n < NX; n++) begin
      nz_mem[n] = nz_event(int'($urandom % 300) - 150);
      for (int b = 0; b < NB; b++) mu_mem[b][n] = mu_event((n + b) % 5);
    end
    for (int b = 0; b < NB; b++) mask_ref[b] = '0;
    repeat (3) @(posedge bclk);
    rst_n = 1;
    @(posedge bclk);
    enable = 1;
    wait_ticks(160);
    checks++; if (nz_outc < 120 || mu_outc[3] < 120) begin failures++; $display("FAIL outputs missing"); end

    // each board answers at its own base only
    for (int b = -1; b < NB; b++) begin
      bfm.write(badr(b, REG_L1_DELAY), 32'(30 + b));
    end
    for (int b = -1; b < NB; b++) begin
      bfm.read(badr(b, REG_L1_DELAY), q);
      checks++;
      if (q !== 32'(30 + b)) begin failures++; $display("FAIL board %0d l1_delay %0d", b, q); end
      else n_vme_sel++;
      bfm.write(badr(b, REG_L1_DELAY), 32'd32);
    end

    // accept FIFOs: one accept (crossing acc_at_xing of the NTC/ZDC board) reaches all boards
    wait_ticks(10);
    checks++;
    if (nz_acc_empty) begin failures++; $display("FAIL ntc/zdc accept fifo empty"); end
    else if (nz_acc_dout[7:0] !== nz_eval(nz_mem[acc_at_xing % NX], wn, wz)) begin
      failures++; $display("FAIL ntc/zdc accepted data");
    end else n_accept++;
    for (int b = 0; b < NB; b++) begin
      checks++;
      if (mu_acc_empty[b]) begin failures++; $display("FAIL muid %0d accept fifo empty", b); end
      else begin
        automatic mu_res_t r = mu_eval(mu_mem[b][acc_mu_xing[b] % NX], cd, cs);
        if (mu_acc_dout[b] !== {r.prim, r.deep, r.shallow}) begin
          failures++; $display("FAIL muid %0d accepted data", b);
        end else n_accept++;
      end
    end
    @(negedge bclk); nz_acc_rd_en = 1; mu_acc_rd_en = '1;
    @(negedge bclk); nz_acc_rd_en = 0; mu_acc_rd_en = '0;
    checks++; if (!nz_acc_empty || mu_acc_empty != '1) begin failures++; $display("FAIL accept fifos not empty"); end

    // mask gaps 4 and 5 on MuID board 1
    mu_check[1] = 0;
    for (int ch = 36; ch < 60; ch++) bfm.write(badr(1, MASK_BASE + ch), 32'hffff_ffff);
    wait_ticks(20);
    mask_ref[1][1919:1152] = '1;
    mu_check[1] = 1;

    // monitor of MuID board 2: freeze, read the last 40 output entries
    begin
      int stored, last;
      bfm.write(badr(2, REG_CTRL), 32'h4);
      bfm.read(badr(2, REG_ALG0 + 4), q);
      stored = int'(q);
      last = -1;
      for (int i = stored - 40; i < stored; i++) begin
        bfm.read(badr(2, MON_BASE + (3 << 16) + i * 64), q);
        // find the crossing: the monitor holds consecutive outputs; compare
        // with the outputs the checker saw
        if (q[4]) begin
          automatic int found = 0;
          for (int c = mu_outc[2] - 1; c >= 0 && c > mu_outc[2] - 400; c--)
            if (mu_out[2][c] === q[3:0]) begin found = 1; break; end
          checks++;
          if (!found) begin failures++; $display("FAIL monitor entry %0d", i); end
          else n_monitor++;
        end
      end
      bfm.write(badr(2, REG_CTRL), 32'h0);
    end

    // loop a one-row test pattern on MuID board 3
    begin
      automatic mu_word_t p = mu_event(3);
      automatic logic [3:0] pp = mu_eval(p, cd, cs).prim;
      int c0;
      for (int ch = 0; ch < 60; ch++) bfm.write(badr(3, PAT_BASE + ch), p[ch*32 +: 32]);
      bfm.write(badr(3, REG_PAT_LEN), 32'd1);
      mu_check[3] = 0;
      bfm.write(badr(3, REG_CTRL), 32'(INJ_LOOP));
      wait_ticks(10);
      c0 = mu_outc[3];
      wait_ticks(30);
      for (int c = c0; c < c0 + 25; c++) begin
        checks++;
        if (mu_out[3][c] !== pp) begin failures++; $display("FAIL pattern output %b exp %b", mu_out[3][c], pp); end
        else n_loop++;
      end
      bfm.write(badr(3, REG_CTRL), 32'(INJ_LIVE));
      wait_ticks(10);
      mu_check[3] = 1;
    end
    wait_ticks(60);

    // misframed crossing on MuID board 0
    mu_check[0] = 0;
    misframe[0] = 1;
    wait_ticks(20);
    bfm.read(badr(0, REG_STATUS), q);
    checks++;
    if (q[0] !== 1'b1) begin failures++; $display("FAIL phase error not reported"); end
    else n_phase++;
    bfm.read(badr(1, REG_STATUS), q);
    checks++; if (q != 0) begin failures++; $display("FAIL board 1 reports phase error"); end

    checks++; if (bfm.timeouts != 0) begin failures++; $display("FAIL VME timeouts %0d", bfm.timeouts); end
    $display("mechanisms: deep=%0d shallow=%0d skipped-gap=%0d vertex-in=%0d vertex-out=%0d masked=%0d loop=%0d accept=%0d monitor=%0d phase=%0d vme-select=%0d latency=%0d",
             n_deep, n_shallow, n_skip, n_vin, n_vout, n_masked, n_loop, n_accept, n_monitor, n_phase, n_vme_sel, lat_max);
    if (n_deep == 0 || n_shallow == 0 || n_skip == 0 || n_vin == 0 || n_vout == 0 || n_masked == 0 ||
        n_loop == 0 || n_accept == 0 || n_monitor == 0 || n_phase == 0 || n_vme_sel == 0) begin
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
