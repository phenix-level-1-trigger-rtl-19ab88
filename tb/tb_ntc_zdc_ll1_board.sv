// tb_ntc_zdc_ll1_board: the NTC/ZDC board at full size (5 fibers x 4 frames)
// fed with TDC words around a random vertex. Every crossing's GL1 primitive is
// compared with ll1_ref_pkg (valid-hit mean time per side, vertex difference,
// windows) and its latency with the 40-tick budget. Through VME the NTC vertex
// window is narrowed (more crossings must fail it), a TDC window is set that
// rejects all ZDC hits, and two accepted crossings are read from the accept
// FIFO. Counted: vertex inside and outside the window, sides without valid
// hits, the window change and the accepts.
module tb_ntc_zdc_ll1_board;
  import ll1_pkg::*;
  import ll1_ref_pkg::*;
  localparam int NX = 256;

  logic bclk = 0, fclk = 0, rst_n = 0;
  logic enable = 0, l1_accept = 0, gtm_test = 0, acc_rd_en = 0;
  logic [4:0][15:0] rx_data;
  logic [4:0] rx_flag, rx_dav, rx_ready;
  logic as_n, write_n, lword_n, vdata_oe, dtack_n;
  logic [1:0] ds_n;
  logic [5:0] am;
  logic [31:1] vaddr;
  logic [31:0] vdata_i, vdata_o;
  logic [7:0] gl1_prim;
  logic gl1_valid, acc_empty;
  logic [81:0] acc_dout;
  int cur;
  int checks = 0, failures = 0;

  nz_word_t xmem [NX];
  win_t wn = '{1, 4094, -200, 200}, wz = '{1, 4094, -200, 200};

  ntc_zdc_ll1_board dut (
    .bclk, .rst_n, .fclk({5{fclk}}), .rx_data, .rx_flag, .rx_dav, .rx_ready,
    .l1_accept, .gtm_test, .as_n, .ds_n, .write_n, .am, .vaddr, .lword_n, .vdata_i,
    .vdata_o, .vdata_oe, .dtack_n, .gl1_prim, .gl1_valid, .acc_rd_en, .acc_dout, .acc_empty);

  fiber_src #(.FIBERS(5), .FRAMES(4), .FW(16)) src (
    .fclk, .enable, .xing_data(xmem[cur % NX]), .misframe_req(1'b0), .rx_data, .rx_flag,
    .rx_dav, .rx_ready, .cur);

  vme_bfm bfm (.as_n, .ds_n, .write_n, .am, .addr(vaddr), .lword_n, .wdata(vdata_i),
               .rdata(vdata_o), .dtack_n);

  always #7.5 fclk = ~fclk;
  initial begin #2; forever #30 bclk = ~bclk; end

  int tick = 0;
  int start_tick [NX];
  always @(posedge bclk) tick++;
  always @(cur) start_tick[cur % NX] = tick;

  int n_in = 0, n_out = 0, n_noside = 0, n_zdc_rej = 0, n_accept = 0, lat_max = 0;
  bit checking = 1;
  int outc = 0;
  int acc_tick [$], acc_xing [$];
  int acc_want [$] = '{40, 77};
  logic [7:0] acc_exp [$];

  always @(negedge bclk) begin
    l1_accept <= (acc_tick.size() > 0 && acc_tick[0] == tick);
    if (acc_tick.size() > 0 && acc_tick[0] == tick) void'(acc_tick.pop_front());
    if (rst_n && gl1_valid) begin
      automatic int c = outc;
      if (checking) begin
        automatic logic [7:0] e = nz_eval(xmem[c % NX], wn, wz);
        automatic int lat = tick - start_tick[c % NX];
        checks += 2;
        if (gl1_prim !== e) begin failures++; $display("FAIL crossing %0d prim %b exp %b", c, gl1_prim, e); end
        if (lat > 40) begin failures++; $display("FAIL latency %0d", lat); end
        if (lat > lat_max) lat_max = lat;
        if (e[3]) n_in++;
        if (e[2] && !e[3]) n_out++;
        if (!e[2] || (wz.tlo < 4000 && !e[6])) n_noside++;
        if (wz.tlo > 4000 && e[4] == 0) n_zdc_rej++;
        if (acc_want.size() > 0 && acc_want[0] == c) begin
          acc_tick.push_back(tick + 32);
          acc_exp.push_back(e);
          void'(acc_want.pop_front());
        end
      end
      outc++;
    end
  end

  task automatic wait_ticks(int n);
    repeat (n) @(posedge bclk);
  endtask

  initial begin
    for (int n = 0; n < NX; n++) xmem[n] = nz_event(int'($urandom % 300) - 150);
    repeat (3) @(posedge bclk);
    rst_n = 1;
    @(posedge bclk);
    enable = 1;
    wait_ticks(160);
    checks++; if (outc < 100) begin failures++; $display("FAIL only %0d outputs", outc); end
    // accepted events: the FIFO keeps the full result word; its low byte is the primitive
    while (!acc_empty) begin
      automatic logic [7:0] e = acc_exp.pop_front();
      checks++;
      if (acc_dout[7:0] !== e) begin failures++; $display("FAIL accept %b exp %b", acc_dout[7:0], e); end
      else n_accept++;
      @(negedge bclk); acc_rd_en = 1; @(negedge bclk); acc_rd_en = 0;
    end
    checks++; if (n_accept != 2) begin failures++; $display("FAIL %0d accepts", n_accept); end
    // narrow NTC vertex window to -40..+40, reject all ZDC hits (TDC window 4001..4094)
    checking = 0;
    bfm.write(32'h2000_0000 + ((REG_ALG0 + 1) << 2), {3'd0, 13'd40, 3'd0, 13'h1fd8});
    bfm.write(32'h2000_0000 + ((REG_ALG0 + 2) << 2), {4'd0, 12'd4094, 4'd0, 12'd4001});
    wait_ticks(10);
    wn.vlo = -40; wn.vhi = 40; wz.tlo = 4001;
    checking = 1;
    wait_ticks(150);
    checks++; if (bfm.timeouts != 0) begin failures++; $display("FAIL VME timeouts"); end
    $display("mechanisms: vertex-in=%0d vertex-out=%0d side-without-hits=%0d zdc-rejected=%0d accept=%0d latency=%0d",
             n_in, n_out, n_noside, n_zdc_rej, n_accept, lat_max);
    if (n_in == 0 || n_out == 0 || n_noside == 0 || n_zdc_rej == 0 || n_accept == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
