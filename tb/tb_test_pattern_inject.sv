// tb_test_pattern_inject: loads a pattern memory, then checks the three modes:
// live pass-through, continuous looping under register control (rows
// 0..pat_len-1 repeating), and a single play-out started by the timing strobe,
// after which live data return. Output latency is one clock in every mode.
module tb_test_pattern_inject;
  import ll1_pkg::*;
  localparam int W = 72, D = 8;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] live_in = '0, data_out;
  inj_mode_e mode = INJ_LIVE;
  logic [3:0] pat_len = 4'd5;
  logic gtm_test = 0, pat_we = 0, injecting;
  logic [2:0] pat_row = '0;
  logic [5:0] pat_chunk = '0;
  logic [31:0] pat_wdata = '0;
  int checks = 0, failures = 0;
  logic [95:0] pat [D];

  test_pattern_inject #(.W(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  task automatic expect_out(logic [W-1:0] e, bit inj, string what);
    checks++;
    if (data_out !== e || injecting !== inj) begin
      failures++; $display("FAIL %s: got %h exp %h", what, data_out, e);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < D; r++)
      for (int c = 0; c < 3; c++) begin
        pat[r][c*32 +: 32] = $urandom;
        pat_we = 1; pat_row = 3'(r); pat_chunk = 6'(c); pat_wdata = pat[r][c*32 +: 32];
        @(negedge clk);
      end
    pat_we = 0;
    // live
    for (int i = 0; i < 5; i++) begin
      live_in = {8'(i), $urandom, $urandom};
      @(negedge clk);
      expect_out(live_in, 0, "live");
    end
    // loop
    mode = INJ_LOOP;
    for (int i = 0; i < 12; i++) begin
      @(negedge clk);
      expect_out(pat[i % 5][W-1:0], 1, "loop");
    end
    // timed
    mode = INJ_TIMED;
    live_in = 72'h5a5a;
    @(negedge clk); @(negedge clk);
    expect_out(live_in, 0, "timed idle");
    gtm_test = 1; @(negedge clk); gtm_test = 0;
    expect_out(live_in, 0, "timed start");
    for (int i = 0; i < 5; i++) begin
      @(negedge clk);
      expect_out(pat[i][W-1:0], 1, "timed play");
    end
    @(negedge clk);
    expect_out(live_in, 0, "timed end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
