// tb_monitor_fifo: records a counting stream for more than DEPTH crossings,
// freezes, and reads back: the oldest entry must be the value written DEPTH
// crossings before the freeze, every 32-bit slice must match, and the stored
// count must saturate at DEPTH. Then restarts with a short run and checks the
// partial count and content.
module tb_monitor_fifo;
  localparam int W = 40, D = 16;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] din = '0;
  logic freeze = 0;
  logic [4:0] stored;
  logic [3:0] rd_index = '0;
  logic [5:0] rd_chunk = '0;
  logic [31:0] rd_data;
  int checks = 0, failures = 0;

  monitor_fifo #(.W(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [W-1:0] val(int n);
    return {8'(n * 3), 32'(n * 32'h01010101 + 7)};
  endfunction

  task automatic readback(int n, int first);
    for (int i = 0; i < n; i++)
      for (int c = 0; c < 2; c++) begin
        logic [63:0] e;
        rd_index = 4'(i); rd_chunk = 6'(c);
        @(negedge clk);
        e = 64'(val(first + i));
        checks++;
        if (rd_data !== e[c*32 +: 32]) begin
          failures++; $display("FAIL idx %0d chunk %0d got %h exp %h", i, c, rd_data, e[c*32 +: 32]);
        end
      end
  endtask

  initial begin
    int n;
    repeat (2) @(negedge clk);
    rst_n = 1;
    n = 0;
    repeat (37) begin din = val(n); n++; @(negedge clk); end
    freeze = 1;
    @(negedge clk);
    checks++; if (stored != 5'(D)) begin failures++; $display("FAIL stored %0d", stored); end
    readback(D, n - D);
    freeze = 0;
    repeat (5) begin din = val(n); n++; @(negedge clk); end
    freeze = 1;
    @(negedge clk);
    checks++; if (stored != 5'd5) begin failures++; $display("FAIL stored after restart %0d", stored); end
    readback(5, n - 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
